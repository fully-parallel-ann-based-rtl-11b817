// fpaac_ref_pkg: reference model of the 8x2x1 classifier for the testbenches.
//
// The hidden neurons' weighted sums are evaluated in the hardware's order
// (pairwise adder tree, then the bias) with single-precision rounding after
// every operation; the sigmoid, the output neuron and the class rule are then
// evaluated in double precision. Weights are taken from a weight-memory image
// (W0..W17, B0..B2).
package fpaac_ref_pkg;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  typedef struct {
    real         net [N_HID];
    real         hid [N_HID];
    real         out;
    beat_class_e cls;
  } ref_result_t;

  function automatic fp32_t fadd(input fp32_t a, input fp32_t b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic fp32_t fmul(input fp32_t a, input fp32_t b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic ref_result_t classify(input fp32_t x [N_IN], input weight_set_t wm);
    ref_result_t r;
    for (int j = 0; j < N_HID; j++) begin
      fp32_t p [N_IN];
      fp32_t s1 [4];
      fp32_t s2 [2];
      for (int i = 0; i < N_IN; i++) p[i] = fmul(x[i], wm[j*N_IN + i]);
      for (int i = 0; i < 4; i++) s1[i] = fadd(p[2*i], p[2*i+1]);
      for (int i = 0; i < 2; i++) s2[i] = fadd(s1[2*i], s1[2*i+1]);
      r.net[j] = f2r(fadd(fadd(s2[0], s2[1]), wm[N_W + j]));
      r.hid[j] = 1.0 / (1.0 + $exp(-r.net[j]));
    end
    r.out = f2r(wm[N_W + N_HID]);
    for (int j = 0; j < N_HID; j++) r.out += f2r(wm[N_IN*N_HID + j]) * r.hid[j];
    if (r.out <= 1.5)      r.cls = CLASS_F;
    else if (r.out <= 2.5) r.cls = CLASS_V;
    else                   r.cls = CLASS_N;
    return r;
  endfunction

  // Inputs in [-2, 2]*scale. With `tune` set, inputs I2 and I6 are then
  // solved together (a 2x2 linear system, since both feed both hidden
  // neurons) so that the first hidden neuron's net input lands near `target`
  // and the second's near `target2`, which can put the sigmoids in their
  // transition region.
  function automatic void make_beat(output fp32_t x [N_IN], input weight_set_t wm,
                                    input real scale, input bit tune, input real target,
                                    input real target2 = target);
    real xr [N_IN];
    for (int i = 0; i < N_IN; i++)
      xr[i] = scale * (real'($urandom_range(400000)) - 200000.0) / 100000.0;
    if (tune) begin
      real a [N_HID][2];
      real c [N_HID];
      real det;
      for (int j = 0; j < N_HID; j++) begin
        a[j][0] = f2r(wm[j*N_IN + 2]);
        a[j][1] = f2r(wm[j*N_IN + 6]);
        c[j]    = ((j == 0) ? target : target2) - f2r(wm[N_W + j]);
        for (int i = 0; i < N_IN; i++)
          if (i != 2 && i != 6) c[j] -= f2r(wm[j*N_IN + i]) * xr[i];
      end
      det = a[0][0] * a[1][1] - a[0][1] * a[1][0];
      if (det != 0.0) begin
        xr[2] = (c[0] * a[1][1] - a[0][1] * c[1]) / det;
        xr[6] = (a[0][0] * c[1] - a[1][0] * c[0]) / det;
      end
    end
    for (int i = 0; i < N_IN; i++) x[i] = r2f(xr[i]);
  endfunction

endpackage
