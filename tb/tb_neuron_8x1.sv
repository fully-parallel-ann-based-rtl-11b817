// tb_neuron_8x1: self-checking test of a hidden neuron.
//
// The testbench plays the clock manager, pulsing the stage enables in order.
// Reference: the same products and adder tree evaluated with single-precision
// rounding after every operation (from double-precision arithmetic), so `net`
// must match within 2 units in the last place; the output must match
// 1/(1+exp(-net)) within 4 units in the last place. Weights and biases are
// drawn from the trained network's range (|w| up to 150) and inputs from
// [-2, 2], scaled down at times so that net falls in the sigmoid's transition.
// The inputs are changed right after en.mul to show the products are held.
module tb_neuron_8x1;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  fp32_t x [N_IN], w [N_IN], bias, net, y;
  hid_en_t en;
  logic sig_done;
  int checks = 0, failures = 0;
  int n_sat = 0, n_mid = 0;

  always #5 clk = ~clk;

  neuron_8x1 dut (.clk(clk), .rst_n(rst_n), .x(x), .w(w), .bias(bias), .en(en),
                  .net(net), .sig_done(sig_done), .y(y));

  function automatic fp32_t fadd(input fp32_t a, input fp32_t b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic fp32_t fmul(input fp32_t a, input fp32_t b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  task automatic pulse(input int which);
    en = '0;
    case (which)
      0: en.mul  = 1'b1;
      1: en.add1 = 1'b1;
      2: en.add2 = 1'b1;
      3: en.add3 = 1'b1;
      4: en.bias = 1'b1;
      default: en.sig = 1'b1;
    endcase
    @(negedge clk);
    en = '0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0; bias = '0;
    for (int i = 0; i < N_IN; i++) begin x[i] = '0; w[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      fp32_t p [N_IN], s1 [4], s2 [2], s3, net_ref;
      real   scale;
      int    cycles;
      scale = (t % 2 == 0) ? 1.0 : 0.01;
      for (int i = 0; i < N_IN; i++) begin
        x[i] = r2f(scale * (real'($urandom_range(400000)) - 200000.0) / 100000.0);
        w[i] = r2f((real'($urandom_range(3000000)) - 1500000.0) / 10000.0);
      end
      bias = r2f((real'($urandom_range(1000000)) - 500000.0) / 10000.0);
      if (t % 2 == 1) bias = r2f(f2r(bias) / 100.0);
      for (int i = 0; i < N_IN; i++) p[i] = fmul(x[i], w[i]);
      for (int i = 0; i < 4; i++) s1[i] = fadd(p[2*i], p[2*i+1]);
      for (int i = 0; i < 2; i++) s2[i] = fadd(s1[2*i], s1[2*i+1]);
      s3      = fadd(s2[0], s2[1]);
      net_ref = fadd(s3, bias);
      @(negedge clk);
      pulse(0);
      for (int i = 0; i < N_IN; i++) x[i] = $urandom;     // products already held
      for (int k = 1; k <= 5; k++) pulse(k);
      cycles = 0;
      while (!sig_done) begin
        @(negedge clk);
        cycles++;
      end
      checks += 3;
      if (ulp_dist(net, net_ref) > 2) begin
        failures++;
        if (failures < 10) $display("FAIL net %h want %h", net, net_ref);
      end
      if (ulp_dist(y, r2f(1.0 / (1.0 + $exp(-f2r(net))))) > 4) begin
        failures++;
        if (failures < 10) $display("FAIL y %h for net %h", y, net);
      end
      if (cycles != 65) begin
        failures++;
        $display("FAIL sigmoid wait %0d clocks", cycles);
      end
      if (y == 32'h0 || y == 32'h3F80_0000) n_sat++;
      else                                  n_mid++;
    end
    checks++;
    if (n_sat == 0 || n_mid == 0) begin
      failures++;
      $display("FAIL coverage: saturated %0d, transition %0d", n_sat, n_mid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
