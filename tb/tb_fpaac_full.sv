// tb_fpaac_full: the classifier at its default configuration, with the
// trained weights and biases in the weight memory.
//
// After power-up initialisation, beats are written over DATA/EN and each result
// is compared with the reference model (net inputs bit-exact, output and
// hidden outputs within 1e-5, class, latency of 77 to 78 clk_50 cycles from
// the completing write, one beat_done pulse per beat).
// One beat is built so that the two hidden neurons' net inputs are -178.19
// and 851.52, the operating point of the published reference model; its
// output must then be -0.0202 (to 4 decimals), i.e. an F beat. With these
// trained output weights the output lies between -1.0 and 0.99, so every beat
// is classed F.
module tb_fpaac_full;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import fpaac_ref_pkg::*;

  logic            clk_50 = 1'b0, rst_n = 1'b0;
  fp32_t           data32 = '0;
  logic [N_IN-1:0] en8 = '0;
  logic            clk_100, ready, out_valid, busy, beat_lost, beat_done;
  fp32_t           out_val;
  beat_class_e     out_class;
  fp32_t           hid_out [N_HID];
  fp32_t           hid_net [N_HID];

  int checks = 0, failures = 0;
  int cyc50 = 0;

  always #10 clk_50 = ~clk_50;
  always @(posedge clk_50) cyc50++;

  int n_done = 0, n_sent = 0;
  always @(posedge clk_100) if (rst_n && ready && beat_done) n_done++;

  fpaac_top dut (
    .clk_50(clk_50), .rst_n(rst_n), .data32(data32), .en8(en8), .clk_100(clk_100),
    .ready(ready), .out_val(out_val), .out_class(out_class), .out_valid(out_valid),
    .hid_out(hid_out), .hid_net(hid_net), .beat_done(beat_done), .busy(busy),
    .beat_lost(beat_lost)
  );

  task automatic fail(input string what);
    failures++;
    if (failures < 15) $display("FAIL %s at %0t", what, $time);
  endtask

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  task automatic run_beat(input fp32_t x [N_IN], output real out);
    ref_result_t r;
    int          t0, lat;
    r = classify(x, TRAINED_WEIGHTS);
    for (int i = 0; i < N_IN; i++) begin
      @(negedge clk_100);
      data32 = x[i];
      en8    = N_IN'(1) << i;
      if (i == N_IN - 1) begin
        t0 = cyc50;
        n_sent++;
      end
      @(negedge clk_100);
      en8 = '0;
    end
    while (!out_valid) @(posedge clk_50);
    lat = cyc50 - t0;
    out = f2r(out_val);
    checks += 4 + 2 * N_HID;
    for (int j = 0; j < N_HID; j++)
      if (hid_net[j] != r2f(r.net[j])) fail($sformatf("net %0d %h want %h", j, hid_net[j], r2f(r.net[j])));
    if (!near(f2r(out_val), r.out, 1e-5)) fail($sformatf("out %f want %f", f2r(out_val), r.out));
    for (int j = 0; j < N_HID; j++)
      if (!near(f2r(hid_out[j]), r.hid[j], 1e-5)) fail($sformatf("hidden %0d %g want %g", j, f2r(hid_out[j]), r.hid[j]));
    if (out_class != r.cls) fail("class");
    if (out_class != CLASS_F) fail("trained output weights give only F");
    if (lat < 77 || lat > 78) fail($sformatf("latency %0d", lat));
    @(negedge clk_50);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t x [N_IN];
    real   out;
    repeat (3) @(negedge clk_50);
    rst_n = 1'b1;
    @(posedge ready);
    make_beat(x, TRAINED_WEIGHTS, 0.1, 1'b1, -178.1945, 851.5240);
    run_beat(x, out);
    checks += 3;
    if (!near(f2r(hid_net[0]), -178.19, 0.01)) fail($sformatf("net0 %f, want -178.19", f2r(hid_net[0])));
    if (!near(f2r(hid_net[1]), 851.52, 0.01)) fail($sformatf("net1 %f, want 851.52", f2r(hid_net[1])));
    if (!near(out, -0.0202, 0.00005)) fail($sformatf("reference operating point: out %f, want -0.0202", out));
    for (int b = 0; b < 6; b++) begin
      make_beat(x, TRAINED_WEIGHTS, 1.0, b % 2 == 1, (real'($urandom_range(200)) - 100.0) / 20.0);
      run_beat(x, out);
    end
    checks++;
    if (n_done != n_sent) fail($sformatf("%0d beat_done pulses for %0d beats", n_done, n_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
