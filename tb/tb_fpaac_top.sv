// tb_fpaac_top: end-to-end test of the classifier.
//
// The output-neuron weights are changed (W16 = 1, W17 = 2, B2 = 0.9) so that
// the output spans 0.9 .. 3.9 and all three classes occur; the hidden weights
// are the trained ones. Beats are written word by word over DATA/EN in random
// register order on the 100 MHz clock, as a host would. Each result is compared
// with the reference model: both net inputs bit-exact, the output and both
// hidden outputs within 1e-5, and the class wherever the output is not within
// 1e-5 of a class boundary. Also checked: the latency from the completing write
// to out_valid, and that every mechanism occurred at least once: PLL lock and
// memory initialisation (ready), one beat_done pulse per completed beat, each
// of the classes F, V and N, saturated and unsaturated sigmoid outputs, a beat
// written while the network was busy and processed afterwards, and a lost beat.
// The lost-beat case writes three beats back to back with no gap, so the first
// beat's products must be taken while the next beat is already being written.
module tb_fpaac_top;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import fpaac_ref_pkg::*;

  function automatic weight_set_t test_weights();
    weight_set_t w;
    w = TRAINED_WEIGHTS;
    w[16] = 32'h3F80_0000;   // W16 = 1.0
    w[17] = 32'h4000_0000;   // W17 = 2.0
    w[20] = 32'h3F66_6666;   // B2  = 0.9
    return w;
  endfunction
  localparam weight_set_t TB_W = test_weights();

  logic            clk_50 = 1'b0, rst_n = 1'b0;
  fp32_t           data32 = '0;
  logic [N_IN-1:0] en8 = '0;
  logic            clk_100, ready, out_valid, busy, beat_lost, beat_done;
  fp32_t           out_val;
  beat_class_e     out_class;
  fp32_t           hid_out [N_HID];
  fp32_t           hid_net [N_HID];

  int checks = 0, failures = 0;
  int n_ready = 0, n_f = 0, n_v = 0, n_n = 0, n_sat = 0, n_mid = 0, n_queued = 0, n_lost = 0;
  int n_results = 0, n_sent = 0, n_done = 0;
  ref_result_t expected [$];
  int          t_complete [$];
  int          cyc50 = 0;

  always #10 clk_50 = ~clk_50;   // 50 MHz

  fpaac_top #(.WEIGHTS(TB_W)) dut (
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

  always @(posedge clk_50) cyc50++;
  always @(posedge clk_100) if (rst_n && ready && beat_done) n_done++;

  // result checker
  always @(posedge clk_50) begin
    if (rst_n && beat_lost) n_lost++;
    if (rst_n && out_valid) begin
      ref_result_t r;
      int          lat;
      n_results++;
      if (expected.size() == 0) begin
        fail("result without a beat");
      end else begin
        r   = expected.pop_front();
        lat = t_complete[0] < 0 ? 77 : cyc50 - t_complete[0];
        void'(t_complete.pop_front());
        checks += 5 + N_HID;
        for (int j = 0; j < N_HID; j++)
          if (hid_net[j] != r2f(r.net[j]))
            fail($sformatf("net %0d: %h want %h", j, hid_net[j], r2f(r.net[j])));
        if (!near(f2r(out_val), r.out, 1e-5))
          fail($sformatf("out %f want %f", f2r(out_val), r.out));
        for (int j = 0; j < N_HID; j++)
          if (!near(f2r(hid_out[j]), r.hid[j], 1e-5))
            fail($sformatf("hidden %0d: %g want %g", j, f2r(hid_out[j]), r.hid[j]));
        if (!near(r.out, 1.5, 1e-5) && !near(r.out, 2.5, 1e-5) && out_class != r.cls)
          fail($sformatf("class %0d want %0d (out %f)", out_class, r.cls, r.out));
        if (lat < 77 || lat > 78) fail($sformatf("latency %0d clk_50 cycles", lat));
        case (out_class)
          CLASS_F: n_f++;
          CLASS_V: n_v++;
          default: n_n++;
        endcase
        for (int j = 0; j < N_HID; j++)
          if (hid_out[j] == FP_ZERO || hid_out[j] == FP_ONE) n_sat++;
          else                                               n_mid++;
      end
    end
  end

  // write one beat, registers in random order, one word per 100 MHz clock
  task automatic send_beat(input fp32_t x [N_IN], input bit record, input bit gaps);
    int order [N_IN];
    for (int i = 0; i < N_IN; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < N_IN; i++) begin
      @(negedge clk_100);
      data32 = x[order[i]];
      en8    = N_IN'(1) << order[i];
      if (i == N_IN - 1) n_sent++;
      if (i == N_IN - 1 && record) begin
        if (busy) n_queued++;
        expected.push_back(classify(x, TB_W));
        t_complete.push_back(busy ? -1 : cyc50);   // queued: latency not fixed
      end
      @(negedge clk_100);
      en8    = '0;
      data32 = $urandom;
      if (gaps) repeat ($urandom_range(3)) @(negedge clk_100);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t x [N_IN];
    repeat (3) @(negedge clk_50);
    rst_n = 1'b1;
    @(posedge ready);
    n_ready++;
    // single beats, waiting for each result
    for (int b = 0; b < 24; b++) begin
      real scale;
      scale = (b % 3 == 0) ? 1.0 : 0.05;
      make_beat(x, TB_W, scale, b % 4 == 1, (real'($urandom_range(200)) - 100.0) / 20.0);
      send_beat(x, 1'b1, b % 2 == 0);
      wait (expected.size() == 0);
      @(negedge clk_50);
    end
    // a beat written while the previous one is being classified
    make_beat(x, TB_W, 1.0, 1'b0, 0.0);
    send_beat(x, 1'b1, 1'b0);
    repeat (10) @(negedge clk_50);
    make_beat(x, TB_W, 1.0, 1'b1, 1.0);
    send_beat(x, 1'b1, 1'b0);
    wait (expected.size() == 0);
    @(negedge clk_50);
    // three beats in a row: the second is overwritten by the third and lost
    make_beat(x, TB_W, 1.0, 1'b0, 0.0);
    send_beat(x, 1'b1, 1'b0);
    make_beat(x, TB_W, 1.0, 1'b0, 0.0);
    send_beat(x, 1'b0, 1'b0);
    make_beat(x, TB_W, 0.05, 1'b1, -2.0);
    send_beat(x, 1'b1, 1'b0);
    wait (expected.size() == 0);
    repeat (5) @(negedge clk_50);

    checks += 9;
    if (n_done != n_sent) fail($sformatf("%0d beat_done pulses for %0d beats", n_done, n_sent));
    if (n_ready == 0)  fail("ready never rose");
    if (n_f == 0)      fail("class F never occurred");
    if (n_v == 0)      fail("class V never occurred");
    if (n_n == 0)      fail("class N never occurred");
    if (n_sat == 0)    fail("no saturated sigmoid output");
    if (n_mid == 0)    fail("no sigmoid output in the transition region");
    if (n_queued == 0) fail("no beat written while busy");
    if (n_lost != 1)   fail($sformatf("%0d lost beats, want 1", n_lost));
    $display("results %0d: F %0d V %0d N %0d, sigmoid saturated %0d / transition %0d, queued %0d, lost %0d",
             n_results, n_f, n_v, n_n, n_sat, n_mid, n_queued, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
