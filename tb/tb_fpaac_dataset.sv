// tb_fpaac_dataset: a full evaluation-sized run, 4015 heartbeats through the
// classifier at its default configuration (trained weights and biases).
//
// 4015 is the size of the labelled beat set the classifier was trained and
// tested on. Its beats are not available here, so each beat is made up: eight
// components in [-2, 2] (the range of the normalised data), with one beat in
// three tuned so that the hidden neurons work in the sigmoid's transition
// region. Every result is compared with the reference model: net inputs
// bit-exact, hidden outputs and OUT within 1e-5, and the class.
//
// The host streams beats as fast as the design accepts them without losing
// any. It writes the next beat while the current one is being classified (the
// completed beat is held). It completes a beat only when no completed beat is
// still waiting to start; a start shows as a rising edge of `busy`, and the
// products are captured in the following clock edge. Checked as well:
//   * no beat is lost and every beat gives exactly one result;
//   * in steady state, results follow each other every 77 clk_50 cycles
//     (a classification from MUL to VALID plus one IDLE clock), which bounds
//     the throughput at 50 MHz / 77, about 649,000 beats per second.
module tb_fpaac_dataset;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import fpaac_ref_pkg::*;

  localparam int N_BEATS  = 4015;
  localparam int INTERVAL = 77;

  logic            clk_50 = 1'b0, rst_n = 1'b0;
  fp32_t           data32 = '0;
  logic [N_IN-1:0] en8 = '0;
  logic            clk_100, ready, out_valid, busy, beat_lost, beat_done;
  fp32_t           out_val;
  beat_class_e     out_class;
  fp32_t           hid_out [N_HID];
  fp32_t           hid_net [N_HID];

  int checks = 0, failures = 0;
  int cyc50 = 0, n_results = 0, n_lost = 0, n_f = 0, n_v = 0, n_n = 0, n_mid = 0;
  int last_valid = -1, n_interval_ok = 0, n_interval_bad = 0;
  ref_result_t expected [$];
  int          n_completed = 0, n_started = 0;
  logic        busy_q = 1'b0;

  always #10 clk_50 = ~clk_50;
  always @(posedge clk_50) cyc50++;

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

  always @(posedge clk_50) begin
    busy_q <= busy;
    if (rst_n && ready && busy && !busy_q) n_started++;
  end

  // result checker
  always @(posedge clk_50) begin
    if (rst_n && ready && beat_lost) n_lost++;
    if (rst_n && ready && out_valid) begin
      ref_result_t r;
      n_results++;
      if (last_valid >= 0 && n_results > 2) begin
        if (cyc50 - last_valid == INTERVAL) n_interval_ok++;
        else                                n_interval_bad++;
      end
      last_valid = cyc50;
      if (expected.size() == 0) begin
        fail("result without a beat");
      end else begin
        r = expected.pop_front();
        checks += 2 + 2 * N_HID;
        for (int j = 0; j < N_HID; j++) begin
          if (hid_net[j] != r2f(r.net[j]))
            fail($sformatf("net %0d: %h want %h", j, hid_net[j], r2f(r.net[j])));
          if (!near(f2r(hid_out[j]), r.hid[j], 1e-5))
            fail($sformatf("hidden %0d: %g want %g", j, f2r(hid_out[j]), r.hid[j]));
          if (hid_out[j] != FP_ZERO && hid_out[j] != FP_ONE) n_mid++;
        end
        if (!near(f2r(out_val), r.out, 1e-5)) fail($sformatf("out %f want %f", f2r(out_val), r.out));
        if (out_class != r.cls) fail($sformatf("class %0d want %0d", out_class, r.cls));
        case (out_class)
          CLASS_F: n_f++;
          CLASS_V: n_v++;
          default: n_n++;
        endcase
      end
    end
  end

  // write one beat in register order; the last word waits until no completed
  // beat is waiting to start
  task automatic send_beat(input fp32_t x [N_IN]);
    for (int i = 0; i < N_IN; i++) begin
      @(negedge clk_100);
      if (i == N_IN - 1) begin
        while (n_completed != n_started) @(negedge clk_100);
        expected.push_back(classify(x, TRAINED_WEIGHTS));
        n_completed++;
      end
      data32 = x[i];
      en8    = N_IN'(1) << i;
      @(negedge clk_100);
      en8 = '0;
    end
  endtask

  initial begin
    #20000000;
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
    for (int b = 0; b < N_BEATS; b++) begin
      if (b % 3 == 0)
        make_beat(x, TRAINED_WEIGHTS, 1.0, 1'b1,
                  (real'($urandom_range(160)) - 80.0) / 10.0,
                  (real'($urandom_range(160)) - 80.0) / 10.0);
      else
        make_beat(x, TRAINED_WEIGHTS, 1.0, 1'b0, 0.0);
      send_beat(x);
    end
    wait (expected.size() == 0);
    repeat (5) @(negedge clk_50);

    checks += 5;
    if (n_results != N_BEATS) fail($sformatf("%0d results for %0d beats", n_results, N_BEATS));
    if (n_lost != 0)          fail($sformatf("%0d beats lost", n_lost));
    if (n_interval_bad != 0)  fail($sformatf("%0d result intervals not %0d cycles", n_interval_bad, INTERVAL));
    if (n_interval_ok == 0)   fail("no back-to-back results");
    if (n_mid == 0)           fail("no sigmoid output in the transition region");
    $display("beats %0d, results %0d: F %0d V %0d N %0d, transition sigmoid outputs %0d, back-to-back intervals %0d",
             N_BEATS, n_results, n_f, n_v, n_n, n_mid, n_interval_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
