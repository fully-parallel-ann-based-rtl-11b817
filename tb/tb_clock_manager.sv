// tb_clock_manager: self-checking test of the stage sequencer.
//
// Models both sigmoids as a delay giving sig_done 65 clocks after en.sig, as
// the real neuron does (one of them finishing a random 0..3 clocks later to
// show that the manager waits for both). Checks the order and timing of all
// enables, the out_valid pulse and the total latency (75 clocks from the beat
// counter's change to out_valid with this delay), that nothing starts before
// init_done, that a beat arriving while busy is processed afterwards, and that
// a third beat overwriting a held one raises beat_lost exactly once. It also
// checks that two beats completing before any capture count as one result and
// one loss.
module tb_clock_manager;
  import fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, init_done = 1'b0;
  logic [BEAT_CNT_W-1:0] beat_cnt = '0;
  logic [N_HID-1:0] sig_done = '0;
  hid_en_t hid_en;
  out_en_t out_en;
  logic out_valid, busy, beat_lost;
  int checks = 0, failures = 0;
  int n_valid = 0, n_lost = 0;
  int skew = 0;

  always #10 clk = ~clk;

  clock_manager dut (.clk(clk), .rst_n(rst_n), .init_done(init_done), .beat_cnt(beat_cnt),
                     .sig_done(sig_done), .hid_en(hid_en), .out_en(out_en),
                     .out_valid(out_valid), .busy(busy), .beat_lost(beat_lost));

  // sigmoid model
  always @(posedge clk) begin
    if (hid_en.sig) begin
      fork
        begin
          repeat (64) @(posedge clk);
          sig_done[0] <= 1'b1;
          @(posedge clk);
          sig_done[0] <= 1'b0;
        end
        begin
          repeat (64 + skew) @(posedge clk);
          sig_done[1] <= 1'b1;
          @(posedge clk);
          sig_done[1] <= 1'b0;
        end
      join_none
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) n_valid++;
    if (rst_n && beat_lost) n_lost++;
  end

  task automatic expect_(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // record the clock of every enable of one classification and check the order
  task automatic follow(input int sk);
    int c, t_mul, t_sig, t_omul, t_valid;
    string order;
    c = 0; t_mul = -1; t_sig = -1; t_omul = -1; t_valid = -1;
    order = "";
    while (t_valid < 0 && c < 200) begin
      @(negedge clk);
      c++;
      if (hid_en.mul)  begin order = {order, "M"}; t_mul = c; end
      if (hid_en.add1) order = {order, "1"};
      if (hid_en.add2) order = {order, "2"};
      if (hid_en.add3) order = {order, "3"};
      if (hid_en.bias) order = {order, "B"};
      if (hid_en.sig)  begin order = {order, "S"}; t_sig = c; end
      if (out_en.mul)  begin order = {order, "m"}; t_omul = c; end
      if (out_en.add)  order = {order, "a"};
      if (out_en.bias) order = {order, "b"};
      if (out_valid)   begin order = {order, "V"}; t_valid = c; end
    end
    expect_(order == "M123BSmabV", {"enable order ", order});
    expect_(t_mul == 1, "products captured 1 clock after the counter change");
    expect_(t_sig == t_mul + 5, "sigmoid start 5 clocks after products");
    expect_(t_omul == t_sig + 66 + sk, "output neuron waits for both sigmoids");
    expect_(t_valid == 75 + sk, $sformatf("latency %0d", t_valid));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // a beat before init_done waits
    beat_cnt = beat_cnt + 1'b1;
    repeat (10) @(negedge clk);
    expect_(!busy, "no start before init_done");
    init_done = 1'b1;
    repeat (2) @(negedge clk);
    expect_(busy, "held beat starts after init_done");
    wait (!busy);
    repeat (3) @(negedge clk);
    for (int r = 0; r < 8; r++) begin
      skew = r % 4;
      beat_cnt = beat_cnt + 1'b1;
      follow(skew);
      @(negedge clk);
    end
    // beat arriving while busy is kept
    n_valid = 0;
    beat_cnt = beat_cnt + 1'b1;
    repeat (20) @(negedge clk);
    beat_cnt = beat_cnt + 1'b1;
    wait (n_valid == 1);
    repeat (3) @(negedge clk);
    expect_(busy, "second beat processed after the first");
    wait (n_valid == 2);
    // two more beats while busy: one is lost
    beat_cnt = beat_cnt + 1'b1;
    repeat (20) @(negedge clk);
    beat_cnt = beat_cnt + 1'b1;
    repeat (20) @(negedge clk);
    beat_cnt = beat_cnt + 1'b1;
    repeat (400) @(negedge clk);
    expect_(n_lost == 1, $sformatf("one beat lost (%0d)", n_lost));
    expect_(n_valid == 4, $sformatf("four results (%0d)", n_valid));
    // two beats counted before the manager could take either: one result,
    // one loss
    beat_cnt = beat_cnt + 2'd2;
    repeat (200) @(negedge clk);
    expect_(n_lost == 2, $sformatf("second loss (%0d)", n_lost));
    expect_(n_valid == 5, $sformatf("five results (%0d)", n_valid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
