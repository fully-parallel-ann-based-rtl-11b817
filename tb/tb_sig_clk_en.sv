// tb_sig_clk_en: self-checking test of the sigmoid's enable sequencer.
//
// Models the exponentiator and divider as fixed delays (random per run) and
// checks that enable[0], enable[1] and enable[2] pulse once each, in that
// order, at the expected clocks, that done coincides with div_done, and that
// an `en` while busy starts nothing.
module tb_sig_clk_en;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, exp_done = 1'b0, div_done = 1'b0;
  logic [2:0] enable;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sig_clk_en dut (.clk(clk), .rst_n(rst_n), .en(en), .exp_done(exp_done), .div_done(div_done),
                  .enable(enable), .busy(busy), .done(done));

  task automatic expect_(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      int dexp, ddiv;
      dexp = 2 + int'($urandom_range(10));
      ddiv = 2 + int'($urandom_range(10));
      @(negedge clk);
      expect_(!busy && enable == 3'b000, "idle before start");
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      expect_(busy && enable == 3'b001, "enable[0] one clock after en");
      @(negedge clk);
      expect_(enable == 3'b000, "enable[0] is a pulse");
      en = 1'b1;                                  // ignored while busy
      repeat (dexp - 1) begin
        @(negedge clk);
        en = 1'b0;
        expect_(enable == 3'b000, "no enable while waiting for exp");
      end
      exp_done = 1'b1;
      @(negedge clk);
      exp_done = 1'b0;
      expect_(enable == 3'b010, "enable[1] after exp_done");
      @(negedge clk);
      expect_(enable == 3'b100, "enable[2] after enable[1]");
      repeat (ddiv) begin
        @(negedge clk);
        expect_(enable == 3'b000 && !done, "no enable while waiting for div");
      end
      div_done = 1'b1;
      #1;
      expect_(done, "done with div_done");
      @(negedge clk);
      div_done = 1'b0;
      expect_(!busy && !done, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
