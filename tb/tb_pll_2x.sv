// tb_pll_2x: self-checking test of the PLL model.
//
// Drives a 50 MHz clock (20 ns period) and checks that `locked` rises after
// the lock period, that the output then has exactly two rising edges per
// input period, at 0 ns and 10 ns after each input rising edge, and that
// areset drops `locked` and stops the output until it relocks.
module tb_pll_2x;
  logic clk_in = 1'b0, areset = 1'b1;
  logic clk_out, locked;
  int checks = 0, failures = 0;
  int rises = 0;
  realtime t_in, t_rise [$];

  always #10 clk_in = ~clk_in;

  pll_2x dut (.clk_in(clk_in), .areset(areset), .clk_out(clk_out), .locked(locked));

  always @(posedge clk_out) t_rise.push_back($realtime);

  task automatic expect_(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
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
    for (int pass = 0; pass < 2; pass++) begin
      areset = 1'b1;
      #35;
      areset = 1'b0;
      expect_(!locked, "not locked right after reset");
      repeat (10) @(posedge clk_in);
      #1;
      expect_(locked, "locked within 10 input cycles");
      @(posedge clk_in);
      t_in = $realtime;
      repeat (20) @(posedge clk_in);
      #1;
      begin
        int n;
        n = 0;
        foreach (t_rise[i]) begin
          if (t_rise[i] >= t_in && t_rise[i] < t_in + 400.0) begin
            expect_(t_rise[i] - t_in == real'(n) * 10.0, "output edge position");
            n++;
          end
        end
        expect_(n == 40, $sformatf("two output edges per input period (%0d)", n));
      end
      t_rise.delete();
    end
    areset = 1'b1;
    #1;
    expect_(!locked, "areset drops locked");
    t_rise.delete();
    repeat (4) @(posedge clk_in);
    expect_(t_rise.size() == 0, "no output during areset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
