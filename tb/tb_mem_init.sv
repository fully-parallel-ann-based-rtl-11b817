// tb_mem_init: self-checking test of the memory initialisation controller.
//
// After reset, rd must be high for exactly 21 clocks with the address running
// 0, 1, ..., 20, then low for good; done must rise 23 clocks after reset and
// stay high. A second reset must repeat the walk.
module tb_mem_init;
  import fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AD_W-1:0] ad;
  logic rd, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mem_init dut (.clk(clk), .rst_n(rst_n), .ad(ad), .rd(rd), .done(done));

  task automatic expect_(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t (ad=%0d rd=%0d done=%0d)", what, $time, ad, rd, done);
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
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      for (int c = 0; c < 40; c++) begin
        if (c < N_WORDS) expect_(rd && ad == AD_W'(c), "address walk");
        else             expect_(!rd, "rd low after the walk");
        expect_(done == (c >= N_WORDS + 2), "done timing");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
