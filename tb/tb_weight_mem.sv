// tb_weight_mem: self-checking test of the weight and bias memory.
//
// Reads all 21 addresses in a shuffled order (plus out-of-range addresses,
// which must write nothing) and checks that the parallel weight outputs then
// hold the trained values, given here as decimal numbers and rounded to
// single precision by the testbench. Also checks that a word appears on its
// output exactly two clocks after its read and that nothing appears before
// the read.
module tb_weight_mem;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam real TRAINED [N_WORDS] = '{
    -0.62579995, 23.4966, 43.9367, -6.6568, -56.1103, 10.6938, -24.547798, -53.1894,
    147.17809, 84.519394, 111.925095, 55.6788, -54.927998, -54.037098, 70.565895, 117.5449,
    -0.9535, -1.0071, -47.872597, 36.3476, 0.9869
  };

  logic clk = 1'b0, rst_n = 1'b0, rd = 1'b0;
  logic [AD_W-1:0] ad = '0;
  fp32_t w [N_W];
  fp32_t b [N_B];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  weight_mem dut (.clk(clk), .rst_n(rst_n), .ad(ad), .rd(rd), .w(w), .b(b));

  function automatic fp32_t word(input int a);
    return (a < N_W) ? w[a] : b[a - N_W];
  endfunction

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
    int order [N_WORDS];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_WORDS; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < N_WORDS; i++) expect_(word(i) == '0, "cleared before reading");
    for (int i = 0; i < N_WORDS; i++) begin
      ad = AD_W'(order[i]); rd = 1'b1;
      @(negedge clk);
      rd = 1'b0;
      ad = AD_W'(N_WORDS + i % (32 - N_WORDS));     // out of range while idle
      expect_(word(order[i]) == '0, "not written after one clock");
      @(negedge clk);
      expect_(word(order[i]) == r2f(TRAINED[order[i]]), "word written two clocks after read");
    end
    for (int a = N_WORDS; a < 32; a++) begin           // out-of-range reads change nothing
      ad = AD_W'(a); rd = 1'b1;
      @(negedge clk);
    end
    rd = 1'b0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < N_WORDS; i++) expect_(word(i) == r2f(TRAINED[i]), "final contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
