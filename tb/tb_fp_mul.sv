// tb_fp_mul: self-checking test of the single-precision multiplier.
//
// Random normal operands across a wide exponent range are multiplied; the
// reference is the exact double-precision product rounded once to single
// precision, so results must match bit for bit. Directed cases cover zeros,
// infinities, NaN, overflow and underflow to zero.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] want);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, want %h", ta, tb_, y, want);
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
    check(32'h3F80_0000, 32'h4000_0000, 32'h4000_0000);   // 1 * 2
    check(32'hBFC0_0000, 32'h4020_0000, 32'hC070_0000);   // -1.5 * 2.5 = -3.75
    check(32'h0000_0000, 32'h4000_0000, 32'h0000_0000);   // 0 * 2
    check(32'h8000_0000, 32'h4000_0000, 32'h8000_0000);   // -0 * 2
    check(32'h7F80_0000, 32'hC000_0000, 32'hFF80_0000);   // inf * -2
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);   // inf * 0
    check(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);   // NaN
    check(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);   // overflow
    check(32'h0080_0000, 32'h0080_0000, 32'h0000_0000);   // underflow flushed
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] ra, rb;
      ra = rand_fp(40, 214);
      rb = rand_fp(40, 214);
      check(ra, rb, r2f(f2r(ra) * f2r(rb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
