// tb_fp_add: self-checking test of the single-precision adder/subtractor.
//
// Random operands, both for sums of similar magnitude (cancellation) and of
// very different magnitude (alignment and sticky bits), are added and
// subtracted. The reference is the double-precision result rounded to single
// precision; the exact sum of two singles fits a double whenever the exponents
// differ by less than 29, and results must then match bit for bit; otherwise
// one unit in the last place is allowed for double rounding. Directed cases
// cover exact cancellation, zeros, infinities and NaN.
module tb_fp_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic s,
                       input logic [31:0] want, input int unsigned tol);
    a = ta; b = tb_; sub = s;
    #1;
    checks++;
    if (ulp_dist(y, want) > tol || (tol == 0 && y !== want)) begin
      failures++;
      if (failures < 10) $display("FAIL add %h %s %h = %h, want %h", ta, s ? "-" : "+", tb_, y, want);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F80_0000, 32'h3F80_0000, 1'b0, 32'h4000_0000, 0);   // 1 + 1
    check(32'h3F80_0000, 32'h3F80_0000, 1'b1, 32'h0000_0000, 0);   // 1 - 1
    check(32'h4020_0000, 32'h3FC0_0000, 1'b1, 32'h3F80_0000, 0);   // 2.5 - 1.5
    check(32'h0000_0000, 32'hC000_0000, 1'b0, 32'hC000_0000, 0);   // 0 + -2
    check(32'h3F80_0000, 32'h0000_0000, 1'b1, 32'h3F80_0000, 0);   // 1 - 0
    check(32'h7F80_0000, 32'h7F80_0000, 1'b1, 32'h7FC0_0000, 0);   // inf - inf
    check(32'h7F80_0000, 32'h3F80_0000, 1'b0, 32'h7F80_0000, 0);   // inf + 1
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0, 32'h7F80_0000, 0);   // overflow
    check(32'h3F80_0000, 32'h3380_0000, 1'b0, 32'h3F80_0000, 0);   // 1 + 2^-24: tie to even
    check(32'h3F80_0001, 32'h3380_0000, 1'b0, 32'h3F80_0002, 0);   // tie rounds up to even
    for (int i = 0; i < 40000; i++) begin
      logic [31:0] ra, rb;
      logic        s;
      int          ea;
      ea = 60 + int'($urandom_range(130));
      ra = rand_fp(ea, ea);
      if (i % 2 == 0) rb = rand_fp(ea - 2, ea + 2);
      else            rb = rand_fp(ea - 40, ea + 40);
      s = 1'($urandom);
      if ((ra[30:23] > rb[30:23] ? ra[30:23] - rb[30:23] : rb[30:23] - ra[30:23]) < 29)
        check(ra, rb, s, r2f(s ? f2r(ra) - f2r(rb) : f2r(ra) + f2r(rb)), 0);
      else
        check(ra, rb, s, r2f(s ? f2r(ra) - f2r(rb) : f2r(ra) + f2r(rb)), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
