// tb_class_decide: self-checking test of the F / V / N decision rule.
//
// Checks both sides of the 1.5 and 2.5 boundaries to one unit in the last
// place, signed zeros, infinities, NaN and random values against a
// double-precision comparison.
module tb_class_decide;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  fp32_t       v;
  beat_class_e c;
  int checks = 0, failures = 0;

  class_decide dut (.out_val(v), .beat_class(c));

  task automatic check(input fp32_t tv, input beat_class_e want);
    v = tv;
    #1;
    checks++;
    if (c != want) begin
      failures++;
      if (failures < 10) $display("FAIL class(%h) = %0d, want %0d", tv, c, want);
    end
  endtask

  function automatic beat_class_e ref_class(input real r);
    if (r <= 1.5) return CLASS_F;
    if (r <= 2.5) return CLASS_V;
    return CLASS_N;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3FC0_0000, CLASS_F);   // 1.5
    check(32'h3FC0_0001, CLASS_V);   // just above 1.5
    check(32'h3FBF_FFFF, CLASS_F);
    check(32'h4020_0000, CLASS_V);   // 2.5
    check(32'h4020_0001, CLASS_N);
    check(32'h401F_FFFF, CLASS_V);
    check(32'h0000_0000, CLASS_F);
    check(32'h8000_0000, CLASS_F);
    check(32'hFF80_0000, CLASS_F);   // -inf
    check(32'h7F80_0000, CLASS_N);   // +inf
    check(32'h7FC0_0000, CLASS_N);   // NaN
    check(32'hBF80_0000, CLASS_F);   // -1
    check(32'h4040_0000, CLASS_N);   // 3
    for (int i = 0; i < 5000; i++) begin
      real r;
      r = (real'($urandom_range(1000000)) - 300000.0) / 100000.0;   // -3 .. 7
      check(r2f(r), ref_class(f2r(r2f(r))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
