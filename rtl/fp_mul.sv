// fp_mul: IEEE-754 single-precision multiplier (one "X" node of a neuron).
//
// Combinational: y = a * b, rounded to nearest, ties to even. The 24x24-bit
// significand product is normalised by at most one place, then rounded with a
// guard bit and a sticky bit. Subnormal inputs are read as zero and results
// below the normal range are flushed to a signed zero; overflow gives a signed
// infinity; NaN, 0*inf and inf*0 give the quiet NaN 0x7FC00000.
//
// The document specifies 32-bit single-precision multipliers but not their
// insides; the rounding mode and the flush-to-zero of subnormals are this
// design's choices. The neuron that uses it registers the result, so the
// multiply takes one clock of the 50 MHz arithmetic clock.
module fp_mul
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_s sa, sb;
  logic        sign;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;          // {hidden, 23 fraction bits} before rounding
  logic        guard, sticky;
  logic [24:0] mant_r;        // after rounding, with carry
  logic signed [10:0] exp_s;  // biased exponent, wide enough for under/overflow

  always_comb begin
    sa = a;
    sb = b;
    sign   = sa.sign ^ sb.sign;
    a_zero = (sa.exp == 8'd0);
    b_zero = (sb.exp == 8'd0);
    a_inf  = (sa.exp == 8'hFF) && (sa.man == '0);
    b_inf  = (sb.exp == 8'hFF) && (sb.man == '0);
    a_nan  = (sa.exp == 8'hFF) && (sa.man != '0);
    b_nan  = (sb.exp == 8'hFF) && (sb.man != '0);

    prod  = {1'b1, sa.man} * {1'b1, sb.man};
    exp_s = $signed({3'b000, sa.exp}) + $signed({3'b000, sb.exp}) - 11'sd127;

    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_s  = exp_s + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end

    mant_r = {1'b0, mant} + {24'd0, guard & (sticky | mant[0])};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP_QNAN;
    end else if (a_inf || b_inf) begin
      y = {sign, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {sign, 31'd0};
    end else if (exp_s >= 11'sd255) begin
      y = {sign, 8'hFF, 23'd0};
    end else if (exp_s <= 11'sd0) begin
      y = {sign, 31'd0};
    end else begin
      y = {sign, exp_s[7:0], mant_r[22:0]};
    end
  end

endmodule
