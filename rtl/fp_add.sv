// fp_add: IEEE-754 single-precision adder / subtractor ("+" nodes of the
// neurons and the add/sub unit of the sigmoid).
//
// Combinational: y = a + b when sub = 0, y = a - b when sub = 1, rounded to
// nearest, ties to even. The operand of larger magnitude is kept, the other
// significand is shifted right by the exponent difference into a 27-bit field
// with guard, round and sticky bits, the two are added or subtracted, the sum
// is normalised (one place right, or left by its leading-zero count) and
// rounded. Subnormal inputs are read as zero and results below the normal range
// are flushed to zero; an exact cancellation gives +0; overflow gives a signed
// infinity; NaN operands and inf - inf give the quiet NaN 0x7FC00000.
//
// The document specifies 32-bit single-precision adders but not their insides;
// rounding and subnormal handling are this design's choices.
module fp_add
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  fp32_s sa, sb, larger, lesser;
  logic        sb_sign;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [7:0]  diff;
  logic [26:0] m_big, m_small;   // {hidden, 23 bits, guard, round, sticky}
  logic [27:0] sum;
  logic [4:0]  lz;
  logic        found;
  logic [24:0] mant_r;
  logic signed [10:0] exp_s;
  logic        res_sign;

  always_comb begin
    sa = a;
    sb = b;
    sb_sign = sb.sign ^ sub;
    a_zero  = (sa.exp == 8'd0);
    b_zero  = (sb.exp == 8'd0);
    a_inf   = (sa.exp == 8'hFF) && (sa.man == '0);
    b_inf   = (sb.exp == 8'hFF) && (sb.man == '0);
    a_nan   = (sa.exp == 8'hFF) && (sa.man != '0);
    b_nan   = (sb.exp == 8'hFF) && (sb.man != '0);

    // order by magnitude
    if ({sa.exp, sa.man} >= {sb.exp, sb.man}) begin
      larger   = sa;
      lesser = '{sign: sb_sign, exp: sb.exp, man: sb.man};
    end else begin
      larger   = '{sign: sb_sign, exp: sb.exp, man: sb.man};
      lesser = sa;
    end

    diff    = larger.exp - lesser.exp;
    m_big   = {1'b1, larger.man, 3'b000};
    m_small = {1'b1, lesser.man, 3'b000};
    if (diff >= 8'd27) begin
      m_small = 27'd1;                       // only the sticky bit survives
    end else begin
      m_small = (m_small >> diff) | 27'(((m_small & ((27'd1 << diff) - 27'd1)) != 27'd0));
    end

    res_sign = larger.sign;
    exp_s    = $signed({3'b000, larger.exp});
    if (larger.sign == lesser.sign) sum = {1'b0, m_big} + {1'b0, m_small};
    else                        sum = {1'b0, m_big} - {1'b0, m_small};

    // normalise
    lz    = '0;
    found = 1'b0;
    if (sum[27]) begin
      sum   = {1'b0, sum[27:2], sum[1] | sum[0]};
      exp_s = exp_s + 11'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          lz    = 5'(26 - i);
          found = 1'b1;
        end
      end
      sum   = sum << lz;
      exp_s = exp_s - $signed({6'd0, lz});
    end

    // round to nearest even on guard / round / sticky
    mant_r = {1'b0, sum[26:3]} + {24'd0, sum[2] & (sum[1] | sum[0] | sum[3])};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa.sign != sb_sign))) begin
      y = FP_QNAN;
    end else if (a_inf) begin
      y = {sa.sign, 8'hFF, 23'd0};
    end else if (b_inf) begin
      y = {sb_sign, 8'hFF, 23'd0};
    end else if (a_zero && b_zero) begin
      y = {sa.sign & sb_sign, 31'd0};
    end else if (b_zero) begin
      y = a;
    end else if (a_zero) begin
      y = {sb_sign, sb.exp, sb.man};
    end else if (!found && !sum[27] && (sum == 28'd0)) begin
      y = FP_ZERO;
    end else if (exp_s >= 11'sd255) begin
      y = {res_sign, 8'hFF, 23'd0};
    end else if (exp_s <= 11'sd0) begin
      y = {res_sign, 31'd0};
    end else begin
      y = {res_sign, exp_s[7:0], mant_r[22:0]};
    end
  end

endmodule
