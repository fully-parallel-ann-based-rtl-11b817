// fp_exp: IEEE-754 single-precision exponential, y = e^a (the "Exponentiate"
// unit of the sigmoid).
//
// Method: e^a = 2^(a*log2(e)). The magnitude of a is converted to fixed point
// with 32 fraction bits and multiplied by log2(e) held with 32 fraction bits.
// The signed result t is split into an integer k = floor(t) and a fraction
// f in [0,1). 2^f is formed one fraction bit per clock: starting from 1.0, the
// accumulator is multiplied by 2^(2^-i) whenever bit i of f (weight 2^-i) is
// set, for i = 1..32. The accumulator, in [1,2), becomes the significand
// (rounded to 24 bits) and k + 127 the exponent. Truncation in the 32 products
// keeps the error within a few units in the last place.
// Special cases: NaN in gives NaN; |a| >= 128 or +inf gives +inf for positive
// and +0 for negative a; results below the normal range are flushed to +0;
// a zero or subnormal input gives exactly 1.0.
//
// Interface: pulse `start` for one clock with `a` valid; `done` pulses one
// clock when `y` is valid; `y` then holds until the next start. `busy` is high
// in between. Latency: 35 clocks from start to done.
//
// The document names an exponentiator inside its directly implemented sigmoid
// but does not give its algorithm; the shift-and-multiply method, its
// latency and the handshake are this design's choices.
module fp_exp
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  output logic  busy,
  output logic  done,
  output fp32_t y
);

  // 2^(2^-i) in unsigned fixed point with 32 fraction bits, i = 1..32
  localparam logic [32:0] POW2_FRAC [1:32] = '{
    33'h1_6A09E668, 33'h1_306FE0A3, 33'h1_172B83C8, 33'h1_0B5586D0,
    33'h1_059B0D31, 33'h1_02C9A3E7, 33'h1_0163DAA0, 33'h1_00B1AFA6,
    33'h1_0058C86E, 33'h1_002C605E, 33'h1_00162F39, 33'h1_000B175F,
    33'h1_00058BA0, 33'h1_0002C5CC, 33'h1_000162E5, 33'h1_0000B172,
    33'h1_000058B9, 33'h1_00002C5D, 33'h1_0000162E, 33'h1_00000B17,
    33'h1_0000058C, 33'h1_000002C6, 33'h1_00000163, 33'h1_000000B1,
    33'h1_00000059, 33'h1_0000002C, 33'h1_00000016, 33'h1_0000000B,
    33'h1_00000006, 33'h1_00000003, 33'h1_00000001, 33'h1_00000001
  };
  localparam logic [32:0] LOG2E = 33'h1_71547653;   // log2(e), 32 fraction bits

  typedef enum logic [1:0] {S_IDLE, S_PREP, S_ITER, S_FIN} state_e;
  state_e state;

  fp32_t       a_q;
  logic [5:0]  step;           // 1..32
  logic [31:0] frac_q;
  logic signed [9:0] k_q;
  logic [32:0] acc;            // 2^f, 32 fraction bits
  logic [1:0]  special_q;      // 0: none, 1: +inf, 2: +0, 3: NaN
  logic        one_q;          // exact 1.0

  // ---- preparation: fixed-point conversion and scaling by log2(e) ----
  fp32_s       sa;
  logic [39:0] mag_fix;        // |a|, 32 fraction bits
  logic [40:0] t_mag;          // |a|*log2(e), 32 fraction bits
  logic signed [41:0] t_s;
  logic [1:0]  special_d;
  logic        one_d;

  always_comb begin
    sa        = a_q;
    special_d = 2'd0;
    one_d     = 1'b0;
    mag_fix   = '0;
    if (sa.exp == 8'hFF && sa.man != '0) begin
      special_d = 2'd3;
    end else if (sa.exp >= 8'd134) begin          // |a| >= 128, or infinite
      special_d = sa.sign ? 2'd2 : 2'd1;
    end else if (sa.exp == 8'd0) begin
      one_d = 1'b1;
    end else if (sa.exp >= 8'd118) begin
      mag_fix = 40'({1'b1, sa.man}) << (sa.exp - 8'd118);
    end else begin
      mag_fix = 40'({1'b1, sa.man}) >> (8'd118 - sa.exp);
    end
    t_mag  = 41'((73'(mag_fix) * 73'(LOG2E)) >> 32);   // drop 32 fraction bits
    t_s    = sa.sign ? -$signed({1'b0, t_mag}) : $signed({1'b0, t_mag});
  end

  // ---- iteration: acc *= 2^(2^-step) when fraction bit (32 - step) is set ----
  logic [32:0] prod;           // acc * constant, truncated to 32 fraction bits
  always_comb prod = 33'((66'(acc) * 66'(POW2_FRAC[step])) >> 32);

  // ---- final rounding and packing ----
  logic [24:0] mant_r;
  logic signed [10:0] e_s;
  fp32_t       y_d;
  always_comb begin
    mant_r = {1'b0, acc[32:9]} + {24'd0, acc[8]};
    e_s    = 11'(k_q) + 11'sd127;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_s    = e_s + 11'sd1;
    end
    unique case (special_q)
      2'd1:    y_d = FP_INF;
      2'd2:    y_d = FP_ZERO;
      2'd3:    y_d = FP_QNAN;
      default: begin
        if (one_q)                y_d = FP_ONE;
        else if (e_s >= 11'sd255) y_d = FP_INF;
        else if (e_s <= 11'sd0)   y_d = FP_ZERO;
        else                      y_d = {1'b0, e_s[7:0], mant_r[22:0]};
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      a_q       <= '0;
      step      <= '0;
      frac_q    <= '0;
      k_q       <= '0;
      acc       <= '0;
      special_q <= '0;
      one_q     <= 1'b0;
      done      <= 1'b0;
      y         <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_q   <= a;
          state <= S_PREP;
        end
        S_PREP: begin
          special_q <= special_d;
          one_q     <= one_d;
          k_q       <= 10'(t_s >>> 32);
          frac_q    <= t_s[31:0];
          acc       <= 33'h1_0000_0000;
          step      <= 6'd1;
          state     <= S_ITER;
        end
        S_ITER: begin
          if (frac_q[5'(6'd32 - step)]) acc <= prod;
          if (step == 6'd32) state <= S_FIN;
          else               step  <= step + 6'd1;
        end
        S_FIN: begin
          y     <= y_d;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
