// fp_div: IEEE-754 single-precision divider, y = a / b (the "Division" unit
// of the sigmoid).
//
// Restoring division of the 24-bit significands, one quotient bit per clock.
// The dividend significand is doubled (and the exponent lowered) when it is
// smaller than the divisor's, so the first quotient bit is always 1. 25
// quotient bits are produced (24 significand bits and a guard bit); the
// remainder gives the sticky bit, and the result is rounded to nearest even.
// Special cases: NaN operands, 0/0 and inf/inf give NaN; x/0 and inf/x give a
// signed infinity; 0/x and x/inf give a signed zero; overflow gives infinity
// and results below the normal range are flushed to zero. Subnormal inputs
// are read as zero.
//
// Interface: pulse `start` for one clock with `a` and `b` valid; `done`
// pulses one clock when `y` is valid and `y` holds until the next start.
// Latency: 28 clocks from start to done.
//
// The document names a floating-point divider in its sigmoid but not its
// insides; the radix-2 restoring method and the handshake are this design's.
module fp_div
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t a,
  input  fp32_t b,
  output logic  busy,
  output logic  done,
  output fp32_t y
);

  typedef enum logic [1:0] {S_IDLE, S_PREP, S_ITER, S_FIN} state_e;
  state_e state;

  fp32_s       sa, sb;
  logic        sign_q;
  logic [1:0]  special_q;            // 0 none, 1 inf, 2 zero, 3 NaN
  logic [25:0] rem;
  logic [23:0] divisor;
  logic [24:0] quo;
  logic [4:0]  count;
  logic signed [10:0] exp_q;

  // classification of the operands latched at start
  fp32_t a_q, b_q;
  logic  a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [1:0] special_d;
  always_comb begin
    sa     = a_q;
    sb     = b_q;
    a_zero = (sa.exp == 8'd0);
    b_zero = (sb.exp == 8'd0);
    a_inf  = (sa.exp == 8'hFF) && (sa.man == '0);
    b_inf  = (sb.exp == 8'hFF) && (sb.man == '0);
    a_nan  = (sa.exp == 8'hFF) && (sa.man != '0);
    b_nan  = (sb.exp == 8'hFF) && (sb.man != '0);
    if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) special_d = 2'd3;
    else if (a_inf || b_zero)                                      special_d = 2'd1;
    else if (a_zero || b_inf)                                      special_d = 2'd2;
    else                                                           special_d = 2'd0;
  end

  // rounding and packing
  logic [24:0] mant_r;
  logic signed [10:0] e_r;
  fp32_t y_d;
  always_comb begin
    mant_r = {1'b0, quo[24:1]} + {24'd0, quo[0] & ((rem != '0) | quo[1])};
    e_r    = exp_q;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_r    = e_r + 11'sd1;
    end
    unique case (special_q)
      2'd1:    y_d = {sign_q, 8'hFF, 23'd0};
      2'd2:    y_d = {sign_q, 31'd0};
      2'd3:    y_d = FP_QNAN;
      default: begin
        if (e_r >= 11'sd255)    y_d = {sign_q, 8'hFF, 23'd0};
        else if (e_r <= 11'sd0) y_d = {sign_q, 31'd0};
        else                    y_d = {sign_q, e_r[7:0], mant_r[22:0]};
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      a_q       <= '0;
      b_q       <= '0;
      sign_q    <= 1'b0;
      special_q <= '0;
      rem       <= '0;
      divisor   <= '0;
      quo       <= '0;
      count     <= '0;
      exp_q     <= '0;
      done      <= 1'b0;
      y         <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_q   <= a;
          b_q   <= b;
          state <= S_PREP;
        end
        S_PREP: begin
          sign_q    <= sa.sign ^ sb.sign;
          special_q <= special_d;
          divisor   <= {1'b1, sb.man};
          quo       <= '0;
          count     <= 5'd0;
          if ({1'b1, sa.man} < {1'b1, sb.man}) begin
            rem   <= {1'b0, 1'b1, sa.man, 1'b0};
            exp_q <= $signed({3'b000, sa.exp}) - $signed({3'b000, sb.exp}) + 11'sd126;
          end else begin
            rem   <= {2'b00, 1'b1, sa.man};
            exp_q <= $signed({3'b000, sa.exp}) - $signed({3'b000, sb.exp}) + 11'sd127;
          end
          state <= S_ITER;
        end
        S_ITER: begin
          if (rem >= {2'b00, divisor}) begin
            quo <= {quo[23:0], 1'b1};
            rem <= (rem - {2'b00, divisor}) << 1;
          end else begin
            quo <= {quo[23:0], 1'b0};
            rem <= rem << 1;
          end
          count <= count + 5'd1;
          if (count == 5'd24) state <= S_FIN;
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
