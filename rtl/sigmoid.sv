// sigmoid: directly computed logistic function y = 1 / (1 + e^-x) in IEEE-754
// single precision, with no table or approximation beyond the rounding of
// each unit.
//
// Structure, as in the document's sigmoid block: an input register, sign
// inversion (-x), the exponentiator (fp_exp), the constant 1.0, an adder
// (fp_add) forming 1 + e^-x, and the divider (fp_div) forming 1 / (1 + e^-x).
// The units are enabled in turn by sig_clk_en.
//
// Interface: pulse `start` with `x` valid; `done` pulses when `y` is valid, and
// `y` holds until the next result. Latency: done rises 66 clocks after the
// edge that samples start (35 in the exponentiator, 28 in the divider, and 3
// for the input register, the sum register and the start of the divider).
// Saturation: e^-x overflows to +inf for x <= -88.7, giving y = 0; for large
// x, 1 + e^-x rounds to 1.0, giving y = 1.
//
// The document's figure labels the adder output "1 - e^-Input", while its
// sigmoid equation is 1 / (1 + e^-net); this design adds, following the
// equation.
module sigmoid
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t x,
  output logic  busy,
  output logic  done,
  output fp32_t y
);

  logic [2:0] enable;
  logic       exp_done, div_done, exp_busy, div_busy, ctl_busy;
  fp32_t      in_q, e_neg, sum, sum_q;

  sig_clk_en u_ctl (
    .clk(clk), .rst_n(rst_n), .en(start && !ctl_busy),
    .exp_done(exp_done), .div_done(div_done),
    .enable(enable), .busy(ctl_busy), .done(done)
  );

  // input buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 in_q <= '0;
    else if (start && !ctl_busy) in_q <= x;
  end

  fp_exp u_exp (
    .clk(clk), .rst_n(rst_n), .start(enable[0]),
    .a({~in_q[31], in_q[30:0]}),
    .busy(exp_busy), .done(exp_done), .y(e_neg)
  );

  fp_add u_add (.a(FP_ONE), .b(e_neg), .sub(1'b0), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sum_q <= '0;
    else if (enable[1]) sum_q <= sum;
  end

  fp_div u_div (
    .clk(clk), .rst_n(rst_n), .start(enable[2]),
    .a(FP_ONE), .b(sum_q),
    .busy(div_busy), .done(div_done), .y(y)
  );

  assign busy = ctl_busy | exp_busy | div_busy;

endmodule
