// neuron_2x1: the output neuron, OUT = bias + w0*x0 + w1*x1 with the linear
// (purelin) activation, i.e. the activation passes its input through.
//
// Two floating-point multipliers, one adder and one bias adder, each followed
// by a register loaded on the clock manager's enable (en.mul, en.add,
// en.bias). x0 and x1 are the two hidden-neuron outputs and must be stable
// while en.mul is high; `y` is valid from the clock after en.bias.
//
// The datapath is the document's; the staging registers and enables are this
// design's timing choice.
module neuron_2x1
  import fp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  fp32_t   x [N_HID],
  input  fp32_t   w [N_HID],
  input  fp32_t   bias,
  input  out_en_t en,
  output fp32_t   y
);

  fp32_t prod [N_HID], prod_q [N_HID];
  fp32_t sum, sum_q, out_d;

  for (genvar i = 0; i < N_HID; i++) begin : g_mul
    fp_mul u_mul (.a(x[i]), .b(w[i]), .y(prod[i]));
  end
  fp_add u_add  (.a(prod_q[0]), .b(prod_q[1]), .sub(1'b0), .y(sum));
  fp_add u_bias (.a(sum_q), .b(bias), .sub(1'b0), .y(out_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '{default: '0};
      sum_q  <= '0;
      y      <= '0;
    end else begin
      if (en.mul)  prod_q <= prod;
      if (en.add)  sum_q  <= sum;
      if (en.bias) y      <= out_d;   // purelin: output equals net input
    end
  end

endmodule
