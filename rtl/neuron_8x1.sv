// neuron_8x1: one hidden neuron of the classifier, net = bias + sum(w_i * x_i)
// over 8 inputs, followed by the sigmoid, y = 1 / (1 + e^-net).
//
// Fully parallel datapath, as in the document: 8 floating-point multipliers,
// a balanced tree of 7 adders (4, 2, 1) and one bias adder feeding the sigmoid
// block. Each level ends in a register that loads on its own enable from the
// clock manager (en.mul, en.add1, en.add2, en.add3, en.bias), so every
// combinational unit gets a full 50 MHz period; en.sig then starts the
// sigmoid, which raises `sig_done` 66 clocks after the edge that samples
// en.sig. The clock manager never restarts a busy sigmoid, so the sigmoid's
// `busy` output is left unused here (a linter reports it as unused).
//
// Interface: x and w are the 8 inputs and 8 weights, bias the neuron's bias;
// they must be stable in the clock where en.mul is high. `net` is the
// registered activation input, `y` the sigmoid output (valid from sig_done).
//
// The arrangement of the adder tree follows the document's figure; the
// register after every level and the enable handshake are this design's way
// of timing the units.
module neuron_8x1
  import fp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  fp32_t   x [N_IN],
  input  fp32_t   w [N_IN],
  input  fp32_t   bias,
  input  hid_en_t en,
  output fp32_t   net,
  output logic    sig_done,
  output fp32_t   y
);

  fp32_t prod   [N_IN];
  fp32_t prod_q [N_IN];
  fp32_t s1 [4], s1_q [4];
  fp32_t s2 [2], s2_q [2];
  fp32_t s3, s3_q, net_d;
  logic  sig_busy;

  for (genvar i = 0; i < N_IN; i++) begin : g_mul
    fp_mul u_mul (.a(x[i]), .b(w[i]), .y(prod[i]));
  end
  for (genvar i = 0; i < 4; i++) begin : g_add1
    fp_add u_add (.a(prod_q[2*i]), .b(prod_q[2*i+1]), .sub(1'b0), .y(s1[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_add2
    fp_add u_add (.a(s1_q[2*i]), .b(s1_q[2*i+1]), .sub(1'b0), .y(s2[i]));
  end
  fp_add u_add3 (.a(s2_q[0]), .b(s2_q[1]), .sub(1'b0), .y(s3));
  fp_add u_bias (.a(s3_q), .b(bias), .sub(1'b0), .y(net_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '{default: '0};
      s1_q   <= '{default: '0};
      s2_q   <= '{default: '0};
      s3_q   <= '0;
      net    <= '0;
    end else begin
      if (en.mul)  prod_q <= prod;
      if (en.add1) s1_q   <= s1;
      if (en.add2) s2_q   <= s2;
      if (en.add3) s3_q   <= s3;
      if (en.bias) net    <= net_d;
    end
  end

  sigmoid u_sig (
    .clk(clk), .rst_n(rst_n), .start(en.sig), .x(net),
    .busy(sig_busy), .done(sig_done), .y(y)
  );

endmodule
