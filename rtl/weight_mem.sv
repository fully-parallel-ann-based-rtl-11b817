// weight_mem: the network's weight and bias memory (W0..W17, B0..B2).
//
// A 21-word read-only array holds the trained values (parameter INIT, by
// default the trained network of fp_pkg; address a holds W_a for a < 18 and
// B_(a-18) above). The memory initialisation controller reads it word by word
// over the 5-bit address bus `ad` with `rd`; each word read appears one clock
// later at the array's registered output and is copied, one clock after that,
// into a bank of 21 weight registers. The weight registers drive all
// multipliers and bias adders at once, so the network sees every weight in
// parallel. Addresses 21..31 read as zero and write nothing.
//
// Runs on the 100 MHz buffering clock. Until initialisation has finished the
// weight registers read zero.
//
// The memory, its contents and the 5-bit address come from the document; the
// two-stage read-then-copy organisation is this design's choice.
module weight_mem
  import fp_pkg::*;
#(
  parameter weight_set_t INIT = TRAINED_WEIGHTS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AD_W-1:0] ad,
  input  logic            rd,
  output fp32_t           w [N_W],
  output fp32_t           b [N_B]
);

  fp32_t           rom [N_WORDS];
  fp32_t           q;
  logic            q_valid;
  logic [AD_W-1:0] q_ad;
  fp32_t           regs [N_WORDS];

  assign rom = INIT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      q_valid <= 1'b0;
      q_ad    <= '0;
      regs    <= '{default: '0};
    end else begin
      q_valid <= rd && (32'(ad) < N_WORDS);
      q_ad    <= ad;
      q       <= (32'(ad) < N_WORDS) ? rom[ad] : '0;
      if (q_valid) regs[q_ad] <= q;
    end
  end

  for (genvar i = 0; i < N_W; i++) begin : g_w
    assign w[i] = regs[i];
  end
  for (genvar i = 0; i < N_B; i++) begin : g_b
    assign b[i] = regs[N_W + i];
  end

endmodule
