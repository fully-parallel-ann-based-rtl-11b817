// mem_init: power-up initialisation of the weight memory.
//
// After reset it walks the 5-bit address bus `ad` through 0..20 with `rd` high
// for one clock per word, so that weight_mem copies every trained weight and
// bias into the weight registers. Two clocks after the last read (the
// memory's read and copy stages) it raises `done` and keeps it high until the
// next reset; the rest of the classifier waits for `done`.
//
// The document gives this block's role (set up the network when the chip is
// powered) and its 5-bit address output; the sequential walk and the `done`
// signal are this design's choices. Runs on the 100 MHz buffering clock;
// initialisation takes 23 clocks.
module mem_init
  import fp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  output logic [AD_W-1:0] ad,
  output logic            rd,
  output logic            done
);

  typedef enum logic [1:0] {S_READ, S_DRAIN, S_DONE} state_e;
  state_e     state;
  logic [1:0] drain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_READ;
      ad    <= '0;
      rd    <= 1'b1;
      drain <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        S_READ: begin
          if (32'(ad) == N_WORDS - 1) begin
            rd    <= 1'b0;
            state <= S_DRAIN;
          end else begin
            ad <= ad + 1'b1;
          end
        end
        S_DRAIN: begin
          drain <= drain + 2'd1;
          if (drain == 2'd1) begin
            done  <= 1'b1;
            state <= S_DONE;
          end
        end
        default: state <= S_DONE;
      endcase
    end
  end

endmodule
