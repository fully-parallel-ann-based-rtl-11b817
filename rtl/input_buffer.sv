// input_buffer: the eight input registers I0..I7 that hold one beat's
// principal components, written from the 32-bit DATA bus.
//
// Runs on the 100 MHz buffering clock. In every clock, each input word whose
// enable bit en[i] is high loads `data` (EN 8 is a one-hot register address;
// several bits may be high to write the same word to several registers). The
// buffer keeps a mask of the words written since the last beat; the clock in
// which the last of the eight is written completes the beat. In that clock
// the whole beat is copied to the output registers `regs` (the word written
// in that clock straight from `data`), the completed-beat counter `beat_cnt`
// increments (wrapping), `beat_done` pulses for one clock (it is registered,
// so it is high in the clock after the completing write) and the mask clears.
// A counter rather than a pulse is handed to the 50 MHz arithmetic side: it
// cannot be missed between two slow clock edges, and the other side can tell
// how many beats completed since it last took one.
//
// The buffer is double: writes go to a shadow bank and `regs` changes only
// when a beat completes. The host may therefore start writing the next beat
// at once, while the neurons are still taking their products from `regs`.
// `regs` then holds the latest complete beat until the next one completes.
//
// The register file, DATA 32 and EN 8 are the document's; the completion rule
// (all eight written), the shadow bank and the counter handshake are this
// design's choices.
module input_buffer
  import fp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  fp32_t           data,
  input  logic [N_IN-1:0] en,
  output fp32_t           regs [N_IN],
  output logic [BEAT_CNT_W-1:0] beat_cnt,
  output logic            beat_done
);

  fp32_t           shadow [N_IN];
  logic [N_IN-1:0] written;
  logic            complete;

  assign complete = ((written | en) == {N_IN{1'b1}}) && (en != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs      <= '{default: '0};
      shadow    <= '{default: '0};
      written   <= '0;
      beat_cnt  <= '0;
      beat_done <= 1'b0;
    end else begin
      for (int i = 0; i < N_IN; i++) begin
        if (en[i]) shadow[i] <= data;
      end
      beat_done <= complete;
      if (complete) begin
        for (int i = 0; i < N_IN; i++) regs[i] <= en[i] ? data : shadow[i];
        written  <= '0;
        beat_cnt <= beat_cnt + 1'b1;
      end else begin
        written  <= written | en;
      end
    end
  end

endmodule
