// clock_manager: sequences the buffers and arithmetic units of the network so
// that each one is enabled only when its operands have settled.
//
// Runs on the 50 MHz arithmetic clock. It compares the input buffer's
// completed-beat counter `beat_cnt` (from the 100 MHz side) with the count of
// the last beat it took. The two clocks come from one PLL and are
// phase-aligned, so the counter and the input registers are sampled directly,
// in the same clock edge. When a new beat is there and the weight memory is
// initialised, it steps through
//   MUL, ADD1, ADD2, ADD3, BIAS, SIG   (one clock each, hid_en to both hidden
//                                       neurons, which run in parallel)
//   WAIT_SIG                           (until both sigmoids report done)
//   OMUL, OADD, OBIAS                  (out_en to the output neuron)
//   VALID                              (out_valid for one clock)
// and returns to IDLE. The products are captured in the clock edge that ends
// MUL. In that same edge the manager records `beat_cnt` as taken, so the count
// always belongs to the beat whose products were captured. If more than one
// beat completed since the previous capture, all but the newest were
// overwritten in the input registers: `beat_lost` then pulses for one clock.
// A beat that completes while a classification runs is thus held and
// processed next. Latency from the counter change to out_valid: 75 clocks of
// 50 MHz, with sigmoids that raise done 66 clocks after their start.
//
// The document names this block and its purpose (synchronise buffers and
// calculation units with their individual response times); the state
// sequence, the handshakes and the held-beat rule are this design's.
module clock_manager
  import fp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init_done,
  input  logic [BEAT_CNT_W-1:0] beat_cnt,
  input  logic [N_HID-1:0] sig_done,
  output hid_en_t          hid_en,
  output out_en_t          out_en,
  output logic             out_valid,
  output logic             busy,
  output logic             beat_lost
);

  typedef enum logic [3:0] {
    S_IDLE, S_MUL, S_ADD1, S_ADD2, S_ADD3, S_BIAS, S_SIG, S_WAIT_SIG,
    S_OMUL, S_OADD, S_OBIAS, S_VALID
  } state_e;
  state_e state;

  logic [BEAT_CNT_W-1:0] taken, since;
  logic                  init_s;
  logic [N_HID-1:0]      sig_got;

  assign since = beat_cnt - taken;   // beats completed since the last capture

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      taken     <= '0;
      init_s    <= 1'b0;
      sig_got   <= '0;
      beat_lost <= 1'b0;
    end else begin
      init_s    <= init_done;
      beat_lost <= 1'b0;
      unique case (state)
        S_IDLE: if (since != '0 && init_s) state <= S_MUL;
        S_MUL: begin
          taken     <= beat_cnt;
          beat_lost <= (since > BEAT_CNT_W'(1));
          state     <= S_ADD1;
        end
        S_ADD1: state <= S_ADD2;
        S_ADD2: state <= S_ADD3;
        S_ADD3: state <= S_BIAS;
        S_BIAS: state <= S_SIG;
        S_SIG: begin
          sig_got <= '0;
          state   <= S_WAIT_SIG;
        end
        S_WAIT_SIG: begin
          sig_got <= sig_got | sig_done;
          if ((sig_got | sig_done) == {N_HID{1'b1}}) state <= S_OMUL;
        end
        S_OMUL:  state <= S_OADD;
        S_OADD:  state <= S_OBIAS;
        S_OBIAS: state <= S_VALID;
        S_VALID: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    hid_en = '0;
    out_en = '0;
    hid_en.mul  = (state == S_MUL);
    hid_en.add1 = (state == S_ADD1);
    hid_en.add2 = (state == S_ADD2);
    hid_en.add3 = (state == S_ADD3);
    hid_en.bias = (state == S_BIAS);
    hid_en.sig  = (state == S_SIG);
    out_en.mul  = (state == S_OMUL);
    out_en.add  = (state == S_OADD);
    out_en.bias = (state == S_OBIAS);
  end

  assign out_valid = (state == S_VALID);
  assign busy      = (state != S_IDLE);

endmodule
