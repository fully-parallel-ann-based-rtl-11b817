// sig_clk_en: clock-enable sequencer of the sigmoid block.
//
// The sigmoid's three arithmetic units have different response times, so they
// are not free-running: this controller hands each one an enable when its
// operands are ready. enable[0] starts the exponentiator, enable[1] loads the
// register after the adder (1 + e^-x) and enable[2] starts the divider.
//
// Sequence (one state per clock unless waiting):
//   IDLE --en--> EXP (enable[0]) --> WAIT_EXP --exp_done--> ADD (enable[1])
//   --> DIV (enable[2]) --> WAIT_DIV --div_done--> IDLE, with done = div_done.
// `busy` is high outside IDLE; an `en` while busy is ignored.
//
// The document shows this block by name with ports clk, en, reset and
// enable[2:0]; the done inputs, the states and the active-low reset are this
// design's reading of what such a block must do.
module sig_clk_en (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       exp_done,
  input  logic       div_done,
  output logic [2:0] enable,
  output logic       busy,
  output logic       done
);

  typedef enum logic [2:0] {S_IDLE, S_EXP, S_WAIT_EXP, S_ADD, S_DIV, S_WAIT_DIV} state_e;
  state_e state, state_n;

  always_comb begin
    state_n = state;
    enable  = 3'b000;
    done    = 1'b0;
    unique case (state)
      S_IDLE:     if (en) state_n = S_EXP;
      S_EXP:      begin enable[0] = 1'b1; state_n = S_WAIT_EXP; end
      S_WAIT_EXP: if (exp_done) state_n = S_ADD;
      S_ADD:      begin enable[1] = 1'b1; state_n = S_DIV; end
      S_DIV:      begin enable[2] = 1'b1; state_n = S_WAIT_DIV; end
      S_WAIT_DIV: if (div_done) begin done = 1'b1; state_n = S_IDLE; end
      default:    state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_n;
  end

  assign busy = (state != S_IDLE);

  // each enable is a single-clock pulse and at most one is high at a time
  always_comb if (rst_n) a_enable_onehot: assert ($onehot0(enable));

endmodule
