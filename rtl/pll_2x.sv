// pll_2x: behavioural model of the clock unit's phase-locked loop, which
// derives the 100 MHz buffering clock from the 50 MHz board clock. This is a
// simulation model, not synthesizable logic: on an FPGA the vendor's PLL
// primitive takes its place.
//
// After areset (active high) is released the model counts LOCK_CYCLES rising
// edges of clk_in, then raises `locked` and from then on drives clk_out at
// twice the input frequency: high on each input rising edge, and again half an
// input period later, each high phase lasting a quarter of the input period
// IN_PERIOD_NS. areset stops the output and drops `locked`. The model assumes
// clk_in really has the period IN_PERIOD_NS; delays are in nanoseconds.
// Its blocking assignments are deliberate: the output edges must be produced
// in the same time step as the input edge that causes them.
//
// The 50 MHz input and 100 MHz output are the document's; the lock behaviour
// is the model's own.
module pll_2x #(
  parameter real         IN_PERIOD_NS = 20.0,
  parameter int unsigned LOCK_CYCLES  = 4
) (
  input  logic clk_in,
  input  logic areset,
  output logic clk_out,
  output logic locked
);

  int unsigned edges;
  logic        gen;

  initial begin
    gen    = 1'b0;
    locked = 1'b0;
    edges  = 0;
  end

  // lock detector: count input edges after reset
  always @(posedge clk_in or posedge areset) begin
    if (areset) begin
      locked = 1'b0;
      edges  = 0;
    end else begin
      if (edges < LOCK_CYCLES) edges = edges + 1;
      locked = (edges >= LOCK_CYCLES);
    end
  end

  // oscillator: two pulses per input period, phase-aligned to clk_in
  always @(posedge clk_in) begin
    gen = 1'b1;
    #(IN_PERIOD_NS / 4.0) gen = 1'b0;
    #(IN_PERIOD_NS / 4.0) gen = 1'b1;
    #(IN_PERIOD_NS / 4.0) gen = 1'b0;
  end

  assign clk_out = gen & locked & !areset;

endmodule
