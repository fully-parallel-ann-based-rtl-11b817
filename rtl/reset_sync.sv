// reset_sync: reset release for the classifier.
//
// The internal reset is asserted at once (asynchronously) while the external
// reset is low or the PLL has not locked, and released HOLD_CYCLES clocks of
// `clk` after both are good, in step with `clk`. Holding it after lock lets
// the 100 MHz blocks, whose clock only starts running at lock, see several
// clock edges while still in reset. This is this design's choice; the
// document does not describe a reset.
module reset_sync #(
  parameter int unsigned HOLD_CYCLES = 4
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic [$clog2(HOLD_CYCLES + 1)-1:0] count;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      count <= '0;
      rst_n <= 1'b0;
    end else if (32'(count) != HOLD_CYCLES) begin
      count <= count + 1'b1;
      rst_n <= 1'b0;
    end else begin
      rst_n <= 1'b1;
    end
  end

endmodule
