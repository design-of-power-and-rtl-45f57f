// Multiply-accumulate unit built on the approximate 8x8 multiplier: each
// cycle with en = 1 it adds approx_mult8(a, b) to the accumulator. Using the
// approximate multiplier in a MAC is the source design's; the accumulator
// width, the enable and the clear are this design's own (the accumulator
// wraps around on overflow; 24 bits hold 256 full-scale products).
//
// Interface: clear (synchronous, has priority over en) empties the
// accumulator; rst_n (active low, synchronous) does the same.
// Timing: the product of the operands seen at a clock edge with en = 1 is in
// acc after that edge (one cycle).
module approx_mac #(
  parameter int unsigned ACC_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clear,
  input  logic [7:0]       a,
  input  logic [7:0]       b,
  output logic [ACC_W-1:0] acc
);
  logic [15:0] prod;

  approx_mult8 u_mult (.a(a), .b(b), .p(prod));

  always_ff @(posedge clk) begin
    if (!rst_n || clear) acc <= '0;
    else if (en)         acc <= acc + ACC_W'(prod);
  end
endmodule
