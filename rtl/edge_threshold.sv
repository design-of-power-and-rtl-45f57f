// Edge decision: a pixel is an edge when its gradient magnitude Gr is
// strictly greater than the threshold, as in the source design. The
// threshold is a run-time input in the same units as mag (this design's
// choice; the source design fixes its value in software).
//
// Interface: in_valid qualifies mag and the coordinates; out_mag passes Gr on
// with the decision.
// Timing: one register stage.
module edge_threshold
  import sobel_pkg::*;
#(
  parameter int unsigned XW = 8,
  parameter int unsigned YW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  mag_t          mag,
  input  mag_t          threshold,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  output logic          out_valid,
  output logic          edge_o,
  output mag_t          out_mag,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      edge_o    <= 1'b0;
      out_mag   <= '0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      edge_o    <= in_valid && (mag > threshold);
      out_mag   <= mag;
      out_x     <= in_x;
      out_y     <= in_y;
    end
  end
endmodule
