// Gradient magnitude Gr = sqrt(Gx^2 + Gy^2), with both squares taken by the
// approximate 8x8 multiplier (approx_mult8). This is where the edge detector
// uses the approximate arithmetic: the squaring, adding and root follow the
// source design.
//
// Scaling (this design's choice): |Gx| and |Gy| reach 1020, ten bits, so
// each is shifted right by SHIFT = 2 to fit the 8-bit multiplier operands
// (1020 >> 2 = 255, no saturation needed). Gr is then in units of 4 gradient
// levels, at most floor(sqrt(2 * 255^2)) = 360 when the squares are exact;
// the threshold that follows uses the same units.
//
// Interface: in_valid qualifies gx, gy and the coordinates, which travel
// along with the result.
// Timing: two register stages (|G| and squares, then sum and root); mag is
// valid two cycles after the gradients.
module gradient_magnitude
  import sobel_pkg::*;
#(
  parameter int unsigned XW    = 8,
  parameter int unsigned YW    = 8,
  parameter int unsigned SHIFT = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  grad_t         gx,
  input  grad_t         gy,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  output logic          out_valid,
  output mag_t          mag,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);
  // |g| >> SHIFT, saturated to 8 bits.
  function automatic logic [7:0] scaled_abs(grad_t g);
    logic [GRAD_W-1:0] m;
    m = g[GRAD_W-1] ? GRAD_W'(-g) : GRAD_W'(g);
    m = m >> SHIFT;
    return (m > GRAD_W'(255)) ? 8'hFF : m[7:0];
  endfunction

  logic [7:0]  ax, ay;
  logic [15:0] sqx_c, sqy_c;
  assign ax = scaled_abs(gx);
  assign ay = scaled_abs(gy);

  approx_mult8 u_sq_x (.a(ax), .b(ax), .p(sqx_c));
  approx_mult8 u_sq_y (.a(ay), .b(ay), .p(sqy_c));

  // Stage 1: squares.
  logic [15:0]   sqx, sqy;
  logic          v1;
  logic [XW-1:0] x1;
  logic [YW-1:0] y1;

  // Stage 2: sum and root.
  logic [16:0] sum_sq;
  logic [8:0]  root;
  assign sum_sq = {1'b0, sqx} + {1'b0, sqy};

  isqrt #(.IN_W(17)) u_sqrt (.x(sum_sq), .root(root));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      sqx       <= '0;
      sqy       <= '0;
      x1        <= '0;
      y1        <= '0;
      out_valid <= 1'b0;
      mag       <= '0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      v1        <= in_valid;
      sqx       <= sqx_c;
      sqy       <= sqy_c;
      x1        <= in_x;
      y1        <= in_y;
      out_valid <= v1;
      mag       <= MAG_W'(root);
      out_x     <= x1;
      out_y     <= y1;
    end
  end
endmodule
