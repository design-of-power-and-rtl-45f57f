// Sobel convolution of a 3x3 window (win[row][col], row 0 on top):
//   Gx = (w02 + 2 w12 + w22) - (w00 + 2 w10 + w20)    horizontal mask
//   Gy = (w20 + 2 w21 + w22) - (w00 + 2 w01 + w02)    vertical mask
// i.e. the standard masks [-1 0 1; -2 0 2; -1 0 1] and its transpose. The
// factor 2 is a shift, so this stage needs only adders. Gx and Gy lie in
// -1020..1020 (11 signed bits). The Sobel operator is the source design's;
// the mask orientation and sign convention are the usual ones, chosen here.
//
// Interface: in_valid qualifies win and its centre coordinates, which travel
// along with the result.
// Timing: one register stage; results one cycle after the window.
module sobel_gradient
  import sobel_pkg::*;
#(
  parameter int unsigned XW = 8,
  parameter int unsigned YW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  window_t       win,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  output logic          out_valid,
  output grad_t         gx,
  output grad_t         gy,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);
  // Weighted sum of three pixels, a + 2b + c, at most 1020 (10 bits).
  function automatic logic [GRAD_W-2:0] wsum(pixel_t a, pixel_t b, pixel_t c);
    return (GRAD_W-1)'(a) + ((GRAD_W-1)'(b) << 1) + (GRAD_W-1)'(c);
  endfunction

  grad_t gx_c, gy_c;
  always_comb begin
    gx_c = grad_t'({1'b0, wsum(win[0][2], win[1][2], win[2][2])})
         - grad_t'({1'b0, wsum(win[0][0], win[1][0], win[2][0])});
    gy_c = grad_t'({1'b0, wsum(win[2][0], win[2][1], win[2][2])})
         - grad_t'({1'b0, wsum(win[0][0], win[0][1], win[0][2])});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      gx        <= '0;
      gy        <= '0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      gx        <= gx_c;
      gy        <= gy_c;
      out_x     <= in_x;
      out_y     <= in_y;
    end
  end
endmodule
