// Streaming Sobel edge detector using approximate multipliers. One pixel per
// cycle enters in raster order; the pipeline is
//   sobel_window       3x3 neighbourhood from two line buffers      1 cycle
//   sobel_gradient     Gx, Gy with the Sobel masks                  1 cycle
//   gradient_magnitude Gr = sqrt(Gx^2 + Gy^2), squares approximate  2 cycles
//   edge_threshold     edge = Gr > threshold                        1 cycle
// so the result for the window centred on (r-1, c-1) appears 5 cycles after
// pixel (r, c) enters. Only interior pixels produce a result (see
// sobel_window); border pixels are non-edges. The chain of operations is the
// source design's; the streaming pipeline, its timing and the scaling of the
// gradients are this design's own.
//
// Interface: pix_valid / pix_sof / pix as in sobel_window; edge_valid
// qualifies edge_o, edge_mag (Gr, in units of 4 gradient levels) and the
// centre coordinates edge_x, edge_y. There is no back-pressure.
module sobel_edge_detector
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pix_valid,
  input  logic                     pix_sof,
  input  pixel_t                   pix,
  input  mag_t                     threshold,
  output logic                     edge_valid,
  output logic                     edge_o,
  output mag_t                     edge_mag,
  output logic [$clog2(IMG_W)-1:0] edge_x,
  output logic [$clog2(IMG_H)-1:0] edge_y
);
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  logic          w_valid, g_valid, m_valid;
  window_t       win;
  grad_t         gx, gy;
  mag_t          mag;
  logic [XW-1:0] w_x, g_x, m_x;
  logic [YW-1:0] w_y, g_y, m_y;

  sobel_window #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_window (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix_sof(pix_sof), .pix(pix),
    .win_valid(w_valid), .win(win), .win_x(w_x), .win_y(w_y));

  sobel_gradient #(.XW(XW), .YW(YW)) u_gradient (
    .clk(clk), .rst_n(rst_n), .in_valid(w_valid), .win(win), .in_x(w_x), .in_y(w_y),
    .out_valid(g_valid), .gx(gx), .gy(gy), .out_x(g_x), .out_y(g_y));

  gradient_magnitude #(.XW(XW), .YW(YW)) u_magnitude (
    .clk(clk), .rst_n(rst_n), .in_valid(g_valid), .gx(gx), .gy(gy), .in_x(g_x), .in_y(g_y),
    .out_valid(m_valid), .mag(mag), .out_x(m_x), .out_y(m_y));

  edge_threshold #(.XW(XW), .YW(YW)) u_threshold (
    .clk(clk), .rst_n(rst_n), .in_valid(m_valid), .mag(mag), .threshold(threshold),
    .in_x(m_x), .in_y(m_y),
    .out_valid(edge_valid), .edge_o(edge_o), .out_mag(edge_mag), .out_x(edge_x), .out_y(edge_y));
endmodule
