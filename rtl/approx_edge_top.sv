// Top level: the two uses of the approximate 8x8 multiplier side by side.
//  * A streaming Sobel edge detector (sobel_edge_detector) for IMG_W x IMG_H
//    grey images, whose gradient-magnitude squares are computed by the
//    approximate multiplier.
//  * A multiply-accumulate unit (approx_mac) built on the same multiplier.
// The two share only clock and reset. Image reading and resizing happen
// before the pixel stream enters.
//
// Interface: pix_* pixel stream in raster order (pix_sof on pixel (0,0));
// threshold on Gr; edge_* one result per interior pixel, 5 cycles after the
// pixel that completes its window; mac_* operands, enable, clear and the
// accumulator (updated one cycle after mac_en). rst_n is active low and
// synchronous.
module approx_edge_top
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned ACC_W = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // Edge detector
  input  logic                     pix_valid,
  input  logic                     pix_sof,
  input  pixel_t                   pix,
  input  mag_t                     threshold,
  output logic                     edge_valid,
  output logic                     edge_o,
  output mag_t                     edge_mag,
  output logic [$clog2(IMG_W)-1:0] edge_x,
  output logic [$clog2(IMG_H)-1:0] edge_y,
  // Multiply-accumulate unit
  input  logic                     mac_en,
  input  logic                     mac_clear,
  input  logic [7:0]               mac_a,
  input  logic [7:0]               mac_b,
  output logic [ACC_W-1:0]         mac_acc
);
  sobel_edge_detector #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_sobel (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix_sof(pix_sof), .pix(pix),
    .threshold(threshold), .edge_valid(edge_valid), .edge_o(edge_o), .edge_mag(edge_mag),
    .edge_x(edge_x), .edge_y(edge_y));

  approx_mac #(.ACC_W(ACC_W)) u_mac (
    .clk(clk), .rst_n(rst_n), .en(mac_en), .clear(mac_clear), .a(mac_a), .b(mac_b),
    .acc(mac_acc));
endmodule
