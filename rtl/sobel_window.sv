// Sliding 3x3 window generator for a raster-order pixel stream. Two line
// buffers hold the two previous image rows; for each incoming pixel at
// (row r, column c) the column {row r-2, row r-1, row r} at c is shifted into
// a 3x3 register window, which is then centred on pixel (r-1, c-1).
// A window is emitted only when that centre is an interior pixel (r >= 2 and
// c >= 2), i.e. it has a full neighbourhood; the (IMG_W-2) x (IMG_H-2)
// interior results carry their centre coordinates, and border pixels are
// never marked as edges. This streaming structure and the border rule are
// this design's own choice.
//
// Interface: pix_valid qualifies pix; pix_sof marks the first pixel (0,0) of a
// frame and restarts the row/column counters; gaps (pix_valid = 0) are
// allowed anywhere; pix_sof must come with pix_valid (asserted). win[row][col] has row 0 at the top.
// Timing: win_valid/win/win_x/win_y are registered and appear one cycle after
// the pixel that completes the window.
module sobel_window
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
  output logic                     win_valid,
  output window_t                  win,
  output logic [$clog2(IMG_W)-1:0] win_x,
  output logic [$clog2(IMG_H)-1:0] win_y
);
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  logic [XW-1:0] col_cnt, col;
  logic [YW-1:0] row_cnt, row;
  pixel_t        up1, up2;   // pixels one and two rows above, same column

  // Position of the incoming pixel: a start of frame forces (0, 0).
  assign col = pix_sof ? '0 : col_cnt;
  assign row = pix_sof ? '0 : row_cnt;

  line_buffer #(.DEPTH(IMG_W), .DATA_W(PIX_W)) u_lb1 (
    .clk(clk), .we(pix_valid), .addr(col), .wdata(pix), .rdata(up1));
  line_buffer #(.DEPTH(IMG_W), .DATA_W(PIX_W)) u_lb2 (
    .clk(clk), .we(pix_valid), .addr(col), .wdata(up1), .rdata(up2));

  // A start of frame is only meaningful on a valid pixel.
  a_sof_valid: assert property (@(posedge clk) disable iff (!rst_n) pix_sof |-> pix_valid)
    else $error("pix_sof without pix_valid");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col_cnt   <= '0;
      row_cnt   <= '0;
      win_valid <= 1'b0;
      win_x     <= '0;
      win_y     <= '0;
      for (int r = 0; r < 3; r++)
        for (int k = 0; k < 3; k++) win[r][k] <= '0;
    end else begin
      win_valid <= 1'b0;
      if (pix_valid) begin
        // Shift the window left and bring in the new column on the right.
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
        end
        win[0][2] <= up2;
        win[1][2] <= up1;
        win[2][2] <= pix;
        win_valid <= (row >= YW'(2)) && (col >= XW'(2));
        win_x     <= col - XW'(1);
        win_y     <= row - YW'(1);
        // Advance the raster position.
        if (col == XW'(IMG_W - 1)) begin
          col_cnt <= '0;
          row_cnt <= (row == YW'(IMG_H - 1)) ? '0 : row + YW'(1);
        end else begin
          col_cnt <= col + XW'(1);
          row_cnt <= row;
        end
      end
    end
  end
endmodule
