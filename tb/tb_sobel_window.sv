// Test of the 3x3 window generator on small random images (8 x 5) streamed
// with random gaps. For every pixel (r, c) with r >= 2 and c >= 2 a window
// centred on (r-1, c-1) must appear on the next cycle, equal to the image
// neighbourhood, with its coordinates; no other window may appear. The third
// frame is cut short by a new start of frame, which must restart the raster
// position. The number of windows per complete frame is (W-2)*(H-2).
module tb_sobel_window;
  import sobel_pkg::*;
  localparam int W = 8, H = 5;
  logic       clk = 0, rst_n = 0, pix_valid = 0, pix_sof = 0, win_valid;
  pixel_t     pix = 0;
  window_t    win;
  logic [2:0] win_x, win_y;
  int checks = 0, failures = 0;

  sobel_window #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  int img [H][W];
  logic    exp_v;
  int      exp_w [3][3];
  int      exp_x, exp_y;
  int      nwin;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one pixel, possibly after idle cycles, and check the previous one.
  task automatic check_out();
    checks++;
    if (win_valid !== exp_v) begin
      failures++;
      $display("FAIL valid %b expected %b", win_valid, exp_v);
    end else if (exp_v) begin
      nwin++;
      if (int'(win_x) != exp_x || int'(win_y) != exp_y) begin
        failures++;
        $display("FAIL centre (%0d,%0d) expected (%0d,%0d)", win_y, win_x, exp_y, exp_x);
      end
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          if (int'(win[i][j]) != exp_w[i][j]) begin
            failures++;
            $display("FAIL window[%0d][%0d] at (%0d,%0d)", i, j, exp_y, exp_x);
          end
    end
  endtask

  task automatic send(int r, int c);
    while (($urandom % 3) == 0) begin
      pix_valid = 0; pix_sof = 0;
      exp_v = 0;
      @(negedge clk);
      check_out();
    end
    pix_valid = 1; pix_sof = (r == 0 && c == 0); pix = pixel_t'(img[r][c]);
    exp_v = (r >= 2 && c >= 2);
    if (exp_v) begin
      exp_x = c - 1; exp_y = r - 1;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) exp_w[i][j] = img[r - 2 + i][c - 2 + j];
    end
    @(negedge clk);
    check_out();
    pix_valid = 0; pix_sof = 0;
  endtask

  initial begin
    exp_v = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      int rows;
      rows = (f == 2) ? 3 : H;         // frame 2 is abandoned after 3 rows
      foreach (img[r, c]) img[r][c] = int'($urandom % 256);
      nwin = 0;
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < W; c++) send(r, c);
      exp_v = 0;
      @(negedge clk);
      check_out();
      checks++;
      if (nwin != ((f == 2) ? (W - 2) : (W - 2) * (H - 2))) begin
        failures++;
        $display("FAIL frame %0d gave %0d windows", f, nwin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
