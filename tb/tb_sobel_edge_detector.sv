// End-to-end test of sobel_edge_detector on small images (24 x 12). Three
// synthetic frames (a ramp with a bright rectangle, a diagonal step, noise)
// are streamed with random idle cycles, the second one abandoned after 5 rows
// by a new start of frame. Every result is compared with a reference model
// (Sobel masks, squares of |G|/4 from the approximate-square table, floor
// square root, threshold) and must appear exactly 5 clock edges after the
// edge that takes the pixel completing its window. Gaps, border pixels,
// edges, non-edges and restarts are counted and must all occur.
module tb_sobel_edge_detector;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;
  localparam int W = 24, H = 12;

  logic        clk = 0, rst_n = 0;
  logic        pix_valid = 0, pix_sof = 0;
  pixel_t      pix = 0;
  mag_t        threshold = 0;
  logic        edge_valid, edge_o;
  mag_t        edge_mag;
  logic [4:0]  edge_x;
  logic [3:0]  edge_y;

  sobel_edge_detector #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- images
  int img [H][W];

  function automatic int scene(int f, int r, int c);
    int v;
    case (f % 2)
      0: begin
        v = (c / 2 + r / 4) % 64;
        if (r >= H / 4 && r < 3 * H / 4 && c >= W / 4 && c < 3 * W / 4) v += 150;
      end
      default: v = (r + c < W) ? 30 : 200;
    endcase
    v += int'($urandom % 16);
    return (v > 255) ? 255 : v;
  endfunction

  // ------------------------------------------------------- expected results
  typedef struct {
    longint due;
    int     x, y, mag;
    logic   edge_bit;
  } exp_t;
  exp_t exp_q [$];

  int n_gap = 0, n_border = 0, n_edge = 0, n_nonedge = 0, n_restart = 0;
  int n_approx_mag = 0, n_approx_edge = 0, n_results = 0;

  // Output checker, at every falling edge.
  always @(negedge clk) if (rst_n) begin
    if (exp_q.size() > 0 && exp_q[0].due < cyc) begin
      failures++;
      $display("FAIL result for (%0d,%0d) missing at cycle %0d", exp_q[0].y, exp_q[0].x, exp_q[0].due);
      void'(exp_q.pop_front());
    end
    if (edge_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at (%0d,%0d)", edge_y, edge_x);
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        n_results++;
        if (e.due != cyc || int'(edge_x) != e.x || int'(edge_y) != e.y ||
            int'(edge_mag) != e.mag || edge_o !== e.edge_bit) begin
          failures++;
          if (failures < 20)
            $display("FAIL (%0d,%0d) cycle %0d/%0d mag %0d/%0d edge %b/%b", edge_y, edge_x, cyc,
                     e.due, edge_mag, e.mag, edge_o, e.edge_bit);
        end
        if (edge_o) n_edge++; else n_nonedge++;
      end
    end
  end

  task automatic send_pixel(int r, int c);
    while (($urandom % 8) == 0) begin
      pix_valid = 0; pix_sof = 0;
      n_gap++;
      @(negedge clk);
    end
    pix_valid = 1; pix_sof = (r == 0 && c == 0); pix = pixel_t'(img[r][c]);
    if (r >= 2 && c >= 2) begin
      int w [3][3];
      int gx, gy, m, me;
      exp_t e;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) w[i][j] = img[r - 2 + i][c - 2 + j];
      gradients(w, gx, gy);
      m  = mag_of(gx, gy);
      me = exact_mag_of(gx, gy);
      if (m != me) n_approx_mag++;
      if ((m > int'(threshold)) != (me > int'(threshold))) n_approx_edge++;
      e.due = cyc + 1 + 4; e.x = c - 1; e.y = r - 1; e.mag = m; e.edge_bit = m > int'(threshold);
      exp_q.push_back(e);
    end else begin
      n_border++;
    end
    @(negedge clk);
    pix_valid = 0; pix_sof = 0;
  endtask

  // ------------------------------------------------------------ pixel stream
  initial begin
    load_squares();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int rows;
      rows = (f == 1) ? 5 : H;
      foreach (img[r, c]) img[r][c] = scene(f, r, c);
      threshold = mag_t'((f == 2) ? 30 : 40);
      if (f > 0) n_restart++;
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < W; c++) send_pixel(r, c);
      repeat (8) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end
    $display("results %0d: edges %0d, non-edges %0d, border pixels %0d, gaps %0d, restarts %0d",
             n_results, n_edge, n_nonedge, n_border, n_gap, n_restart);
    $display("approximate squares changed Gr for %0d results and the edge decision for %0d",
             n_approx_mag, n_approx_edge);
    checks++;
    if (n_results != 2 * (W - 2) * (H - 2) + 3 * (W - 2)) begin
      failures++;
      $display("FAIL %0d results", n_results);
    end
    checks++;
    if (n_gap == 0 || n_border == 0 || n_edge == 0 || n_nonedge == 0 || n_restart == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
