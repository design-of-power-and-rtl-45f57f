// End-to-end test of approx_edge_top at its default size (256 x 256 images).
// Three synthetic frames (a brightness ramp with a bright rectangle, a
// diagonal step and noise) are streamed with random idle cycles; the second
// frame is abandoned after 40 rows by a new start of frame. Every result is
// compared with a reference model (Sobel masks on the stored image, squares
// of |G|/4 from the approximate-square table, floor square root, threshold)
// and must appear exactly 5 clock edges after the edge that takes the pixel
// completing its window. Meanwhile the MAC accumulates random squares with
// random enables and clears and is compared each cycle with its own model;
// a run of 300 full-scale products makes the 24-bit accumulator wrap.
// Each mechanism is counted and must occur: input gaps, border pixels with no
// result, edge and non-edge results, frame restarts, and MAC accumulate,
// hold, clear and wrap. The number of results where the approximate squares
// change Gr, and where they change the edge decision, is reported.
module tb_approx_edge_top;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;
  localparam int W = 256, H = 256;

  logic        clk = 0, rst_n = 0;
  logic        pix_valid = 0, pix_sof = 0;
  pixel_t      pix = 0;
  mag_t        threshold = 0;
  logic        edge_valid, edge_o;
  mag_t        edge_mag;
  logic [7:0]  edge_x, edge_y;
  logic        mac_en = 0, mac_clear = 0;
  logic [7:0]  mac_a = 0, mac_b = 0;
  logic [23:0] mac_acc;

  approx_edge_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic mac_done = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
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
  int n_mac_acc = 0, n_mac_hold = 0, n_mac_clear = 0, n_mac_wrap = 0;

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
      rows = (f == 1) ? 40 : H;
      foreach (img[r, c]) img[r][c] = scene(f, r, c);
      threshold = mag_t'((f == 2) ? 30 : 40);
      if (f > 0) n_restart++;
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < W; c++) send_pixel(r, c);
      repeat (8) @(negedge clk);
    end
    wait (mac_done);
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
    $display("mac: accumulate %0d, hold %0d, clear %0d, wrap %0d", n_mac_acc, n_mac_hold,
             n_mac_clear, n_mac_wrap);
    checks++;
    if (n_results != 2 * (W - 2) * (H - 2) + 38 * (W - 2)) begin
      failures++;
      $display("FAIL %0d results", n_results);
    end
    checks++;
    if (n_gap == 0 || n_border == 0 || n_edge == 0 || n_nonedge == 0 || n_restart == 0 ||
        n_mac_acc == 0 || n_mac_hold == 0 || n_mac_clear == 0 || n_mac_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------------------- MAC stream
  initial begin
    longint model;
    model = 0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      logic e, c;
      if (n < 300) begin
        e = 1; c = 0; mac_a = 255;        // full-scale run: wraps the accumulator
      end else begin
        e = ($urandom % 3) != 0;
        c = ($urandom % 100) == 0;
        mac_a = 8'($urandom);
      end
      mac_b = mac_a; mac_en = e; mac_clear = c;
      if (c) begin
        model = 0; n_mac_clear++;
      end else if (e) begin
        if (model + longint'(sq_table[mac_a]) >= (longint'(1) << 24)) n_mac_wrap++;
        model = (model + longint'(sq_table[mac_a])) % (longint'(1) << 24);
        n_mac_acc++;
      end else begin
        n_mac_hold++;
      end
      @(negedge clk);
      checks++;
      if (mac_acc != 24'(model)) begin
        failures++;
        if (failures < 20) $display("FAIL mac n=%0d acc=%0d expected %0d", n, mac_acc, model);
      end
    end
    mac_en = 0; mac_clear = 0;
    mac_done = 1;
  end
endmodule
