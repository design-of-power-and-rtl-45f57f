// Random test of the Sobel convolution: random 3x3 windows (and the extreme
// all-0/255 edges) are convolved in the testbench with the two Sobel masks as
// integer coefficient arrays, and Gx, Gy, valid and the coordinates are
// checked one cycle later.
module tb_sobel_gradient;
  import sobel_pkg::*;
  logic          clk = 0, rst_n = 0, in_valid = 0, out_valid;
  window_t       win;
  grad_t         gx, gy;
  logic [7:0]    in_x = 0, in_y = 0, out_x, out_y;
  int checks = 0, failures = 0;

  localparam int MX [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  localparam int MY [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};

  sobel_gradient dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int ex, ey;
      logic v;
      @(negedge clk);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          case (n)
            0: win[r][c] = (c == 2) ? 8'd255 : 8'd0;
            1: win[r][c] = (c == 0) ? 8'd255 : 8'd0;
            2: win[r][c] = (r == 2) ? 8'd255 : 8'd0;
            3: win[r][c] = (r == 0) ? 8'd255 : 8'd0;
            default: win[r][c] = 8'($urandom);
          endcase
      v = ($urandom % 4) != 0;
      in_valid = v; in_x = 8'($urandom); in_y = 8'($urandom);
      ex = 0; ey = 0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          ex += MX[r][c] * int'(win[r][c]);
          ey += MY[r][c] * int'(win[r][c]);
        end
      @(negedge clk);
      checks++;
      if (out_valid !== v || int'(gx) != ex || int'(gy) != ey || out_x !== in_x || out_y !== in_y) begin
        failures++;
        $display("FAIL n=%0d gx=%0d/%0d gy=%0d/%0d valid=%b/%b", n, gx, ex, gy, ey, out_valid, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
