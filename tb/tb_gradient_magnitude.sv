// Random test of the gradient-magnitude stage: random Gx, Gy in -1020..1020
// (and the extremes) are sent with random gaps; two cycles later mag must
// equal floor(sqrt(S(|Gx|/4) + S(|Gy|/4))), S being the approximate square
// from the reference table, with valid and the coordinates carried along.
module tb_gradient_magnitude;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;
  logic       clk = 0, rst_n = 0, in_valid = 0, out_valid;
  grad_t      gx = 0, gy = 0;
  mag_t       mag;
  logic [7:0] in_x = 0, in_y = 0, out_x, out_y;
  int checks = 0, failures = 0;

  gradient_magnitude dut (.*);

  always #5 clk = ~clk;

  // Expected outputs, two cycles deep.
  int   exp_mag [$];
  logic exp_v [$];
  logic [15:0] exp_xy [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_squares();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int a, b;
      @(negedge clk);
      if (n >= 2) begin
        checks++;
        if (out_valid !== exp_v[0] || int'(mag) != exp_mag[0] || {out_x, out_y} !== exp_xy[0]) begin
          failures++;
          $display("FAIL n=%0d mag=%0d expected %0d valid=%b/%b", n, mag, exp_mag[0], out_valid, exp_v[0]);
        end
        void'(exp_mag.pop_front()); void'(exp_v.pop_front()); void'(exp_xy.pop_front());
      end
      case (n)
        0: begin a = 1020; b = -1020; end
        1: begin a = 0; b = 0; end
        2: begin a = -3; b = 7; end
        default: begin a = int'($urandom % 2041) - 1020; b = int'($urandom % 2041) - 1020; end
      endcase
      gx = grad_t'(a); gy = grad_t'(b);
      in_valid = ($urandom % 4) != 0;
      in_x = 8'($urandom); in_y = 8'($urandom);
      exp_mag.push_back(mag_of(a, b));
      exp_v.push_back(in_valid);
      exp_xy.push_back({in_x, in_y});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
