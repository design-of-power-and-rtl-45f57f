// Test of the edge decision: random magnitudes and thresholds, including the
// equal case (not an edge), checked one cycle later together with valid and
// the coordinates; an invalid input never raises edge_o.
module tb_edge_threshold;
  import sobel_pkg::*;
  logic       clk = 0, rst_n = 0, in_valid = 0, out_valid, edge_o;
  mag_t       mag = 0, threshold = 0, out_mag;
  logic [7:0] in_x = 0, in_y = 0, out_x, out_y;
  int checks = 0, failures = 0;

  edge_threshold dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic v, e;
      @(negedge clk);
      v = ($urandom % 4) != 0;
      in_valid = v;
      mag = 9'($urandom % 362);
      case (n % 3)
        0: threshold = mag;
        1: threshold = 9'($urandom % 362);
        default: threshold = (mag == 0) ? 9'd0 : mag - 9'd1;
      endcase
      in_x = 8'($urandom); in_y = 8'($urandom);
      e = v && (int'(mag) > int'(threshold));
      @(negedge clk);
      checks++;
      if (out_valid !== v || edge_o !== e || out_mag !== mag || out_x !== in_x || out_y !== in_y) begin
        failures++;
        $display("FAIL mag=%0d thr=%0d edge=%b expected %b", mag, threshold, edge_o, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
