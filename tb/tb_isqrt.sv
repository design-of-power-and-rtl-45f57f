// Exhaustive test of the 17-bit integer square root: for every x,
// root^2 <= x < (root+1)^2.
module tb_isqrt;
  logic [16:0] x;
  logic [8:0]  root;
  int checks = 0, failures = 0;

  isqrt #(.IN_W(17)) dut (.x(x), .root(root));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      longint r;
      x = 17'(i); #1;
      r = longint'(root);
      checks++;
      if (!(r * r <= longint'(i) && (r + 1) * (r + 1) > longint'(i))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d root=%0d", i, root);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
