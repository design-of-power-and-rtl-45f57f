// Test of the approximate MAC. Products are taken from two references: the
// approximate squares table (for a == b) and, for general operands, a second
// approx_mult8 instance (that multiplier is verified on its own). Checked:
// accumulation one cycle after en, holding while en = 0, clear having
// priority over en, reset, and wrap-around of a narrow (12-bit) accumulator
// in a second instance.
module tb_approx_mac;
  logic        clk = 0, rst_n = 0, en = 0, clear = 0;
  logic [7:0]  a = 0, b = 0;
  logic [23:0] acc;
  logic [11:0] acc12;
  logic [15:0] pref;
  logic [15:0] sq [256];
  int checks = 0, failures = 0;

  approx_mac dut (.clk(clk), .rst_n(rst_n), .en(en), .clear(clear), .a(a), .b(b), .acc(acc));
  approx_mac #(.ACC_W(12)) dut12 (.clk(clk), .rst_n(rst_n), .en(en), .clear(clear), .a(a), .b(b),
                                  .acc(acc12));
  approx_mult8 ref_mult (.a(a), .b(b), .p(pref));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint model;
    model = 0;
    $readmemh("tb/approx_square.hex", sq);
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (acc !== '0 || acc12 !== '0) begin
      failures++;
      $display("FAIL not cleared by reset");
    end
    // Four full-scale squares: 4 * 64505.
    en = 1; a = 255; b = 255;
    repeat (4) @(negedge clk);
    en = 0;
    @(negedge clk);
    checks++;
    if (acc != 24'd258020 || acc12 != 12'(258020)) begin
      failures++;
      $display("FAIL 4 x 255^2: acc=%0d acc12=%0d", acc, acc12);
    end
    model = 258020;
    for (int n = 0; n < 5000; n++) begin
      logic [15:0] prod;
      logic e, c;
      e = ($urandom % 4) != 0;
      c = ($urandom % 64) == 0;
      a = 8'($urandom);
      b = (n % 2 == 0) ? a : 8'($urandom);
      en = e; clear = c;
      #1;
      prod = (a == b) ? sq[a] : pref;
      if (c) model = 0;
      else if (e) model = model + longint'(prod);
      @(negedge clk);
      checks++;
      if (acc != 24'(model) || acc12 != 12'(model)) begin
        failures++;
        $display("FAIL n=%0d acc=%0d acc12=%0d expected %0d", n, acc, acc12, 24'(model));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
