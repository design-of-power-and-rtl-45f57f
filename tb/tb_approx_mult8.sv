// Exhaustive test of the approximate 8x8 multiplier over all 65536 operand
// pairs. Reference values come from an independent bit-level model of the
// same reduction tree:
//  * ten sample products and all 256 squares (approx_square.hex) exactly;
//  * every product within the model's largest error, |p - a*b| <= 520;
//  * over the whole sweep: the number of erroneous products (58250), the sum
//    of absolute errors (6468480), the sum of signed errors (4616192), and a
//    hash h = h*31 + p (mod 2^32), a outer and b inner loop (32'h1e567000);
//  * p = 0 whenever an operand is 0, and exact products when both operands
//    are below 4 (the approximate columns then never see an error pattern).
module tb_approx_mult8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  approx_mult8 dut (.a(a), .b(b), .p(p));

  logic [15:0] sq_ref [256];

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (a=%0d b=%0d)", what, got, exp, a, b);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nerr;
    longint sum_abs, sum_signed;
    logic [31:0] h;
    int samples [10][3];
    nerr = 0; sum_abs = 0; sum_signed = 0; h = '0;
    samples = '{'{255, 255, 64505}, '{0, 255, 0}, '{1, 1, 1}, '{3, 3, 9},
                           '{15, 15, 217}, '{100, 200, 20032}, '{128, 128, 16384},
                           '{77, 201, 15437}, '{170, 85, 14450}, '{254, 3, 794}};
    $readmemh("tb/approx_square.hex", sq_ref);

    foreach (samples[k]) begin
      a = 8'(samples[k][0]); b = 8'(samples[k][1]); #1;
      expect_eq("sample", int'(p), samples[k][2]);
    end

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        int e;
        a = 8'(i); b = 8'(j); #1;
        e = int'(p) - i * j;
        if (e != 0) nerr++;
        sum_abs    += (e < 0) ? -e : e;
        sum_signed += e;
        h = h * 32'd31 + 32'(p);
        checks++;
        if (e > 520 || e < -520) begin
          failures++;
          $display("FAIL bound a=%0d b=%0d p=%0d", i, j, p);
        end
        if (i == j) expect_eq("square", int'(p), int'(sq_ref[i]));
        if (i == 0 || j == 0) expect_eq("zero operand", int'(p), 0);
        if (i < 4 && j < 4) expect_eq("small operands", int'(p), i * j);
      end
    end
    expect_eq("erroneous products", nerr, 58250);
    expect_eq("sum of |error|", int'(sum_abs), 6468480);
    expect_eq("sum of error", int'(sum_signed), 4616192);
    checks++;
    if (h != 32'h1e567000) begin
      failures++;
      $display("FAIL hash %h", h);
    end
    $display("mean absolute error %0.2f, error rate %0.2f%%", real'(sum_abs) / 65536.0,
             100.0 * real'(nerr) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
