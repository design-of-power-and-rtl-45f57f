// Exhaustive test of the exact 4-2 compressor: all 32 input patterns are
// compared with the published truth table of the cell (cout, carry and sum
// as 32-bit constants indexed by {y1,y2,y3,y4,cin}), with the counting
// identity y1+y2+y3+y4+cin = sum + 2*(carry + cout), and cout is checked not
// to depend on cin.
module tb_exact_compressor42;
  localparam logic [31:0] COUT_TT  = 32'hFFF0_F000;
  localparam logic [31:0] CARRY_TT = 32'hE88E_8EE8;
  localparam logic [31:0] SUM_TT   = 32'h9669_6996;

  logic y1, y2, y3, y4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  exact_compressor42 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {y1, y2, y3, y4, cin} = 5'(i);
      #1;
      checks++;
      if ({cout, carry, sum} !== {COUT_TT[i], CARRY_TT[i], SUM_TT[i]}) begin
        failures++;
        $display("FAIL table in=%05b got cout=%b carry=%b sum=%b", i[4:0], cout, carry, sum);
      end
      checks++;
      if (32'(sum) + 2 * (32'(carry) + 32'(cout)) != 32'($countones(i[4:0]))) begin
        failures++;
        $display("FAIL count in=%05b", i[4:0]);
      end
    end
    // cout must be the same for cin = 0 and cin = 1.
    for (int i = 0; i < 16; i++) begin
      logic c0;
      {y1, y2, y3, y4, cin} = {4'(i), 1'b0}; #1; c0 = cout;
      cin = 1'b1; #1;
      checks++;
      if (cout !== c0) begin
        failures++;
        $display("FAIL cout depends on cin for %04b", i[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
