// Exhaustive test of the approximate 4-2 compressor: all 16 input patterns
// are compared with its truth table (carry and sum as 16-bit constants
// indexed by {a1,a2,a3,a4}), and the error distance 2*carry + sum - (number
// of ones) is checked to be +1 for 0100 and 1000, -1 for 0011 and 1111, and 0
// otherwise (a 25% error rate with error distance 1).
module tb_approx_compressor42;
  localparam logic [15:0] CARRY_TT = 16'hFFF0;
  localparam logic [15:0] SUM_TT   = 16'hE88E;

  logic a1, a2, a3, a4, sum, carry;
  int checks = 0, failures = 0, nerr = 0;

  approx_compressor42 dut (.*);

  function automatic int expected_ed(int i);
    case (i)
      4, 8:   return 1;
      3, 15:  return -1;
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int ed;
      {a1, a2, a3, a4} = 4'(i);
      #1;
      checks++;
      if ({carry, sum} !== {CARRY_TT[i], SUM_TT[i]}) begin
        failures++;
        $display("FAIL table in=%04b got carry=%b sum=%b", i[3:0], carry, sum);
      end
      ed = 2 * int'(carry) + int'(sum) - $countones(i[3:0]);
      if (ed != 0) nerr++;
      checks++;
      if (ed != expected_ed(i)) begin
        failures++;
        $display("FAIL error distance in=%04b ed=%0d", i[3:0], ed);
      end
    end
    checks++;
    if (nerr != 4) begin
      failures++;
      $display("FAIL %0d erroneous patterns, expected 4", nerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
