// Half adder: sum = a ^ b, carry = a & b. One of the counter cells of the
// multiplier's partial-product reduction tree. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
