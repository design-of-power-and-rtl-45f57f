// Full adder: counts the ones of a, b and cin into sum (weight 1) and carry
// (weight 2). One of the counter cells of the multiplier's partial-product
// reduction tree. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic p;
  assign p     = a ^ b;
  assign sum   = p ^ cin;
  assign carry = (a & b) | (p & cin);
endmodule
