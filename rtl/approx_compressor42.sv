// Approximate 4-2 compressor with no cin and no cout. It replaces the exact
// compressor in the low columns of the multiplier, where a small error is
// cheap, and costs one XOR, one AND, two ORs and a 2:1 multiplexer:
//   carry = a1 | a2
//   sum   = (a1 ^ a2) ? (a3 & a4) : (a3 | a4)
// The value 2*carry + sum equals a1+a2+a3+a4 for 12 of the 16 input
// patterns. It is one too large when exactly one of a1/a2 is set and a3 = a4
// = 0, and one too small for 0011 and 1111 (a1 a2 a3 a4). The two inputs on
// the select side (a1, a2) therefore matter differently from a3, a4, and the
// multiplier chooses the order of the bits it connects to lower its error.
// The cell, its equations and its truth table are the source design's.
// Purely combinational.
module approx_compressor42 (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  output logic sum,
  output logic carry
);
  logic sel;
  assign sel   = a1 ^ a2;
  assign sum   = sel ? (a3 & a4) : (a3 | a4);
  assign carry = a1 | a2;
endmodule
