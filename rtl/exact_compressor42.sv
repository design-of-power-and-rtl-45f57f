// Exact 4-2 compressor, the conventional cell of fast multiplier reduction
// trees (two cascaded full adders). It adds five bits of one column, y1..y4
// and cin, and returns their count as sum (weight 1) plus carry and cout
// (both weight 2):  y1+y2+y3+y4+cin = sum + 2*(carry + cout).
//   sum   = y1 ^ y2 ^ y3 ^ y4 ^ cin
//   cout  = (y1^y2) ? y3 : y1            (does not depend on cin)
//   carry = (y1^y2^y3^y4) ? cin : y4
// cout goes to the cin of the compressor in the next column of the same
// stage; carry goes to the next column of the next stage. The cell and these
// equations are those of the source design. Purely combinational.
module exact_compressor42 (
  input  logic y1,
  input  logic y2,
  input  logic y3,
  input  logic y4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic x12, x1234;
  assign x12   = y1 ^ y2;
  assign x1234 = x12 ^ y3 ^ y4;
  assign sum   = x1234 ^ cin;
  assign cout  = x12 ? y3 : y1;
  assign carry = x1234 ? cin : y4;
endmodule
