// 8x8 unsigned approximate Dadda multiplier built from 4-2 compressors.
//
// The 64 partial products pp[i][j] = b[i] & a[j] (weight 2^(i+j)) form a
// matrix whose column heights are 1,2,..,8,..,2,1. Two reduction stages bring
// every column down to height 4 and then to height 2, using half adders, full
// adders and 4-2 compressors, and a 16-bit adder adds the last two rows.
//
// Approximation (C-N configuration, N = 8): in the 8 least significant
// columns (weights 2^0..2^7) every 4-2 compressor is the approximate one
// (approx_compressor42, no cin/cout); in columns 8 and up the exact one
// (exact_compressor42) is used, with its cout feeding the cin of the
// compressor one column to the left in the same stage. An exact compressor
// that receives no cout takes a fifth bit of its column, or 0, as cin. Error
// is therefore confined to the low half of the product: over all 65536
// operand pairs the mean absolute error is 98.7 and the largest error 520.
//
// What follows the source design: the 8x8 unsigned Dadda structure, the use
// of half adders, full adders and 4-2 compressors, approximate compressors
// only in the 8 low columns, and choosing the order of the bits fed to each
// approximate compressor to reduce the error. This design's own choices: the
// placement of every cell (a greedy column-by-column Dadda schedule to
// heights 4 then 2) and the input order of each approximate compressor, which
// was chosen to minimise the mean absolute error.
//
// Interface: a, b unsigned operands; p the approximate product.
// Timing: purely combinational.
module approx_mult8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  // Partial products: pp[i][j] has weight 2^(i+j).
  logic [7:0] pp [8];
  always_comb begin
    for (int i = 0; i < 8; i++) pp[i] = a & {8{b[i]}};
  end

  logic [15:0] row0, row1;

  // Nets of the two reduction stages, named s<stage>_c<column>_<cell>_<output>
  // (_s sum, _c carry, _co cout).
  logic s0_c4_0_s, s0_c4_0_c, s0_c5_0_s, s0_c5_0_c, s0_c6_0_s, s0_c6_0_c;
  logic s0_c6_1_s, s0_c6_1_c, s0_c7_0_s, s0_c7_0_c, s0_c7_1_s, s0_c7_1_c;
  logic s0_c8_0_s, s0_c8_0_c, s0_c8_0_co, s0_c8_1_s, s0_c8_1_c, s0_c9_0_s;
  logic s0_c9_0_c, s0_c9_0_co, s0_c9_1_s, s0_c9_1_c, s0_c10_0_s, s0_c10_0_c;
  logic s0_c10_0_co, s0_c11_0_s, s0_c11_0_c, s1_c2_0_s, s1_c2_0_c, s1_c3_0_s;
  logic s1_c3_0_c, s1_c4_0_s, s1_c4_0_c, s1_c5_0_s, s1_c5_0_c, s1_c6_0_s;
  logic s1_c6_0_c, s1_c7_0_s, s1_c7_0_c, s1_c8_0_s, s1_c8_0_c, s1_c8_0_co;
  logic s1_c9_0_s, s1_c9_0_c, s1_c9_0_co, s1_c10_0_s, s1_c10_0_c, s1_c10_0_co;
  logic s1_c11_0_s, s1_c11_0_c, s1_c11_0_co, s1_c12_0_s, s1_c12_0_c, s1_c12_0_co;
  logic s1_c13_0_s, s1_c13_0_c;

  // Stage 1: column heights down to 4.
  half_adder u_s0_c4_0 (.a(pp[0][4]), .b(pp[1][3]), .sum(s0_c4_0_s), .carry(s0_c4_0_c));
  approx_compressor42 u_s0_c5_0 (.a1(pp[3][2]), .a2(pp[0][5]), .a3(pp[2][3]), .a4(pp[1][4]),
                     .sum(s0_c5_0_s), .carry(s0_c5_0_c));
  approx_compressor42 u_s0_c6_0 (.a1(pp[1][5]), .a2(pp[2][4]), .a3(pp[0][6]), .a4(pp[3][3]),
                     .sum(s0_c6_0_s), .carry(s0_c6_0_c));
  half_adder u_s0_c6_1 (.a(pp[4][2]), .b(pp[5][1]), .sum(s0_c6_1_s), .carry(s0_c6_1_c));
  approx_compressor42 u_s0_c7_0 (.a1(pp[0][7]), .a2(pp[3][4]), .a3(pp[1][6]), .a4(pp[2][5]),
                     .sum(s0_c7_0_s), .carry(s0_c7_0_c));
  approx_compressor42 u_s0_c7_1 (.a1(pp[4][3]), .a2(pp[6][1]), .a3(pp[5][2]), .a4(pp[7][0]),
                     .sum(s0_c7_1_s), .carry(s0_c7_1_c));
  exact_compressor42 u_s0_c8_0 (.y1(pp[1][7]), .y2(pp[2][6]), .y3(pp[3][5]), .y4(pp[4][4]), .cin(pp[5][3]),
                    .sum(s0_c8_0_s), .carry(s0_c8_0_c), .cout(s0_c8_0_co));
  half_adder u_s0_c8_1 (.a(pp[6][2]), .b(pp[7][1]), .sum(s0_c8_1_s), .carry(s0_c8_1_c));
  exact_compressor42 u_s0_c9_0 (.y1(pp[2][7]), .y2(pp[3][6]), .y3(pp[4][5]), .y4(pp[5][4]), .cin(s0_c8_0_co),
                    .sum(s0_c9_0_s), .carry(s0_c9_0_c), .cout(s0_c9_0_co));
  half_adder u_s0_c9_1 (.a(pp[6][3]), .b(pp[7][2]), .sum(s0_c9_1_s), .carry(s0_c9_1_c));
  exact_compressor42 u_s0_c10_0 (.y1(pp[3][7]), .y2(pp[4][6]), .y3(pp[5][5]), .y4(pp[6][4]), .cin(s0_c9_0_co),
                    .sum(s0_c10_0_s), .carry(s0_c10_0_c), .cout(s0_c10_0_co));
  full_adder u_s0_c11_0 (.a(s0_c10_0_co), .b(pp[4][7]), .cin(pp[5][6]), .sum(s0_c11_0_s), .carry(s0_c11_0_c));

  // Stage 2: column heights down to 2.
  half_adder u_s1_c2_0 (.a(pp[0][2]), .b(pp[1][1]), .sum(s1_c2_0_s), .carry(s1_c2_0_c));
  approx_compressor42 u_s1_c3_0 (.a1(pp[1][2]), .a2(pp[2][1]), .a3(pp[3][0]), .a4(pp[0][3]),
                     .sum(s1_c3_0_s), .carry(s1_c3_0_c));
  approx_compressor42 u_s1_c4_0 (.a1(pp[2][2]), .a2(pp[4][0]), .a3(s0_c4_0_s), .a4(pp[3][1]),
                     .sum(s1_c4_0_s), .carry(s1_c4_0_c));
  approx_compressor42 u_s1_c5_0 (.a1(s0_c4_0_c), .a2(pp[5][0]), .a3(s0_c5_0_s), .a4(pp[4][1]),
                     .sum(s1_c5_0_s), .carry(s1_c5_0_c));
  approx_compressor42 u_s1_c6_0 (.a1(s0_c6_0_s), .a2(pp[6][0]), .a3(s0_c5_0_c), .a4(s0_c6_1_s),
                     .sum(s1_c6_0_s), .carry(s1_c6_0_c));
  approx_compressor42 u_s1_c7_0 (.a1(s0_c6_1_c), .a2(s0_c7_0_s), .a3(s0_c6_0_c), .a4(s0_c7_1_s),
                     .sum(s1_c7_0_s), .carry(s1_c7_0_c));
  exact_compressor42 u_s1_c8_0 (.y1(s0_c7_0_c), .y2(s0_c7_1_c), .y3(s0_c8_0_s), .y4(s0_c8_1_s), .cin(1'b0),
                    .sum(s1_c8_0_s), .carry(s1_c8_0_c), .cout(s1_c8_0_co));
  exact_compressor42 u_s1_c9_0 (.y1(s0_c8_0_c), .y2(s0_c8_1_c), .y3(s0_c9_0_s), .y4(s0_c9_1_s), .cin(s1_c8_0_co),
                    .sum(s1_c9_0_s), .carry(s1_c9_0_c), .cout(s1_c9_0_co));
  exact_compressor42 u_s1_c10_0 (.y1(s0_c9_0_c), .y2(s0_c9_1_c), .y3(s0_c10_0_s), .y4(pp[7][3]), .cin(s1_c9_0_co),
                    .sum(s1_c10_0_s), .carry(s1_c10_0_c), .cout(s1_c10_0_co));
  exact_compressor42 u_s1_c11_0 (.y1(s0_c10_0_c), .y2(s0_c11_0_s), .y3(pp[6][5]), .y4(pp[7][4]), .cin(s1_c10_0_co),
                    .sum(s1_c11_0_s), .carry(s1_c11_0_c), .cout(s1_c11_0_co));
  exact_compressor42 u_s1_c12_0 (.y1(s0_c11_0_c), .y2(pp[5][7]), .y3(pp[6][6]), .y4(pp[7][5]), .cin(s1_c11_0_co),
                    .sum(s1_c12_0_s), .carry(s1_c12_0_c), .cout(s1_c12_0_co));
  full_adder u_s1_c13_0 (.a(s1_c12_0_co), .b(pp[6][7]), .cin(pp[7][6]), .sum(s1_c13_0_s), .carry(s1_c13_0_c));

  // The two rows left for the carry-propagate adder.
  assign row0 = {  // bits 15 down to 0
    1'b0, s1_c13_0_c, s1_c12_0_c, s1_c11_0_c, s1_c10_0_c, s1_c9_0_c,
    s1_c8_0_c, s1_c7_0_c, s1_c6_0_c, s1_c5_0_c, s1_c4_0_c, s1_c3_0_c,
    s1_c2_0_c, s1_c2_0_s, pp[0][1], pp[0][0]
  };
  assign row1 = {  // bits 15 down to 0
    1'b0, pp[7][7], s1_c13_0_s, s1_c12_0_s, s1_c11_0_s, s1_c10_0_s,
    s1_c9_0_s, s1_c8_0_s, s1_c7_0_s, s1_c6_0_s, s1_c5_0_s, s1_c4_0_s,
    s1_c3_0_s, pp[2][0], pp[1][0], 1'b0
  };

  // Final carry-propagate addition.
  assign p = row0 + row1;
endmodule
