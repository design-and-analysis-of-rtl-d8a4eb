// mlam_ppr: partial-product reduction (PPR) of the 8x8 approximate multiplier.
//
// Input pp[i][j] is the partial product a[j] & b[i], of weight 2^(i+j). The tree
// reduces the 15 columns (heights 1,2,...,8,...,2,1) to two 16-bit rows whose sum
// is the approximate product. It is Wallace-style: every stage works on all
// columns at once. Within a stage, each column, taken from the least significant
// up, is cut into successive groups of six bits, each reduced by an approximate
// 6:3 compressor (outputs of weight 2^c, 2^(c+1), 2^(c+2)); what remains is cut
// into groups of three for exact ML full adders; two bits left over from a column
// that held more than two go through an exact ML half adder; anything else passes
// on. A column's bits are taken in the order they were produced in the stage
// before (for the first stage: pp[0][c], pp[1][c-1], ...). Stages repeat until no
// column holds more than two bits: six stages, 5 compressors, 25 full adders and
// 5 half adders. The compressors all sit in the first stage, on columns 5 to 9,
// where the tree is tallest; they are the only source of error.
// Columns that end with a single bit leave row1 at 0 there (bits 0, 2, 3, 7 and
// 12 to 15), and the three lowest partial products reach the rows unchanged; the
// rows are kept a full 16 bits wide so the final adder stays regular.
// The use of 6:3 compressors in a Wallace-style reduction follows the proposed
// multiplier; the grouping rule and the full and half adders for the rest are this
// design's choices.
//
// Purely combinational.
module mlam_ppr (
  input  logic [7:0][7:0] pp,
  output logic [15:0]     row0,
  output logic [15:0]     row1
);
  logic s1_f0_s, s1_f0_c;
  ml_fa u_s1_f0 (.a(pp[0][2]), .b(pp[1][1]), .c(pp[2][0]), .sum(s1_f0_s), .carry(s1_f0_c));
  logic s1_f1_s, s1_f1_c;
  ml_fa u_s1_f1 (.a(pp[0][3]), .b(pp[1][2]), .c(pp[2][1]), .sum(s1_f1_s), .carry(s1_f1_c));
  logic s1_f2_s, s1_f2_c;
  ml_fa u_s1_f2 (.a(pp[0][4]), .b(pp[1][3]), .c(pp[2][2]), .sum(s1_f2_s), .carry(s1_f2_c));
  logic s1_h0_s, s1_h0_c;
  ml_ha u_s1_h0 (.a(pp[3][1]), .b(pp[4][0]), .sum(s1_h0_s), .carry(s1_h0_c));
  logic [2:0] s1_c0;
  approx_compressor_6_3 u_s1_c0 (.x({pp[5][0], pp[4][1], pp[3][2], pp[2][3], pp[1][4], pp[0][5]}), .y(s1_c0));
  logic [2:0] s1_c1;
  approx_compressor_6_3 u_s1_c1 (.x({pp[5][1], pp[4][2], pp[3][3], pp[2][4], pp[1][5], pp[0][6]}), .y(s1_c1));
  logic [2:0] s1_c2;
  approx_compressor_6_3 u_s1_c2 (.x({pp[5][2], pp[4][3], pp[3][4], pp[2][5], pp[1][6], pp[0][7]}), .y(s1_c2));
  logic s1_h1_s, s1_h1_c;
  ml_ha u_s1_h1 (.a(pp[6][1]), .b(pp[7][0]), .sum(s1_h1_s), .carry(s1_h1_c));
  logic [2:0] s1_c3;
  approx_compressor_6_3 u_s1_c3 (.x({pp[6][2], pp[5][3], pp[4][4], pp[3][5], pp[2][6], pp[1][7]}), .y(s1_c3));
  logic [2:0] s1_c4;
  approx_compressor_6_3 u_s1_c4 (.x({pp[7][2], pp[6][3], pp[5][4], pp[4][5], pp[3][6], pp[2][7]}), .y(s1_c4));
  logic s1_f3_s, s1_f3_c;
  ml_fa u_s1_f3 (.a(pp[3][7]), .b(pp[4][6]), .c(pp[5][5]), .sum(s1_f3_s), .carry(s1_f3_c));
  logic s1_h2_s, s1_h2_c;
  ml_ha u_s1_h2 (.a(pp[6][4]), .b(pp[7][3]), .sum(s1_h2_s), .carry(s1_h2_c));
  logic s1_f4_s, s1_f4_c;
  ml_fa u_s1_f4 (.a(pp[4][7]), .b(pp[5][6]), .c(pp[6][5]), .sum(s1_f4_s), .carry(s1_f4_c));
  logic s1_f5_s, s1_f5_c;
  ml_fa u_s1_f5 (.a(pp[5][7]), .b(pp[6][6]), .c(pp[7][5]), .sum(s1_f5_s), .carry(s1_f5_c));
  // after stage 1: column heights [1, 2, 1, 3, 3, 3, 3, 4, 5, 3, 4, 5, 2, 3, 1, 0]
  logic s2_f6_s, s2_f6_c;
  ml_fa u_s2_f6 (.a(s1_f0_c), .b(s1_f1_s), .c(pp[3][0]), .sum(s2_f6_s), .carry(s2_f6_c));
  logic s2_f7_s, s2_f7_c;
  ml_fa u_s2_f7 (.a(s1_f1_c), .b(s1_f2_s), .c(s1_h0_s), .sum(s2_f7_s), .carry(s2_f7_c));
  logic s2_f8_s, s2_f8_c;
  ml_fa u_s2_f8 (.a(s1_f2_c), .b(s1_h0_c), .c(s1_c0[0]), .sum(s2_f8_s), .carry(s2_f8_c));
  logic s2_f9_s, s2_f9_c;
  ml_fa u_s2_f9 (.a(s1_c0[1]), .b(s1_c1[0]), .c(pp[6][0]), .sum(s2_f9_s), .carry(s2_f9_c));
  logic s2_f10_s, s2_f10_c;
  ml_fa u_s2_f10 (.a(s1_c0[2]), .b(s1_c1[1]), .c(s1_c2[0]), .sum(s2_f10_s), .carry(s2_f10_c));
  logic s2_f11_s, s2_f11_c;
  ml_fa u_s2_f11 (.a(s1_c1[2]), .b(s1_c2[1]), .c(s1_h1_c), .sum(s2_f11_s), .carry(s2_f11_c));
  logic s2_h3_s, s2_h3_c;
  ml_ha u_s2_h3 (.a(s1_c3[0]), .b(pp[7][1]), .sum(s2_h3_s), .carry(s2_h3_c));
  logic s2_f12_s, s2_f12_c;
  ml_fa u_s2_f12 (.a(s1_c2[2]), .b(s1_c3[1]), .c(s1_c4[0]), .sum(s2_f12_s), .carry(s2_f12_c));
  logic s2_f13_s, s2_f13_c;
  ml_fa u_s2_f13 (.a(s1_c3[2]), .b(s1_c4[1]), .c(s1_f3_s), .sum(s2_f13_s), .carry(s2_f13_c));
  logic s2_f14_s, s2_f14_c;
  ml_fa u_s2_f14 (.a(s1_c4[2]), .b(s1_f3_c), .c(s1_h2_c), .sum(s2_f14_s), .carry(s2_f14_c));
  logic s2_h4_s, s2_h4_c;
  ml_ha u_s2_h4 (.a(s1_f4_s), .b(pp[7][4]), .sum(s2_h4_s), .carry(s2_h4_c));
  logic s2_f15_s, s2_f15_c;
  ml_fa u_s2_f15 (.a(s1_f5_c), .b(pp[6][7]), .c(pp[7][6]), .sum(s2_f15_s), .carry(s2_f15_c));
  // after stage 2: column heights [1, 2, 1, 1, 2, 2, 2, 3, 3, 3, 3, 3, 4, 1, 2, 0]
  logic s3_f16_s, s3_f16_c;
  ml_fa u_s3_f16 (.a(s2_f9_c), .b(s2_f10_s), .c(s1_h1_s), .sum(s3_f16_s), .carry(s3_f16_c));
  logic s3_f17_s, s3_f17_c;
  ml_fa u_s3_f17 (.a(s2_f10_c), .b(s2_f11_s), .c(s2_h3_s), .sum(s3_f17_s), .carry(s3_f17_c));
  logic s3_f18_s, s3_f18_c;
  ml_fa u_s3_f18 (.a(s2_f11_c), .b(s2_h3_c), .c(s2_f12_s), .sum(s3_f18_s), .carry(s3_f18_c));
  logic s3_f19_s, s3_f19_c;
  ml_fa u_s3_f19 (.a(s2_f12_c), .b(s2_f13_s), .c(s1_h2_s), .sum(s3_f19_s), .carry(s3_f19_c));
  logic s3_f20_s, s3_f20_c;
  ml_fa u_s3_f20 (.a(s2_f13_c), .b(s2_f14_s), .c(s2_h4_s), .sum(s3_f20_s), .carry(s3_f20_c));
  logic s3_f21_s, s3_f21_c;
  ml_fa u_s3_f21 (.a(s2_f14_c), .b(s2_h4_c), .c(s1_f4_c), .sum(s3_f21_s), .carry(s3_f21_c));
  // after stage 3: column heights [1, 2, 1, 1, 2, 2, 2, 1, 2, 2, 2, 2, 3, 2, 2, 0]
  logic s4_f22_s, s4_f22_c;
  ml_fa u_s4_f22 (.a(s3_f20_c), .b(s3_f21_s), .c(s1_f5_s), .sum(s4_f22_s), .carry(s4_f22_c));
  // after stage 4: column heights [1, 2, 1, 1, 2, 2, 2, 1, 2, 2, 2, 2, 1, 3, 2, 0]
  logic s5_f23_s, s5_f23_c;
  ml_fa u_s5_f23 (.a(s4_f22_c), .b(s3_f21_c), .c(s2_f15_s), .sum(s5_f23_s), .carry(s5_f23_c));
  // after stage 5: column heights [1, 2, 1, 1, 2, 2, 2, 1, 2, 2, 2, 2, 1, 1, 3, 0]
  logic s6_f24_s, s6_f24_c;
  ml_fa u_s6_f24 (.a(s5_f23_c), .b(s2_f15_c), .c(pp[7][7]), .sum(s6_f24_s), .carry(s6_f24_c));
  // after stage 6: column heights [1, 2, 1, 1, 2, 2, 2, 1, 2, 2, 2, 2, 1, 1, 1, 1]
  assign row0[0] = pp[0][0];  assign row1[0] = 1'b0;
  assign row0[1] = pp[0][1];  assign row1[1] = pp[1][0];
  assign row0[2] = s1_f0_s;  assign row1[2] = 1'b0;
  assign row0[3] = s2_f6_s;  assign row1[3] = 1'b0;
  assign row0[4] = s2_f6_c;  assign row1[4] = s2_f7_s;
  assign row0[5] = s2_f7_c;  assign row1[5] = s2_f8_s;
  assign row0[6] = s2_f8_c;  assign row1[6] = s2_f9_s;
  assign row0[7] = s3_f16_s;  assign row1[7] = 1'b0;
  assign row0[8] = s3_f16_c;  assign row1[8] = s3_f17_s;
  assign row0[9] = s3_f17_c;  assign row1[9] = s3_f18_s;
  assign row0[10] = s3_f18_c;  assign row1[10] = s3_f19_s;
  assign row0[11] = s3_f19_c;  assign row1[11] = s3_f20_s;
  assign row0[12] = s4_f22_s;  assign row1[12] = 1'b0;
  assign row0[13] = s5_f23_s;  assign row1[13] = 1'b0;
  assign row0[14] = s6_f24_s;  assign row1[14] = 1'b0;
  assign row0[15] = s6_f24_c;  assign row1[15] = 1'b0;
endmodule
