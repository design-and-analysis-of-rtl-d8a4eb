// approx_compressor_6_3: approximate parallel 6:3 compressor in majority logic.
//
// Takes six bits of one partial-product column (all of weight 1) and returns a
// 3-bit count y = y[0] + 2*y[1] + 4*y[2] of weights 1, 2 and 4. Two exact ML full
// adders count x[2:0] and x[5:3] in parallel into (s1, c1) and (s2, c2). The
// exact result would be s1 + s2 + 2*(c1 + c2). The approximation:
//   y[0] = M(s1, s2, 1)     s1 OR s2: the carry of s1 + s2 is dropped
//   y[1] = c1 ^ c2          ML half adder
//   y[2] = c1 & c2          carry of that half adder
// The weight-2 and weight-4 part is exact; the only error is -1 when s1 = s2 = 1,
// i.e. when both input triples hold an odd number of ones. That happens for 16 of
// the 64 input patterns. Because the two halves work side by side and never feed
// each other, the compressor is three majority gates deep to y[0] and six to y[2].
// Which approximation the compressor uses is this design's choice; only its role
// (six partial products in, three bits out, part of a Wallace-style reduction) is
// given for the proposed multiplier.
//
// Purely combinational. 11 majority gates.
module approx_compressor_6_3 (
  input  logic [5:0] x,
  output logic [2:0] y
);
  logic s1, c1, s2, c2;

  ml_fa   u_fa_lo (.a(x[0]), .b(x[1]), .c(x[2]), .sum(s1), .carry(c1));
  ml_fa   u_fa_hi (.a(x[3]), .b(x[4]), .c(x[5]), .sum(s2), .carry(c2));
  ml_gate u_or    (.a_in(s1), .b_in(s2), .c_in(1'b1), .ml_out(y[0]));
  ml_ha   u_ha    (.a(c1), .b(c2), .sum(y[1]), .carry(y[2]));
endmodule
