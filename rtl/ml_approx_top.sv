// ml_approx_top: the majority-logic approximate arithmetic set, side by side.
//
// The three approximate adder cells and the approximate 8x8 multiplier are
// independent circuits; this top only gives each its own ports, prefixed by the
// cell's name. There is no shared logic, clock or reset, and every output is a
// combinational function of that cell's inputs only.
//   fa_*   mlfafa_a   2-bit adder, sum0 = cin, carry into bit 1 approximated by b0
//   fb_*   mlfafa_b   2-bit adder, carry into bit 1 approximated by cin
//   f2_*   mlfafa_2   adder cell whose top bit is exact for an approximated carry
//   mul_*  mlam_8x8   8x8 multiplier with approximate 6:3 compressors
// The packing of the adders' single-bit ports into vectors is this design's choice:
// for the adders bit k of *_a / *_b is operand bit k, bit k of *_sum is sum bit k.
module ml_approx_top (
  // mlfafa_a
  input  logic [1:0]  fa_a,
  input  logic [1:0]  fa_b,
  input  logic        fa_cin,
  output logic [1:0]  fa_sum,
  output logic        fa_cout,
  // mlfafa_b
  input  logic [1:0]  fb_a,
  input  logic [1:0]  fb_b,
  input  logic        fb_cin,
  output logic [1:0]  fb_sum,
  output logic        fb_cout,
  // mlfafa_2 (only the operand bits the cell uses)
  input  logic        f2_a1,
  input  logic [3:2]  f2_a,
  input  logic [3:2]  f2_b,
  output logic [3:0]  f2_sum,
  output logic        f2_cout,
  // mlam_8x8
  input  logic [7:0]  mul_a,
  input  logic [7:0]  mul_b,
  output logic [15:0] mul_p
);
  mlfafa_a u_fa (
    .a0(fa_a[0]), .b0(fa_b[0]), .a1(fa_a[1]), .b1(fa_b[1]), .cin(fa_cin),
    .sum0(fa_sum[0]), .sum1(fa_sum[1]), .cout(fa_cout)
  );

  mlfafa_b u_fb (
    .a1(fb_a[1]), .b1(fb_b[1]), .cin(fb_cin), .a0(fb_a[0]), .b0(fb_b[0]),
    .cout(fb_cout), .sum0(fb_sum[0]), .sum1(fb_sum[1])
  );

  mlfafa_2 u_f2 (
    .b2(f2_b[2]), .a2(f2_a[2]), .a3(f2_a[3]), .b3(f2_b[3]), .a1(f2_a1),
    .cout(f2_cout), .sum0(f2_sum[0]), .sum1(f2_sum[1]), .sum2(f2_sum[2]), .sum3(f2_sum[3])
  );

  mlam_8x8 u_mul (.a_in(mul_a), .b_in(mul_b), .product_out(mul_p));
endmodule
