// ml_fa: exact one-bit full adder made of three majority gates and two inverters.
//
// carry = M(a, b, c)
// sum   = M(~carry, c, M(a, b, ~c))
// The second form is the standard majority-logic identity for a ^ b ^ c; the same
// pattern (carry gate, inner gate with an inverted carry-in, outer gate with the
// inverted carry) is the one the approximate 2-bit adders use for their upper bit.
// Used inside the multiplier's partial-product reduction and its final adder.
//
// Purely combinational.
module ml_fa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic inner;

  ml_gate u_carry (.a_in(a),      .b_in(b),     .c_in(c),      .ml_out(carry));
  ml_gate u_inner (.a_in(a),      .b_in(b),     .c_in(~c),     .ml_out(inner));
  ml_gate u_sum   (.a_in(~carry), .b_in(inner), .c_in(c),      .ml_out(sum));
endmodule
