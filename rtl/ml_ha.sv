// ml_ha: exact one-bit half adder made of three majority gates.
//
// carry = M(a, b, 0)                 (a AND b)
// sum   = M(~carry, M(a, b, 1), 0)   ((a OR b) AND NOT (a AND b)) = a ^ b
// Used in the multiplier's partial-product reduction and inside the 6:3 compressor.
//
// Purely combinational.
module ml_ha (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  logic any;

  ml_gate u_carry (.a_in(a),      .b_in(b),   .c_in(1'b0), .ml_out(carry));
  ml_gate u_any   (.a_in(a),      .b_in(b),   .c_in(1'b1), .ml_out(any));
  ml_gate u_sum   (.a_in(~carry), .b_in(any), .c_in(1'b0), .ml_out(sum));
endmodule
