// mlfafa_2: approximate adder cell "MLFAFA-2": four majority gates, two inverters,
// five operand inputs and five outputs (cout and four sum bits, two of which are
// the same net).
//
//   cout = M(a3, b3, b2)             b2 stands in for the carry into bit 3
//   t    = M(a3, b3, ~b2)
//   sum3 = M(~cout, b2, t)           = a3 ^ b3 ^ b2, exact for that carry
//   sum0 = t
//   sum1 = sum2 = M(~b2, a1, a2)
// The gate wiring is that of the published schematic of the cell. That schematic
// does not settle the bit numbers of its port labels, so the input names (b2, a2,
// a3, b3, a1 from top to bottom) and the assignment of the four sum ports are this
// design's reading of the drawing: the letters a/b follow the labels, the bit numbers are
// chosen so that the fully exact part (cout, sum3) sits at the top of a 4-bit
// word. The input bits that the drawing does not show (a0, b0, b1, cin) are not
// ports.
//
// Purely combinational; the critical path is three majority gates (cout -> sum3).
module mlfafa_2 (
  input  logic b2,
  input  logic a2,
  input  logic a3,
  input  logic b3,
  input  logic a1,
  output logic cout,
  output logic sum0,
  output logic sum1,
  output logic sum2,
  output logic sum3
);
  logic t, low;

  ml_gate ML_GATE_0 (.a_in(a3),    .b_in(b3), .c_in(b2),  .ml_out(cout));
  ml_gate ML_GATE_1 (.a_in(a3),    .b_in(b3), .c_in(~b2), .ml_out(t));
  ml_gate ML_GATE_2 (.a_in(~b2),   .b_in(a1), .c_in(a2),  .ml_out(low));
  ml_gate ML_GATE_3 (.a_in(~cout), .b_in(b2), .c_in(t),   .ml_out(sum3));

  always_comb begin
    sum0 = t;
    sum1 = low;
    sum2 = low;
  end
endmodule
