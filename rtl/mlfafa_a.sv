// mlfafa_a: approximate 2-bit adder "MLFAFA-a" built from four majority gates and
// two inverters. Adds a1a0 + b1b0 + cin into cout,sum1,sum0.
//
// The low bit does no arithmetic at all: sum0 is cin, passed straight through.
// The carry into bit 1 is never formed exactly. Instead:
//   g0   = M(0, a0, b0)              a0 AND b0, the generate of bit 0
//   cout = M(b0, a1, b1)             b0 stands in for the carry into bit 1
//   g2   = M(~b0, a1, b1)
//   sum1 = M(g0, g2, ~cout)
// so no inaccurate carry is rippled on; errors stay local to this 2-bit slice.
// The gate-to-gate wiring is that of the published schematic of the cell (the
// same netlist is shown for the variant called MLFAFA-1). The schematic does not
// settle which of the two low operand inputs is a0 and which is b0; this design
// takes the second one, which feeds the inverter and the carry gate, as b0.
// sum0 is a plain wire from cin, so synthesis reports it as an input feedthrough.
//
// Purely combinational; the critical path is three majority gates (g0/cout -> sum1).
module mlfafa_a (
  input  logic a0,
  input  logic b0,
  input  logic a1,
  input  logic b1,
  input  logic cin,
  output logic sum0,
  output logic sum1,
  output logic cout
);
  logic g0, g2;

  ml_gate ML_GATE_0 (.a_in(1'b0), .b_in(a0),  .c_in(b0),    .ml_out(g0));
  ml_gate ML_GATE_1 (.a_in(b0),   .b_in(b1),  .c_in(a1),    .ml_out(cout));
  ml_gate ML_GATE_2 (.a_in(~b0),  .b_in(b1),  .c_in(a1),    .ml_out(g2));
  ml_gate ML_GATE_3 (.a_in(g0),   .b_in(g2),  .c_in(~cout), .ml_out(sum1));

  always_comb sum0 = cin;
endmodule
