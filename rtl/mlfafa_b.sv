// mlfafa_b: approximate 2-bit adder "MLFAFA-b" built from three majority gates and
// one inverter. Inputs a1, b1, cin, a0, b0; outputs cout, sum0, sum1.
//
//   cout = M(a1, b1, cin)            cin stands in for the carry into bit 1
//   sum0 = M(a1, b1, ~cout)
//   sum1 = M(a0, b0, ~cout)
// Every output is one majority gate deep after cout, so the critical path is two
// gates. The output names are the ones printed on the published schematic of the
// cell: the gate on the upper operand pair drives the port named sum0 and the gate
// on the lower pair drives sum1. This design keeps that naming as printed; a user
// who reads sum1 as the upper bit should swap the two ports at the instance.
//
// Purely combinational.
module mlfafa_b (
  input  logic a1,
  input  logic b1,
  input  logic cin,
  input  logic a0,
  input  logic b0,
  output logic cout,
  output logic sum0,
  output logic sum1
);
  ml_gate ML_GATE_0 (.a_in(a1), .b_in(b1), .c_in(cin),   .ml_out(cout));
  ml_gate ML_GATE_1 (.a_in(a1), .b_in(b1), .c_in(~cout), .ml_out(sum0));
  ml_gate ML_GATE_2 (.a_in(a0), .b_in(b0), .c_in(~cout), .ml_out(sum1));
endmodule
