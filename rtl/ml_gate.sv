// ml_gate: three-input majority (ML) gate, the single logic primitive every other
// module here is built from.
//
// ml_out is 1 when at least two of a_in, b_in, c_in are 1. It is written as the
// sum of products of the three input pairs, (a&b) | (b&c) | (a&c): three two-input
// ANDs feeding two two-input ORs, as in the gate-level view of the cell. Tying one
// input to 0 gives a two-input AND, tying it to 1 a two-input OR.
//
// Purely combinational, no clock, no reset.
module ml_gate (
  input  logic a_in,
  input  logic b_in,
  input  logic c_in,
  output logic ml_out
);
  always_comb ml_out = (a_in & b_in) | (b_in & c_in) | (a_in & c_in);
endmodule
