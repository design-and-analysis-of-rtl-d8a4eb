// ml_rca: exact WIDTH-bit ripple-carry adder of ML full adders, s = a + b mod 2^WIDTH.
//
// The carry-propagate adder that turns the two rows left by the multiplier's
// partial-product reduction into the product. Carry-in is 0; the carry out of the
// top bit comes out on cout (the multiplier only asserts that it stays 0: an 8x8
// product always fits in 16 bits).
//
// Purely combinational; the critical path is WIDTH full-adder carry gates.
module ml_rca #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = 1'b0;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ml_fa u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .sum(s[i]), .carry(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule
