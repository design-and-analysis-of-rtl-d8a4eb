// mlam_8x8: 8x8 unsigned approximate multiplier in majority logic,
// product_out ~= a_in * b_in.
//
// Three parts, all combinational:
//   1. 64 partial products pp[i][j] = a_in[j] & b_in[i], each one majority gate
//      with its third input tied to 0.
//   2. mlam_ppr reduces them, Wallace-style, with approximate 6:3 compressors in the
//      tall middle columns and exact ML full and half adders elsewhere, to two rows.
//   3. ml_rca, an exact 16-bit ripple-carry adder of ML full adders, adds the rows.
// All error comes from the compressors, each of which can undercount its six
// inputs by one, so product_out never exceeds the exact product and the error is
// a sum of powers of two between 2^5 and 2^9.
// The operand and result names follow the published simulation of the multiplier;
// the final adder's type is this design's choice.
//
// No clock, no reset: the product is valid one combinational delay after the inputs.
// An immediate assertion checks that the final adder never carries out of bit 15.
module mlam_8x8 (
  input  logic [7:0]  a_in,
  input  logic [7:0]  b_in,
  output logic [15:0] product_out
);
  logic [7:0][7:0] pp;
  logic [15:0]     row0, row1;
  logic            cpa_cout;

  for (genvar i = 0; i < 8; i++) begin : g_row
    for (genvar j = 0; j < 8; j++) begin : g_col
      ml_gate u_and (.a_in(a_in[j]), .b_in(b_in[i]), .c_in(1'b0), .ml_out(pp[i][j]));
    end
  end

  mlam_ppr u_ppr (.pp(pp), .row0(row0), .row1(row1));

  ml_rca #(.WIDTH(16)) u_cpa (.a(row0), .b(row1), .s(product_out), .cout(cpa_cout));

  // The reduction only ever undercounts, so the two rows never sum past
  // 255 * 255 and the final adder can never carry out of bit 15.
  always_comb assert (!cpa_cout) else $error("final adder carried out of bit 15");
endmodule
