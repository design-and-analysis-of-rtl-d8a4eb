// tb_ml_approx_top: end-to-end test of the whole set at its only size. Drives all
// four cells of the top at once: every input pattern of the three adder cells
// (32 each, cycled) together with every one of the 65536 operand pairs of the
// multiplier. Each output is compared with an independent model: counting-majority
// gate equations for the adders, the reduction-rule model for the multiplier.
// Counts how often each approximation mechanism actually fired and fails if one
// never did: MLFAFA-a and MLFAFA-b off the exact sum, MLFAFA-2's approximated
// carry differing from the real one, the multiplier undercounting, and the
// multiplier being exact.
module tb_ml_approx_top;
  import mlam_model_pkg::*;

  logic [1:0]  fa_a, fa_b, fa_sum, fb_a, fb_b, fb_sum;
  logic        fa_cin, fa_cout, fb_cin, fb_cout;
  logic        f2_a1, f2_cout;
  logic [3:2]  f2_a, f2_b;
  logic [3:0]  f2_sum;
  logic [7:0]  mul_a, mul_b;
  logic [15:0] mul_p;
  int checks = 0, failures = 0;
  int n_fa_err = 0, n_fb_err = 0, n_f2_err = 0, n_mul_under = 0, n_mul_exact = 0;

  ml_approx_top dut (.*);

  function automatic logic maj(input logic x, input logic y, input logic z);
    return (int'(x) + int'(y) + int'(z)) >= 2;
  endfunction

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL %s", what);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] want3;
    logic [4:0] want5;
    int exact;
    int unsigned pexact, pwant;
    for (int n = 0; n < 65536; n++) begin
      {fa_a, fa_b, fa_cin} = 5'(n);
      {fb_a, fb_b, fb_cin} = 5'(n >> 5);
      {f2_b[2], f2_a[2], f2_a[3], f2_b[3], f2_a1} = 5'(n >> 10);
      {mul_a, mul_b} = 16'(n);
      #1;
      // MLFAFA-a
      want3[2] = maj(fa_b[0], fa_a[1], fa_b[1]);
      want3[1] = maj(fa_a[0] & fa_b[0], maj(!fa_b[0], fa_a[1], fa_b[1]), !want3[2]);
      want3[0] = fa_cin;
      checks++;
      if ({fa_cout, fa_sum} !== want3) fail($sformatf("mlfafa_a in=%05b", 5'(n)));
      exact = int'(fa_a) + int'(fa_b) + int'(fa_cin);
      if (int'({fa_cout, fa_sum}) != exact) n_fa_err++;
      // MLFAFA-b
      want3[2] = maj(fb_a[1], fb_b[1], fb_cin);
      want3[0] = maj(fb_a[1], fb_b[1], !want3[2]);
      want3[1] = maj(fb_a[0], fb_b[0], !want3[2]);
      checks++;
      if ({fb_cout, fb_sum} !== want3) fail($sformatf("mlfafa_b in=%05b", 5'(n >> 5)));
      exact = int'(fb_a) + int'(fb_b) + int'(fb_cin);
      if (int'({fb_cout, fb_sum}) != exact) n_fb_err++;
      // MLFAFA-2
      want5[4] = maj(f2_a[3], f2_b[3], f2_b[2]);
      want5[0] = maj(f2_a[3], f2_b[3], !f2_b[2]);
      want5[1] = maj(!f2_b[2], f2_a1, f2_a[2]);
      want5[2] = want5[1];
      want5[3] = maj(!want5[4], f2_b[2], want5[0]);
      checks++;
      if ({f2_cout, f2_sum} !== want5) fail($sformatf("mlfafa_2 in=%05b", 5'(n >> 10)));
      // real carry into bit 3 from bit 2 alone (lower bits taken as 0): a2 & b2
      if (f2_b[2] != (f2_a[2] & f2_b[2])) n_f2_err++;
      // multiplier
      pwant  = approx_product(mul_a, mul_b);
      pexact = 32'(mul_a) * 32'(mul_b);
      checks++;
      if (32'(mul_p) != pwant || 32'(mul_p) > pexact)
        fail($sformatf("mlam_8x8 %0d*%0d = %0d, model %0d", mul_a, mul_b, mul_p, pwant));
      if (32'(mul_p) < pexact) n_mul_under++;
      else n_mul_exact++;
    end
    $display("mechanisms: mlfafa_a errors %0d, mlfafa_b errors %0d, mlfafa_2 carry guesses off %0d, multiplier undercounts %0d, exact products %0d",
             n_fa_err, n_fb_err, n_f2_err, n_mul_under, n_mul_exact);
    checks++;
    if (n_fa_err == 0)    fail("mlfafa_a approximation never observed");
    checks++;
    if (n_fb_err == 0)    fail("mlfafa_b approximation never observed");
    checks++;
    if (n_f2_err == 0)    fail("mlfafa_2 carry approximation never observed");
    checks++;
    if (n_mul_under == 0) fail("multiplier compressor error never observed");
    checks++;
    if (n_mul_exact == 0) fail("multiplier exact product never observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
