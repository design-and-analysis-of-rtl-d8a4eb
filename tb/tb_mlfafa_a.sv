// tb_mlfafa_a: exhaustive check (all 32 input patterns) of the approximate 2-bit
// adder against its gate equations, evaluated with a counting majority, and a
// report of its error against the exact sum a + b + cin (error rate, mean error
// distance, worst case).
module tb_mlfafa_a;
  logic a0, b0, a1, b1, cin, sum0, sum1, cout;
  int checks = 0, failures = 0;
  int errs = 0, ed_sum = 0, ed_max = 0;

  mlfafa_a dut (.a0, .b0, .a1, .b1, .cin, .sum0, .sum1, .cout);

  function automatic logic maj(input logic x, input logic y, input logic z);
    return (int'(x) + int'(y) + int'(z)) >= 2;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_cout, e_sum1, e_sum0;
    int exact, approx, ed;
    for (int v = 0; v < 32; v++) begin
      {a1, b1, a0, b0, cin} = 5'(v);
      #1;
      e_sum0 = cin;
      e_cout = maj(b0, a1, b1);
      e_sum1 = maj(a0 & b0, maj(!b0, a1, b1), !e_cout);
      checks++;
      if ({cout, sum1, sum0} !== {e_cout, e_sum1, e_sum0}) begin
        failures++;
        $display("FAIL a=%b%b b=%b%b cin=%b got %b%b%b want %b%b%b",
                 a1, a0, b1, b0, cin, cout, sum1, sum0, e_cout, e_sum1, e_sum0);
      end
      exact  = 2 * (int'(a1) + int'(b1)) + int'(a0) + int'(b0) + int'(cin);
      approx = 4 * int'(cout) + 2 * int'(sum1) + int'(sum0);
      ed = (exact > approx) ? exact - approx : approx - exact;
      if (ed != 0) errs++;
      ed_sum += ed;
      if (ed > ed_max) ed_max = ed;
    end
    $display("mlfafa_a: erroneous patterns %0d/32, mean error distance %0d/32, max %0d",
             errs, ed_sum, ed_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
