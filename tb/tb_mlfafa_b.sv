// tb_mlfafa_b: exhaustive check (all 32 input patterns) of the approximate 2-bit
// adder against its gate equations, evaluated with a counting majority. Also
// reports the error against a + b + cin under both readings of the two sum ports
// (as named, and with sum0/sum1 swapped).
module tb_mlfafa_b;
  logic a0, b0, a1, b1, cin, sum0, sum1, cout;
  int checks = 0, failures = 0;
  int errs_named = 0, ed_named = 0, errs_swapped = 0, ed_swapped = 0;

  mlfafa_b dut (.a1, .b1, .cin, .a0, .b0, .cout, .sum0, .sum1);

  function automatic logic maj(input logic x, input logic y, input logic z);
    return (int'(x) + int'(y) + int'(z)) >= 2;
  endfunction

  function automatic int abs_diff(input int x, input int y);
    return (x > y) ? x - y : y - x;
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
    int exact, ed;
    for (int v = 0; v < 32; v++) begin
      {a1, b1, a0, b0, cin} = 5'(v);
      #1;
      e_cout = maj(a1, b1, cin);
      e_sum0 = maj(a1, b1, !e_cout);
      e_sum1 = maj(a0, b0, !e_cout);
      checks++;
      if ({cout, sum1, sum0} !== {e_cout, e_sum1, e_sum0}) begin
        failures++;
        $display("FAIL a=%b%b b=%b%b cin=%b got %b%b%b want %b%b%b",
                 a1, a0, b1, b0, cin, cout, sum1, sum0, e_cout, e_sum1, e_sum0);
      end
      exact = 2 * (int'(a1) + int'(b1)) + int'(a0) + int'(b0) + int'(cin);
      ed = abs_diff(exact, 4 * int'(cout) + 2 * int'(sum1) + int'(sum0));
      if (ed != 0) errs_named++;
      ed_named += ed;
      ed = abs_diff(exact, 4 * int'(cout) + 2 * int'(sum0) + int'(sum1));
      if (ed != 0) errs_swapped++;
      ed_swapped += ed;
    end
    $display("mlfafa_b as named: erroneous %0d/32, mean error distance %0d/32", errs_named, ed_named);
    $display("mlfafa_b swapped : erroneous %0d/32, mean error distance %0d/32", errs_swapped, ed_swapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
