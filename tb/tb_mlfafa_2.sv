// tb_mlfafa_2: exhaustive check (all 32 input patterns) of the MLFAFA-2 adder cell
// against its gate equations, evaluated with a counting majority; also checks that
// {cout, sum3} is the exact two-bit sum a3 + b3 + b2.
module tb_mlfafa_2;
  logic b2, a2, a3, b3, a1, cout, sum0, sum1, sum2, sum3;
  int checks = 0, failures = 0;

  mlfafa_2 dut (.b2, .a2, .a3, .b3, .a1, .cout, .sum0, .sum1, .sum2, .sum3);

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
    logic [4:0] want;
    int top;
    for (int v = 0; v < 32; v++) begin
      {b2, a2, a3, b3, a1} = 5'(v);
      #1;
      want[4] = maj(a3, b3, b2);
      want[0] = maj(a3, b3, !b2);
      want[1] = maj(!b2, a1, a2);
      want[2] = want[1];
      want[3] = maj(!want[4], b2, want[0]);
      checks++;
      if ({cout, sum3, sum2, sum1, sum0} !== want) begin
        failures++;
        $display("FAIL in=%05b got %b%b%b%b%b want %b", 5'(v), cout, sum3, sum2, sum1, sum0, want);
      end
      top = int'(a3) + int'(b3) + int'(b2);
      checks++;
      if (2 * int'(cout) + int'(sum3) != top) begin
        failures++;
        $display("FAIL top bit in=%05b cout,sum3=%b%b want %0d", 5'(v), cout, sum3, top);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
