// tb_ml_gate: exhaustive check of the three-input majority gate against a count of
// the ones among its inputs (output 1 when two or more are 1).
module tb_ml_gate;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  ml_gate dut (.a_in(a), .b_in(b), .c_in(c), .ml_out(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b ml_out=%b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
