// tb_approx_compressor_6_3: exhaustive check (all 64 patterns) of the approximate
// 6:3 compressor. Expected count = number of ones, minus one when both input
// triples x[2:0] and x[5:3] have odd parity. Also checks that exactly 16 patterns
// are undercounted and never by more than one.
module tb_approx_compressor_6_3;
  logic [5:0] x;
  logic [2:0] y;
  int checks = 0, failures = 0, under = 0;

  approx_compressor_6_3 dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, ones;
    for (int v = 0; v < 64; v++) begin
      x = 6'(v);
      #1;
      ones = $countones(x);
      want = ones - (((^x[2:0]) && (^x[5:3])) ? 1 : 0);
      checks++;
      if (int'(y) != want) begin
        failures++;
        $display("FAIL x=%06b y=%0d want %0d", x, y, want);
      end
      if (int'(y) < ones) under++;
      checks++;
      if (int'(y) > ones || ones - int'(y) > 1) begin
        failures++;
        $display("FAIL x=%06b error out of range (y=%0d ones=%0d)", x, y, ones);
      end
    end
    checks++;
    if (under != 16) begin
      failures++;
      $display("FAIL %0d undercounted patterns, want 16", under);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
