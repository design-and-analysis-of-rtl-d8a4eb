// tb_mlam_ppr: checks the partial-product reduction tree on arbitrary 64-bit
// input patterns (all-zero, all-one, single ones in every position, and 20000
// random patterns, not only those a multiplication can produce). The sum of the
// two output rows must equal the value given by the reference model of the
// reduction rule, and may never exceed the exact weighted sum of the inputs.
module tb_mlam_ppr;
  import mlam_model_pkg::*;

  logic [7:0][7:0] pp;
  logic [15:0]     row0, row1;
  int checks = 0, failures = 0, approximated = 0;

  mlam_ppr dut (.pp, .row0, .row1);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int unsigned want, exact, got;
    #1;
    want  = ppr_value(pp);
    exact = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        if (pp[i][j]) exact += 32'd1 << (i + j);
    got = 32'(row0) + 32'(row1);
    checks++;
    if (got != want || got > exact) begin
      failures++;
      $display("FAIL pp=%h rows sum %0d model %0d exact %0d", pp, got, want, exact);
    end
    if (got != exact) approximated++;
  endtask

  initial begin
    pp = '0;
    check();
    pp = '1;
    check();
    for (int k = 0; k < 64; k++) begin
      pp = 64'd1 << k;
      check();
    end
    for (int n = 0; n < 20000; n++) begin
      pp = {$urandom, $urandom};
      check();
    end
    checks++;
    if (approximated == 0) begin
      failures++;
      $display("FAIL no pattern exercised a compressor's approximation");
    end
    $display("mlam_ppr: %0d of %0d patterns reduced with error", approximated, checks - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
