// tb_mlam_8x8: exhaustive check of the 8x8 approximate multiplier over all 65536
// operand pairs against the reference model of its reduction, plus the property
// that the product never exceeds the exact one. Reports the usual error metrics
// against the exact product: error rate, mean error distance (MED), normalised
// MED (NMED, MED over the largest product 255*255) and mean relative error.
module tb_mlam_8x8;
  import mlam_model_pkg::*;

  logic [7:0]  a_in, b_in;
  logic [15:0] product_out;
  int checks = 0, failures = 0;

  mlam_8x8 dut (.a_in, .b_in, .product_out);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned want, exact, nerr, maxed;
    real sum_ed, sum_red;
    nerr = 0; maxed = 0; sum_ed = 0.0; sum_red = 0.0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a_in = 8'(a);
        b_in = 8'(b);
        #1;
        want  = approx_product(a_in, b_in);
        exact = 32'(a) * 32'(b);
        checks++;
        if (32'(product_out) != want || 32'(product_out) > exact) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d*%0d = %0d, model %0d, exact %0d", a, b, product_out, want, exact);
        end
        if (32'(product_out) != exact) begin
          nerr++;
          if (exact - 32'(product_out) > maxed) maxed = exact - 32'(product_out);
          sum_ed  += real'(exact - 32'(product_out));
          sum_red += real'(exact - 32'(product_out)) / real'(exact);
        end
      end
    a_in = 8'd54;
    b_in = 8'd212;
    #1;
    $display("mlam_8x8: 54*212 = %0d (exact 11448)", product_out);
    $display("mlam_8x8: error rate %0d/65536, MED %f, NMED %e, MRED %e, max error %0d",
             nerr, sum_ed / 65536.0, sum_ed / 65536.0 / 65025.0, sum_red / 65536.0, maxed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
