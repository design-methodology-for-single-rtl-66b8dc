// Exhaustive check of the exponent unit: for every pair of 8-bit biased
// exponents, sum1 must equal Ex + Ey and exp_out Ex + Ey - 127. Also checks
// the worked example Ex = Ey = 130: sum bits 4, carry 1, sum1 260,
// exp_out 133.
module exponent_unit_tb;
  logic [7:0]        ex, ey;
  logic [8:0]        sum1;
  logic signed [9:0] exp_out;
  int checks = 0, failures = 0;

  exponent_unit dut (.ex(ex), .ey(ey), .sum1(sum1), .exp_out(exp_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ex = 8'd130;
    ey = 8'd130;
    #1;
    checks++;
    if (sum1[7:0] !== 8'd4 || sum1[8] !== 1'b1 || sum1 !== 9'd260 || exp_out !== 10'sd133) begin
      failures++;
      $display("FAIL example: sum1=%0d exp_out=%0d", sum1, exp_out);
    end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        ex = 8'(i);
        ey = 8'(j);
        #1;
        checks++;
        if (int'(sum1) != i + j || int'(exp_out) != i + j - 127) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> sum1=%0d exp_out=%0d", i, j, sum1, exp_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
