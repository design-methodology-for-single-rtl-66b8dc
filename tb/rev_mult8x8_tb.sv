// Exhaustive check of the 8x8 reversible multiplier: all 65536 operand
// pairs against the integer product x * y.
module rev_mult8x8_tb;
  logic [7:0]  x, y;
  logic [15:0] p;
  int checks = 0, failures = 0;

  rev_mult8x8 dut (.x(x), .y(y), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x = 8'(i);
        y = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
