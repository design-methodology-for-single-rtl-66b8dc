// Exhaustive check of the one-gate reversible half adder against a + b.
module rev_half_adder_tb;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  rev_half_adder dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({co, s} !== 2'(a) + 2'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> co=%b s=%b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
