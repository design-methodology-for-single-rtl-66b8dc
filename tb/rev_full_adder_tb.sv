// Exhaustive check of the two-gate reversible full adder against
// a + b + ci (sum = xor of the three, carry = majority).
module rev_full_adder_tb;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  rev_full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if (s !== (a ^ b ^ ci) || co !== ((a & b) | (a & ci) | (b & ci))) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b -> co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
