// Exhaustive check of the sign unit: the product sign is sx xor sy.
module sign_unit_tb;
  logic sx, sy, sign;
  int checks = 0, failures = 0;

  sign_unit dut (.sx(sx), .sy(sy), .sign(sign));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {sx, sy} = 2'(v);
      #1;
      checks++;
      if (sign !== (sx != sy)) begin
        failures++;
        $display("FAIL sx=%b sy=%b -> %b", sx, sy, sign);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
