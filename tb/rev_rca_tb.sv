// Checks the reversible ripple carry adder at its default 8-bit width
// (the exponent adder) exhaustively, all 65536 operand pairs, against
// a + b, and a 48-bit instance with random operands.
module rev_rca_tb;
  logic [7:0]  a8, b8, s8;
  logic        co8;
  logic [47:0] a48, b48, s48;
  logic        co48;
  int checks = 0, failures = 0;

  rev_rca dut8 (.a(a8), .b(b8), .s(s8), .co(co8));
  rev_rca #(.WIDTH(48)) dut48 (.a(a48), .b(b48), .s(s48), .co(co48));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a48 = '0;
    b48 = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if ({co8, s8} !== 9'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> %0d", i, j, {co8, s8});
        end
      end
    end
    for (int k = 0; k < 2000; k++) begin
      a48 = {$urandom, $urandom};
      b48 = {$urandom, $urandom};
      if (k == 0) begin a48 = '1; b48 = 48'd1; end
      #1;
      checks++;
      if ({co48, s48} !== 49'(a48) + 49'(b48)) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h -> %h", a48, b48, {co48, s48});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
