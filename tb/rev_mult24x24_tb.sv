// Checks the 24x24 significand multiplier against a 48-bit integer product:
// corner operands (0, 1, all ones, single bytes), the worked example
// 0xD30000 * 0xD30000 = 191216238985216, and random operands.
module rev_mult24x24_tb;
  logic [23:0] a, b;
  logic [47:0] p;
  int checks = 0, failures = 0;

  rev_mult24x24 dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [23:0] ta, input logic [23:0] tb_);
    logic [47:0] expect_p;
    a = ta;
    b = tb_;
    #1;
    expect_p = 48'(ta) * 48'(tb_);
    checks++;
    if (p !== expect_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h -> %h, expected %h", ta, tb_, p, expect_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] corner [8];
    corner = '{24'h0, 24'h1, 24'hFFFFFF, 24'hFF, 24'hFF00, 24'hFF0000, 24'h800000, 24'hD30000};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    check(24'hD30000, 24'hD30000);
    checks++;
    if (p !== 48'd191216238985216) begin
      failures++;
      $display("FAIL worked example: %0d", p);
    end
    for (int k = 0; k < 20000; k++) check(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
