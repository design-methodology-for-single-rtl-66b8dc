// End-to-end test of the floating point multiplier at its default (and
// only) configuration.
// Each result is checked two ways, independently of the design:
//  - field by field: sign = sx xor sy, exponent field = (Ex + Ey - 127)
//    mod 256, mantissa = (2^23 + Fx) * (2^23 + Fy), seven zero bits, and the
//    flags against the normalised exponent;
//  - by value: when the exponent is in range, the result read back as
//    (-1)^s * 2^(e - 127) * mantissa / 2^46 must equal the product of the
//    two operands computed in double precision (exact for 24-bit
//    significands).
// The worked example x = y = 0x41530000 (13.1875) must give
// 0x0085ADE900000000. Every case class (negative result, product mantissa
// below 2 and at or above 2, overflow, underflow) is counted and must occur.
module rsp_fpm_tb;
  logic [31:0] x, y;
  logic [63:0] product;
  logic        overflow, underflow;
  int checks = 0, failures = 0;
  int n_neg = 0, n_msb = 0, n_nomsb = 0, n_ovf = 0, n_unf = 0, n_value = 0;

  rsp_fpm dut (.x(x), .y(y), .product(product), .overflow(overflow), .underflow(underflow));

  function automatic real pow2(input int e);
    real v = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) v = v * 2.0;
    else        for (int i = 0; i < -e; i++) v = v / 2.0;
    return v;
  endfunction

  function automatic real fp32_to_real(input logic [31:0] w);
    real m;
    m = real'({1'b1, w[22:0]}) / 8388608.0;
    return (w[31] ? -m : m) * pow2(int'(w[30:23]) - 127);
  endfunction

  task automatic run(input logic [31:0] tx, input logic [31:0] ty);
    logic        e_sign;
    int          e_exp, e_norm;
    logic [47:0] e_mant;
    logic        e_ovf, e_unf;
    real         want, got;
    x = tx;
    y = ty;
    #1;
    e_sign = tx[31] ^ ty[31];
    e_exp  = int'(tx[30:23]) + int'(ty[30:23]) - 127;
    e_mant = 48'({1'b1, tx[22:0]}) * 48'({1'b1, ty[22:0]});
    e_norm = e_exp + int'(e_mant[47]);
    e_ovf  = e_norm >= 255;
    e_unf  = e_norm <= 0;
    checks++;
    if (product[63] !== e_sign || product[62:56] !== 7'd0 ||
        product[55:48] !== 8'(e_exp) || product[47:0] !== e_mant ||
        overflow !== e_ovf || underflow !== e_unf) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h -> %h ovf=%b unf=%b (exp %0d mant %h)",
                 tx, ty, product, overflow, underflow, e_exp, e_mant);
    end
    if (e_exp >= 0 && e_exp <= 255) begin
      want = fp32_to_real(tx) * fp32_to_real(ty);
      got  = real'(product[47:0]) * pow2(int'(product[55:48]) - 127 - 46);
      if (product[63]) got = -got;
      checks++;
      n_value++;
      if (got != want) begin
        failures++;
        if (failures < 10) $display("FAIL value %h * %h: got %e want %e", tx, ty, got, want);
      end
    end
    if (e_sign) n_neg++;
    if (e_mant[47]) n_msb++; else n_nomsb++;
    if (e_ovf) n_ovf++;
    if (e_unf) n_unf++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example
    run(32'h41530000, 32'h41530000);
    checks++;
    if (product !== 64'h0085ADE900000000) begin
      failures++;
      $display("FAIL worked example: %h", product);
    end
    // simple values
    run(32'h3F800000, 32'h3F800000);   // 1.0 * 1.0
    run(32'hC0000000, 32'h40400000);   // -2.0 * 3.0
    run(32'h3FC00000, 32'hBFC00000);   // 1.5 * -1.5
    run(32'h7F000000, 32'h7F000000);   // 2^127 * 2^127: overflow
    run(32'h0D800000, 32'h0D800000);   // 2^-100 * 2^-100: underflow
    run(32'h3F7FFFFF, 32'h3F7FFFFF);   // largest significands
    // random operands, whole exponent range and a narrow band around 1.0
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] rx, ry;
      rx = $urandom;
      ry = $urandom;
      if (k % 2 == 0) begin
        rx[30:23] = 8'(120 + $urandom_range(0, 15));
        ry[30:23] = 8'(120 + $urandom_range(0, 15));
      end
      run(rx, ry);
    end
    $display("cases: negative=%0d mant_msb=%0d no_msb=%0d overflow=%0d underflow=%0d value_checked=%0d",
             n_neg, n_msb, n_nomsb, n_ovf, n_unf, n_value);
    if (n_neg == 0)   begin failures++; $display("FAIL no negative result"); end
    if (n_msb == 0)   begin failures++; $display("FAIL no mantissa >= 2"); end
    if (n_nomsb == 0) begin failures++; $display("FAIL no mantissa < 2"); end
    if (n_ovf == 0)   begin failures++; $display("FAIL no overflow"); end
    if (n_unf == 0)   begin failures++; $display("FAIL no underflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
