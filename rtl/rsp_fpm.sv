// Reversible single precision floating point multiplier (top).
// X and Y are IEEE 754 binary32 words. The datapath has three independent
// parts, all built from Peres gates:
//   sign      - XOR of the two sign bits (sign_unit);
//   exponent  - 8-bit reversible ripple carry add of the biased exponents,
//               then the bias 127 is subtracted (exponent_unit);
//   mantissa  - the hidden 1 is prepended to each 23-bit fraction and the
//               two 24-bit significands are multiplied by nine 8x8
//               reversible multipliers (rev_mult24x24).
// The result is left unrounded and unnormalised so that a multiply and
// accumulate stage can keep all 48 product bits:
//   product = {sign, 7'b0, exp_out[7:0], mantissa[47:0]}
//   value   = (-1)^sign * 2^(exp_out - 127) * mantissa / 2^46
// The mantissa lies in [1, 4); when bit 47 is set the normalised exponent
// is exp_out + 1. Ports x, y, product and this layout follow the original
// design. The overflow and underflow flags are this design's addition: they
// flag a normalised exponent outside the normal range 1..254. Zero,
// subnormal, infinity and NaN inputs are not treated specially.
// Purely combinational: no clock, the result follows the inputs after the
// ripple delay of the adders.
module rsp_fpm
  import rsp_fpm_pkg::*;
(
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic [63:0] product,
  output logic        overflow,
  output logic        underflow
);
  fp32_t             fx, fy;
  logic [SIG_W-1:0]  man_x, man_y;
  logic [PROD_W-1:0] mantissa;
  logic              sign;
  logic [EXP_W:0]    sum1;
  logic signed [9:0] exp_out;
  logic signed [9:0] exp_norm;
  product_t          res;

  assign fx    = fp32_t'(x);
  assign fy    = fp32_t'(y);
  assign man_x = {1'b1, fx.frac};
  assign man_y = {1'b1, fy.frac};

  sign_unit u_sign (
    .sx(fx.sign), .sy(fy.sign), .sign(sign)
  );

  exponent_unit u_exp (
    .ex(fx.exp), .ey(fy.exp), .sum1(sum1), .exp_out(exp_out)
  );

  rev_mult24x24 u_mul (
    .a(man_x), .b(man_y), .p(mantissa)
  );

  assign exp_norm  = exp_out + 10'(mantissa[PROD_W-1]);
  assign overflow  = exp_norm >= 10'sd255;
  assign underflow = exp_norm <= 10'sd0;

  always_comb begin
    res.sign = sign;
    res.zero = '0;
    res.exp  = exp_out[EXP_W-1:0];
    res.mant = mantissa;
  end

  assign product = res;
endmodule
