// Exponent path: the two biased 8-bit exponents are added in an 8-bit
// reversible ripple carry adder, its carry out and sum form the 9-bit total
// sum1 = Ex + Ey, and the bias 127 is then removed with an ordinary
// subtraction (no reversible subtractor, as in the original design).
// exp_out is 10-bit two's complement so that results below zero
// (Ex + Ey < 127) or above 255 stay visible to the overflow/underflow logic;
// that width is this design's choice. Combinational.
module exponent_unit
  import rsp_fpm_pkg::*;
(
  input  logic [EXP_W-1:0]   ex,
  input  logic [EXP_W-1:0]   ey,
  output logic [EXP_W:0]     sum1,
  output logic signed [9:0]  exp_out
);
  logic [EXP_W-1:0] sum;
  logic             cout;

  rev_rca #(.WIDTH(EXP_W)) u_exp_add (
    .a(ex), .b(ey), .s(sum), .co(cout)
  );

  assign sum1    = {cout, sum};
  assign exp_out = signed'({1'b0, sum1}) - signed'(10'(BIAS));
endmodule
