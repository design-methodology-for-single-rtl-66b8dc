// Reversible ripple carry adder of WIDTH bits: a half adder at bit 0 and full
// adders at bits 1..WIDTH-1, the carry of each stage feeding the next, as in
// the 8-bit exponent adder (A7..A0 + B7..B0 -> CO,7 S7..S0). There is no
// carry input. All cells are Peres-gate adders. Combinational; the delay
// grows linearly with WIDTH. The default width 8 is the exponent adder's;
// other widths are this design's reuse of the same structure in the
// significand multiplier.
module rev_rca #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:1] c;   // c[i] is the carry into stage i

  rev_half_adder u_ha (
    .a(a[0]), .b(b[0]), .s(s[0]), .co(c[1])
  );

  for (genvar i = 1; i < WIDTH; i++) begin : g_fa
    rev_full_adder u_fa (
      .a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1])
    );
  end

  assign co = c[WIDTH];
endmodule
