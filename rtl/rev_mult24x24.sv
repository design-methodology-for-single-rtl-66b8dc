// 24x24 significand multiplier built from nine reversible 8x8 multipliers.
// Each operand is cut into three bytes (part 1 = bits 7:0, part 2 = bits
// 15:8, part 3 = bits 23:16). Multiplier (i, j) forms a_part(i) * b_part(j),
// a 16-bit value of weight 2^(8(i+j)). The nine products are added one after
// another into a 48-bit total with 48-bit reversible ripple carry adders.
// The partitioning and the nine 8x8 multipliers follow the original design;
// the way the nine products are summed is this design's choice. The final
// carry out is always 0 since a 24x24 product fits in 48 bits.
// Combinational.
module rev_mult24x24 (
  input  logic [23:0] a,
  input  logic [23:0] b,
  output logic [47:0] p
);
  logic [7:0]  ap [3];
  logic [7:0]  bp [3];
  logic [15:0] pr [9];       // pr[3i+j] = ap[i] * bp[j]
  logic [47:0] term [9];     // pr shifted to its weight
  logic [47:0] acc [9];      // acc[k] = term[0] + ... + term[k]
  logic        cy  [1:8];

  for (genvar k = 0; k < 3; k++) begin : g_part
    assign ap[k] = a[8*k +: 8];
    assign bp[k] = b[8*k +: 8];
  end

  for (genvar i = 0; i < 3; i++) begin : g_i
    for (genvar j = 0; j < 3; j++) begin : g_j
      rev_mult8x8 u_m8 (
        .x(ap[i]), .y(bp[j]), .p(pr[3*i+j])
      );
      assign term[3*i+j] = 48'(pr[3*i+j]) << (8 * (i + j));
    end
  end

  assign acc[0] = term[0];

  for (genvar k = 1; k < 9; k++) begin : g_acc
    rev_rca #(.WIDTH(48)) u_add (
      .a(acc[k-1]), .b(term[k]), .s(acc[k]), .co(cy[k])
    );
  end

  assign p = acc[8];
endmodule
