// Unsigned 8x8 reversible multiplier, 16-bit product.
// Partial products: 64 Peres gates PG0..PG63 with C tied to 0; gate 8j+i
// forms x_i AND y_j on its R output (P and Q are garbage).
// Summation: the row for y_0 is the starting value. Its bit 0 is product bit
// 0 and its bits 7:1 (with a 0 on top) are the running upper part. For each
// following row j an 8-bit reversible ripple carry adder (half adder at the
// LSB, full adders above) adds the row to the running part; the sum's bit 0
// becomes product bit j and {carry, sum[7:1]} the new running part. After
// row 7 the running part is product bits 15:8. The gate-level partial
// products follow the original design; the row-by-row array that sums them
// is this design's own arrangement of its half and full adders.
// Combinational.
module rev_mult8x8 (
  input  logic [7:0]  x,
  input  logic [7:0]  y,
  output logic [15:0] p
);
  logic [7:0] pp [8];        // pp[j][i] = x[i] & y[j]
  logic [7:0] gp [8];        // garbage P outputs
  logic [7:0] gq [8];        // garbage Q outputs
  logic [7:0] run [8];       // running upper part after row j
  logic [7:0] sum [1:7];
  logic       cy  [1:7];

  for (genvar j = 0; j < 8; j++) begin : g_row
    for (genvar i = 0; i < 8; i++) begin : g_col
      peres_gate u_pg (
        .a(x[i]), .b(y[j]), .c(1'b0),
        .p(gp[j][i]), .q(gq[j][i]), .r(pp[j][i])
      );
    end
  end

  assign p[0]   = pp[0][0];
  assign run[0] = {1'b0, pp[0][7:1]};

  for (genvar j = 1; j < 8; j++) begin : g_sum
    rev_rca #(.WIDTH(8)) u_add (
      .a(run[j-1]), .b(pp[j]), .s(sum[j]), .co(cy[j])
    );
    assign p[j]   = sum[j][0];
    assign run[j] = {cy[j], sum[j][7:1]};
  end

  assign p[15:8] = run[7];
endmodule
