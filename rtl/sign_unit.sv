// Sign of the product: the XOR of the two operand signs, taken from the Q
// output of a single Peres gate with C tied to 0. P and R are garbage.
// Combinational.
module sign_unit (
  input  logic sx,
  input  logic sy,
  output logic sign
);
  logic garbage_p, garbage_r;

  peres_gate u_pg (
    .a(sx), .b(sy), .c(1'b0),
    .p(garbage_p), .q(sign), .r(garbage_r)
  );
endmodule
