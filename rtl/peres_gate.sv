// Peres gate: the 3x3 reversible gate every other block is built from.
// Outputs P = A, Q = A xor B, R = (A and B) xor C. The mapping is one to one,
// so the inputs can be recovered from the outputs. With C = 0 the R output is
// an AND, and Q an XOR, which is how the adders and the partial-product
// generators use it. Purely combinational; the equations are the standard
// Peres gate definition.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
