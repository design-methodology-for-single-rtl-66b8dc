// Reversible half adder from a single Peres gate with its C input tied to 0:
// Q gives the sum a xor b and R the carry a and b. The P output (a copy of a)
// is a garbage output and is left unconnected. Combinational.
module rev_half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  logic garbage;

  peres_gate u_pg (
    .a(a), .b(b), .c(1'b0),
    .p(garbage), .q(s), .r(co)
  );
endmodule
