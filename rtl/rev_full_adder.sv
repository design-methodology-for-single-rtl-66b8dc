// Reversible full adder from a cascade of two Peres gates.
// Gate 1 takes (a, b, 0) and gives t = a xor b on Q and g = a and b on R.
// Gate 2 takes (t, ci, g) and gives s = a xor b xor ci on Q and
// co = (a xor b) ci xor ab on R, which equals the majority ab + a ci + b ci.
// The two P outputs are garbage. Combinational.
module rev_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic t, g;
  logic garbage0, garbage1;

  peres_gate u_pg0 (
    .a(a), .b(b), .c(1'b0),
    .p(garbage0), .q(t), .r(g)
  );

  peres_gate u_pg1 (
    .a(t), .b(ci), .c(g),
    .p(garbage1), .q(s), .r(co)
  );
endmodule
