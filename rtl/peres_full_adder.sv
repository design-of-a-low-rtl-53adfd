// peres_full_adder: full adder made of two Peres gates. The first gate takes
// (A, B, 0) and yields A xor B and AB; the second takes (A xor B, Cin, AB) and
// yields S = A xor B xor Cin and Cout = (A xor B).Cin xor AB. The garbage
// outputs G1 = A and G2 = A xor B of a reversible realization are brought out.
// Combinational.
module peres_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout,
  output logic g1,
  output logic g2
);
  logic axb, ab;
  peres_gate u_pg1 (.a(a),   .b(b),   .c(1'b0), .p(g1), .q(axb), .r(ab));
  peres_gate u_pg2 (.a(axb), .b(cin), .c(ab),   .p(g2), .q(s),   .r(cout));
endmodule
