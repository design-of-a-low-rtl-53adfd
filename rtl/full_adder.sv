// full_adder: conventional one-bit full adder built from two XORs, two ANDs and
// an OR: S = A xor B xor Cin, Cout = A.B + Cin.(A xor B). Combinational.
// It is the non-reversible alternative stage of ripple_adder (PERES = 0).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic axb;
  assign axb  = a ^ b;
  assign s    = axb ^ cin;
  assign cout = (a & b) | (cin & axb);
endmodule
