// peres_gate: 3x3 reversible Peres gate. Inputs (A,B,C), outputs
// P = A, Q = A xor B, R = (A and B) xor C. With C = 0 it is a half adder
// (Q = sum, R = carry). Combinational; the building block of peres_full_adder.
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
