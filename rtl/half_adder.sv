// half_adder: one-bit half adder, S = A xor B, C = A and B (an XOR gate and an
// AND gate, as in the classic schematic). Purely combinational. Used as the
// least significant stage of ripple_adder, where there is no carry in.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
