// tmr_voter: bitwise two-out-of-three majority of three copies of a W-bit
// word, y = ab | ac | bc. Combinational. Protects the check-sum adders and the
// error detection and correction unit, which are triplicated.
module tmr_voter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);
  assign y = (a & b) | (a & c) | (b & c);
endmodule
