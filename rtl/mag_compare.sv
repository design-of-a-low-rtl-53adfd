// mag_compare: magnitude comparator of the Parseval check. Flags mismatch when
// the two unsigned sums differ by more than TOL: p = |a - b| > TOL.
// Combinational. The tolerance absorbs the rounding of the fixed-point FFT.
module mag_compare #(
  parameter int unsigned     W   = 52,
  parameter longint unsigned TOL = 64'd1 << 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         p
);
  logic [W-1:0] diff;
  assign diff = (a >= b) ? a - b : b - a;
  assign p    = 64'(diff) > TOL;
endmodule
