// mag_square: squared magnitude of a complex sample, re^2 + im^2, as an
// unsigned number of 2*W bits (the largest value, 2 * 2^(2W-2), fits).
// Combinational. The "Magnitude Square" stage of the Parseval check.
module mag_square #(
  parameter int unsigned W = 18
) (
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic [2*W-1:0]      sq
);
  logic signed [2*W-1:0] re2, im2;
  assign re2 = (2*W)'(re) * (2*W)'(re);
  assign im2 = (2*W)'(im) * (2*W)'(im);
  assign sq  = unsigned'(re2) + unsigned'(im2);
endmodule
