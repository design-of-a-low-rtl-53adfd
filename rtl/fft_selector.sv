// fft_selector: write-data selector in front of the FFT core RAM. While a frame
// is being loaded (sel_cordic = 0) it passes the external input sample,
// sign-extended from DW to RW bits; during the first radix-4 pass
// (sel_cordic = 1) it passes the twiddle-rotated value coming back from the
// CORDIC. Combinational.
module fft_selector #(
  parameter int unsigned DW = 16,
  parameter int unsigned RW = 19
) (
  input  logic                 sel_cordic,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic signed [RW-1:0] cr_re,
  input  logic signed [RW-1:0] cr_im,
  output logic signed [RW-1:0] wd_re,
  output logic signed [RW-1:0] wd_im
);
  always_comb begin
    if (sel_cordic) begin
      wd_re = cr_re;
      wd_im = cr_im;
    end else begin
      wd_re = RW'(in_re);
      wd_im = RW'(in_im);
    end
  end
endmodule
