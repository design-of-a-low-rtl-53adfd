// parseval_check: sum-of-squares (Parseval) check of an FFT. One magnitude
// square and accumulator take the frame of FFT inputs, another pair takes the
// frame of FFT outputs; by Parseval's theorem sum|X|^2 = NPT * sum|x|^2, so
// the comparator flags p when the output sum and NPT times the input sum
// differ by more than TOL. Inputs and outputs arrive sequentially, NPT
// samples each, in any order; the input frame must complete before the output
// frame does. p_valid pulses one cycle after the accumulator of the outputs
// reports its total (two cycles after the last output sample); p holds until
// the next result. The default TOL = 2^32 lies above the worst-case effect of
// the FFT rounding on sums of three 16-bit channels (at most 2 LSB per output
// component, below 2^31) and far below the effect of an error in the upper
// output bits. The tolerance value is this design's choice.
module parseval_check #(
  parameter int unsigned     IW  = 18,             // input sample width
  parameter int unsigned     OW  = 23,             // output sample width
  parameter int unsigned     NPT = pfft_pkg::NPT,
  parameter longint unsigned TOL = 64'd1 << 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  input  logic                 out_valid,
  input  logic signed [OW-1:0] out_re,
  input  logic signed [OW-1:0] out_im,
  output logic                 p,
  output logic                 p_valid
);
  localparam int unsigned LG   = $clog2(NPT);
  localparam int unsigned IACC = 2*IW + LG;
  localparam int unsigned OACC = 2*OW + LG;
  localparam int unsigned CW   = (IACC + LG > OACC) ? IACC + LG : OACC;

  logic [2*IW-1:0] isq;
  logic [2*OW-1:0] osq;
  logic [IACC-1:0] isum, isum_r;
  logic [OACC-1:0] osum;
  logic            idone, odone, mismatch;

  mag_square #(.W(IW)) u_isq (.re(in_re),  .im(in_im),  .sq(isq));
  mag_square #(.W(OW)) u_osq (.re(out_re), .im(out_im), .sq(osq));

  sos_accum #(.IW(2*IW), .NPT(NPT)) u_iacc (.clk, .rst_n, .valid(in_valid),  .din(isq), .sum(isum), .done(idone));
  sos_accum #(.IW(2*OW), .NPT(NPT)) u_oacc (.clk, .rst_n, .valid(out_valid), .din(osq), .sum(osum), .done(odone));

  mag_compare #(.W(CW), .TOL(TOL)) u_cmp (
    .a(CW'(isum_r) << LG), .b(CW'(osum)), .p(mismatch));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      isum_r  <= '0;
      p       <= 1'b0;
      p_valid <= 1'b0;
    end else begin
      if (idone) isum_r <= isum;
      p_valid <= odone;
      if (odone) p <= mismatch;
    end
  end
endmodule
