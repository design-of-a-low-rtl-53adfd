// cordic: twiddle rotator of the FFT core. Rotates (x_in + j*y_in) by the
// angle given as a PW-bit phase word (full circle = 2**PW, counter-clockwise
// positive) and registers the result: one cycle of latency, a new sample every
// cycle. The angle is first reduced to [-45, 45) degrees by an exact rotation
// by a multiple of 90 degrees, then ITER unrolled rotation-mode CORDIC
// micro-rotations run on values carrying G extra fraction bits. The CORDIC gain
// is removed by multiplying with K = 0.6072529350 (Q24 constant 10188014, the
// limit of prod 1/sqrt(1+2^-2i), exact to Q24 for ITER >= 13) and the result is rounded
// back to IW bits. Magnitude is preserved, so the caller must leave one bit of
// headroom for the 45-degree case. The micro-rotation structure is the
// standard CORDIC; widths and iteration count are this design's choices.
module cordic #(
  parameter int unsigned IW   = 19,
  parameter int unsigned PW   = pfft_pkg::PW,
  parameter int unsigned ITER = 20,
  parameter int unsigned G    = 6
) (
  input  logic                 clk,
  input  logic signed [IW-1:0] x_in,
  input  logic signed [IW-1:0] y_in,
  input  logic        [PW-1:0] angle,
  output logic signed [IW-1:0] x_out,
  output logic signed [IW-1:0] y_out
);
  localparam int unsigned CW = IW + 2 + G;   // working width
  localparam int unsigned KQ = 10188014;     // round(0.6072529350 * 2**24)

  // atan(2^-i) in units of 2**-32 of a full circle: round(atan(2^-i)/(2*pi)*2**32)
  localparam logic [31:0] ATAN32 [24] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81};

  function automatic logic signed [PW:0] atan_pw(input logic [4:0] i);
    logic [32:0] v;
    v = 33'(ATAN32[i]) + (33'd1 << (32 - PW - 1));   // round to PW bits
    return (PW+1)'(v >> (32 - PW));
  endfunction

  logic [1:0]               quad;
  logic signed [PW:0]       resid;
  logic signed [CW-1:0]     x0, y0;
  logic signed [CW-1:0]     xs [ITER+1];
  logic signed [CW-1:0]     ys [ITER+1];
  logic signed [PW:0]       zs [ITER+1];
  logic signed [CW+25:0]    xk, yk;

  always_comb begin
    // nearest multiple of 90 degrees and the residual angle
    quad  = 2'((angle + PW'(1 << (PW - 3))) >> (PW - 2));
    resid = $signed({1'b0, angle}) - $signed({1'b0, quad, {(PW-2){1'b0}}});
    if (resid >= $signed((PW+1)'(1 << (PW - 1))))
      resid = resid - $signed((PW+1)'(1 << PW));
    // exact pre-rotation by quad * 90 degrees, G fraction bits appended
    unique case (quad)
      2'd0: begin x0 =  (CW'(x_in) <<< G); y0 =  (CW'(y_in) <<< G); end
      2'd1: begin x0 = -(CW'(y_in) <<< G); y0 =  (CW'(x_in) <<< G); end
      2'd2: begin x0 = -(CW'(x_in) <<< G); y0 = -(CW'(y_in) <<< G); end
      default: begin x0 = (CW'(y_in) <<< G); y0 = -(CW'(x_in) <<< G); end
    endcase
    xs[0] = x0;
    ys[0] = y0;
    zs[0] = resid;
    for (int i = 0; i < ITER; i++) begin
      if (zs[i] >= 0) begin
        xs[i+1] = xs[i] - (ys[i] >>> i);
        ys[i+1] = ys[i] + (xs[i] >>> i);
        zs[i+1] = zs[i] - atan_pw(5'(i));
      end else begin
        xs[i+1] = xs[i] + (ys[i] >>> i);
        ys[i+1] = ys[i] - (xs[i] >>> i);
        zs[i+1] = zs[i] + atan_pw(5'(i));
      end
    end
    // gain compensation and rounding to IW bits
    xk = (CW+26)'(xs[ITER]) * $signed({1'b0, 25'(KQ)});
    yk = (CW+26)'(ys[ITER]) * $signed({1'b0, 25'(KQ)});
  end

  always_ff @(posedge clk) begin
    x_out <= IW'((xk + ((CW+26)'(1) <<< (23 + G))) >>> (24 + G));
    y_out <= IW'((yk + ((CW+26)'(1) <<< (23 + G))) >>> (24 + G));
  end
endmodule
