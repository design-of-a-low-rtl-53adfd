// fft4: serial 4-point FFT (radix-4 butterfly) of the FFT core.
// Four complex samples a,b,c,d arrive on four in_valid cycles, the first one
// flagged by start. When the fourth arrives the butterfly
//   X0 = a+b+c+d,  X1 = a-jb-c+jd,  X2 = a-b+c-d,  X3 = a+jb-c-jd
// is registered, and the bins leave one per cycle (out_k = 0..3) on the four
// following cycles, so bin j appears 4 cycles after sample j. A new group may
// start while the previous one is being shifted out. Outputs grow by 2 bits; no
// scaling. The serial interface is this design's own choice.
module fft4 #(
  parameter int unsigned IW = 19,
  localparam int unsigned OW = IW + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 out_valid,
  output logic [1:0]           out_k,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im
);
  logic [1:0]           cnt;
  logic signed [OW-1:0] b_re [3];
  logic signed [OW-1:0] b_im [3];
  logic signed [OW-1:0] o_re [4];
  logic signed [OW-1:0] o_im [4];
  logic signed [OW-1:0] d_re, d_im;
  logic [1:0]           idx;

  assign d_re = OW'(in_re);
  assign d_im = OW'(in_im);
  assign idx  = start ? 2'd0 : cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_k     <= '0;
    end else begin
      if (in_valid) cnt <= idx + 2'd1;
      if (in_valid && idx == 2'd3) begin
        out_valid <= 1'b1;
        out_k     <= 2'd0;
      end else if (out_valid) begin
        out_k <= out_k + 2'd1;
        if (out_k == 2'd3) out_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && idx != 2'd3) begin
      b_re[idx] <= d_re;
      b_im[idx] <= d_im;
    end
    if (in_valid && idx == 2'd3) begin
      // a = b[0], b = b[1], c = b[2], d = current sample
      o_re[0] <= b_re[0] + b_re[1] + b_re[2] + d_re;
      o_im[0] <= b_im[0] + b_im[1] + b_im[2] + d_im;
      o_re[1] <= b_re[0] + b_im[1] - b_re[2] - d_im;
      o_im[1] <= b_im[0] - b_re[1] - b_im[2] + d_re;
      o_re[2] <= b_re[0] - b_re[1] + b_re[2] - d_re;
      o_im[2] <= b_im[0] - b_im[1] + b_im[2] - d_im;
      o_re[3] <= b_re[0] - b_im[1] - b_re[2] + d_im;
      o_im[3] <= b_im[0] + b_re[1] - b_im[2] - d_re;
    end
  end

  assign out_re = o_re[out_k];
  assign out_im = o_im[out_k];
endmodule
