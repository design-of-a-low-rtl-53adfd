// fft16: 16-point sequential FFT core, one per channel of the parallel FFT.
// Blocks: an input selector, a dual-port RAM holding the frame, a serial
// 4-point FFT, a CORDIC that applies the twiddle factors produced by the
// rotation factor generator, and the address generator that sequences them.
// The transform is radix-4 decimation in frequency in two in-place passes:
// pass 1 runs the four 4-point DFTs over x[n1+4*n2], rotates bin k1 by
// W16^(n1*k1) and writes it back to address n1+4*k1; pass 2 runs 4-point DFTs
// over each group k1 and sends the bins straight out, so bins leave in
// digit-reversed order (k1 + 4*k2) with out_idx naming the bin.
// Interface: x[0] is presented with start, x[1..15] on the 15 following cycles
// (in_take marks the 16 cycles). out_en is high on cycles 43..58 after start.
// busy covers 59 cycles; starts while busy are ignored. Nothing is scaled:
// the output has DW+5 bits and equals the exact DFT up to CORDIC rounding,
// which keeps the Parseval relation sum|X|^2 = 16*sum|x|^2 usable. Length,
// widths and timing are this design's choices; the block structure follows
// the FFT architecture of the scheme.
module fft16 #(
  parameter int unsigned DW = 16,
  localparam int unsigned RW = DW + 3,   // RAM and CORDIC width
  localparam int unsigned OW = DW + 5    // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 busy,
  output logic                 in_take,
  output logic                 out_en,
  output logic [3:0]           out_idx,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im
);
  logic                 we, sel_cordic, f4_valid, f4_start, fct_start, f4_ovalid;
  logic [3:0]           waddr, raddr;
  logic [1:0]           fct_n1, f4_k;
  logic [pfft_pkg::PW-1:0] angle;
  logic signed [RW-1:0] wd_re, wd_im, rd_re, rd_im, cr_re, cr_im;
  logic signed [OW-1:0] f4_re, f4_im;

  fft_addr_gen u_agen (
    .clk, .rst_n, .start, .busy, .in_take, .we, .sel_cordic, .waddr, .raddr,
    .f4_valid, .f4_start, .fct_start, .fct_n1, .out_en, .out_idx);

  fft_selector #(.DW(DW), .RW(RW)) u_sel (
    .sel_cordic, .in_re, .in_im, .cr_re, .cr_im, .wd_re, .wd_im);

  dp_ram #(.WIDTH(2*RW), .DEPTH(16)) u_ram (
    .clk, .we, .waddr, .wdata({wd_re, wd_im}), .raddr, .rdata({rd_re, rd_im}));

  fft4 #(.IW(RW)) u_fft4 (
    .clk, .rst_n, .start(f4_start), .in_valid(f4_valid), .in_re(rd_re), .in_im(rd_im),
    .out_valid(f4_ovalid), .out_k(f4_k), .out_re(f4_re), .out_im(f4_im));

  twiddle_gen u_tw (.clk, .rst_n, .start(fct_start), .n1(fct_n1), .angle);

  // pass-1 bins fit in DW+2 bits, so the top bits dropped here are sign copies
  cordic #(.IW(RW)) u_cordic (
    .clk, .x_in(RW'(f4_re)), .y_in(RW'(f4_im)), .angle, .x_out(cr_re), .y_out(cr_im));

  assign out_re = f4_re;
  assign out_im = f4_im;

  // The 4-point FFT must deliver a bin on every output cycle of the schedule.
  always_ff @(posedge clk) begin
    if (rst_n && out_en) assert (f4_ovalid && f4_k == out_idx[3:2])
      else $error("fft16: output scheduled without the matching 4-point FFT bin");
  end
endmodule
