// pfft_sos_ecc_top: four parallel 16-point FFTs protected against a single
// soft error with the Parity-SOS-ECC scheme.
//  * One extra "parity" FFT transforms x = x1+x2+x3+x4; by linearity its output
//    X equals X1+X2+X3+X4, so any one data FFT can be rebuilt from the others.
//  * Instead of one sum-of-squares (Parseval) check per FFT, three checks
//    watch the Hamming combinations x5 = x1+x2+x3, x6 = x1+x2+x4,
//    x7 = x1+x3+x4 against X5 = X1+X2+X3, X6 = X1+X2+X4, X7 = X1+X3+X4.
//    The pattern {P1,P2,P3} of failing checks names the faulty FFT
//    (111 -> 1, 110 -> 2, 101 -> 3, 011 -> 4); a single failing check means
//    the check path itself was hit and nothing is corrected.
//  * The error detection and correction unit buffers a frame, waits for the
//    checks and emits Y1..Y4 with the located output replaced by X minus the
//    other three.
// The check-sum adders (input and output side) and the detection/correction
// unit are triplicated with majority voters (TMR); the parity FFT and the
// checks are not, since an error there cannot corrupt the data outputs.
// Interface: x1..x4 sample 0 comes with start, samples 1..15 on the next 15
// cycles; a start while busy is ignored. The checks report (chk_valid) 60
// cycles after start; Y bins leave in natural order, y_valid high for 16
// cycles starting 63 cycles after start. inj_* is a fault-injection port for
// testing: when inj_en is set, inj_mask is XORed into the real part of bin
// inj_idx of FFT1..4 (inj_sel 0..3), of the parity FFT (4) or of the
// output-side check sums X5..X7 (5..7). SOS_TOL is the allowed difference
// of the sums of squares (see parseval_check). Scheme, check patterns and
// correction equation follow the Parity-SOS-ECC method; the FFT length,
// widths, timing and the injection port are this design's own choices.
module pfft_sos_ecc_top #(
  parameter int unsigned     DW      = 16,
  parameter longint unsigned SOS_TOL = 64'd1 << 32,   // Parseval check tolerance
  localparam int unsigned OW = DW + 5,    // data FFT output width
  localparam int unsigned SW = DW + 2,    // input check-sum / parity input width
  localparam int unsigned XW = OW + 2     // output check-sum / parity output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] x_re [4],
  input  logic signed [DW-1:0] x_im [4],
  output logic                 busy,
  input  logic                 inj_en,
  input  logic [2:0]           inj_sel,
  input  logic [3:0]           inj_idx,
  input  logic [XW-1:0]        inj_mask,
  output logic                 chk_valid,
  output logic [2:0]           syndrome,
  output logic [2:0]           err_loc,
  output logic                 corrected,
  output logic                 y_valid,
  output logic [3:0]           y_idx,
  output logic signed [OW-1:0] y_re [4],
  output logic signed [OW-1:0] y_im [4]
);
  // ---------------- input-side check sums (TMR) ----------------
  localparam int unsigned ENC_IN_W = 8 * SW;
  logic [ENC_IN_W-1:0] enc_in [3];
  logic [ENC_IN_W-1:0] enc_in_v;
  logic signed [SW-1:0] cx5_re, cx5_im, cx6_re, cx6_im, cx7_re, cx7_im, xp_re, xp_im;

  for (genvar r = 0; r < 3; r++) begin : g_enc_in
    logic signed [SW-1:0] s5r, s5i, s6r, s6i, s7r, s7i, spr, spi;
    ecc_encoder #(.W(DW)) u_enc (
      .a_re(x_re), .a_im(x_im),
      .s5_re(s5r), .s5_im(s5i), .s6_re(s6r), .s6_im(s6i),
      .s7_re(s7r), .s7_im(s7i), .sp_re(spr), .sp_im(spi));
    assign enc_in[r] = {s5r, s5i, s6r, s6i, s7r, s7i, spr, spi};
  end
  tmr_voter #(.W(ENC_IN_W)) u_vote_in (.a(enc_in[0]), .b(enc_in[1]), .c(enc_in[2]), .y(enc_in_v));
  assign {cx5_re, cx5_im, cx6_re, cx6_im, cx7_re, cx7_im, xp_re, xp_im} = enc_in_v;

  // ---------------- four data FFTs and the parity FFT ----------------
  logic                 f_busy [5];
  logic                 f_take [5];
  logic                 f_oen  [5];
  logic [3:0]           f_idx  [5];
  logic signed [OW-1:0] fx_re [4], fx_im [4];     // data FFT outputs after injection
  logic signed [XW-1:0] fp_re, fp_im;             // parity FFT output after injection

  for (genvar i = 0; i < 4; i++) begin : g_fft
    logic signed [OW-1:0] o_re, o_im;
    fft16 #(.DW(DW)) u_fft (
      .clk, .rst_n, .start, .in_re(x_re[i]), .in_im(x_im[i]),
      .busy(f_busy[i]), .in_take(f_take[i]), .out_en(f_oen[i]), .out_idx(f_idx[i]),
      .out_re(o_re), .out_im(o_im));
    assign fx_re[i] = o_re ^ ((inj_en && inj_sel == 3'(i) && f_idx[i] == inj_idx) ? OW'(inj_mask) : '0);
    assign fx_im[i] = o_im;
  end

  begin : g_parity
    logic signed [XW-1:0] o_re, o_im;
    fft16 #(.DW(SW)) u_fft (
      .clk, .rst_n, .start, .in_re(xp_re), .in_im(xp_im),
      .busy(f_busy[4]), .in_take(f_take[4]), .out_en(f_oen[4]), .out_idx(f_idx[4]),
      .out_re(o_re), .out_im(o_im));
    assign fp_re = o_re ^ ((inj_en && inj_sel == 3'd4 && f_idx[4] == inj_idx) ? inj_mask : '0);
    assign fp_im = o_im;
  end

  assign busy = f_busy[0];

  // ---------------- output-side check sums (TMR) ----------------
  localparam int unsigned ENC_OUT_W = 6 * XW;
  logic [ENC_OUT_W-1:0] enc_out [3];
  logic [ENC_OUT_W-1:0] enc_out_v;
  logic signed [XW-1:0] cz_re [3], cz_im [3];     // X5, X6, X7

  for (genvar r = 0; r < 3; r++) begin : g_enc_out
    logic signed [XW-1:0] s5r, s5i, s6r, s6i, s7r, s7i, spr_unused, spi_unused;
    ecc_encoder #(.W(OW)) u_enc (
      .a_re(fx_re), .a_im(fx_im),
      .s5_re(s5r), .s5_im(s5i), .s6_re(s6r), .s6_im(s6i),
      .s7_re(s7r), .s7_im(s7i), .sp_re(spr_unused), .sp_im(spi_unused));
    assign enc_out[r] = {s5r, s5i, s6r, s6i, s7r, s7i};
  end
  tmr_voter #(.W(ENC_OUT_W)) u_vote_out (.a(enc_out[0]), .b(enc_out[1]), .c(enc_out[2]), .y(enc_out_v));

  for (genvar c = 0; c < 3; c++) begin : g_cz
    assign cz_re[c] = enc_out_v[ENC_OUT_W-1-2*c*XW -: XW]
                    ^ ((inj_en && inj_sel == 3'(5 + c) && f_idx[0] == inj_idx) ? inj_mask : '0);
    assign cz_im[c] = enc_out_v[ENC_OUT_W-1-(2*c+1)*XW -: XW];
  end

  // ---------------- three Parseval checks ----------------
  logic signed [SW-1:0] cx_re [3], cx_im [3];
  logic [2:0] p, pv;
  assign cx_re = '{cx5_re, cx6_re, cx7_re};
  assign cx_im = '{cx5_im, cx6_im, cx7_im};

  for (genvar c = 0; c < 3; c++) begin : g_chk
    parseval_check #(.IW(SW), .OW(XW), .TOL(SOS_TOL)) u_chk (
      .clk, .rst_n,
      .in_valid(f_take[0]), .in_re(cx_re[c]), .in_im(cx_im[c]),
      .out_valid(f_oen[0]), .out_re(cz_re[c]), .out_im(cz_im[c]),
      .p(p[c]), .p_valid(pv[c]));
  end

  assign chk_valid = pv[0];

  // the three checks see the same frame timing and report together
  always_ff @(posedge clk) begin
    if (rst_n) assert (pv == 3'b000 || pv == 3'b111)
      else $error("pfft_sos_ecc_top: Parseval checks out of step");
  end
  assign syndrome  = {p[0], p[1], p[2]};        // {P1, P2, P3}

  // ---------------- error detection and correction (TMR) ----------------
  localparam int unsigned EDC_W = 1 + 4 + 8 * OW + 3 + 1;
  logic [EDC_W-1:0] edc_o [3];
  logic [EDC_W-1:0] edc_v;

  for (genvar r = 0; r < 3; r++) begin : g_edc
    logic                 yv, corr;
    logic [3:0]           yi;
    logic signed [OW-1:0] yr [4], yim [4];
    pfft_pkg::err_loc_e   loc;
    edc #(.OW(OW)) u_edc (
      .clk, .rst_n, .in_en(f_oen[0]), .in_idx(f_idx[0]),
      .d_re(fx_re), .d_im(fx_im), .xp_re(fp_re), .xp_im(fp_im),
      .syn_valid(chk_valid), .syn(syndrome),
      .y_valid(yv), .y_idx(yi), .y_re(yr), .y_im(yim), .err_loc(loc), .corrected(corr));
    assign edc_o[r] = {yv, yi, yr[0], yr[1], yr[2], yr[3], yim[0], yim[1], yim[2], yim[3], 3'(loc), corr};
  end
  tmr_voter #(.W(EDC_W)) u_vote_edc (.a(edc_o[0]), .b(edc_o[1]), .c(edc_o[2]), .y(edc_v));
  assign {y_valid, y_idx, y_re[0], y_re[1], y_re[2], y_re[3],
          y_im[0], y_im[1], y_im[2], y_im[3], err_loc, corrected} = edc_v;
endmodule
