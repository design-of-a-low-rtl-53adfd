// tb_fault_campaign: fault-injection campaign on the protected parallel FFT
// at its default size. Every frame carries random 16-bit data on the four
// channels and one single-bit error: a random bit (0..20) of the real part
// of a random bin of a random data FFT. For each frame the testbench
//  * predicts, from a double-precision DFT, how much the error moves each
//    check's sum of squares (2*Re(S)*d + d^2 for a change d of bin value S);
//  * requires every check to fire when that change is clearly above the
//    tolerance 2^32 and to stay quiet when it is clearly below (the margin
//    2^31.6 covers the FFT rounding);
//  * requires the outputs to be fully correct whenever the syndrome names
//    the injected FFT, and counts a frame as recovered when all 64 outputs
//    match the DFT (2 LSB, 8 LSB for a rebuilt channel).
// It reports the coverage for each bit position and overall. Errors in the
// top bits (17..20) must be recovered in at least 90 % of the frames.
module tb_fault_campaign;
  localparam int DW = 16;
  localparam int OW = DW + 5;
  localparam int XW = OW + 2;
  localparam int FRAMES = 1050;
  localparam real PI = 3.14159265358979323846;
  localparam real TOLR = 4294967296.0;      // 2^32, the check tolerance
  localparam real MARGIN = 3200000000.0;    // about 2^31.6

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [DW-1:0] x_re [4], x_im [4];
  logic busy, inj_en, chk_valid, corrected, y_valid;
  logic [2:0] inj_sel, syndrome, err_loc;
  logic [3:0] inj_idx, y_idx;
  logic [XW-1:0] inj_mask;
  logic signed [OW-1:0] y_re [4], y_im [4];

  int checks = 0, failures = 0;
  int xs_r [4][16], xs_i [4][16];
  real rf_r [4][16], rf_i [4][16];
  int n_inj [21], n_rec [21];
  int n_located = 0, n_missed = 0, n_misloc = 0;

  pfft_sos_ecc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (FRAMES * 100 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  function automatic bit in_check(input int c, input int ch);
    int m [3][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}};
    return (m[c][0] == ch) || (m[c][1] == ch) || (m[c][2] == ch);
  endfunction

  function automatic real check_sum_re(input int c, input int k);
    int m [3][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}};
    return rf_r[m[c][0]][k] + rf_r[m[c][1]][k] + rf_r[m[c][2]][k];
  endfunction

  task automatic run_frame(input int ch, input int bin, input int bp);
    int cyc, ny, rv;
    bit ok, syn_seen;
    real er, ei, ang, delta, dpred, tol;
    logic [2:0] exp_syn, syn_got;
    for (int c = 0; c < 4; c++)
      for (int n = 0; n < 16; n++) begin
        xs_r[c][n] = int'($urandom_range(65535)) - 32768;
        xs_i[c][n] = int'($urandom_range(65535)) - 32768;
      end
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 16; k++) begin
        er = 0.0; ei = 0.0;
        for (int n = 0; n < 16; n++) begin
          ang = -2.0 * PI * real'(n * k) / 16.0;
          er += real'(xs_r[c][n]) * $cos(ang) - real'(xs_i[c][n]) * $sin(ang);
          ei += real'(xs_r[c][n]) * $sin(ang) + real'(xs_i[c][n]) * $cos(ang);
        end
        rf_r[c][k] = er; rf_i[c][k] = ei;
      end
    exp_syn = {in_check(0, ch), in_check(1, ch), in_check(2, ch)};
    // change of the bin caused by flipping bit bp (two's complement, 21 bits)
    rv = int'(rf_r[ch][bin] + ((rf_r[ch][bin] >= 0.0) ? 0.5 : -0.5));
    if (bp == OW - 1) delta = ((rv >>> bp) & 1) != 0 ? real'(1 << bp) : -real'(1 << bp);
    else              delta = ((rv >>> bp) & 1) != 0 ? -real'(1 << bp) : real'(1 << bp);
    inj_en = 1'b1; inj_sel = 3'(ch); inj_idx = 4'(bin); inj_mask = XW'(1) << bp;

    cyc = 0; ny = 0; ok = 1'b1; syn_seen = 1'b0; syn_got = '0;
    @(negedge clk);
    while (cyc < 82) begin
      start = (cyc == 0);
      for (int c = 0; c < 4; c++) begin
        x_re[c] = (cyc < 16) ? DW'(xs_r[c][cyc]) : '0;
        x_im[c] = (cyc < 16) ? DW'(xs_i[c][cyc]) : '0;
      end
      @(negedge clk);
      cyc++;
      if (chk_valid) begin syn_seen = 1'b1; syn_got = syndrome; end
      if (y_valid) begin
        for (int c = 0; c < 4; c++) begin
          tol = (corrected && err_loc == 3'(c + 1)) ? 8.0 : 2.0;
          if (fabs(real'(y_re[c]) - rf_r[c][y_idx]) > tol || fabs(real'(y_im[c]) - rf_i[c][y_idx]) > tol) ok = 1'b0;
        end
        ny++;
      end
    end
    start = 1'b0;
    inj_en = 1'b0;
    checks++;
    if (!syn_seen || ny != 16) begin failures++; $display("FAIL frame did not complete"); end
    // each covering check must agree with the predicted change of its SOS
    for (int c = 0; c < 3; c++) begin
      if (!in_check(c, ch)) begin
        checks++;
        if (syn_got[2-c]) begin failures++; $display("FAIL check %0d fired without a fault in its channels", c + 1); end
      end else begin
        dpred = fabs(2.0 * check_sum_re(c, bin) * delta + delta * delta);
        if (dpred > TOLR + MARGIN) begin
          checks++;
          if (!syn_got[2-c]) begin failures++; $display("FAIL check %0d missed a change of %e", c + 1, dpred); end
        end else if (dpred < TOLR - MARGIN) begin
          checks++;
          if (syn_got[2-c]) begin failures++; $display("FAIL check %0d fired on a change of %e", c + 1, dpred); end
        end
      end
    end
    if (syn_got == exp_syn) begin
      n_located++;
      checks++;
      if (!ok) begin failures++; $display("FAIL located error in FFT%0d not corrected", ch + 1); end
    end else if (syn_got == 3'b000) n_missed++;
    else if (syn_got inside {3'b111, 3'b110, 3'b101, 3'b011}) n_misloc++;
    n_inj[bp]++;
    if (ok) n_rec[bp]++;
  endtask

  initial begin
    int top_inj, top_rec, all_inj, all_rec;
    inj_en = 1'b0; inj_sel = '0; inj_idx = '0; inj_mask = '0;
    for (int c = 0; c < 4; c++) begin x_re[c] = '0; x_im[c] = '0; end
    for (int b = 0; b < OW; b++) begin n_inj[b] = 0; n_rec[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < FRAMES; f++)
      run_frame(int'($urandom_range(3)), int'($urandom_range(15)), f % OW);
    top_inj = 0; top_rec = 0; all_inj = 0; all_rec = 0;
    for (int b = 0; b < OW; b++) begin
      $display("bit %2d: %0d of %0d frames recovered", b, n_rec[b], n_inj[b]);
      all_inj += n_inj[b]; all_rec += n_rec[b];
      if (b >= 17) begin top_inj += n_inj[b]; top_rec += n_rec[b]; end
    end
    $display("located %0d, missed %0d, mislocated %0d; recovered %0d of %0d (%0d%%)",
             n_located, n_missed, n_misloc, all_rec, all_inj, (100 * all_rec) / all_inj);
    checks++;
    if (100 * top_rec < 90 * top_inj) begin
      failures++; $display("FAIL top-bit coverage %0d of %0d", top_rec, top_inj);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
