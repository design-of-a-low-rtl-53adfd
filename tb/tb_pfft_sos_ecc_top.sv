// tb_pfft_sos_ecc_top: end-to-end test of the protected parallel FFT at its
// default size (four 16-point channels of 16-bit samples). Each frame drives
// random samples on the four channels and, depending on the scenario, injects
// one error: into a data FFT (must be located by the table 111/110/101/011 and
// corrected from the parity FFT), into the parity FFT (must change nothing),
// into one output-side check sum (single failing check, nothing corrected), or
// none. The corrected outputs Y1..Y4 are compared with a double-precision DFT
// of each channel (2 LSB for untouched channels, 8 LSB for a rebuilt one).
// The injected bit is chosen so that the sum-of-squares change is well above
// the check tolerance. Timing is checked too: checks report 60 cycles after
// start, Y bins 0..15 leave in order on cycles 63..78. Every mechanism
// (clean frame, correction of each FFT, parity fault, check fault) is counted
// and a mechanism that never happened counts as a failure.
module tb_pfft_sos_ecc_top;
  localparam int DW = 16;
  localparam int OW = DW + 5;
  localparam int XW = OW + 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [DW-1:0] x_re [4], x_im [4];
  logic busy, inj_en, chk_valid, corrected, y_valid;
  logic [2:0] inj_sel, syndrome, err_loc;
  logic [3:0] inj_idx, y_idx;
  logic [XW-1:0] inj_mask;
  logic signed [OW-1:0] y_re [4], y_im [4];

  int checks = 0, failures = 0;
  int n_clean = 0, n_parity = 0, n_check = 0;
  int n_corr [4] = '{0, 0, 0, 0};
  int xs_r [4][16], xs_i [4][16];
  real rf_r [4][16], rf_i [4][16];

  pfft_sos_ecc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // change of |S|^2 of a check sum S when 'delta' is added to its real part
  function automatic real sos_change(input int c, input int k, input real delta);
    int m [3][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}};
    real sr = 0.0;
    for (int j = 0; j < 3; j++) sr += rf_r[m[c][j]][k];
    return 2.0 * sr * delta + delta * delta;
  endfunction

  function automatic bit in_check(input int c, input int ch);
    int m [3][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}};
    return (m[c][0] == ch) || (m[c][1] == ch) || (m[c][2] == ch);
  endfunction

  // scenario: 0 clean, 1..4 data FFT 1..4, 5 parity FFT, 6..8 check sum X5..X7
  task automatic run_frame(input int scen);
    int cyc, chk_at, y_first, ny, bit_pos, bin, ch, tries;
    bit good;
    real er, ei, ang, delta, tol;
    logic [2:0] exp_syn;
    // stimulus and reference
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
    // choose an injection whose effect on every check it reaches is large
    inj_en = (scen != 0);
    inj_sel = 3'(scen - 1);
    exp_syn = 3'b000;
    bin = 0; bit_pos = 19; tries = 0;
    if (scen >= 1 && scen <= 4) begin
      ch = scen - 1;
      exp_syn = {in_check(0, ch), in_check(1, ch), in_check(2, ch)};
    end else if (scen >= 6) begin
      exp_syn = 3'b100 >> (scen - 6);
    end
    do begin
      good = 1'b1;
      bin = int'($urandom_range(15));
      bit_pos = int'($urandom_range(19, 17));
      tries++;
      if (scen >= 1 && scen <= 4) begin
        ch = scen - 1;
        delta = (((int'(rf_r[ch][bin] + ((rf_r[ch][bin] >= 0.0) ? 0.5 : -0.5)) >>> bit_pos) & 1) != 0)
                ? -real'(1 << bit_pos) : real'(1 << bit_pos);
        for (int c = 0; c < 3; c++)
          if (in_check(c, ch) && fabs(sos_change(c, bin, delta)) < 17179869184.0) good = 1'b0;
      end else if (scen >= 6) begin
        // a high bit of the 23-bit check sum X5/X6/X7
        bit_pos = int'($urandom_range(21, 19));
        delta = real'(1 << bit_pos);   // XOR gives +delta or -delta: test both
        if (fabs(sos_change(scen - 6, bin, delta)) < 17179869184.0 ||
            fabs(sos_change(scen - 6, bin, -delta)) < 17179869184.0) good = 1'b0;
      end
    end while (!good && tries < 200);
    inj_idx  = 4'(bin);
    inj_mask = XW'(1) << bit_pos;

    cyc = 0; chk_at = -1; y_first = -1; ny = 0;
    @(negedge clk);
    while (cyc < 90) begin
      start = (cyc == 0);
      for (int c = 0; c < 4; c++) begin
        x_re[c] = (cyc < 16) ? DW'(xs_r[c][cyc]) : '0;
        x_im[c] = (cyc < 16) ? DW'(xs_i[c][cyc]) : '0;
      end
      @(negedge clk);
      cyc++;
      if (chk_valid) begin
        chk_at = cyc;
        check(syndrome == exp_syn, $sformatf("scen %0d syndrome %b want %b", scen, syndrome, exp_syn));
      end
      if (y_valid) begin
        if (y_first < 0) y_first = cyc;
        check(y_idx == 4'(ny), $sformatf("scen %0d y_idx %0d want %0d", scen, y_idx, ny));
        check(err_loc == ((scen >= 1 && scen <= 4) ? 3'(scen) : (scen >= 6 ? 3'd5 : 3'd0)),
              $sformatf("scen %0d err_loc %0d", scen, err_loc));
        check(corrected == (scen >= 1 && scen <= 4), $sformatf("scen %0d corrected %0d", scen, corrected));
        for (int c = 0; c < 4; c++) begin
          tol = (scen == c + 1) ? 8.0 : 2.0;
          check(fabs(real'(y_re[c]) - rf_r[c][y_idx]) <= tol && fabs(real'(y_im[c]) - rf_i[c][y_idx]) <= tol,
                $sformatf("scen %0d ch %0d bin %0d got (%0d,%0d) want (%f,%f)", scen, c, y_idx,
                          y_re[c], y_im[c], rf_r[c][y_idx], rf_i[c][y_idx]));
        end
        ny++;
      end
    end
    start = 1'b0;
    check(chk_at == 60, $sformatf("scen %0d check result at cycle %0d", scen, chk_at));
    check(y_first == 63 && ny == 16, $sformatf("scen %0d first Y at %0d, %0d bins", scen, y_first, ny));
    // mechanism counters
    case (scen)
      0: n_clean++;
      1, 2, 3, 4: if (corrected && err_loc == 3'(scen)) n_corr[scen-1]++;
      5: if (!corrected && err_loc == 3'd0) n_parity++;
      default: if (err_loc == 3'd5) n_check++;
    endcase
    inj_en = 1'b0;
  endtask

  initial begin
    inj_en = 1'b0; inj_sel = '0; inj_idx = '0; inj_mask = '0;
    for (int c = 0; c < 4; c++) begin x_re[c] = '0; x_im[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int rep = 0; rep < 6; rep++)
      for (int s = 0; s < 9; s++) run_frame(s);
    for (int f = 0; f < 20; f++) run_frame(int'($urandom_range(8)));
    $display("mechanisms: clean=%0d corr1=%0d corr2=%0d corr3=%0d corr4=%0d parity_fault=%0d check_fault=%0d",
             n_clean, n_corr[0], n_corr[1], n_corr[2], n_corr[3], n_parity, n_check);
    check(n_clean > 0, "no clean frame");
    for (int i = 0; i < 4; i++) check(n_corr[i] > 0, $sformatf("FFT%0d never corrected", i + 1));
    check(n_parity > 0, "parity-FFT fault never ignored");
    check(n_check > 0, "check-path fault never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
