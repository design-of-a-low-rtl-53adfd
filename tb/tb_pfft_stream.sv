// tb_pfft_stream: back-to-back frames through the protected parallel FFT at
// its default size. A new frame starts on the first cycle busy allows (every
// 59 cycles), so a frame's corrected outputs leave while the next frame is
// being loaded and transformed. Frames alternate between clean ones and ones
// with a large error injected into a data FFT. A monitor compares every
// output bin with the double-precision DFT of its own frame and checks that
// the syndrome of each frame names the injected FFT.
module tb_pfft_stream;
  localparam int DW = 16;
  localparam int OW = DW + 5;
  localparam int XW = OW + 2;
  localparam int FRAMES = 24;
  localparam int PERIOD = 59;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [DW-1:0] x_re [4], x_im [4];
  logic busy, inj_en, chk_valid, corrected, y_valid;
  logic [2:0] inj_sel, syndrome, err_loc;
  logic [3:0] inj_idx, y_idx;
  logic [XW-1:0] inj_mask;
  logic signed [OW-1:0] y_re [4], y_im [4];

  int checks = 0, failures = 0;
  int xs_r [FRAMES][4][16], xs_i [FRAMES][4][16];
  real rf_r [FRAMES][4][16], rf_i [FRAMES][4][16];
  int fault_ch [FRAMES];
  int out_frame = 0, out_bin = 0, chk_frame = 0, n_overlap = 0;

  pfft_sos_ecc_top dut (.*);

  always #5 clk = ~clk;

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (FRAMES * PERIOD + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(negedge clk) if (rst_n) begin
    if (chk_valid) begin
      logic [2:0] want;
      case (fault_ch[chk_frame])
        0: want = 3'b111;  1: want = 3'b110;  2: want = 3'b101;  3: want = 3'b011;
        default: want = 3'b000;
      endcase
      checks++;
      if (syndrome != want) begin failures++; $display("FAIL frame %0d syndrome %b want %b", chk_frame, syndrome, want); end
      chk_frame++;
    end
    if (y_valid) begin
      if (busy) n_overlap++;
      checks++;
      if (int'(y_idx) != out_bin) begin failures++; $display("FAIL frame %0d bin %0d got idx %0d", out_frame, out_bin, y_idx); end
      for (int c = 0; c < 4; c++) begin
        real tol = (fault_ch[out_frame] == c) ? 8.0 : 2.0;
        checks++;
        if (fabs(real'(y_re[c]) - rf_r[out_frame][c][out_bin]) > tol ||
            fabs(real'(y_im[c]) - rf_i[out_frame][c][out_bin]) > tol) begin
          failures++;
          $display("FAIL frame %0d ch %0d bin %0d got %0d want %f", out_frame, c, out_bin, y_re[c], rf_r[out_frame][c][out_bin]);
        end
      end
      out_bin++;
      if (out_bin == 16) begin out_bin = 0; out_frame++; end
    end
  end

  initial begin
    real er, ei, ang;
    inj_en = 1'b0; inj_sel = '0; inj_idx = '0; inj_mask = '0;
    for (int c = 0; c < 4; c++) begin x_re[c] = '0; x_im[c] = '0; end
    for (int f = 0; f < FRAMES; f++) begin
      fault_ch[f] = (f % 2) ? int'($urandom_range(3)) : -1;
      for (int c = 0; c < 4; c++) begin
        for (int n = 0; n < 16; n++) begin
          xs_r[f][c][n] = int'($urandom_range(65535)) - 32768;
          xs_i[f][c][n] = int'($urandom_range(65535)) - 32768;
        end
        for (int k = 0; k < 16; k++) begin
          er = 0.0; ei = 0.0;
          for (int n = 0; n < 16; n++) begin
            ang = -2.0 * PI * real'(n * k) / 16.0;
            er += real'(xs_r[f][c][n]) * $cos(ang) - real'(xs_i[f][c][n]) * $sin(ang);
            ei += real'(xs_r[f][c][n]) * $sin(ang) + real'(xs_i[f][c][n]) * $cos(ang);
          end
          rf_r[f][c][k] = er; rf_i[f][c][k] = ei;
        end
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      // the sign bit of the output: a change of 2^20, always far above the tolerance
      inj_en = (fault_ch[f] >= 0);
      inj_sel = 3'(fault_ch[f] < 0 ? 0 : fault_ch[f]);
      inj_idx = 4'($urandom_range(15));
      inj_mask = XW'(1) << (OW - 1);
      for (int cyc = 0; cyc < PERIOD; cyc++) begin
        checks++;
        if (cyc == 0 && busy) begin failures++; $display("FAIL busy at frame %0d start", f); end
        start = (cyc == 0);
        for (int c = 0; c < 4; c++) begin
          x_re[c] = (cyc < 16) ? DW'(xs_r[f][c][cyc]) : '0;
          x_im[c] = (cyc < 16) ? DW'(xs_i[f][c][cyc]) : '0;
        end
        @(negedge clk);
      end
    end
    start = 1'b0;
    repeat (100) @(negedge clk);
    checks++;
    if (out_frame != FRAMES || chk_frame != FRAMES) begin
      failures++; $display("FAIL %0d frames out, %0d checked", out_frame, chk_frame);
    end
    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL outputs never overlapped a running frame"); end
    $display("frames %0d, output bins leaving during the next frame %0d", out_frame, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
