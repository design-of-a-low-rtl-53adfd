// tb_edc: writes frames of four data outputs and a parity output (parity =
// sum of the true data) in digit-reversed bin order, with one data channel
// corrupted when the syndrome names it. Each Hamming syndrome is applied:
// 111/110/101/011 must rebuild FFT 1/2/3/4 exactly from the parity, 000 and
// single-bit patterns must pass the data unchanged. Checks err_loc,
// corrected and that bin r leaves r+3 cycles after syn_valid, in order.
module tb_edc;
  localparam int OW = 21, PWD = OW + 2;
  logic clk = 1'b0, rst_n = 1'b0, in_en = 1'b0, syn_valid = 1'b0;
  logic [3:0] in_idx, y_idx;
  logic signed [OW-1:0] d_re [4], d_im [4], y_re [4], y_im [4];
  logic signed [PWD-1:0] xp_re, xp_im;
  logic [2:0] syn;
  logic y_valid, corrected;
  pfft_pkg::err_loc_e err_loc;
  int checks = 0, failures = 0;
  int tr [16][4], ti [16][4], cr [16][4];
  localparam logic [2:0] SYNS [8] = '{3'b000, 3'b111, 3'b110, 3'b101, 3'b011, 3'b100, 3'b010, 3'b001};
  edc #(.OW(OW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int bad, k, ps, pi;
    in_idx = '0; syn = '0; xp_re = '0; xp_im = '0;
    for (int c = 0; c < 4; c++) begin d_re[c] = '0; d_im[c] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 40; f++) begin
      syn = SYNS[f % 8];
      bad = (f % 8 >= 1 && f % 8 <= 4) ? (f % 8) - 1 : -1;
      for (k = 0; k < 16; k++)
        for (int c = 0; c < 4; c++) begin
          tr[k][c] = int'($urandom_range(1048575)) - 524288;
          ti[k][c] = int'($urandom_range(1048575)) - 524288;
          cr[k][c] = (c == bad || (bad < 0 && c == f % 4)) ? tr[k][c] ^ (1 << 15) : tr[k][c];
        end
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        k = (j / 4) + 4 * (j % 4);
        in_en = 1'b1; in_idx = 4'(k);
        ps = 0; pi = 0;
        for (int c = 0; c < 4; c++) begin
          d_re[c] = OW'(cr[k][c]); d_im[c] = OW'(ti[k][c]);
          ps += tr[k][c]; pi += ti[k][c];
        end
        xp_re = PWD'(ps); xp_im = PWD'(pi);
      end
      @(negedge clk); in_en = 1'b0;
      syn_valid = 1'b1;
      @(negedge clk); syn_valid = 1'b0;
      for (int cyc = 1; cyc < 22; cyc++) begin
        if (cyc >= 3 && cyc < 19) begin
          checks++;
          if (!y_valid || int'(y_idx) != cyc - 3) begin
            failures++; $display("FAIL f=%0d cyc %0d y_valid=%b y_idx=%0d", f, cyc, y_valid, y_idx);
          end
          k = cyc - 3;
          for (int c = 0; c < 4; c++) begin
            checks++;
            // corrected channel must be the true value; others as received
            if (int'(y_re[c]) != ((c == bad) ? tr[k][c] : cr[k][c]) || int'(y_im[c]) != ti[k][c]) begin
              failures++; $display("FAIL f=%0d syn=%b bin %0d ch %0d got %0d", f, syn, k, c, y_re[c]);
            end
          end
          checks++;
          if (corrected != (bad >= 0) ||
              err_loc != ((bad >= 0) ? pfft_pkg::err_loc_e'(bad + 1) :
                          (syn == 3'b000 ? pfft_pkg::LOC_NONE : pfft_pkg::LOC_CHECK))) begin
            failures++; $display("FAIL f=%0d syn=%b loc=%0d corrected=%b", f, syn, err_loc, corrected);
          end
        end else begin
          checks++;
          if (y_valid) begin failures++; $display("FAIL f=%0d y_valid at cycle %0d", f, cyc); end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
