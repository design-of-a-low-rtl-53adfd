// tb_fft16: self-checking testbench of the 16-point FFT core. Drives frames of
// random and full-scale complex samples, collects the 16 bins by out_idx and
// compares each with a double-precision DFT computed here (tolerance 4 LSB per
// component, the bound of the CORDIC rounding in pass 1). Checks the timing:
// first output 43 cycles after start, 16 consecutive outputs, every bin once,
// busy for 59 cycles.
module tb_fft16;
  localparam int DW = 16;
  localparam int OW = DW + 5;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [DW-1:0] in_re, in_im;
  logic busy, in_take, out_en;
  logic [3:0] out_idx;
  logic signed [OW-1:0] out_re, out_im;
  int checks = 0, failures = 0;
  int xr [16], xi [16];
  int gr [16], gi [16];
  int seen;
  int maxerr = 0;

  fft16 #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  task automatic run_frame(input int mode);
    int cyc, first_out, nout, busy_cnt;
    real er, ei, ang;
    for (int n = 0; n < 16; n++) begin
      case (mode)
        0: begin xr[n] = int'($urandom_range(65535)) - 32768; xi[n] = int'($urandom_range(65535)) - 32768; end
        1: begin xr[n] = -32768; xi[n] = -32768; end
        2: begin xr[n] = (n % 2) ? 32767 : -32768; xi[n] = (n % 3) ? -32768 : 32767; end
        default: begin xr[n] = (n == 0) ? 1000 : 0; xi[n] = 0; end
      endcase
    end
    seen = 0; cyc = 0; first_out = -1; nout = 0; busy_cnt = 0;
    @(negedge clk);
    while (cyc < 80) begin
      start = (cyc == 0);
      if (cyc < 16) begin in_re = DW'(xr[cyc]); in_im = DW'(xi[cyc]); end
      else begin in_re = '0; in_im = '0; end
      @(posedge clk);
      #1;
      if (busy) busy_cnt++;
      @(negedge clk);
      cyc++;
      if (out_en) begin
        if (first_out < 0) first_out = cyc;
        nout++;
        gr[out_idx] = int'(out_re);
        gi[out_idx] = int'(out_im);
        seen |= (1 << out_idx);
      end
    end
    checks++; if (first_out != 43) begin failures++; $display("FAIL first output at %0d", first_out); end
    checks++; if (nout != 16 || seen != 16'hffff) begin failures++; $display("FAIL nout=%0d seen=%h", nout, seen); end
    checks++; if (busy_cnt != 58) begin failures++; $display("FAIL busy cycles %0d", busy_cnt); end
    for (int k = 0; k < 16; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 16; n++) begin
        ang = -2.0 * PI * real'(n * k) / 16.0;
        er += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
        ei += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
      end
      checks++;
      if (fabs(er - real'(gr[k])) > 4.0 || fabs(ei - real'(gi[k])) > 4.0) begin
        failures++;
        $display("FAIL mode %0d bin %0d got (%0d,%0d) want (%f,%f)", mode, k, gr[k], gi[k], er, ei);
      end
      if (int'(fabs(er - real'(gr[k]))) > maxerr) maxerr = int'(fabs(er - real'(gr[k])));
    end
  endtask

  initial begin
    in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 1; m < 4; m++) run_frame(m);
    for (int f = 0; f < 40; f++) run_frame(0);
    $display("max rounding error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
