// tb_parseval_check: feeds frames of 16 random input samples and then 16
// output samples (the rounded DFT of the inputs, in digit-reversed order) to
// the Parseval check. Some frames have one output bin disturbed by a large or
// a small amount. The expected flag is computed here from the exact integer
// sums, p = |sum|X|^2 - 16*sum|x|^2| > 2^32; both outcomes must occur.
// p_valid must come two cycles after the last output sample.
module tb_parseval_check;
  localparam int IW = 18, OW = 23;
  localparam real PI = 3.14159265358979323846;
  localparam longint TOL = 64'd1 << 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid = 1'b0;
  logic signed [IW-1:0] in_re, in_im;
  logic signed [OW-1:0] out_re, out_im;
  logic p, p_valid;
  int checks = 0, failures = 0, n_hit = 0, n_pass = 0;
  int xr [16], xi [16], yr [16], yi [16];
  parseval_check #(.IW(IW), .OW(OW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real er, ei, ang;
    longint si, so, d;
    bit exp_p;
    int k;
    in_re = '0; in_im = '0; out_re = '0; out_im = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 60; f++) begin
      si = 0; so = 0;
      for (int n = 0; n < 16; n++) begin
        xr[n] = int'($urandom_range(262143)) - 131072;
        xi[n] = int'($urandom_range(262143)) - 131072;
        si += longint'(xr[n]) * xr[n] + longint'(xi[n]) * xi[n];
      end
      for (k = 0; k < 16; k++) begin
        er = 0.0; ei = 0.0;
        for (int n = 0; n < 16; n++) begin
          ang = -2.0 * PI * real'(n * k) / 16.0;
          er += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
          ei += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
        end
        yr[k] = int'(er); yi[k] = int'(ei);
      end
      case (f % 3)
        1: yr[f % 16] += 1 << int'($urandom_range(20, 15));   // large error
        2: yi[f % 16] += int'($urandom_range(200));           // small error
        default: ;
      endcase
      for (k = 0; k < 16; k++) so += longint'(yr[k]) * yr[k] + longint'(yi[k]) * yi[k];
      d = so - 16 * si;
      if (d < 0) d = -d;
      exp_p = d > TOL;
      for (int n = 0; n < 16; n++) begin
        @(negedge clk); in_valid = 1'b1; in_re = IW'(xr[n]); in_im = IW'(xi[n]);
      end
      @(negedge clk); in_valid = 1'b0;
      repeat (3) @(negedge clk);
      for (int j = 0; j < 16; j++) begin
        k = (j / 4) + 4 * (j % 4);
        out_valid = 1'b1; out_re = OW'(yr[k]); out_im = OW'(yi[k]);
        @(negedge clk);
        checks++;
        if (p_valid) begin failures++; $display("FAIL early p_valid"); end
      end
      out_valid = 1'b0;
      @(negedge clk);
      checks++;
      if (!p_valid || p != exp_p) begin
        failures++; $display("FAIL frame %0d p_valid=%b p=%b want %b (d=%0d)", f, p_valid, p, exp_p, d);
      end
      if (exp_p) n_hit++; else n_pass++;
    end
    checks++;
    if (n_hit == 0 || n_pass == 0) begin failures++; $display("FAIL only one outcome seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
