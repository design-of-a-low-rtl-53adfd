// tb_fft4: streams back-to-back groups of four random 19-bit samples into the
// serial 4-point FFT and checks each bin against an integer 4-point DFT, its
// bin number out_k and its arrival exactly 4 cycles after the matching input.
module tb_fft4;
  localparam int IW = 19, OW = IW + 2;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_valid = 1'b0;
  logic signed [IW-1:0] in_re, in_im;
  logic out_valid;
  logic [1:0] out_k;
  logic signed [OW-1:0] out_re, out_im;
  int checks = 0, failures = 0;
  int ar [64], ai [64];
  int er [64], ei [64];
  int nout = 0;
  fft4 #(.IW(IW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int g;
    for (int i = 0; i < 64; i++) begin
      ar[i] = int'($urandom_range(524287)) - 262144;
      ai[i] = int'($urandom_range(524287)) - 262144;
    end
    for (g = 0; g < 16; g++) begin
      er[4*g]   = ar[4*g] + ar[4*g+1] + ar[4*g+2] + ar[4*g+3];
      ei[4*g]   = ai[4*g] + ai[4*g+1] + ai[4*g+2] + ai[4*g+3];
      er[4*g+1] = ar[4*g] + ai[4*g+1] - ar[4*g+2] - ai[4*g+3];
      ei[4*g+1] = ai[4*g] - ar[4*g+1] - ai[4*g+2] + ar[4*g+3];
      er[4*g+2] = ar[4*g] - ar[4*g+1] + ar[4*g+2] - ar[4*g+3];
      ei[4*g+2] = ai[4*g] - ai[4*g+1] + ai[4*g+2] - ai[4*g+3];
      er[4*g+3] = ar[4*g] - ai[4*g+1] - ar[4*g+2] + ai[4*g+3];
      ei[4*g+3] = ai[4*g] + ar[4*g+1] - ai[4*g+2] - ar[4*g+3];
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 64 + 8; c++) begin
      @(negedge clk);
      // outputs visible in this cycle belong to input c-4
      if (c >= 4 && c - 4 < 64) begin
        checks++;
        if (!out_valid || out_k != 2'((c - 4) % 4) || int'(out_re) != er[c-4] || int'(out_im) != ei[c-4]) begin
          failures++;
          $display("FAIL out %0d v=%b k=%0d got (%0d,%0d) want (%0d,%0d)", c - 4, out_valid, out_k,
                   out_re, out_im, er[c-4], ei[c-4]);
        end
        nout++;
      end else if (c >= 68) begin
        checks++;
        if (out_valid) begin failures++; $display("FAIL spurious output"); end
      end
      in_valid = (c < 64);
      start = (c < 64) && (c % 4 == 0);
      in_re = (c < 64) ? IW'(ar[c]) : '0;
      in_im = (c < 64) ? IW'(ai[c]) : '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
