// tb_ecc_encoder: check sums s5 = a1+a2+a3, s6 = a1+a2+a4, s7 = a1+a3+a4 and
// sp = a1+a2+a3+a4 of random and extreme 16-bit complex samples.
module tb_ecc_encoder;
  localparam int W = 16, SW = W + 2;
  logic signed [W-1:0] a_re [4], a_im [4];
  logic signed [SW-1:0] s5_re, s5_im, s6_re, s6_im, s7_re, s7_im, sp_re, sp_im;
  int checks = 0, failures = 0;
  int r [4], m [4];
  ecc_encoder #(.W(W)) dut (.*);
  task automatic chk(input int got, input int want, input string nm);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s got %0d want %0d", nm, got, want); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int c = 0; c < 4; c++) begin
        r[c] = (i == 0) ? -32768 : (i == 1) ? 32767 : int'($urandom_range(65535)) - 32768;
        m[c] = (i == 0) ? -32768 : (i == 1) ? 32767 : int'($urandom_range(65535)) - 32768;
        a_re[c] = W'(r[c]); a_im[c] = W'(m[c]);
      end
      #1;
      chk(int'(s5_re), r[0] + r[1] + r[2], "s5_re");  chk(int'(s5_im), m[0] + m[1] + m[2], "s5_im");
      chk(int'(s6_re), r[0] + r[1] + r[3], "s6_re");  chk(int'(s6_im), m[0] + m[1] + m[3], "s6_im");
      chk(int'(s7_re), r[0] + r[2] + r[3], "s7_re");  chk(int'(s7_im), m[0] + m[2] + m[3], "s7_im");
      chk(int'(sp_re), r[0] + r[1] + r[2] + r[3], "sp_re");
      chk(int'(sp_im), m[0] + m[1] + m[2] + m[3], "sp_im");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
