// tb_fft_selector: the selector must pass the sign-extended input when
// sel_cordic = 0 and the CORDIC value when sel_cordic = 1.
module tb_fft_selector;
  localparam int DW = 16, RW = 19;
  logic sel_cordic;
  logic signed [DW-1:0] in_re, in_im;
  logic signed [RW-1:0] cr_re, cr_im, wd_re, wd_im;
  int checks = 0, failures = 0;
  fft_selector #(.DW(DW), .RW(RW)) dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      sel_cordic = i[0];
      in_re = DW'($urandom); in_im = DW'($urandom);
      cr_re = RW'($urandom); cr_im = RW'($urandom);
      #1;
      checks++;
      if (sel_cordic ? (wd_re != cr_re || wd_im != cr_im)
                     : (int'(wd_re) != int'(in_re) || int'(wd_im) != int'(in_im))) begin
        failures++; $display("FAIL sel=%b", sel_cordic);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
