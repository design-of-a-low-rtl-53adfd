// tb_fft_addr_gen: runs two frames through the FFT address generator (with a
// start pulse during the first frame, which must be ignored) and checks every
// control output cycle by cycle against the radix-4 schedule: loading of x[t]
// at address t, pass-1 reads of x[n1+4*n2], pass-1 write-back to the read
// address 6 cycles later, factor starts for n1 = 0..3, pass-2 reads 0..15,
// outputs of bin k1+4*k2 on cycles 43..58, and 58 busy cycles.
module tb_fft_addr_gen;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, in_take, we, sel_cordic, f4_valid, f4_start, fct_start, out_en;
  logic [3:0] waddr, raddr, out_idx;
  logic [1:0] fct_n1;
  int checks = 0, failures = 0;
  int rd_hist [80];
  fft_addr_gen dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input int t, input string nm);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0d %s", t, nm); end
  endtask
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int busy_cnt;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 2; fr++) begin
      busy_cnt = 0;
      for (int t = 0; t < 62; t++) begin
        @(negedge clk);
        start = (t == 0) || (t == 30);   // the second pulse is ignored
        #1;
        if (busy) busy_cnt++;
        rd_hist[t] = int'(raddr);
        chk(in_take == (t < 16), t, "in_take");
        if (t < 16) chk(we && !sel_cordic && waddr == 4'(t), t, "load write");
        if (t >= 16 && t < 32) chk(int'(raddr) == ((t - 16) / 4) + 4 * ((t - 16) % 4), t, "pass-1 read");
        chk(f4_valid == ((t >= 17 && t <= 32) || (t >= 39 && t <= 54)), t, "f4_valid");
        chk(f4_start == ((t >= 17 && t <= 32 && (t - 17) % 4 == 0) || (t >= 39 && t <= 54 && (t - 39) % 4 == 0)), t, "f4_start");
        chk(fct_start == (t >= 21 && t <= 33 && (t - 21) % 4 == 0), t, "fct_start");
        if (fct_start) chk(int'(fct_n1) == (t - 21) / 4, t, "fct_n1");
        chk(sel_cordic == (t >= 22 && t <= 37), t, "sel_cordic");
        if (t >= 22 && t <= 37) chk(we && int'(waddr) == rd_hist[t - 6], t, "write-back address");
        if (t >= 16 && t < 22) chk(!we, t, "no write");
        if (t >= 38 && t <= 53) chk(int'(raddr) == t - 38, t, "pass-2 read");
        chk(out_en == (t >= 43 && t <= 58), t, "out_en");
        if (out_en) chk(int'(out_idx) == (t - 43) / 4 + 4 * ((t - 43) % 4), t, "out_idx");
        if (t >= 38) chk(!we, t, "no write after pass 1");
      end
      chk(busy_cnt == 58, 0, $sformatf("busy cycles %0d", busy_cnt));
      start = 1'b0;
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
