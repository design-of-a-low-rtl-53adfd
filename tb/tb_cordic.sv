// tb_cordic: rotates random 19-bit vectors (kept inside the headroom the
// CORDIC assumes) by random angles and by every 16-point twiddle angle, and
// compares with a double-precision rotation: error at most 1 LSB per
// component, result one cycle after the input.
module tb_cordic;
  localparam int IW = 19, PW = 24;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  logic signed [IW-1:0] x_in, y_in, x_out, y_out;
  logic [PW-1:0] angle;
  real ex, ey, th;
  int checks = 0, failures = 0;
  cordic #(.IW(IW), .PW(PW)) dut (.*);
  always #5 clk = ~clk;
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x_in = IW'(int'($urandom_range(262143)) - 131072);   // |x|,|y| <= 2^17
      y_in = IW'(int'($urandom_range(262143)) - 131072);
      if (i < 16) angle = PW'(-(i << (PW - 4)));
      else        angle = PW'($urandom);
      th = 2.0 * PI * real'(angle) / real'(1 << PW);
      ex = real'(x_in) * $cos(th) - real'(y_in) * $sin(th);
      ey = real'(x_in) * $sin(th) + real'(y_in) * $cos(th);
      @(posedge clk); #1;
      checks++;
      if (fabs(real'(x_out) - ex) > 1.0 || fabs(real'(y_out) - ey) > 1.0) begin
        failures++;
        $display("FAIL (%0d,%0d) angle %h got (%0d,%0d) want (%f,%f)", x_in, y_in, angle, x_out, y_out, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
