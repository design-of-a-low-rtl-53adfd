// tb_sos_accum: frames of 16 random values, with gaps between samples, must
// give their exact sum with a one-cycle done pulse after the 16th sample; the
// next frame restarts the sum.
module tb_sos_accum;
  localparam int IW = 36, AW = IW + 4;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [IW-1:0] din;
  logic [AW-1:0] sum;
  logic done;
  longint ref_sum;
  int checks = 0, failures = 0;
  sos_accum #(.IW(IW), .NPT(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 50; f++) begin
      ref_sum = 0;
      for (int n = 0; n < 16; n++) begin
        @(negedge clk);
        valid = 1'b1;
        din = (f == 0) ? '1 : {$urandom, $urandom};
        ref_sum += longint'(din);
        #1;
        checks++;
        if (done) begin failures++; $display("FAIL early done f=%0d n=%0d", f, n); end
        if (f % 3 == 1 && n < 15) begin @(negedge clk); valid = 1'b0; end
      end
      @(negedge clk);
      valid = 1'b0;
      checks++;
      if (!done || longint'(sum) != ref_sum) begin
        failures++; $display("FAIL frame %0d done=%b sum %0d want %0d", f, done, sum, ref_sum);
      end
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("FAIL done longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
