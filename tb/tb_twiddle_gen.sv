// tb_twiddle_gen: after a factor start with group n1 the generator must give
// the phase words of exp(-j*2*pi*n1*k/16) for k = 0..3 on four consecutive
// cycles, and angle 0 when idle.
module tb_twiddle_gen;
  localparam int PW = 24;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1:0] n1;
  logic [PW-1:0] angle;
  int checks = 0, failures = 0;
  twiddle_gen #(.PW(PW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    n1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++)
      for (int g = 0; g < 4; g++) begin
        for (int k = 0; k < 4; k++) begin
          @(negedge clk);
          start = (k == 0); n1 = (k == 0) ? 2'(g) : 2'($urandom);
          #1;
          checks++;
          if (angle != PW'(longint'(1 << PW) - longint'(g * k) * longint'(1 << (PW - 4))))
            if (!(g * k == 0 && angle == 0)) begin
              failures++; $display("FAIL n1=%0d k=%0d angle %h", g, k, angle);
            end
        end
        if (rep == 2) begin
          @(negedge clk); start = 1'b0; #1;
          checks++;
          if (angle != 0) begin failures++; $display("FAIL idle angle %h", angle); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
