// tb_mag_compare: p = |a - b| > TOL around the tolerance edge and for random
// values, with TOL = 1000.
module tb_mag_compare;
  localparam int W = 40;
  logic [W-1:0] a, b;
  logic p;
  longint d;
  int checks = 0, failures = 0;
  mag_compare #(.W(W), .TOL(64'd1000)) dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = {$urandom, $urandom} & ((40'd1 << 38) - 1);
      if (i % 2) b = a + W'(int'($urandom_range(2004)) - 1002);
      else       b = {$urandom, $urandom} & ((40'd1 << 38) - 1);
      #1;
      d = longint'(a) - longint'(b);
      if (d < 0) d = -d;
      checks++;
      if (p != (d > 1000)) begin failures++; $display("FAIL a=%0d b=%0d p=%b", a, b, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
