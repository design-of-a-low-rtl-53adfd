// tb_full_adder: exhaustive test of the gate-level full adder against
// a + b + cin.
module tb_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;
  full_adder dut (.*);
  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v); #1;
      checks++;
      if ({cout, s} != 2'(a + b + cin)) begin failures++; $display("FAIL %b%b%b -> %b%b", a, b, cin, cout, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
