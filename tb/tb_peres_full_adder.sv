// tb_peres_full_adder: exhaustive test of the two-Peres-gate full adder:
// {cout,s} = a + b + cin, garbage outputs g1 = a and g2 = a xor b.
module tb_peres_full_adder;
  logic a, b, cin, s, cout, g1, g2;
  int checks = 0, failures = 0;
  peres_full_adder dut (.*);
  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v); #1;
      checks++;
      if ({cout, s} != 2'(a + b + cin) || g1 != a || g2 != (a ^ b)) begin
        failures++; $display("FAIL %b%b%b -> c%b s%b g%b%b", a, b, cin, cout, s, g1, g2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
