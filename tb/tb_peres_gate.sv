// tb_peres_gate: exhaustive test of the Peres gate against its truth table
// (P = A, Q = A xor B, R = AB xor C), written out row by row.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  // rows ABC = 000..111 -> PQR
  localparam logic [2:0] TT [8] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b110, 3'b111, 3'b101, 3'b100};
  peres_gate dut (.*);
  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v); #1;
      checks++;
      if ({p, q, r} != TT[v]) begin failures++; $display("FAIL %b%b%b -> %b%b%b", a, b, c, p, q, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
