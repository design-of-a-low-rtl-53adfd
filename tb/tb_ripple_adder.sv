// tb_ripple_adder: random and corner-case test of the 16-bit ripple-carry
// adder, both with Peres-gate stages and with conventional full adders,
// against the + operator.
module tb_ripple_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, s_p, s_c;
  int checks = 0, failures = 0;
  ripple_adder #(.WIDTH(W), .PERES(1'b1)) dut_p (.a, .b, .sum(s_p));
  ripple_adder #(.WIDTH(W), .PERES(1'b0)) dut_c (.a, .b, .sum(s_c));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: begin a = '1; b = 1; end
        1: begin a = 16'h7fff; b = 16'h7fff; end
        2: begin a = 16'h8000; b = 16'h8000; end
        3: begin a = 16'h5555; b = 16'haaab; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      #1;
      checks++;
      if (s_p != W'(a + b) || s_c != W'(a + b)) begin
        failures++; $display("FAIL %h + %h -> %h / %h", a, b, s_p, s_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
