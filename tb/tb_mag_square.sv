// tb_mag_square: re^2 + im^2 for random and extreme 18-bit samples, against
// integer arithmetic.
module tb_mag_square;
  localparam int W = 18;
  logic signed [W-1:0] re, im;
  logic [2*W-1:0] sq;
  longint exp_v;
  int checks = 0, failures = 0;
  mag_square #(.W(W)) dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      case (i)
        0: begin re = -(1 <<< (W-1)); im = -(1 <<< (W-1)); end
        1: begin re = (1 <<< (W-1)) - 1; im = -(1 <<< (W-1)); end
        2: begin re = 0; im = 0; end
        default: begin re = W'($urandom); im = W'($urandom); end
      endcase
      #1;
      exp_v = longint'(re) * longint'(re) + longint'(im) * longint'(im);
      checks++;
      if (longint'(sq) != exp_v) begin failures++; $display("FAIL %0d %0d -> %0d want %0d", re, im, sq, exp_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
