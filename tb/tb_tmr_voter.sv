// tb_tmr_voter: the voter must return the common word when at most one copy
// differs, for random words and random single-copy corruptions.
module tb_tmr_voter;
  localparam int W = 32;
  logic [W-1:0] a, b, c, y, ref_w;
  int checks = 0, failures = 0;
  tmr_voter #(.W(W)) dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      ref_w = $urandom;
      a = ref_w; b = ref_w; c = ref_w;
      case (i % 4)
        1: a = ref_w ^ $urandom;
        2: b = ref_w ^ $urandom;
        3: c = ref_w ^ $urandom;
        default: ;
      endcase
      #1;
      checks++;
      if (y != ref_w) begin failures++; $display("FAIL %h %h %h -> %h", a, b, c, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
