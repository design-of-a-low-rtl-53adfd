// ripple_adder: WIDTH-bit two's-complement adder (sum = a + b, modulo
// 2**WIDTH) as a ripple-carry chain. Bit 0 is a half adder; every higher bit is
// a Peres-gate full adder (PERES = 1, the reversible adder of the design) or a
// conventional gate-level full adder (PERES = 0). Combinational. Callers
// sign-extend the operands so that no overflow can occur; the carry out of the
// top bit is therefore not needed and is left unused.
module ripple_adder #(
  parameter int unsigned WIDTH = 16,
  parameter bit          PERES = 1'b1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);
  logic [WIDTH-1:0] carry;

  half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(sum[0]), .c(carry[0]));

  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    if (PERES) begin : g_peres
      logic g1_unused, g2_unused;
      peres_full_adder u_pfa (.a(a[i]), .b(b[i]), .cin(carry[i-1]),
                              .s(sum[i]), .cout(carry[i]),
                              .g1(g1_unused), .g2(g2_unused));
    end else begin : g_conv
      full_adder u_fa (.a(a[i]), .b(b[i]), .cin(carry[i-1]),
                       .s(sum[i]), .cout(carry[i]));
    end
  end
endmodule
