// ecc_encoder: Hamming check combinations of four complex channels a1..a4:
//   s5 = a1 + a2 + a3,  s6 = a1 + a2 + a4,  s7 = a1 + a3 + a4,
//   sp = a1 + a2 + a3 + a4  (the parity-FFT input).
// Used on the FFT inputs (x5, x6, x7 and the parity input x) and on the FFT
// outputs (X5, X6, X7). All sums are formed with W+2-bit ripple_adder
// instances (Peres-gate full adders), reusing a1+a2 and a3+a4: six adders per
// real/imaginary part. Combinational; results are exact (W+2 bits).
module ecc_encoder #(
  parameter int unsigned W  = 16,
  localparam int unsigned SW = W + 2
) (
  input  logic signed [W-1:0]  a_re [4],
  input  logic signed [W-1:0]  a_im [4],
  output logic signed [SW-1:0] s5_re, s5_im,
  output logic signed [SW-1:0] s6_re, s6_im,
  output logic signed [SW-1:0] s7_re, s7_im,
  output logic signed [SW-1:0] sp_re, sp_im
);
  logic [SW-1:0] e [2][4];     // sign-extended operands: [re/im][channel]
  logic [SW-1:0] t12 [2], t34 [2], r5 [2], r6 [2], r7 [2], rp [2];

  for (genvar c = 0; c < 2; c++) begin : g_part
    for (genvar i = 0; i < 4; i++) begin : g_ext
      assign e[c][i] = (c == 0) ? SW'(a_re[i]) : SW'(a_im[i]);
    end
    ripple_adder #(.WIDTH(SW)) u_a12 (.a(e[c][0]), .b(e[c][1]), .sum(t12[c]));
    ripple_adder #(.WIDTH(SW)) u_a34 (.a(e[c][2]), .b(e[c][3]), .sum(t34[c]));
    ripple_adder #(.WIDTH(SW)) u_s5  (.a(t12[c]),  .b(e[c][2]), .sum(r5[c]));
    ripple_adder #(.WIDTH(SW)) u_s6  (.a(t12[c]),  .b(e[c][3]), .sum(r6[c]));
    ripple_adder #(.WIDTH(SW)) u_s7  (.a(e[c][0]), .b(t34[c]),  .sum(r7[c]));
    ripple_adder #(.WIDTH(SW)) u_sp  (.a(t12[c]),  .b(t34[c]),  .sum(rp[c]));
  end

  assign s5_re = signed'(r5[0]);  assign s5_im = signed'(r5[1]);
  assign s6_re = signed'(r6[0]);  assign s6_im = signed'(r6[1]);
  assign s7_re = signed'(r7[0]);  assign s7_im = signed'(r7[1]);
  assign sp_re = signed'(rp[0]);  assign sp_im = signed'(rp[1]);
endmodule
