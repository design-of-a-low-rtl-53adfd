// twiddle_gen: rotation factor generator of the FFT core. A factor start
// (start = 1) carries the group index n1 of the first radix-4 pass; on that
// cycle and the three following cycles it outputs the angle of the twiddle
// W16^(n1*k) = exp(-j*2*pi*n1*k/16) for k = 0,1,2,3 as a PW-bit phase word
// (full circle = 2**PW), ready for the CORDIC. The angle is 0 when idle.
module twiddle_gen #(
  parameter int unsigned PW = pfft_pkg::PW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [1:0]    n1,
  output logic [PW-1:0] angle
);
  logic [1:0] n1_r;
  logic [1:0] k_r;     // next k; 0 means idle
  logic [3:0] prod;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n1_r <= '0;
      k_r  <= '0;
    end else if (start) begin
      n1_r <= n1;
      k_r  <= 2'd1;
    end else if (k_r != 2'd0) begin
      k_r <= k_r + 2'd1;
    end
  end

  // n1*k ranges over 0..9; angle = -(n1*k) * 2**PW / 16
  assign prod  = start ? 4'd0 : {2'b00, n1_r} * {2'b00, k_r};
  assign angle = PW'(-(PW'(prod) << (PW - 4)));
endmodule
