// sos_accum: accumulator of the Parseval check. Adds up NPT squared magnitudes
// of one frame. The first valid sample of a frame restarts the sum; when the
// NPT-th valid sample has been added, sum holds the frame total and done pulses
// for one cycle (registered, the cycle after that sample). Samples need not be
// consecutive. Counting samples to find frame boundaries is this design's
// own choice.
module sos_accum #(
  parameter int unsigned IW  = 36,
  parameter int unsigned NPT = pfft_pkg::NPT,
  localparam int unsigned AW = IW + $clog2(NPT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  logic [IW-1:0] din,
  output logic [AW-1:0] sum,
  output logic          done
);
  logic [$clog2(NPT)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      sum  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (valid) begin
        sum <= (cnt == '0) ? AW'(din) : sum + AW'(din);
        cnt <= cnt + 1'b1;
        if (cnt == $bits(cnt)'(NPT - 1)) begin
          done <= 1'b1;
          cnt  <= '0;
        end
      end
    end
  end
endmodule
