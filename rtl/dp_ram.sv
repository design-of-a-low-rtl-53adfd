// dp_ram: simple dual-port RAM of the FFT core, one write port and one read
// port on the same clock. A write stores wdata at waddr at the clock edge; the
// read port registers mem[raddr] every cycle, so read data appear one cycle
// after the address. Reading an address in the cycle it is written returns the
// old contents. No reset on the array (contents are always written before they
// are read by the FFT schedule).
module dp_ram #(
  parameter int unsigned WIDTH = 38,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
