// tb_dp_ram: writes random words and reads them back against a shadow array,
// checking the one-cycle read latency and that a read of the address being
// written returns the old word.
module tb_dp_ram;
  localparam int W = 38, D = 16;
  logic clk = 1'b0, we;
  logic [3:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [D];
  logic [W-1:0] expect_q;
  int checks = 0, failures = 0;
  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < D; i++) begin   // fill
      @(negedge clk); we = 1'b1; waddr = 4'(i); wdata = {$urandom, $urandom}; shadow[i] = wdata;
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = i[0]; waddr = 4'($urandom); wdata = {$urandom, $urandom};
      raddr = (i % 5 == 0) ? waddr : 4'($urandom);
      expect_q = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata != expect_q) begin failures++; $display("FAIL addr %0d got %h want %h", raddr, rdata, expect_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
