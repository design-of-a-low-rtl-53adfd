// fft_addr_gen: address generator and controller of the 16-point FFT core.
// A start in idle begins a frame; a schedule counter t (t = 0 on the start
// cycle) is decoded into every control of the core:
//   t  0..15  load:     in_take, RAM write of input sample t at address t
//   t 16..31  pass 1:   RAM read of x[n1+4*n2], group n1 = (t-16)/4
//   t 17..32  pass 1:   4-point FFT input valid (start every 4th cycle)
//   t 21..33  factor start for groups n1 = 0..3 (t = 21 + 4*n1)
//   t 22..37  pass 1:   write-back of rotated bin k1 of group n1 to n1+4*k1
//   t 38..53  pass 2:   RAM read of address t-38 (group k1 = (t-38)/4)
//   t 39..54  pass 2:   4-point FFT input valid
//   t 43..58  output:   out_en, out_idx = bin k1 + 4*k2
// busy is high from the cycle after start through t = 58; a start while busy
// is ignored. The latencies assumed are: RAM read 1, 4-point FFT 4 (sample j
// to bin j), CORDIC 1. The schedule itself is this design's own choice.
module fft_addr_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       in_take,     // input sample written this cycle
  output logic       we,          // RAM write enable
  output logic       sel_cordic,  // selector: 1 = CORDIC result, 0 = input
  output logic [3:0] waddr,
  output logic [3:0] raddr,
  output logic       f4_valid,    // 4-point FFT input valid
  output logic       f4_start,    // "Cfft4 start"
  output logic       fct_start,   // "Factor start"
  output logic [1:0] fct_n1,
  output logic       out_en,      // "Outen"
  output logic [3:0] out_idx
);
  localparam logic [5:0] T_LAST = 6'd58;

  logic [5:0] t_r;
  logic [5:0] t;
  logic       act;
  logic [3:0] r1, w1, r2, o;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      t_r  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        t_r  <= 6'd1;
      end
    end else begin
      t_r <= t_r + 6'd1;
      if (t_r == T_LAST) busy <= 1'b0;
    end
  end

  assign act = busy || start;
  assign t   = busy ? t_r : 6'd0;

  always_comb begin
    r1 = 4'(t - 6'd16);
    w1 = 4'(t - 6'd22);
    r2 = 4'(t - 6'd38);
    o  = 4'(t - 6'd43);

    in_take    = act && t <= 6'd15;
    sel_cordic = act && t >= 6'd22 && t <= 6'd37;
    we         = in_take || sel_cordic;
    waddr      = sel_cordic ? {w1[1:0], w1[3:2]} : t[3:0];

    if (act && t >= 6'd16 && t <= 6'd31) raddr = {r1[1:0], r1[3:2]};
    else                                 raddr = r2;

    f4_valid  = act && ((t >= 6'd17 && t <= 6'd32) || (t >= 6'd39 && t <= 6'd54));
    f4_start  = f4_valid && (t <= 6'd32 ? (t[1:0] == 2'd1) : (t[1:0] == 2'd3));
    fct_start = act && t >= 6'd21 && t <= 6'd33 && t[1:0] == 2'd1;
    fct_n1    = 2'((t - 6'd21) >> 2);

    out_en  = act && t >= 6'd43 && t <= T_LAST;
    out_idx = {o[1:0], o[3:2]};
  end
endmodule
