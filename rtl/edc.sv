// edc: error detection and correction unit of the Parity-SOS-ECC parallel FFT.
// It stores one frame of the four data FFT outputs X1..X4 and the parity FFT
// output X (written at their bin index as they arrive, in any order). When the
// three Parseval check results {P1,P2,P3} arrive (syn_valid) it decodes them
// with the Hamming table (111 -> FFT1, 110 -> FFT2, 101 -> FFT3, 011 -> FFT4,
// 000 -> no error, a single 1 -> error in a check only) and reads the frame
// out in natural bin order, one bin per cycle, replacing the located FFT's
// output by X minus the other three (e.g. Y1 = X - X2 - X3 - X4). The other
// outputs pass unchanged. Outputs are registered: bin r leaves r+3 cycles
// after syn_valid. err_loc and corrected are valid from the cycle after
// syn_valid until the next syndrome. Storing the frame is what lets the
// correction wait for the checks; the next frame's outputs must not start
// before the 16-cycle readout has begun (the FFT cores guarantee that).
module edc #(
  parameter int unsigned OW  = 21,               // data FFT output width
  parameter int unsigned NPT = pfft_pkg::NPT,
  localparam int unsigned PWD = OW + 2,          // parity FFT output width
  localparam int unsigned LG  = $clog2(NPT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_en,
  input  logic [LG-1:0]         in_idx,
  input  logic signed [OW-1:0]  d_re [4],
  input  logic signed [OW-1:0]  d_im [4],
  input  logic signed [PWD-1:0] xp_re,
  input  logic signed [PWD-1:0] xp_im,
  input  logic                  syn_valid,
  input  logic [2:0]            syn,
  output logic                  y_valid,
  output logic [LG-1:0]         y_idx,
  output logic signed [OW-1:0]  y_re [4],
  output logic signed [OW-1:0]  y_im [4],
  output pfft_pkg::err_loc_e    err_loc,
  output logic                  corrected
);
  import pfft_pkg::*;

  typedef struct packed {
    logic signed [3:0][OW-1:0] re;
    logic signed [3:0][OW-1:0] im;
    logic signed [PWD-1:0]     pre;
    logic signed [PWD-1:0]     pim;
  } entry_t;

  entry_t          mem [NPT];
  entry_t          wr_ent, rd_ent;
  logic            rd_act, rd_v;
  logic [LG-1:0]   rd_cnt, rd_idx;
  logic signed [PWD-1:0] fix_re, fix_im;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      wr_ent.re[i] = d_re[i];
      wr_ent.im[i] = d_im[i];
    end
    wr_ent.pre = xp_re;
    wr_ent.pim = xp_im;
  end

  always_ff @(posedge clk) begin
    if (in_en) mem[in_idx] <= wr_ent;
    rd_ent <= mem[rd_cnt];
  end

  // readout sequencing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_act    <= 1'b0;
      rd_cnt    <= '0;
      rd_v      <= 1'b0;
      rd_idx    <= '0;
      err_loc   <= LOC_NONE;
      corrected <= 1'b0;
    end else begin
      rd_v   <= rd_act;
      rd_idx <= rd_cnt;
      if (syn_valid) begin
        rd_act    <= 1'b1;
        rd_cnt    <= '0;
        err_loc   <= decode_syndrome(syn);
        corrected <= decode_syndrome(syn) inside {LOC_FFT1, LOC_FFT2, LOC_FFT3, LOC_FFT4};
      end else if (rd_act) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == LG'(NPT - 1)) rd_act <= 1'b0;
      end
    end
  end

  // reconstruction of the located FFT from the parity FFT
  always_comb begin
    fix_re = rd_ent.pre;
    fix_im = rd_ent.pim;
    for (int i = 0; i < 4; i++) begin
      if (err_loc != err_loc_e'(i + 1)) begin
        fix_re = fix_re - PWD'(rd_ent.re[i]);
        fix_im = fix_im - PWD'(rd_ent.im[i]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_idx   <= '0;
    end else begin
      y_valid <= rd_v;
      y_idx   <= rd_idx;
    end
    for (int i = 0; i < 4; i++) begin
      if (corrected && err_loc == err_loc_e'(i + 1)) begin
        y_re[i] <= OW'(fix_re);
        y_im[i] <= OW'(fix_im);
      end else begin
        y_re[i] <= rd_ent.re[i];
        y_im[i] <= rd_ent.im[i];
      end
    end
  end
endmodule
