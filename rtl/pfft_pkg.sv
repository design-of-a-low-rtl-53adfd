// pfft_pkg: constants and types shared by the fault-tolerant parallel FFT.
// Holds the FFT length (16 points, two radix-4 passes), the phase-word width
// used for twiddle angles, the Hamming check patterns of the three Parseval
// checks and the decoded fault location. The check patterns follow the
// code table of the scheme (check c1 covers FFTs 1,2,3; c2 covers 1,2,4;
// c3 covers 1,3,4); the numeric sizes are this design's own choices.
package pfft_pkg;
  localparam int unsigned NPT  = 16;  // FFT length
  localparam int unsigned PW   = 24;  // phase word: full circle = 2**PW

  // Syndrome {P1,P2,P3} produced by a fault in data FFT i (Table of the code)
  localparam logic [2:0] SYN_FFT1 = 3'b111;
  localparam logic [2:0] SYN_FFT2 = 3'b110;
  localparam logic [2:0] SYN_FFT3 = 3'b101;
  localparam logic [2:0] SYN_FFT4 = 3'b011;

  typedef enum logic [2:0] {
    LOC_NONE  = 3'd0,  // all checks pass
    LOC_FFT1  = 3'd1,
    LOC_FFT2  = 3'd2,
    LOC_FFT3  = 3'd3,
    LOC_FFT4  = 3'd4,
    LOC_CHECK = 3'd5   // a single check fired: fault in the check path, data good
  } err_loc_e;

  function automatic err_loc_e decode_syndrome(input logic [2:0] syn);
    unique case (syn)
      3'b000:   return LOC_NONE;
      SYN_FFT1: return LOC_FFT1;
      SYN_FFT2: return LOC_FFT2;
      SYN_FFT3: return LOC_FFT3;
      SYN_FFT4: return LOC_FFT4;
      default:  return LOC_CHECK;  // 100, 010, 001
    endcase
  endfunction
endpackage
