// fft_pkg: constants and types shared by the fault-tolerant pipelined FFT.
//
// The protected system processes four independent 8-point complex streams.
// Three Parseval (sum-of-squares) checks, each covering three of the four
// streams, give a 3-bit syndrome {c1,c2,c3}. The syndrome table follows the
// Hamming-style error table of the design: 000 no error, 111 stream 1,
// 110 stream 2, 101 stream 3, 011 stream 4. The remaining patterns (a single
// check firing, or an error pattern no single stream explains) are this
// implementation's "uncorrectable" class.
package fft_pkg;

  // Transform length and number of protected data streams.
  localparam int unsigned FFT_N    = 8;
  localparam int unsigned NUM_CH   = 4;

  // Where the error was located for one output frame.
  typedef enum logic [2:0] {
    LOC_NONE   = 3'd0,
    LOC_Z1     = 3'd1,
    LOC_Z2     = 3'd2,
    LOC_Z3     = 3'd3,
    LOC_Z4     = 3'd4,
    LOC_UNCORR = 3'd5
  } err_loc_e;

  // Syndrome decoder. syn = {c1, c2, c3}; c1 covers streams 1,2,3,
  // c2 covers 1,2,4 and c3 covers 1,3,4.
  function automatic err_loc_e decode_syndrome(input logic [2:0] syn);
    unique case (syn)
      3'b000:  return LOC_NONE;
      3'b111:  return LOC_Z1;
      3'b110:  return LOC_Z2;
      3'b101:  return LOC_Z3;
      3'b011:  return LOC_Z4;
      default: return LOC_UNCORR;
    endcase
  endfunction

endpackage
