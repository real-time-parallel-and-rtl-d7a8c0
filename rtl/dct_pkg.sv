// dct_pkg: shared constants and elaboration-time helpers for the frame-recursive
// lattice 2-D DCT.
//
// Number format: every datapath word is a W-bit two's-complement number with F
// fraction bits. The 12-bit word length is the one the design is planned around;
// the split into 10 integer and 2 fraction bits is this design's own choice, made
// so that 8-bit signed (level-shifted) pixels and every intermediate value of an
// 8x8 transform fit without overflow.
//
// The lattice coefficients are cosines and sines of multiples of pi/(2N). They
// are computed here at elaboration time with $cos/$sin and turned into the ROM
// contents of the distributed-arithmetic multipliers (see da_cmul), so no table
// is stored in the sources.
package dct_pkg;

  localparam int  DEF_N     = 8;   // transform size N
  localparam int  DEF_W     = 12;  // datapath word length
  localparam int  DEF_F     = 2;   // fraction bits of a datapath word
  localparam int  DEF_PIX_W = 8;   // pixel width (signed, level shifted)
  localparam real PI        = 3.14159265358979323846;

  // Gamma_c(n) = cos(n*pi*k/(2N)) and Gamma_s(n) = sin(n*pi*k/(2N)).
  function automatic real gamma_c(int n, int k, int nn);
    return $cos(real'(n) * PI * real'(k) / (2.0 * real'(nn)));
  endfunction

  function automatic real gamma_s(int n, int k, int nn);
    return $sin(real'(n) * PI * real'(k) / (2.0 * real'(nn)));
  endfunction

  // Gain applied to the k = 0 (and k = N) terms: 2/(sqrt(2) N).
  function automatic real dc_gain(int nn);
    return 2.0 / ($sqrt(2.0) * real'(nn));
  endfunction

endpackage
