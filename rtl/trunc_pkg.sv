// trunc_pkg: types and constants shared by the truncated-width multipliers
// and the 2048-point FFT built on them.
//
// comp_method_e selects how a fixed-width multiplier replaces the dropped
// low-order partial-product columns:
//   COMP_NONE  - direct truncation, no carry is added
//   COMP_TYPE1 - carry estimated from the multiplier's operand bits
//                (a_j for Baugh-Wooley, nonzero Booth digits for Booth)
//   COMP_TYPE2 - carry estimated from the bits of the most significant
//                dropped column (beta) with conditional expectations
//   COMP_TYPE3 - Baugh-Wooley: per-width table on beta; Booth: beta/2 plus
//                a constant (3/8 of every dropped bit, weighted)
// The FFT word format (12-bit complex data, 9-bit twiddles, 5-bit block
// exponent) is also defined here.
package trunc_pkg;

  typedef enum logic [1:0] {
    COMP_NONE  = 2'd0,
    COMP_TYPE1 = 2'd1,
    COMP_TYPE2 = 2'd2,
    COMP_TYPE3 = 2'd3
  } comp_method_e;

  localparam int unsigned FFT_N   = 2048;  // transform length
  localparam int unsigned FFT_AW  = 11;    // log2(FFT_N)
  localparam int unsigned DATA_W  = 12;    // real / imaginary sample width
  localparam int unsigned TW_W    = 9;     // twiddle width, 8 fraction bits
  localparam int unsigned EXP_W   = 5;     // block exponent width

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic        [EXP_W-1:0]  bexp_t;

  // One stored word: complex sample plus its block exponent.
  typedef struct packed {
    bexp_t   e;
    sample_t im;
    sample_t re;
  } mem_word_t;

  // 3-bit digit reversal used by the radix-2^3 butterfly ordering.
  function automatic logic [2:0] rev3(input logic [2:0] v);
    return {v[0], v[1], v[2]};
  endfunction

endpackage
