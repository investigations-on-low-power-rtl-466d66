// fir_pkg: sizes and types shared by the parallel linear-phase FIR filter.
//
// The default numbers describe the main configuration: a 3-parallel filter with
// 27 taps, 4-bit input samples and 8-bit coefficients (the sample and
// coefficient widths seen in the reference simulation), products formed in a
// 16-bit signed-digit multiplier whose final addition uses a 16-bit adder.
// The 24-bit accumulation width is this design's own choice: it holds the
// exact result of every sub-filter for up to 147 taps.
package fir_pkg;

  localparam int unsigned NTAPS_DEF = 27;  // filter length M
  localparam int unsigned LPAR_DEF  = 3;   // parallel level L (samples per clock)
  localparam int unsigned DW_DEF    = 4;   // input sample width, signed
  localparam int unsigned CW_DEF    = 8;   // coefficient width, signed
  localparam int unsigned PW_DEF    = 16;  // product width of one multiplier
  localparam int unsigned ACC_W_DEF = 24;  // sub-filter and output width, signed

  // One radix-4 modified Booth digit, value in {-2,-1,0,+1,+2}.
  // neg: the partial product is negated; one: |digit| = 1; two: |digit| = 2.
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_digit_t;

  // How a sub-filter uses the symmetry of its coefficient set.
  typedef enum logic [1:0] {
    FOLD_NONE = 2'd0,  // general coefficients: one multiplier per tap
    FOLD_SYM  = 2'd1,  // h[i] == h[K-1-i]: pre-add tap pairs, share a multiplier
    FOLD_ANTI = 2'd2   // h[i] == -h[K-1-i]: pre-subtract tap pairs
  } fold_t;

  // Radix-4 Booth needs an even multiplier width.
  function automatic int unsigned even_up(int unsigned w);
    return (w % 2 == 0) ? w : w + 1;
  endfunction

endpackage
