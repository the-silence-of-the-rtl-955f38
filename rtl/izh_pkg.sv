// izh_pkg: shared fixed-point format and constants of the duplex Izhikevich
// neuron datapath.
//
// All neuron state (v, u, alpha, beta, input current) is held as a signed
// 30-bit two's-complement number with 16 integer bits and 14 fraction bits
// (Q16.14), the word length chosen for this neuron. The helper function
// to_fix() turns a real constant into that format at elaboration time, so
// the constants below stay readable.
package izh_pkg;

  localparam int unsigned WORD = 30;   // total word length
  localparam int unsigned FRAC = 14;   // fraction bits

  typedef logic signed [WORD-1:0] fix_t;

  // Real to Q16.14, rounded to nearest.
  function automatic fix_t to_fix(input real r);
    real scaled;
    scaled = r * real'(1 << FRAC);
    if (scaled >= 0.0) return fix_t'($rtoi(scaled + 0.5));
    else               return fix_t'(-$rtoi(-scaled + 0.5));
  endfunction

  // Constant coefficients as sums of powers of two. Bit k of a mask set
  // means that 2^-k is one term of the coefficient (bit 0 stands for 1.0).
  localparam int unsigned MASKW = 16;
  typedef logic [MASKW-1:0] cmask_t;

  // 0.04 ~ 2^-5 + 2^-7 + 2^-11 = 0.0395508
  localparam cmask_t MASK_004 = cmask_t'((1 << 5) | (1 << 7) | (1 << 11));
  // a = 0.02 ~ 2^-6 + 2^-8 + 2^-12 = 0.0198975
  localparam cmask_t MASK_A   = cmask_t'((1 << 6) | (1 << 8) | (1 << 12));
  // b = 0.2 ~ 2^-3 + 2^-4 + 2^-7 + 2^-8 = 0.1992188
  localparam cmask_t MASK_B   = cmask_t'((1 << 3) | (1 << 4) | (1 << 7) | (1 << 8));

  // Euler step dt = 2^-DT_SHIFT ms = 1/32 ms
  localparam int unsigned DT_SHIFT = 5;

endpackage
