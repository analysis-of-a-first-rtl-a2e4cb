// Shared constants and types of the first-order multilevel quantized DPLL.
//
// The loop has three numbers that set its behaviour: N, the number of DCO
// input clock pulses in one nominal period T0; L, the number of quantizing
// levels of the timing error detector over T0/2; and K, the gain of the
// first-order loop filter. The defaults are N = 100, L = 50 and K = 1, the
// values of the one-step-locking example (L*K/N = 1/2). The data words
// between the blocks are signed: a(k), the quantized timing error in units of
// T0/(2L), and c(k), the period correction in units of T0/N. Their 16-bit
// width is this design's choice; it is far wider than the +-4L counts the
// detector can produce.
package dpll_pkg;

  localparam int unsigned N_DEFAULT = 100;
  localparam int unsigned L_DEFAULT = 50;
  localparam int          K_DEFAULT = 1;

  localparam int unsigned ERR_W  = 16;
  localparam int unsigned CORR_W = 16;

  // a(k): TED output, positive when the input leads the reference.
  typedef logic signed [ERR_W-1:0]  err_t;
  // c(k): correction, in DCO input clock pulses; positive shortens the period.
  typedef logic signed [CORR_W-1:0] corr_t;

  localparam corr_t CORR_MAX = corr_t'({1'b0, {(CORR_W-1){1'b1}}});
  localparam corr_t CORR_MIN = corr_t'({1'b1, {(CORR_W-1){1'b0}}});

endpackage
