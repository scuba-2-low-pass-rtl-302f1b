// fsfb_fltr_pkg: widths and coefficients shared by the first-stage feedback
// low-pass filter.
//
// The filter is a 4-pole Butterworth low-pass (cut-off 100 Hz at a per-row
// sample rate of 12195 Hz = 50 MHz / (100 * 41)) built as two direct-form-II
// biquads in series. Both biquads have the numerator 1 + 2z^-1 + z^-2, so only
// the two denominator coefficients of each section are stored.
//
// Coefficients are 15-bit fixed-point numbers with 1 integer and 14 fraction
// bits. They hold the magnitude of each denominator coefficient; the
// denominator of a Butterworth low-pass section is 1 - |b1| z^-1 + |b2| z^-2,
// and the biquad datapath applies those fixed signs. The values are the
// section coefficients multiplied by 2^14 and truncated towards zero:
//   section 1: b1 = -1.9587428340882587 -> 32092, b2 = 0.96134553442399129 -> 15750
//   section 2: b1 = -1.9066292518523014 -> 31238, b2 = 0.90916270571237567 -> 14895
// With these values the DC gain of the chain (input to 32-bit output) is about
// 1216, against 1184 for unquantized coefficients.
//
// Section gains (1/k1, 1/k2) are not applied; instead the output of the
// first section is divided by k3 = 2^11 (arithmetic shift) before it enters
// the second, which keeps the internal state within 29 bits.
package fsfb_fltr_pkg;

  // Filter input sample width (the chain input x_n).
  localparam int unsigned FLTR_IN_WIDTH   = 18;
  // Width of the stored interim values w_n (delay elements).
  localparam int unsigned FLTR_DLY_WIDTH  = 29;
  // Coefficient width and number of fraction bits (format 1.14).
  localparam int unsigned FLTR_COEF_WIDTH = 15;
  localparam int unsigned FLTR_COEF_FRAC  = 14;
  // Filter output width, equal to the queue / wishbone data width.
  localparam int unsigned FLTR_OUT_WIDTH  = 32;
  // Right shift applied between the two biquads (k3 = 2^11) and to the
  // feedback result before it enters the chain.
  localparam int unsigned FLTR_K3_SHIFT   = 11;
  localparam int unsigned FLTR_IN_SHIFT   = 11;
  // Rows per column: depth of the state RAMs and of the result queue.
  localparam int unsigned FLTR_NUM_WORDS  = 64;
  localparam int unsigned FLTR_ADDR_WIDTH = $clog2(FLTR_NUM_WORDS);
  // Rows read out per frame (num_rows of the sample-rate note).
  localparam int unsigned FLTR_NUM_ROWS   = 41;

  typedef logic [FLTR_COEF_WIDTH-1:0] coef_t;

  localparam coef_t FLTR1_B1 = coef_t'(32092);
  localparam coef_t FLTR1_B2 = coef_t'(15750);
  localparam coef_t FLTR2_B1 = coef_t'(31238);
  localparam coef_t FLTR2_B2 = coef_t'(14895);

endpackage
