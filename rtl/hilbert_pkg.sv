// hilbert_pkg: word widths, tap count and coefficient set shared by the
// 31-tap FIR Hilbert transformer.
//
// The filter is the ideal Hilbert impulse response h(n) = 2/(pi*n) for odd n,
// 0 for even n, truncated to n = -15..15 (31 taps), shaped by a Hamming window
// and shifted by 15 samples to make it causal. Only odd n are non-zero and
// h(-n) = -h(n), so the whole filter is defined by eight magnitudes
//   COEF[m] = round(1024 * 2/(pi*n) * (0.54 + 0.46*cos(pi*n/15))), n = 2m+1.
// The tap count and the 8-bit I/O words follow the chip specification; the
// window, the 10 fractional coefficient bits and the internal widths are this
// design's own choices.
package hilbert_pkg;

  // Filter order and word lengths
  localparam int unsigned NUM_TAPS  = 31;                 // taps k = 0..30
  localparam int unsigned NUM_COEF  = (NUM_TAPS + 1) / 4; // distinct magnitudes: 8
  localparam int unsigned DATA_W    = 8;                  // input/output word, Q1.7
  localparam int unsigned COEF_FRAC = 10;                 // coefficient fraction bits
  localparam int unsigned PROD_W    = DATA_W + COEF_FRAC; // |x*c| < 2^17 -> 18 bits signed
  localparam int unsigned ACC_W     = PROD_W + 2;         // sum |c| = 2100 < 2^11 -> 20 bits

  // Coefficient magnitudes for n = 1, 3, 5, ..., 15 (scaled by 2^COEF_FRAC).
  // Reference table: hilbert_mcm hard-wires these values in its shift-add
  // network, and the testbenches check them against the window formula.
  localparam int COEF [NUM_COEF] = '{645, 198, 100, 55, 29, 14, 6, 3};

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

endpackage
