// hilbert_tdl: transposed-form adder/delay line of the FIR Hilbert transformer.
//
// In transposed form every tap adds its product to the partial sum coming
// from the tap above and registers the result, so the input sample drives all
// products at once and the critical path is one structural adder:
//   r[N-1] <= h[N-1]x,   r[k] <= h[k]x + r[k+1] (k = 1..N-2),   y = h[0]x + r[1].
// With the centre tap at HALF = (N-1)/2, tap k has n = k - HALF. Taps with even
// n are zero, so their stage is a plain delay (no adder); taps with odd n use
// the shared product p[(|n|-1)/2] with the sign of n (h(-n) = -h(n)). For N = 31
// that is 16 adders/subtracters and 30 registers of ACC_W bits.
//
// Ports: p are the MCM products of the current sample (all taps see the same
// sample); acc is the combinational filter output, full precision, scaled by
// 2^COEF_FRAC. One sample per clock; acc(n) = sum_k h[k] x(n-k) where x(n) is
// the sample whose products are on p in the same cycle. Asynchronous active-low
// reset clears the line. The transposed structure and the zero-tap/antisymmetry
// savings follow the chip; widths and reset are this design's own choices.
module hilbert_tdl
  import hilbert_pkg::*;
#(
  parameter int unsigned N_TAPS = NUM_TAPS            // must be 3 mod 4
)(
  input  logic  clk,
  input  logic  rst_n,
  input  prod_t p   [(N_TAPS + 1) / 4],
  output acc_t  acc
);

  localparam int unsigned NH = (N_TAPS - 1) / 2;

  // term[k]: signed contribution of tap k (zero for even n)
  acc_t term [N_TAPS];
  // r[k], k = 1..N_TAPS-1 (r[0] unused); r[N_TAPS] is a constant zero
  acc_t r    [N_TAPS + 1];

  if (N_TAPS % 4 != 3) begin : g_bad_taps
    $error("hilbert_tdl: N_TAPS must be 3 mod 4 so that the end taps are non-zero");
  end

  for (genvar k = 0; k < N_TAPS; k++) begin : g_term
    localparam int N = k - int'(NH);
    if (N % 2 == 0) begin : g_zero
      assign term[k] = '0;
    end else if (N > 0) begin : g_pos
      assign term[k] = acc_t'(p[(N - 1) / 2]);
    end else begin : g_neg
      assign term[k] = -acc_t'(p[(-N - 1) / 2]);
    end
  end

  assign r[0]      = '0;
  assign r[N_TAPS] = '0;

  for (genvar k = 1; k < N_TAPS; k++) begin : g_stage
    localparam int N = k - int'(NH);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          r[k] <= '0;
      else if (N % 2 == 0) r[k] <= r[k + 1];            // zero tap: delay only
      else                 r[k] <= r[k + 1] + term[k];  // structural adder
    end
  end

  assign acc = r[1] + term[0];

endmodule
