// hilbert_fir: 31-tap multiplierless FIR Hilbert transformer core.
//
// Shifts the phase of the input signal by -90 degrees over most of the band
// (gain within 2.5% of 1 from 0.05 fs to 0.45 fs) with a linear-phase,
// antisymmetric 31-tap FIR filter whose group delay is 15 samples. There are no
// multipliers: the input sample is multiplied by the eight distinct coefficient
// magnitudes in a shared shift-add network (hilbert_mcm), and the transposed
// adder/delay line (hilbert_tdl) adds the signed products tap by tap, skipping
// the zero taps. The output is rounded and saturated to 8 bits (hilbert_outq).
//
//   x_in -> [x_q] -> hilbert_mcm -> hilbert_tdl -> hilbert_outq -> [y_out]
//
// Interface: one signed 8-bit sample (Q1.7) per clock on x_in, one signed 8-bit
// sample per clock on y_out; y_clip marks an output sample that was saturated. A sample applied before clock edge e enters the
// filter at edge e and its own tap-0 contribution appears on y_out after edge
// e+1: the pipeline latency is 2 clocks on top of the filter's 15-sample group
// delay. rst_n is an asynchronous active-low reset that clears every register.
// The tap count, 8-bit I/O, transposed structure and shared shift-add
// multiplier block follow the chip; the window, coefficient precision, I/O
// registers, rounding and saturation are this design's own choices.
module hilbert_fir
  import hilbert_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x_in,
  output sample_t y_out,
  output logic    y_clip      // y_out was saturated (registered with y_out)
);

  sample_t x_q;
  prod_t   p [NUM_COEF];
  acc_t    acc;
  sample_t y_d;
  logic    sat_hi, sat_lo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_q <= '0;
    else        x_q <= x_in;
  end

  hilbert_mcm u_mcm (
    .x (x_q),
    .p (p)
  );

  hilbert_tdl #(.N_TAPS(NUM_TAPS)) u_tdl (
    .clk   (clk),
    .rst_n (rst_n),
    .p     (p),
    .acc   (acc)
  );

  hilbert_outq #(.ACC_W(ACC_W), .FRAC(COEF_FRAC), .DATA_W(DATA_W)) u_outq (
    .acc    (acc),
    .y      (y_d),
    .sat_hi (sat_hi),
    .sat_lo (sat_lo)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out  <= '0;
      y_clip <= 1'b0;
    end else begin
      y_out  <= y_d;
      y_clip <= sat_hi | sat_lo;
    end
  end

endmodule
