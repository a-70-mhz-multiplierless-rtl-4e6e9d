// hilbert_outq: output quantizer of the FIR Hilbert transformer.
//
// Reduces the full-precision accumulator (ACC_W bits, FRAC fractional bits
// beyond the output's own) to a DATA_W-bit output word: round half up by adding
// 2^(FRAC-1) and dropping FRAC bits, then saturate to the DATA_W-bit signed
// range. Saturation is needed because the sum of the coefficient magnitudes is
// about 2.05, so a worst-case input can exceed full scale. Purely
// combinational; sat_hi/sat_lo flag a clipped sample. The 8-bit output word
// follows the chip; rounding and saturation are this design's own choices.
module hilbert_outq #(
  parameter int unsigned ACC_W  = hilbert_pkg::ACC_W,
  parameter int unsigned FRAC   = hilbert_pkg::COEF_FRAC,
  parameter int unsigned DATA_W = hilbert_pkg::DATA_W
)(
  input  logic signed [ACC_W-1:0]  acc,
  output logic signed [DATA_W-1:0] y,
  output logic                     sat_hi,
  output logic                     sat_lo
);

  localparam int unsigned RW = ACC_W + 1 - FRAC;      // rounded word width

  localparam logic signed [ACC_W:0] HALF_LSB = (ACC_W + 1)'(1 << (FRAC - 1));

  logic signed [RW-1:0]   rnd;
  localparam logic signed [RW-1:0] MAXV = RW'((1 << (DATA_W - 1)) - 1);
  localparam logic signed [RW-1:0] MINV = -RW'(1 << (DATA_W - 1));

  always_comb begin
    rnd    = RW'(((ACC_W + 1)'(acc) + HALF_LSB) >>> FRAC);
    sat_hi = rnd > MAXV;
    sat_lo = rnd < MINV;
    if (sat_hi)      y = MAXV[DATA_W-1:0];
    else if (sat_lo) y = MINV[DATA_W-1:0];
    else             y = rnd[DATA_W-1:0];
  end

endmodule
