// tb_hilbert_fir: end-to-end test of the 31-tap FIR Hilbert transformer.
//
// The reference is a direct-form convolution with coefficients recomputed in
// real arithmetic from the Hamming-windowed ideal Hilbert response, followed by
// round-half-up to 8 bits and clipping. It shares nothing with the RTL's
// transposed form or shift-add network. Every output sample is compared, with
// the 2-clock pipeline latency: a sample applied before clock edge i must show
// its tap-0 contribution on y_out after edge i+1. The stimulus runs through:
//   - an impulse, whose two main lobes (taps 14 and 16) must appear on the
//     exact cycles 15 and 17 clocks after the impulse's output slot;
//   - uniform random samples over the full 8-bit range;
//   - a sine at fs/8 and a cosine at fs/16, whose outputs must match the
//     -90 degree shifted input (delayed by 15 samples) to within 3 LSB;
//   - worst-case sign patterns that drive the output into positive and
//     negative saturation (y_clip must flag them);
//   - a reset in mid-stream, after which the filter must restart from zero.
// Each of these mechanisms is counted; one that never happened is a failure.
// Runs with the design's default parameters.
module tb_hilbert_fir;
  import hilbert_pkg::*;

  localparam real PI   = 3.14159265358979323846;
  localparam int  NT   = 31;
  localparam int  HLEN = 64;          // sample history kept for the reference

  logic    clk, rst_n;
  sample_t x_in, y_out;
  logic    y_clip;

  int checks = 0, failures = 0;
  int n_clip_hi = 0, n_clip_lo = 0, n_reset = 0, n_phase = 0, n_impulse = 0;

  int  h [NT];                        // reference taps, scaled by 1024
  int  xs [HLEN];                     // xs[j % HLEN] = sample applied at slot j
  int  slot = 0;                      // index of the next sample to apply
  int  wave_start = -1000;            // slot where a sinusoid starts
  int  wave_kind = 0;                 // 0 none, 1 sine fs/8, 2 cosine fs/16
  real amp = 100.0;

  hilbert_fir dut (.clk(clk), .rst_n(rst_n), .x_in(x_in), .y_out(y_out), .y_clip(y_clip));

  initial begin clk = 0; rst_n = 0; x_in = '0; end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xs_at(int j);
    return (j < 0) ? 0 : xs[j % HLEN];
  endfunction

  // Exact reference output for the sample slot j (before rounding).
  function automatic int yfull(int j);
    int s = 0;
    for (int k = 0; k < NT; k++) s += h[k] * xs_at(j - k);
    return s;
  endfunction

  function automatic int yq(int j, output logic clip);
    int r;
    r    = int'($floor(real'(yfull(j)) / 1024.0 + 0.5));
    clip = (r > 127) || (r < -128);
    return (r > 127) ? 127 : (r < -128) ? -128 : r;
  endfunction

  // One clock: check the output due now, then apply the next sample.
  task automatic apply(int v);
    int   e;
    logic ec;
    @(negedge clk);
    if (slot >= 2) begin
      e = yq(slot - 2, ec);
      checks++;
      if (int'(y_out) != e || y_clip != ec) begin
        failures++;
        if (failures < 10)
          $display("FAIL slot %0d: y_out=%0d clip=%b expected %0d clip=%b", slot - 2, y_out, y_clip, e, ec);
      end
      if (ec && e > 0) n_clip_hi++;
      if (ec && e < 0) n_clip_lo++;
      // -90 degree check on the settled part of a sinusoid
      if (wave_kind != 0 && slot - 2 >= wave_start + NT) begin
        real w, ideal;
        int  t;
        t     = slot - 2 - wave_start - 15;
        w     = (wave_kind == 1) ? 2.0 * PI / 8.0 : 2.0 * PI / 16.0;
        // H{sin} = -cos, H{cos} = sin
        ideal = (wave_kind == 1) ? -amp * $cos(w * t) : amp * $sin(w * t);
        checks++;
        if (real'(y_out) - ideal > 3.0 || ideal - real'(y_out) > 3.0) begin
          failures++;
          $display("FAIL phase: slot %0d y_out=%0d ideal=%f", slot - 2, y_out, ideal);
        end else n_phase++;
      end
    end
    x_in = sample_t'(v);
    xs[slot % HLEN] = v;
    slot++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    x_in  = '0;
    #1;
    checks++;
    if (y_out != 0 || y_clip != 0) begin
      failures++;
      $display("FAIL reset did not clear the output");
    end
    for (int j = 0; j < HLEN; j++) xs[j] = 0;
    slot = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n_reset++;
  endtask

  initial begin
    int imp_slot;
    for (int k = 0; k < NT; k++) begin
      automatic int n = k - 15;
      if (n % 2 == 0) h[k] = 0;
      else begin
        automatic real an = (n > 0) ? real'(n) : -real'(n);
        automatic real c = 1024.0 * 2.0 / (PI * an) * (0.54 + 0.46 * $cos(PI * n / 15.0));
        h[k] = (n > 0 ? 1 : -1) * int'($floor(c + 0.5));
      end
    end
    for (int j = 0; j < HLEN; j++) xs[j] = 0;
    repeat (3) @(posedge clk);
    do_reset();

    // impulse: main lobes at the exact cycles
    repeat (4) apply(0);
    imp_slot = slot;
    apply(127);
    for (int i = 0; i < 40; i++) begin
      apply(0);
      // output of slot s is visible at the apply() that follows slot s+2
      if (slot - 3 == imp_slot + 14) begin
        checks++;
        if (int'(y_out) != -80) begin failures++; $display("FAIL impulse lobe -1: %0d", y_out); end
        else n_impulse++;
      end
      if (slot - 3 == imp_slot + 16) begin
        checks++;
        if (int'(y_out) != 80) begin failures++; $display("FAIL impulse lobe +1: %0d", y_out); end
        else n_impulse++;
      end
    end

    // random full-range samples
    repeat (3000) apply(int'($signed(8'($urandom))));

    // sine at fs/8
    wave_start = slot; wave_kind = 1;
    for (int i = 0; i < 200; i++) apply(int'($floor(amp * $sin(2.0 * PI * i / 8.0) + 0.5)));
    wave_kind = 0;
    // cosine at fs/16
    wave_start = slot; wave_kind = 2;
    for (int i = 0; i < 200; i++) apply(int'($floor(amp * $cos(2.0 * PI * i / 16.0) + 0.5)));
    wave_kind = 0;

    // worst-case patterns: x(n-k) = +/-full scale * sign(h[k]) -> saturation
    for (int rep = 0; rep < 4; rep++) begin
      automatic int s = (rep % 2 == 0) ? 1 : -1;
      for (int i = 0; i < NT; i++) begin
        automatic int k = NT - 1 - i;  // tap that will weight this sample
        apply(h[k] > 0 ? s * 127 : h[k] < 0 ? -s * 127 : 0);
      end
    end
    repeat (NT) apply(0);

    // reset in mid-stream, then more random data
    repeat (20) apply(int'($signed(8'($urandom))));
    do_reset();
    repeat (500) apply(int'($signed(8'($urandom))));
    repeat (NT + 2) apply(0);

    if (n_clip_hi == 0) begin failures++; $display("FAIL positive saturation never happened"); end
    if (n_clip_lo == 0) begin failures++; $display("FAIL negative saturation never happened"); end
    if (n_reset < 2)    begin failures++; $display("FAIL mid-stream reset never happened"); end
    if (n_phase < 300)  begin failures++; $display("FAIL phase checks too few: %0d", n_phase); end
    if (n_impulse != 2) begin failures++; $display("FAIL impulse lobes seen %0d times", n_impulse); end
    $display("mechanisms: clip_hi=%0d clip_lo=%0d resets=%0d phase_checks=%0d impulse_lobes=%0d",
             n_clip_hi, n_clip_lo, n_reset, n_phase, n_impulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
