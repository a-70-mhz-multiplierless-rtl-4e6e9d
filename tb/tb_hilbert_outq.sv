// tb_hilbert_outq: check of the output rounding and saturation.
//
// Sweeps the accumulator over its whole 20-bit range in steps of 7 plus the
// values around every rounding tie and both clip points, and compares the
// output with floor(acc/1024 + 0.5) clipped to [-128, 127], worked out in real
// arithmetic. The saturation flags are checked as well.
module tb_hilbert_outq;
  import hilbert_pkg::*;

  acc_t    acc;
  sample_t y;
  logic    sat_hi, sat_lo;
  int      checks = 0, failures = 0;
  int      n_hi = 0, n_lo = 0;

  hilbert_outq dut (.acc(acc), .y(y), .sat_hi(sat_hi), .sat_lo(sat_lo));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int a);
    int r, e;
    logic eh, el;
    acc = acc_t'(a);
    #1;
    r  = int'($floor(real'(a) / 1024.0 + 0.5));
    eh = r > 127;
    el = r < -128;
    e  = eh ? 127 : el ? -128 : r;
    checks++;
    if (int'(y) != e || sat_hi != eh || sat_lo != el) begin
      failures++;
      if (failures < 10)
        $display("FAIL acc=%0d y=%0d hi=%b lo=%b expected %0d %b %b", a, y, sat_hi, sat_lo, e, eh, el);
    end
    n_hi += int'(eh);
    n_lo += int'(el);
  endtask

  initial begin
    for (int a = -(1 << (ACC_W - 1)); a < (1 << (ACC_W - 1)); a += 7) check(a);
    for (int k = -130; k <= 130; k++)
      for (int d = -1; d <= 1; d++) check(k * 1024 + 512 + d);
    if (n_hi == 0 || n_lo == 0) begin
      failures++;
      $display("FAIL saturation not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
