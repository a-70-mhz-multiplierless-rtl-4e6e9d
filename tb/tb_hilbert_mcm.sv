// tb_hilbert_mcm: exhaustive check of the shift-add constant multiplier block.
//
// The reference coefficients are recomputed here from the Hamming-windowed
// ideal Hilbert response, round(1024 * 2/(pi*n) * (0.54 + 0.46*cos(pi*n/15))),
// independently of the package table and of the adder network. All 256 input
// values are applied and every one of the eight products is compared with the
// integer product x * c. The package table COEF is checked against the same
// recomputed constants.
module tb_hilbert_mcm;
  import hilbert_pkg::*;

  localparam real PI = 3.14159265358979323846;

  sample_t x;
  prod_t   p [NUM_COEF];
  int      checks = 0, failures = 0;
  int      cref [NUM_COEF];

  hilbert_mcm dut (.x(x), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < int'(NUM_COEF); m++) begin
      real n;
      n = real'(2 * m + 1);
      cref[m] = int'($floor(1024.0 * 2.0 / (PI * n) * (0.54 + 0.46 * $cos(PI * n / 15.0)) + 0.5));
    end
    // the package table must hold the same constants
    for (int m = 0; m < int'(NUM_COEF); m++) begin
      checks++;
      if (COEF[m] != cref[m]) begin
        failures++;
        $display("FAIL COEF[%0d]=%0d expected %0d", m, COEF[m], cref[m]);
      end
    end
    for (int v = -128; v < 128; v++) begin
      x = sample_t'(v);
      #1;
      for (int m = 0; m < int'(NUM_COEF); m++) begin
        checks++;
        if (int'(p[m]) != v * cref[m]) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d m=%0d got %0d expected %0d", v, m, p[m], v * cref[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
