// tb_hilbert_tdl: check of the transposed adder/delay line.
//
// Drives independent random values on the eight product inputs every clock
// (they need not be real products, which makes every tap observable on its
// own) and compares acc each cycle with the direct-form sum
//   sum_{k=0..30} sign(k-15) * hist[k][(|k-15|-1)/2]   over odd k-15,
// where hist[k] is the product vector applied k clocks earlier. Also checks
// that reset clears the line and that a single pulse on one product input
// reaches acc exactly at the taps where it should (the delay of each tap).
module tb_hilbert_tdl;
  import hilbert_pkg::*;

  logic  clk, rst_n;
  prod_t p [NUM_COEF];
  acc_t  acc;
  int    checks = 0, failures = 0;

  prod_t hist [NUM_TAPS][NUM_COEF];   // hist[0] = vector of the current cycle

  hilbert_tdl dut (.clk(clk), .rst_n(rst_n), .p(p), .acc(acc));

  initial begin clk = 0; rst_n = 0; end
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_sum();
    longint s = 0;
    for (int k = 0; k < int'(NUM_TAPS); k++) begin
      int n = k - 15;
      if (n % 2 != 0) begin
        if (n > 0) s += longint'(hist[k][(n - 1) / 2]);
        else       s -= longint'(hist[k][(-n - 1) / 2]);
      end
    end
    return s;
  endfunction

  // Apply a vector after the falling edge, compare before the rising edge.
  task automatic step(input prod_t v [NUM_COEF]);
    @(negedge clk);
    p = v;
    for (int k = NUM_TAPS - 1; k > 0; k--) hist[k] = hist[k - 1];
    hist[0] = v;
    #1;
    checks++;
    if (longint'(acc) != ref_sum()) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t acc=%0d expected %0d", $time, acc, ref_sum());
    end
  endtask

  initial begin
    prod_t v [NUM_COEF];
    for (int k = 0; k < int'(NUM_TAPS); k++) for (int m = 0; m < int'(NUM_COEF); m++) hist[k][m] = '0;
    for (int m = 0; m < int'(NUM_COEF); m++) begin v[m] = prod_t'($signed(16'($urandom))); p[m] = v[m]; end
    repeat (3) @(posedge clk);   // random vectors during reset must not leak
    for (int m = 0; m < int'(NUM_COEF); m++) v[m] = '0;
    @(negedge clk) begin rst_n = 1; p = v; end
    // single pulses on each product input, one at a time
    for (int m = 0; m < int'(NUM_COEF); m++) begin
      v[m] = prod_t'(1000 + m);
      step(v);
      v[m] = '0;
      repeat (NUM_TAPS + 1) step(v);
    end
    // random streams; 16 products of up to 2^15 cannot overflow the 20-bit sum
    repeat (3000) begin
      for (int m = 0; m < int'(NUM_COEF); m++) v[m] = prod_t'($signed(16'($urandom)));
      step(v);
    end
    // a reset in mid-stream clears the line
    for (int m = 0; m < int'(NUM_COEF); m++) v[m] = '0;
    @(negedge clk) begin rst_n = 0; p = v; end
    #1;
    for (int k = 0; k < int'(NUM_TAPS); k++) for (int m = 0; m < int'(NUM_COEF); m++) hist[k][m] = '0;
    @(negedge clk) begin rst_n = 1; p = v; end
    repeat (200) begin
      for (int m = 0; m < int'(NUM_COEF); m++) v[m] = prod_t'($signed(16'($urandom)));
      step(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
