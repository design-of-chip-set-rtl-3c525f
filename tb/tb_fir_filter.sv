// tb_fir_filter: recomputes the 48 coefficients here from the window formula (real
// arithmetic), drives an impulse and then a random zero-stuffed chip stream, and
// compares every output sample with the convolution sum >>> 2 computed here
// (coefficients may differ by one unit of rounding, so a tolerance of 1 is allowed).
// Also checks the impulse response is symmetric.
module tb_fir_filter;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, samp_en = 0, in_nz = 0, in_neg = 0;
  logic signed [7:0] y;
  int checks = 0, failures = 0;
  fir_filter dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  real hr [48]; int c [48]; int xs [48];
  real mx;
  int imp [60];
  initial begin
    mx = 0;
    for (int n = 0; n < 48; n++) begin
      real t, s;
      t = n - 23.5;
      s = 0.25 * $sin(3.14159265358979 * 0.25 * t) / (3.14159265358979 * 0.25 * t);
      hr[n] = s * (0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * n / 47.0));
    end
    for (int p = 0; p < 4; p++) begin
      real sm; sm = 0; for (int k = 0; k < 12; k++) sm += (hr[4*k+p] < 0) ? -hr[4*k+p] : hr[4*k+p];
      if (sm > mx) mx = sm;
    end
    for (int n = 0; n < 48; n++) c[n] = $rtoi(hr[n] * 511.0 / mx + (hr[n] >= 0 ? 0.5 : -0.5));
    foreach (xs[i]) xs[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int x, acc, e;
      @(negedge clk);
      // expected output is the filter over the register contents before this sample
      acc = 0; for (int i = 0; i < 48; i++) acc += c[i] * xs[i];
      e = acc >>> 2; if (e > 127) e = 127; if (e < -128) e = -128;
      if (n == 0) x = 1; else if (n < 60) x = 0;
      else x = (n % 4 == 0) ? (($urandom % 2) ? 1 : -1) : 0;
      in_nz = (x != 0); in_neg = (x < 0); samp_en = 1;
      @(negedge clk); samp_en = 0;
      for (int i = 47; i > 0; i--) xs[i] = xs[i-1]; xs[0] = x;
      if (n >= 1 && n <= 49) imp[n-1] = int'(y);
      checks++;
      if (int'(y) - e > 1 || e - int'(y) > 1) begin failures++; if (failures < 6) $display("FAIL n=%0d y=%0d exp %0d", n, y, e); end
    end
    for (int i = 0; i < 24; i++) begin checks++; if (imp[i] != imp[47-i]) failures++; end
    checks++; if (imp[23] < 60) begin failures++; $display("FAIL impulse peak %0d", imp[23]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
