// tb_walsh_modulator: builds the 64x64 Hadamard matrix here by the Sylvester recursion
// H(2n) = [H H; H ~H] and compares every chip of every Walsh symbol with it, then checks
// that distinct symbols are orthogonal over 64 chips.
module tb_walsh_modulator;
  timeunit 1ns; timeprecision 1ns;
  logic [5:0] sym6, chip_idx; logic chip;
  int checks = 0, failures = 0;
  walsh_modulator dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic h [64][64];
  logic got [64][64];
  initial begin
    h[0][0] = 0;
    for (int n = 1; n < 64; n *= 2)
      for (int r = 0; r < n; r++) for (int c = 0; c < n; c++) begin
        h[r][c+n] = h[r][c]; h[r+n][c] = h[r][c]; h[r+n][c+n] = !h[r][c];
      end
    for (int i = 0; i < 64; i++) for (int j = 0; j < 64; j++) begin
      sym6 = 6'(i); chip_idx = 6'(j); #1;
      got[i][j] = chip; checks++;
      if (chip !== h[i][j]) begin failures++; if (failures < 5) $display("FAIL i=%0d j=%0d", i, j); end
    end
    for (int a = 0; a < 64; a++) for (int b = a + 1; b < 64; b++) begin
      int c; c = 0;
      for (int j = 0; j < 64; j++) c += (got[a][j] == got[b][j]) ? 1 : -1;
      checks++; if (c != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
