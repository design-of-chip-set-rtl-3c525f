// tb_conv_encoder: drives random bits into the K=9, R=1/3 encoder and compares every
// output group with a reference shift register kept here (newest bit in the MSB,
// generators 557/663/711 octal). Also checks the one-cycle latency and that clear
// empties the history.
module tb_conv_encoder;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0;
  logic out_valid; logic [2:0] out_sym;
  int checks = 0, failures = 0;
  conv_encoder dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int unsigned sr;   // bit 8 = current input
  function automatic logic par(input int unsigned x); return ^x[8:0]; endfunction
  logic [2:0] exp_sym;
  initial begin
    sr = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0; in_bit = $urandom; clear = (n == 300);
      if (clear) sr = 0;
      else if (in_valid) begin
        sr = (sr >> 1) | (int'(in_bit) << 8);
        exp_sym = {par(sr & 9'o711), par(sr & 9'o663), par(sr & 9'o557)};
      end
      @(posedge clk); #1;
      if (in_valid && !clear) begin
        checks++;
        if (!out_valid || out_sym !== exp_sym) begin
          failures++; $display("FAIL n=%0d got %b exp %b", n, out_sym, exp_sym);
        end
      end else begin
        checks++; if (out_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
