// tb_power_measurement: random I/Q samples; every 256-sample window the reported power
// must equal the sum of squares computed here, and results must come once per window.
module tb_power_measurement;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, samp_en = 0; logic signed [3:0] rx_i = 0, rx_q = 0;
  logic valid; logic [16:0] power;
  int checks = 0, failures = 0;
  power_measurement dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int acc = 0, nwin = 0;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 256 * 6; n++) begin
      @(negedge clk); rx_i = 4'($urandom); rx_q = 4'($urandom); samp_en = 1;
      acc += int'(rx_i) * int'(rx_i) + int'(rx_q) * int'(rx_q);
      @(negedge clk); samp_en = 0;
      checks++;
      if (n % 256 == 255) begin
        if (!valid || int'(power) != acc) begin failures++; $display("FAIL win %0d got %0d exp %0d", nwin, power, acc); end
        acc = 0; nwin++;
      end else if (valid) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
