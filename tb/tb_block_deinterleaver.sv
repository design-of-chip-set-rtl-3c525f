// tb_block_deinterleaver: interleaves frames of random soft symbols here (written down
// 16-row columns, rows sent in bit-reversed order), streams them in and checks the
// deinterleaver returns the code order, with out_ready stalls. Then fills both banks
// and one more frame to check that the surplus symbols are dropped and counted.
module tb_block_deinterleaver;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0; logic signed [3:0] in_sym = 0;
  logic out_valid, out_last; logic signed [3:0] out_sym; logic [7:0] overflow;
  int checks = 0, failures = 0;
  block_deinterleaver dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic signed [3:0] code [3][384];
  function automatic int brev4(input int x); return ((x & 1) << 3) | ((x & 2) << 1) | ((x & 4) >> 1) | ((x & 8) >> 3); endfunction
  task automatic send(input int f);
    for (int k = 0; k < 384; k++) code[f][k] = 4'($urandom);
    for (int j = 0; j < 384; j++) begin
      @(negedge clk); in_valid = 1; in_sym = code[f][16 * (j % 24) + brev4(j / 24)];
    end
    @(negedge clk); in_valid = 0;
  endtask
  task automatic recv(input int f);
    int k; k = 0;
    while (k < 384) begin
      @(negedge clk); out_ready = ($urandom % 3) != 0; #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_sym !== code[f][k] || out_last !== (k == 383)) begin failures++; if (failures < 5) $display("FAIL f=%0d k=%0d", f, k); end
        k++;
      end
    end
    @(negedge clk); out_ready = 0;
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    send(0); recv(0);
    send(1); send(2);
    checks++; if (overflow != 0) failures++;
    send(0);   // both banks full: all dropped
    checks++; if (overflow != 8'(384)) begin failures++; $display("FAIL overflow %0d", overflow); end
    recv(1); recv(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
