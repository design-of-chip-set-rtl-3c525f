// tb_block_interleaver: writes four frames at the four rates (with random stalls),
// reads back all 96 six-symbol groups of each and compares them with the permutation
// computed here: output symbol p comes from row bitrev5(p / 18), column p mod 18 of the
// column-written array, i.e. write index 32*col + row, which holds code symbol
// index / 2^rate. Also checks that the writer stalls while both banks are full.
module tb_block_interleaver;
  timeunit 1ns; timeprecision 1ns;
  import cdma_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, rd_done = 0;
  logic [2:0] in_sym = '0; rate_e in_rate = RATE_FULL; logic in_ready, frame_avail;
  rate_e frame_rate; logic [6:0] rd_idx = '0; logic [5:0] rd_group;
  int checks = 0, failures = 0;
  block_interleaver dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic syms [4][576];      // code symbols of each frame (only 576 >> rate used)
  int stalls = 0;
  function automatic int brev5(input int x);
    int r; r = 0; for (int i = 0; i < 5; i++) r |= ((x >> i) & 1) << (4 - i); return r;
  endfunction

  task automatic write_frame(input int f);
    int ngrp; ngrp = 192 >> f;
    for (int g = 0; g < ngrp; g++) begin
      for (int s = 0; s < 3; s++) syms[f][3*g + s] = 1'($urandom);
      @(negedge clk);
      while (!in_ready) begin @(negedge clk); end
      in_valid = 1; in_rate = rate_e'(f);
      in_sym = {syms[f][3*g+2], syms[f][3*g+1], syms[f][3*g]};
      @(negedge clk); in_valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  task automatic read_frame(input int f);
    @(negedge clk);
    for (int w = 0; w < 40 && !frame_avail; w++) @(negedge clk);
    checks++; if (!frame_avail || frame_rate != rate_e'(f)) begin failures++; $display("FAIL frame %0d not ready", f); end
    for (int k = 0; k < 96; k++) begin
      logic [5:0] e;
      rd_idx = 7'(k); #1;
      for (int bb = 0; bb < 6; bb++) begin
        int p, row, col, w;
        p = 6*k + bb; row = brev5(p / 18); col = p % 18; w = 32*col + row;
        e[bb] = syms[f][w >> f];
      end
      checks++;
      if (rd_group !== e) begin failures++; if (failures < 5) $display("FAIL f=%0d k=%0d got %b exp %b", f, k, rd_group, e); end
    end
    @(negedge clk); rd_done = 1; @(negedge clk); rd_done = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    write_frame(0);
    write_frame(1);
    // both banks full: writer must stall
    repeat (5) @(negedge clk);
    checks++; if (in_ready) begin failures++; $display("FAIL in_ready with both banks full"); end
    read_frame(0);
    write_frame(2);
    read_frame(1);
    write_frame(3);
    read_frame(2);
    read_frame(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
