// tb_viterbi_decoder: builds frames here (172 random data bits, the 12-bit CRC computed
// here with register preset to ones, 8 zero tail bits), encodes them with the 753/561
// code, maps bits to soft symbols +-7 and corrupts some: weak symbols and hard sign
// errors. Checks that the decoded bits match the data, that the quality bit is set, that
// the symbol error count equals the number of sign errors put in, and the decoding time
// (which must fit a 20 ms frame at a 10 MHz clock). A frame with a corrupted CRC must
// decode to the transmitted bits but give quality 0.
module tb_viterbi_decoder;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, in_valid = 0; logic signed [3:0] in_sym = 0;
  logic in_ready, out_valid, out_bit, done, quality; logic [8:0] ser;
  int checks = 0, failures = 0;
  viterbi_decoder dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (600000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic fbits [192];
  logic signed [3:0] syms [384];
  int nerr;
  function automatic logic par9(input int unsigned x); return ^x[8:0]; endfunction

  task automatic make_frame(input int flips, input bit bad_crc);
    logic [11:0] c; int unsigned sr;
    c = '1;
    for (int i = 0; i < 172; i++) begin
      fbits[i] = 1'($urandom);
      if ((c[11] ^ fbits[i]) == 1'b1) c = {c[10:0], 1'b0} ^ 12'hF13; else c = {c[10:0], 1'b0};
    end
    for (int i = 0; i < 12; i++) fbits[172 + i] = c[11 - i] ^ (bad_crc && i == 3);
    for (int i = 184; i < 192; i++) fbits[i] = 0;
    sr = 0; nerr = 0;
    for (int i = 0; i < 192; i++) begin
      logic c0, c1;
      sr = (sr >> 1) | (int'(fbits[i]) << 8);
      c0 = par9(sr & 9'o753); c1 = par9(sr & 9'o561);
      syms[2*i]   = c0 ? -4'sd7 : 4'sd7;
      syms[2*i+1] = c1 ? -4'sd7 : 4'sd7;
    end
    // noise: weaken some symbols, flip a few, spread out
    for (int i = 0; i < 384; i++) if ($urandom % 4 == 0) syms[i] = syms[i] / 3;
    for (int k = 0; k < flips; k++) begin
      int i; i = 20 * k + 7;
      syms[i] = (syms[i] > 0) ? -4'sd2 : 4'sd2; nerr++;
    end
  endtask

  task automatic run_frame(input int flips, input bit bad_crc);
    int nout, t0, t1; logic got [184];
    make_frame(flips, bad_crc);
    @(negedge clk);
    for (int i = 0; i < 384; i++) begin
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_sym = syms[i]; @(negedge clk);
    end
    in_valid = 0; t0 = $time;
    nout = 0;
    while (!done) begin
      @(posedge clk); #1;
      if (out_valid) begin got[nout] = out_bit; nout++; end
    end
    t1 = $time;
    checks += 4;
    if (nout != 184) begin failures++; $display("FAIL nout=%0d", nout); end
    for (int i = 0; i < 184 && i < nout; i++) if (got[i] !== fbits[i]) begin failures++; $display("FAIL bit %0d", i); break; end
    if (quality !== !bad_crc) begin failures++; $display("FAIL quality %b", quality); end
    if (int'(ser) != nerr) begin failures++; $display("FAIL ser %0d exp %0d", ser, nerr); end
    // 256 ACS cycles per step, then traceback and output: one frame in under 20 ms at 10 MHz
    checks++;
    if ((t1 - t0) / 10 > 200000 || (t1 - t0) / 10 < 192 * 256) begin failures++; $display("FAIL cycles %0d", (t1 - t0) / 10); end
    $display("frame decoded in %0d cycles, ser=%0d quality=%b", (t1 - t0) / 10, ser, quality);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run_frame(0, 0);
    run_frame(12, 0);
    run_frame(6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
