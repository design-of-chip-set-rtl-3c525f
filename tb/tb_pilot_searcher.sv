// tb_pilot_searcher: a pilot-only signal (amplitude 2 on I and Q, short PN spread) is
// received with a delay of 23 chips and a 180 degree phase. A 40-hypothesis search with
// l1 = 64, l2 = 256 must report all 40 hypotheses in order, pass only hypothesis 23,
// with its second-dwell energy equal to (256 * 4)^2 computed here, and dismiss the
// others; the number of chips the search takes is checked against the dwell arithmetic.
module tb_pilot_searcher;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, samp_en = 0, start = 0;
  logic signed [3:0] rx_i = 0, rx_q = 0;
  logic [15:0] win = 16'd40, l1 = 16'd64, l2 = 16'd256; logic [31:0] t1 = 32'd20000, t2 = 32'd500000;
  logic busy, done, res_valid, res_pass, res_dwell2; logic [15:0] res_offset; logic [31:0] res_energy;
  int checks = 0, failures = 0;
  pilot_searcher dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (500000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic bs_step = 0, bpi, bpq;
  short_pn_gen #(.TAPS(cdma_pkg::PN_I_TAPS)) bs_i (.clk, .rst_n, .step(bs_step), .pn(bpi), .epoch());
  short_pn_gen #(.TAPS(cdma_pkg::PN_Q_TAPS)) bs_q (.clk, .rst_n, .step(bs_step), .pn(bpq), .epoch());
  int hi [$], hq [$];
  localparam int D = 23;
  bit finished = 0;
  int nres = 0, npass = 0, ndw2 = 0, chips = 0, t_start, t_done;

  always @(posedge clk) if (rst_n && res_valid) begin
    checks++;
    if (res_offset != 16'(nres)) begin failures++; $display("FAIL order %0d", res_offset); end
    if (res_dwell2) ndw2++;
    if (res_pass) begin
      npass++; checks++;
      if (res_offset != D || res_energy != 32'(1024 * 1024)) begin failures++; $display("FAIL pass at %0d energy %0d", res_offset, res_energy); end
    end
    checks++;
    if (res_offset == D && !res_pass) begin failures++; $display("FAIL missed true offset, energy %0d", res_energy); end
    nres++;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      begin
        @(negedge clk); start = 1; @(negedge clk); start = 0; t_start = chips;
        @(posedge done); t_done = chips; finished = 1;
      end
      forever begin
        // one chip: even sample carries the chip, odd sample is zero
        hi.push_back(bpi ? 2 : -2); hq.push_back(bpq ? 2 : -2);     // phase 180 degrees
        @(negedge clk); bs_step = 1; @(negedge clk); bs_step = 0;
        rx_i = hi.size() > D ? 4'(hi[hi.size() - 1 - D]) : 4'sd0;
        rx_q = hq.size() > D ? 4'(hq[hq.size() - 1 - D]) : 4'sd0;
        samp_en = 1; @(negedge clk); samp_en = 0;
        rx_i = 0; rx_q = 0; @(negedge clk); samp_en = 1; @(negedge clk); samp_en = 0;
        chips++;
        if (finished) break;
      end
    join
    checks += 4;
    if (nres != 40) begin failures++; $display("FAIL results %0d", nres); end
    if (npass != 1) begin failures++; $display("FAIL passes %0d", npass); end
    if (ndw2 < 1) failures++;
    // 40 first dwells, the second dwells run, one slip chip per hypothesis
    if (t_done - t_start > 40 * 64 + ndw2 * 256 + 40 + 2 || t_done - t_start < 40 * 64 + ndw2 * 256 + 40 - 2) begin
      failures++; $display("FAIL search took %0d chips", t_done - t_start);
    end
    $display("hypotheses=%0d second_dwells=%0d passes=%0d chips=%0d", nres, ndw2, npass, t_done - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
