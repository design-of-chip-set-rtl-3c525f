// tb_rake_finger: a base-station model here sends pilot (Walsh 0, amplitude 2) plus one
// traffic channel (Walsh 5, random +-1 symbols, amplitude 1) spread by the I/Q short PN
// codes, through a channel with a delay and a 90 degree phase turn. Samples are two per
// chip: chip values at even samples and the mean of neighbouring chips at odd ones.
// The finger is slewed onto the delay and must then: recover every traffic symbol sign
// (compared at the best symbol lag), report pilot energy above the lock threshold, and
// give a near-zero frequency error. Then the path moves half a chip later: the tracking
// loop must step later (counted), and the symbols must again come out right. Finally a
// path moving back earlier must be followed (early step counted).
module tb_rake_finger;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, samp_en = 0, slew_req = 0, track_en = 0;
  logic signed [3:0] rx_i = 0, rx_q = 0; logic [5:0] walsh_idx = 6'd5;
  logic [15:0] slew_chips = 0; logic [23:0] track_thr = 24'd50000, lock_thr = 24'd20000;
  logic sym_valid, lock, ph; logic signed [15:0] sym, freq_err; logic [23:0] pilot_energy;
  logic [15:0] adj_early, adj_late;
  int checks = 0, failures = 0;
  rake_finger dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (3000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // base station
  logic bs_step = 0, bpi, bpq, bep;
  short_pn_gen #(.TAPS(cdma_pkg::PN_I_TAPS)) bs_i (.clk, .rst_n, .step(bs_step), .pn(bpi), .epoch(bep));
  short_pn_gen #(.TAPS(cdma_pkg::PN_Q_TAPS)) bs_q (.clk, .rst_n, .step(bs_step), .pn(bpq), .epoch());
  int data [$];           // traffic symbols sent, in order
  int got [$];            // finger symbol signs, in order
  int ci [$], cq [$];     // chip values (I, Q) sent
  int bs_chip = 0;
  int delay_samp = 20;    // channel delay in samples
  int samp_hist_i [4096], samp_hist_q [4096];
  int n_samp = 0;

  task automatic gen_chip();
    int w, a, d;
    if (bs_chip % 64 == 0) data.push_back(($urandom % 2) ? 1 : -1);
    d = data[$];
    w = ($countones(6'd5 & 6'(bs_chip % 64)) % 2) ? -1 : 1;
    a = 2 + w * d;
    ci.push_back(bpi ? -a : a); cq.push_back(bpq ? -a : a);
    bs_chip++;
  endtask

  // one sample period: 4 clocks
  task automatic sample();
    int k, si, sq, ri, rq;
    k = n_samp;
    if (k % 2 == 0) begin
      gen_chip(); @(negedge clk); bs_step = 1; @(negedge clk); bs_step = 0;
      si = ci[k/2]; sq = cq[k/2];
    end else begin
      // needs the next chip: generated lazily
      if (ci.size() <= k/2 + 1) begin gen_chip(); @(negedge clk); bs_step = 1; @(negedge clk); bs_step = 0; end
      si = (ci[k/2] + ci[k/2+1]) / 2; sq = (cq[k/2] + cq[k/2+1]) / 2;
    end
    samp_hist_i[k % 4096] = si; samp_hist_q[k % 4096] = sq;
    // channel: delay and 90 degree turn (r = j * s)
    if (k >= delay_samp) begin ri = -samp_hist_q[(k - delay_samp) % 4096]; rq = samp_hist_i[(k - delay_samp) % 4096]; end
    else begin ri = 0; rq = 0; end
    @(negedge clk); rx_i = 4'(ri); rx_q = 4'(rq); samp_en = 1;
    @(negedge clk); samp_en = 0;
    n_samp++;
  endtask

  always @(posedge clk) if (rst_n && sym_valid) got.push_back(sym >= 0 ? 1 : -1);

  // compare the finger symbols collected in [g0, g1) with the data at the best lag
  task automatic compare(input int g0, input int g1, input string what);
    int best, bestlag;
    best = -1; bestlag = 0;
    for (int lag = 0; lag < 6; lag++) begin
      int m; m = 0;
      for (int j = g0; j < g1; j++) if (j - lag >= 0 && j - lag < data.size() && got[j] == data[j - lag]) m++;
      if (m > best) begin best = m; bestlag = lag; end
    end
    checks++;
    if (best != g1 - g0) begin failures++; $display("FAIL %s: %0d of %0d symbols right", what, best, g1 - g0); end
    else $display("%s: %0d symbols right at lag %0d", what, best, bestlag);
  endtask

  int g0;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); slew_req = 1; slew_chips = 16'(delay_samp / 2); @(negedge clk); slew_req = 0;
    repeat (64 * 2 * 12) sample();
    g0 = got.size();
    repeat (64 * 2 * 30) sample();
    compare(g0, got.size(), "aligned");
    checks += 2;
    if (!lock || pilot_energy < 24'd20000) begin failures++; $display("FAIL lock %b energy %0d", lock, pilot_energy); end
    if (freq_err > 100 || freq_err < -100) begin failures++; $display("FAIL freq_err %0d", freq_err); end
    // path moves half a chip later, tracking on
    track_en = 1; delay_samp = 21;
    repeat (64 * 2 * 20) sample();
    checks++; if (adj_late == 0) begin failures++; $display("FAIL no late step"); end
    g0 = got.size();
    repeat (64 * 2 * 20) sample();
    compare(g0, got.size(), "after late step");
    // path moves back earlier
    delay_samp = 20;
    repeat (64 * 2 * 20) sample();
    checks++; if (adj_early == 0) begin failures++; $display("FAIL no early step"); end
    g0 = got.size();
    repeat (64 * 2 * 20) sample();
    compare(g0, got.size(), "after early step");
    $display("late steps %0d early steps %0d energy %0d", adj_late, adj_early, pilot_energy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
