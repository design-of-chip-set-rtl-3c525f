// tb_short_pn_gen: runs the I and Q short PN generators over three full periods and
// checks the properties of the augmented m-sequence: period 32768 (epoch once per
// period, same chip pattern repeats), 16384 ones per period, a single longest zero run
// of 15 chips, and the chip-by-chip recurrence of the generator polynomial (computed
// here from its exponents) outside the inserted zero.
module tb_short_pn_gen;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, step = 0;
  logic pn_i, ep_i, pn_q, ep_q;
  int checks = 0, failures = 0;
  short_pn_gen #(.TAPS(cdma_pkg::PN_I_TAPS)) dut_i (.clk, .rst_n, .step, .pn(pn_i), .epoch(ep_i));
  short_pn_gen #(.TAPS(cdma_pkg::PN_Q_TAPS)) dut_q (.clk, .rst_n, .step, .pn(pn_q), .epoch(ep_q));
  always #5 clk = ~clk;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic seq_i [65536], seq_q [65536];
  int ei[$], eq[$];
  int exps_i[6] = '{13, 9, 8, 7, 5, 0};
  int exps_q[8] = '{12, 11, 10, 6, 5, 4, 3, 0};

  task automatic props(input string nm, ref logic s [65536], input int ep0, input int exps[], input int ne);
    int ones, run, maxrun, nmax, bad;
    ones = 0; maxrun = 0; run = 0; nmax = 0; bad = 0;
    for (int n = ep0; n < ep0 + 32768; n++) begin
      ones += s[n];
      run = s[n] ? 0 : run + 1;
      if (run > maxrun) begin maxrun = run; nmax = 1; end else if (run == maxrun && run > 0) nmax++;
      if (s[n] != s[n + 32768]) bad++;
    end
    checks += 3;
    if (ones != 16384) begin failures++; $display("FAIL %s ones=%0d", nm, ones); end
    if (maxrun != 15 || nmax != 1) begin failures++; $display("FAIL %s maxrun=%0d x%0d", nm, maxrun, nmax); end
    if (bad != 0) begin failures++; $display("FAIL %s period mismatch %0d", nm, bad); end
    // recurrence: a(n) = xor a(n - 15 + e) over exponents e < 15, checked on the
    // m-sequence with the stuffed zero (first chip before ep0) removed
    bad = 0;
    for (int n = ep0 + 15; n < ep0 + 32767; n++) begin
      logic x; x = 1'b0;
      for (int j = 0; j < ne; j++) x ^= s[n - 15 + exps[j]];
      if (x != s[n]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s recurrence %0d", nm, bad); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 65536 + 32768; n++) begin
      @(negedge clk);
      if (n < 65536) begin seq_i[n] = pn_i; seq_q[n] = pn_q; end
      if (ep_i) ei.push_back(n);
      if (ep_q) eq.push_back(n);
      step = 1; @(negedge clk); step = 0;
    end
    checks += 2;
    if (ei.size() != 3 || ei[1] - ei[0] != 32768) begin failures++; $display("FAIL I epochs %p", ei); end
    if (eq.size() != 3 || eq[1] - eq[0] != 32768) begin failures++; $display("FAIL Q epochs %p", eq); end
    props("I", seq_i, ei[0], exps_i, 6);
    props("Q", seq_q, eq[0], exps_q, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
