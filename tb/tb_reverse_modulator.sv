// tb_reverse_modulator: sends a full-rate and a half-rate frame through the reverse
// link modulator, one sample per clock. A reference model here re-encodes the packets
// (K=9, R=1/3), repeats and interleaves them, and forms the Walsh chips; combined with
// the long code and short PN chips it predicts every chip that enters the I and Q
// filters. Checked: the first frame boundary is blank (no data yet), every sample of
// the two frames (I at the chip's first sample, Q two samples later), the gated power
// control groups (16 of 16 at full rate, 8 of 16 at half rate, as the data burst
// randomizer rule computed here says), the TXIQ multiplexer, silence of the filter
// output in a gated-off group, and the frame timing of 24576 chips per frame.
module tb_reverse_modulator;
  timeunit 1ns; timeprecision 1ns;
  import cdma_pkg::*;
  logic clk = 0, rst_n = 0, samp_en = 0, tx_enable = 1, bit_valid = 0, bit_data = 0, iq_sel = 0;
  rate_e bit_rate = RATE_FULL; logic bit_ready;
  logic [41:0] lc_mask = 42'h155_5555_AAAA;
  logic signed [7:0] txi, txq; logic [7:0] txiq; logic tx_gate, frame_strobe, frame_sent;
  int checks = 0, failures = 0;
  reverse_modulator dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic bits [2][192];
  logic code [2][576];       // code symbols in encoder order
  logic tx [2][576];         // interleaved order
  function automatic int brev5(input int x);
    int r; r = 0; for (int i = 0; i < 5; i++) r |= ((x >> i) & 1) << (4 - i); return r;
  endfunction
  function automatic logic par9(input int unsigned x); return ^x[8:0]; endfunction

  task automatic build_ref(input int f);
    int unsigned sr; int nb; nb = 192 >> f; sr = 0;
    for (int n = 0; n < nb; n++) begin
      sr = (sr >> 1) | (int'(bits[f][n]) << 8);
      code[f][3*n]   = par9(sr & 9'o557);
      code[f][3*n+1] = par9(sr & 9'o663);
      code[f][3*n+2] = par9(sr & 9'o711);
    end
    for (int p = 0; p < 576; p++) begin
      int w; w = 32 * (p % 18) + brev5(p / 18);
      tx[f][p] = code[f][w >> f];
    end
  endtask

  // feed the two packets
  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int n = 0; n < (192 >> f); n++) bits[f][n] = (n >= (192 >> f) - 8) ? 1'b0 : 1'($urandom);
      build_ref(f);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < (192 >> f); n++) begin
        @(negedge clk);
        while (!bit_ready) @(negedge clk);
        bit_valid = 1; bit_data = bits[f][n]; bit_rate = rate_e'(f);
        @(negedge clk); bit_valid = 0;
      end
  end

  // sample-by-sample checking
  int frame_no = -1, sample = 0, gated_pcgs [2], silent_checks = 0, frames_sent = 0;
  logic q_exp_nz [$], q_exp_neg [$];
  logic [15:0] exp_mask;
  initial begin
    q_exp_nz = '{0, 0}; q_exp_neg = '{0, 0};
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      samp_en = 1; iq_sel = 1'($urandom);
      #1;
      checks++; if (txiq !== (iq_sel ? txq : txi)) failures++;
      if (frame_strobe) begin
        frame_no++; sample = 0;
        if (frame_no > 0) begin
          checks++; if (!frame_sent_seen && frame_no > 1) failures++;
        end
        frame_sent_seen = 0;
      end
      if (frame_no >= 0 && sample % 4 == 0) begin
        int chip, ws, wc, pcg, f;
        logic walsh, exp_i, exp_q; logic [5:0] g;
        chip = sample / 4; ws = chip / 256; wc = (chip / 4) % 64; pcg = ws / 6;
        f = frame_no - 1;
        if (f >= 0 && f < 2) begin
          if (sample == 0) begin
            exp_mask = exp_dbr(f, dut.lc_hist);
            checks++; if ($countones(exp_mask) != (16 >> f)) failures++;
          end
          for (int b = 0; b < 6; b++) g[b] = tx[f][6*ws + b];
          walsh = ^(g & 6'(wc));
          exp_i = walsh ^ dut.lc ^ dut.u_pni.pn;
          exp_q = walsh ^ dut.lc ^ dut.u_pnq.pn;
          checks++;
          if (dut.tx_gate !== exp_mask[pcg] || (exp_mask[pcg] && (dut.i_nz !== 1'b1 || dut.i_neg !== exp_i))) begin
            failures++; if (failures < 6) $display("FAIL f=%0d chip=%0d gate=%b/%b i=%b exp %b", f, chip, dut.tx_gate, exp_mask[pcg], dut.i_neg, exp_i);
          end
          if (exp_mask[pcg] && wc == 0 && chip % 4 == 0 && ws % 6 == 0) gated_pcgs[f]++;
          q_exp_nz.push_back(exp_mask[pcg]); q_exp_neg.push_back(exp_q);
          // a gated-off group: the filter has flushed after 48 samples
          if (!exp_mask[pcg] && (sample % 6144) > 100) begin
            checks++; silent_checks++; if (txi !== 0 || txq !== 0) failures++;
          end
        end else begin
          checks++; if (dut.tx_gate) failures++;
          q_exp_nz.push_back(0); q_exp_neg.push_back(0);
        end
      end else begin
        q_exp_nz.push_back(0); q_exp_neg.push_back(dut.u_pnq.pn);
      end
      // Q filter input is the Q chip stream two samples late
      if (q_exp_nz.size() > 2) begin
        logic enz, eng;
        enz = q_exp_nz.pop_front(); eng = q_exp_neg.pop_front();
        checks++;
        if (dut.q_nz_d[1] !== enz || (enz && dut.q_neg_d[1] !== eng)) begin
          failures++; if (failures < 6) $display("FAIL Q at sample %0d", sample);
        end
      end
      if (frame_sent) begin frame_sent_seen = 1; frames_sent++; end
      @(posedge clk); #1 samp_en = 0;
      sample++;
      if (frame_no == 3) break;
    end
    checks += 3;
    if (frames_sent != 2) begin failures++; $display("FAIL frames sent %0d", frames_sent); end
    if (gated_pcgs[0] != 16 || gated_pcgs[1] != 8) begin failures++; $display("FAIL gated pcgs %0d %0d", gated_pcgs[0], gated_pcgs[1]); end
    if (silent_checks == 0) failures++;
    $display("frames_sent=%0d full_rate_pcgs=%0d half_rate_pcgs=%0d silent_samples=%0d", frames_sent, gated_pcgs[0], gated_pcgs[1], silent_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic frame_sent_seen = 0;

  function automatic logic [15:0] exp_dbr(input int f, input logic [13:0] b);
    logic [15:0] m; m = 0;
    if (f == 0) return 16'hFFFF;
    for (int i = 0; i < 8; i++) m[2*i + b[i]] = 1;
    return m;
  endfunction
endmodule
