// tb_symbol_combiner: three fingers deliver the same symbol sequence with different
// skews (0, 2 and 3 symbols late) and different scalings. A reference here keeps its own
// long code (recurrence from the polynomial exponents, advanced once per combined
// symbol), places the power control bit of each power control group from the previous
// group's last four long code bits, and predicts every output symbol (combined, long
// code despread, shifted, saturated; erased at the two power control positions), each
// power control bit and the transmit gain. Also checked: PCG and frame strobes, the
// deskew overflow counter when one finger runs five symbols ahead, and the duty of the
// power and frequency control PDM outputs.
module tb_symbol_combiner;
  timeunit 1ns; timeprecision 1ns;
  logic clk = 0, rst_n = 0, lc_load = 0, pdm_en = 1;
  logic [2:0] finger_en = 3'b111, f_valid = 0;
  logic signed [2:0][15:0] f_sym = '0, f_ferr = '0;
  logic [41:0] lc_mask = 42'h2AA_5555_1234, lc_state = '0;
  logic [3:0] soft_shift = 4'd4; logic [7:0] pc_step = 8'd4;
  logic out_valid, pc_valid, pc_bit, pwr_ctl_pdm, freq_ctl_pdm, pcg_strobe, frame_strobe;
  logic signed [3:0] out_sym; logic [7:0] tx_gain, deskew_err; logic [15:0] frame_cnt;
  int checks = 0, failures = 0;
  symbol_combiner dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int exps[20] = '{35,33,31,27,26,25,22,21,19,18,17,16,10,7,6,5,3,2,1,0};
  logic [41:0] ref_s = 42'd1;
  function automatic logic [41:0] adv(input logic [41:0] s);
    logic x; x = 1'b0; foreach (exps[j]) x ^= s[41 - exps[j]]; return {s[40:0], x};
  endfunction

  localparam int NSYM = 24 * 16 + 24;
  int src [NSYM];
  int exp_out [$], exp_pc [$];
  int gain = 128;
  int nout = 0, npc = 0, npcg = 0, nframe = 0;

  // reference
  initial begin
    int lcb [NSYM]; int pos;
    for (int n = 0; n < NSYM; n++) begin
      src[n] = int'($urandom % 400) - 200;
      lcb[n] = ^(ref_s & lc_mask); ref_s = adv(ref_s);
    end
    pos = 0;
    for (int n = 0; n < NSYM; n++) begin
      int k, c, d, q;
      k = n % 24;
      if (k == 0 && n > 0) pos = lcb[n-4] * 8 + lcb[n-3] * 4 + lcb[n-2] * 2 + lcb[n-1];
      c = 7 * src[n];     // 1 + 2 + 4 times the symbol
      if (k == pos) exp_out.push_back(0);
      else if (k == pos + 1) begin
        int s2; s2 = 7 * src[n-1] + c;
        exp_out.push_back(0); exp_pc.push_back(s2 < 0);
      end else begin
        d = lcb[n] ? -c : c; q = d >>> 4;
        if (q > 7) q = 7; if (q < -8) q = -8;
        exp_out.push_back(q);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      int e; e = exp_out.pop_front(); checks++;
      if (int'(out_sym) != e) begin failures++; if (failures < 6) $display("FAIL out %0d got %0d exp %0d", nout, out_sym, e); end
      nout++;
    end
    if (pc_valid) begin
      int e; e = exp_pc.pop_front(); checks += 2;
      if (int'(pc_bit) != e) begin failures++; $display("FAIL pc %0d", npc); end
      gain = e ? (gain < 4 ? 0 : gain - 4) : (gain > 251 ? 255 : gain + 4);
      npc++;
      #1 if (int'(tx_gain) != gain) begin failures++; $display("FAIL gain %0d exp %0d", tx_gain, gain); end
    end
    if (pcg_strobe) npcg++;
    if (frame_strobe) nframe++;
  end

  // each finger sends symbol n at step n + skew
  int skew [3] = '{0, 2, 3};
  int scale [3] = '{1, 2, 4};
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < NSYM + 3; t++) begin
      @(negedge clk);
      for (int f = 0; f < 3; f++) begin
        int n; n = t - skew[f];
        f_valid[f] = (n >= 0 && n < NSYM);
        if (f_valid[f]) f_sym[f] = 16'(scale[f] * src[n]);
        f_ferr[f] = 16'sd300;
      end
      @(negedge clk); f_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks += 4;
    if (nout != NSYM) begin failures++; $display("FAIL outputs %0d", nout); end
    if (npcg != NSYM / 24 || nframe != 1 || frame_cnt != 16'd1) begin failures++; $display("FAIL strobes %0d %0d", npcg, nframe); end
    if (deskew_err != 0) failures++;
    if (npc != NSYM / 24) failures++;
    // PDM duty: power = tx_gain/256, frequency integrator positive -> above half
    begin
      int ones_p, ones_f; ones_p = 0; ones_f = 0;
      for (int i = 0; i < 256; i++) begin @(negedge clk); ones_p += pwr_ctl_pdm; ones_f += freq_ctl_pdm; end
      checks += 2;
      if (ones_p < int'(tx_gain) - 1 || ones_p > int'(tx_gain) + 1) begin failures++; $display("FAIL pwr pdm %0d gain %0d", ones_p, tx_gain); end
      if (ones_f <= 128) begin failures++; $display("FAIL freq pdm %0d", ones_f); end
    end
    // deskew overflow: finger 0 runs 5 symbols ahead of the others
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); f_valid = 3'b001; f_sym[0] = 16'sd1; @(negedge clk); f_valid = 0;
    end
    @(negedge clk);
    checks++; if (deskew_err != 8'd1) begin failures++; $display("FAIL deskew_err %0d", deskew_err); end
    $display("outputs=%0d pc_bits=%0d pcgs=%0d gain=%0d deskew_err=%0d", nout, npc, npcg, tx_gain, deskew_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
