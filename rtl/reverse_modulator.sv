// reverse_modulator: the reverse traffic channel transmitter of the modem. A frame's
// data packet (CRC and eight zero tail bits already in place, 192 >> rate bits) is
// encoded (K = 9, R = 1/3), repeated and block interleaved. Each group of six
// interleaved symbols picks one of 64 Walsh functions; each Walsh chip lasts four PN
// chips and is XORed with the 42-bit long code. The data burst randomizer gates the
// power control groups that carry repeated symbols. The result is spread by the I and Q
// short PN codes; the Q branch is delayed half a chip (two samples) for OQPSK. Each
// branch is then shaped by a 48-tap FIR at four samples per chip, and the two 8-bit
// results are multiplexed onto TXIQ.
// Timing: samp_en is the 4x chip-rate sample strobe; system time counts 24576 PN
// chips per 20 ms frame (96 Walsh symbols, 16 power control groups of 6). A frame is
// sent when tx_enable is high and a full interleaver bank waits at a frame boundary
// (decided on the last sample of the previous frame); otherwise the frame is blank
// (tx_gate low). The DBR bits are the 14 long code chips that precede the boundary. The half-chip Q delay, the 4 PN chips per Walsh chip
// and the I/Q multiplexer follow the design description; frame alignment and the
// source of the DBR bits are this design's choices.
module reverse_modulator
  import cdma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        samp_en,
  input  logic        tx_enable,
  // data packet input
  input  logic        bit_valid,
  input  logic        bit_data,
  input  rate_e       bit_rate,
  output logic        bit_ready,
  // long code mask (public or private, from the microcontroller)
  input  logic [41:0] lc_mask,
  // output
  input  logic        iq_sel,        // 0: TXIQ carries I, 1: Q
  output logic signed [7:0] txi,
  output logic signed [7:0] txq,
  output logic [7:0]  txiq,
  output logic        tx_gate,       // current PCG is transmitted
  output logic        frame_strobe,  // first sample of a frame
  output logic        frame_sent     // a frame has just been transmitted
);
  // ---------------- encoder and interleaver ----------------
  logic       enc_valid;
  logic [2:0] enc_sym;
  logic       ilv_ready, frame_avail;
  rate_e      ilv_rate;
  logic [6:0] rd_idx;
  logic [5:0] rd_group;
  logic       rd_done;

  // Encoder output waits in a one-group holding register until the interleaver takes it.
  logic       hold_valid;
  logic [2:0] hold_sym;
  rate_e      hold_rate, enc_rate;
  assign bit_ready = !hold_valid && !enc_valid;

  conv_encoder #(.K(9), .N(3)) u_enc (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(bit_valid && bit_ready), .in_bit(bit_data),
    .out_valid(enc_valid), .out_sym(enc_sym));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_valid <= 1'b0; hold_sym <= '0; hold_rate <= RATE_FULL; enc_rate <= RATE_FULL;
    end else begin
      if (bit_valid && bit_ready) enc_rate <= bit_rate;
      if (enc_valid) begin
        hold_valid <= 1'b1; hold_sym <= enc_sym; hold_rate <= enc_rate;
      end else if (hold_valid && ilv_ready) hold_valid <= 1'b0;
    end
  end

  block_interleaver #(.ROWS(32), .COLS(18), .N(3)) u_ilv (
    .clk, .rst_n,
    .in_valid(hold_valid), .in_sym(hold_sym), .in_rate(hold_rate), .in_ready(ilv_ready),
    .frame_avail, .frame_rate(ilv_rate),
    .rd_idx, .rd_group, .rd_done);

  // ---------------- system time ----------------
  logic [1:0]  samp_cnt;       // sample within chip
  logic [14:0] chip_cnt;       // PN chip within frame, 0..24575
  logic        chip_end, frame_begin, frame_last;
  assign chip_end    = samp_en && samp_cnt == 2'd3;
  assign frame_begin = samp_en && samp_cnt == 2'd0 && chip_cnt == '0;

  logic [6:0] wsym;            // Walsh symbol within frame, 0..95
  logic [5:0] wchip;           // Walsh chip within symbol
  logic [3:0] pcg;             // power control group
  assign wsym  = 7'(chip_cnt >> 8);
  assign wchip = chip_cnt[7:2];
  assign pcg   = 4'(wsym / 7'd6);

  // ---------------- spreading codes ----------------
  logic lc, pn_i, pn_q, ep_i, ep_q;
  logic [41:0] lc_state;
  long_code_gen u_lc (.clk, .rst_n, .step(chip_end), .load(1'b0), .load_state('0),
                      .mask(lc_mask), .lc, .state(lc_state));
  short_pn_gen #(.TAPS(PN_I_TAPS)) u_pni (.clk, .rst_n, .step(chip_end), .pn(pn_i), .epoch(ep_i));
  short_pn_gen #(.TAPS(PN_Q_TAPS)) u_pnq (.clk, .rst_n, .step(chip_end), .pn(pn_q), .epoch(ep_q));

  logic [13:0] lc_hist;        // last 14 long code chips
  logic [13:0] dbr_bits;
  logic        running;
  rate_e       run_rate;
  logic [15:0] pcg_mask;

  data_burst_randomizer u_dbr (.rate(run_rate), .b(dbr_bits), .pcg_mask);

  assign rd_idx = wsym;
  logic walsh_chip;
  walsh_modulator u_walsh (.sym6(rd_group), .chip_idx(wchip), .chip(walsh_chip));

  logic spread, chip_i, chip_q;
  assign tx_gate = running && pcg_mask[pcg];
  assign spread  = walsh_chip ^ lc;
  assign chip_i  = spread ^ pn_i;
  assign chip_q  = spread ^ pn_q;

  // zero-stuffed 4x sample streams; Q delayed two samples (half a chip)
  logic       i_nz, i_neg;
  logic [1:0] q_nz_d, q_neg_d;
  assign i_nz  = tx_gate && samp_cnt == 2'd0;
  assign i_neg = chip_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samp_cnt <= '0; chip_cnt <= '0; lc_hist <= '0; dbr_bits <= '0;
      running <= 1'b0; run_rate <= RATE_FULL; q_nz_d <= '0; q_neg_d <= '0;
    end else if (samp_en) begin
      samp_cnt <= samp_cnt + 1'b1;
      q_nz_d   <= {q_nz_d[0], i_nz};
      q_neg_d  <= {q_neg_d[0], chip_q};
      if (frame_last) begin
        // decide the next frame on the last sample of this one
        running  <= tx_enable && frame_avail;
        run_rate <= frame_rate_sel(frame_avail, ilv_rate);
        dbr_bits <= {lc_hist[12:0], lc};
      end
      if (chip_end) begin
        lc_hist  <= {lc_hist[12:0], lc};
        chip_cnt <= (chip_cnt == 15'd24575) ? '0 : chip_cnt + 1'b1;
      end
    end
  end

  function automatic rate_e frame_rate_sel(input logic avail, input rate_e r);
    return avail ? r : RATE_FULL;
  endfunction

  // The interleaver group is only used on a chip's first sample, so the bank is
  // released on the second sample of the frame's last chip; that way frame_avail shows
  // the next bank when the next frame is decided two samples later.
  assign frame_last   = chip_end && chip_cnt == 15'd24575;
  assign rd_done      = samp_en && samp_cnt == 2'd1 && chip_cnt == 15'd24575 && running;
  assign frame_sent   = rd_done;
  assign frame_strobe = frame_begin;

  fir_filter #(.TAPS(48), .OUT_W(8)) u_fir_i (.clk, .rst_n, .samp_en,
    .in_nz(i_nz), .in_neg(i_neg), .y(txi));
  fir_filter #(.TAPS(48), .OUT_W(8)) u_fir_q (.clk, .rst_n, .samp_en,
    .in_nz(q_nz_d[1]), .in_neg(q_neg_d[1]), .y(txq));

  assign txiq = iq_sel ? txq : txi;
endmodule
