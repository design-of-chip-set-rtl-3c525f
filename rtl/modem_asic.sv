// modem_asic: the CDMA mobile-station modem. It joins the reverse link modulator, the
// forward link demodulator (pilot searcher, NF rake fingers, received power measurement
// and symbol combiner), the forward link channel decoder (block deinterleaver and
// Viterbi decoder), the microcontroller interface and the timing generator.
// Receive: rx_i/rx_q are 4-bit baseband samples at two per chip, taken when en_x2 is
// high (two pulses per chip from modem_clock_gen). The fingers despread them; the
// combiner sums the finger symbols, takes out the power control bit (which sets the
// transmit gain and drives the PDM control outputs) and feeds soft symbols to the
// deinterleaver and the Viterbi decoder, whose bits the host reads from the interface.
// Transmit: bits written by the host are encoded, interleaved, Walsh modulated,
// spread, gated and filtered; txi/txq (or the multiplexed txiq) change at four
// samples per chip. tx_gain scales the transmitter outside the chip.
// The block list and data flow follow the design description; the clocking, the
// register interface and the pin list are this design's own.
module modem_asic
  import cdma_pkg::*;
#(
  parameter int NF = 3,
  parameter int CLK_PER_CHIP = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic        bus_cs,
  input  logic        bus_wr,
  input  logic [7:0]  bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  output logic        irq,
  // receive baseband
  input  logic signed [3:0] rx_i,
  input  logic signed [3:0] rx_q,
  // transmit baseband and control
  output logic signed [7:0] txi,
  output logic signed [7:0] txq,
  output logic [7:0]  txiq,
  output logic        tx_gate,
  output logic [7:0]  tx_gain,
  output logic        pwr_ctl_pdm,
  output logic        freq_ctl_pdm,
  output logic        asleep
);
  // timing
  logic en_x4, en_x2, wake, sleep_req;
  logic [15:0] sleep_chips;
  logic [31:0] chip_time;
  modem_clock_gen #(.CLK_PER_CHIP(CLK_PER_CHIP)) u_clk (
    .clk, .rst_n, .sleep_req, .sleep_chips, .en_x4, .en_x2, .asleep, .wake,
    .chip_time
  );

  // host interface signals
  logic tx_enable, iq_sel, tx_bit_valid, tx_bit, tx_bit_ready, frame_strobe_tx, frame_sent;
  logic [1:0] tx_rate;
  logic [41:0] lc_mask, lc_state;
  logic srch_start, srch_busy, srch_done, srch_res_valid, srch_res_pass, srch_res_dwell2;
  logic [15:0] srch_win, srch_l1, srch_l2, srch_res_offset, slew_chips, rx_power;
  logic [31:0] srch_t1, srch_t2, srch_res_energy;
  logic [NF-1:0] finger_en, slew_req, f_lock, f_valid;
  logic [NF-1:0][5:0] walsh_idx;
  logic [NF-1:0][23:0] f_energy;
  logic signed [NF-1:0][15:0] f_sym, f_ferr;
  logic track_en, pdm_en, lc_load;
  logic [23:0] track_thr, lock_thr;
  logic [3:0] soft_shift;
  logic [7:0] pc_step;

  reverse_modulator u_mod (
    .clk, .rst_n, .samp_en(en_x4), .tx_enable, .bit_valid(tx_bit_valid), .bit_data(tx_bit),
    .bit_rate(rate_e'(tx_rate)), .bit_ready(tx_bit_ready), .lc_mask, .iq_sel, .txi, .txq,
    .txiq, .tx_gate, .frame_strobe(frame_strobe_tx), .frame_sent
  );

  pilot_searcher u_srch (
    .clk, .rst_n, .samp_en(en_x2), .rx_i, .rx_q, .start(srch_start), .win(srch_win),
    .l1(srch_l1), .l2(srch_l2), .t1(srch_t1), .t2(srch_t2), .busy(srch_busy),
    .done(srch_done), .res_valid(srch_res_valid), .res_offset(srch_res_offset),
    .res_energy(srch_res_energy), .res_pass(srch_res_pass), .res_dwell2(srch_res_dwell2)
  );

  for (genvar f = 0; f < NF; f++) begin : g_finger
    logic ph_unused;
    logic [15:0] adj_e_unused, adj_l_unused;
    rake_finger u_finger (
      .clk, .rst_n, .samp_en(en_x2), .rx_i, .rx_q, .walsh_idx(walsh_idx[f]),
      .slew_req(slew_req[f]), .slew_chips, .track_en, .track_thr, .lock_thr,
      .sym_valid(f_valid[f]), .sym(f_sym[f]), .pilot_energy(f_energy[f]),
      .freq_err(f_ferr[f]), .lock(f_lock[f]), .ph(ph_unused), .adj_early(adj_e_unused),
      .adj_late(adj_l_unused)
    );
  end

  logic pw_valid;
  logic [16:0] pw;
  power_measurement u_pwr (
    .clk, .rst_n, .samp_en(en_x2), .rx_i, .rx_q, .valid(pw_valid), .power(pw)
  );
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rx_power <= '0;
    else if (pw_valid) rx_power <= pw[16] ? 16'hFFFF : pw[15:0];

  logic cmb_valid, pc_valid, pc_bit, pcg_strobe, frame_strobe;
  logic signed [3:0] cmb_sym;
  logic [15:0] frame_cnt;
  logic [7:0] deskew_err;
  symbol_combiner #(.NF(NF)) u_comb (
    .clk, .rst_n, .finger_en, .f_valid, .f_sym, .f_ferr, .lc_mask, .lc_load, .lc_state,
    .soft_shift, .pc_step, .pdm_en, .out_valid(cmb_valid), .out_sym(cmb_sym), .pc_valid,
    .pc_bit, .tx_gain, .pwr_ctl_pdm, .freq_ctl_pdm, .pcg_strobe, .frame_strobe, .frame_cnt,
    .deskew_err
  );

  logic di_valid, di_last, di_ready;
  logic signed [3:0] di_sym;
  logic [7:0] di_overflow;
  block_deinterleaver u_deint (
    .clk, .rst_n, .in_valid(cmb_valid), .in_sym(cmb_sym), .out_valid(di_valid),
    .out_sym(di_sym), .out_last(di_last), .out_ready(di_ready), .overflow(di_overflow)
  );

  logic dec_valid, dec_bit, dec_done, dec_quality;
  logic [8:0] dec_ser;
  viterbi_decoder u_vit (
    .clk, .rst_n, .in_valid(di_valid), .in_sym(di_sym), .in_ready(di_ready),
    .out_valid(dec_valid), .out_bit(dec_bit), .done(dec_done), .quality(dec_quality),
    .ser(dec_ser)
  );

  up_interface #(.NF(NF)) u_up (
    .clk, .rst_n, .bus_cs, .bus_wr, .bus_addr, .bus_wdata, .bus_rdata, .irq,
    .tx_enable, .iq_sel, .tx_bit_valid, .tx_bit, .tx_rate, .tx_bit_ready, .lc_mask,
    .srch_start, .srch_win, .srch_l1, .srch_l2, .srch_t1, .srch_t2, .srch_busy, .srch_done,
    .srch_res_valid, .srch_res_offset, .srch_res_energy, .srch_res_pass, .srch_res_dwell2,
    .finger_en, .walsh_idx, .slew_req, .slew_chips, .track_en, .track_thr, .lock_thr,
    .f_lock, .f_energy, .soft_shift, .pc_step, .pdm_en, .lc_load, .lc_state,
    .frame_strobe, .pc_valid, .pc_bit, .pcg_strobe, .frame_cnt, .deskew_err, .di_overflow,
    .chip_time, .tx_frame_strobe(frame_strobe_tx), .tx_frame_sent(frame_sent), .rx_power, .dec_valid, .dec_bit, .dec_done, .dec_quality, .dec_ser,
    .sleep_req, .sleep_chips, .asleep, .wake
  );
endmodule
