// up_interface: microcontroller interface of the modem. An 80C186-class host reaches
// the modem through a synchronous register port: bus_cs with bus_wr (write bus_wdata
// to bus_addr at this clock) or a read (bus_rdata is combinational from bus_addr; a
// read of a popping register takes effect when bus_cs is high without bus_wr).
// The block holds the control registers of the modulator, searcher, fingers, combiner
// and sleep logic, a transmit bit FIFO (16-bit words, sent MSB first to the modulator),
// the searcher result register, a receive FIFO that packs decoded bits into 16-bit
// words, and an interrupt status/mask pair driving irq (level).
// Register map (word addresses):
//  00 CTRL     [0] tx_enable [1] iq_sel [2] track_en [3] pdm_en [6:4] finger_en
//  01 TXDATA   write: push one 16-bit word of traffic bits
//  02 TXRATE   [1:0] rate of the pushed bits (0 full .. 3 eighth)
//  03 STATUS   [3:0] free TX words [4] searcher busy [9:5] RX words [10] quality
//              [11] asleep [12] combiner lock (any finger)
//  04-06 LCMASK  long code mask, 16/16/10 bits, low word first
//  07 SRCH     write: start the searcher
//  08 WIN  09 L1  0A L2  0B T1 (x256)  0C T2 (x256)
//  10 SRES_OFF  11 SRES_ELO  12 SRES_EHI  13 SRES_FLAGS [0] valid [1] pass [2] dwell2
//     (a read of 13 clears valid)
//  14 TRACK_THR (x256)  15 LOCK_THR (x256)  16 SOFT_SHIFT  17 PC_STEP
//  18-1A LCSTATE  long code state for system time alignment; 1B write: load it
//  1C RXPOWER  1D IMASK  1E ISTAT (write 1 to clear) [0] frame [1] search done
//     [2] decoder frame done [3] wake [4] transmit frame boundary [5] traffic frame sent
//  1F SLEEP write: sleep for the given chips
//  20 DEC_DATA read pops one decoded word   21 DEC_SER  symbol errors of last frame
//  22 FRAME_CNT (receive frames)  23 ERRORS [15:8] deskew errors [7:0] deinterleaver
//     overflows  24/25 CHIP_TIME low/high  26 PC_STAT [15] last power control bit
//     [7:0] power control bits received  27 PCG_CNT power control groups
//  28+f WALSH of finger f   2C+f SLEW of finger f (write starts a slew)
//  30+f finger lock/energy [15] lock [14:0] pilot energy >> 8
// The need for a microcontroller interface follows the design description; the
// register map, FIFO depths and bus timing are this design's own.
module up_interface #(
  parameter int NF       = 3,
  parameter int TX_WORDS = 8,
  parameter int RX_WORDS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_cs,
  input  logic        bus_wr,
  input  logic [7:0]  bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  output logic        irq,
  // modulator
  output logic        tx_enable,
  output logic        iq_sel,
  output logic        tx_bit_valid,
  output logic        tx_bit,
  output logic [1:0]  tx_rate,
  input  logic        tx_bit_ready,
  output logic [41:0] lc_mask,
  // searcher
  output logic        srch_start,
  output logic [15:0] srch_win,
  output logic [15:0] srch_l1,
  output logic [15:0] srch_l2,
  output logic [31:0] srch_t1,
  output logic [31:0] srch_t2,
  input  logic        srch_busy,
  input  logic        srch_done,
  input  logic        srch_res_valid,
  input  logic [15:0] srch_res_offset,
  input  logic [31:0] srch_res_energy,
  input  logic        srch_res_pass,
  input  logic        srch_res_dwell2,
  // fingers and combiner
  output logic [NF-1:0]      finger_en,
  output logic [NF-1:0][5:0] walsh_idx,
  output logic [NF-1:0]      slew_req,
  output logic [15:0]        slew_chips,
  output logic        track_en,
  output logic [23:0] track_thr,
  output logic [23:0] lock_thr,
  input  logic [NF-1:0]       f_lock,
  input  logic [NF-1:0][23:0] f_energy,
  output logic [3:0]  soft_shift,
  output logic [7:0]  pc_step,
  output logic        pdm_en,
  output logic        lc_load,
  output logic [41:0] lc_state,
  input  logic        frame_strobe,
  input  logic        pc_valid,
  input  logic        pc_bit,
  input  logic        pcg_strobe,
  input  logic [15:0] frame_cnt,
  input  logic [7:0]  deskew_err,
  input  logic [7:0]  di_overflow,
  input  logic [31:0] chip_time,
  input  logic        tx_frame_strobe,
  input  logic        tx_frame_sent,
  input  logic [15:0] rx_power,
  // decoder
  input  logic        dec_valid,
  input  logic        dec_bit,
  input  logic        dec_done,
  input  logic        dec_quality,
  input  logic [8:0]  dec_ser,
  // sleep
  output logic        sleep_req,
  output logic [15:0] sleep_chips,
  input  logic        asleep,
  input  logic        wake
);
  localparam int TXA = $clog2(TX_WORDS), RXA = $clog2(RX_WORDS);

  logic [15:0] txf [TX_WORDS];
  logic [TXA:0] tx_cnt;
  logic [TXA-1:0] tx_rp, tx_wp;
  logic [3:0]  tx_bitpos;
  logic [15:0] rxf [RX_WORDS];
  logic [RXA:0] rx_cnt;
  logic [RXA-1:0] rx_rp, rx_wp;
  logic [15:0] rx_sh;
  logic [3:0]  rx_bits;
  logic [5:0]  istat, imask;
  logic [7:0]  pc_cnt;
  logic        pc_last;
  logic [15:0] pcg_cnt;
  logic [15:0] res_off, res_elo, res_ehi;
  logic [2:0]  res_flags;
  logic [8:0]  last_ser;
  logic        quality_r;
  logic [15:0] t1w, t2w, thr_t, thr_l;

  logic wr, rd;
  assign wr = bus_cs && bus_wr;
  assign rd = bus_cs && !bus_wr;

  assign tx_bit_valid = tx_cnt != '0;
  assign tx_bit       = txf[tx_rp][4'd15 - tx_bitpos];
  assign srch_t1   = {8'd0, t1w, 8'd0};
  assign srch_t2   = {8'd0, t2w, 8'd0};
  assign track_thr = {thr_t, 8'd0};
  assign lock_thr  = {thr_l, 8'd0};
  assign irq = |(istat & imask);

  logic tx_push, tx_pop, rx_push, rx_pop;
  assign tx_push = wr && bus_addr == 8'h01 && int'(tx_cnt) < TX_WORDS;
  assign tx_pop  = tx_bit_valid && tx_bit_ready && tx_bitpos == 4'd15;
  assign rx_pop  = rd && bus_addr == 8'h20 && rx_cnt != '0;
  // a word is complete on 16 bits or at the end of the frame (partial word, left aligned)
  logic rx_word;
  logic [15:0] rx_word_data;
  assign rx_word = (dec_valid && rx_bits == 4'd15) || (dec_done && rx_bits != 4'd0 && !dec_valid);
  assign rx_word_data = dec_valid ? {rx_sh[14:0], dec_bit} : rx_sh << (5'd16 - 5'(rx_bits));
  assign rx_push = rx_word && int'(rx_cnt) < RX_WORDS;

  always_comb begin
    bus_rdata = '0;
    unique casez (bus_addr)
      8'h00: bus_rdata = {9'd0, 3'(finger_en), pdm_en, track_en, iq_sel, tx_enable};
      8'h02: bus_rdata = {14'd0, tx_rate};
      8'h03: bus_rdata = {3'd0, |f_lock, asleep, quality_r, 5'(rx_cnt), srch_busy,
                          4'(TX_WORDS - int'(tx_cnt))};
      8'h04: bus_rdata = lc_mask[15:0];
      8'h05: bus_rdata = lc_mask[31:16];
      8'h06: bus_rdata = {6'd0, lc_mask[41:32]};
      8'h08: bus_rdata = srch_win;
      8'h09: bus_rdata = srch_l1;
      8'h0A: bus_rdata = srch_l2;
      8'h0B: bus_rdata = t1w;
      8'h0C: bus_rdata = t2w;
      8'h10: bus_rdata = res_off;
      8'h11: bus_rdata = res_elo;
      8'h12: bus_rdata = res_ehi;
      8'h13: bus_rdata = {13'd0, res_flags};
      8'h14: bus_rdata = thr_t;
      8'h15: bus_rdata = thr_l;
      8'h16: bus_rdata = {12'd0, soft_shift};
      8'h17: bus_rdata = {8'd0, pc_step};
      8'h1C: bus_rdata = rx_power;
      8'h1D: bus_rdata = {10'd0, imask};
      8'h1E: bus_rdata = {10'd0, istat};
      8'h20: bus_rdata = rxf[rx_rp];
      8'h21: bus_rdata = {7'd0, last_ser};
      8'h22: bus_rdata = frame_cnt;
      8'h23: bus_rdata = {deskew_err, di_overflow};
      8'h24: bus_rdata = chip_time[15:0];
      8'h25: bus_rdata = chip_time[31:16];
      8'h26: bus_rdata = {pc_last, 7'd0, pc_cnt};
      8'h27: bus_rdata = pcg_cnt;
      8'b0010_10??: bus_rdata = (int'(bus_addr[1:0]) < NF) ? {10'd0, walsh_idx[bus_addr[1:0]]} : '0;
      8'b0011_00??: bus_rdata = (int'(bus_addr[1:0]) < NF)
                      ? {f_lock[bus_addr[1:0]], f_energy[bus_addr[1:0]][22:8]} : '0;
      default: bus_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_enable <= 1'b0; iq_sel <= 1'b0; track_en <= 1'b0; pdm_en <= 1'b0; finger_en <= '0;
      tx_rate <= '0; lc_mask <= '0; srch_start <= 1'b0; srch_win <= '0; srch_l1 <= '0;
      srch_l2 <= '0; t1w <= '0; t2w <= '0; thr_t <= '0; thr_l <= '0; soft_shift <= '0;
      pc_step <= 8'd1; lc_load <= 1'b0; lc_state <= '0; walsh_idx <= '0; slew_req <= '0;
      slew_chips <= '0; sleep_req <= 1'b0; sleep_chips <= '0; imask <= '0; istat <= '0;
      tx_cnt <= '0; tx_rp <= '0; tx_wp <= '0; tx_bitpos <= '0;
      rx_cnt <= '0; rx_rp <= '0; rx_wp <= '0; rx_sh <= '0; rx_bits <= '0;
      res_off <= '0; res_elo <= '0; res_ehi <= '0; res_flags <= '0; last_ser <= '0;
      quality_r <= 1'b0; pc_cnt <= '0; pc_last <= 1'b0; pcg_cnt <= '0;
      for (int i = 0; i < TX_WORDS; i++) txf[i] <= '0;
      for (int i = 0; i < RX_WORDS; i++) rxf[i] <= '0;
    end else begin
      srch_start <= 1'b0; lc_load <= 1'b0; slew_req <= '0; sleep_req <= 1'b0;
      // register writes
      if (wr) begin
        unique casez (bus_addr)
          8'h00: begin
            tx_enable <= bus_wdata[0]; iq_sel <= bus_wdata[1]; track_en <= bus_wdata[2];
            pdm_en <= bus_wdata[3]; finger_en <= bus_wdata[4 +: NF];
          end
          8'h02: tx_rate <= bus_wdata[1:0];
          8'h04: lc_mask[15:0]  <= bus_wdata;
          8'h05: lc_mask[31:16] <= bus_wdata;
          8'h06: lc_mask[41:32] <= bus_wdata[9:0];
          8'h07: srch_start <= 1'b1;
          8'h08: srch_win <= bus_wdata;
          8'h09: srch_l1 <= bus_wdata;
          8'h0A: srch_l2 <= bus_wdata;
          8'h0B: t1w <= bus_wdata;
          8'h0C: t2w <= bus_wdata;
          8'h14: thr_t <= bus_wdata;
          8'h15: thr_l <= bus_wdata;
          8'h16: soft_shift <= bus_wdata[3:0];
          8'h17: pc_step <= bus_wdata[7:0];
          8'h18: lc_state[15:0]  <= bus_wdata;
          8'h19: lc_state[31:16] <= bus_wdata;
          8'h1A: lc_state[41:32] <= bus_wdata[9:0];
          8'h1B: lc_load <= 1'b1;
          8'h1D: imask <= bus_wdata[5:0];
          8'h1F: begin sleep_req <= 1'b1; sleep_chips <= bus_wdata; end
          8'b0010_10??: if (int'(bus_addr[1:0]) < NF) walsh_idx[bus_addr[1:0]] <= bus_wdata[5:0];
          8'b0010_11??: if (int'(bus_addr[1:0]) < NF) begin
            slew_req[bus_addr[1:0]] <= 1'b1; slew_chips <= bus_wdata;
          end
          default: ;
        endcase
      end
      // transmit FIFO
      if (tx_push) begin txf[tx_wp] <= bus_wdata; tx_wp <= tx_wp + 1'b1; end
      if (tx_bit_valid && tx_bit_ready) tx_bitpos <= tx_bitpos + 1'b1;
      if (tx_pop) tx_rp <= tx_rp + 1'b1;
      tx_cnt <= tx_cnt + (TXA+1)'(tx_push) - (TXA+1)'(tx_pop);
      // decoded bits
      if (dec_valid) begin
        rx_sh <= {rx_sh[14:0], dec_bit};
        rx_bits <= rx_bits + 1'b1;
      end else if (rx_word) rx_bits <= '0;
      if (rx_push) begin rxf[rx_wp] <= rx_word_data; rx_wp <= rx_wp + 1'b1; end
      if (rx_pop) rx_rp <= rx_rp + 1'b1;
      rx_cnt <= rx_cnt + (RXA+1)'(rx_push) - (RXA+1)'(rx_pop);
      if (dec_done) begin last_ser <= dec_ser; quality_r <= dec_quality; end
      // searcher result (kept until read)
      if (srch_res_valid && !res_flags[0]) begin
        res_off <= srch_res_offset; res_elo <= srch_res_energy[15:0];
        res_ehi <= srch_res_energy[31:16];
        res_flags <= {srch_res_dwell2, srch_res_pass, 1'b1};
      end else if (rd && bus_addr == 8'h13) res_flags[0] <= 1'b0;
      // interrupt status
      istat <= (istat & ~((wr && bus_addr == 8'h1E) ? bus_wdata[5:0] : 6'd0))
             | {tx_frame_sent, tx_frame_strobe, wake, dec_done, srch_done, frame_strobe};
      if (pc_valid) begin pc_cnt <= pc_cnt + 1'b1; pc_last <= pc_bit; end
      if (pcg_strobe) pcg_cnt <= pcg_cnt + 1'b1;
    end
  end
endmodule
