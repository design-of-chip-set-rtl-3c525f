// rake_finger: one finger of the three-finger rake receiver. It follows one multipath
// component of the forward link: short PN despreading of the I/Q samples, Walsh
// demodulation of the pilot (Walsh 0) and of one traffic channel (walsh_idx), pilot
// energy measurement, coherent demodulation of the traffic symbol against the pilot
// phase, a frequency error signal, and early/late timing tracking.
// Samples arrive at two per chip (samp_en). The finger keeps the last two samples; on
// the sample after its on-time sample it has early (half chip before), on-time and
// late (half chip after) samples at hand, and treats one chip. ph picks which sample
// phase is on time. The local I/Q PN generators step once per treated chip; suppressing
// one chip retards the local code by a chip, which is how slews (slew_req, slew_chips:
// assign a new PN offset) and late timing corrections are made. Timing: the early-late
// energy difference is accumulated each symbol; past +/-track_thr the on-time phase
// moves half a chip (to later also suppressing one chip).
// Symbols are 64 chips aligned to the PN period. At each symbol end sym_valid pulses
// with: sym = Re(D * conj(P)) >>> 8 (D traffic, P pilot correlation), pilot energy
// |P|^2, freq_err = Im(P * conj(P_prev)) >>> 8 and lock (energy >= lock_thr).
// The list of functions follows the design description; all arithmetic, widths and
// the tracking rule are this design's choices.
module rake_finger #(
  parameter int RX_W  = 4,
  parameter int ACC_W = 14
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   samp_en,
  input  logic signed [RX_W-1:0] rx_i,
  input  logic signed [RX_W-1:0] rx_q,
  input  logic [5:0]             walsh_idx,
  input  logic                   slew_req,
  input  logic [15:0]            slew_chips,
  input  logic                   track_en,
  input  logic [23:0]            track_thr,
  input  logic [23:0]            lock_thr,
  output logic                   sym_valid,
  output logic signed [15:0]     sym,
  output logic [23:0]            pilot_energy,
  output logic signed [15:0]     freq_err,
  output logic                   lock,
  output logic                   ph,
  output logic [15:0]            adj_early,
  output logic [15:0]            adj_late
);
  typedef logic signed [ACC_W-1:0] acc_t;

  logic signed [RX_W-1:0] e_i, e_q, o_i, o_q;   // early and on-time samples
  logic        par;                             // parity of the incoming sample
  logic [15:0] skip;                            // chips still to suppress
  logic        chip, strobe;
  logic        pn_i, pn_q, epoch;
  logic [5:0]  wcnt;

  assign chip   = samp_en && (par != ph);
  assign strobe = chip && skip == '0;

  short_pn_gen #(.TAPS(cdma_pkg::PN_I_TAPS)) u_pni (.clk, .rst_n, .step(strobe), .pn(pn_i), .epoch);
  short_pn_gen #(.TAPS(cdma_pkg::PN_Q_TAPS)) u_pnq (.clk, .rst_n, .step(strobe), .pn(pn_q), .epoch());

  // despread: (r_i + j r_q)(p_i - j p_q), p = +1 for code bit 0
  function automatic acc_t dsp_re(input logic signed [RX_W-1:0] ri, input logic signed [RX_W-1:0] rq,
                                  input logic pi, input logic pq);
    return (pi ? -acc_t'(ri) : acc_t'(ri)) + (pq ? -acc_t'(rq) : acc_t'(rq));
  endfunction
  function automatic acc_t dsp_im(input logic signed [RX_W-1:0] ri, input logic signed [RX_W-1:0] rq,
                                  input logic pi, input logic pq);
    return (pi ? -acc_t'(rq) : acc_t'(rq)) - (pq ? -acc_t'(ri) : acc_t'(ri));
  endfunction

  acc_t d_re, d_im, e_re, e_im, l_re, l_im;
  assign d_re = dsp_re(o_i, o_q, pn_i, pn_q);
  assign d_im = dsp_im(o_i, o_q, pn_i, pn_q);
  assign e_re = dsp_re(e_i, e_q, pn_i, pn_q);
  assign e_im = dsp_im(e_i, e_q, pn_i, pn_q);
  assign l_re = dsp_re(rx_i, rx_q, pn_i, pn_q);
  assign l_im = dsp_im(rx_i, rx_q, pn_i, pn_q);

  logic  wchip;
  assign wchip = ^(walsh_idx & wcnt);

  acc_t pa_re, pa_im, ta_re, ta_im, ea_re, ea_im, la_re, la_im;
  acc_t p_re, p_im, t_re, t_im, ee_re, ee_im, le_re, le_im;
  assign p_re  = pa_re + d_re;
  assign p_im  = pa_im + d_im;
  assign t_re  = ta_re + (wchip ? -d_re : d_re);
  assign t_im  = ta_im + (wchip ? -d_im : d_im);
  assign ee_re = ea_re + e_re;
  assign ee_im = ea_im + e_im;
  assign le_re = la_re + l_re;
  assign le_im = la_im + l_im;

  logic signed [2*ACC_W:0] dot, crs, en_e, en_l, en_p;
  acc_t prev_re, prev_im;
  assign dot  = p_re * t_re + p_im * t_im;
  assign crs  = p_im * prev_re - p_re * prev_im;
  assign en_p = p_re * p_re + p_im * p_im;
  assign en_e = ee_re * ee_re + ee_im * ee_im;
  assign en_l = le_re * le_re + le_im * le_im;

  logic signed [2*ACC_W+2:0] terr;   // accumulated late-minus-early energy
  logic signed [2*ACC_W+2:0] terr_n, thr_p;
  assign terr_n = terr + (2*ACC_W+3)'(en_l) - (2*ACC_W+3)'(en_e);
  assign thr_p  = (2*ACC_W+3)'($signed({1'b0, track_thr}));

  function automatic logic signed [15:0] sat16(input logic signed [2*ACC_W:0] x);
    logic signed [2*ACC_W:0] s;
    s = x >>> 8;
    if (s > 32767) return 16'sd32767;
    if (s < -32768) return -16'sd32768;
    return 16'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_i <= '0; e_q <= '0; o_i <= '0; o_q <= '0; par <= 1'b0; ph <= 1'b0; skip <= '0;
      wcnt <= '0; pa_re <= '0; pa_im <= '0; ta_re <= '0; ta_im <= '0;
      ea_re <= '0; ea_im <= '0; la_re <= '0; la_im <= '0; prev_re <= '0; prev_im <= '0;
      terr <= '0; sym_valid <= 1'b0; sym <= '0; pilot_energy <= '0; freq_err <= '0;
      lock <= 1'b0; adj_early <= '0; adj_late <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (samp_en) begin
        e_i <= o_i; e_q <= o_q; o_i <= rx_i; o_q <= rx_q;
        par <= !par;
      end
      if (slew_req) skip <= slew_chips;
      else if (chip && skip != '0) skip <= skip - 1'b1;

      if (strobe) begin
        wcnt <= epoch ? 6'd1 : wcnt + 1'b1;
        if (epoch || wcnt != 6'd63) begin
          pa_re <= epoch ? d_re : p_re;  pa_im <= epoch ? d_im : p_im;
          ta_re <= epoch ? d_re : t_re;  ta_im <= epoch ? d_im : t_im;
          ea_re <= epoch ? e_re : ee_re; ea_im <= epoch ? e_im : ee_im;
          la_re <= epoch ? l_re : le_re; la_im <= epoch ? l_im : le_im;
        end else begin
          // end of a 64-chip symbol
          pa_re <= '0; pa_im <= '0; ta_re <= '0; ta_im <= '0;
          ea_re <= '0; ea_im <= '0; la_re <= '0; la_im <= '0;
          prev_re <= p_re; prev_im <= p_im;
          sym_valid    <= 1'b1;
          sym          <= sat16(dot);
          freq_err     <= sat16(crs);
          pilot_energy <= (en_p > (2**24 - 1)) ? 24'hFF_FFFF : 24'(en_p);
          lock         <= en_p >= (2*ACC_W+1)'(lock_thr);
          if (track_en) begin
            if (terr_n > thr_p) begin
              // signal arrives later than the on-time sample: move half a chip later
              terr <= '0; ph <= !ph; skip <= skip + 1'b1; adj_late <= adj_late + 1'b1;
            end else if (terr_n < -thr_p) begin
              terr <= '0; ph <= !ph; adj_early <= adj_early + 1'b1;
            end else terr <= terr_n;
          end
        end
      end
    end
  end
endmodule
