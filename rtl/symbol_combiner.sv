// symbol_combiner: joins the three rake fingers into one soft symbol stream.
// Deskew: each finger's symbols enter a 4-deep FIFO, so fingers may be up to four
// symbols apart; when every enabled finger has a symbol waiting, one symbol of each is
// popped and summed (a finger whose FIFO is full and receives another symbol loses the
// oldest, counted in deskew_err). System time: combined symbols are counted in power
// control groups (PCGs) of 24 symbols (1.25 ms) and frames of 16 PCGs (20 ms); pcg_strobe
// and frame_strobe are the reference clock outputs and frame_cnt the absolute time.
// Power control bit: in each PCG the bit occupies two symbols starting at a position
// given by four long code bits from the previous PCG; those two symbols are summed to
// decide the bit (0 = raise power) and are replaced by erasures (0) in the data stream.
// The bit steps an 8-bit transmit gain word by pc_step, sent out as a PDM signal.
// Long code despreading: every data symbol is multiplied by the user's long code. The
// long code advances once per symbol here; as a decimation by 64 of an m-sequence is the
// same sequence at another phase, this stands for the standard's 64:1 decimator once
// the code phase is loaded (lc_load). Frequency control: the enabled fingers' frequency
// errors are summed into an integrator whose upper byte, offset binary, drives a second
// PDM output. Output symbols are the combined value >>> soft_shift saturated to SOFT_W
// bits. The list of duties follows the design description; positions, widths and
// scaling are this design's choices.
module symbol_combiner #(
  parameter int NF     = 3,
  parameter int SOFT_W = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NF-1:0]              finger_en,
  input  logic [NF-1:0]              f_valid,
  input  logic signed [NF-1:0][15:0] f_sym,
  input  logic signed [NF-1:0][15:0] f_ferr,
  input  logic [41:0]                lc_mask,
  input  logic                       lc_load,
  input  logic [41:0]                lc_state,
  input  logic [3:0]                 soft_shift,
  input  logic [7:0]                 pc_step,
  input  logic                       pdm_en,
  output logic                       out_valid,
  output logic signed [SOFT_W-1:0]   out_sym,
  output logic                       pc_valid,
  output logic                       pc_bit,
  output logic [7:0]                 tx_gain,
  output logic                       pwr_ctl_pdm,
  output logic                       freq_ctl_pdm,
  output logic                       pcg_strobe,
  output logic                       frame_strobe,
  output logic [15:0]                frame_cnt,
  output logic [7:0]                 deskew_err
);
  // ---------------- deskew FIFOs ----------------
  logic signed [15:0] fifo [NF][4];
  logic [1:0]         rp [NF], wp [NF];
  logic [2:0]         cnt [NF];
  logic               all_ready, pop;

  always_comb begin
    all_ready = |finger_en;
    for (int f = 0; f < NF; f++) if (finger_en[f] && cnt[f] == 3'd0) all_ready = 1'b0;
  end
  assign pop = all_ready;

  logic signed [17:0] comb;
  always_comb begin
    comb = '0;
    for (int f = 0; f < NF; f++) if (finger_en[f]) comb = comb + 18'(fifo[f][rp[f]]);
  end

  // ---------------- system time and long code ----------------
  logic [4:0] sym_idx;        // symbol within PCG, 0..23
  logic [3:0] pcg_idx;
  logic       lc;
  logic [41:0] lc_reg;
  logic [2:0] lc_hist;
  logic [3:0] pc_pos;
  long_code_gen u_lc (.clk, .rst_n, .step(pop), .load(lc_load), .load_state(lc_state),
                      .mask(lc_mask), .lc, .state(lc_reg));

  logic is_pc0, is_pc1;
  assign is_pc0 = sym_idx == {1'b0, pc_pos};
  assign is_pc1 = sym_idx == {1'b0, pc_pos} + 5'd1;

  logic signed [17:0] pc_acc, pc_sum, desc, shifted;
  assign pc_sum  = pc_acc + comb;
  assign desc    = lc ? -comb : comb;
  assign shifted = desc >>> soft_shift;

  function automatic logic signed [SOFT_W-1:0] satq(input logic signed [17:0] x);
    if (x > 18'(2**(SOFT_W-1)-1))  return SOFT_W'(2**(SOFT_W-1)-1);
    if (x < -18'(2**(SOFT_W-1)))   return SOFT_W'(-(2**(SOFT_W-1)));
    return SOFT_W'(x);
  endfunction

  // ---------------- frequency integrator ----------------
  logic signed [23:0] fint;
  logic signed [19:0] fsum;
  always_comb begin
    fsum = '0;
    for (int f = 0; f < NF; f++) if (finger_en[f] && f_valid[f]) fsum = fsum + 20'(f_ferr[f]);
  end

  pdm_modulator #(.W(8)) u_pdm_pwr (.clk, .rst_n, .en(pdm_en), .level(tx_gain), .pdm(pwr_ctl_pdm));
  pdm_modulator #(.W(8)) u_pdm_frq (.clk, .rst_n, .en(pdm_en), .level({~fint[23], fint[22:16]}),
                                    .pdm(freq_ctl_pdm));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NF; f++) begin rp[f] <= '0; wp[f] <= '0; cnt[f] <= '0; end
      deskew_err <= '0; sym_idx <= '0; pcg_idx <= '0; frame_cnt <= '0; lc_hist <= '0; pc_pos <= '0;
      pc_acc <= '0; out_valid <= 1'b0; out_sym <= '0; pc_valid <= 1'b0; pc_bit <= 1'b0;
      tx_gain <= 8'd128; fint <= '0; pcg_strobe <= 1'b0; frame_strobe <= 1'b0;
    end else begin
      out_valid <= 1'b0; pc_valid <= 1'b0; pcg_strobe <= 1'b0; frame_strobe <= 1'b0;
      // FIFOs
      for (int f = 0; f < NF; f++) begin
        logic popf, full;
        popf = pop && finger_en[f];
        full = cnt[f] == 3'd4;
        if (f_valid[f]) begin
          fifo[f][wp[f]] <= f_sym[f];
          wp[f] <= wp[f] + 1'b1;
        end
        if (f_valid[f] && full && !popf) begin
          rp[f] <= rp[f] + 1'b1;                  // overwrite the oldest
          deskew_err <= deskew_err + 8'd1;
        end else begin
          if (popf) rp[f] <= rp[f] + 1'b1;
          cnt[f] <= cnt[f] + 3'(f_valid[f]) - 3'(popf);
        end
      end
      fint <= fint + 24'(fsum);
      if (pop) begin
        lc_hist <= {lc_hist[1:0], lc};
        out_valid <= 1'b1;
        if (is_pc0) begin out_sym <= '0; pc_acc <= comb; end
        else if (is_pc1) begin
          out_sym  <= '0;
          pc_valid <= 1'b1;
          pc_bit   <= pc_sum < 0;
          if (pc_sum < 0) tx_gain <= (tx_gain < pc_step) ? 8'd0 : tx_gain - pc_step;
          else            tx_gain <= (tx_gain > 8'd255 - pc_step) ? 8'd255 : tx_gain + pc_step;
        end
        else out_sym <= satq(shifted);
        if (sym_idx == 5'd23) begin
          sym_idx    <= '0;
          pc_pos     <= {lc_hist[2:0], lc};
          pcg_strobe <= 1'b1;
          pcg_idx    <= pcg_idx + 1'b1;
          if (pcg_idx == 4'd15) begin frame_strobe <= 1'b1; frame_cnt <= frame_cnt + 1'b1; end
        end else sym_idx <= sym_idx + 1'b1;
      end
    end
  end
endmodule
