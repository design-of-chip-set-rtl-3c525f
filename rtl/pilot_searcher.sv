// pilot_searcher: acquisition by double-dwell serial search over pilot PN offsets.
// A local I/Q short PN pair is correlated with the received chips (the even sample of
// each chip pair). Each hypothesis (code offset) is first correlated for l1 chips and
// its energy |sum|^2 compared with t1. If it fails, the search moves on; if it passes,
// a second, longer dwell of l2 chips is compared with t2. Every hypothesis' final
// energy is reported on the result port (res_valid, one per hypothesis), the stream the
// microcontroller collects by DMA and sorts. Moving to the next hypothesis suppresses
// one local PN step, so the local code slips one chip later: hypothesis h tests offset
// start_offset + h chips relative to the searcher's code at reset.
// Interface: start begins a window of win hypotheses; busy while searching; done
// pulses at the end. res_offset counts hypotheses; res_pass says both dwells passed;
// res_dwell2 says the second dwell was run. The double-dwell rule follows the design
// description; chip-spaced hypotheses, widths and the port layout are this design's.
module pilot_searcher #(
  parameter int RX_W = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   samp_en,
  input  logic signed [RX_W-1:0] rx_i,
  input  logic signed [RX_W-1:0] rx_q,
  input  logic                   start,
  input  logic [15:0]            win,
  input  logic [15:0]            l1,
  input  logic [15:0]            l2,
  input  logic [31:0]            t1,
  input  logic [31:0]            t2,
  output logic                   busy,
  output logic                   done,
  output logic                   res_valid,
  output logic [15:0]            res_offset,
  output logic [31:0]            res_energy,
  output logic                   res_pass,
  output logic                   res_dwell2
);
  typedef enum logic [1:0] {S_IDLE, S_DWELL1, S_DWELL2, S_SLIP} st_e;
  st_e st;

  logic par, chip, step, pn_i, pn_q;
  logic [15:0] cnt, hyp;
  logic signed [23:0] acc_re, acc_im, n_re, n_im;
  logic signed [47:0] energy;

  assign chip = samp_en && !par;           // even samples only
  assign step = chip && st != S_SLIP;       // slip: hold the code one chip

  short_pn_gen #(.TAPS(cdma_pkg::PN_I_TAPS)) u_pni (.clk, .rst_n, .step, .pn(pn_i), .epoch());
  short_pn_gen #(.TAPS(cdma_pkg::PN_Q_TAPS)) u_pnq (.clk, .rst_n, .step, .pn(pn_q), .epoch());

  always_comb begin
    n_re = acc_re + (pn_i ? -24'(rx_i) : 24'(rx_i)) + (pn_q ? -24'(rx_q) : 24'(rx_q));
    n_im = acc_im + (pn_i ? -24'(rx_q) : 24'(rx_q)) - (pn_q ? -24'(rx_i) : 24'(rx_i));
    energy = n_re * n_re + n_im * n_im;
  end

  logic [31:0] e32;
  assign e32 = (energy > 48'(32'hFFFF_FFFF)) ? 32'hFFFF_FFFF : 32'(energy);

  assign busy = st != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; par <= 1'b0; cnt <= '0; hyp <= '0; acc_re <= '0; acc_im <= '0;
      done <= 1'b0; res_valid <= 1'b0; res_offset <= '0; res_energy <= '0;
      res_pass <= 1'b0; res_dwell2 <= 1'b0;
    end else begin
      done <= 1'b0; res_valid <= 1'b0;
      if (samp_en) par <= !par;
      unique case (st)
        S_IDLE: if (start) begin st <= S_DWELL1; hyp <= '0; cnt <= '0; acc_re <= '0; acc_im <= '0; end
        S_DWELL1: if (chip) begin
          if (cnt == l1 - 16'd1) begin
            cnt <= '0; acc_re <= '0; acc_im <= '0;
            if (e32 >= t1) st <= S_DWELL2;
            else begin
              st <= S_SLIP;
              res_valid <= 1'b1; res_offset <= hyp; res_energy <= e32; res_pass <= 1'b0; res_dwell2 <= 1'b0;
            end
          end else begin cnt <= cnt + 1'b1; acc_re <= n_re; acc_im <= n_im; end
        end
        S_DWELL2: if (chip) begin
          if (cnt == l2 - 16'd1) begin
            cnt <= '0; acc_re <= '0; acc_im <= '0; st <= S_SLIP;
            res_valid <= 1'b1; res_offset <= hyp; res_energy <= e32; res_pass <= e32 >= t2; res_dwell2 <= 1'b1;
          end else begin cnt <= cnt + 1'b1; acc_re <= n_re; acc_im <= n_im; end
        end
        default: if (chip) begin    // S_SLIP: this chip the code holds
          if (hyp == win - 16'd1) begin st <= S_IDLE; done <= 1'b1; end
          else begin hyp <= hyp + 1'b1; st <= S_DWELL1; end
        end
      endcase
    end
  end
endmodule
