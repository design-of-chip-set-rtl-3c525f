// viterbi_decoder: maximum-likelihood decoder for the forward traffic channel's
// K = 9, R = 1/2 convolutional code (generators 753 and 561 octal, from the air-interface
// standard), one 20 ms full-rate frame of FRAME_BITS = 192 bits (172 data, 12 CRC, 8 zero
// tail) at a time. It is organised as the design description lists: an input buffer of
// soft symbols; a branch metric unit; an add-compare-select (ACS) unit whose 256 state
// metrics live in a pair of RAMs (old/new, swapped every trellis step); a path memory
// that keeps one decision bit per state and step; a traceback unit; and an output
// buffer. It also re-encodes the decoded bits to count symbol errors against the hard
// decisions of the input, and checks the frame CRC to produce the quality bit.
// Scheduling is this design's choice: one state per clock (256 clocks per trellis step,
// 49152 per frame), traceback of the whole frame from state 0 (the tail makes it
// known), then the bits leave in order, one per clock.
// Soft symbols are signed, positive meaning code bit 0. Branch metric: sum of the soft
// values with the sign of the expected bits; the larger path metric wins; metrics wrap
// and are compared by their signed difference. State s holds the last eight inputs,
// bit 0 newest; the predecessors of s are {0, s[7:1]} and {1, s[7:1]}.
// Interface: in_valid/in_ready accepts 2*FRAME_BITS symbols in code order; the decoder
// then stops accepting until the frame has been decoded. out_valid/out_bit give the
// FRAME_BITS-8 data and CRC bits in order (no back pressure); at the end, done pulses
// with quality (CRC matched) and ser (symbol errors in the frame).
module viterbi_decoder
  import cdma_pkg::*;
#(
  parameter int K          = 9,
  parameter int FRAME_BITS = 192,
  parameter int CRC_BITS   = 12,
  parameter int SOFT_W     = 4,
  parameter int MW         = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [SOFT_W-1:0] in_sym,
  output logic                     in_ready,
  output logic                     out_valid,
  output logic                     out_bit,
  output logic                     done,
  output logic                     quality,
  output logic [8:0]               ser
);
  localparam int NS    = 1 << (K - 1);
  localparam int SB    = K - 1;
  localparam int NSYM  = 2 * FRAME_BITS;
  localparam int TW    = $clog2(FRAME_BITS);
  localparam int NOUT  = FRAME_BITS - (K - 1);
  localparam int NDATA = NOUT - CRC_BITS;

  typedef enum logic [2:0] {S_FILL, S_ACS, S_TB, S_OUT, S_DONE} state_e;
  state_e st;

  // input buffer
  logic signed [SOFT_W-1:0] ibuf [NSYM];
  logic [$clog2(NSYM)-1:0]  icnt;
  // state metric RAMs and path memory
  logic signed [MW-1:0]     sm [2][NS];
  logic                     cur;
  logic [NS-1:0]            pm [FRAME_BITS];
  logic [SB-1:0]            s_idx;       // ACS state / traceback state
  logic [TW-1:0]            t;           // trellis step
  logic                     obuf [FRAME_BITS];

  // ---------------- branch metric and ACS ----------------
  logic [SB-1:0] p0, p1;
  logic          b;
  logic signed [SOFT_W-1:0] r0, r1;
  logic signed [MW-1:0] bm0, bm1, m0, m1;
  logic          dec;

  function automatic logic signed [MW-1:0] bmetric(
      input logic [SB-1:0] prev, input logic bit_in,
      input logic signed [SOFT_W-1:0] a, input logic signed [SOFT_W-1:0] c);
    logic [K-1:0] v;
    logic signed [MW-1:0] ea, ec;
    v  = {prev, bit_in};
    ea = MW'(a); ec = MW'(c);
    return (conv_bit(v, G_FWD0) ? -ea : ea) + (conv_bit(v, G_FWD1) ? -ec : ec);
  endfunction

  assign p0  = {1'b0, s_idx[SB-1:1]};
  assign p1  = {1'b1, s_idx[SB-1:1]};
  assign b   = s_idx[0];
  assign r0  = ibuf[2*t];
  assign r1  = ibuf[2*t + 1];
  assign bm0 = bmetric(p0, b, r0, r1);
  assign bm1 = bmetric(p1, b, r0, r1);
  // at the first step the old metrics are the start values: state 0 known
  localparam logic signed [MW-1:0] FAR = -MW'(1 << (MW - 4));
  assign m0  = ((t == '0) ? ((p0 == '0) ? '0 : FAR) : sm[cur][p0]) + bm0;
  assign m1  = ((t == '0) ? FAR : sm[cur][p1]) + bm1;
  assign dec = $signed(m1 - m0) > 0;

  // ---------------- output: re-encoder, SER, CRC ----------------
  logic [K-2:0]  enc_hist;
  logic [K-1:0]  enc_win;
  logic [CRC_BITS-1:0] crc;
  logic          crc_ok;
  logic [TW-1:0] o;
  logic          ob;
  assign ob      = obuf[o];
  assign enc_win = {enc_hist, ob};

  assign in_ready = st == S_FILL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_FILL; icnt <= '0; cur <= 1'b0; s_idx <= '0; t <= '0; o <= '0;
      out_valid <= 1'b0; out_bit <= 1'b0; done <= 1'b0; quality <= 1'b0; ser <= '0;
      enc_hist <= '0; crc <= '1; crc_ok <= 1'b1;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (st)
        S_FILL: if (in_valid) begin
          ibuf[icnt] <= in_sym;
          if (icnt == ($clog2(NSYM))'(NSYM-1)) begin
            icnt <= '0; st <= S_ACS; t <= '0; s_idx <= '0;
          end else icnt <= icnt + 1'b1;
        end
        S_ACS: begin
          sm[!cur][s_idx] <= dec ? m1 : m0;
          pm[t][s_idx]    <= dec;
          s_idx <= s_idx + 1'b1;
          if (s_idx == SB'(NS-1)) begin
            cur <= !cur;
            if (t == TW'(FRAME_BITS-1)) begin st <= S_TB; s_idx <= '0; end
            else t <= t + 1'b1;
          end
        end
        S_TB: begin
          // t walks back from the last step; s_idx is the state after step t
          obuf[t] <= s_idx[0];
          s_idx   <= {pm[t][s_idx], s_idx[SB-1:1]};
          if (t == '0) begin st <= S_OUT; o <= '0; enc_hist <= '0; crc <= '1; crc_ok <= 1'b1; ser <= '0; end
          else t <= t - 1'b1;
        end
        S_OUT: begin
          enc_hist <= {enc_hist[K-3:0], ob};
          ser <= ser + 9'(conv_bit(enc_win, G_FWD0) != ibuf[2*o][SOFT_W-1])
                     + 9'(conv_bit(enc_win, G_FWD1) != ibuf[2*o+1][SOFT_W-1]);
          if (int'(o) < NDATA)
            crc <= {crc[CRC_BITS-2:0], 1'b0} ^ ((crc[CRC_BITS-1] ^ ob) ? CRC12_POLY : '0);
          else if (int'(o) < NOUT) begin
            if (ob != crc[CRC_BITS-1]) crc_ok <= 1'b0;
            crc <= {crc[CRC_BITS-2:0], 1'b0};
          end
          if (int'(o) < NOUT) begin out_valid <= 1'b1; out_bit <= ob; end
          if (o == TW'(FRAME_BITS-1)) st <= S_DONE;
          else o <= o + 1'b1;
        end
        default: begin  // S_DONE
          done    <= 1'b1;
          quality <= crc_ok;
          st      <= S_FILL;
        end
      endcase
    end
  end
endmodule
