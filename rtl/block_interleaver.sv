// block_interleaver: reverse-link block interleaver of ROWS x COLS code symbols
// (32 x 18 = 576, one 20 ms frame), double buffered so that one frame is written while
// the previous one is transmitted. Code symbols arrive as groups of N (one encoded data
// bit) and are repeated 2^rate times (no repetition at 9600 bps, 8 copies at 1200 bps),
// so every rate fills the whole array. Symbols are written down the columns: write index
// w goes to row w mod ROWS, column w / ROWS. The array is read by rows, in bit-reversed
// row order (the pre-determined order; the design description does not print it), six
// symbols at a time: each row of 18 symbols is three Walsh groups, so a group is one
// slice of one row word and a read takes no cycles.
// Interface: in_valid/in_ready handshake, one group accepted every N*2^rate cycles;
// in_rate is sampled with the first group of a frame. frame_avail says a full bank
// waits; rd_idx (0..95) selects a group of it combinationally; rd_done releases it.
module block_interleaver
  import cdma_pkg::*;
#(
  parameter int ROWS = 32,
  parameter int COLS = 18,
  parameter int N    = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] in_sym,
  input  rate_e        in_rate,
  output logic         in_ready,
  output logic         frame_avail,
  output rate_e        frame_rate,
  input  logic [6:0]   rd_idx,
  output logic [5:0]   rd_group,
  input  logic         rd_done
);
  localparam int SIZE  = ROWS * COLS;
  localparam int RB    = $clog2(ROWS);
  localparam int WB    = $clog2(SIZE);
  localparam int GROUPS_PER_ROW = COLS / 6;

  logic [COLS-1:0] mem [2][ROWS];
  logic [1:0]      full;
  rate_e           bank_rate [2];
  logic            wbank, rbank;
  logic [WB-1:0]   widx;
  logic [$clog2(N)-1:0] sub;     // symbol of the group being written
  logic [2:0]      rep;          // copy number of that symbol
  logic            busy;         // a group is being written
  logic [N-1:0]    grp;
  rate_e           cur_rate;

  logic [RB-1:0]   wrow;
  logic [$clog2(COLS)-1:0] wcol;
  assign wrow = RB'(widx % WB'(ROWS));
  assign wcol = ($clog2(COLS))'(widx / WB'(ROWS));

  logic [2:0] rep_last;
  always_comb rep_last = 3'((1 << cur_rate) - 1);

  assign in_ready    = !busy && !full[wbank];
  assign frame_avail = full[rbank];
  assign frame_rate  = bank_rate[rbank];

  // read side: group k is slice k mod 3 of row bitrev(k / 3)
  logic [RB-1:0] rrow;
  logic [1:0]    rslice;
  assign rrow     = RB'(bitrev(int'(rd_idx) / GROUPS_PER_ROW, RB));
  assign rslice   = 2'(int'(rd_idx) % GROUPS_PER_ROW);
  assign rd_group = mem[rbank][rrow][6*rslice +: 6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '0;
      wbank <= 1'b0;
      rbank <= 1'b0;
      widx  <= '0;
      sub   <= '0;
      rep   <= '0;
      busy  <= 1'b0;
      grp   <= '0;
      cur_rate <= RATE_FULL;
      bank_rate[0] <= RATE_FULL;
      bank_rate[1] <= RATE_FULL;
    end else begin
      if (rd_done && full[rbank]) begin
        full[rbank] <= 1'b0;
        rbank       <= !rbank;
      end
      if (in_valid && in_ready) begin
        busy <= 1'b1;
        grp  <= in_sym;
        sub  <= '0;
        rep  <= '0;
        if (widx == '0) cur_rate <= in_rate;
      end else if (busy) begin
        mem[wbank][wrow][wcol] <= grp[sub];
        if (rep == rep_last) begin
          rep <= '0;
          if (sub == ($clog2(N))'(N-1)) busy <= 1'b0;
          else sub <= sub + 1'b1;
        end else rep <= rep + 1'b1;
        if (widx == WB'(SIZE-1)) begin
          widx             <= '0;
          full[wbank]      <= 1'b1;
          bank_rate[wbank] <= cur_rate;
          wbank            <= !wbank;
          busy             <= 1'b0;
        end else widx <= widx + 1'b1;
      end
    end
  end
endmodule
