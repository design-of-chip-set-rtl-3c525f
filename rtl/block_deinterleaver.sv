// block_deinterleaver: forward-link block deinterleaver. One 20 ms frame of soft
// symbols (ROWS x COLS = 16 x 24 = 384 at 19.2 ksymbol/s) is written as it arrives from
// the symbol combiner and read back in code order for the Viterbi decoder. The
// base-station interleaver writes code symbols down the columns and sends the rows in
// bit-reversed row order, so received symbol j is stored at code index
// ROWS*(j mod COLS) + bitrev(j / COLS); reading is then linear. Two banks let one frame
// be received while the previous one is decoded. The array size and order are this
// design's choices (the description gives only the function, and that the
// deinterleaver uses a RAM of the modem). Interface: in_valid writes one symbol (no back
// pressure: a symbol arriving while both banks are full is dropped and counted in
// overflow); out_valid/out_ready streams a full bank in code order; out_last marks its
// final symbol.
module block_deinterleaver #(
  parameter int ROWS   = 16,
  parameter int COLS   = 24,
  parameter int SOFT_W = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [SOFT_W-1:0] in_sym,
  output logic                     out_valid,
  output logic signed [SOFT_W-1:0] out_sym,
  output logic                     out_last,
  input  logic                     out_ready,
  output logic [7:0]               overflow
);
  localparam int SIZE = ROWS * COLS;
  localparam int AW   = $clog2(SIZE);
  localparam int RB   = $clog2(ROWS);

  logic signed [SOFT_W-1:0] mem [2][SIZE];
  logic [1:0]    full;
  logic          wbank, rbank;
  logic [AW-1:0] widx, ridx;
  logic [AW-1:0] waddr;

  always_comb begin
    int unsigned r, br;
    r  = int'(widx) / COLS;
    br = 0;
    for (int i = 0; i < RB; i++) br |= ((r >> i) & 1) << (RB - 1 - i);
    waddr = AW'(ROWS * (int'(widx) % COLS) + int'(br));
  end

  assign out_valid = full[rbank];
  assign out_sym   = mem[rbank][ridx];
  assign out_last  = ridx == AW'(SIZE-1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wbank <= 1'b0; rbank <= 1'b0; widx <= '0; ridx <= '0; overflow <= '0;
    end else begin
      if (in_valid) begin
        if (full[wbank]) overflow <= overflow + 8'd1;
        else begin
          mem[wbank][waddr] <= in_sym;
          if (widx == AW'(SIZE-1)) begin
            widx <= '0; full[wbank] <= 1'b1; wbank <= !wbank;
          end else widx <= widx + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (out_last) begin
          ridx <= '0; full[rbank] <= 1'b0; rbank <= !rbank;
        end else ridx <= ridx + 1'b1;
      end
    end
  end
endmodule
