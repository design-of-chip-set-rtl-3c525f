// short_pn_gen: 15-stage short PN code generator for the quadrature spreading (I or Q
// code, selected by TAPS). The sequence obeys the recurrence given by TAPS (bit k-1 set:
// the element k chips back is XORed in). An extra zero is inserted after the single run
// of fourteen zeros so that the period becomes 2^15 = 32768 chips, as the air-interface
// standard requires. step advances one chip; hold suppresses that step (the owner slews
// its code later by one chip). epoch is high on the first chip of the period, which
// begins right after the inserted zero. Output pn is the current chip; it is valid from
// reset. Timing: the new chip appears the cycle after step.
module short_pn_gen #(
  parameter int N = 15,
  parameter logic [N-1:0] TAPS = cdma_pkg::PN_I_TAPS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  output logic pn,
  output logic epoch
);
  logic [N-1:0] hist;       // hist[0] = current chip, hist[k] = chip k steps ago
  logic [3:0]   zrun;       // zeros in a row, counting the current chip
  logic         stuffing;   // current chip is the inserted zero
  logic         nxt;

  always_comb begin
    nxt = 1'b0;
    for (int k = 1; k <= N; k++) if (TAPS[k-1]) nxt ^= hist[k-1];
  end

  assign pn = stuffing ? 1'b0 : hist[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist     <= {{(N-1){1'b0}}, 1'b1};   // period starts with a one after 14 zeros + stuffed zero
      zrun     <= '0;
      stuffing <= 1'b0;
      epoch    <= 1'b1;
    end else if (step) begin
      if (!stuffing && zrun == 4'(N-1)) begin
        stuffing <= 1'b1;                  // insert the extra zero, register holds
        epoch    <= 1'b0;
      end else begin
        stuffing <= 1'b0;
        epoch    <= stuffing;              // chip after the stuffed zero starts the period
        hist     <= {hist[N-2:0], nxt};
        zrun     <= nxt ? 4'd0 : zrun + 4'd1;
      end
    end
  end
endmodule
