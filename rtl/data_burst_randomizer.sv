// data_burst_randomizer: selects which of the 16 power control groups (PCGs) of a
// 20 ms frame are transmitted, so that only one copy of each repeated code symbol is
// sent. The choice depends on the frame rate and on 14 long-code bits b0..b13. At full
// rate all groups are on; at half rate group 2i+b_i of each pair; quarter and eighth
// rate narrow that choice further with b8..b11 and b12..b13. This follows the
// air-interface standard's algorithm; the design description gives only its inputs.
// Combinational: pcg_mask bit g is 1 when PCG g is transmitted.
module data_burst_randomizer
  import cdma_pkg::*;
(
  input  rate_e        rate,
  input  logic [13:0]  b,
  output logic [15:0]  pcg_mask
);
  logic [15:0] half, quarter, eighth;
  always_comb begin
    half = '0; quarter = '0; eighth = '0;
    for (int i = 0; i < 8; i++) half[2*i + int'(b[i])] = 1'b1;
    for (int q = 0; q < 4; q++) begin
      // pair q of half-rate groups: choose the first or the second by b[8+q]
      if (!b[8+q]) quarter[4*q + int'(b[2*q])]       = 1'b1;
      else         quarter[4*q + 2 + int'(b[2*q+1])] = 1'b1;
    end
    for (int h = 0; h < 2; h++) begin
      // half frame h: b[12+h] selects which quarter-rate group survives
      if (!b[12+h]) eighth = eighth | (quarter & (16'h000F << (8*h)));
      else          eighth = eighth | (quarter & (16'h00F0 << (8*h)));
    end
    unique case (rate)
      RATE_FULL:    pcg_mask = 16'hFFFF;
      RATE_HALF:    pcg_mask = half;
      RATE_QUARTER: pcg_mask = quarter;
      default:      pcg_mask = eighth;
    endcase
  end
endmodule
