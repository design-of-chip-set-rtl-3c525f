// cdma_pkg: constants and helper functions shared by the CDMA modem blocks.
// Code generators, PN recurrences and the CRC polynomial are the IS-95 / TTA-62
// values (the air-interface standard the modem implements); the rate encoding and
// soft-symbol width are choices of this design.
package cdma_pkg;

  // Data rate of a traffic frame: full 9600, half 4800, quarter 2400, eighth 1200 bps.
  typedef enum logic [1:0] {RATE_FULL = 2'd0, RATE_HALF = 2'd1,
                            RATE_QUARTER = 2'd2, RATE_EIGHTH = 2'd3} rate_e;

  // Convolutional code generators, octal, most significant bit taps the current input.
  localparam logic [8:0] G_REV0 = 9'o557, G_REV1 = 9'o663, G_REV2 = 9'o711; // R=1/3
  localparam logic [8:0] G_FWD0 = 9'o753, G_FWD1 = 9'o561;                  // R=1/2

  // Short PN recurrences: bit k-1 set means the sequence element k chips earlier
  // enters the feedback (PI: x^15+x^13+x^9+x^8+x^7+x^5+1, PQ: x^15+x^12+x^11+x^10+x^6+x^5+x^4+x^3+1).
  localparam logic [14:0] PN_I_TAPS = 15'b100_0010_1110_0010;  // delays 2,6,7,8,10,15
  localparam logic [14:0] PN_Q_TAPS = 15'b100_1111_0001_1100;  // delays 3,4,5,9,10,11,12,15

  // Long code recurrence, delays 42-e for every lower exponent e of the IS-95 polynomial.
  localparam logic [41:0] LC_TAPS = 42'h3DC83D9C540;  // delays 7,9,11,15,16,17,20,21,23,24,25,26,32,35,36,37,39,40,41,42

  // Forward traffic CRC for full-rate frames: x^12+x^11+x^10+x^9+x^8+x^4+x+1.
  localparam logic [11:0] CRC12_POLY = 12'hF13;

  // One encoder output bit: generator g (MSB = current input) applied to the
  // window v, where v[0] is the current input and v[i] the input i steps ago.
  function automatic logic conv_bit(input logic [8:0] v, input logic [8:0] g);
    logic r;
    r = 1'b0;
    for (int i = 0; i < 9; i++) r ^= v[i] & g[8-i];
    return r;
  endfunction

  // Bit reversal of the low n bits of x.
  function automatic int unsigned bitrev(input int unsigned x, input int n);
    int unsigned r;
    r = 0;
    for (int i = 0; i < n; i++) r |= ((x >> i) & 1) << (n - 1 - i);
    return r;
  endfunction

endpackage
