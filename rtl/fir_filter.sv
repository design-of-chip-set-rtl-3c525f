// fir_filter: 48-tap baseband pulse-shaping filter with symmetric (linear-phase)
// impulse response, run at four samples per PN chip. Its input is the spread chip
// stream with three zeros stuffed after each chip (in_nz marks a chip, in_neg its
// sign: 0 -> +1, 1 -> -1), so the output is the chip stream oversampled four times and
// interpolated. The 24 distinct coefficients are a Hamming-windowed sinc,
//   h[n] = 2fc*sinc(2fc*(n-23.5)) * (0.54 - 0.46 cos(2 pi n / 47)),  fc = 1/8 of the
//   sample rate (half the chip rate),
// scaled so that the largest sum over one polyphase branch is 510, then rounded. The
// design description gives only the tap count, the symmetry and the 1.5 dB / 40 dB
// ripple and stopband targets; the window design is this design's choice. Symmetry is
// used: tap pairs are pre-added before the coefficient multiply. The output is
// sum >>> 2, saturated to OUT_W bits, registered once per samp_en.
module fir_filter #(
  parameter int TAPS  = 48,
  parameter int OUT_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    samp_en,
  input  logic                    in_nz,
  input  logic                    in_neg,
  output logic signed [OUT_W-1:0] y
);
  localparam int HALF = TAPS / 2;
  typedef logic signed [9:0] coef_t;
  localparam coef_t COEF [24] = '{
    0, -1, -1, -1, 1, 3, 4, 2, -3, -8, -11, -5,
    7, 19, 23, 12, -14, -42, -53, -28, 37, 128, 217, 271};

  logic signed [1:0] x [TAPS];     // -1, 0 or +1
  logic signed [15:0] acc;
  logic signed [2:0]  pair;

  always_comb begin
    acc = '0;
    for (int i = 0; i < HALF; i++) begin
      pair = 3'(x[i]) + 3'(x[TAPS-1-i]);
      acc  = acc + 16'(pair) * 16'(COEF[i]);
    end
  end

  logic signed [15:0] sh;
  assign sh = acc >>> 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) x[i] <= '0;
      y <= '0;
    end else if (samp_en) begin
      x[0] <= !in_nz ? 2'sd0 : (in_neg ? -2'sd1 : 2'sd1);
      for (int i = 1; i < TAPS; i++) x[i] <= x[i-1];
      if (sh > 16'(2**(OUT_W-1)-1))       y <= OUT_W'(2**(OUT_W-1)-1);
      else if (sh < -16'(2**(OUT_W-1)))   y <= OUT_W'(-(2**(OUT_W-1)));
      else                                y <= OUT_W'(sh);
    end
  end
endmodule
