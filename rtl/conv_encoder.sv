// conv_encoder: constraint-length K convolutional encoder producing N code symbols
// per data bit (reverse traffic channel: K = 9, R = 1/3, as in the modulator of the
// modem). A K-1 bit shift register holds the previous inputs; each output symbol is
// the parity of the window {history, input} under one generator. The generator values
// are the air-interface standard's (557, 663, 711 octal); they are not printed in the
// design description. Interface: one bit per cycle with in_valid; out_sym is
// registered and appears one cycle later with out_valid. clear empties the history
// (start of a frame); the frame's eight zero tail bits then flush it.
module conv_encoder #(
  parameter int K = 9,
  parameter int N = 3,
  parameter logic [N*K-1:0] GEN = {cdma_pkg::G_REV2, cdma_pkg::G_REV1, cdma_pkg::G_REV0}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         out_valid,
  output logic [N-1:0] out_sym    // bit 0 is the first symbol sent
);
  logic [K-2:0] hist;   // hist[0] is the previous input
  logic [K-1:0] win;
  logic [N-1:0] sym_c;

  assign win = {hist, in_bit};

  always_comb begin
    for (int n = 0; n < N; n++) begin
      sym_c[n] = 1'b0;
      for (int i = 0; i < K; i++) sym_c[n] ^= win[i] & GEN[n*K + K-1-i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist      <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) hist <= '0;
      else if (in_valid) begin
        hist    <= {hist[K-3:0], in_bit};
        out_sym <= sym_c;
      end
    end
  end
endmodule
