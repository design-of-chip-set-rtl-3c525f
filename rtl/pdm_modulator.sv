// pdm_modulator: first-order sigma-delta pulse density modulator. Each enabled cycle
// the W-bit level is added to a W-bit accumulator and the carry is the output bit, so
// the density of ones is level / 2^W. It turns the power and frequency control words
// of the symbol combiner into the one-bit signals for the IF analog circuitry (after an
// external RC filter); the sigma-delta form is this design's choice.
module pdm_modulator #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] level,
  output logic         pdm
);
  logic [W-1:0] acc;
  logic [W:0]   sum;
  assign sum = {1'b0, acc} + {1'b0, level};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin acc <= '0; pdm <= 1'b0; end
    else if (en) begin acc <= sum[W-1:0]; pdm <= sum[W]; end
  end
endmodule
