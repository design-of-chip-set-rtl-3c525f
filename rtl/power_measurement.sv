// power_measurement: measures the received signal power, rx_i^2 + rx_q^2 summed over
// 2^LOG_N samples, for the receive AGC loop and the microcontroller. A new result with
// valid appears at the end of every window. The window length is this design's choice;
// the design description only names the block.
module power_measurement #(
  parameter int RX_W  = 4,
  parameter int LOG_N = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   samp_en,
  input  logic signed [RX_W-1:0] rx_i,
  input  logic signed [RX_W-1:0] rx_q,
  output logic                   valid,
  output logic [2*RX_W+LOG_N:0]  power
);
  localparam int PW = 2*RX_W + LOG_N + 1;
  logic [LOG_N-1:0] cnt;
  logic [PW-1:0]    acc, nxt;
  logic signed [PW-1:0] xi, xq;
  assign xi  = PW'(rx_i);
  assign xq  = PW'(rx_q);
  assign nxt = acc + PW'(xi * xi) + PW'(xq * xq);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin cnt <= '0; acc <= '0; valid <= 1'b0; power <= '0; end
    else begin
      valid <= 1'b0;
      if (samp_en) begin
        cnt <= cnt + 1'b1;
        if (cnt == '1) begin acc <= '0; power <= nxt; valid <= 1'b1; end
        else acc <= nxt;
      end
    end
  end
endmodule
