// modem_clock_gen: timing generator of the modem. The modem runs from one system clock
// of CLK_PER_CHIP clock cycles per PN chip (8 x 1.2288 Mchip/s = 9.83 MHz, the "10 MHz"
// operating clock). It derives the clock enables of the datapaths: en_x4 (four samples
// per chip, transmit filter), and en_x2 (two samples per chip, receive path).
// Sleep mode: a sleep request (sleep_req pulse with sleep_chips) stops the receive and
// transmit enables for that many chips while a free-running chip counter (chip_time)
// keeps system time, then the enables resume and wake pulses for one clock. The enables
// stand for the gated clocks of the chip; asleep reports the state. An enable is a
// one-clock pulse at the start of its period; the two are phase aligned.
// The 10 MHz clock and the sleep mode follow the design description; the enable
// scheme, the sleep counter and CLK_PER_CHIP are this design's own.
module modem_clock_gen #(
  parameter int CLK_PER_CHIP = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sleep_req,
  input  logic [15:0] sleep_chips,
  output logic        en_x4,
  output logic        en_x2,
  output logic        asleep,
  output logic        wake,
  output logic [31:0] chip_time
);
  localparam int CW = $clog2(CLK_PER_CHIP);
  logic [CW-1:0] div;
  logic [15:0]   sleep_left;
  logic          chip_tick;

  assign chip_tick = div == '0;
  assign en_x2   = (div % CW'(CLK_PER_CHIP / 2)) == '0 && !asleep;
  assign en_x4   = (div % CW'(CLK_PER_CHIP / 4)) == '0 && !asleep;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; sleep_left <= '0; asleep <= 1'b0; wake <= 1'b0; chip_time <= '0;
    end else begin
      div  <= (int'(div) == CLK_PER_CHIP - 1) ? '0 : div + 1'b1;
      wake <= 1'b0;
      if (chip_tick) chip_time <= chip_time + 1'b1;
      if (!asleep && sleep_req && sleep_chips != '0) begin
        asleep <= 1'b1; sleep_left <= sleep_chips;
      end else if (asleep && chip_tick) begin
        if (sleep_left == 16'd1) begin asleep <= 1'b0; wake <= 1'b1; end
        sleep_left <= sleep_left - 1'b1;
      end
    end
  end
endmodule
