// cdma_chipset: the chip set of the CDMA mobile station: the modem ASIC and the vocoder
// DSP side by side. The two chips share clock and reset pins here but nothing else;
// each keeps its own pins: the modem's host bus, baseband and control outputs
// (prefix m_) and the DSP's program memory port, interrupt pins and serial/parallel
// ports (prefix d_). In the handset the microcontroller links them (speech frames go
// from the DSP ports through the host to the modem transmit FIFO and back); that
// software path is outside this RTL.
// Timing: one clock; the modem expects CLK_PER_CHIP clocks per PN chip; the DSP runs
// one instruction per clock.
// The two-chip partition follows the design description; sharing one clock pin is this
// design's simplification.
module cdma_chipset #(
  parameter int    NF           = 3,
  parameter int    CLK_PER_CHIP = 8,
  parameter int    PROG_WORDS   = 8192,
  parameter string PROG_INIT    = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  // modem
  input  logic        m_bus_cs,
  input  logic        m_bus_wr,
  input  logic [7:0]  m_bus_addr,
  input  logic [15:0] m_bus_wdata,
  output logic [15:0] m_bus_rdata,
  output logic        m_irq,
  input  logic signed [3:0] m_rx_i,
  input  logic signed [3:0] m_rx_q,
  output logic signed [7:0] m_txi,
  output logic signed [7:0] m_txq,
  output logic [7:0]  m_txiq,
  output logic        m_tx_gate,
  output logic [7:0]  m_tx_gain,
  output logic        m_pwr_ctl_pdm,
  output logic        m_freq_ctl_pdm,
  output logic        m_asleep,
  // vocoder DSP
  input  logic        d_mp_mode,
  output logic [15:0] d_prog_addr,
  input  logic [23:0] d_prog_data,
  output logic        d_strb,
  output logic        d_io_strb,
  output logic        d_iack,
  input  logic        d_ext_int,
  input  logic        d_emu_int,
  input  logic        d_si_clk,
  input  logic        d_si_sync,
  input  logic        d_serial_in,
  input  logic        d_so_clk,
  input  logic        d_so_sync,
  output logic        d_serial_out,
  input  logic        d_pi_sync,
  input  logic        d_po_sync,
  input  logic [15:0] d_pio_in,
  output logic [15:0] d_pio_out,
  output logic        d_pio_oe,
  output logic        d_idle,
  output logic [15:0] d_pc,
  output logic [35:0] d_acc0,
  output logic [35:0] d_acc1,
  output logic [2:0]  d_psw,
  output logic [15:0] d_stack_overflow
);
  modem_asic #(.NF(NF), .CLK_PER_CHIP(CLK_PER_CHIP)) u_modem (
    .clk, .rst_n, .bus_cs(m_bus_cs), .bus_wr(m_bus_wr), .bus_addr(m_bus_addr),
    .bus_wdata(m_bus_wdata), .bus_rdata(m_bus_rdata), .irq(m_irq), .rx_i(m_rx_i),
    .rx_q(m_rx_q), .txi(m_txi), .txq(m_txq), .txiq(m_txiq), .tx_gate(m_tx_gate),
    .tx_gain(m_tx_gain), .pwr_ctl_pdm(m_pwr_ctl_pdm), .freq_ctl_pdm(m_freq_ctl_pdm),
    .asleep(m_asleep)
  );

  vocoder_dsp #(.PROG_WORDS(PROG_WORDS), .PROG_INIT(PROG_INIT)) u_dsp (
    .clk, .rst_n, .mp_mode(d_mp_mode), .prog_addr(d_prog_addr), .prog_data(d_prog_data),
    .strb(d_strb), .io_strb(d_io_strb), .iack(d_iack), .ext_int(d_ext_int),
    .emu_int(d_emu_int), .si_clk(d_si_clk), .si_sync(d_si_sync), .serial_in(d_serial_in),
    .so_clk(d_so_clk), .so_sync(d_so_sync), .serial_out(d_serial_out), .pi_sync(d_pi_sync),
    .po_sync(d_po_sync), .pio_in(d_pio_in), .pio_out(d_pio_out), .pio_oe(d_pio_oe),
    .idle(d_idle), .pc(d_pc), .acc0(d_acc0), .acc1(d_acc1), .psw(d_psw),
    .stack_overflow(d_stack_overflow)
  );
endmodule
