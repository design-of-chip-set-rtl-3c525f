// dsp_io_block: I/O block of the vocoder DSP: interrupt control (IMR mask, ISR status,
// SCR system control), the serial port (SIR input, SOR output) and the parallel port
// (PIR input, POR output), and the idle/wake control of the main clock.
// Interrupts: reset (the rst_n pin) and six requests: serial input, serial output,
// parallel input, parallel output, external (ext_int rising edge) and emulation
// (emu_int rising edge). Emulation is non-maskable; the others need their IMR bit and
// the global enable SCR[0], which is cleared on entry and set again by RETI. Priority:
// emulation, external, serial in, serial out, parallel in, parallel out. The vector of
// interrupt n is 4*n; iack pulses when one is taken and its ISR bit is cleared. Any
// pending unmasked request wakes the core from IDLE (wake), whether or not interrupts
// are enabled.
// Serial port: si_clk/so_clk are external bit clocks sampled with the DSP clock; a
// word starts at the bit where si_sync (so_sync) is high; bits are MSB first, 16 or, with
// SCR[1], 8 per word. A received word lands in SIR and raises the serial input request;
// a word written to SOR is sent at the next so_sync and raises the serial output
// request when done. Parallel port: a rising pi_sync latches pio_in into PIR; a rising
// po_sync tells that the outside has read POR; pio_oe drives POR while it holds an
// unread word; SCR[2] selects 8-bit transfers (low byte). io_strb pulses on IN/OUT.
// The register set, interrupt types, the non-maskable pair and the 8/16-bit modes
// follow the design description; the port protocols and priorities are this design's.
module dsp_io_block
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic [23:0] ir,
  input  logic [15:0] st_data,
  output logic [15:0] io_rdata,
  output logic        io_strb,
  // interrupt handshake with program control
  output logic        irq_req,
  output logic [15:0] irq_vector,
  input  logic        irq_ack,
  output logic        iack,
  output logic        wake,
  // pins
  input  logic        ext_int,
  input  logic        emu_int,
  input  logic        si_clk,
  input  logic        si_sync,
  input  logic        serial_in,
  input  logic        so_clk,
  input  logic        so_sync,
  output logic        serial_out,
  input  logic        pi_sync,
  input  logic        po_sync,
  input  logic [15:0] pio_in,
  output logic [15:0] pio_out,
  output logic        pio_oe
);
  logic [15:0] sir, sor, pir, por;
  logic [6:0]  imr, isr;         // bit n: interrupt n (bit 0 unused)
  logic [2:0]  scr;
  logic [6:0]  set_isr;

  opcode_e op;
  assign op = opc(ir);

  // pin synchronisers / edge detectors
  logic [2:0] s_ext, s_emu, s_sic, s_soc, s_pis, s_pos;
  logic ext_r, emu_r, sic_r, soc_r, pis_r, pos_r;
  assign ext_r = s_ext[1] && !s_ext[2];
  assign emu_r = s_emu[1] && !s_emu[2];
  assign sic_r = s_sic[1] && !s_sic[2];
  assign soc_r = s_soc[1] && !s_soc[2];
  assign pis_r = s_pis[1] && !s_pis[2];
  assign pos_r = s_pos[1] && !s_pos[2];
  logic si_d, sis_d, sos_d;       // data and syncs delayed to match the clock synchroniser

  // interrupt selection
  logic [6:0] pend;
  logic [2:0] sel;
  assign pend = isr & (imr | 7'b100_0000);
  always_comb begin
    sel = 3'd0;
    if (pend[IRQ_PO])  sel = 3'(IRQ_PO);
    if (pend[IRQ_PI])  sel = 3'(IRQ_PI);
    if (pend[IRQ_SO])  sel = 3'(IRQ_SO);
    if (pend[IRQ_SI])  sel = 3'(IRQ_SI);
    if (pend[IRQ_EXT]) sel = 3'(IRQ_EXT);
    if (pend[IRQ_EMU]) sel = 3'(IRQ_EMU);
  end
  assign irq_req    = (sel == 3'(IRQ_EMU)) || (sel != 3'd0 && scr[0]);
  assign irq_vector = {11'd0, sel, 2'b00};
  assign wake       = sel != 3'd0;

  always_comb begin
    unique case (io_e'(ir[3:0]))
      IO_SIR: io_rdata = sir;
      IO_SOR: io_rdata = sor;
      IO_PIR: io_rdata = pir;
      IO_POR: io_rdata = por;
      IO_IMR: io_rdata = {9'd0, imr};
      IO_ISR: io_rdata = {9'd0, isr};
      IO_SCR: io_rdata = {13'd0, scr};
      default: io_rdata = '0;
    endcase
  end
  assign io_strb = run && (op == OP_IN || op == OP_OUT);

  // serial receiver / transmitter
  logic [14:0] rx_sh;
  logic [15:0] tx_sh;
  logic [4:0]  rx_cnt, tx_cnt;
  logic        rx_act, tx_act, sor_full;
  logic [4:0]  wlen;
  assign wlen = scr[1] ? 5'd8 : 5'd16;
  assign serial_out = tx_sh[15];
  assign pio_out = scr[2] ? {8'd0, por[7:0]} : por;
  logic out_wr;
  assign out_wr = run && op == OP_OUT;

  // new requests this cycle
  always_comb begin
    set_isr = '0;
    set_isr[IRQ_EXT] = ext_r;
    set_isr[IRQ_EMU] = emu_r;
    set_isr[IRQ_SI]  = sic_r && (rx_act || sis_d) && ((rx_act ? rx_cnt + 1'b1 : 5'd1) == wlen);
    set_isr[IRQ_SO]  = soc_r && tx_act && tx_cnt == wlen;
    set_isr[IRQ_PI]  = pis_r;
    set_isr[IRQ_PO]  = pos_r && pio_oe;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sir <= '0; sor <= '0; pir <= '0; por <= '0; imr <= '0; isr <= '0; scr <= '0;
      s_ext <= '0; s_emu <= '0; s_sic <= '0; s_soc <= '0; s_pis <= '0; s_pos <= '0;
      si_d <= 1'b0; sis_d <= 1'b0; sos_d <= 1'b0;
      rx_sh <= '0; tx_sh <= '0; rx_cnt <= '0; tx_cnt <= '0; rx_act <= 1'b0; tx_act <= 1'b0;
      sor_full <= 1'b0; pio_oe <= 1'b0; iack <= 1'b0;
    end else begin
      s_ext <= {s_ext[1:0], ext_int}; s_emu <= {s_emu[1:0], emu_int};
      s_sic <= {s_sic[1:0], si_clk};  s_soc <= {s_soc[1:0], so_clk};
      s_pis <= {s_pis[1:0], pi_sync}; s_pos <= {s_pos[1:0], po_sync};
      si_d  <= serial_in; sis_d <= si_sync; sos_d <= so_sync;
      iack  <= irq_ack;
      // serial input
      if (sic_r) begin
        if (rx_act || sis_d) begin
          rx_sh <= {rx_sh[13:0], si_d};
          if (!rx_act) begin rx_act <= 1'b1; rx_cnt <= 5'd1; end
          else rx_cnt <= rx_cnt + 1'b1;
          if ((rx_act ? rx_cnt + 1'b1 : 5'd1) == wlen) begin
            rx_act <= 1'b0;
            sir <= scr[1] ? {8'd0, rx_sh[6:0], si_d} : {rx_sh[14:0], si_d};
          end
        end
      end
      // serial output
      if (soc_r) begin
        if (!tx_act && sor_full && sos_d) begin
          tx_act <= 1'b1; tx_cnt <= 5'd1; sor_full <= 1'b0;
          tx_sh <= scr[1] ? {sor[7:0], 8'd0} : sor;
        end else if (tx_act) begin
          tx_sh <= {tx_sh[14:0], 1'b0};
          if (tx_cnt == wlen) tx_act <= 1'b0;
          else tx_cnt <= tx_cnt + 1'b1;
        end
      end
      // parallel port
      if (pis_r) begin pir <= scr[2] ? {8'd0, pio_in[7:0]} : pio_in; end
      if (pos_r && pio_oe) pio_oe <= 1'b0;
      // register writes
      if (out_wr) begin
        unique case (io_e'(ir[18:15]))
          IO_SOR: begin sor <= st_data; sor_full <= 1'b1; end
          IO_POR: begin por <= st_data; pio_oe <= 1'b1; end
          IO_IMR: imr <= st_data[6:0];
          IO_SCR: scr <= st_data[2:0];
          default: ;
        endcase
      end
      // status: new requests, acknowledge, software writes
      if (out_wr && io_e'(ir[18:15]) == IO_ISR) isr <= st_data[6:0] | set_isr;
      else isr <= (isr & ~(irq_ack ? (7'd1 << sel) : 7'd0)) | set_isr;
      if (irq_ack) scr[0] <= 1'b0;
      if (run && op == OP_RETI) scr[0] <= 1'b1;
    end
  end
endmodule
