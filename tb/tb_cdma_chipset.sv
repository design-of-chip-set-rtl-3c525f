// tb_cdma_chipset: end-to-end test of the chip set with its default parameters (three
// fingers, 8 clocks per chip, 8 k program words). A base-station model sends a pilot
// (short PN on I and Q) delayed by D chips; the host model drives the modem's register
// bus and the DSP runs a small program from the external program port.
// The bench counts each mechanism it sees happen and counts a failure for any that
// never happens:
//   reg_readback   host registers read back what was written
//   search_pass    the searcher passes the true offset D and raises its interrupt
//   finger_lock    a finger slewed to the found offset locks on the pilot
//   pcg_strobe     the combiner's power control group clock runs
//   rx_power       the received power measurement is non-zero
//   tx_stall       the transmit FIFO fills and the host has to wait (backpressure)
//   tx_gate        the transmitter gate opens and the baseband output is non-zero
//   tx_frame       a traffic frame is sent (interrupt)
//   sleep_wake     the modem sleeps, system time goes on, and the wake interrupt comes
//   dsp_mac        the DSP multiply result appears on its parallel port
//   dsp_idle_wake  the DSP idles and an external interrupt wakes it and runs the handler
// A watchdog counts a failure if the run does not finish.
module tb_cdma_chipset;
  timeunit 1ns; timeprecision 1ns;
  import dsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // modem pins
  logic m_bus_cs = 0, m_bus_wr = 0;
  logic [7:0] m_bus_addr = 0;
  logic [15:0] m_bus_wdata = 0, m_bus_rdata;
  logic m_irq, m_tx_gate, m_pwr_ctl_pdm, m_freq_ctl_pdm, m_asleep;
  logic signed [3:0] m_rx_i = 0, m_rx_q = 0;
  logic signed [7:0] m_txi, m_txq;
  logic [7:0] m_txiq, m_tx_gain;
  // DSP pins
  logic [15:0] d_prog_addr, d_pio_out, d_pc, d_stack_overflow;
  logic [23:0] d_prog_data;
  logic d_strb, d_io_strb, d_iack, d_serial_out, d_pio_oe, d_idle;
  logic d_ext_int = 0;
  logic [35:0] d_acc0, d_acc1;
  logic [2:0] d_psw;
  logic [23:0] prog [0:63];
  assign d_prog_data = prog[d_prog_addr[5:0]];

  cdma_chipset dut (
    .clk, .rst_n, .m_bus_cs, .m_bus_wr, .m_bus_addr, .m_bus_wdata, .m_bus_rdata, .m_irq,
    .m_rx_i, .m_rx_q, .m_txi, .m_txq, .m_txiq, .m_tx_gate, .m_tx_gain, .m_pwr_ctl_pdm,
    .m_freq_ctl_pdm, .m_asleep,
    .d_mp_mode(1'b1), .d_prog_addr, .d_prog_data, .d_strb, .d_io_strb, .d_iack,
    .d_ext_int, .d_emu_int(1'b0), .d_si_clk(1'b0), .d_si_sync(1'b0), .d_serial_in(1'b0),
    .d_so_clk(1'b0), .d_so_sync(1'b0), .d_serial_out, .d_pi_sync(1'b0), .d_po_sync(1'b0),
    .d_pio_in(16'h0), .d_pio_out, .d_pio_oe, .d_idle, .d_pc, .d_acc0, .d_acc1, .d_psw,
    .d_stack_overflow
  );

  int checks = 0, failures = 0;
  int mech [string];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic saw(input string m); mech[m] = mech.exists(m) ? mech[m] + 1 : 1; endtask

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- base station: pilot delayed by D chips ----------------
  localparam int D = 17;
  logic bs_step = 1'b0, bpi, bpq;
  short_pn_gen #(.TAPS(cdma_pkg::PN_I_TAPS)) bs_i (.clk, .rst_n, .step(bs_step), .pn(bpi), .epoch());
  short_pn_gen #(.TAPS(cdma_pkg::PN_Q_TAPS)) bs_q (.clk, .rst_n, .step(bs_step), .pn(bpq), .epoch());
  bit hi [$], hq [$];
  int chips = 0;
  // the modem samples at clock phases 0 and 4 of each chip; phase 0 carries the chip
  always @(negedge clk) begin
    bs_step = 1'b0;
    if (rst_n && dut.u_modem.u_clk.div == 3'd0 && !m_asleep) begin
      hi.push_back(bpi); hq.push_back(bpq); bs_step = 1'b1;
      m_rx_i = hi.size() > D ? (hi[hi.size() - 1 - D] ? 4'sd2 : -4'sd2) : 4'sd0;
      m_rx_q = hq.size() > D ? (hq[hq.size() - 1 - D] ? 4'sd2 : -4'sd2) : 4'sd0;
      if (hi.size() > 64) begin void'(hi.pop_front()); void'(hq.pop_front()); end
      chips++;
    end else if (dut.u_modem.u_clk.div == 3'd4) begin
      m_rx_i = 4'sd0; m_rx_q = 4'sd0;
    end
  end

  // ---------------- host bus ----------------
  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); m_bus_cs = 1; m_bus_wr = 1; m_bus_addr = a; m_bus_wdata = d;
    @(negedge clk); m_bus_cs = 0; m_bus_wr = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk); m_bus_cs = 1; m_bus_wr = 0; m_bus_addr = a; #1 d = m_bus_rdata;
    @(negedge clk); m_bus_cs = 0;
  endtask

  // transmit monitor
  always @(posedge clk) if (rst_n && m_tx_gate && (m_txi != 0 || m_txq != 0)) begin
    if (!mech.exists("tx_gate")) saw("tx_gate");
  end

  // ---------------- DSP program ----------------
  int ma, mb;
  initial begin
    ma = int'($urandom_range(1, 180)); mb = int'($urandom_range(1, 180));
    foreach (prog[i]) prog[i] = INSTR_NOP;
    prog[0]  = {OP_JMP, 3'(C_AL), 16'd32};
    prog[20] = {OP_ALUI, 3'(ALU_ADD), 1'b1, 15'd1};          // external interrupt handler
    prog[21] = {OP_RETI, 19'd0};
    prog[32] = {OP_LDI, 3'd2, 16'(ma)};                      // RX2
    prog[33] = {OP_LDI, 3'd6, 16'(mb)};                      // RY2
    prog[34] = {OP_MPY, 1'b0, 1'b0, 1'b0, 2'd2, 2'd2, 12'd0}; // A0 = RX2 * RY2
    prog[35] = {OP_OUT, 4'(IO_POR), 3'd4, 12'd0};            // POR <- RY0
    prog[36] = {OP_LDI, 3'd3, 16'h0020};
    prog[37] = {OP_OUT, 4'(IO_IMR), 3'd3, 12'd0};
    prog[38] = {OP_LDI, 3'd3, 16'h0001};
    prog[39] = {OP_OUT, 4'(IO_SCR), 3'd3, 12'd0};
    prog[40] = {OP_IDLE, 19'd0};
    prog[41] = {OP_JMP, 3'(C_AL), 16'd41};
  end

  initial begin
    logic [15:0] v, found;
    int n;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // DSP: multiply, idle, interrupt
    repeat (50) @(posedge clk);
    check(d_pio_oe && d_pio_out == 16'(ma * mb), $sformatf("DSP product %0d exp %0d", d_pio_out, ma * mb));
    if (d_pio_oe && d_pio_out == 16'(ma * mb)) saw("dsp_mac");
    check(d_idle, "DSP idle");
    d_ext_int = 1'b1; repeat (4) @(posedge clk); d_ext_int = 1'b0;
    repeat (20) @(posedge clk);
    check(!d_idle && d_acc1[15:0] == 16'd1 && d_pc == 16'd41, "DSP woke and ran the handler");
    if (!d_idle && d_acc1[15:0] == 16'd1) saw("dsp_idle_wake");

    // registers
    wr(8'h04, 16'h1357); wr(8'h05, 16'h2468); wr(8'h06, 16'h0155);
    rd(8'h04, v); check(v == 16'h1357, "LCMASK0");
    rd(8'h06, v); check(v == 16'h0155, "LCMASK2");
    wr(8'h16, 16'd3); rd(8'h16, v); check(v == 16'd3, "SOFT_SHIFT");
    if (v == 16'd3) saw("reg_readback");

    // search 32 hypotheses; interrupts on search done
    wr(8'h1D, 16'h003F);
    wr(8'h08, 16'd32); wr(8'h09, 16'd64); wr(8'h0A, 16'd256);
    wr(8'h0B, 16'd78); wr(8'h0C, 16'd1953);   // thresholds 20000 and 500000
    wr(8'h07, 16'd1);
    n = 0;
    while (n < 32) begin
      rd(8'h13, v);
      if (v[0]) begin
        logic [15:0] off;
        rd(8'h10, off);
        // the model's chip and the modem's sample clock may differ by one chip
        if (v[1]) begin
          check(off == 16'(D) || off == 16'(D + 1), $sformatf("search pass at %0d", off));
          if (off == 16'(D) || off == 16'(D + 1)) begin saw("search_pass"); found = off; end
        end
        n++;
      end
      rd(8'h03, v);
      if (!v[4] && n > 0) break;
    end
    rd(8'h1E, v);
    check(v[1] && m_irq, "search done interrupt");
    wr(8'h1E, 16'h003F);

    // finger 0 onto the found path, fingers 0..2 enabled, tracking on
    wr(8'h14, 16'd195); wr(8'h15, 16'd78);
    wr(8'h28, 16'd0);
    wr(8'h2C, found);
    wr(8'h00, 16'b0001_1100);              // finger 0, pdm, tracking
    repeat (64 * 8 * 40) @(posedge clk);
    rd(8'h30, v);
    check(v[15], $sformatf("finger lock, energy %0d", v[14:0]));
    if (v[15]) saw("finger_lock");
    rd(8'h27, v);
    check(v != 0, "PCG clock");
    if (v != 0) saw("pcg_strobe");
    rd(8'h1C, v);
    if (v != 0) saw("rx_power");

    // transmit: full-rate traffic, keep the FIFO topped up until it refuses
    wr(8'h02, 16'd0);
    wr(8'h00, 16'b0001_1101);
    // two frames of 192 bits: 24 words, waiting whenever the FIFO is full
    for (int w = 0; w < 24; w++) begin
      rd(8'h03, v);
      while (v[3:0] == 4'd0) begin saw("tx_stall"); repeat (20) @(posedge clk); rd(8'h03, v); end
      wr(8'h01, 16'($urandom()));
    end
    // wait for a traffic frame to go out
    n = 0;
    do begin repeat (1000) @(posedge clk); rd(8'h1E, v); n++; end while (!v[5] && n < 500);
    check(v[5], "traffic frame sent");
    if (v[5]) saw("tx_frame");
    wr(8'h00, 16'b0001_1100);

    // sleep for 500 chips
    begin
      logic [15:0] t0, t1;
      wr(8'h1E, 16'h003F);
      rd(8'h24, t0);
      wr(8'h1F, 16'd500);
      repeat (3) @(posedge clk);
      check(m_asleep, "asleep");
      repeat (8 * 510) @(posedge clk);
      rd(8'h1E, v);
      rd(8'h24, t1);
      check(!m_asleep && v[3], "wake interrupt");
      check(16'(t1 - t0) >= 16'd500, "system time runs in sleep");
      if (!m_asleep && v[3] && 16'(t1 - t0) >= 16'd500) saw("sleep_wake");
    end

    foreach (mech[m]) $display("mechanism %-14s seen %0d", m, mech[m]);
    foreach (mech_list[i]) begin
      checks++;
      if (!mech.exists(mech_list[i])) begin failures++; $display("FAIL mechanism %s never happened", mech_list[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string mech_list [] = '{"reg_readback", "search_pass", "finger_lock", "pcg_strobe", "rx_power",
                          "tx_stall", "tx_gate", "tx_frame", "sleep_wake", "dsp_mac", "dsp_idle_wake"};
endmodule
