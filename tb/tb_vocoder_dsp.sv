// tb_vocoder_dsp: self-checking test of the vocoder DSP core running a program from
// external program memory (microprocessor mode). The program fills X and Y tables,
// runs a repeated dual-load multiply-accumulate (MACD under RPT), calls a subroutine
// (shift), stores and reloads through direct and indirect addressing, pushes and pops,
// sends the result on the parallel and serial ports, enables interrupts and idles. The
// bench then raises the external interrupt (wakes the core, handler counts in A1),
// the emulation interrupt (non-maskable), feeds a word into the serial input and
// checks the program's echo, and finally checks every architectural result against a
// model computed here. A watchdog counts a failure if the program never finishes.
module tb_vocoder_dsp;
  timeunit 1ns; timeprecision 1ns;
  import dsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] prog_addr, pio_in, pio_out, pc, stack_overflow;
  logic [23:0] prog_data;
  logic strb, io_strb, iack, idle, serial_out, pio_oe;
  logic ext_int = 0, emu_int = 0, si_clk = 0, si_sync = 0, serial_in = 0;
  logic so_clk = 0, so_sync = 0, pi_sync = 0, po_sync = 0;
  logic [35:0] acc0, acc1;
  logic [2:0] psw;
  logic [23:0] prog [0:255];
  int checks = 0, failures = 0;

  assign pio_in = 16'h1234;
  assign prog_data = prog[prog_addr[7:0]];

  vocoder_dsp dut (
    .clk, .rst_n, .mp_mode(1'b1), .prog_addr, .prog_data, .strb, .io_strb, .iack,
    .ext_int, .emu_int, .si_clk, .si_sync, .serial_in, .so_clk, .so_sync, .serial_out,
    .pi_sync, .po_sync, .pio_in, .pio_out, .pio_oe, .idle, .pc, .acc0, .acc1, .psw,
    .stack_overflow
  );

  // ---- instruction builders ----
  function automatic logic [23:0] i_ldi(input int rd, input int imm);
    return {OP_LDI, 3'(rd), 16'(imm)}; endfunction
  function automatic logic [23:0] i_std(input int rs, input int bank, input int addr);
    return {OP_STD, 3'(rs), 1'(bank), 3'd0, 12'(addr)}; endfunction
  function automatic logic [23:0] i_ldd(input int rd, input int bank, input int addr);
    return {OP_LDD, 3'(rd), 1'(bank), 3'd0, 12'(addr)}; endfunction
  function automatic logic [23:0] i_ldn(input int rd, input int bank, input int ar, input int md);
    return {OP_LDN, 3'(rd), 1'(bank), 1'(ar), 2'(md), 12'd0}; endfunction
  function automatic logic [23:0] i_mts(input int sr, input int rs);
    return {OP_MTS, 4'(sr), 3'(rs), 12'd0}; endfunction
  function automatic logic [23:0] i_alui(input int aop, input int ad, input int imm);
    return {OP_ALUI, 3'(aop), 1'(ad), 15'(imm)}; endfunction
  function automatic logic [23:0] i_macd(input int ad);
    return {OP_MACD, 1'(ad), 18'd0}; endfunction
  function automatic logic [23:0] i_mpy(input int ad, input int mac, input int xs, input int ys);
    return {OP_MPY, 1'(ad), 1'(mac), 1'b0, 2'(xs), 2'(ys), 12'd0}; endfunction
  function automatic logic [23:0] i_shf(input int ad, input int amt);
    return {OP_SHF, 1'(ad), 6'(amt), 12'd0}; endfunction
  function automatic logic [23:0] i_jmp(input int c, input int addr);
    return {OP_JMP, 3'(c), 16'(addr)}; endfunction
  function automatic logic [23:0] i_call(input int addr);
    return {OP_CALL, 3'd0, 16'(addr)}; endfunction
  function automatic logic [23:0] i_rpt(input int len, input int cnt);
    return {OP_RPT, 8'(len), 11'(cnt)}; endfunction
  function automatic logic [23:0] i_op(input opcode_e o, input int r);
    return {o, 3'(r), 16'd0}; endfunction
  function automatic logic [23:0] i_in(input int rd, input int port);
    return {OP_IN, 3'(rd), 12'd0, 4'(port)}; endfunction
  function automatic logic [23:0] i_out(input int port, input int rs);
    return {OP_OUT, 4'(port), 3'(rs), 12'd0}; endfunction

  int pcw;
  task automatic emit(input logic [23:0] w); prog[pcw[7:0]] = w; pcw++; endtask

  localparam int NT = 8;
  int xv [NT], yv [NT];
  longint exp_mac;

  initial begin
    foreach (prog[i]) prog[i] = INSTR_NOP;
    foreach (xv[i]) begin
      xv[i] = int'($urandom_range(0, 600)) - 300;
      yv[i] = int'($urandom_range(0, 600)) - 300;
    end
    exp_mac = 0;
    foreach (xv[i]) exp_mac += longint'(xv[i]) * longint'(yv[i]);
    // vectors
    pcw = 0;  emit(i_jmp(C_AL, 32));
    pcw = 20; emit(i_alui(ALU_ADD, 1, 1));       emit(i_op(OP_RETI, 0));   // external
    pcw = 24; emit(i_alui(ALU_ADD, 1, 16'h100)); emit(i_op(OP_RETI, 0));   // emulation
    pcw = 4;  emit(i_in(5, IO_SIR)); emit(i_out(IO_SOR, 5)); emit(i_op(OP_RETI, 0)); // serial in
    pcw = 12; emit(i_in(6, IO_PIR)); emit(i_op(OP_RETI, 0));                 // parallel in
    pcw = 8;  emit(i_op(OP_RETI, 0));                                         // serial out
    pcw = 16; emit(i_op(OP_RETI, 0));                                         // parallel out
    // subroutine at 28: A0 <<= 1
    pcw = 28; emit(i_shf(0, 1)); emit(i_op(OP_RET, 0));
    // main
    pcw = 32;
    foreach (xv[i]) begin
      emit(i_ldi(0, xv[i])); emit(i_std(0, 0, 16 + i));
      emit(i_ldi(4, yv[i])); emit(i_std(4, 1, 32 + i));
    end
    emit(i_ldi(0, 16)); emit(i_mts(SR_AX0, 0));
    emit(i_ldi(0, 32)); emit(i_mts(SR_AY0, 0));
    emit(i_ldi(2, 0)); emit(i_ldi(6, 0));
    emit(i_alui(ALU_LD, 0, 0));
    emit(i_rpt(0, NT + 1));
    emit(i_macd(0));
    emit(i_call(28));
    emit(i_std(4, 0, 100));                      // low word of A0 to X[100]
    emit(i_ldi(3, 100)); emit(i_mts(SR_AX1, 3));
    emit(i_ldn(7, 0, 1, MOD_INC));               // RY3 <- X[AX1++]
    emit(i_op(OP_PUSH, 7)); emit(i_ldi(7, 0)); emit(i_op(OP_POP, 1));  // RX1 <- popped
    emit(i_out(IO_POR, 1));
    emit(i_ldi(3, 16'h007E)); emit(i_out(IO_IMR, 3));
    emit(i_ldi(3, 1)); emit(i_out(IO_SCR, 3));
    emit(i_op(OP_IDLE, 0));
    emit(i_alui(ALU_ADD, 1, 16'h10));            // after wake: mark progress
    emit(i_op(OP_IDLE, 0));                      // wait for the serial word
    emit(i_op(OP_IDLE, 0));                      // wait for the parallel word
    emit(i_jmp(C_AL, pcw));                      // done: spin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
  end

  // ---- watchdog ----
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired, pc=%0h", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_idle();
    int n = 0;
    while (!idle && n < 5000) begin @(posedge clk); n++; end
  endtask

  task automatic bit_clk(input logic d, input logic sync, ref logic c, ref logic dl, ref logic sl);
    dl = d; sl = sync;
    repeat (3) @(posedge clk); c = 1'b1;
    repeat (3) @(posedge clk); c = 1'b0; sl = 1'b0;
  endtask

  logic [15:0] so_word, sdata;
  logic dummy;
  int acks = 0;
  always @(posedge clk) if (rst_n && iack) acks++;

  initial begin
    @(posedge rst_n);
    wait_idle();
    check(idle, "core reaches first IDLE");
    begin
      logic signed [35:0] e0;
      e0 = 36'(exp_mac) <<< 1;
      check($signed(acc0) == e0, $sformatf("MACD/RPT/CALL result %0d exp %0d", $signed(acc0), e0));
      check(pio_out == e0[15:0], "parallel output word");
      check(pio_oe, "parallel output enable");
      check(stack_overflow == 0, "no stack overflow");
    end
    repeat (20) @(posedge clk);
    check(idle, "stays idle without request");
    ext_int = 1'b1; repeat (5) @(posedge clk); ext_int = 1'b0;
    wait_idle();
    check(acc1[15:0] == 16'h11, $sformatf("external handler and wake, A1=%h", acc1[15:0]));
    // emulation interrupt: must be taken even with SCR.IE cleared; core is idle, wakes
    emu_int = 1'b1; repeat (5) @(posedge clk); emu_int = 1'b0;
    repeat (30) @(posedge clk);
    check(acc1[15:0] == 16'h111, $sformatf("emulation handler, A1=%h", acc1[15:0]));
    // serial input word; the handler echoes it to SOR
    sdata = 16'(($urandom() & 16'h7FFF) | 16'h4001);
    for (int b = 15; b >= 0; b--) bit_clk(sdata[b], b == 15, si_clk, serial_in, si_sync);
    wait_idle(); repeat (10) @(posedge clk);
    check(dut.u_alu.ry[1] == sdata, "serial input word read by handler");
    // clock the serial output: word sent MSB first from the sync bit
    so_word = '0;
    bit_clk(1'b0, 1'b1, so_clk, dummy, so_sync);
    for (int b = 0; b < 16; b++) begin
      so_word = {so_word[14:0], serial_out};
      bit_clk(1'b0, 1'b0, so_clk, dummy, so_sync);
    end
    check(so_word == sdata, $sformatf("serial echo %h exp %h", so_word, sdata));
    // parallel input
    pi_sync = 1'b1; repeat (5) @(posedge clk); pi_sync = 1'b0;
    repeat (30) @(posedge clk);
    check(dut.u_alu.ry[2] == 16'h1234, "parallel input word");
    // the outside reads POR: output enable drops
    po_sync = 1'b1; repeat (5) @(posedge clk); po_sync = 1'b0; repeat (5) @(posedge clk);
    check(!pio_oe, "parallel output released");
    check(acks >= 4, $sformatf("interrupts acknowledged: %0d", acks));
    check(!idle, "final loop running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
