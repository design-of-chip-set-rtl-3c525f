// vocoder_dsp: the 16-bit fixed-point DSP core for the speech coder. It joins the four
// blocks of the design description: program control (dsp_prog_ctrl: PC, hardware
// stack, repeat, interrupts, idle), memory (dsp_mem_block: X and Y data RAM/ROM banks,
// address generators), arithmetic (dsp_alu_block: registers, 16x16 multiplier, 36-bit
// ALU and accumulators, shifter) and I/O (dsp_io_block: serial and parallel ports,
// interrupt controller). Programs run from the internal ROM (mp_mode = 0) or from
// external program memory through prog_addr/prog_data with strobe strb (mp_mode = 1);
// the word read at prog_addr must be valid in the same cycle.
// Timing: one instruction per clock, fetch and execute overlapped; a taken branch,
// call, return or interrupt costs one extra cycle. IDLE stops the core (idle = 1) until
// an enabled I/O request arrives; the blocks are then held by run = 0, which stands for
// the gated main clock of the original chip.
// The four-block split, the dual X/Y buses, the 36-bit accumulators and the
// microprocessor mode follow the design description; the pipeline depth and the
// instruction encoding are this design's own (see dsp_pkg).
module vocoder_dsp
  import dsp_pkg::*;
#(
  parameter int    PROG_WORDS  = 8192,
  parameter int    STACK_DEPTH = 8,
  parameter string PROG_INIT   = "",
  parameter string XROM_INIT   = "",
  parameter string YROM_INIT   = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mp_mode,
  output logic [15:0] prog_addr,
  input  logic [23:0] prog_data,
  output logic        strb,
  output logic        io_strb,
  output logic        iack,
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
  output logic        pio_oe,
  output logic        idle,
  output logic [15:0] pc,
  output logic [35:0] acc0,
  output logic [35:0] acc1,
  output logic [2:0]  psw,
  output logic [15:0] stack_overflow
);
  logic [23:0] ir;
  logic        run, take_branch, irq_req, irq_ack, wake;
  logic [15:0] irq_vector, xbus, ybus, st_data, io_rdata;

  assign run = !idle;

  dsp_prog_ctrl #(.PROG_WORDS(PROG_WORDS), .STACK_DEPTH(STACK_DEPTH), .PROG_INIT(PROG_INIT))
  u_pc (
    .clk, .rst_n, .mp_mode, .prog_addr, .prog_data, .strb, .ir, .take_branch,
    .irq_req, .irq_vector, .irq_ack, .wake, .idle, .pc, .stack_overflow
  );

  dsp_mem_block #(.XROM_INIT(XROM_INIT), .YROM_INIT(YROM_INIT)) u_mem (
    .clk, .rst_n, .run, .ir, .st_data, .xbus, .ybus
  );

  dsp_alu_block u_alu (
    .clk, .rst_n, .run, .ir, .xbus, .ybus, .io_rdata, .st_data, .take_branch,
    .acc0, .acc1, .psw
  );

  dsp_io_block u_io (
    .clk, .rst_n, .run, .ir, .st_data, .io_rdata, .io_strb, .irq_req, .irq_vector,
    .irq_ack, .iack, .wake, .ext_int, .emu_int, .si_clk, .si_sync, .serial_in, .so_clk,
    .so_sync, .serial_out, .pi_sync, .po_sync, .pio_in, .pio_out, .pio_oe
  );
endmodule
