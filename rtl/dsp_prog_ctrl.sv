// dsp_prog_ctrl: program control block of the vocoder DSP. It sequences the
// instruction flow with the 16-bit program counter (PC) and the 24-bit instruction
// register (IR), whose content is broadcast to the other blocks, each of which decodes
// it for itself. Instructions come from the 8 k x 24 program ROM or, in microprocessor
// mode (mp_mode), from external program memory (prog_addr/prog_data, strb). It holds
// the program stack (calls and interrupts) and the repeat hardware: repeat start (RS),
// repeat end (RE) and repeat counter (RC) registers with a 3-deep stack each for nested
// repeat loops. A loop costs no cycles: when the fetch address reaches RE with RC > 1,
// the next fetch address is RS.
// Pipeline (this design's choice): fetch and execute, two stages. A taken jump, call,
// return or interrupt entry discards the instruction being fetched (one bubble). In
// idle the PC and IR hold and NOPs execute until wake. The register sizes, the ROM size
// and the 3-deep repeat stacks follow the design description; the 8-deep program stack,
// the interrupt entry and the bubble are this design's. Nested loops must not end on
// the same address.
module dsp_prog_ctrl
  import dsp_pkg::*;
#(
  parameter int    PROG_WORDS = 8192,
  parameter int    STACK_DEPTH = 8,
  parameter string PROG_INIT  = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mp_mode,
  output logic [15:0] prog_addr,
  input  logic [23:0] prog_data,
  output logic        strb,
  output logic [23:0] ir,
  input  logic        take_branch,   // condition of a JMP in IR (from the ALU block flags)
  input  logic        irq_req,
  input  logic [15:0] irq_vector,
  output logic        irq_ack,
  input  logic        wake,
  output logic        idle,
  output logic [15:0] pc,
  output logic [15:0] stack_overflow
);
  logic [23:0] rom [PROG_WORDS];
  initial begin
    for (int i = 0; i < PROG_WORDS; i++) rom[i] = '0;
    if (PROG_INIT != "") $readmemh(PROG_INIT, rom);
  end

  logic [15:0] stk [STACK_DEPTH];
  localparam int SW = $clog2(STACK_DEPTH);
  logic [SW:0] sp;
  logic [15:0] rs, re; logic [10:0] rc;
  logic [15:0] rs_s [3], re_s [3]; logic [10:0] rc_s [3];
  logic [1:0]  rdepth;

  opcode_e op;
  assign op = opc(ir);

  // control flow decided by the instruction in IR
  logic        is_rpt, flush, take_irq, ctl;
  logic [15:0] target;
  assign ctl = op inside {OP_JMP, OP_CALL, OP_RET, OP_RPT, OP_RETI, OP_IDLE};
  always_comb begin
    target = ir[15:0];
    flush  = 1'b0;
    unique case (op)
      OP_JMP:           flush = take_branch;
      OP_CALL:          flush = 1'b1;
      OP_RET, OP_RETI:  begin flush = 1'b1; target = stk[SW'(sp - 1'b1)]; end
      default: ;
    endcase
  end
  assign take_irq = irq_req && !idle && !ctl && !flush;
  assign irq_ack  = take_irq;
  assign is_rpt   = op == OP_RPT;

  // effective repeat registers (a RPT in IR takes effect on the fetch in the same cycle)
  logic [15:0] rs_e, re_e; logic [10:0] rc_e;
  assign rs_e = is_rpt ? pc : rs;
  assign re_e = is_rpt ? pc + 16'(ir[18:11]) : re;
  assign rc_e = is_rpt ? ir[10:0] : rc;

  logic loop_end, wrap;
  assign loop_end = !idle && !flush && !take_irq && rc_e != '0 && pc == re_e;
  assign wrap     = loop_end && rc_e > 11'd1;

  logic [23:0] fetched;
  assign prog_addr = pc;
  assign strb      = mp_mode && !idle;
  assign fetched   = mp_mode ? prog_data : rom[pc[$clog2(PROG_WORDS)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; ir <= INSTR_NOP; sp <= '0; idle <= 1'b0; stack_overflow <= '0;
      rs <= '0; re <= '0; rc <= '0; rdepth <= '0;
      for (int i = 0; i < 3; i++) begin rs_s[i] <= '0; re_s[i] <= '0; rc_s[i] <= '0; end
    end else begin
      // ---- instruction in IR ----
      if (op == OP_CALL) begin
        if (int'(sp) == STACK_DEPTH) stack_overflow <= stack_overflow + 1'b1;
        else begin stk[SW'(sp)] <= pc; sp <= sp + 1'b1; end
      end
      if ((op == OP_RET || op == OP_RETI) && sp != '0) sp <= sp - 1'b1;
      if (is_rpt) begin
        // push the outer loop, start the new one
        rs_s[0] <= rs; re_s[0] <= re; rc_s[0] <= rc;
        rs_s[1] <= rs_s[0]; re_s[1] <= re_s[0]; rc_s[1] <= rc_s[0];
        rs_s[2] <= rs_s[1]; re_s[2] <= re_s[1]; rc_s[2] <= rc_s[1];
        rdepth  <= (rdepth == 2'd3) ? 2'd3 : rdepth + 1'b1;
      end
      rs <= rs_e; re <= re_e; rc <= rc_e;
      // ---- fetch ----
      if (idle) begin
        ir <= INSTR_NOP;
        if (wake) idle <= 1'b0;
      end else if (op == OP_IDLE) begin
        idle <= 1'b1;
        ir   <= INSTR_NOP;
      end else if (flush) begin
        pc <= target;
        ir <= INSTR_NOP;
      end else if (take_irq) begin
        if (int'(sp) == STACK_DEPTH) stack_overflow <= stack_overflow + 1'b1;
        else begin stk[SW'(sp)] <= pc; sp <= sp + 1'b1; end
        pc <= irq_vector;
        ir <= INSTR_NOP;
      end else begin
        ir <= fetched;
        if (wrap) begin
          pc <= rs_e;
          rc <= rc_e - 1'b1;
        end else begin
          pc <= pc + 1'b1;
          if (loop_end) begin
            // last pass done: pop the outer loop
            rs <= rs_s[0]; re <= re_s[0]; rc <= rc_s[0];
            rs_s[0] <= rs_s[1]; re_s[0] <= re_s[1]; rc_s[0] <= rc_s[1];
            rs_s[1] <= rs_s[2]; re_s[1] <= re_s[2]; rc_s[1] <= rc_s[2];
            rs_s[2] <= '0; re_s[2] <= '0; rc_s[2] <= '0;
            rdepth  <= (rdepth == 2'd0) ? 2'd0 : rdepth - 1'b1;
          end
        end
      end
    end
  end
endmodule
