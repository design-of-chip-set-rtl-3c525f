// dsp_pkg: instruction set of the 16-bit vocoder DSP. Every instruction is one 24-bit
// word (opcode in bits 23:19), so immediate (16-bit) and direct (12-bit address)
// operands fit in the instruction and every instruction issues in one cycle. The word
// length, the opcode classes and the addressing modes follow the design description;
// the bit-level encoding is this design's own.
//
//  op   mnemonic  fields
//  00   NOP
//  01   LDI   rd[18:16] imm[15:0]                 rd <- imm
//  02   LDD   rd[18:16] bank[15] addr[11:0]       rd <- bank[addr]          (direct)
//  03   STD   rs[18:16] bank[15] addr[11:0]       bank[addr] <- rs
//  04   LDN   rd[18:16] bank[15] ar[14] mod[13:12] rd <- bank[ar], ar post-modified
//  05   STN   rs[18:16] bank[15] ar[14] mod[13:12] bank[ar] <- rs             (indirect)
//  06   DLD   rx[18:17] ry[16:15] xar[14] yar[13] mod[12:11]  RXn <- X[axi], RYm <- Y[ayj]
//  07   MOV   rd[18:16] rs[15:13]
//  08   MTS   sreg[18:15] rs[14:12]               special register <- rs
//  09   MFS   rd[18:16] sreg[15:12]               rd <- special register
//  10   ALU   op[18:16] ad[15] rs[14:12]          A <- A op rs (RX in bits 31:16, RY sign-extended)
//  11   ALUD  op[18:16] ad[15] as[14]             A <- A op A' (36-bit, double precision)
//  12   ALUI  op[18:16] ad[15] imm[14:0]          A <- A op sext(imm)
//  13   MPY   ad[18] mac[17] sub[16] xs[15:14] ys[13:12]  A <- (mac ? A : 0) +/- RXxs * RYys
//  14   MACD  ad[18]                              A <- A + RX2*RY2 || RX2 <- X[ax0++] || RY2 <- Y[ay0++]
//  15   SHF   ad[18] amt[17:12]                   A <- A <<< amt (amt signed, negative: right)
//  16   JMP   cond[18:16] addr[15:0]
//  17   CALL  addr[15:0]
//  18   RET
//  19   RPT   len[18:11] cnt[10:0]                repeat the next len+1 words cnt times
//  20   PUSH  rs[18:16]                           X[--SP] <- rs
//  21   POP   rd[18:16]                           rd <- X[SP++]
//  22   IN    rd[18:16] port[3:0]
//  23   OUT   port[18:15] rs[14:12]
//  24   IDLE                                      stop the main clock until an interrupt
//  25   RETI
package dsp_pkg;
  typedef enum logic [4:0] {
    OP_NOP = 5'd0, OP_LDI = 5'd1, OP_LDD = 5'd2, OP_STD = 5'd3, OP_LDN = 5'd4, OP_STN = 5'd5,
    OP_DLD = 5'd6, OP_MOV = 5'd7, OP_MTS = 5'd8, OP_MFS = 5'd9, OP_ALU = 5'd10, OP_ALUD = 5'd11,
    OP_ALUI = 5'd12, OP_MPY = 5'd13, OP_MACD = 5'd14, OP_SHF = 5'd15, OP_JMP = 5'd16,
    OP_CALL = 5'd17, OP_RET = 5'd18, OP_RPT = 5'd19, OP_PUSH = 5'd20, OP_POP = 5'd21,
    OP_IN = 5'd22, OP_OUT = 5'd23, OP_IDLE = 5'd24, OP_RETI = 5'd25
  } opcode_e;

  // ALU operations
  typedef enum logic [2:0] {ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR = 3'd3,
                            ALU_XOR = 3'd4, ALU_LD = 3'd5, ALU_CMP = 3'd6, ALU_NEG = 3'd7} alu_op_e;

  // 3-bit register codes: 0..3 RX0..RX3, 4..7 RY0..RY3. A0 = {EXT0, RX0, RY0}, A1 likewise.
  // Special registers (MTS/MFS)
  typedef enum logic [3:0] {
    SR_AX0 = 4'd0, SR_AX1 = 4'd1, SR_AY0 = 4'd2, SR_AY1 = 4'd3, SR_IX = 4'd4, SR_IY = 4'd5,
    SR_SP = 4'd6, SR_SPB = 4'd7, SR_XS = 4'd8, SR_XE = 4'd9, SR_YS = 4'd10, SR_YE = 4'd11,
    SR_PSW = 4'd12, SR_EXT0 = 4'd13, SR_EXT1 = 4'd14
  } sreg_e;

  // Post-modify modes of indirect addressing
  typedef enum logic [1:0] {MOD_NONE = 2'd0, MOD_INC = 2'd1, MOD_DEC = 2'd2, MOD_IDX = 2'd3} mod_e;

  // Branch conditions on the PSW flags
  typedef enum logic [2:0] {C_AL = 3'd0, C_EQ = 3'd1, C_NE = 3'd2, C_LT = 3'd3,
                            C_GE = 3'd4, C_GT = 3'd5, C_LE = 3'd6, C_V = 3'd7} cond_e;

  // I/O registers (IN/OUT)
  typedef enum logic [3:0] {IO_SIR = 4'd0, IO_SOR = 4'd1, IO_PIR = 4'd2, IO_POR = 4'd3,
                            IO_IMR = 4'd4, IO_ISR = 4'd5, IO_SCR = 4'd6} io_e;

  // Interrupt numbers; the vector of interrupt n is program address 4*n (reset: 0).
  localparam int IRQ_SI = 1, IRQ_SO = 2, IRQ_PI = 3, IRQ_PO = 4, IRQ_EXT = 5, IRQ_EMU = 6;

  // Data memory map of each bank (12-bit addresses)
  localparam int RAM_WORDS = 1024;     // 1 k x 16 RAM at 0x000
  localparam int ROM_BASE  = 1024;
  localparam int ROM_WORDS = 1536;     // 1.5 k x 16 ROM at 0x400

  localparam logic [23:0] INSTR_NOP = 24'h0;

  function automatic opcode_e opc(input logic [23:0] ir);
    return opcode_e'(ir[23:19]);
  endfunction
endpackage
