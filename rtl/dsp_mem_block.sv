// dsp_mem_block: memory block of the vocoder DSP. Two data banks (x and y), each with
// a 1 k x 16 RAM at addresses 0x000-0x3FF and a 1.5 k x 16 ROM at 0x400-0x9FF, serve the
// direct and indirect addressing modes; both banks can be accessed in the same cycle
// (dual load). Address registers AX0/AX1 point into the x bank and AY0/AY1 into the y
// bank; indirect accesses post-modify them by +1, -1 or the bank's index register
// (IX/IY). A start/end pair per bank (XS/XE, YS/YE) makes a circular buffer: stepping up
// past the end returns to the start (and down past the start to the end) when start and
// end differ. The stack pointer SP addresses the stack in x RAM (push pre-decrements,
// pop post-increments); SPB, the stack pointer buffer, is a plain special register here.
// The block decodes the broadcast instruction itself. Loads drive xbus (single loads,
// pops, special register reads, and the x half of dual loads) and ybus (the y half);
// stores and special register writes take st_data from the ALU block. RAM and ROM reads
// are combinational (one-cycle execute).
// Sizes, register names and the circular-buffer start/end registers follow the design
// description and its block diagram; the post-modify modes, the memory map and the SPB
// behaviour are this design's choices.
module dsp_mem_block
  import dsp_pkg::*;
#(
  parameter string XROM_INIT = "",
  parameter string YROM_INIT = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic [23:0] ir,
  input  logic [15:0] st_data,
  output logic [15:0] xbus,
  output logic [15:0] ybus
);
  logic [15:0] xram [RAM_WORDS], yram [RAM_WORDS];
  logic [15:0] xrom [ROM_WORDS], yrom [ROM_WORDS];
  initial begin
    for (int i = 0; i < ROM_WORDS; i++) begin xrom[i] = '0; yrom[i] = '0; end
    if (XROM_INIT != "") $readmemh(XROM_INIT, xrom);
    if (YROM_INIT != "") $readmemh(YROM_INIT, yrom);
  end

  logic [15:0] ax [2], ay [2], ix, iy, sp, spb, xs, xe, ys, ye;

  opcode_e op;
  assign op = opc(ir);

  function automatic logic [15:0] rd_bank(input logic b, input logic [15:0] a,
      input logic [15:0] xr [RAM_WORDS], input logic [15:0] yr [RAM_WORDS],
      input logic [15:0] xo [ROM_WORDS], input logic [15:0] yo [ROM_WORDS]);
    int unsigned ai;
    ai = int'(a[11:0]);
    if (ai < RAM_WORDS) return b ? yr[ai] : xr[ai];
    if (ai < ROM_BASE + ROM_WORDS) return b ? yo[ai - ROM_BASE] : xo[ai - ROM_BASE];
    return '0;
  endfunction

  function automatic logic [15:0] post_mod(input logic [15:0] a, input mod_e m, input logic [15:0] idx,
                                          input logic [15:0] s, input logic [15:0] e);
    logic circ;
    circ = s != e;
    unique case (m)
      MOD_INC: return (circ && a == e) ? s : a + 16'd1;
      MOD_DEC: return (circ && a == s) ? e : a - 16'd1;
      MOD_IDX: return (circ && a == e) ? s : a + idx;
      default: return a;
    endcase
  endfunction

  // decoded fields
  logic        bank, arsel, xar, yar;
  mod_e        md, dmod;
  logic [15:0] ind_addr, dx_addr, dy_addr;
  assign bank  = ir[15];
  assign arsel = ir[14];
  assign md    = mod_e'(ir[13:12]);
  assign xar   = ir[14];
  assign yar   = ir[13];
  assign dmod  = mod_e'(ir[12:11]);
  assign ind_addr = bank ? ay[arsel] : ax[arsel];
  assign dx_addr  = (op == OP_MACD) ? ax[0] : ax[xar];
  assign dy_addr  = (op == OP_MACD) ? ay[0] : ay[yar];

  logic [15:0] sreg_val;
  always_comb begin
    unique case (sreg_e'(ir[15:12]))
      SR_AX0: sreg_val = ax[0];  SR_AX1: sreg_val = ax[1];
      SR_AY0: sreg_val = ay[0];  SR_AY1: sreg_val = ay[1];
      SR_IX:  sreg_val = ix;     SR_IY:  sreg_val = iy;
      SR_SP:  sreg_val = sp;     SR_SPB: sreg_val = spb;
      SR_XS:  sreg_val = xs;     SR_XE:  sreg_val = xe;
      SR_YS:  sreg_val = ys;     SR_YE:  sreg_val = ye;
      default: sreg_val = '0;
    endcase
  end

  always_comb begin
    xbus = '0;
    ybus = '0;
    unique case (op)
      OP_LDD:          xbus = rd_bank(bank, {4'd0, ir[11:0]}, xram, yram, xrom, yrom);
      OP_LDN:          xbus = rd_bank(bank, ind_addr, xram, yram, xrom, yrom);
      OP_DLD, OP_MACD: begin
        xbus = rd_bank(1'b0, dx_addr, xram, yram, xrom, yrom);
        ybus = rd_bank(1'b1, dy_addr, xram, yram, xrom, yrom);
      end
      OP_POP:          xbus = rd_bank(1'b0, sp, xram, yram, xrom, yrom);
      OP_MFS:          xbus = sreg_val;
      default: ;
    endcase
  end

  task automatic wr_bank(input logic b, input logic [15:0] a, input logic [15:0] d);
    if (int'(a[11:0]) < RAM_WORDS) begin
      if (b) yram[a[9:0]] <= d; else xram[a[9:0]] <= d;
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ax[0] <= '0; ax[1] <= '0; ay[0] <= '0; ay[1] <= '0; ix <= 16'd1; iy <= 16'd1;
      sp <= 16'(RAM_WORDS); spb <= '0; xs <= '0; xe <= '0; ys <= '0; ye <= '0;
    end else if (run) begin
      unique case (op)
        OP_STD: wr_bank(bank, {4'd0, ir[11:0]}, st_data);
        OP_STN: wr_bank(bank, ind_addr, st_data);
        default: ;
      endcase
      if (op == OP_LDN || op == OP_STN) begin
        if (bank) ay[arsel] <= post_mod(ay[arsel], md, iy, ys, ye);
        else      ax[arsel] <= post_mod(ax[arsel], md, ix, xs, xe);
      end
      if (op == OP_DLD) begin
        ax[xar] <= post_mod(ax[xar], dmod, ix, xs, xe);
        ay[yar] <= post_mod(ay[yar], dmod, iy, ys, ye);
      end
      if (op == OP_MACD) begin
        ax[0] <= post_mod(ax[0], MOD_INC, ix, xs, xe);
        ay[0] <= post_mod(ay[0], MOD_INC, iy, ys, ye);
      end
      if (op == OP_PUSH) begin
        wr_bank(1'b0, sp - 16'd1, st_data);
        sp <= sp - 16'd1;
      end
      if (op == OP_POP) sp <= sp + 16'd1;
      if (op == OP_MTS) begin
        unique case (sreg_e'(ir[18:15]))
          SR_AX0: ax[0] <= st_data;  SR_AX1: ax[1] <= st_data;
          SR_AY0: ay[0] <= st_data;  SR_AY1: ay[1] <= st_data;
          SR_IX:  ix <= st_data;     SR_IY:  iy <= st_data;
          SR_SP:  sp <= st_data;     SR_SPB: spb <= st_data;
          SR_XS:  xs <= st_data;     SR_XE:  xe <= st_data;
          SR_YS:  ys <= st_data;     SR_YE:  ye <= st_data;
          default: ;
        endcase
      end
    end
  end
endmodule
