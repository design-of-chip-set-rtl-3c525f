// dsp_alu_block: ALU block of the vocoder DSP. It holds two 36-bit accumulators, each
// split into a 4-bit extension nibble (overflow guard), a 16-bit X register (RX0/RX1)
// and a 16-bit Y register (RY0/RY1), plus general registers RX2, RX3, RY2, RY3; an
// 18 x 18 multiplier (16-bit operands sign-extended), a 36-bit barrel shifter and the
// ALU (add, subtract, and, or, exclusive or, load, compare, negate). In single-operand
// instructions an X register enters the ALU in bits 31:16 (the upper part of bus AB1)
// and a Y register sign-extended in the low part (bus AB2); double-precision
// instructions combine the two accumulators. Register loads arrive on two 16-bit move
// buses: RBH from the X bus and RBL from the Y bus, so a parallel instruction (MACD)
// multiplies-accumulates while two new operands are loaded. Loading RX0/RX1 also sign
// extends into the accumulator's nibble. The PSW flags Z, N and V (result outside the
// 32-bit range) are set by arithmetic instructions and decide conditional jumps.
// The block decodes the broadcast instruction itself and executes in one cycle; its
// register structure follows the design description and its block diagram, while the
// operation encoding, the flags and the one-cycle multiply are this design's choices
// (the description has multiplies take one more pipeline stage).
module dsp_alu_block
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic [23:0] ir,
  input  logic [15:0] xbus,      // to RBH
  input  logic [15:0] ybus,      // to RBL
  input  logic [15:0] io_rdata,
  output logic [15:0] st_data,   // register read for stores, pushes, OUT and MTS
  output logic        take_branch,
  output logic [35:0] acc0,
  output logic [35:0] acc1,
  output logic [2:0]  psw        // {V, N, Z}
);
  logic [15:0] rx [4], ry [4];
  logic [3:0]  ext [2];

  opcode_e op;
  assign op = opc(ir);

  function automatic logic [15:0] reg16(input logic [2:0] c, input logic [15:0] x [4], input logic [15:0] y [4]);
    return c[2] ? y[c[1:0]] : x[c[1:0]];
  endfunction

  logic [35:0] a [2];
  assign a[0] = {ext[0], rx[0], ry[0]};
  assign a[1] = {ext[1], rx[1], ry[1]};
  assign acc0 = a[0];
  assign acc1 = a[1];

  // store / move source register
  always_comb begin
    unique case (op)
      OP_MOV:                st_data = reg16(ir[15:13], rx, ry);
      OP_MTS, OP_OUT:        st_data = reg16(ir[14:12], rx, ry);
      default:               st_data = reg16(ir[18:16], rx, ry);
    endcase
  end

  // ---------------- datapath ----------------
  logic        ad;
  logic [35:0] opnd, res, prod, shres;
  logic        wr_acc, set_flags;
  alu_op_e     aop;
  logic signed [17:0] mx, my;
  logic signed [5:0]  amt;

  assign aop = alu_op_e'(ir[18:16]);

  function automatic logic [35:0] alu(input alu_op_e o, input logic [35:0] x, input logic [35:0] y);
    unique case (o)
      ALU_ADD: return x + y;
      ALU_SUB, ALU_CMP: return x - y;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_XOR: return x ^ y;
      ALU_LD:  return y;
      default: return -y;   // ALU_NEG
    endcase
  endfunction

  logic [15:0] r;
  always_comb begin
    ad = ir[15]; opnd = '0; r = '0; res = '0; wr_acc = 1'b0; set_flags = 1'b0;
    mx = '0; my = '0; prod = '0; amt = '0; shres = '0;
    unique case (op)
      OP_ALU: begin
        r    = reg16(ir[14:12], rx, ry);
        opnd = ir[14] ? {{20{r[15]}}, r} : {{4{r[15]}}, r, 16'h0};
        res  = alu(aop, a[ad], opnd);
        wr_acc = aop != ALU_CMP; set_flags = 1'b1;
      end
      OP_ALUD: begin
        res = alu(aop, a[ad], a[ir[14]]);
        wr_acc = aop != ALU_CMP; set_flags = 1'b1;
      end
      OP_ALUI: begin
        res = alu(aop, a[ad], {{21{ir[14]}}, ir[14:0]});
        wr_acc = aop != ALU_CMP; set_flags = 1'b1;
      end
      OP_MPY: begin
        ad   = ir[18];
        mx   = 18'($signed(rx[ir[15:14]]));
        my   = 18'($signed(ry[ir[13:12]]));
        prod = 36'(mx * my);
        res  = ir[17] ? (ir[16] ? a[ad] - prod : a[ad] + prod) : (ir[16] ? -prod : prod);
        wr_acc = 1'b1; set_flags = 1'b1;
      end
      OP_MACD: begin
        ad   = ir[18];
        mx   = 18'($signed(rx[2]));
        my   = 18'($signed(ry[2]));
        prod = 36'(mx * my);
        res  = a[ad] + prod;
        wr_acc = 1'b1; set_flags = 1'b1;
      end
      OP_SHF: begin
        ad  = ir[18];
        amt = $signed(ir[17:12]);
        shres = (amt >= 0) ? (a[ad] << amt) : 36'($signed(a[ad]) >>> (-amt));
        res = shres;
        wr_acc = 1'b1; set_flags = 1'b1;
      end
      default: ;
    endcase
  end

  // branch condition
  always_comb begin
    unique case (cond_e'(ir[18:16]))
      C_AL: take_branch = 1'b1;
      C_EQ: take_branch = psw[0];
      C_NE: take_branch = !psw[0];
      C_LT: take_branch = psw[1];
      C_GE: take_branch = !psw[1];
      C_GT: take_branch = !psw[1] && !psw[0];
      C_LE: take_branch = psw[1] || psw[0];
      default: take_branch = psw[2];
    endcase
  end

  // 16-bit register write
  task automatic wr16(input logic [2:0] c, input logic [15:0] d);
    if (c[2]) ry[c[1:0]] <= d;
    else begin
      rx[c[1:0]] <= d;
      if (c[1:0] == 2'd0) ext[0] <= {4{d[15]}};
      if (c[1:0] == 2'd1) ext[1] <= {4{d[15]}};
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin rx[i] <= '0; ry[i] <= '0; end
      ext[0] <= '0; ext[1] <= '0; psw <= 3'b001;
    end else if (run) begin
      if (wr_acc) begin
        ext[ad] <= res[35:32]; rx[{1'b0, ad}] <= res[31:16]; ry[{1'b0, ad}] <= res[15:0];
      end
      if (set_flags) psw <= {res[35:31] != {5{res[35]}}, res[35], res == '0};
      unique case (op)
        OP_LDI:          wr16(ir[18:16], ir[15:0]);
        OP_LDD, OP_LDN, OP_POP: wr16(ir[18:16], xbus);
        OP_MOV:          wr16(ir[18:16], reg16(ir[15:13], rx, ry));
        OP_IN:           wr16(ir[18:16], io_rdata);
        OP_MFS: begin
          unique case (sreg_e'(ir[15:12]))
            SR_PSW:  wr16(ir[18:16], {13'd0, psw});
            SR_EXT0: wr16(ir[18:16], {{12{ext[0][3]}}, ext[0]});
            SR_EXT1: wr16(ir[18:16], {{12{ext[1][3]}}, ext[1]});
            default: wr16(ir[18:16], xbus);
          endcase
        end
        OP_MTS: begin
          unique case (sreg_e'(ir[18:15]))
            SR_PSW:  psw <= st_data[2:0];
            SR_EXT0: ext[0] <= st_data[3:0];
            SR_EXT1: ext[1] <= st_data[3:0];
            default: ;
          endcase
        end
        OP_DLD: begin
          rx[ir[18:17]] <= xbus;                       // RBH
          ry[ir[16:15]] <= ybus;                       // RBL
          if (ir[18:17] == 2'd0) ext[0] <= {4{xbus[15]}};
          if (ir[18:17] == 2'd1) ext[1] <= {4{xbus[15]}};
        end
        OP_MACD: begin rx[2] <= xbus; ry[2] <= ybus; end
        default: ;
      endcase
    end
  end
endmodule
