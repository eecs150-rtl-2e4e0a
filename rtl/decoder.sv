// decoder: turns a 32-bit instruction word into the control bundle ctrl_t.
//
// Covers the full MIPS150 subset: LW/SW, the immediate ALU group (ADDIU,
// SLTI, SLTIU, ANDI, ORI, XORI, LUI), the R-type shifts and ALU operations,
// J/JAL/JR/JALR and the six conditional branches. Opcode and funct values
// are those of the standard MIPS ISA. SLTIU compares against the
// sign-extended immediate as unsigned numbers, as MIPS defines it. The
// destination is rt for immediate forms and loads, rd for R-type and JALR,
// and 31 for JAL. Any other encoding (including the unsupported
// branch-and-link REGIMM forms) is flagged illegal and decoded as a no-op
// that writes nothing; that treatment is this design's choice. Purely
// combinational.
module decoder
  import mips150_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [5:0] op, fn;
  logic [4:0] rt, rd;
  assign op = instr[31:26];
  assign fn = instr[5:0];
  assign rt = instr[20:16];
  assign rd = instr[15:11];

  always_comb begin
    ctrl = '{alu_op: ALU_ADD, srca: SRCA_RS, srcb: SRCB_RT, br: BR_NONE,
             reg_write: 1'b0, dest: 5'd0, wb_sel: WB_ALU,
             mem_read: 1'b0, mem_write: 1'b0, illegal: 1'b0};
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_write = 1'b1;
        ctrl.dest      = rd;
        unique case (fn)
          FN_SLL:  begin ctrl.alu_op = ALU_SLL; ctrl.srca = SRCA_SHAMT; end
          FN_SRL:  begin ctrl.alu_op = ALU_SRL; ctrl.srca = SRCA_SHAMT; end
          FN_SRA:  begin ctrl.alu_op = ALU_SRA; ctrl.srca = SRCA_SHAMT; end
          FN_SLLV: ctrl.alu_op = ALU_SLL;
          FN_SRLV: ctrl.alu_op = ALU_SRL;
          FN_SRAV: ctrl.alu_op = ALU_SRA;
          FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          FN_JR:   begin ctrl.br = BR_JR; ctrl.reg_write = 1'b0; ctrl.dest = 5'd0; end
          FN_JALR: begin ctrl.br = BR_JR; ctrl.wb_sel = WB_LINK; end
          default: begin ctrl.illegal = 1'b1; ctrl.reg_write = 1'b0; ctrl.dest = 5'd0; end
        endcase
      end
      OP_REGIMM: begin
        unique case (rt)
          RT_BLTZ: ctrl.br = BR_BLTZ;
          RT_BGEZ: ctrl.br = BR_BGEZ;
          default: ctrl.illegal = 1'b1;
        endcase
      end
      OP_J:    ctrl.br = BR_J;
      OP_JAL:  begin ctrl.br = BR_J; ctrl.reg_write = 1'b1; ctrl.dest = 5'd31; ctrl.wb_sel = WB_LINK; end
      OP_BEQ:  ctrl.br = BR_BEQ;
      OP_BNE:  ctrl.br = BR_BNE;
      OP_BLEZ: ctrl.br = BR_BLEZ;
      OP_BGTZ: ctrl.br = BR_BGTZ;
      OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.reg_write = 1'b1;
        ctrl.dest      = rt;
        unique case (op)
          OP_ADDIU: begin ctrl.alu_op = ALU_ADD;  ctrl.srcb = SRCB_SIMM; end
          OP_SLTI:  begin ctrl.alu_op = ALU_SLT;  ctrl.srcb = SRCB_SIMM; end
          OP_SLTIU: begin ctrl.alu_op = ALU_SLTU; ctrl.srcb = SRCB_SIMM; end
          OP_ANDI:  begin ctrl.alu_op = ALU_AND;  ctrl.srcb = SRCB_ZIMM; end
          OP_ORI:   begin ctrl.alu_op = ALU_OR;   ctrl.srcb = SRCB_ZIMM; end
          OP_XORI:  begin ctrl.alu_op = ALU_XOR;  ctrl.srcb = SRCB_ZIMM; end
          default:  begin ctrl.alu_op = ALU_LUI;  ctrl.srcb = SRCB_ZIMM; end
        endcase
      end
      OP_LW: begin
        ctrl.reg_write = 1'b1;
        ctrl.dest      = rt;
        ctrl.srcb      = SRCB_SIMM;
        ctrl.wb_sel    = WB_MEM;
        ctrl.mem_read  = 1'b1;
      end
      OP_SW: begin
        ctrl.srcb      = SRCB_SIMM;
        ctrl.mem_write = 1'b1;
      end
      default: ctrl.illegal = 1'b1;
    endcase
    // A write to r0 is no write at all.
    if (ctrl.dest == 5'd0) ctrl.reg_write = 1'b0;
  end
endmodule
