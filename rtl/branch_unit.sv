// branch_unit: control-transfer resolution of the MIPS150 X stage.
//
// Given the decoded branch kind, the two (already bypassed) register operands,
// the instruction word and the address of the branch itself, it decides
// whether control transfers and where to. Branch targets are PC + 4 +
// (sign-extended offset << 2); J/JAL targets take the upper four bits of
// PC + 4 (the delay-slot address, as in the standard MIPS ISA) and the 26-bit
// index shifted left by two; JR/JALR jump to rs. The transfer takes effect
// after the delay-slot instruction, because the pipeline fetches that one
// while the branch is in X. It also gives the link value PC + 8 for JAL and
// JALR. Purely combinational.
module branch_unit
  import mips150_pkg::*;
(
  input  br_t         br,
  input  logic [31:0] pc,       // address of the branch or jump
  input  logic [31:0] instr,
  input  logic [31:0] rs_val,
  input  logic [31:0] rt_val,
  output logic        taken,
  output logic [31:0] target,
  output logic [31:0] link      // PC + 8
);
  logic [31:0] pc4, br_target, j_target;
  assign pc4       = pc + 32'd4;
  assign link      = pc + 32'd8;
  assign br_target = pc4 + {{14{instr[15]}}, instr[15:0], 2'b00};
  assign j_target  = {pc4[31:28], instr[25:0], 2'b00};

  logic rs_zero, rs_neg;
  assign rs_zero = (rs_val == 32'd0);
  assign rs_neg  = rs_val[31];

  always_comb begin
    taken  = 1'b0;
    target = br_target;
    unique case (br)
      BR_BEQ:  taken = (rs_val == rt_val);
      BR_BNE:  taken = (rs_val != rt_val);
      BR_BLEZ: taken = rs_neg || rs_zero;
      BR_BGTZ: taken = !rs_neg && !rs_zero;
      BR_BLTZ: taken = rs_neg;
      BR_BGEZ: taken = !rs_neg;
      BR_J:    begin taken = 1'b1; target = j_target; end
      BR_JR:   begin taken = 1'b1; target = rs_val; end
      default: taken = 1'b0;
    endcase
  end
endmodule
