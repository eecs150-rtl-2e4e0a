// alu: the combinational arithmetic and logic unit of the MIPS150 X stage.
//
// Computes every ALU result of the supported subset from two 32-bit operands:
// add and subtract (modulo 2^32, no overflow trap, as ADDU/SUBU/ADDIU),
// AND/OR/XOR/NOR, signed and unsigned set-less-than, logical and arithmetic
// shifts of operand b by the low five bits of operand a, and LUI (operand b
// moved to the upper half-word). The operation set follows the instruction
// table of the ISA; the operand convention (shift amount on a, value on b) is
// this design's choice. Purely combinational, no clock.
module alu
  import mips150_pkg::*;
(
  input  alu_op_t     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [4:0] sh;
  assign sh = a[4:0];

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_SLL:  y = b << sh;
      ALU_SRL:  y = b >> sh;
      ALU_SRA:  y = $unsigned($signed(b) >>> sh);
      ALU_LUI:  y = {b[15:0], 16'h0000};
      default:  y = a + b;
    endcase
  end
endmodule
