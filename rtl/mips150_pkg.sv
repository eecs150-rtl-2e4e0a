// mips150_pkg: shared types and constants of the MIPS150 processor and its
// memory system.
//
// Holds the opcode and function-field encodings of the supported MIPS subset
// (standard MIPS-I numbers), the ALU operation and write-back source enums,
// the decoded control bundle that travels from the decoder down the pipeline,
// and the memory map (base addresses and sizes of the instruction memory, the
// heap and stack data memories and the four serial-interface registers).
// The encodings and the address map are those of the standard ISA and of the
// MIPS150 memory map; the enum and struct layouts are this design's own.
package mips150_pkg;

  // ---------------------------------------------------------------- opcodes
  localparam logic [5:0] OP_RTYPE  = 6'b000000;
  localparam logic [5:0] OP_REGIMM = 6'b000001;  // BLTZ / BGEZ
  localparam logic [5:0] OP_J      = 6'b000010;
  localparam logic [5:0] OP_JAL    = 6'b000011;
  localparam logic [5:0] OP_BEQ    = 6'b000100;
  localparam logic [5:0] OP_BNE    = 6'b000101;
  localparam logic [5:0] OP_BLEZ   = 6'b000110;
  localparam logic [5:0] OP_BGTZ   = 6'b000111;
  localparam logic [5:0] OP_ADDIU  = 6'b001001;
  localparam logic [5:0] OP_SLTI   = 6'b001010;
  localparam logic [5:0] OP_SLTIU  = 6'b001011;
  localparam logic [5:0] OP_ANDI   = 6'b001100;
  localparam logic [5:0] OP_ORI    = 6'b001101;
  localparam logic [5:0] OP_XORI   = 6'b001110;
  localparam logic [5:0] OP_LUI    = 6'b001111;
  localparam logic [5:0] OP_LW     = 6'b100011;
  localparam logic [5:0] OP_SW     = 6'b101011;

  // ---------------------------------------------------- R-type funct fields
  localparam logic [5:0] FN_SLL  = 6'b000000;
  localparam logic [5:0] FN_SRL  = 6'b000010;
  localparam logic [5:0] FN_SRA  = 6'b000011;
  localparam logic [5:0] FN_SLLV = 6'b000100;
  localparam logic [5:0] FN_SRLV = 6'b000110;
  localparam logic [5:0] FN_SRAV = 6'b000111;
  localparam logic [5:0] FN_JR   = 6'b001000;
  localparam logic [5:0] FN_JALR = 6'b001001;
  localparam logic [5:0] FN_ADDU = 6'b100001;
  localparam logic [5:0] FN_SUBU = 6'b100011;
  localparam logic [5:0] FN_AND  = 6'b100100;
  localparam logic [5:0] FN_OR   = 6'b100101;
  localparam logic [5:0] FN_XOR  = 6'b100110;
  localparam logic [5:0] FN_NOR  = 6'b100111;
  localparam logic [5:0] FN_SLT  = 6'b101010;
  localparam logic [5:0] FN_SLTU = 6'b101011;

  // REGIMM rt field
  localparam logic [4:0] RT_BLTZ = 5'b00000;
  localparam logic [4:0] RT_BGEZ = 5'b00001;

  // ------------------------------------------------------------ ALU and PC
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_t;

  // First ALU operand: register rs, or the 5-bit shamt field.
  typedef enum logic {SRCA_RS, SRCA_SHAMT} srca_t;
  // Second ALU operand: register rt, sign- or zero-extended immediate.
  typedef enum logic [1:0] {SRCB_RT, SRCB_SIMM, SRCB_ZIMM} srcb_t;

  // Branch / jump kind, resolved in the X stage.
  typedef enum logic [3:0] {
    BR_NONE, BR_BEQ, BR_BNE, BR_BLEZ, BR_BGTZ, BR_BLTZ, BR_BGEZ,
    BR_J, BR_JR
  } br_t;

  // Value written to the register file.
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_LINK} wb_t;

  // Decoded control of one instruction.
  typedef struct packed {
    alu_op_t    alu_op;
    srca_t      srca;
    srcb_t      srcb;
    br_t        br;
    logic       reg_write;   // writes the register file
    logic [4:0] dest;        // destination register (0 when none)
    wb_t        wb_sel;
    logic       mem_read;    // LW
    logic       mem_write;   // SW
    logic       illegal;     // not in the supported subset: executes as a no-op
  } ctrl_t;

  // -------------------------------------------------------------- memory map
  localparam logic [31:0] RESET_PC       = 32'h0040_0000;
  localparam logic [31:0] IMEM_BASE      = 32'h0040_0000;  // write-only, 32 KiB
  localparam logic [31:0] HEAP_BASE      = 32'h1001_0000;  // R/W, 32 KiB
  localparam logic [31:0] STACK_BASE     = 32'h7fff_f000;  // R/W, 4 KiB
  localparam logic [31:0] SER_CTRL_IN    = 32'hffff_0000;  // R
  localparam logic [31:0] SER_DATA_IN    = 32'hffff_0004;  // R
  localparam logic [31:0] SER_CTRL_OUT   = 32'hffff_0008;  // R
  localparam logic [31:0] SER_DATA_OUT   = 32'hffff_000c;  // W

  // log2 of the number of 32-bit words in each memory
  localparam int unsigned IMEM_AW  = 13;  // 0x00400000 - 0x00407ffc
  localparam int unsigned HEAP_AW  = 13;  // 0x10010000 - 0x10017ffc
  localparam int unsigned STACK_AW = 10;  // 0x7ffff000 - 0x7ffffffc

  // Which device a bus access selects.
  typedef enum logic [2:0] {
    DEV_NONE, DEV_IMEM, DEV_HEAP, DEV_STACK, DEV_SERIAL
  } dev_t;

endpackage
