// tb_decoder: checks the decoded control bundle of every instruction of the
// subset, plus undefined encodings, against an expectation table written
// here from the instruction formats (opcode, funct, REGIMM rt field). Each
// instruction is tried with random register fields, including writes to r0,
// which must not enable a register write.
`timescale 1ns/1ps
module tb_decoder;
  import mips150_pkg::*;
  logic [31:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  decoder dut (.instr(instr), .ctrl(ctrl));

  typedef struct {
    string    name;
    bit       rtype;      // opcode 0, match funct
    logic [5:0] code;     // opcode or funct
    int       regimm_rt;  // -1 unless REGIMM
    alu_op_t  alu;
    srca_t    sa;
    srcb_t    sb;
    br_t      br;
    int       dst;        // 0 none, 1 rt, 2 rd, 3 r31
    wb_t      wb;
    bit       ld, st;
  } row_t;

  row_t tbl [$];

  function automatic row_t mk(string n, bit r, logic [5:0] c, int ri, alu_op_t a, srca_t sa,
                              srcb_t sb, br_t br, int d, wb_t wb, bit ld, bit st);
    row_t x;
    x.name = n; x.rtype = r; x.code = c; x.regimm_rt = ri; x.alu = a; x.sa = sa; x.sb = sb;
    x.br = br; x.dst = d; x.wb = wb; x.ld = ld; x.st = st;
    return x;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    tbl.push_back(mk("LW",    0, 6'b100011, -1, ALU_ADD,  SRCA_RS, SRCB_SIMM, BR_NONE, 1, WB_MEM, 1, 0));
    tbl.push_back(mk("SW",    0, 6'b101011, -1, ALU_ADD,  SRCA_RS, SRCB_SIMM, BR_NONE, 0, WB_ALU, 0, 1));
    tbl.push_back(mk("ADDIU", 0, 6'b001001, -1, ALU_ADD,  SRCA_RS, SRCB_SIMM, BR_NONE, 1, WB_ALU, 0, 0));
    tbl.push_back(mk("SLTI",  0, 6'b001010, -1, ALU_SLT,  SRCA_RS, SRCB_SIMM, BR_NONE, 1, WB_ALU, 0, 0));
    tbl.push_back(mk("SLTIU", 0, 6'b001011, -1, ALU_SLTU, SRCA_RS, SRCB_SIMM, BR_NONE, 1, WB_ALU, 0, 0));
    tbl.push_back(mk("ANDI",  0, 6'b001100, -1, ALU_AND,  SRCA_RS, SRCB_ZIMM, BR_NONE, 1, WB_ALU, 0, 0));
    tbl.push_back(mk("ORI",   0, 6'b001101, -1, ALU_OR,   SRCA_RS, SRCB_ZIMM, BR_NONE, 1, WB_ALU, 0, 0));
    tbl.push_back(mk("XORI",  0, 6'b001110, -1, ALU_XOR,  SRCA_RS, SRCB_ZIMM, BR_NONE, 1, WB_ALU, 0, 0));
    tbl.push_back(mk("LUI",   0, 6'b001111, -1, ALU_LUI,  SRCA_RS, SRCB_ZIMM, BR_NONE, 1, WB_ALU, 0, 0));
    tbl.push_back(mk("SLL",   1, 6'b000000, -1, ALU_SLL,  SRCA_SHAMT, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("SRL",   1, 6'b000010, -1, ALU_SRL,  SRCA_SHAMT, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("SRA",   1, 6'b000011, -1, ALU_SRA,  SRCA_SHAMT, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("SLLV",  1, 6'b000100, -1, ALU_SLL,  SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("SRLV",  1, 6'b000110, -1, ALU_SRL,  SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("SRAV",  1, 6'b000111, -1, ALU_SRA,  SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("ADDU",  1, 6'b100001, -1, ALU_ADD,  SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("SUBU",  1, 6'b100011, -1, ALU_SUB,  SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("AND",   1, 6'b100100, -1, ALU_AND,  SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("OR",    1, 6'b100101, -1, ALU_OR,   SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("XOR",   1, 6'b100110, -1, ALU_XOR,  SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("NOR",   1, 6'b100111, -1, ALU_NOR,  SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("SLT",   1, 6'b101010, -1, ALU_SLT,  SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("SLTU",  1, 6'b101011, -1, ALU_SLTU, SRCA_RS, SRCB_RT, BR_NONE, 2, WB_ALU, 0, 0));
    tbl.push_back(mk("JR",    1, 6'b001000, -1, ALU_ADD,  SRCA_RS, SRCB_RT, BR_JR,   0, WB_ALU, 0, 0));
    tbl.push_back(mk("JALR",  1, 6'b001001, -1, ALU_ADD,  SRCA_RS, SRCB_RT, BR_JR,   2, WB_LINK, 0, 0));
    tbl.push_back(mk("J",     0, 6'b000010, -1, ALU_ADD,  SRCA_RS, SRCB_RT, BR_J,    0, WB_ALU, 0, 0));
    tbl.push_back(mk("JAL",   0, 6'b000011, -1, ALU_ADD,  SRCA_RS, SRCB_RT, BR_J,    3, WB_LINK, 0, 0));
    tbl.push_back(mk("BEQ",   0, 6'b000100, -1, ALU_ADD,  SRCA_RS, SRCB_RT, BR_BEQ,  0, WB_ALU, 0, 0));
    tbl.push_back(mk("BNE",   0, 6'b000101, -1, ALU_ADD,  SRCA_RS, SRCB_RT, BR_BNE,  0, WB_ALU, 0, 0));
    tbl.push_back(mk("BLEZ",  0, 6'b000110, -1, ALU_ADD,  SRCA_RS, SRCB_RT, BR_BLEZ, 0, WB_ALU, 0, 0));
    tbl.push_back(mk("BGTZ",  0, 6'b000111, -1, ALU_ADD,  SRCA_RS, SRCB_RT, BR_BGTZ, 0, WB_ALU, 0, 0));
    tbl.push_back(mk("BLTZ",  0, 6'b000001,  0, ALU_ADD,  SRCA_RS, SRCB_RT, BR_BLTZ, 0, WB_ALU, 0, 0));
    tbl.push_back(mk("BGEZ",  0, 6'b000001,  1, ALU_ADD,  SRCA_RS, SRCB_RT, BR_BGEZ, 0, WB_ALU, 0, 0));

    foreach (tbl[i]) begin
      row_t e;
      e = tbl[i];
      for (int k = 0; k < 40; k++) begin
        int d;
        instr = $urandom;
        if (k == 0) instr[20:11] = '0;           // rt = rd = 0
        if (e.rtype) begin instr[31:26] = 6'b0; instr[5:0] = e.code; end
        else         instr[31:26] = e.code;
        if (e.regimm_rt >= 0) instr[20:16] = 5'(e.regimm_rt);
        #1;
        d = e.dst == 1 ? int'(instr[20:16]) : e.dst == 2 ? int'(instr[15:11]) : e.dst == 3 ? 31 : 0;
        expect_eq(ctrl.illegal == 1'b0, {e.name, " illegal"});
        expect_eq(ctrl.br == e.br, {e.name, " br"});
        expect_eq(ctrl.reg_write == (d != 0), {e.name, " reg_write"});
        if (d != 0) begin
          expect_eq(int'(ctrl.dest) == d, {e.name, " dest"});
          expect_eq(ctrl.wb_sel == e.wb, {e.name, " wb_sel"});
        end
        expect_eq(ctrl.mem_read == e.ld && ctrl.mem_write == e.st, {e.name, " mem"});
        if (e.br == BR_NONE) begin
          expect_eq(ctrl.alu_op == e.alu, {e.name, " alu_op"});
          expect_eq(ctrl.srcb == e.sb, {e.name, " srcb"});
          if (e.rtype) expect_eq(ctrl.srca == e.sa, {e.name, " srca"});
        end
      end
    end
    // Encodings outside the subset: no write, no memory access, no branch.
    for (int k = 0; k < 200; k++) begin
      logic [5:0] op;
      instr = $urandom;
      case (k % 4)
        0: begin op = 6'b010000 | 6'($urandom_range(0, 15)); instr[31:26] = op; end  // COPn..
        1: begin instr[31:26] = 6'b100000; end                                       // LB
        2: begin instr[31:26] = 6'b000001; instr[20:16] = 5'b10000; end              // BLTZAL
        default: begin instr[31:26] = 6'b0; instr[5:0] = 6'b001100; end              // SYSCALL
      endcase
      #1;
      expect_eq(ctrl.illegal && !ctrl.reg_write && !ctrl.mem_read && !ctrl.mem_write &&
                ctrl.br == BR_NONE, $sformatf("undefined %h", instr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
