// mips_tb_pkg: verification helpers shared by the processor and system
// testbenches.
//
// * Instruction encoders (asm_r, asm_i, asm_j) that build MIPS words from
//   fields, written from the standard MIPS instruction formats.
// * mips_iss: an instruction-level reference model of the MIPS150 subset
//   with the architected delay slots: the instruction after a branch or
//   jump always executes, and the instruction after a load still sees the
//   destination register's old value. It holds its own copy of memory as
//   an associative array of words.
// * prog_gen: a random program generator. Programs are built from chunks
//   (single ALU/memory instructions, conditional branches with their delay
//   slot, J/JAL, and LUI/ORI/JR or JALR sequences) so that every branch or
//   jump lands on a chunk boundary ahead of it; the program ends in a
//   "halt: j halt; nop" loop. Registers 27-29 are reserved as base
//   pointers (instruction memory, heap, stack) and never written by the
//   random part.
package mips_tb_pkg;

  localparam logic [31:0] T_RESET_PC = 32'h0040_0000;
  localparam logic [31:0] T_HEAP     = 32'h1001_0000;
  localparam logic [31:0] T_STACK    = 32'h7fff_f000;
  localparam logic [31:0] T_IMEM_WR  = 32'h0040_4000;  // upper half of instruction memory

  function automatic logic [31:0] asm_r(input logic [5:0] fn, input int rs, input int rt,
                                        input int rd, input int sh);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction

  function automatic logic [31:0] asm_i(input logic [5:0] op, input int rs, input int rt,
                                        input logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  function automatic logic [31:0] asm_j(input logic [5:0] op, input logic [31:0] target);
    return {op, target[27:2]};
  endfunction

  // ------------------------------------------------------------------ ISS
  class mips_iss;
    logic [31:0] regs [32];
    logic [31:0] pc, npc;
    logic [31:0] mem [logic [29:0]];    // word address -> word (data and code)
    bit          ld_pend;
    int          ld_reg;
    logic [31:0] ld_val;
    longint      executed;

    function new();
      foreach (regs[i]) regs[i] = 32'h0;
      pc = T_RESET_PC; npc = T_RESET_PC + 4;
      ld_pend = 0; executed = 0;
    endfunction

    function logic [31:0] rd_mem(input logic [31:0] a);
      if (a[31:15] == T_RESET_PC[31:15]) return 32'h0;   // write-only range
      if (mem.exists(a[31:2])) return mem[a[31:2]];
      return 32'h0;
    endfunction

    function logic [31:0] fetch(input logic [31:0] a);
      if (mem.exists(a[31:2])) return mem[a[31:2]];
      return 32'h0;
    endfunction

    function void wr(input int r, input logic [31:0] v);
      if (r != 0) regs[r] = v;
    endfunction

    // Execute one instruction.
    function void step();
      logic [31:0] ins, a, b, res, simm, zimm, tgt, nxt;
      logic [5:0]  op, fn;
      int          rs, rt, rd, sh, dst;
      bit          taken, is_load, writes;
      ins  = fetch(pc);
      op   = ins[31:26]; fn = ins[5:0];
      rs   = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
      sh   = int'(ins[10:6]);
      a    = regs[rs]; b = regs[rt];
      simm = {{16{ins[15]}}, ins[15:0]};
      zimm = {16'h0, ins[15:0]};
      tgt  = pc + 4 + (simm << 2);
      taken = 0; is_load = 0; writes = 0; dst = 0; res = 0;
      case (op)
        6'b000000: begin
          writes = 1; dst = rd;
          case (fn)
            6'b000000: res = b << sh;
            6'b000010: res = b >> sh;
            6'b000011: res = $unsigned($signed(b) >>> sh);
            6'b000100: res = b << a[4:0];
            6'b000110: res = b >> a[4:0];
            6'b000111: res = $unsigned($signed(b) >>> a[4:0]);
            6'b100001: res = a + b;
            6'b100011: res = a - b;
            6'b100100: res = a & b;
            6'b100101: res = a | b;
            6'b100110: res = a ^ b;
            6'b100111: res = ~(a | b);
            6'b101010: res = ($signed(a) < $signed(b)) ? 1 : 0;
            6'b101011: res = (a < b) ? 1 : 0;
            6'b001000: begin writes = 0; taken = 1; tgt = a; end
            6'b001001: begin res = pc + 8; taken = 1; tgt = a; end
            default:   writes = 0;
          endcase
        end
        6'b000001: begin
          if (rt == 0) taken = a[31];
          else if (rt == 1) taken = !a[31];
        end
        6'b000010: begin taken = 1; tgt = {npc[31:28], ins[25:0], 2'b00}; end
        6'b000011: begin taken = 1; tgt = {npc[31:28], ins[25:0], 2'b00};
                         writes = 1; dst = 31; res = pc + 8; end
        6'b000100: taken = (a == b);
        6'b000101: taken = (a != b);
        6'b000110: taken = $signed(a) <= 0;
        6'b000111: taken = $signed(a) > 0;
        6'b001001: begin writes = 1; dst = rt; res = a + simm; end
        6'b001010: begin writes = 1; dst = rt; res = ($signed(a) < $signed(simm)) ? 1 : 0; end
        6'b001011: begin writes = 1; dst = rt; res = (a < simm) ? 1 : 0; end
        6'b001100: begin writes = 1; dst = rt; res = a & zimm; end
        6'b001101: begin writes = 1; dst = rt; res = a | zimm; end
        6'b001110: begin writes = 1; dst = rt; res = a ^ zimm; end
        6'b001111: begin writes = 1; dst = rt; res = {ins[15:0], 16'h0}; end
        6'b100011: begin is_load = 1; dst = rt; res = rd_mem(a + simm); end
        6'b101011: begin
          logic [31:0] ea;
          ea = a + simm;
          // only the instruction memory and the data memories are writable here
          if (ea[31:15] == T_RESET_PC[31:15] || ea[31:15] == T_HEAP[31:15] ||
              ea[31:12] == T_STACK[31:12])
            mem[ea[31:2]] = b;
        end
        default: ;
      endcase
      // The previous instruction's load lands after this one read its operands.
      if (ld_pend) wr(ld_reg, ld_val);
      ld_pend = 0;
      if (is_load) begin ld_pend = 1; ld_reg = dst; ld_val = res; end
      else if (writes) wr(dst, res);
      nxt = taken ? tgt : npc + 4;
      pc  = npc;
      npc = nxt;
      executed++;
    endfunction

    // Run until the instruction at stop_pc is about to execute.
    function void run_to(input logic [31:0] stop_pc, input int max_steps);
      for (int i = 0; i < max_steps && pc != stop_pc; i++) step();
      if (ld_pend) begin wr(ld_reg, ld_val); ld_pend = 0; end
    endfunction
  endclass

  // ------------------------------------------------------------ generator
  class prog_gen;
    logic [31:0] code [$];
    logic [31:0] halt_pc;

    // A random register the body may write: mostly the low eight, so that
    // dependences (bypass, load delay slot) are frequent.
    function int wreg();
      int r;
      if ($urandom_range(0, 3) != 0) r = int'($urandom_range(1, 8));
      else begin
        r = int'($urandom_range(1, 27));
        if (r >= 27) r = 31;
      end
      return r;
    endfunction

    function int rreg();
      return ($urandom_range(0, 9) == 0) ? 0 : wreg();
    endfunction

    function logic [31:0] alu_or_mem();
      int k;
      logic [15:0] off;
      logic [5:0] fns [14] = '{6'b000000, 6'b000010, 6'b000011, 6'b000100, 6'b000110,
                               6'b000111, 6'b100001, 6'b100011, 6'b100100, 6'b100101,
                               6'b100110, 6'b100111, 6'b101010, 6'b101011};
      logic [5:0] ops [7] = '{6'b001001, 6'b001010, 6'b001011, 6'b001100, 6'b001101,
                              6'b001110, 6'b001111};
      k = int'($urandom_range(0, 9));
      off = 16'($urandom_range(0, 63) * 4);
      if (k < 4)
        return asm_r(fns[$urandom_range(0, 13)], rreg(), rreg(), wreg(), int'($urandom_range(0, 31)));
      else if (k < 7) begin
        logic [5:0] o;
        o = ops[$urandom_range(0, 6)];
        return asm_i(o, (o == 6'b001111) ? 0 : rreg(), wreg(), 16'($urandom));
      end else if (k < 9)
        return asm_i(6'b100011, $urandom_range(0, 1) ? 28 : 29, wreg(), off);        // LW
      else
        return asm_i(6'b101011, $urandom_range(0, 1) ? 28 : 29, rreg(), off);        // SW
    endfunction

    // Build a program of about n chunks; addr(i) = T_RESET_PC + 4*i.
    function void build(input int n);
      int nchunks;
      int start [$];
      typedef enum {C_ONE, C_BR, C_J, C_JAL, C_JR, C_JALR, C_IMW} ck_t;
      ck_t kind [$];
      int  dlen [$];
      int  rsel [$];
      code.delete();
      // Prologue: base pointers and random values in every other register.
      code.push_back(asm_i(6'b001111, 0, 27, T_IMEM_WR[31:16]));
      code.push_back(asm_i(6'b001101, 27, 27, T_IMEM_WR[15:0]));
      code.push_back(asm_i(6'b001111, 0, 28, T_HEAP[31:16]));
      code.push_back(asm_i(6'b001101, 28, 28, T_HEAP[15:0]));
      code.push_back(asm_i(6'b001111, 0, 29, T_STACK[31:16]));
      code.push_back(asm_i(6'b001101, 29, 29, T_STACK[15:0]));
      for (int r = 1; r < 32; r++) begin
        if (r >= 27 && r <= 29) continue;
        code.push_back(asm_i(6'b001111, 0, r, 16'($urandom)));
        code.push_back(asm_i(6'b001101, r, r, 16'($urandom)));
      end
      // Chunk plan.
      nchunks = n;
      for (int c = 0; c < nchunks; c++) begin
        int k;
        k = int'($urandom_range(0, 19));
        kind.push_back(k < 11 ? C_ONE : k < 15 ? C_BR : k == 15 ? C_J : k == 16 ? C_JAL :
                       k == 17 ? C_JR : k == 18 ? C_JALR : C_IMW);
        dlen.push_back(int'($urandom_range(1, 3)));
        rsel.push_back(int'($urandom_range(1, 8)));
      end
      // Chunk start indices (sizes known in advance).
      begin
        int idx;
        idx = code.size();
        for (int c = 0; c < nchunks; c++) begin
          start.push_back(idx);
          case (kind[c])
            C_ONE: idx += 1;
            C_BR, C_J, C_JAL, C_IMW: idx += 2;
            C_JR: idx += 4;
            default: idx += 4;
          endcase
        end
        start.push_back(idx);   // halt loop
        halt_pc = T_RESET_PC + 32'(idx * 4);
      end
      for (int c = 0; c < nchunks; c++) begin
        int tc;
        logic [31:0] here, taddr;
        logic [15:0] boff;
        tc = c + 1 + dlen[c];
        if (tc > nchunks) tc = nchunks;
        here  = T_RESET_PC + 32'(start[c] * 4);
        taddr = T_RESET_PC + 32'(start[tc] * 4);
        case (kind[c])
          C_ONE: code.push_back(alu_or_mem());
          C_BR: begin
            int sel;
            boff = 16'((taddr - here - 4) >> 2);
            sel = int'($urandom_range(0, 5));
            case (sel)
              0: code.push_back(asm_i(6'b000100, rreg(), rreg(), boff));
              1: code.push_back(asm_i(6'b000101, rreg(), rreg(), boff));
              2: code.push_back(asm_i(6'b000110, rreg(), 0, boff));
              3: code.push_back(asm_i(6'b000111, rreg(), 0, boff));
              4: code.push_back(asm_i(6'b000001, rreg(), 0, boff));
              default: code.push_back(asm_i(6'b000001, rreg(), 1, boff));
            endcase
            code.push_back(alu_or_mem());
          end
          C_J:   begin code.push_back(asm_j(6'b000010, taddr)); code.push_back(alu_or_mem()); end
          C_JAL: begin code.push_back(asm_j(6'b000011, taddr)); code.push_back(alu_or_mem()); end
          C_IMW: begin
            // store a register into the upper half of instruction memory
            code.push_back(asm_i(6'b101011, 27, rreg(), 16'($urandom_range(0, 63) * 4)));
            code.push_back(alu_or_mem());
          end
          C_JR: begin
            code.push_back(asm_i(6'b001111, 0, rsel[c], taddr[31:16]));
            code.push_back(asm_i(6'b001101, rsel[c], rsel[c], taddr[15:0]));
            code.push_back(asm_r(6'b001000, rsel[c], 0, 0, 0));
            code.push_back(alu_or_mem());
          end
          default: begin   // JALR
            code.push_back(asm_i(6'b001111, 0, rsel[c], taddr[31:16]));
            code.push_back(asm_i(6'b001101, rsel[c], rsel[c], taddr[15:0]));
            code.push_back(asm_r(6'b001001, rsel[c], 0, wreg(), 0));
            code.push_back(alu_or_mem());
          end
        endcase
      end
      // halt: j halt; nop
      code.push_back(asm_j(6'b000010, halt_pc));
      code.push_back(32'h0000_0000);
    endfunction
  endclass

endpackage
