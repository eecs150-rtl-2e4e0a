// mips150_cpu: a three-stage, one-instruction-per-cycle MIPS processor for
// the MIPS150 integer subset (no floating point, traps, coprocessors,
// misaligned accesses, branch-and-link or branch-likely instructions).
//
// Pipeline, in clock edges (edge n starts a stage):
//   I  edge 1: the PC register takes its new value and drives the
//      instruction memory's synchronous fetch port.
//   X  edge 2: the fetched word arrives. It is decoded, rs/rt are read from
//      the register file (with a bypass from M), the ALU runs, branches and
//      jumps resolve, and a load or store drives the memory port so that
//      the data memory takes it on edge 3.
//   M  edge 3: the data memory's registered read data arrives; the
//      write-back value (ALU result, loaded word or PC + 8 link) is chosen
//      and written into the register file on edge 4.
// Hazards never stall the pipeline (CPI = 1):
//   * control: a branch or jump resolves in X while the next instruction
//     is being fetched, so that instruction is the architected delay slot
//     and always executes; the PC after it is the target.
//   * data: an ALU or link result in M is bypassed to the X operands of the
//     next instruction. A loaded word is not bypassed: the instruction right
//     after a load is its architected load delay slot and reads the
//     register's old value; the one after that reads the loaded value from
//     the register file, which is written on the edge that starts its X.
// Ports: Clock, Reset and the Memory* port follow the processor interface of
// the specification; InstrAddress/InstrData are the dedicated fetch port
// that the specification requires but does not name. MemoryAddress,
// MemoryRead, MemoryWrite and MemoryWriteData are combinational outputs of
// X; MemoryReadData must hold the read word during M. Reset is synchronous
// and active high; the first instruction fetched after it is at RESET_PC
// (0x00400000, the start of user code). The stage split follows the
// specification's three-stage picture; the bypass, the placement of the
// branch resolution and the reset address are this design's choices.
module mips150_cpu
  import mips150_pkg::*;
#(
  parameter logic [31:0] RESET_ADDR = RESET_PC
) (
  input  logic        Clock,
  input  logic        Reset,
  // instruction fetch port
  output logic [31:0] InstrAddress,
  input  logic [31:0] InstrData,
  // memory / I/O port
  output logic [31:0] MemoryAddress,
  input  logic [31:0] MemoryReadData,
  output logic        MemoryRead,
  output logic [31:0] MemoryWriteData,
  output logic        MemoryWrite
);
  // ------------------------------------------------------------- I stage
  logic [31:0] pc_i, pc_next;
  assign InstrAddress = pc_i;

  // ------------------------------------------------------------- X stage
  logic        x_valid;
  logic [31:0] pc_x, instr_x;
  ctrl_t       ctrl_dec, ctrl_x;

  assign instr_x = InstrData;
  decoder u_dec (.instr(instr_x), .ctrl(ctrl_dec));

  // An empty X slot (just after reset) executes as a no-op.
  always_comb begin
    ctrl_x = ctrl_dec;
    if (!x_valid) begin
      ctrl_x.reg_write = 1'b0;
      ctrl_x.mem_read  = 1'b0;
      ctrl_x.mem_write = 1'b0;
      ctrl_x.br        = BR_NONE;
    end
  end

  // ------------------------------------------------------------- M stage
  logic        m_reg_write;
  logic [4:0]  m_dest;
  wb_t         m_wb_sel;
  logic [31:0] m_result;
  logic [31:0] wb_data;

  // -------------------------------------------------------- register file
  logic [4:0]  rs, rt;
  logic [31:0] rf_rs, rf_rt;
  assign rs = instr_x[25:21];
  assign rt = instr_x[20:16];

  regfile #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk   (Clock),
    .raddr1(rs), .rdata1(rf_rs),
    .raddr2(rt), .rdata2(rf_rt),
    .we    (m_reg_write),
    .waddr (m_dest),
    .wdata (wb_data)
  );

  // M-to-X bypass of ALU and link results (never of a loaded word).
  logic        byp_ok, byp_rs, byp_rt;
  logic [31:0] rs_val, rt_val;
  assign byp_ok = m_reg_write && m_wb_sel != WB_MEM;
  assign byp_rs = byp_ok && m_dest == rs;
  assign byp_rt = byp_ok && m_dest == rt;
  assign rs_val = byp_rs ? m_result : rf_rs;
  assign rt_val = byp_rt ? m_result : rf_rt;

  // ------------------------------------------------------------ execute
  logic [31:0] alu_a, alu_b, alu_y;
  always_comb begin
    unique case (ctrl_x.srca)
      SRCA_SHAMT: alu_a = {27'b0, instr_x[10:6]};
      default:    alu_a = rs_val;
    endcase
    unique case (ctrl_x.srcb)
      SRCB_SIMM: alu_b = {{16{instr_x[15]}}, instr_x[15:0]};
      SRCB_ZIMM: alu_b = {16'h0000, instr_x[15:0]};
      default:   alu_b = rt_val;
    endcase
  end

  alu u_alu (.op(ctrl_x.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  logic        br_taken;
  logic [31:0] br_target, link;
  branch_unit u_br (
    .br(ctrl_x.br), .pc(pc_x), .instr(instr_x),
    .rs_val(rs_val), .rt_val(rt_val),
    .taken(br_taken), .target(br_target), .link(link)
  );

  // The instruction fetched while a branch is in X is its delay slot; the
  // next fetch goes to the target.
  assign pc_next = br_taken ? br_target : pc_i + 32'd4;

  assign MemoryAddress   = alu_y;
  assign MemoryRead      = ctrl_x.mem_read;
  assign MemoryWrite     = ctrl_x.mem_write;
  assign MemoryWriteData = rt_val;

  // --------------------------------------------------- pipeline registers
  always_ff @(posedge Clock) begin
    if (Reset) begin
      pc_i        <= RESET_ADDR;
      pc_x        <= RESET_ADDR;
      x_valid     <= 1'b0;
      m_reg_write <= 1'b0;
      m_dest      <= 5'd0;
      m_wb_sel    <= WB_ALU;
      m_result    <= 32'h0;
    end else begin
      pc_i        <= pc_next;
      pc_x        <= pc_i;
      x_valid     <= 1'b1;
      m_reg_write <= ctrl_x.reg_write;
      m_dest      <= ctrl_x.dest;
      m_wb_sel    <= ctrl_x.wb_sel;
      m_result    <= (ctrl_x.wb_sel == WB_LINK) ? link : alu_y;
    end
  end

  // ----------------------------------------------------------- write-back
  assign wb_data = (m_wb_sel == WB_MEM) ? MemoryReadData : m_result;

  a_no_r0_write: assert property (@(posedge Clock) disable iff (Reset)
    m_reg_write |-> m_dest != 5'd0)
    else $error("register file write to r0");
endmodule
