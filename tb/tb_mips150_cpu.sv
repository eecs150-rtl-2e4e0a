// tb_mips150_cpu: self-checking test of the three-stage processor alone.
//
// The processor is attached to a testbench memory that behaves like the
// system's: a synchronous-read instruction port, and a data port whose
// reads are registered on the edge that starts M. Random programs from
// mips_tb_pkg::prog_gen (ALU, immediate, shift, load/store, all branch and
// jump kinds, each with its delay slot) are run on the processor and on the
// reference model mips_iss. Checked per program:
//   * all 31 registers and the first 64 words of heap and stack at the end;
//   * CPI = 1: the halt loop reaches X exactly as many cycles after the
//     first instruction as the reference model executed instructions.
// Mechanisms counted (each must occur): M-to-X bypass, load delay slot
// (an instruction reading the register a load in M is writing), taken and
// untaken branches, jumps, links. A watchdog ends the run.
`timescale 1ns/1ps
module tb_mips150_cpu;
  import mips_tb_pkg::*;
  import mips150_pkg::*;

  localparam int NPROG   = 12;
  localparam int NCHUNKS = 300;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic [31:0] iaddr, idata, maddr, mrdata, mwdata;
  logic        mread, mwrite;

  mips150_cpu dut (
    .Clock(clk), .Reset(reset),
    .InstrAddress(iaddr), .InstrData(idata),
    .MemoryAddress(maddr), .MemoryReadData(mrdata), .MemoryRead(mread),
    .MemoryWriteData(mwdata), .MemoryWrite(mwrite)
  );

  // Testbench memory: one word store shared by code and data.
  logic [31:0] mem [logic [29:0]];
  // Reads are taken before the write of the same edge (read-first).
  always @(posedge clk) begin
    idata <= mem.exists(iaddr[31:2]) ? mem[iaddr[31:2]] : 32'h0;
    if (mread)  mrdata <= mem.exists(maddr[31:2]) ? mem[maddr[31:2]] : 32'h0;
    if (mwrite) mem[maddr[31:2]] = mwdata;
  end

  int checks = 0, failures = 0;
  int n_bypass = 0, n_ld_slot = 0, n_taken = 0, n_untaken = 0, n_jump = 0, n_link = 0;
  int n_load = 0, n_store = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters.
  always @(posedge clk) if (!reset && dut.x_valid) begin
    logic cond;
    cond = dut.ctrl_x.br inside {BR_BEQ, BR_BNE, BR_BLEZ, BR_BGTZ, BR_BLTZ, BR_BGEZ};
    if ((dut.byp_rs && dut.rs != 0) || (dut.byp_rt && dut.rt != 0)) n_bypass++;
    if (dut.m_reg_write && dut.m_wb_sel == WB_MEM && (dut.m_dest == dut.rs || dut.m_dest == dut.rt))
      n_ld_slot++;
    if (cond && dut.br_taken)  n_taken++;
    if (cond && !dut.br_taken) n_untaken++;
    if (dut.ctrl_x.br inside {BR_J, BR_JR}) n_jump++;
    if (dut.ctrl_x.wb_sel == WB_LINK && dut.ctrl_x.reg_write) n_link++;
    if (mread)  n_load++;
    if (mwrite) n_store++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_gen g;
    mips_iss iss;
    g = new();
    for (int p = 0; p < NPROG; p++) begin
      int cyc, halt_cyc;
      g.build(NCHUNKS);
      iss = new();
      mem.delete();
      for (int i = 0; i < g.code.size(); i++) begin
        mem[30'((T_RESET_PC >> 2) + i)] = g.code[i];
        iss.mem[30'((T_RESET_PC >> 2) + i)] = g.code[i];
      end
      for (int i = 0; i < 64; i++) begin
        logic [31:0] v1, v2;
        v1 = $urandom; v2 = $urandom;
        mem[30'((T_HEAP >> 2) + i)] = v1;  iss.mem[30'((T_HEAP >> 2) + i)] = v1;
        mem[30'((T_STACK >> 2) + i)] = v2; iss.mem[30'((T_STACK >> 2) + i)] = v2;
      end
      iss.run_to(g.halt_pc, 100000);

      reset = 1;
      repeat (3) @(posedge clk);
      reset <= 0;
      // cycle 0 is the first cycle with an instruction in X
      @(posedge clk);
      cyc = 0; halt_cyc = -1;
      while (cyc < 20000 && halt_cyc < 0) begin
        #1;
        if (dut.x_valid && dut.pc_x == g.halt_pc) halt_cyc = cyc;
        @(posedge clk);
        cyc++;
      end
      repeat (3) @(posedge clk);
      #1;
      check(halt_cyc == int'(iss.executed),
            $sformatf("prog %0d: halt reached at cycle %0d, reference executed %0d", p, halt_cyc, iss.executed));
      for (int r = 1; r < 32; r++)
        check(dut.u_rf.regs[r] == iss.regs[r],
              $sformatf("prog %0d: r%0d = %h, expected %h", p, r, dut.u_rf.regs[r], iss.regs[r]));
      for (int i = 0; i < 64; i++) begin
        check(mem[30'((T_HEAP >> 2) + i)] == iss.mem[30'((T_HEAP >> 2) + i)],
              $sformatf("prog %0d: heap word %0d", p, i));
        check(mem[30'((T_STACK >> 2) + i)] == iss.mem[30'((T_STACK >> 2) + i)],
              $sformatf("prog %0d: stack word %0d", p, i));
      end
    end
    $display("mechanisms: bypass=%0d load_delay_slot=%0d taken=%0d untaken=%0d jump=%0d link=%0d load=%0d store=%0d",
             n_bypass, n_ld_slot, n_taken, n_untaken, n_jump, n_link, n_load, n_store);
    check(n_bypass > 0, "no bypass");
    check(n_ld_slot > 0, "no load delay slot hazard");
    check(n_taken > 0, "no taken branch");
    check(n_untaken > 0, "no untaken branch");
    check(n_jump > 0, "no jump");
    check(n_link > 0, "no link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
