// tb_mips150_system: end-to-end test of the whole MIPS150 system at its
// default sizes (32 KiB instruction memory, 32 KiB heap, 4 KiB stack).
//
// Phase 1, memory-mapped I/O: a directed program polls the serial
// registers. A byte offered on the receive stream must appear in
// ControlInReg/DataInReg, reading DataInReg must empty the buffer, a store
// to DataOutReg must leave on the transmit stream (held while tx_ready is
// low, with ControlOutReg showing busy), a store to the read-only
// ControlInReg must change nothing, and a load from the write-only
// instruction memory must return zero.
// Phase 2, programs: random programs (see mips_tb_pkg) are placed into the
// instruction memory and run against the reference model; registers, the
// first 64 words of heap and stack, and the instruction-memory words the
// programs store into are compared, and the halt loop must be reached after
// exactly as many cycles as instructions were executed (CPI = 1).
// Every mechanism (bypass, load delay slot, taken and untaken branch, jump,
// link, instruction-memory store, heap and stack access, serial read and
// write, receive and transmit handshakes, dropped read-only write) is
// counted and must occur at least once. A watchdog ends the run.
`timescale 1ns/1ps
module tb_mips150_system;
  import mips_tb_pkg::*;
  import mips150_pkg::*;

  localparam int NPROG   = 8;
  localparam int NCHUNKS = 300;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_ready, tx_valid, tx_ready;

  mips150_system dut (
    .Clock(clk), .Reset(reset),
    .rx_data(rx_data), .rx_valid(rx_valid), .rx_ready(rx_ready),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready)
  );

  int checks = 0, failures = 0;
  int n_bypass = 0, n_ld_slot = 0, n_taken = 0, n_untaken = 0, n_jump = 0, n_link = 0;
  int n_imem_wr = 0, n_heap = 0, n_stack = 0, n_ser_rd = 0, n_ser_wr = 0;
  int n_rx = 0, n_tx = 0, n_ro_wr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (!reset) begin
    logic cond;
    cond = dut.u_cpu.ctrl_x.br inside {BR_BEQ, BR_BNE, BR_BLEZ, BR_BGTZ, BR_BLTZ, BR_BGEZ};
    if ((dut.u_cpu.byp_rs && dut.u_cpu.rs != 0) || (dut.u_cpu.byp_rt && dut.u_cpu.rt != 0)) n_bypass++;
    if (dut.u_cpu.m_reg_write && dut.u_cpu.m_wb_sel == WB_MEM &&
        (dut.u_cpu.m_dest == dut.u_cpu.rs || dut.u_cpu.m_dest == dut.u_cpu.rt)) n_ld_slot++;
    if (cond && dut.u_cpu.br_taken)  n_taken++;
    if (cond && !dut.u_cpu.br_taken) n_untaken++;
    if (dut.u_cpu.ctrl_x.br inside {BR_J, BR_JR}) n_jump++;
    if (dut.u_cpu.ctrl_x.wb_sel == WB_LINK && dut.u_cpu.ctrl_x.reg_write) n_link++;
    if (dut.imem_we)  n_imem_wr++;
    if (dut.heap_en)  n_heap++;
    if (dut.stack_en) n_stack++;
    if (dut.ser_sel && dut.mem_read)  n_ser_rd++;
    if (dut.ser_sel && dut.mem_write) n_ser_wr++;
    if (dut.ser_sel && dut.mem_write && dut.ser_addr != 2'd3) n_ro_wr++;
    if (rx_valid && rx_ready) n_rx++;
    if (tx_valid && tx_ready) n_tx++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int IMEM_WR_IDX = int'((T_IMEM_WR - T_RESET_PC) >> 2);

  task automatic load_code(input logic [31:0] code [$]);
    for (int i = 0; i < code.size(); i++) dut.u_imem.mem[i] = code[i];
  endtask

  task automatic do_reset();
    reset = 1;
    repeat (3) @(posedge clk);
    reset <= 0;
  endtask

  // ------------------------------------------------------ phase 1: serial
  task automatic serial_test();
    logic [31:0] code [$];
    logic [31:0] halt;
    bit got_tx;
    code = {};
    code.push_back(asm_i(6'b001111, 0, 1, 16'hffff));       // lui  r1, 0xffff
    code.push_back(asm_i(6'b100011, 1, 2, 16'h0000));       // lw   r2, 0(r1)   ControlIn
    code.push_back(asm_i(6'b100011, 1, 3, 16'h0004));       // lw   r3, 4(r1)   DataIn
    code.push_back(32'h0);                                  // nop  (load delay slot)
    code.push_back(asm_i(6'b100011, 1, 4, 16'h0000));       // lw   r4, 0(r1)   ControlIn
    code.push_back(asm_i(6'b100011, 1, 5, 16'h0008));       // lw   r5, 8(r1)   ControlOut
    code.push_back(asm_i(6'b001001, 3, 6, 16'h0001));       // addiu r6, r3, 1
    code.push_back(asm_i(6'b101011, 1, 6, 16'h000c));       // sw   r6, 12(r1)  DataOut
    code.push_back(asm_i(6'b100011, 1, 7, 16'h0008));       // lw   r7, 8(r1)   ControlOut
    code.push_back(asm_i(6'b101011, 1, 6, 16'h0000));       // sw   r6, 0(r1)   read-only
    code.push_back(asm_i(6'b001111, 0, 8, 16'h0040));       // lui  r8, 0x0040
    code.push_back(asm_i(6'b100011, 8, 9, 16'h0000));       // lw   r9, 0(r8)   write-only
    code.push_back(asm_i(6'b100011, 1, 10, 16'h0000));      // lw   r10, 0(r1)  ControlIn
    code.push_back(32'h0);
    halt = T_RESET_PC + 32'(code.size() * 4);
    code.push_back(asm_j(6'b000010, halt));
    code.push_back(32'h0);
    load_code(code);
    rx_data = 8'h5a; rx_valid = 1'b1; tx_ready = 1'b0;
    do_reset();
    got_tx = 0;
    for (int c = 0; c < 60; c++) begin
      @(posedge clk);
      #1;
      if (rx_valid && !rx_ready) rx_valid = 1'b0;   // byte taken on the last edge
      if (c == 30) tx_ready = 1'b1;
      if (tx_valid && tx_ready) begin
        got_tx = 1;
        check(tx_data == 8'h5b, $sformatf("transmitted byte %h, expected 5b", tx_data));
      end
    end
    check(got_tx, "no byte transmitted");
    check(dut.u_cpu.u_rf.regs[2] == 32'h1,  $sformatf("ControlIn with byte waiting = %h", dut.u_cpu.u_rf.regs[2]));
    check(dut.u_cpu.u_rf.regs[3] == 32'h5a, $sformatf("DataIn = %h", dut.u_cpu.u_rf.regs[3]));
    check(dut.u_cpu.u_rf.regs[4] == 32'h0,  $sformatf("ControlIn after read = %h", dut.u_cpu.u_rf.regs[4]));
    check(dut.u_cpu.u_rf.regs[5] == 32'h1,  $sformatf("ControlOut idle = %h", dut.u_cpu.u_rf.regs[5]));
    check(dut.u_cpu.u_rf.regs[7] == 32'h0,  $sformatf("ControlOut busy = %h", dut.u_cpu.u_rf.regs[7]));
    check(dut.u_cpu.u_rf.regs[9] == 32'h0,  $sformatf("instruction memory load = %h", dut.u_cpu.u_rf.regs[9]));
    check(dut.u_cpu.u_rf.regs[10] == 32'h0, $sformatf("ControlIn after read-only store = %h", dut.u_cpu.u_rf.regs[10]));
    check(!tx_valid, "transmit buffer not emptied");
  endtask

  initial begin
    prog_gen g;
    mips_iss iss;
    rx_valid = 0; rx_data = 0; tx_ready = 1;
    serial_test();
    rx_valid = 0; tx_ready = 1;
    g = new();
    for (int p = 0; p < NPROG; p++) begin
      int cyc, halt_cyc;
      g.build(NCHUNKS);
      iss = new();
      load_code(g.code);
      for (int i = 0; i < g.code.size(); i++) iss.mem[30'((T_RESET_PC >> 2) + i)] = g.code[i];
      for (int i = 0; i < 64; i++) begin
        logic [31:0] v1, v2;
        v1 = $urandom; v2 = $urandom;
        dut.u_heap.mem[i]  = v1; iss.mem[30'((T_HEAP >> 2) + i)]  = v1;
        dut.u_stack.mem[i] = v2; iss.mem[30'((T_STACK >> 2) + i)] = v2;
        dut.u_imem.mem[IMEM_WR_IDX + i] = 32'h0;
        iss.mem[30'((T_IMEM_WR >> 2) + i)] = 32'h0;
      end
      iss.run_to(g.halt_pc, 100000);
      do_reset();
      @(posedge clk);
      cyc = 0; halt_cyc = -1;
      while (cyc < 20000 && halt_cyc < 0) begin
        #1;
        if (dut.u_cpu.x_valid && dut.u_cpu.pc_x == g.halt_pc) halt_cyc = cyc;
        @(posedge clk);
        cyc++;
      end
      repeat (3) @(posedge clk);
      #1;
      check(halt_cyc == int'(iss.executed),
            $sformatf("prog %0d: halt at cycle %0d, reference executed %0d", p, halt_cyc, iss.executed));
      for (int r = 1; r < 32; r++)
        check(dut.u_cpu.u_rf.regs[r] == iss.regs[r],
              $sformatf("prog %0d: r%0d = %h, expected %h", p, r, dut.u_cpu.u_rf.regs[r], iss.regs[r]));
      for (int i = 0; i < 64; i++) begin
        check(dut.u_heap.mem[i] == iss.mem[30'((T_HEAP >> 2) + i)], $sformatf("prog %0d: heap word %0d", p, i));
        check(dut.u_stack.mem[i] == iss.mem[30'((T_STACK >> 2) + i)], $sformatf("prog %0d: stack word %0d", p, i));
        check(dut.u_imem.mem[IMEM_WR_IDX + i] == iss.mem[30'((T_IMEM_WR >> 2) + i)],
              $sformatf("prog %0d: instruction memory word %0d", p, IMEM_WR_IDX + i));
      end
    end
    $display("mechanisms: bypass=%0d load_delay_slot=%0d taken=%0d untaken=%0d jump=%0d link=%0d",
             n_bypass, n_ld_slot, n_taken, n_untaken, n_jump, n_link);
    $display("            imem_write=%0d heap=%0d stack=%0d serial_read=%0d serial_write=%0d rx=%0d tx=%0d readonly_write=%0d",
             n_imem_wr, n_heap, n_stack, n_ser_rd, n_ser_wr, n_rx, n_tx, n_ro_wr);
    check(n_bypass > 0, "no bypass");
    check(n_ld_slot > 0, "no load delay slot hazard");
    check(n_taken > 0, "no taken branch");
    check(n_untaken > 0, "no untaken branch");
    check(n_jump > 0, "no jump");
    check(n_link > 0, "no link");
    check(n_imem_wr > 0, "no instruction-memory store");
    check(n_heap > 0, "no heap access");
    check(n_stack > 0, "no stack access");
    check(n_ser_rd > 0, "no serial read");
    check(n_ser_wr > 0, "no serial write");
    check(n_rx > 0, "no receive handshake");
    check(n_tx > 0, "no transmit handshake");
    check(n_ro_wr > 0, "no write to a read-only register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
