// tb_mips150_programs: small hand-written programs on the full system at
// its default sizes, the kind of code the processor is meant to run.
//   A  loops and calls: fills 20 heap words in a loop whose branch has a
//      useful delay slot, sums them back (load delay slot filled with an
//      independent instruction), then calls a function that saves its
//      return address on the stack, calls a second function and returns.
//      Checked against the reference model and against hand-computed
//      values (sum 190, result 381, saved return address on the stack).
//   B  serial echo: polls ControlInReg, reads DataInReg, polls
//      ControlOutReg and writes DataOutReg, for 16 bytes delivered with
//      random gaps and taken with random back-pressure. Every byte must come
//      back unchanged and in order.
`timescale 1ns/1ps
module tb_mips150_programs;
  import mips_tb_pkg::*;

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
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // branch offset from instruction index 'from' to index 'to'
  function automatic logic [15:0] bo(input int from, input int to);
    return 16'(to - from - 1);
  endfunction
  function automatic logic [31:0] at(input int idx);
    return T_RESET_PC + 32'(idx * 4);
  endfunction

  localparam logic [5:0] LUI = 6'b001111, ORI = 6'b001101, ADDIU = 6'b001001, SW = 6'b101011,
                         LW = 6'b100011, BNE = 6'b000101, BEQ = 6'b000100, J = 6'b000010,
                         JAL = 6'b000011;
  localparam logic [5:0] ADDU = 6'b100001, SLL = 6'b000000, JR = 6'b001000;

  task automatic run_reset();
    reset = 1;
    repeat (3) @(posedge clk);
    reset <= 0;
  endtask

  logic [7:0] rx_q [$], got [$];
  always @(posedge clk) begin
    if (rx_valid && rx_ready) void'(rx_q.pop_front());
    if (tx_valid && tx_ready) got.push_back(tx_data);
  end
  always @(negedge clk) begin
    rx_valid <= rx_q.size() > 0 && $urandom_range(0, 7) == 0;
    rx_data  <= rx_q.size() > 0 ? rx_q[0] : 8'h00;
    tx_ready <= $urandom_range(0, 3) == 0;
  end

  initial begin
    logic [31:0] p [$];
    mips_iss iss;
    logic [7:0] sent [$];
    int used [11] = '{1, 2, 3, 4, 5, 6, 7, 8, 28, 29, 31};

    // ------------------------------------------------------------ program A
    p = {};
    p.push_back(asm_i(LUI, 0, 28, 16'h1001));            // 0
    p.push_back(asm_i(ORI, 28, 28, 16'h0000));           // 1
    p.push_back(asm_i(ADDIU, 0, 1, 16'd0));              // 2  i = 0
    p.push_back(asm_i(ADDIU, 0, 2, 16'd20));             // 3  n = 20
    p.push_back(asm_r(ADDU, 28, 0, 3, 0));               // 4  q = heap
    p.push_back(asm_i(SW, 3, 1, 16'd0));                 // 5  loop1: *q = i
    p.push_back(asm_i(ADDIU, 1, 1, 16'd1));              // 6  i++
    p.push_back(asm_i(BNE, 1, 2, bo(7, 5)));             // 7  bne i, n, loop1
    p.push_back(asm_i(ADDIU, 3, 3, 16'd4));              // 8  (delay slot) q++
    p.push_back(asm_i(ADDIU, 0, 4, 16'd0));              // 9  sum = 0
    p.push_back(asm_r(ADDU, 28, 0, 3, 0));               // 10 q = heap
    p.push_back(asm_i(ADDIU, 0, 1, 16'd0));              // 11 i = 0
    p.push_back(asm_i(LW, 3, 5, 16'd0));                 // 12 loop2: t = *q
    p.push_back(asm_i(ADDIU, 3, 3, 16'd4));              // 13 (load delay slot) q++
    p.push_back(asm_r(ADDU, 4, 5, 4, 0));                // 14 sum += t
    p.push_back(asm_i(ADDIU, 1, 1, 16'd1));              // 15 i++
    p.push_back(asm_i(BNE, 1, 2, bo(16, 12)));           // 16 bne i, n, loop2
    p.push_back(32'h0);                                  // 17 nop
    p.push_back(asm_i(LUI, 0, 29, 16'h7fff));            // 18 sp
    p.push_back(asm_i(ORI, 29, 29, 16'hfff0));           // 19
    p.push_back(asm_r(ADDU, 4, 0, 7, 0));                // 20 arg = sum
    p.push_back(asm_j(JAL, at(27)));                     // 21 jal f
    p.push_back(32'h0);                                  // 22 nop
    p.push_back(asm_r(ADDU, 8, 0, 6, 0));                // 23 r6 = result
    p.push_back(asm_i(SW, 28, 6, 16'h0100));             // 24 heap[64] = r6
    p.push_back(asm_j(J, at(25)));                       // 25 halt: j halt
    p.push_back(32'h0);                                  // 26 nop
    p.push_back(asm_i(ADDIU, 29, 29, 16'hfffc));         // 27 f: sp -= 4
    p.push_back(asm_i(SW, 29, 31, 16'd0));               // 28 push ra
    p.push_back(asm_j(JAL, at(35)));                     // 29 jal g
    p.push_back(32'h0);                                  // 30 nop
    p.push_back(asm_i(LW, 29, 31, 16'd0));               // 31 pop ra
    p.push_back(asm_i(ADDIU, 29, 29, 16'd4));            // 32 (load delay slot) sp += 4
    p.push_back(asm_r(JR, 31, 0, 0, 0));                 // 33 return
    p.push_back(asm_i(ADDIU, 8, 8, 16'd1));              // 34 (delay slot) result + 1
    p.push_back(asm_r(SLL, 0, 7, 8, 1));                 // 35 g: result = arg << 1
    p.push_back(asm_r(JR, 31, 0, 0, 0));                 // 36 return
    p.push_back(32'h0);                                  // 37 nop

    iss = new();
    foreach (p[i]) begin
      dut.u_imem.mem[i] = p[i];
      iss.mem[30'((T_RESET_PC >> 2) + i)] = p[i];
    end
    iss.run_to(at(25), 10000);
    rx_q = {};
    run_reset();
    begin
      int cyc;
      cyc = 0;
      @(posedge clk);
      while (!(dut.u_cpu.x_valid && dut.u_cpu.pc_x == at(25)) && cyc < 5000) begin
        @(posedge clk); #1; cyc++;
      end
      chk(cyc == int'(iss.executed), $sformatf("program A: %0d cycles for %0d instructions", cyc, iss.executed));
    end
    repeat (3) @(posedge clk);
    #1;
    // registers the program writes (the others are never initialised)
    foreach (used[k]) begin
      int r;
      r = used[k];
      chk(dut.u_cpu.u_rf.regs[r] == iss.regs[r], $sformatf("program A: r%0d = %h, expected %h", r, dut.u_cpu.u_rf.regs[r], iss.regs[r]));
    end
    chk(dut.u_cpu.u_rf.regs[4] == 32'd190, "program A: sum of 0..19");
    chk(dut.u_cpu.u_rf.regs[6] == 32'd381, "program A: f(190) = 2*190 + 1");
    chk(dut.u_heap.mem[64] == 32'd381, "program A: result stored to heap");
    chk(dut.u_cpu.u_rf.regs[29] == 32'h7fff_fff0, "program A: stack pointer restored");
    chk(dut.u_stack.mem[1019] == at(23), "program A: return address saved on the stack");
    for (int i = 0; i < 20; i++) chk(dut.u_heap.mem[i] == 32'(i), $sformatf("program A: heap[%0d]", i));

    // ------------------------------------------------------------ program B
    p = {};
    p.push_back(asm_i(LUI, 0, 1, 16'hffff));             // 0
    p.push_back(asm_i(ADDIU, 0, 5, 16'd16));             // 1  count
    p.push_back(asm_i(LW, 1, 2, 16'h0000));              // 2  poll_in: ControlIn
    p.push_back(32'h0);                                  // 3
    p.push_back(asm_i(BEQ, 2, 0, bo(4, 2)));             // 4
    p.push_back(32'h0);                                  // 5
    p.push_back(asm_i(LW, 1, 3, 16'h0004));              // 6  DataIn
    p.push_back(asm_i(LW, 1, 4, 16'h0008));              // 7  poll_out: ControlOut
    p.push_back(32'h0);                                  // 8
    p.push_back(asm_i(BEQ, 4, 0, bo(9, 7)));             // 9
    p.push_back(32'h0);                                  // 10
    p.push_back(asm_i(SW, 1, 3, 16'h000c));              // 11 DataOut
    p.push_back(asm_i(ADDIU, 5, 5, 16'hffff));           // 12 count--
    p.push_back(asm_i(BNE, 5, 0, bo(13, 2)));            // 13
    p.push_back(32'h0);                                  // 14
    p.push_back(asm_j(J, at(15)));                       // 15 halt
    p.push_back(32'h0);                                  // 16
    foreach (p[i]) dut.u_imem.mem[i] = p[i];
    sent = {}; got = {};
    for (int i = 0; i < 16; i++) sent.push_back(8'($urandom));
    rx_q = sent;
    run_reset();
    begin
      int cyc;
      cyc = 0;
      while (!(dut.u_cpu.x_valid && dut.u_cpu.pc_x == at(15)) && cyc < 20000) begin
        @(posedge clk); #1; cyc++;
      end
      chk(cyc < 20000, "program B: did not finish");
    end
    repeat (20) @(posedge clk);
    #1;
    chk(got.size() == 16, $sformatf("program B: %0d bytes echoed", got.size()));
    foreach (sent[i]) if (i < got.size())
      chk(got[i] == sent[i], $sformatf("program B: byte %0d %h, expected %h", i, got[i], sent[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
