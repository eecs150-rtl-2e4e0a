// tb_regfile: checks the register file against an array model: random
// writes and reads on both ports, register 0 always zero, writes ignored
// when we is low, and a read in the cycle of a write returning the old
// value (the write lands on the clock edge).
`timescale 1ns/1ps
module tb_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2),
               .we(we), .waddr(wa), .wdata(wd));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int r = 0; r < 32; r++) begin
      wa = 5'(r); wd = $urandom; model[r] = (r == 0) ? 32'h0 : wd;
      @(posedge clk); #1;
    end
    for (int k = 0; k < 3000; k++) begin
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      wa = 5'($urandom_range(0, 3) == 0 ? ra1 : $urandom); wd = $urandom; we = 1'($urandom);
      #1;
      checks += 2;
      if (rd1 !== model[ra1]) begin failures++; $display("FAIL port1 r%0d", ra1); end
      if (rd2 !== model[ra2]) begin failures++; $display("FAIL port2 r%0d", ra2); end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
