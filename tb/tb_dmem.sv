// tb_dmem: checks a data memory against an array model: random enabled and
// disabled reads and writes; a read's word appears one cycle after the
// edge that takes its address, a write returns the old word, and the output
// holds its value while the memory is not selected.
`timescale 1ns/1ps
module tb_dmem;
  localparam int AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] addr;
  logic [31:0] rdata, wdata, exp_q;
  logic en, we;
  logic [31:0] model [2**AW];
  int checks = 0, failures = 0;

  dmem #(.AW(AW)) dut (.clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; we = 1;
    for (int i = 0; i < 2**AW; i++) begin
      addr = AW'(i); wdata = $urandom; model[i] = wdata;
      @(posedge clk); #1;
    end
    exp_q = rdata;
    for (int k = 0; k < 5000; k++) begin
      en = 1'($urandom_range(0, 3) != 0);
      we = 1'($urandom_range(0, 2) == 0);
      addr = AW'($urandom_range(0, 63));
      wdata = $urandom;
      if (en) exp_q = model[addr];
      @(posedge clk);
      if (en && we) model[addr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_q) begin failures++; $display("FAIL addr %0d got %h exp %h", addr, rdata, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
