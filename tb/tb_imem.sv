// tb_imem: checks the instruction memory against an array model. Words are
// written through the bus port; the fetch port must return the word at the
// address presented before an edge during the next cycle (one cycle of
// latency), and a fetch of an address written on the same edge must return
// the old word.
`timescale 1ns/1ps
module tb_imem;
  localparam int AW = 13;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] raddr, waddr;
  logic [31:0] rdata, wdata, exp_q;
  logic we;
  logic [31:0] model [2**AW];
  int checks = 0, failures = 0;

  imem #(.AW(AW)) dut (.clk(clk), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill a window of 256 words
    we = 1;
    for (int i = 0; i < 256; i++) begin
      waddr = AW'(i * 29); wdata = $urandom; model[waddr] = wdata; raddr = '0;
      @(posedge clk); #1;
    end
    waddr = AW'(2**AW - 1); wdata = 32'hcafe_f00d; model[waddr] = wdata;
    @(posedge clk); #1;
    we = 0;
    for (int k = 0; k < 4000; k++) begin
      raddr = AW'($urandom_range(0, 255) * 29);
      if (k % 97 == 0) raddr = AW'(2**AW - 1);
      we = 1'($urandom_range(0, 3) == 0);
      waddr = ($urandom_range(0, 1)) ? raddr : AW'($urandom_range(0, 255) * 29);
      wdata = $urandom;
      exp_q = model[raddr];           // read-first
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp_q) begin failures++; $display("FAIL addr %0d got %h exp %h", raddr, rdata, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
