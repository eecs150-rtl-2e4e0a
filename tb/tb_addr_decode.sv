// tb_addr_decode: checks the address decoder with random accesses inside
// and just outside each range of the memory map (instruction memory, heap,
// stack, serial registers, unmapped). For every access it checks which
// device is selected, the word address passed on, that reads of the
// instruction memory are never forwarded, and that during the following
// cycle MemoryReadData carries the data of the device that was read (zero
// for the instruction memory and unmapped addresses).
`timescale 1ns/1ps
module tb_addr_decode;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  logic [31:0] a, wd, rd, wdata;
  logic mr, mw;
  logic imem_we, heap_en, heap_we, stack_en, stack_we, ser_sel;
  logic [12:0] imem_waddr, heap_addr;
  logic [9:0]  stack_addr;
  logic [1:0]  ser_addr;
  logic [31:0] heap_rdata, stack_rdata, ser_rdata;
  int checks = 0, failures = 0;

  addr_decode dut (
    .clk(clk), .reset(reset), .MemoryAddress(a), .MemoryRead(mr), .MemoryWrite(mw),
    .MemoryWriteData(wd), .MemoryReadData(rd), .imem_we(imem_we), .imem_waddr(imem_waddr),
    .heap_en(heap_en), .heap_we(heap_we), .heap_addr(heap_addr), .heap_rdata(heap_rdata),
    .stack_en(stack_en), .stack_we(stack_we), .stack_addr(stack_addr), .stack_rdata(stack_rdata),
    .ser_sel(ser_sel), .ser_addr(ser_addr), .ser_rdata(ser_rdata), .wdata(wdata));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; mr = 0; mw = 0; wd = 0;
    heap_rdata = 0; stack_rdata = 0; ser_rdata = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int k = 0; k < 6000; k++) begin
      int region;            // 0 imem, 1 heap, 2 stack, 3 serial, 4 unmapped
      logic [31:0] off;
      logic [31:0] exp_rd;
      bit was_read;
      region = int'($urandom_range(0, 4));
      off = {$urandom} & 32'hffff_fffc;
      case (region)
        0: a = 32'h0040_0000 + (off & 32'h7ffc);
        1: a = 32'h1001_0000 + (off & 32'h7ffc);
        2: a = 32'h7fff_f000 + (off & 32'h0ffc);
        3: a = 32'hffff_0000 + (off & 32'h000c);
        default: begin
          logic [31:0] near [8] = '{32'h003f_fffc, 32'h0040_8000, 32'h1000_fffc, 32'h1001_8000,
                                    32'h7fff_effc, 32'h0000_0000, 32'hffff_0010, 32'hfffe_fffc};
          a = ($urandom_range(0, 1)) ? near[$urandom_range(0, 7)] : off;
          if (a[31:15] == 17'h0080 || a[31:15] == 17'h2002 || a[31:12] == 20'h7ffff ||
              a[31:4] == 28'hffff000) a = 32'h2000_0000;
        end
      endcase
      mr = 1'($urandom_range(0, 1)); mw = !mr && 1'($urandom_range(0, 1));
      wd = $urandom;
      #1;
      chk(imem_we  == (mw && region == 0), $sformatf("imem_we for %h", a));
      chk(heap_en  == ((mr || mw) && region == 1) && heap_we == (mw && region == 1), $sformatf("heap for %h", a));
      chk(stack_en == ((mr || mw) && region == 2) && stack_we == (mw && region == 2), $sformatf("stack for %h", a));
      chk(ser_sel  == ((mr || mw) && region == 3), $sformatf("serial for %h", a));
      if (region == 0) chk(imem_waddr == a[14:2], "imem word address");
      if (region == 1) chk(heap_addr == a[14:2], "heap word address");
      if (region == 2) chk(stack_addr == a[11:2], "stack word address");
      if (region == 3) chk(ser_addr == a[3:2], "serial register index");
      chk(wdata == wd, "write data");
      was_read = mr;
      @(posedge clk);
      #1;
      // devices return their registered data during the next cycle
      heap_rdata = $urandom; stack_rdata = $urandom; ser_rdata = $urandom;
      mr = 0; mw = 0;
      #1;
      case (region)
        1: exp_rd = heap_rdata;
        2: exp_rd = stack_rdata;
        3: exp_rd = ser_rdata;
        default: exp_rd = 32'h0;   // write-only instruction memory or unmapped
      endcase
      if (!was_read) exp_rd = 32'h0;
      chk(rd == exp_rd, $sformatf("read data for %h", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
