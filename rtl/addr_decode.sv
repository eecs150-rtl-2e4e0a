// addr_decode: the memory-mapped I/O decoder of the MIPS150 system.
//
// Takes the processor's single memory port (Table-3 style signals) and
// steers each access by its full 32-bit byte address:
//   0x00400000-0x00407ffc  instruction memory, write-only
//   0x10010000-0x10017ffc  heap data memory, read/write
//   0x7ffff000-0x7ffffffc  stack data memory, read/write
//   0xffff0000-0xffff000c  serial-interface registers
// Writes to a read-only location have no effect (the serial block drops
// them); reads of the write-only instruction memory and of unmapped
// addresses return zero. The address ranges and the rule for read-only and
// write-only ranges follow the memory map; returning zero is this design's
// choice. The decode is combinational, so the devices see the access on the
// rising edge that starts its M stage; that edge also registers which device
// was read, and during M the matching device's registered read data is
// multiplexed onto MemoryReadData. Assertions check that accesses are
// word-aligned and never read and write at once.
module addr_decode
  import mips150_pkg::*;
#(
  parameter int unsigned IMEM_W  = IMEM_AW,
  parameter int unsigned HEAP_W  = HEAP_AW,
  parameter int unsigned STACK_W = STACK_AW
) (
  input  logic               clk,
  input  logic               reset,
  // processor side
  input  logic [31:0]        MemoryAddress,
  input  logic               MemoryRead,
  input  logic               MemoryWrite,
  input  logic [31:0]        MemoryWriteData,
  output logic [31:0]        MemoryReadData,
  // instruction memory write port
  output logic               imem_we,
  output logic [IMEM_W-1:0]  imem_waddr,
  // heap
  output logic               heap_en,
  output logic               heap_we,
  output logic [HEAP_W-1:0]  heap_addr,
  input  logic [31:0]        heap_rdata,
  // stack
  output logic               stack_en,
  output logic               stack_we,
  output logic [STACK_W-1:0] stack_addr,
  input  logic [31:0]        stack_rdata,
  // serial registers
  output logic               ser_sel,
  output logic [1:0]         ser_addr,
  input  logic [31:0]        ser_rdata,
  // shared write data
  output logic [31:0]        wdata
);
  function automatic dev_t decode(input logic [31:0] a);
    if      (a[31:IMEM_W+2]  == IMEM_BASE[31:IMEM_W+2])   return DEV_IMEM;
    else if (a[31:HEAP_W+2]  == HEAP_BASE[31:HEAP_W+2])   return DEV_HEAP;
    else if (a[31:STACK_W+2] == STACK_BASE[31:STACK_W+2]) return DEV_STACK;
    else if (a[31:4]         == SER_CTRL_IN[31:4])        return DEV_SERIAL;
    else                                                  return DEV_NONE;
  endfunction

  dev_t dev, dev_m;
  logic access;
  assign dev    = decode(MemoryAddress);
  assign access = MemoryRead || MemoryWrite;

  assign imem_we    = MemoryWrite && dev == DEV_IMEM;
  assign imem_waddr = MemoryAddress[IMEM_W+1:2];
  assign heap_en    = access && dev == DEV_HEAP;
  assign heap_we    = MemoryWrite && dev == DEV_HEAP;
  assign heap_addr  = MemoryAddress[HEAP_W+1:2];
  assign stack_en   = access && dev == DEV_STACK;
  assign stack_we   = MemoryWrite && dev == DEV_STACK;
  assign stack_addr = MemoryAddress[STACK_W+1:2];
  assign ser_sel    = access && dev == DEV_SERIAL;
  assign ser_addr   = MemoryAddress[3:2];
  assign wdata      = MemoryWriteData;

  // Device whose registered read data belongs to the access now in M.
  always_ff @(posedge clk) begin
    if (reset)           dev_m <= DEV_NONE;
    else if (MemoryRead) dev_m <= dev;
    else                 dev_m <= DEV_NONE;
  end

  always_comb begin
    unique case (dev_m)
      DEV_HEAP:   MemoryReadData = heap_rdata;
      DEV_STACK:  MemoryReadData = stack_rdata;
      DEV_SERIAL: MemoryReadData = ser_rdata;
      default:    MemoryReadData = 32'h0;   // write-only or unmapped
    endcase
  end

  a_aligned: assert property (@(posedge clk) disable iff (reset)
    access |-> MemoryAddress[1:0] == 2'b00)
    else $error("misaligned memory access at %h", MemoryAddress);
  a_not_both: assert property (@(posedge clk) disable iff (reset)
    !(MemoryRead && MemoryWrite))
    else $error("read and write in the same cycle");
endmodule
