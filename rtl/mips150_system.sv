// mips150_system: the MIPS150 computer on one chip.
//
// Wires the three-stage processor to its memory-mapped devices:
//   * imem   - instruction memory; its fetch port serves only the
//              processor's fetch stage, and stores into 0x00400000-0x00407ffc
//              write it (this is how a loader places a program);
//   * heap   - data memory at 0x10010000-0x10017ffc;
//   * stack  - data memory at 0x7ffff000-0x7ffffffc;
//   * serial - the four serial-interface registers at 0xffff0000-0xffff000c,
//              whose transceiver lies outside this module and is reached
//              through the rx_*/tx_* valid/ready byte streams;
//   * addr_decode - steers the processor's single memory port to them and
//              multiplexes the registered read data back.
// All memories read synchronously, so a load's address is taken on the edge
// that starts its M stage and its data comes back during M, which is what
// the processor expects. Reset is synchronous and active high; memory
// contents are not cleared by it. The set of devices and the address map
// follow the specification; the byte-stream boundary to the transceiver is
// this design's choice. The Ethernet and video interfaces of the full
// computer have no address range yet and are not part of this module.
module mips150_system
  import mips150_pkg::*;
#(
  parameter int unsigned IMEM_W  = IMEM_AW,   // log2 words of instruction memory
  parameter int unsigned HEAP_W  = HEAP_AW,   // log2 words of heap memory
  parameter int unsigned STACK_W = STACK_AW   // log2 words of stack memory
) (
  input  logic       Clock,
  input  logic       Reset,
  // serial transceiver, receive direction
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       rx_ready,
  // serial transceiver, transmit direction
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready
);
  logic [31:0] instr_addr, instr_data;
  logic [31:0] mem_addr, mem_rdata, mem_wdata, bus_wdata;
  logic        mem_read, mem_write;

  mips150_cpu u_cpu (
    .Clock          (Clock),
    .Reset          (Reset),
    .InstrAddress   (instr_addr),
    .InstrData      (instr_data),
    .MemoryAddress  (mem_addr),
    .MemoryReadData (mem_rdata),
    .MemoryRead     (mem_read),
    .MemoryWriteData(mem_wdata),
    .MemoryWrite    (mem_write)
  );

  logic               imem_we;
  logic [IMEM_W-1:0]  imem_waddr;
  logic               heap_en, heap_we, stack_en, stack_we, ser_sel;
  logic [HEAP_W-1:0]  heap_addr;
  logic [STACK_W-1:0] stack_addr;
  logic [1:0]         ser_addr;
  logic [31:0]        heap_rdata, stack_rdata, ser_rdata;

  addr_decode #(.IMEM_W(IMEM_W), .HEAP_W(HEAP_W), .STACK_W(STACK_W)) u_dec (
    .clk            (Clock),
    .reset          (Reset),
    .MemoryAddress  (mem_addr),
    .MemoryRead     (mem_read),
    .MemoryWrite    (mem_write),
    .MemoryWriteData(mem_wdata),
    .MemoryReadData (mem_rdata),
    .imem_we        (imem_we),
    .imem_waddr     (imem_waddr),
    .heap_en        (heap_en),
    .heap_we        (heap_we),
    .heap_addr      (heap_addr),
    .heap_rdata     (heap_rdata),
    .stack_en       (stack_en),
    .stack_we       (stack_we),
    .stack_addr     (stack_addr),
    .stack_rdata    (stack_rdata),
    .ser_sel        (ser_sel),
    .ser_addr       (ser_addr),
    .ser_rdata      (ser_rdata),
    .wdata          (bus_wdata)
  );

  imem #(.AW(IMEM_W)) u_imem (
    .clk  (Clock),
    .raddr(instr_addr[IMEM_W+1:2]),
    .rdata(instr_data),
    .we   (imem_we),
    .waddr(imem_waddr),
    .wdata(bus_wdata)
  );

  dmem #(.AW(HEAP_W)) u_heap (
    .clk(Clock), .en(heap_en), .we(heap_we), .addr(heap_addr),
    .wdata(bus_wdata), .rdata(heap_rdata)
  );

  dmem #(.AW(STACK_W)) u_stack (
    .clk(Clock), .en(stack_en), .we(stack_we), .addr(stack_addr),
    .wdata(bus_wdata), .rdata(stack_rdata)
  );

  serial_mmio u_serial (
    .clk     (Clock),
    .reset   (Reset),
    .sel     (ser_sel),
    .re      (mem_read),
    .we      (mem_write),
    .addr    (ser_addr),
    .wdata   (bus_wdata[7:0]),
    .rdata   (ser_rdata),
    .rx_data (rx_data),
    .rx_valid(rx_valid),
    .rx_ready(rx_ready),
    .tx_data (tx_data),
    .tx_valid(tx_valid),
    .tx_ready(tx_ready)
  );
endmodule
