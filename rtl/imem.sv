// imem: the instruction memory, 2^AW 32-bit words (default 8192 words,
// 32 KiB, for the user-code range 0x00400000-0x00407ffc).
//
// It has two ports. The fetch port is a synchronous read: the word address
// presented before a rising edge is registered on that edge and its word
// appears on rdata during the following cycle, which is the X stage of the
// fetched instruction. The bus port is write-only, as the memory map
// demands: a store whose address falls in the instruction range writes one
// whole word on the rising edge that starts its M stage. Synchronous read,
// write-only bus access and a size set by a parameter follow the
// specification; the read-first behaviour on a same-address read and write
// is this design's choice (it matches a dual-port block RAM).
module imem #(
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  // fetch port
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata,
  // bus write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
  end
endmodule
