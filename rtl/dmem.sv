// dmem: one data memory of 2^AW 32-bit words with a synchronous read.
//
// Used twice in the system: the heap (default 8192 words at
// 0x10010000-0x10017ffc) and the stack (1024 words at 0x7ffff000-0x7ffffffc).
// One port: on the rising edge that starts an access's M stage the address
// is registered, a write stores the whole word, and a read shows the word on
// rdata during the M cycle that follows. Only whole, word-aligned words are
// accessed, since the ISA has only LW and SW. Synchronous read and a size
// set by a parameter follow the specification; read-first ordering is this
// design's choice.
module dmem #(
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  input  logic          en,     // the access selects this memory
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end
endmodule
