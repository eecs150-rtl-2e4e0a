// regfile: the 32 x 32-bit general-purpose register file.
//
// Two combinational read ports (rs and rt, read in the X stage) and one write
// port, written on the rising clock edge that ends the M stage. Register 0
// always reads as zero and writes to it are dropped. A read in the same cycle
// as a write to the same register returns the old value; the pipeline covers
// that case with its own M-to-X bypass. The registers are not reset, as in
// the MIPS architecture; the testbenches write what they read. Number and
// width of the registers follow the ISA; the port arrangement is this
// design's choice.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  output logic [WIDTH-1:0]         rdata1,
  input  logic [$clog2(NREGS)-1:0] raddr2,
  output logic [WIDTH-1:0]         rdata2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && waddr != '0) regs[waddr] <= wdata;
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];
endmodule
