// serial_mmio: the processor-side registers of the serial interface.
//
// Four word registers at 0xffff0000-0xffff000c, selected by addr[3:2]:
//   0 ControlInReg  (read)  bit 0 = a received byte is waiting in DataInReg
//   1 DataInReg     (read)  bits 7:0 = the received byte; reading it empties
//                           the receive buffer
//   2 ControlOutReg (read)  bit 0 = the transmitter can take a byte
//   3 DataOutReg    (write) bits 7:0 are sent; a write while the transmitter
//                           is busy is dropped
// Unused bits read as zero. The serial transceiver itself sits outside and
// connects through two valid/ready byte streams: rx_* delivers received
// bytes (taken only while the receive buffer is empty), tx_* carries bytes to
// send (held until tx_ready). The register names, addresses and read/write
// directions follow the memory map; the bit layout (that of the common MIPS
// simulator console) and the two byte streams are this design's choices.
// Timing matches the data memories: a read is registered on the rising edge
// that starts the access's M stage and rdata holds the value during M; a
// write takes effect on that same edge. An assertion checks that a byte
// offered on the transmit stream is held until it is taken.
module serial_mmio (
  input  logic        clk,
  input  logic        reset,
  // bus side
  input  logic        sel,       // the access falls in the serial range
  input  logic        re,
  input  logic        we,
  input  logic [1:0]  addr,      // word index within the range
  input  logic [7:0]  wdata,
  output logic [31:0] rdata,
  // receive byte stream from the transceiver
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  output logic        rx_ready,
  // transmit byte stream to the transceiver
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  input  logic        tx_ready
);
  localparam logic [1:0] R_CTRL_IN  = 2'd0;
  localparam logic [1:0] R_DATA_IN  = 2'd1;
  localparam logic [1:0] R_CTRL_OUT = 2'd2;
  localparam logic [1:0] R_DATA_OUT = 2'd3;

  logic       rx_full, tx_full;
  logic [7:0] rx_byte, tx_byte;

  logic rd_data_in, wr_data_out;
  assign rd_data_in  = sel && re && addr == R_DATA_IN;
  assign wr_data_out = sel && we && addr == R_DATA_OUT && !tx_full;

  assign rx_ready = !rx_full;
  assign tx_valid = tx_full;
  assign tx_data  = tx_byte;

  always_ff @(posedge clk) begin
    if (reset) begin
      rx_full <= 1'b0;
      rx_byte <= 8'h00;
      tx_full <= 1'b0;
      tx_byte <= 8'h00;
      rdata   <= 32'h0;
    end else begin
      // receive side
      if (rx_valid && rx_ready) begin
        rx_full <= 1'b1;
        rx_byte <= rx_data;
      end else if (rd_data_in) begin
        rx_full <= 1'b0;
      end
      // transmit side
      if (wr_data_out) begin
        tx_full <= 1'b1;
        tx_byte <= wdata;
      end else if (tx_valid && tx_ready) begin
        tx_full <= 1'b0;
      end
      // registered read data
      if (sel && re) begin
        unique case (addr)
          R_CTRL_IN:  rdata <= {31'b0, rx_full};
          R_DATA_IN:  rdata <= {24'b0, rx_byte};
          R_CTRL_OUT: rdata <= {31'b0, !tx_full};
          R_DATA_OUT: rdata <= 32'h0;   // write-only register
        endcase
      end
    end
  end

  // A byte offered to the transceiver stays offered, unchanged, until taken.
  a_tx_hold: assert property (@(posedge clk) disable iff (reset)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data))
    else $error("transmit byte withdrawn or changed before it was taken");
endmodule
