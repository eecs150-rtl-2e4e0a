// tb_serial_mmio: checks the serial-interface registers. A receive model
// offers random bytes with random gaps and a transmit model accepts bytes
// with random back-pressure; the test reads ControlInReg, DataInReg and
// ControlOutReg and writes DataOutReg as the processor would, and checks
// the flag bits, the byte values, that reading DataInReg empties the buffer,
// that bytes leave in order and that writes while busy and writes to
// read-only registers are dropped.
`timescale 1ns/1ps
module tb_serial_mmio;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;
  logic sel, re, we;
  logic [1:0] addr;
  logic [7:0] wdata, rx_data, tx_data;
  logic [31:0] rdata;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  int checks = 0, failures = 0;

  serial_mmio dut (.clk(clk), .reset(reset), .sel(sel), .re(re), .we(we), .addr(addr),
                   .wdata(wdata), .rdata(rdata), .rx_data(rx_data), .rx_valid(rx_valid),
                   .rx_ready(rx_ready), .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One bus access: address and strobes before an edge, read data after it.
  task automatic bus(input bit w, input logic [1:0] a, input logic [7:0] d, output logic [31:0] q);
    sel = 1; re = !w; we = w; addr = a; wdata = d;
    @(posedge clk); #1;
    q = rdata;
    sel = 0; re = 0; we = 0;
  endtask

  // receive model: a queue of bytes to deliver
  logic [7:0] rx_q [$];
  logic [7:0] sent [$], got [$];
  always @(posedge clk) begin
    if (rx_valid && rx_ready) void'(rx_q.pop_front());
    if (tx_valid && tx_ready) got.push_back(tx_data);
  end
  always @(negedge clk) begin
    rx_valid <= rx_q.size() > 0 && $urandom_range(0, 2) != 0;
    rx_data  <= rx_q.size() > 0 ? rx_q[0] : 8'h00;
    tx_ready <= $urandom_range(0, 3) == 0;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    logic [7:0]  expect_rx [$];
    sel = 0; re = 0; we = 0; addr = 0; wdata = 0;
    rx_valid = 0; rx_data = 0; tx_ready = 0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    bus(0, 2'd0, 0, q); chk(q == 32'h0, "ControlIn empty after reset");
    bus(0, 2'd2, 0, q); chk(q == 32'h1, "ControlOut ready after reset");
    for (int i = 0; i < 100; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      rx_q.push_back(b); expect_rx.push_back(b);
    end
    // Receive: poll, then read the byte.
    for (int i = 0; i < 100; i++) begin
      int guard;
      guard = 0;
      do begin bus(0, 2'd0, 0, q); guard++; end while (q[0] == 1'b0 && guard < 100);
      chk(q == 32'h1, "ControlIn shows a waiting byte");
      bus(0, 2'd1, 0, q);
      chk(q == {24'h0, expect_rx[i]}, $sformatf("DataIn byte %0d = %h exp %h", i, q, expect_rx[i]));
      // a store to the read-only DataInReg / ControlInReg changes nothing
      bus(1, 2'($urandom_range(0, 2)), 8'hff, q);
      if (rx_q.size() == 0) begin
        bus(0, 2'd0, 0, q);
        chk(q == 32'h0, "ControlIn empty after the last byte was read");
      end
    end
    // Transmit: poll ControlOut, then write DataOut; also try writing while busy.
    for (int i = 0; i < 60; i++) begin
      logic [7:0] b;
      int guard;
      guard = 0;
      do begin bus(0, 2'd2, 0, q); guard++; end while (q[0] == 1'b0 && guard < 200);
      b = 8'($urandom);
      bus(1, 2'd3, b, q);
      sent.push_back(b);
      if (tx_valid && !tx_ready) begin
        bus(0, 2'd2, 0, q);
        if (tx_valid) chk(q == 32'h0, "ControlOut busy while a byte waits");
        if (tx_valid) bus(1, 2'd3, ~b, q);   // dropped when busy
      end
    end
    repeat (50) @(posedge clk);
    #1;
    chk(got.size() == sent.size(), $sformatf("sent %0d bytes, %0d left", sent.size(), got.size()));
    foreach (sent[i]) if (i < got.size()) chk(got[i] == sent[i], $sformatf("tx byte %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
