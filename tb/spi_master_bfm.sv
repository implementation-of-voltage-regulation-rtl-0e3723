`timescale 1ns / 1ps
// spi_master_bfm - SPI master for the testbenches (mode 0, MSB first).
//
// xfer() sends one framed two-byte transfer: the address byte, with bit 7
// set for a read, then the data byte, and returns the byte seen on MISO
// during the data byte.  write() and read() wrap it; partial() sends an
// aborted transfer.  SCLK has the period
// SCLK_PERIOD_NS; CSn is held high for GAP_NS between transfers.
module spi_master_bfm #(
  parameter real SCLK_PERIOD_NS = 10000.0,
  parameter real GAP_NS         = 20000.0
) (
  output logic sclk,
  output logic csn,
  output logic mosi,
  input  logic miso
);
  initial begin
    sclk = 1'b0;
    csn  = 1'b1;
    mosi = 1'b0;
  end

  task automatic xfer(input logic [7:0] a, input logic [7:0] d, output logic [7:0] r);
    logic [15:0] tx;
    tx  = {a, d};
    r   = '0;
    csn = 1'b0;
    #(SCLK_PERIOD_NS / 2.0);
    for (int i = 15; i >= 0; i--) begin
      mosi = tx[i];
      #(SCLK_PERIOD_NS / 2.0);
      sclk = 1'b1;
      if (i < 8) r = {r[6:0], miso};
      #(SCLK_PERIOD_NS / 2.0);
      sclk = 1'b0;
    end
    #(SCLK_PERIOD_NS / 2.0);
    csn = 1'b1;
    #(GAP_NS);
  endtask

  // sends only the first nbits of a transfer, then raises CSn (abort)
  task automatic partial(input logic [15:0] tx, input int nbits);
    csn = 1'b0;
    #(SCLK_PERIOD_NS / 2.0);
    for (int i = 15; i > 15 - nbits; i--) begin
      mosi = tx[i];
      #(SCLK_PERIOD_NS / 2.0);
      sclk = 1'b1;
      #(SCLK_PERIOD_NS / 2.0);
      sclk = 1'b0;
    end
    #(SCLK_PERIOD_NS / 2.0);
    csn = 1'b1;
    #(GAP_NS);
  endtask

  task automatic write(input logic [6:0] a, input logic [7:0] d);
    logic [7:0] r;
    xfer({1'b0, a}, d, r);
  endtask

  task automatic read(input logic [6:0] a, output logic [7:0] d);
    xfer({1'b1, a}, 8'h00, d);
  endtask
endmodule
