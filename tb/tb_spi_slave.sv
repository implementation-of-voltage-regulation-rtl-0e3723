`timescale 1ns / 1ps
// tb_spi_slave - self-checking test of the SPI slave.
//
// A 16-byte array stands in for the register map.  Random write transfers
// must give exactly one wr_en pulse with the sent address and data; read
// transfers must return the array byte on MISO and give no write; aborted
// transfers (CSn raised after 4 or 12 bits) must give no write.  SCLK runs
// at f_clk/8, the fastest rate the slave is specified for.
module tb_spi_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk, csn, mosi, miso;
  logic wr_en;
  logic [6:0] addr;
  logic [7:0] wr_data, rd_data;
  logic [7:0] mem [16];
  int   checks = 0, failures = 0;
  int   n_wr = 0;
  logic [6:0] last_a;
  logic [7:0] last_d;

  always #5 clk = ~clk;   // 100 MHz

  spi_slave dut (.clk, .rst_n, .sclk, .csn, .mosi, .miso, .wr_en, .addr, .wr_data, .rd_data);
  spi_master_bfm #(.SCLK_PERIOD_NS(80.0), .GAP_NS(100.0)) u_m (.sclk, .csn, .mosi, .miso);

  assign rd_data = mem[addr[3:0]];

  always @(posedge clk) if (wr_en) begin
    n_wr++;
    last_a = addr;
    last_d = wr_data;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] a;
    logic [7:0] d, r;
    int n0;
    for (int i = 0; i < 16; i++) mem[i] = 8'($urandom);
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      a = 7'($urandom_range(0, 15));
      d = 8'($urandom);
      n0 = n_wr;
      u_m.write(a, d);
      check(n_wr == n0 + 1, $sformatf("one write pulse for write %0d", k));
      check(last_a == a && last_d == d, $sformatf("write %0d: got %h/%h, sent %h/%h", k, last_a, last_d, a, d));
      a = 7'($urandom_range(0, 15));
      n0 = n_wr;
      u_m.read(a, r);
      check(r == mem[a[3:0]], $sformatf("read %h: got %h, expected %h", a, r, mem[a[3:0]]));
      check(n_wr == n0, "no write pulse on a read");
    end
    n0 = n_wr;
    u_m.partial(16'h0355, 12);
    u_m.partial(16'h0455, 4);
    check(n_wr == n0, "no write pulse on aborted transfers");
    // a complete transfer after the aborts still works
    u_m.write(7'h05, 8'hA5);
    check(n_wr == n0 + 1 && last_a == 7'h05 && last_d == 8'hA5, "write after abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
