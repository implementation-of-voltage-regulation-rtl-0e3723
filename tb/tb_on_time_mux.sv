`timescale 1ns / 1ps
// tb_on_time_mux - self-checking test of the on-time multiplexer.
//
// Random MODE, DLY' and DLYC; one clock after each change the output must
// be DLYC when MODE = 1 and the lower ten bits of DLY' when MODE = 0.
module tb_on_time_mux;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mode = 1'b0;
  logic [15:0] dly = '0;
  logic [9:0]  dlyc = '0, on_time;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  on_time_mux dut (.clk, .rst_n, .mode, .dly, .dlyc, .on_time);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] exp_v, prev_v;
    prev_v = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (on_time != 10'd0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      mode = 1'($urandom);
      dly  = 16'($urandom);
      dlyc = 10'($urandom);
      exp_v = mode ? dlyc : dly[9:0];
      #1;
      checks++;
      if (on_time != prev_v) begin
        failures++;
        $display("FAIL output changed before the clock edge");
      end
      @(posedge clk); #1;
      checks++;
      if (on_time != exp_v) begin
        failures++;
        $display("FAIL mode=%0d dly=%h dlyc=%h out=%h", mode, dly, dlyc, on_time);
      end
      prev_v = exp_v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
