`timescale 1ns / 1ps
// tb_reg_map - self-checking test of the register map.
//
// Writes random values to all thirteen addresses and checks the decoded
// outputs (RUN, MODE, DIV, DLY, K1, K2, dTD, dTC assembled from their low and
// high bytes), the read-back, the one-bit RUN/MODE registers, that writes
// beyond 0x0C change nothing, and that run_start pulses for one cycle on a
// write of 1 to RUN and not on a write of 0.
module tb_reg_map;
  import ssc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [6:0] wr_addr = '0, rd_addr = '0;
  logic [7:0] wr_data = '0, rd_data;
  logic run, run_start, mode;
  ssc_params_t params;
  logic [15:0] dtd, dtc;
  logic [7:0] model [13];
  int checks = 0, failures = 0, starts = 0;

  always #5 clk = ~clk;

  reg_map dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data,
               .run, .run_start, .mode, .params, .dtd, .dtc);

  always @(posedge clk) if (run_start) starts++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [6:0] a, input logic [7:0] d);
    @(negedge clk);
    wr_addr = a; wr_data = d; wr_en = 1'b1;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 13; i++) model[i] = 8'h00;
    check(run == 1'b0 && mode == 1'b0 && params == '0 && dtd == 0 && dtc == 0, "reset values");
    for (int k = 0; k < 20; k++) begin
      for (int a = 2; a < 13; a++) begin
        model[a] = 8'($urandom);
        wr(7'(a), model[a]);
      end
      model[1] = 8'($urandom_range(0, 1));
      wr(7'h01, model[1] | 8'hFE);
      wr(7'h40 + 7'($urandom_range(0, 63)), 8'($urandom));   // beyond the map
      wr(7'h0D, 8'hFF);
      check(params.div == model[2], "DIV");
      check(params.dly == {model[4], model[3]}, "DLY");
      check(params.k1  == {model[6], model[5]}, "K1");
      check(params.k2  == {model[8], model[7]}, "K2");
      check(dtd == {model[10], model[9]}, "dTD");
      check(dtc == {model[12], model[11]}, "dTC");
      check(mode == model[1][0], "MODE");
      for (int a = 1; a < 14; a++) begin
        @(negedge clk);
        rd_addr = 7'(a);
        #1;
        check(rd_data == (a < 13 ? model[a] : 8'h00), $sformatf("read back %0d", a));
      end
      s0 = starts;
      wr(7'h00, 8'h00);
      @(posedge clk);
      #1;
      check(starts == s0 && run == 1'b0, "RUN = 0: no start");
      wr(7'h00, 8'h03);
      @(posedge clk);
      #1;
      check(starts == s0 + 1 && run == 1'b1, "RUN = 1: one start pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
