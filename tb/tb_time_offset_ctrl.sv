`timescale 1ns / 1ps
// tb_time_offset_ctrl - self-checking test of the time offset controller.
//
// For random offsets dTD and dTC, pulses run_start and checks that DIV' is
// updated exactly dTD+1 clock edges, and DLY'/K1'/K2' exactly dTC+1 edges,
// after the edge that samples run_start; that the values are those present at
// expiry; that nothing changes without run_start; and that a second
// run_start during counting restarts the timers.
module tb_time_offset_ctrl;
  import ssc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic run_start = 1'b0;
  logic [15:0] dtd = '0, dtc = '0;
  ssc_params_t params = '0, params_q;
  logic div_applied, comp_applied;
  int checks = 0, failures = 0;
  int cyc = 0, t_start = 0, t_div = 0, t_comp = 0;

  always #5 clk = ~clk;

  time_offset_ctrl dut (.clk, .rst_n, .run_start, .dtd, .dtc, .params, .params_q,
                        .div_applied, .comp_applied);

  ssc_params_t last_q;
  always @(posedge clk) begin
    cyc++;
    if (run_start) t_start = cyc;
    if (params_q.div != last_q.div) t_div = cyc;
    if (params_q.k2 != last_q.k2)   t_comp = cyc;
    last_q = params_q;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic start();
    @(negedge clk);
    run_start = 1'b1;
    @(negedge clk);
    run_start = 1'b0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ssc_params_t p;
    last_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 30; k++) begin
      p.div = 8'($urandom_range(1, 255));
      p.dly = 16'($urandom_range(1, 65535));
      p.k1  = 16'($urandom_range(1, 65535));
      p.k2  = 16'($urandom_range(1, 65535));
      if (p.div == last_q.div) p.div = p.div + 8'd1;
      if (p.k2 == last_q.k2) p.k2 = p.k2 + 16'd1;
      dtd = 16'($urandom_range(0, 200));
      dtc = 16'($urandom_range(0, 200));
      @(negedge clk);
      params = p;
      repeat (5) @(posedge clk);
      check(params_q.div != p.div && params_q.k2 != p.k2, "no change without run_start");
      if (k % 5 == 4) begin
        // restart: a second run_start 3 cycles later moves the expiry
        start();
        repeat (2) @(posedge clk);
      end
      start();
      repeat (260) @(posedge clk);
      // t_start: edge that sees run_start; the change is seen one edge after it is made
      check(t_div - t_start == int'(dtd) + 2, $sformatf("DIV' after %0d edges, dTD=%0d", t_div - t_start, dtd));
      check(t_comp - t_start == int'(dtc) + 2, $sformatf("K2' after %0d edges, dTC=%0d", t_comp - t_start, dtc));
      check(params_q == p, "applied values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
