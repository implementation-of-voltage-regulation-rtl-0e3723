`timescale 1ns / 1ps
// tb_freq_divider - self-checking test of the programmable divider.
//
// Counts f_pll rising edges between consecutive rising edges of f_div.  For
// each divider value (the three values of the spread-spectrum test, 48, 55
// and 62, the limits 2 and 255, random values, and 0 and 1, which act as 2)
// every period must be exactly N cycles once the new value has arrived, and
// f_div must be high for floor(N/2) cycles.  Around a change of N every
// period must be either the old or the new N (no cut periods).
module tb_freq_divider;
  logic f_pll = 1'b0, rst_n = 1'b0;
  logic [7:0] div_n = 8'd55;
  logic f_div;
  int checks = 0, failures = 0;
  int cnt = 0, hi = 0, last_period = 0, last_hi = 0, periods = 0;

  always #5 f_pll = ~f_pll;

  freq_divider dut (.f_pll, .rst_n, .div_n, .f_div);

  logic f_div_q = 1'b0;
  always @(posedge f_pll) begin
    #1;
    cnt++;
    if (f_div) hi++;
    if (f_div && !f_div_q) begin
      last_period = cnt;
      last_hi     = hi;
      periods++;
      cnt = 0;
      hi  = 0;
    end
    f_div_q = f_div;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #(5.0e6);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_n(input int n);
    int old_n, eff, p0;
    old_n = (periods < 2) ? 0 : last_period;
    div_n = 8'(n);
    eff   = (n < 2) ? 2 : n;
    // transition: next periods are old or new value
    p0 = periods;
    while (periods < p0 + 3) begin
      @(posedge f_pll);
      #2;
      if (periods != p0 && cnt == 0 && old_n != 0)
        check(last_period == old_n || last_period == eff, $sformatf("period %0d during change %0d -> %0d", last_period, old_n, eff));
    end
    // steady
    p0 = periods;
    while (periods < p0 + 4) begin
      @(posedge f_pll);
      #2;
      if (periods > p0 && cnt == 0) begin
        check(last_period == eff, $sformatf("period %0d, expected %0d", last_period, eff));
        check(last_hi == eff / 2, $sformatf("high time %0d, expected %0d", last_hi, eff / 2));
      end
    end
  endtask

  initial begin
    #23;
    rst_n = 1'b1;
    run_n(55);
    run_n(48);
    run_n(62);
    run_n(55);
    run_n(2);
    run_n(255);
    run_n(3);
    run_n(0);
    run_n(1);
    for (int k = 0; k < 10; k++) run_n($urandom_range(2, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
