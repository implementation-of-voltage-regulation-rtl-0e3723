`timescale 1ns / 1ps
// tb_duty_cycle_ctrl - self-checking test of the duty-cycle controller.
//
// f_pll runs at 1 MHz.  For on-time words of the spread-spectrum test
// (250, 286, 222) and random ones up to 95 % duty, every PWM pulse must
// start at an f_pll rising edge and last on_time * 2 ns, once the new word
// has passed the synchroniser.  With enable low no pulse may appear.  A
// last case changes f_pll to 0.873 MHz and checks D = DLY * 2 ns * f.
module tb_duty_cycle_ctrl;
  logic f_pll = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [9:0] on_time = 10'd250;
  logic pwm;
  int checks = 0, failures = 0;
  real half_ns = 500.0;
  realtime t_pll = 0, t_rise = 0, t_prev = 0;
  real t_on = 0.0, duty = 0.0;
  int pulses = 0;

  always #(half_ns) f_pll = ~f_pll;

  duty_cycle_ctrl dut (.f_pll, .rst_n, .enable, .on_time, .pwm);

  always @(posedge f_pll) t_pll = $realtime;
  always @(posedge pwm) begin
    checks++;
    if ($realtime != t_pll) begin
      failures++;
      $display("FAIL pulse starts at %0t, not at the f_pll edge %0t", $realtime, t_pll);
    end
    t_prev = t_rise;
    t_rise = $realtime;
    pulses++;
  end
  always @(negedge pwm) begin
    t_on = $realtime - t_rise;
    duty = t_on / (t_rise - t_prev);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic word(input int w);
    on_time = 10'(w);
    repeat (6) @(posedge f_pll);
    for (int i = 0; i < 5; i++) begin
      @(posedge f_pll);
      @(negedge pwm);
      check(t_on > 2.0 * w - 0.001 && t_on < 2.0 * w + 0.001, $sformatf("on-time %0.3f ns for word %0d", t_on, w));
    end
  endtask

  initial begin : watchdog
    #(5.0e7);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p0;
    #(2300.0);
    rst_n = 1'b1;
    pulses = 0;      // flip-flop states before the first reset edge are random
    repeat (10) @(posedge f_pll);
    check(pulses == 0, "no pulse while disabled");
    enable = 1'b1;
    word(250);
    word(286);
    word(222);
    for (int k = 0; k < 20; k++) word($urandom_range(1, 475));
    enable = 1'b0;
    repeat (6) @(posedge f_pll);
    p0 = pulses;
    repeat (20) @(posedge f_pll);
    check(pulses == p0 && pwm == 1'b0, "no pulse after disable");
    enable = 1'b1;
    half_ns = 500.0 / 0.873;
    word(286);
    check(duty > 286 * 2.0e-9 * 0.873e6 - 0.001 && duty < 286 * 2.0e-9 * 0.873e6 + 0.001,
          $sformatf("duty %0.4f at 0.873 MHz", duty));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
