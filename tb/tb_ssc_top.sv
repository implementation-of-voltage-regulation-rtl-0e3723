`timescale 1ns / 1ps
// tb_ssc_top - end-to-end test of the spread-spectrum controller.
//
// The controller runs with its default parameters, a 1 MHz controller clock
// (the 1 us time step behind K1 = 0xFFCB for tau = 1.25 ms), a behavioural
// PLL (reference 1 MHz / 55) in its divider loop and an SPI master.  The
// test follows the spread-spectrum scenario: lock at 1 MHz (DIV = 55,
// DLY = 250), step to the lowest frequency (DIV = 48, DLY = 286), to the
// highest (DIV = 62, DLY = 222) and back, once with the constant on-time
// (MODE = 0) and once with the compensator (MODE = 1), with the K2 values of
// the three frequencies.  It checks:
//   - register read-back over SPI,
//   - that DIV' and DLY'/K1'/K2' are applied dTD+2 and dTC+2 controller
//     clock edges after the edge that wrote RUN,
//   - locked PLL frequency, PWM on-time (DLY * 2 ns) and duty cycle,
//   - the compensator's settled word against K2 / (1 - K1) and the time
//     constant of its glide (two clock cycles per iteration: 2.47 ms),
//   - that the peak duty-cycle error of every step is smaller with the
//     compensator than without it,
//   - that PWM stays low with RUN = 0.
// Each mechanism (SPI read, SPI write, timer offset, divider change, mode
// switch, compensated glide, disable) is counted and must occur.
module tb_ssc_top;
  localparam real TCLK_NS = 1000.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk, csn, mosi, miso, f_pll, f_div, pwm;
  int   checks = 0, failures = 0;

  always #(TCLK_NS / 2.0) clk = ~clk;

  ssc_top dut (.clk, .rst_n, .sclk, .csn, .mosi, .miso, .f_pll, .f_div, .pwm);
  spi_master_bfm u_spi (.sclk, .csn, .mosi, .miso);
  pll_model u_pll (.f_div, .f_pll);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $realtime);
    end
  endtask

  // ---- duty-cycle monitor ----
  realtime t_rise = 0, t_prev_rise = 0, t_pll_prev = 0;
  real     duty = 0.0, t_on_ns = 0.0, period_ns = 1000.0;
  real     peak_err = 0.0;
  bit      track = 1'b0;
  int      pwm_pulses = 0;

  always @(posedge f_pll) begin
    period_ns  = $realtime - t_pll_prev;
    t_pll_prev = $realtime;
  end
  always @(posedge pwm) begin
    t_prev_rise = t_rise;
    t_rise      = $realtime;
    pwm_pulses++;
  end
  always @(negedge pwm) begin
    t_on_ns = $realtime - t_rise;
    if (t_prev_rise > 0) begin
      duty = t_on_ns / (t_rise - t_prev_rise);
      if (track && ((duty - 0.5) > peak_err))  peak_err = duty - 0.5;
      if (track && ((0.5 - duty) > peak_err))  peak_err = 0.5 - duty;
    end
  end

  // ---- time offset monitor: controller cycles from run_start to apply ----
  int cyc = 0, start_cyc = 0, div_cyc = -1, comp_cyc = -1;
  always @(posedge clk) begin
    cyc++;
    if (dut.run_start)    start_cyc = cyc;
    if (dut.div_applied)  div_cyc   = cyc;
    if (dut.comp_applied) comp_cyc  = cyc;
  end

  // ---- mechanism counters ----
  int n_read = 0, n_write = 0, n_offset = 0, n_divchg = 0, n_mode = 0, n_glide = 0, n_disable = 0;

  task automatic wr16(input logic [6:0] a_lo, input logic [15:0] v);
    u_spi.write(a_lo, v[7:0]);
    u_spi.write(a_lo + 7'd1, v[15:8]);
    n_write += 2;
  endtask

  // writes a parameter set and RUN; checks the offsets of its application
  task automatic apply(input logic [7:0] div, input logic [15:0] dly, input logic [15:0] k2,
                       input logic [15:0] dtd, input logic [15:0] dtc);
    u_spi.write(7'h02, div);
    wr16(7'h03, dly);
    wr16(7'h05, 16'hFFCB);
    wr16(7'h07, k2);
    wr16(7'h09, dtd);
    wr16(7'h0B, dtc);
    div_cyc  = -1;
    comp_cyc = -1;
    u_spi.write(7'h00, 8'h01);
    n_write += 2;
    wait (div_cyc > 0 && comp_cyc > 0);
    check(div_cyc - start_cyc == int'(dtd) + 2, $sformatf("DIV' applied %0d cycles after RUN, expected %0d", div_cyc - start_cyc, dtd + 2));
    check(comp_cyc - start_cyc == int'(dtc) + 2, $sformatf("K' applied %0d cycles after RUN, expected %0d", comp_cyc - start_cyc, dtc + 2));
    check(dut.params_q.div == div && dut.params_q.dly == dly && dut.params_q.k2 == k2, "applied parameter values");
    if (dtd != dtc) n_offset++;
    n_divchg++;
  endtask

  // settled compensator word: fixed point of X = floor(K1*X/2^16) + K2 in Q10.16
  function automatic int comp_fixed(input longint k1, input longint k2);
    longint x = 0;
    for (int i = 0; i < 200000; i++) x = ((k1 * x) >> 16) + k2;
    return int'(x >> 16);
  endfunction

  // w: expected on-time word (delay cells)
  task automatic steady_checks(input int n_div, input int w);
    real f_exp, f_meas, d_exp;
    f_exp  = 1.0e6 / 55.0 * n_div;
    f_meas = 1.0e9 / period_ns;
    d_exp  = w * 2.0e-9 * f_exp;
    check(f_meas > f_exp * 0.995 && f_meas < f_exp * 1.005, $sformatf("f_pll %0.1f Hz, expected %0.1f", f_meas, f_exp));
    check(t_on_ns > w * 2.0 - 0.01 && t_on_ns < w * 2.0 + 0.01, $sformatf("on-time %0.3f ns, expected %0.1f", t_on_ns, w * 2.0));
    check(duty > d_exp - 0.003 && duty < d_exp + 0.003, $sformatf("duty %0.4f, expected %0.4f", duty, d_exp));
  endtask

  typedef struct { int div; int dly; logic [15:0] k2; } step_t;
  step_t steps [4] = '{'{55, 250, 16'h3333}, '{48, 286, 16'h3A92}, '{62, 222, 16'h2D77}, '{55, 250, 16'h3333}};
  real   peak [2][3];

  initial begin : watchdog
    #(600.0e6);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r;
    int w;
    #(10 * TCLK_NS);
    rst_n = 1'b1;
    #(10 * TCLK_NS);

    // register write / read-back
    u_spi.write(7'h01, 8'h00);
    apply(8'd55, 16'd250, 16'h3333, 16'd0, 16'd0);
    u_spi.read(7'h05, r); check(r == 8'hCB, "read K1_L"); n_read++;
    u_spi.read(7'h06, r); check(r == 8'hFF, "read K1_H"); n_read++;
    u_spi.read(7'h07, r); check(r == 8'h33, "read K2_L"); n_read++;
    u_spi.read(7'h02, r); check(r == 8'd55, "read DIV"); n_read++;
    u_spi.read(7'h00, r); check(r == 8'h01, "read RUN"); n_read++;
    u_spi.read(7'h0D, r); check(r == 8'h00, "read unused address"); n_read++;

    #(40.0e6);
    steady_checks(55, 250);
    w = int'(dut.dlyc);
    check(w == comp_fixed(64'hFFCB, 64'h3333), $sformatf("compensator settled word %0d", w));

    for (int m = 0; m < 2; m++) begin
      u_spi.write(7'h01, 8'(m));
      n_write++;
      if (m == 1) n_mode++;
      #(10.0e6);
      steady_checks(55, m ? comp_fixed(64'hFFCB, 64'h3333) : 250);
      for (int s = 1; s < 4; s++) begin
        int dly_before;
        peak_err = 0.0;
        track    = 1'b1;
        apply(8'(steps[s].div), 16'(steps[s].dly), steps[s].k2, 16'd0, 16'd300);
        dly_before = int'(dut.on_time);
        if (m == 1) begin
          // the glide must reach 63 % of the step after one time constant:
          // 2 cycles x 1/(1 - K1) = 2 x 65536/53 cycles = 2.47 ms at 1 MHz
          real from_w, to_w, t0, t63;
          from_w = real'(steps[s-1].k2) / 53.0;
          to_w   = real'(steps[s].k2) / 53.0;
          t0     = $realtime;
          if (to_w > from_w) wait (real'(dut.dlyc) >= from_w + 0.632 * (to_w - from_w));
          else               wait (real'(dut.dlyc) + 1.0 <= from_w + 0.632 * (to_w - from_w));
          t63 = ($realtime - t0) / 1.0e6;
          check(t63 > 2.2 && t63 < 2.75, $sformatf("glide time constant %0.3f ms, expected about 2.47 ms", t63));
          #(3.0e6 - ($realtime - t0));
        end else begin
          #(3.0e6);
        end
        // compensated glide: the on-time word is still between old and new values
        if (m == 1 && int'(dut.on_time) != dly_before && int'(dut.on_time) != comp_fixed(64'hFFCB, longint'(steps[s].k2)))
          n_glide++;
        #(37.0e6);
        track = 1'b0;
        peak[m][s-1] = peak_err;
        $display("MODE=%0d step to DIV=%0d: peak duty error %0.2f %%", m, steps[s].div, 100.0 * peak_err);
        steady_checks(steps[s].div, m ? comp_fixed(64'hFFCB, longint'(steps[s].k2)) : steps[s].dly);
      end
    end
    for (int s = 0; s < 3; s++)
      check(peak[1][s] < peak[0][s], $sformatf("step %0d: compensated error %0.2f %% below uncompensated %0.2f %%", s, 100.0 * peak[1][s], 100.0 * peak[0][s]));

    // disable
    u_spi.write(7'h00, 8'h00);
    #(20 * TCLK_NS);
    w = pwm_pulses;
    #(200 * TCLK_NS);
    check(pwm_pulses == w && pwm == 1'b0, "PWM stays low with RUN = 0");
    if (pwm_pulses == w) n_disable++;

    $display("mechanisms: spi_read=%0d spi_write=%0d offset=%0d div_change=%0d mode_switch=%0d glide=%0d disable=%0d",
             n_read, n_write, n_offset, n_divchg, n_mode, n_glide, n_disable);
    check(n_read > 0 && n_write > 0 && n_offset > 0 && n_divchg > 0 && n_mode > 0 && n_glide > 0 && n_disable > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
