`timescale 1ns / 1ps
// pll_model - behavioural model of the external PLL oscillator (testbench only).
//
// The oscillator frequency f follows a second-order loop: at every rising
// edge of the divider output f_div the model measures the f_div period,
// forms the frequency error e = N_LOOP * (F_REF_HZ - f_div_measured), which
// is about (target f_pll - f_pll), and integrates
//     g += (WN^2 * e - 2 * ZETA * WN * g) * dt,   f += g * dt,
// i.e. f'' + 2*ZETA*WN*f' + WN^2*f = WN^2*f_target.  The divider value N
// of the controller thus sets the locked frequency N * F_REF_HZ, and a step
// of N gives the damped, overshooting frequency transient of a real PLL.
// f_pll is a 50 % square wave whose half period is recomputed every edge.
module pll_model #(
  parameter real F_REF_HZ   = 1.0e6 / 55.0,
  parameter real F_START_HZ = 1.0e6,
  parameter real N_LOOP     = 55.0,
  parameter real WN         = 2.0 * 3.14159265 * 165.0,
  parameter real ZETA       = 0.5
) (
  input  logic f_div,
  output logic f_pll
);
  real     f_hz, g, e, dt;
  realtime last_t;
  bit      have_last;

  initial begin
    f_pll     = 1'b0;
    f_hz      = F_START_HZ;
    g         = 0.0;
    last_t    = 0;
    have_last = 1'b0;
  end

  always begin
    #(0.5e9 / f_hz);
    f_pll = ~f_pll;
  end

  always @(posedge f_div) begin
    if (have_last) begin
      dt = ($realtime - last_t) * 1.0e-9;
      if (dt > 0.0) begin
        e    = N_LOOP * (F_REF_HZ - 1.0 / dt);
        g    = g + (WN * WN * e - 2.0 * ZETA * WN * g) * dt;
        f_hz = f_hz + g * dt;
        if (f_hz < 1.0e4) f_hz = 1.0e4;
      end
    end
    last_t    = $realtime;
    have_last = 1'b1;
  end
endmodule
