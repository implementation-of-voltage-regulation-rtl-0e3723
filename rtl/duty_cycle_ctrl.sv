`timescale 1ns / 1ps
// duty_cycle_ctrl - generates the PWM switching signal of the buck converter.
//
// Every rising edge of f_PLL starts an on-time: PWM rises at that edge and
// falls when the same f_PLL edge, delayed by on_time delay cells of
// CELL_DELAY_NS each, leaves the delay line.  The on-time is therefore
// t_ON = on_time * CELL_DELAY_NS and the duty cycle D = t_ON * f_PLL.
//
// Two flip-flops form the pulse: t_set toggles on each f_PLL rising edge
// (when enabled), t_clr copies t_set on each rising edge of the delayed
// clock, and PWM = t_set XOR t_clr.  This works for any on-time shorter than
// one f_PLL period and has no reset path that could hold PWM low into the
// next period.  When enable is low t_set stops toggling, so PWM stays low
// after the current pulse.  The on-time word and enable come from the
// controller clock domain through bus synchronisers and take effect on the
// next f_PLL rising edge after they have settled (three f_PLL cycles).
// The pulse start on f_PLL and the delay-cell on-time follow the design;
// the toggle-pair pulse circuit and the synchronisers are this
// implementation's choices.
module duty_cycle_ctrl
  import ssc_pkg::*;
#(
  parameter int unsigned W             = DLY_W,
  parameter real         CELL_DELAY_NS = 2.0
) (
  input  logic         f_pll,
  input  logic         rst_n,
  input  logic         enable,
  input  logic [W-1:0] on_time,
  output logic         pwm
);
  logic         rst_n_p;
  logic [W-1:0] tap;
  logic         en_p;
  logic         f_dly;
  logic         t_set, t_clr;

  reset_sync u_rst (.clk(f_pll), .rst_n(rst_n), .rst_n_sync(rst_n_p));

  bus_sync #(.W(W)) u_sync_word (.clk(f_pll), .rst_n(rst_n_p), .d(on_time), .q(tap));
  bus_sync #(.W(1)) u_sync_en   (.clk(f_pll), .rst_n(rst_n_p), .d(enable),  .q(en_p));

  delay_line #(.W(W), .CELL_DELAY_NS(CELL_DELAY_NS)) u_line (
    .din(f_pll), .tap(tap), .dout(f_dly)
  );

  always_ff @(posedge f_pll or negedge rst_n_p) begin
    if (!rst_n_p)  t_set <= 1'b0;
    else if (en_p) t_set <= ~t_set;
  end

  always_ff @(posedge f_dly or negedge rst_n_p) begin
    if (!rst_n_p) t_clr <= 1'b0;
    else          t_clr <= t_set;
  end

  assign pwm = t_set ^ t_clr;

endmodule
