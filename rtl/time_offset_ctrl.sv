`timescale 1ns / 1ps
// time_offset_ctrl - delays the application of a new parameter set.
//
// Two down-counting timers.  A run_start pulse loads the divider timer with
// dTD and the compensator timer with dTC.  When the divider timer has run
// out, the register value DIV is copied to DIV' (div_q); when the compensator
// timer has run out, DLY, K1 and K2 are copied to DLY', K1' and K2'.  The
// timer is loaded on the edge that sees run_start and the copy is made dT+1
// edges later, i.e. dT+2 edges after the edge that raised run_start (the
// edge that wrote RUN), together with a one-cycle *_applied pulse.  So dT
// sets the start of the on-time change relative to the start of the PLL
// frequency change.  A new run_start while a timer is counting
// restarts it.  The outputs hold their values between applications and reset
// to zero.  Values are copied when a timer expires, not when it starts.
// The timers and the parameter grouping follow the design; the count
// convention, the restart rule and the copy-at-expiry are this
// implementation's choices.
module time_offset_ctrl
  import ssc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run_start,
  input  logic [TOFS_W-1:0] dtd,
  input  logic [TOFS_W-1:0] dtc,
  input  ssc_params_t       params,
  output ssc_params_t       params_q,
  output logic              div_applied,   // one-cycle pulse when DIV' is loaded
  output logic              comp_applied   // one-cycle pulse when DLY'/K1'/K2' are loaded
);
  logic [TOFS_W-1:0] cnt_d, cnt_c;
  logic              arm_d, arm_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_d        <= '0;
      cnt_c        <= '0;
      arm_d        <= 1'b0;
      arm_c        <= 1'b0;
      params_q     <= '0;
      div_applied  <= 1'b0;
      comp_applied <= 1'b0;
    end else begin
      div_applied  <= 1'b0;
      comp_applied <= 1'b0;
      if (run_start) begin
        cnt_d <= dtd;
        arm_d <= 1'b1;
      end else if (arm_d) begin
        if (cnt_d == '0) begin
          params_q.div <= params.div;
          arm_d        <= 1'b0;
          div_applied  <= 1'b1;
        end else begin
          cnt_d <= cnt_d - 1'b1;
        end
      end
      if (run_start) begin
        cnt_c <= dtc;
        arm_c <= 1'b1;
      end else if (arm_c) begin
        if (cnt_c == '0) begin
          params_q.dly <= params.dly;
          params_q.k1  <= params.k1;
          params_q.k2  <= params.k2;
          arm_c        <= 1'b0;
          comp_applied <= 1'b1;
        end else begin
          cnt_c <= cnt_c - 1'b1;
        end
      end
    end
  end

  // DIV' and K2' change only together with their apply pulses
  a_div_apply:  assert property (@(posedge clk) disable iff (!rst_n)
                                 $changed(params_q.div) |-> div_applied);
  a_comp_apply: assert property (@(posedge clk) disable iff (!rst_n)
                                 $changed(params_q.k2) |-> comp_applied);

endmodule
