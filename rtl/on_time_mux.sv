`timescale 1ns / 1ps
// on_time_mux - chooses the on-time word sent to the duty-cycle controller.
//
// MODE = 0 selects the constant on-time DLY' (its lower W bits, the width of
// the duty-cycle controller's control word), MODE = 1 the compensator
// output DLYC.  The choice is registered, so the word leaving the controller
// clock domain comes straight from a flip-flop and cannot glitch; the output
// follows its inputs one controller clock later and resets to zero.  The
// selection follows the design; the output register is this
// implementation's choice.
module on_time_mux
  import ssc_pkg::*;
#(
  parameter int unsigned W = DLY_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mode,
  input  logic [15:0]  dly,
  input  logic [W-1:0] dlyc,
  output logic [W-1:0] on_time
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) on_time <= '0;
    else        on_time <= mode ? dlyc : dly[W-1:0];
  end
endmodule
