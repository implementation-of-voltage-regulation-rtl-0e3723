`timescale 1ns / 1ps
// bus_sync - brings a slowly changing multi-bit word into another clock domain.
//
// The word passes two flip-flop stages clocked by the destination clock; the
// output register takes the second stage only when both stages hold the same
// value, so a word caught while its bits were changing is never used.  The
// output therefore follows a stable input three destination clock edges
// later.  The source must hold a new value for at least two destination
// clock periods.  Asynchronous active-low reset clears all stages to RESET_VAL.
// This synchroniser is a choice of this design: the controller has two clock
// domains (controller clock and PLL clock) and the crossing is not specified.
module bus_sync #(
  parameter int unsigned   W         = 8,
  parameter logic [W-1:0]  RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= RESET_VAL;
      s2 <= RESET_VAL;
      q  <= RESET_VAL;
    end else begin
      s1 <= d;
      s2 <= s1;
      if (s1 == s2) q <= s2;
    end
  end
endmodule
