`timescale 1ns / 1ps
// delay_line - behavioural model of the tapped delay-cell chain.
//
// Behavioural model, not synthesizable: it stands for a chain of
// 2^W - 1 delay standard cells with a tap multiplexer, as placed in the
// physical design.  Each edge of din appears on dout after tap * CELL_DELAY_NS
// nanoseconds (transport delay: every edge is passed on, pulses are not
// swallowed).  The delay is fixed by the tap value present when the edge
// enters the line.  A tap of zero gives zero delay.  The 2 ns cell delay is
// the design's resolution; the multiplexer structure is not specified and
// is left to the physical implementation.
module delay_line #(
  parameter int unsigned W             = 10,
  parameter real         CELL_DELAY_NS = 2.0
) (
  input  logic         din,
  input  logic [W-1:0] tap,
  output logic         dout
);
  initial dout = 1'b0;

  // One process per edge: the edge's value and delay are captured when it
  // enters the line, so edges closer together than the delay are all kept.
  always @(din) begin
    automatic logic    v   = din;
    automatic realtime dly = real'(tap) * CELL_DELAY_NS;
    fork
      begin
        #(dly);
        dout = v;
      end
    join_none
  end
endmodule
