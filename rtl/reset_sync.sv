`timescale 1ns / 1ps
// reset_sync - asynchronous-assert, synchronous-release reset for one clock.
//
// rst_n low clears the output at once; after rst_n rises the output rises on
// the second following clock edge, so the flip-flops of that domain leave
// reset in step with their clock.  Used for the PLL-clock domain; this is a
// choice of this design.
module reset_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_n_sync
);
  logic r1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1         <= 1'b0;
      rst_n_sync <= 1'b0;
    end else begin
      r1         <= 1'b1;
      rst_n_sync <= r1;
    end
  end
endmodule
