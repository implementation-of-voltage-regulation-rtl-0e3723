`timescale 1ns / 1ps
// first_order_comp - first-order (exponential) on-time compensator.
//
// Computes the difference equation tON[n] = K1 * tON[n-1] + K2, which is the
// rearranged form of tON[n] = tON[n-1] + (T/tau) * (tON,trgt - tON[n-1]) with
// K1 = 1 - T/tau and K2 = (T/tau) * tON,trgt.  The on-time converges
// exponentially to K2 / (1 - K1), in delay-cell units.
//
// Data path (fixed point, unsigned):
//   K1 (Q0.16)     = {K1_FIX_W ones, k1[FRAC_W-K1_FIX_W-1:0]}: the upper bits
//                    of K1 are fixed at one, only the lower bits are used.
//   product (Q10.32) = K1 * Stage 2, truncated by >> 16 to Q10.16 -> Stage 1
//   Stage 2 (Q10.16) = Stage 1 + K2 (K2 zero-extended, Q0.16)
//   dlyc   (Q10.0)   = Stage 2 >> 16 (truncated)
// Both Stage 1 and Stage 2 are registers, and the multiplier is fed back
// from Stage 2, so one iteration of the equation takes two clock cycles and
// two interleaved sequences (even and odd cycles) run in the pipeline; both
// converge to the same value.  A change of K2 reaches dlyc one cycle later.
// The sum wraps if K2/(1-K1) reaches 2^DLY_W, so K1 and K2 must be chosen
// below that.  Reset clears both stages; the compensator runs on every clock
// edge.  The formats, the fixed upper K1 bits and the two-stage pipeline
// follow the design; truncation as the rounding and the reset value are this
// implementation's choices.
module first_order_comp
  import ssc_pkg::*;
#(
  parameter int unsigned INT_W  = DLY_W,
  parameter int unsigned F_W    = FRAC_W,
  parameter int unsigned FIX_W  = K1_FIX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [F_W-1:0]   k1,    // only the lower F_W-FIX_W bits are used
  input  logic [F_W-1:0]   k2,
  output logic [INT_W-1:0] dlyc
);
  localparam int unsigned ST_W = INT_W + F_W;        // Q10.16
  localparam int unsigned PR_W = ST_W + F_W;         // Q10.32

  logic [F_W-1:0]  k1_full;
  logic [PR_W-1:0] product;
  logic [ST_W-1:0] stage1, stage2;

  assign k1_full = {{FIX_W{1'b1}}, k1[F_W-FIX_W-1:0]};
  assign product = PR_W'(k1_full) * PR_W'(stage2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1 <= '0;
      stage2 <= '0;
    end else begin
      stage1 <= product[PR_W-1:F_W];
      stage2 <= stage1 + ST_W'(k2);
    end
  end

  assign dlyc = stage2[ST_W-1:F_W];

endmodule
