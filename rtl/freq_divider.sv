`timescale 1ns / 1ps
// freq_divider - programmable 1/N frequency divider in the PLL feedback path.
//
// Counts f_PLL cycles from 0 to N-1 and drives f_DIV high for the first
// floor(N/2) of them, so f_DIV = f_PLL / N and one f_DIV rising edge follows
// every N-th f_PLL rising edge.  N comes from the controller clock domain
// (DIV'): it is brought into the f_PLL domain by a bus synchroniser and a new
// value is taken only at the end of a divider period, so no period is cut
// short.  Values of N below 2 are treated as 2.  f_DIV is a register output.
// The reset (asynchronous assert, released in step with f_PLL) puts the
// counter at the start of a period with N = 2.  The function follows the
// design; the counting scheme, the duty of f_DIV and the handling of small N
// are this implementation's choices.
module freq_divider
  import ssc_pkg::*;
#(
  parameter int unsigned W = DIV_W
) (
  input  logic         f_pll,
  input  logic         rst_n,
  input  logic [W-1:0] div_n,
  output logic         f_div
);
  logic         rst_n_p;
  logic [W-1:0] n_sync, n_cur, n_new, cnt, cnt_nx;

  reset_sync u_rst (.clk(f_pll), .rst_n(rst_n), .rst_n_sync(rst_n_p));

  bus_sync #(.W(W)) u_sync (.clk(f_pll), .rst_n(rst_n_p), .d(div_n), .q(n_sync));

  assign n_new = (n_sync < W'(2)) ? W'(2) : n_sync;

  always_comb begin
    if (cnt >= n_cur - W'(1)) cnt_nx = '0;
    else                      cnt_nx = cnt + W'(1);
  end

  always_ff @(posedge f_pll or negedge rst_n_p) begin
    if (!rst_n_p) begin
      cnt   <= '0;
      n_cur <= W'(2);
      f_div <= 1'b1;
    end else begin
      cnt <= cnt_nx;
      if (cnt_nx == '0) begin
        n_cur <= n_new;
        f_div <= 1'b1;
      end else begin
        f_div <= (cnt_nx < (n_cur >> 1));
      end
    end
  end

endmodule
