`timescale 1ns / 1ps
// ssc_top - spread-spectrum buck-converter controller with on-time compensation.
//
// The controller works with an external PLL oscillator.  Its programmable
// divider sits in the PLL feedback loop (f_div = f_pll / DIV'), so changing
// DIV moves the switching frequency f_pll; its duty-cycle controller turns
// every f_pll period into a PWM pulse whose on-time is a number of delay
// cells.  Because the PLL settles to a new frequency with a second-order
// transient, a fixed on-time word would give a duty-cycle error while the
// frequency moves.  The first-order compensator therefore lets the on-time
// word glide exponentially to its new value, tON[n] = K1*tON[n-1] + K2.
//
// Blocks: spi_slave (SPI pins -> register writes and reads), reg_map
// (RUN, MODE, DIV, DLY, K1, K2, dTD, dTC), time_offset_ctrl (writing RUN = 1
// applies DIV after dTD and DLY/K1/K2 after dTC controller cycles),
// first_order_comp (DLYC), on_time_mux (MODE selects DLY' or DLYC),
// freq_divider and duty_cycle_ctrl (both clocked by f_pll).
//
// Clocks: clk is the controller clock; its period is the time step T of the
// compensator constants.  f_pll is the PLL output.  rst_n is an asynchronous
// active-low reset for both domains.  SCLK must be at most f_clk/8.
// PWM is held low while RUN = 0.  The block structure follows the design;
// the clocking, reset and synchronisers are this implementation's choices.
module ssc_top
  import ssc_pkg::*;
#(
  parameter int unsigned W             = DLY_W,
  parameter real         CELL_DELAY_NS = 2.0
) (
  input  logic clk,
  input  logic rst_n,
  // SPI
  input  logic sclk,
  input  logic csn,
  input  logic mosi,
  output logic miso,
  // PLL interface
  input  logic f_pll,
  output logic f_div,
  // switching signal of the buck converter
  output logic pwm
);
  logic              wr_en;
  logic [6:0]        addr;
  logic [7:0]        wr_data, rd_data;
  logic              run, run_start, mode;
  ssc_params_t       params, params_q;
  logic [TOFS_W-1:0] dtd, dtc;
  logic              div_applied, comp_applied;
  logic [W-1:0]      dlyc, on_time;

  spi_slave u_spi (
    .clk, .rst_n, .sclk, .csn, .mosi, .miso,
    .wr_en, .addr, .wr_data, .rd_data
  );

  reg_map u_regs (
    .clk, .rst_n,
    .wr_en, .wr_addr(addr), .wr_data,
    .rd_addr(addr), .rd_data,
    .run, .run_start, .mode, .params, .dtd, .dtc
  );

  time_offset_ctrl u_tofs (
    .clk, .rst_n, .run_start, .dtd, .dtc, .params, .params_q,
    .div_applied, .comp_applied
  );

  first_order_comp #(.INT_W(W)) u_comp (
    .clk, .rst_n, .k1(params_q.k1), .k2(params_q.k2), .dlyc
  );

  on_time_mux #(.W(W)) u_mux (
    .clk, .rst_n, .mode, .dly(params_q.dly), .dlyc, .on_time
  );

  freq_divider u_div (
    .f_pll, .rst_n, .div_n(params_q.div), .f_div
  );

  duty_cycle_ctrl #(.W(W), .CELL_DELAY_NS(CELL_DELAY_NS)) u_dcc (
    .f_pll, .rst_n, .enable(run), .on_time, .pwm
  );

endmodule
