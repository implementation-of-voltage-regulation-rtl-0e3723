`timescale 1ns / 1ps
// ssc_pkg - shared constants and types of the spread-spectrum controller.
//
// Holds the register addresses of the SPI register map, the widths of the
// fixed-point words used by the first-order on-time compensator and the
// bundle of run-time parameters that the register map hands to the time
// offset controller.  Addresses follow the register table of the design;
// the read/write flag in bit 7 of the address byte is this design's choice.
package ssc_pkg;

  // On-time control word of the duty-cycle controller: number of delay
  // cells, i.e. the integer part of the Q10.16 compensator state.
  localparam int unsigned DLY_W    = 10;
  // Fractional bits of the Q0.16 constants and of the Q10.16 state.
  localparam int unsigned FRAC_W   = 16;
  // Fixed upper bits of K1 (all ones); only the lower bits are programmable.
  localparam int unsigned K1_FIX_W = 6;
  // Width of the PLL divider value and of the two time-offset timers.
  localparam int unsigned DIV_W    = 8;
  localparam int unsigned TOFS_W   = 16;

  // Register addresses (7-bit; bit 7 of the SPI address byte selects read).
  typedef enum logic [6:0] {
    A_RUN   = 7'h00,
    A_MODE  = 7'h01,
    A_DIV   = 7'h02,
    A_DLY_L = 7'h03,
    A_DLY_H = 7'h04,
    A_K1_L  = 7'h05,
    A_K1_H  = 7'h06,
    A_K2_L  = 7'h07,
    A_K2_H  = 7'h08,
    A_TD_L  = 7'h09,
    A_TD_H  = 7'h0A,
    A_TC_L  = 7'h0B,
    A_TC_H  = 7'h0C
  } reg_addr_e;

  localparam int unsigned NUM_REGS = 13;

  // Parameters that pass through the time offset controller.
  typedef struct packed {
    logic [DIV_W-1:0]  div;  // PLL feedback divider N
    logic [15:0]       dly;  // constant on-time word (delay cells)
    logic [15:0]       k1;   // compensator constant K1, Q0.16
    logic [15:0]       k2;   // compensator constant K2, Q0.16
  } ssc_params_t;

endpackage
