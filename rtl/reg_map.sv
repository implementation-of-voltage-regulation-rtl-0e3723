`timescale 1ns / 1ps
// reg_map - register map of the spread-spectrum controller.
//
// Thirteen byte registers at addresses 0x00..0x0C:
//   0x00 RUN    bit 0: 1 enables the controller output.  Every write of a 1
//               also pulses run_start, which starts the time offset timers
//               and so applies the parameter set written before it.
//   0x01 MODE   bit 0: 0 = constant on-time DLY, 1 = compensator output DLYC
//   0x02 DIV    PLL feedback divider value N
//   0x03/04 DLY     constant on-time word, low/high byte
//   0x05/06 K1      compensator constant K1 (Q0.16), low/high byte
//   0x07/08 K2      compensator constant K2 (Q0.16), low/high byte
//   0x09/0A dTD     divider time offset (controller clock cycles), low/high
//   0x0B/0C dTC     compensator time offset (controller clock cycles), low/high
// Writes take effect on the clock edge after wr_en; reads are combinational
// (rd_data follows rd_addr), unused bits read as zero and addresses beyond
// 0x0C read zero and ignore writes.  All registers reset to zero.
// The addresses and meanings follow the design's register table; bit 0 as
// the RUN/MODE flag, the reset values and the restart-on-RUN rule are
// choices of this implementation.
module reg_map
  import ssc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [6:0]  wr_addr,
  input  logic [7:0]  wr_data,
  input  logic [6:0]  rd_addr,
  output logic [7:0]  rd_data,
  output logic        run,
  output logic        run_start,
  output logic        mode,
  output ssc_params_t params,
  output logic [TOFS_W-1:0] dtd,
  output logic [TOFS_W-1:0] dtc
);
  logic [7:0] regs [NUM_REGS];
  logic [3:0] wa, ra;

  assign wa = wr_addr[3:0];
  assign ra = rd_addr[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
      run_start <= 1'b0;
    end else begin
      run_start <= 1'b0;
      if (wr_en && wr_addr < 7'(NUM_REGS)) begin
        if (wr_addr == A_RUN || wr_addr == A_MODE)
          regs[wa] <= {7'b0, wr_data[0]};
        else
          regs[wa] <= wr_data;
        if (wr_addr == A_RUN && wr_data[0]) run_start <= 1'b1;
      end
    end
  end

  assign rd_data = (rd_addr < 7'(NUM_REGS)) ? regs[ra] : 8'h00;

  assign run        = regs[4'(A_RUN)][0];
  assign mode       = regs[4'(A_MODE)][0];
  assign params.div = regs[4'(A_DIV)];
  assign params.dly = {regs[4'(A_DLY_H)], regs[4'(A_DLY_L)]};
  assign params.k1  = {regs[4'(A_K1_H)],  regs[4'(A_K1_L)]};
  assign params.k2  = {regs[4'(A_K2_H)],  regs[4'(A_K2_L)]};
  assign dtd        = {regs[4'(A_TD_H)],  regs[4'(A_TD_L)]};
  assign dtc        = {regs[4'(A_TC_H)],  regs[4'(A_TC_L)]};

endmodule
