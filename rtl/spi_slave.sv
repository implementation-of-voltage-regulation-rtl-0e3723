`timescale 1ns / 1ps
// spi_slave - SPI slave that turns two-byte transfers into register accesses.
//
// A transfer is framed by CSn low and carries an address byte ADDR followed
// by a data byte DATA, each most significant bit first, SPI mode 0 (SCLK idle
// low, MOSI sampled on the rising edge, MISO changed on the falling edge).
// ADDR[7] = 0 writes DATA to register ADDR[6:0]: wr_en pulses for one clk
// cycle after the 16th rising SCLK edge.  ADDR[7] = 1 reads: after the 8th
// bit the slave fetches rd_data for ADDR[6:0] and shifts it out on MISO
// during the data byte, the MOSI data byte being ignored.  Bits beyond the
// 16th are ignored until CSn rises; raising CSn early aborts the transfer.
//
// SCLK, CSn and MOSI are sampled with the controller clock through two-flop
// synchronisers and the SCLK edges are found from the samples, so the whole
// slave lives in the clk domain.  SCLK must therefore be at most f_clk/8.
// MISO is driven low outside a read data byte.  The two-byte ADDR/DATA
// framing is the design's; the read flag, the SPI mode and the oversampling
// are choices of this implementation.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  // SPI pins
  input  logic       sclk,
  input  logic       csn,
  input  logic       mosi,
  output logic       miso,
  // register map access
  output logic       wr_en,
  output logic [6:0] addr,
  output logic [7:0] wr_data,
  input  logic [7:0] rd_data
);
  logic [2:0] sclk_s;          // [0] first stage, [1] second, [2] previous
  logic [1:0] csn_s, mosi_s;   // [0] first stage, [1] second
  logic       sclk_rise, sclk_fall, cs_act;
  logic [4:0] bit_cnt;
  logic [7:0] shreg;
  logic [7:0] txreg;
  logic       rd_flag;
  logic       tx_loaded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= 3'b000;
      csn_s  <= 2'b11;
      mosi_s <= 2'b00;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      csn_s  <= {csn_s[0], csn};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  assign sclk_rise = sclk_s[1] & ~sclk_s[2];
  assign sclk_fall = ~sclk_s[1] & sclk_s[2];
  assign cs_act    = ~csn_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt <= '0;
      shreg   <= '0;
      txreg   <= '0;
      addr    <= '0;
      rd_flag <= 1'b0;
      tx_loaded <= 1'b0;
      wr_en   <= 1'b0;
      wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      if (!cs_act) begin
        bit_cnt <= '0;
        txreg   <= '0;
        rd_flag <= 1'b0;
        tx_loaded <= 1'b0;
      end else begin
        if (sclk_rise && bit_cnt < 5'd16) begin
          shreg   <= {shreg[6:0], mosi_s[1]};
          bit_cnt <= bit_cnt + 5'd1;
          if (bit_cnt == 5'd7) begin
            addr    <= {shreg[5:0], mosi_s[1]};
            rd_flag <= shreg[6];
          end
          if (bit_cnt == 5'd15 && !rd_flag) begin
            wr_en   <= 1'b1;
            wr_data <= {shreg[6:0], mosi_s[1]};
          end
        end
        // one cycle after the address byte is complete: fetch read data
        if (bit_cnt == 5'd8 && rd_flag && !tx_loaded) begin
          txreg     <= rd_data;
          tx_loaded <= 1'b1;
        end
        if (sclk_fall && bit_cnt > 5'd8 && bit_cnt < 5'd16) begin
          txreg <= {txreg[6:0], 1'b0};
        end
      end
    end
  end

  // the write strobe is a single-cycle pulse
  a_wr_pulse: assert property (@(posedge clk) disable iff (!rst_n) wr_en |=> !wr_en);

  assign miso = cs_act & rd_flag & (bit_cnt >= 5'd8) & txreg[7];

endmodule
