// SPI slave holding one data byte.
//
// The slave counts SCLK rising edges while chip select is low. The first
// ADDR_W bits on MOSI are the address, the next is the R/W bit (1 = write),
// the last 8 are data; all arrive least significant first and enter the
// shift registers at the top. On the falling edge after the R/W bit the
// slave loads its data register into its transmit shift register and drives
// bit 0 on MISO, then one bit per falling edge, so the master always
// receives the byte held before this transfer. At the end of a write frame
// the received byte replaces the data register; a read frame leaves it
// unchanged. Raising chip select at any time aborts the frame.
//
// SCLK, MOSI and CS_n pass two-flop synchronisers, so the slave needs an
// SCLK half period of at least 4 system clocks (MISO changes 3 clocks after
// a falling edge and must be steady before the master samples it).
//
// Interface: o_miso is driven low while chip select is high (this model has
// no tri-state bus). o_frame_valid pulses for one cycle at the last rising
// edge of a complete frame, with o_addr, o_rw and o_rx_data describing it;
// o_data is the stored byte, RESET_DATA after reset.
//
// From the source article: the 8-bit shift register fed at bit 7 and emptied from
// bit 0, the full-duplex exchange and the address/R/W/data frame. This
// implementation's own: the single stored byte standing for the slave's
// storage, the oversampled interface and SPI mode 0.
module spi_slave
  import comm_pkg::*;
#(
  parameter int unsigned       ADDR_W     = 8,
  parameter logic [DATA_W-1:0] RESET_DATA = '0
) (
  input  logic              i_clk,
  input  logic              i_rst,          // synchronous, active high
  input  logic              i_sclk,
  input  logic              i_mosi,
  input  logic              i_cs_n,
  output logic              o_miso,
  output logic [DATA_W-1:0] o_data,         // stored byte
  output logic [ADDR_W-1:0] o_addr,
  output logic              o_rw,
  output logic [DATA_W-1:0] o_rx_data,      // byte received in the last frame
  output logic              o_frame_valid
);

  localparam int unsigned FRAME = ADDR_W + 1 + DATA_W;
  localparam int unsigned CNT_W = $clog2(FRAME + 1);

  logic [1:0]        sclk_sync, mosi_sync, cs_sync;
  logic              sclk_p;
  logic              sclk_s, mosi_s, cs_n_s;
  logic              rise, fall;
  logic [CNT_W-1:0]  cnt;
  logic [ADDR_W-1:0] addr_sh;
  logic [DATA_W-2:0] rx_sh;      // first seven data bits
  logic [DATA_W-1:0] tx_sh;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      sclk_sync <= '0;
      mosi_sync <= '0;
      cs_sync   <= '1;
      sclk_p    <= 1'b0;
    end else begin
      sclk_sync <= {sclk_sync[0], i_sclk};
      mosi_sync <= {mosi_sync[0], i_mosi};
      cs_sync   <= {cs_sync[0], i_cs_n};
      sclk_p    <= sclk_sync[1];
    end
  end

  assign sclk_s = sclk_sync[1];
  assign mosi_s = mosi_sync[1];
  assign cs_n_s = cs_sync[1];
  assign rise   = sclk_s && !sclk_p;
  assign fall   = !sclk_s && sclk_p;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      cnt           <= '0;
      addr_sh       <= '0;
      rx_sh         <= '0;
      tx_sh         <= '0;
      o_miso        <= 1'b0;
      o_data        <= RESET_DATA;
      o_addr        <= '0;
      o_rw          <= 1'b0;
      o_rx_data     <= '0;
      o_frame_valid <= 1'b0;
    end else begin
      o_frame_valid <= 1'b0;
      if (cs_n_s) begin
        cnt    <= '0;
        o_miso <= 1'b0;
      end else if (rise) begin
        if (cnt < CNT_W'(FRAME)) cnt <= cnt + 1'b1;
        if (cnt < CNT_W'(ADDR_W)) begin
          addr_sh <= {mosi_s, addr_sh[ADDR_W-1:1]};
        end else if (cnt == CNT_W'(ADDR_W)) begin
          o_addr <= addr_sh;
          o_rw   <= mosi_s;
        end else if (cnt < CNT_W'(FRAME)) begin
          rx_sh <= {mosi_s, rx_sh[DATA_W-2:1]};
          if (cnt == CNT_W'(FRAME - 1)) begin
            o_rx_data     <= {mosi_s, rx_sh};
            o_frame_valid <= 1'b1;
            if (o_rw) o_data <= {mosi_s, rx_sh};
          end
        end
      end else if (fall) begin
        if (cnt == CNT_W'(ADDR_W + 1)) begin
          tx_sh  <= o_data;
          o_miso <= o_data[0];
        end else if (cnt > CNT_W'(ADDR_W + 1) && cnt < CNT_W'(FRAME)) begin
          tx_sh  <= tx_sh >> 1;
          o_miso <= tx_sh[1];
        end
      end
    end
  end

endmodule
