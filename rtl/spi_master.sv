// SPI master with an address phase and a read/write branch.
//
// The state machine follows the source article's SPI diagram: IDLE -> ENABLE (the
// request is checked again; if i_ena has dropped the master goes back to
// IDLE) -> CS (chip select driven low for half an SCLK period before the
// first edge) -> ADDRESS (ADDR_W address bits) -> RW (one R/W bit; 1 selects
// DATA, 0 selects READ_DATA) -> DATA (8 bits of i_wr_data sent on MOSI) or
// READ_DATA (8 bits taken from MISO while MOSI is held low) -> STOP (chip
// select held half a period, then released) -> IDLE.
//
// Bits are sent least significant first: the master's shift register shifts
// towards bit 0 and bit 0 drives MOSI, while MISO enters at the top, so
// after eight bits the received byte is aligned. MISO is captured in DATA as
// well as in READ_DATA: SPI is full duplex, and during a write the master
// receives the byte the slave held before.
//
// Timing (SPI mode 0): SCLK idles low. Each bit is SCLK_HALF clocks with
// SCLK low (MOSI changes at its start) followed by SCLK_HALF clocks with SCLK
// high; the slave samples MOSI on the rising edge, the master samples MISO
// on the last cycle of the high half. All bus outputs are registered, so
// they follow the state machine one clock later. A transfer takes
// 2 + SCLK_HALF*(2*(ADDR_W+9)+2) clocks from the i_ena cycle to o_done.
//
// Interface: i_ena high in IDLE latches i_addr, i_rw and i_wr_data; o_busy
// is high until the transfer ends; o_done pulses for one cycle at the end,
// when o_rd_data holds the byte received on MISO.
//
// From the source article: the state sequence and branch, the single chip select,
// full-duplex exchange through 8-bit shift registers, data leaving from bit 0
// and entering at bit 7. This implementation's own choices: the address
// width (8, the width of the shift registers shown), the R/W polarity
// reading of the diagram (YES = write), SPI mode 0, the SCLK divider and the
// chip-select setup and hold of half a period.
module spi_master
  import comm_pkg::*;
#(
  parameter int unsigned ADDR_W    = 8,
  parameter int unsigned SCLK_HALF = 4   // system clocks per SCLK half period
) (
  input  logic              i_clk,
  input  logic              i_rst,      // synchronous, active high
  input  logic              i_ena,
  input  logic [ADDR_W-1:0] i_addr,
  input  logic              i_rw,       // 1 = write, 0 = read
  input  logic [DATA_W-1:0] i_wr_data,
  output logic [DATA_W-1:0] o_rd_data,
  output logic              o_busy,
  output logic              o_done,     // one-cycle pulse at end of transfer
  output logic              o_sclk,
  output logic              o_mosi,
  output logic              o_cs_n,
  input  logic              i_miso
);

  localparam int unsigned CNT_W  = (SCLK_HALF > 1) ? $clog2(SCLK_HALF) : 1;
  localparam int unsigned BCNT_W = $clog2(ADDR_W + 1);
  localparam logic [CNT_W-1:0] HLAST = CNT_W'(SCLK_HALF - 1);

  spi_state_e         state;
  logic [CNT_W-1:0]   cnt;
  logic               ht;        // last cycle of a half period
  logic               ph;        // 0 = SCLK low half, 1 = SCLK high half
  logic [BCNT_W-1:0]  bit_cnt;
  logic [ADDR_W-1:0]  addr_sh;
  logic [DATA_W-1:0]  wr_sh, rd_sh;
  logic               rw;
  logic               sclk_d, mosi_d, cs_n_d;
  logic               bit_end;   // last cycle of a bit

  assign ht      = (cnt == HLAST);
  assign bit_end = ht && ph;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      state     <= SPI_IDLE;
      cnt       <= '0;
      ph        <= 1'b0;
      bit_cnt   <= '0;
      addr_sh   <= '0;
      wr_sh     <= '0;
      rd_sh     <= '0;
      rw        <= 1'b0;
      o_rd_data <= '0;
      o_busy    <= 1'b0;
      o_done    <= 1'b0;
    end else begin
      o_done <= 1'b0;
      // Half-period counter runs in every state that times the bus.
      if (state inside {SPI_IDLE, SPI_ENABLE}) begin
        cnt <= '0;
        ph  <= 1'b0;
      end else begin
        cnt <= ht ? '0 : cnt + 1'b1;
        if (ht) ph <= !ph;
      end
      unique case (state)
        SPI_IDLE: begin
          if (i_ena) begin
            addr_sh <= i_addr;
            rw      <= i_rw;
            wr_sh   <= i_wr_data;
            o_busy  <= 1'b1;
            state   <= SPI_ENABLE;
          end
        end
        SPI_ENABLE: begin
          if (i_ena) begin
            state <= SPI_CS;
          end else begin
            o_busy <= 1'b0;
            state  <= SPI_IDLE;
          end
        end
        SPI_CS: begin
          // One half period of chip-select setup, SCLK low.
          if (ht) begin
            ph      <= 1'b0;
            bit_cnt <= '0;
            state   <= SPI_ADDRESS;
          end
        end
        SPI_ADDRESS: begin
          if (bit_end) begin
            addr_sh <= addr_sh >> 1;
            if (bit_cnt == BCNT_W'(ADDR_W - 1)) state <= SPI_RW;
            else                                 bit_cnt <= bit_cnt + 1'b1;
          end
        end
        SPI_RW: begin
          if (bit_end) begin
            bit_cnt <= '0;
            state   <= rw ? SPI_DATA : SPI_READ_DATA;
          end
        end
        SPI_DATA, SPI_READ_DATA: begin
          if (bit_end) begin
            rd_sh   <= {i_miso, rd_sh[DATA_W-1:1]};
            wr_sh   <= wr_sh >> 1;
            bit_cnt <= bit_cnt + 1'b1;
            if (bit_cnt == BCNT_W'(DATA_W - 1)) state <= SPI_STOP;
          end
        end
        SPI_STOP: begin
          // One half period of chip-select hold, then release.
          if (ht) begin
            o_rd_data <= rd_sh;
            o_done    <= 1'b1;
            o_busy    <= 1'b0;
            state     <= SPI_IDLE;
          end
        end
        default: state <= SPI_IDLE;
      endcase
    end
  end

  always_comb begin
    sclk_d = 1'b0;
    mosi_d = 1'b0;
    cs_n_d = 1'b1;
    unique case (state)
      SPI_IDLE, SPI_ENABLE: ;
      SPI_CS, SPI_STOP: cs_n_d = 1'b0;
      SPI_ADDRESS: begin
        cs_n_d = 1'b0;
        sclk_d = ph;
        mosi_d = addr_sh[0];
      end
      SPI_RW: begin
        cs_n_d = 1'b0;
        sclk_d = ph;
        mosi_d = rw;
      end
      SPI_DATA: begin
        cs_n_d = 1'b0;
        sclk_d = ph;
        mosi_d = wr_sh[0];
      end
      SPI_READ_DATA: begin
        cs_n_d = 1'b0;
        sclk_d = ph;
      end
      default: ;
    endcase
  end

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      o_sclk <= 1'b0;
      o_mosi <= 1'b0;
      o_cs_n <= 1'b1;
    end else begin
      o_sclk <= sclk_d;
      o_mosi <= mosi_d;
      o_cs_n <= cs_n_d;
    end
  end

  // SCLK only toggles while the slave is selected.
  a_sclk_needs_cs: assert property (@(posedge i_clk) disable iff (i_rst)
    o_sclk |-> !o_cs_n);

endmodule
