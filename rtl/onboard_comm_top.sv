// Three low-power serial interfaces, each built as a finite state machine,
// side by side in one block: a full-duplex UART, an I2C master with its
// slave, and an SPI master with its slave. They share only the clock and
// reset; each brings out its own ports.
//
// UART: the transceiver's serial lines are ports, to be connected TX to RX
// with another UART (or looped back).
//
// I2C: SCL and SDA are open-drain lines with pull-up resistors. Inside this
// block a line is high unless the master or the slave pulls it low (a
// wired AND), which is what the resistors do on a board; the resolved levels
// are brought out as o_i2c_scl and o_i2c_sda for observation. The master's
// transfer request and result are ports, as are the slave's received byte
// (o_i2c_dout) and the byte it returns to reads (i_i2c_slave_din).
//
// SPI: the master drives SCLK, MOSI and CS_n to the slave, the slave drives
// MISO back; all four lines are brought out for observation.
//
// Defaults: 25 MHz system clock, UART 217 clocks per bit, I2C 100 kbit/s,
// SPI SCLK of 25 MHz / (2*4) with an 8-bit address.
module onboard_comm_top
  import comm_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT   = 217,
  parameter int unsigned SYS_CLK_HZ     = 25_000_000,
  parameter int unsigned I2C_SCL_HZ     = 100_000,
  parameter int unsigned SPI_ADDR_W     = 8,
  parameter int unsigned SPI_SCLK_HALF  = 4
) (
  input  logic                  i_clk,
  input  logic                  i_rst,
  // ---------------- UART ----------------
  input  logic                  i_uart_tx_dv,
  input  logic [DATA_W-1:0]     i_uart_tx_byte,
  output logic                  o_uart_tx_active,
  output logic                  o_uart_tx_serial,
  output logic                  o_uart_tx_done,
  input  logic                  i_uart_rx_serial,
  output logic                  o_uart_rx_dv,
  output logic [DATA_W-1:0]     o_uart_rx_byte,
  output logic                  o_uart_rx_frame_err,
  // ---------------- I2C -----------------
  input  logic                  i_i2c_ena,
  input  logic [6:0]            i_i2c_addr,
  input  logic                  i_i2c_rw,
  input  logic [DATA_W-1:0]     i_i2c_din,
  output logic [DATA_W-1:0]     o_i2c_rd_data,
  output logic                  o_i2c_busy,
  output logic                  o_i2c_done,
  output logic                  o_i2c_ack_err,
  input  logic [DATA_W-1:0]     i_i2c_slave_din,
  output logic [DATA_W-1:0]     o_i2c_dout,
  output logic                  o_i2c_dout_valid,
  output logic [6:0]            o_i2c_slave_addr,
  output logic                  o_i2c_slave_rw,
  output logic                  o_i2c_scl,
  output logic                  o_i2c_sda,
  // ---------------- SPI -----------------
  input  logic                  i_spi_ena,
  input  logic [SPI_ADDR_W-1:0] i_spi_addr,
  input  logic                  i_spi_rw,
  input  logic [DATA_W-1:0]     i_spi_wr_data,
  output logic [DATA_W-1:0]     o_spi_rd_data,
  output logic                  o_spi_busy,
  output logic                  o_spi_done,
  output logic [DATA_W-1:0]     o_spi_slave_data,
  output logic [SPI_ADDR_W-1:0] o_spi_slave_addr,
  output logic                  o_spi_slave_rw,
  output logic [DATA_W-1:0]     o_spi_slave_rx_data,
  output logic                  o_spi_slave_valid,
  output logic                  o_spi_sclk,
  output logic                  o_spi_mosi,
  output logic                  o_spi_miso,
  output logic                  o_spi_cs_n
);

  // ---------------- UART ----------------
  uart_transceiver #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .i_clk         (i_clk),
    .i_rst         (i_rst),
    .i_tx_dv       (i_uart_tx_dv),
    .i_tx_byte     (i_uart_tx_byte),
    .o_tx_active   (o_uart_tx_active),
    .o_tx_serial   (o_uart_tx_serial),
    .o_tx_done     (o_uart_tx_done),
    .i_rx_serial   (i_uart_rx_serial),
    .o_rx_dv       (o_uart_rx_dv),
    .o_rx_byte     (o_uart_rx_byte),
    .o_rx_frame_err(o_uart_rx_frame_err)
  );

  // ---------------- I2C -----------------
  logic m_scl_oe, m_sda_oe, s_sda_oe;

  // Pull-up resistors: a line is high unless a device pulls it low.
  assign o_i2c_scl = !m_scl_oe;
  assign o_i2c_sda = !(m_sda_oe || s_sda_oe);

  i2c_master #(.SYS_CLK_HZ(SYS_CLK_HZ), .SCL_HZ(I2C_SCL_HZ)) u_i2c_master (
    .i_clk    (i_clk),
    .i_rst    (i_rst),
    .i_ena    (i_i2c_ena),
    .i_addr   (i_i2c_addr),
    .i_rw     (i_i2c_rw),
    .i_data_wr(i_i2c_din),
    .o_data_rd(o_i2c_rd_data),
    .o_busy   (o_i2c_busy),
    .o_done   (o_i2c_done),
    .o_ack_err(o_i2c_ack_err),
    .o_scl_oe (m_scl_oe),
    .o_sda_oe (m_sda_oe),
    .i_sda    (o_i2c_sda)
  );

  i2c_slave u_i2c_slave (
    .i_clk       (i_clk),
    .i_rst       (i_rst),
    .i_scl       (o_i2c_scl),
    .i_sda       (o_i2c_sda),
    .o_sda_oe    (s_sda_oe),
    .i_din       (i_i2c_slave_din),
    .o_dout      (o_i2c_dout),
    .o_dout_valid(o_i2c_dout_valid),
    .o_addr      (o_i2c_slave_addr),
    .o_rw        (o_i2c_slave_rw)
  );

  // ---------------- SPI -----------------
  spi_master #(.ADDR_W(SPI_ADDR_W), .SCLK_HALF(SPI_SCLK_HALF)) u_spi_master (
    .i_clk    (i_clk),
    .i_rst    (i_rst),
    .i_ena    (i_spi_ena),
    .i_addr   (i_spi_addr),
    .i_rw     (i_spi_rw),
    .i_wr_data(i_spi_wr_data),
    .o_rd_data(o_spi_rd_data),
    .o_busy   (o_spi_busy),
    .o_done   (o_spi_done),
    .o_sclk   (o_spi_sclk),
    .o_mosi   (o_spi_mosi),
    .o_cs_n   (o_spi_cs_n),
    .i_miso   (o_spi_miso)
  );

  spi_slave #(.ADDR_W(SPI_ADDR_W)) u_spi_slave (
    .i_clk        (i_clk),
    .i_rst        (i_rst),
    .i_sclk       (o_spi_sclk),
    .i_mosi       (o_spi_mosi),
    .i_cs_n       (o_spi_cs_n),
    .o_miso       (o_spi_miso),
    .o_data       (o_spi_slave_data),
    .o_addr       (o_spi_slave_addr),
    .o_rw         (o_spi_slave_rw),
    .o_rx_data    (o_spi_slave_rx_data),
    .o_frame_valid(o_spi_slave_valid)
  );

endmodule
