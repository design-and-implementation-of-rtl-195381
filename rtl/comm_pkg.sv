// Shared types for the three serial interfaces (UART, I2C, SPI).
//
// Each interface is built around one explicit finite state machine. The
// state encodings are collected here so that the RTL, the testbenches and
// waveform viewers all agree on the state names. The state lists follow the
// state diagrams of the source article; the few extra states (I2C data-acknowledge
// states) are this implementation's own and are marked below.
package comm_pkg;

  // UART transmitter: IDLE -> START -> DATA (8 bits) -> STOP -> IDLE
  typedef enum logic [1:0] {
    UTX_IDLE  = 2'd0,
    UTX_START = 2'd1,
    UTX_DATA  = 2'd2,
    UTX_STOP  = 2'd3
  } uart_tx_state_e;

  // UART receiver: IDLE -> START -> DATA (8 bits) -> STOP -> CLEANUP -> IDLE
  typedef enum logic [2:0] {
    URX_IDLE    = 3'd0,
    URX_START   = 3'd1,
    URX_DATA    = 3'd2,
    URX_STOP    = 3'd3,
    URX_CLEANUP = 3'd4
  } uart_rx_state_e;

  // I2C master. READY..STOP are the states of the source article's I2C
  // diagram; I2C_WACK and I2C_RACK hold the acknowledge bit that follows a data byte
  // (the diagram shows it as the "ack" condition on Write->Stop and
  // Read->Stop).
  typedef enum logic [3:0] {
    I2C_READY = 4'd0,
    I2C_START = 4'd1,
    I2C_ADR   = 4'd2,
    I2C_ACK   = 4'd3,
    I2C_WRITE = 4'd4,
    I2C_WACK  = 4'd5,
    I2C_READ  = 4'd6,
    I2C_RACK  = 4'd7,
    I2C_STOP  = 4'd8
  } i2c_state_e;

  // I2C slave (receiver side of the same protocol)
  typedef enum logic [2:0] {
    I2CS_IDLE     = 3'd0,
    I2CS_ADDR     = 3'd1,
    I2CS_ADDR_ACK = 3'd2,
    I2CS_WRITE    = 3'd3,
    I2CS_WR_ACK   = 3'd4,
    I2CS_READ     = 3'd5,
    I2CS_RD_ACK   = 3'd6,
    I2CS_WAIT     = 3'd7
  } i2c_slave_state_e;

  // SPI master: IDLE -> ENABLE -> CS -> ADDRESS -> RW -> DATA | READ_DATA -> STOP
  typedef enum logic [2:0] {
    SPI_IDLE      = 3'd0,
    SPI_ENABLE    = 3'd1,
    SPI_CS        = 3'd2,
    SPI_ADDRESS   = 3'd3,
    SPI_RW        = 3'd4,
    SPI_DATA      = 3'd5,
    SPI_READ_DATA = 3'd6,
    SPI_STOP      = 3'd7
  } spi_state_e;

  // Width of a data byte on all three interfaces.
  localparam int unsigned DATA_W = 8;

endpackage
