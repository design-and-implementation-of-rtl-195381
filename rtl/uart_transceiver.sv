// Full-duplex UART: one transmitter and one receiver side by side.
//
// The transmitter and the receiver are independent finite state machines,
// each with its own baud rate generator, so a frame can be sent while
// another is being received. Two such transceivers are connected with TX of
// one to RX of the other and a common ground.
//
// Interface: see uart_tx (i_tx_dv, i_tx_byte, o_tx_active, o_tx_serial,
// o_tx_done) and uart_rx (i_rx_serial, o_rx_dv, o_rx_byte, o_rx_frame_err).
// Both default to 217 system clocks per bit (25 MHz clock).
module uart_transceiver
  import comm_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 217
) (
  input  logic              i_clk,
  input  logic              i_rst,
  // transmit side
  input  logic              i_tx_dv,
  input  logic [DATA_W-1:0] i_tx_byte,
  output logic              o_tx_active,
  output logic              o_tx_serial,
  output logic              o_tx_done,
  // receive side
  input  logic              i_rx_serial,
  output logic              o_rx_dv,
  output logic [DATA_W-1:0] o_rx_byte,
  output logic              o_rx_frame_err
);

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .i_clk      (i_clk),
    .i_rst      (i_rst),
    .i_tx_dv    (i_tx_dv),
    .i_tx_byte  (i_tx_byte),
    .o_tx_active(o_tx_active),
    .o_tx_serial(o_tx_serial),
    .o_tx_done  (o_tx_done)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .i_clk         (i_clk),
    .i_rst         (i_rst),
    .i_rx_serial   (i_rx_serial),
    .o_rx_dv       (o_rx_dv),
    .o_rx_byte     (o_rx_byte),
    .o_rx_frame_err(o_rx_frame_err)
  );

endmodule
