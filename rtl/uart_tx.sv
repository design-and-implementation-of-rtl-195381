// UART transmitter (8 data bits, no parity, one stop bit).
//
// A four-state machine IDLE -> START -> DATA -> STOP -> IDLE, as in the
// source article's transmitter diagram. In IDLE the line is held high; a one-cycle
// i_tx_dv pulse loads i_tx_byte into a parallel-in serial-out shift register
// and starts a frame. START drives the low start bit, DATA shifts out the
// eight data bits least significant first (a 3-bit bit counter, the state's
// "8x" loop, advances once per bit period), STOP drives the high stop bit.
// Every state lasts one bit period, timed by uart_baud_gen.
//
// Interface: o_tx_active is high from the cycle after i_tx_dv until the
// frame ends; o_tx_done pulses for one cycle at the end of the stop bit,
// which is 10*CLKS_PER_BIT cycles after the i_tx_dv cycle. i_tx_dv is ignored
// while a frame is in progress.
//
// The state sequence and the counter-driven DATA loop follow the source article;
// bit order, frame format (8N1), reset behaviour and the done/active
// handshake are this implementation's choices.
module uart_tx
  import comm_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 217
) (
  input  logic              i_clk,
  input  logic              i_rst,        // synchronous, active high
  input  logic              i_tx_dv,      // start a frame with i_tx_byte
  input  logic [DATA_W-1:0] i_tx_byte,
  output logic              o_tx_active,
  output logic              o_tx_serial,
  output logic              o_tx_done
);

  uart_tx_state_e    state;
  logic [DATA_W-1:0] shreg;
  logic [2:0]        bit_idx;
  logic              bit_tick;
  logic              unused_half;

  uart_baud_gen #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_brg (
    .i_clk      (i_clk),
    .i_rst      (i_rst),
    .i_clear    (state == UTX_IDLE),
    .o_bit_tick (bit_tick),
    .o_half_tick(unused_half)
  );

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      state     <= UTX_IDLE;
      shreg     <= '0;
      bit_idx   <= '0;
      o_tx_done <= 1'b0;
    end else begin
      o_tx_done <= 1'b0;
      unique case (state)
        UTX_IDLE: begin
          if (i_tx_dv) begin
            shreg <= i_tx_byte;
            state <= UTX_START;
          end
        end
        UTX_START: begin
          if (bit_tick) begin
            bit_idx <= '0;
            state   <= UTX_DATA;
          end
        end
        UTX_DATA: begin
          if (bit_tick) begin
            shreg   <= shreg >> 1;
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= UTX_STOP;
          end
        end
        UTX_STOP: begin
          if (bit_tick) begin
            o_tx_done <= 1'b1;
            state     <= UTX_IDLE;
          end
        end
        default: state <= UTX_IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      UTX_START: o_tx_serial = 1'b0;
      UTX_DATA:  o_tx_serial = shreg[0];
      default:   o_tx_serial = 1'b1;
    endcase
  end

  assign o_tx_active = (state != UTX_IDLE);

  // The line must be idle-high whenever no frame is in progress.
  a_idle_high: assert property (@(posedge i_clk) disable iff (i_rst)
    state == UTX_IDLE |-> o_tx_serial);

endmodule
