// UART receiver (8 data bits, no parity, one stop bit).
//
// A five-state machine IDLE -> START -> DATA -> STOP -> CLEANUP -> IDLE, as
// in the source article's receiver diagram. The serial input first passes a
// two-flop synchroniser. In IDLE the bit-period counter is held at zero; a
// low line starts START, which waits half a bit period and checks that the
// line is still low (a start bit, which is then discarded) or returns to IDLE
// (a glitch). The counter is restarted there, so from then on every
// end-of-period tick falls in the middle of a bit: DATA samples eight bits
// into a serial-in parallel-out register, least significant first, STOP
// samples the stop bit, and CLEANUP waits one clock before IDLE.
//
// Interface: o_rx_dv pulses for one cycle with o_rx_byte valid when a frame
// with a high stop bit has been received; a frame whose stop bit is low is
// dropped and o_rx_frame_err pulses instead. o_rx_dv rises about 9.5 bit
// periods (plus 3 cycles of synchroniser and edge latency) after the falling
// edge of the start bit.
//
// States and the one-clock clean-up follow the source article; mid-bit sampling,
// the synchroniser, the glitch and framing-error handling are this
// implementation's choices.
module uart_rx
  import comm_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 217
) (
  input  logic              i_clk,
  input  logic              i_rst,          // synchronous, active high
  input  logic              i_rx_serial,
  output logic              o_rx_dv,
  output logic [DATA_W-1:0] o_rx_byte,
  output logic              o_rx_frame_err
);

  uart_rx_state_e    state;
  logic [1:0]        sync;
  logic              rx;
  logic [DATA_W-1:0] shreg;
  logic [2:0]        bit_idx;
  logic              bit_tick, half_tick, brg_clear;

  always_ff @(posedge i_clk) begin
    if (i_rst) sync <= 2'b11;
    else       sync <= {sync[0], i_rx_serial};
  end
  assign rx = sync[1];

  // Restart the bit period while idle and once the start bit is confirmed.
  assign brg_clear = (state == URX_IDLE) || (state == URX_START && half_tick);

  uart_baud_gen #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_brg (
    .i_clk      (i_clk),
    .i_rst      (i_rst),
    .i_clear    (brg_clear),
    .o_bit_tick (bit_tick),
    .o_half_tick(half_tick)
  );

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      state          <= URX_IDLE;
      shreg          <= '0;
      bit_idx        <= '0;
      o_rx_byte      <= '0;
      o_rx_dv        <= 1'b0;
      o_rx_frame_err <= 1'b0;
    end else begin
      o_rx_dv        <= 1'b0;
      o_rx_frame_err <= 1'b0;
      unique case (state)
        URX_IDLE: begin
          bit_idx <= '0;
          if (!rx) state <= URX_START;
        end
        URX_START: begin
          if (half_tick) state <= rx ? URX_IDLE : URX_DATA;
        end
        URX_DATA: begin
          if (bit_tick) begin
            shreg   <= {rx, shreg[DATA_W-1:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= URX_STOP;
          end
        end
        URX_STOP: begin
          if (bit_tick) begin
            if (rx) begin
              o_rx_byte <= shreg;
              o_rx_dv   <= 1'b1;
            end else begin
              o_rx_frame_err <= 1'b1;
            end
            state <= URX_CLEANUP;
          end
        end
        URX_CLEANUP: state <= URX_IDLE;
        default:     state <= URX_IDLE;
      endcase
    end
  end

endmodule
