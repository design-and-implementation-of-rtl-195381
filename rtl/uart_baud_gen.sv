// UART baud rate generator.
//
// A free-running counter of system clocks that wraps every CLKS_PER_BIT
// cycles. It marks two points of each bit period: o_bit_tick on the last
// cycle of the period (a bit boundary for the transmitter, a mid-bit sample
// point for the receiver once it has re-aligned on the start bit) and
// o_half_tick on the cycle at the middle of the period (used by the receiver
// to check the start bit in its centre).
//
// Interface: i_clear restarts the count at zero on the next cycle. The
// ticks are decoded from the count alone (they do not depend on i_clear, so
// a user may derive i_clear from them without a combinational loop). Ticks
// are one cycle wide. Timing: o_bit_tick is high on cycles CLKS_PER_BIT-1,
// 2*CLKS_PER_BIT-1, ... and o_half_tick on cycle (CLKS_PER_BIT-1)/2 of each
// period, counted from the cycle after the last clear (cycle 0).
//
// The default CLKS_PER_BIT = 217 is the value used in the source article's
// UART simulation (25 MHz system clock, 40 ns period); 25 MHz / 217 is about
// 115200 bit/s. The article's text quotes 9600 baud at 25 MHz for the same
// simulation; that rate needs CLKS_PER_BIT = 2604. Counter width and the
// tick/clear behaviour are this implementation's choices.
module uart_baud_gen #(
  parameter int unsigned CLKS_PER_BIT = 217
) (
  input  logic i_clk,
  input  logic i_rst,       // synchronous, active high
  input  logic i_clear,     // restart the bit period
  output logic o_bit_tick,  // last cycle of a bit period
  output logic o_half_tick  // middle cycle of a bit period
);

  localparam int unsigned CNT_W = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(CLKS_PER_BIT - 1);
  localparam logic [CNT_W-1:0] HALF = CNT_W'((CLKS_PER_BIT - 1) / 2);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge i_clk) begin
    if (i_rst || i_clear || cnt == LAST) cnt <= '0;
    else                                 cnt <= cnt + 1'b1;
  end

  assign o_bit_tick  = (cnt == LAST);
  assign o_half_tick = (cnt == HALF);

endmodule
