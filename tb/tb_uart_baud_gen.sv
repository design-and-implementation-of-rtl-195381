// Self-checking testbench for uart_baud_gen.
//
// Two instances (the default 217 clocks per bit and a short period of 6)
// run from one clock. The testbench clears each counter, then counts clock
// cycles itself and checks that o_bit_tick arrives exactly every
// CLKS_PER_BIT cycles and o_half_tick at cycle (CLKS_PER_BIT-1)/2 of each
// period, and that a clear in mid-period restarts the count.
module tb_uart_baud_gen;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  always #20 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clr_a = 1'b1, clr_b = 1'b1;
  logic tick_a, half_a, tick_b, half_b;

  uart_baud_gen                     dut_a (.i_clk(clk), .i_rst(rst), .i_clear(clr_a), .o_bit_tick(tick_a), .o_half_tick(half_a));
  uart_baud_gen #(.CLKS_PER_BIT(6)) dut_b (.i_clk(clk), .i_rst(rst), .i_clear(clr_b), .o_bit_tick(tick_b), .o_half_tick(half_b));

  // Follow one instance for n periods from a clear, checking every cycle.
  task automatic follow(input int period, input int n, input bit which);
    int c;
    c = 0;
    // Called just after the edge that took the clear: that cycle is cycle 0.
    for (int k = 0; k < n * period; k++) begin
      if (which == 0) begin
        check(tick_a == ((c % period) == period - 1), $sformatf("A tick at cycle %0d", c));
        check(half_a == ((c % period) == (period - 1) / 2), $sformatf("A half at cycle %0d", c));
      end else begin
        check(tick_b == ((c % period) == period - 1), $sformatf("B tick at cycle %0d", c));
        check(half_b == ((c % period) == (period - 1) / 2), $sformatf("B half at cycle %0d", c));
      end
      c++;
      @(posedge clk); #1;
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // release both clears at the same edge
    @(posedge clk); #1 clr_a = 1'b0; clr_b = 1'b0;
    fork
      follow(217, 4, 0);
      follow(6, 20, 1);
    join
    // restart B in mid period: hold clear for one cycle
    repeat (3) @(posedge clk);
    #1 clr_b = 1'b1;
    @(posedge clk); #1 clr_b = 1'b0;
    follow(6, 5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
