// Self-checking testbench for uart_rx at its default 217 clocks per bit.
//
// The testbench drives the serial line itself, bit by bit with the nominal
// bit period, and checks that each frame gives exactly one o_rx_dv pulse
// with the right byte, about 9.5 bit periods after the start edge. It also
// sends bytes with the line's bit period 2% fast and 2% slow, a short low
// glitch (must be ignored as a false start bit), and a frame whose stop bit
// is low (must be dropped with o_rx_frame_err).
module tb_uart_rx;
  localparam int CPB = 217;
  localparam int LAT = 9 * CPB + CPB / 2;  // start edge to o_rx_dv, nominal
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

  logic       line = 1'b1;
  logic       dv, ferr;
  logic [7:0] rx_byte;

  uart_rx dut (.i_clk(clk), .i_rst(rst), .i_rx_serial(line),
               .o_rx_dv(dv), .o_rx_byte(rx_byte), .o_rx_frame_err(ferr));

  // Count every pulse, and remember the last byte and when it came.
  int     n_dv = 0, n_ferr = 0;
  int cyc = 0, dv_cyc = 0;
  logic [7:0] last_byte;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dv && !rst) begin
      n_dv <= n_dv + 1;
      last_byte <= rx_byte;
      dv_cyc <= cyc;
    end
    if (ferr && !rst) n_ferr <= n_ferr + 1;
  end

  initial begin : watchdog
    repeat (30 * 11 * CPB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one frame; period_clks is the bit period in clock cycles.
  task automatic drive(input logic [7:0] b, input bit stop, input int period_clks);
    logic [9:0] frame;
    frame = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      line = frame[i];
      repeat (period_clks) @(posedge clk);
      #1;
    end
    line = 1'b1;
  endtask

  task automatic rx_byte_check(input logic [7:0] b, input int period_clks);
    int     n_before;
    int t0;
    n_before = n_dv;
    @(posedge clk); #1;
    t0 = cyc;
    drive(b, 1'b1, period_clks);
    repeat (CPB) @(posedge clk);
    #1;
    check(n_dv == n_before + 1, $sformatf("one dv for %h (got %0d)", b, n_dv - n_before));
    check(last_byte == b, $sformatf("byte %h received as %h", b, last_byte));
    // 9.5 bit periods of the receiver plus synchroniser latency
    check(dv_cyc - t0 >= LAT - 2 && dv_cyc - t0 <= LAT + 6,
          $sformatf("dv latency %0d cycles", dv_cyc - t0));
  endtask

  initial begin
    int nd, nf;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk);
    rx_byte_check(8'h3A, CPB);
    rx_byte_check(8'h00, CPB);
    rx_byte_check(8'hFF, CPB);
    for (int i = 0; i < 8; i++) rx_byte_check(8'($urandom), CPB);
    // tolerance of the mid-bit sampling: 2% fast and slow senders
    begin
      nd = n_dv;
      drive(8'hA5, 1'b1, CPB * 98 / 100);
      repeat (CPB) @(posedge clk);
      #1 check(n_dv == nd + 1 && last_byte == 8'hA5, "2% fast sender");
      nd = n_dv;
      drive(8'h5A, 1'b1, CPB * 102 / 100);
      repeat (CPB) @(posedge clk);
      #1 check(n_dv == nd + 1 && last_byte == 8'h5A, "2% slow sender");
    end
    // glitch shorter than half a bit: no frame
    nd = n_dv; nf = n_ferr;
    line = 1'b0;
    repeat (CPB / 4) @(posedge clk);
    #1 line = 1'b1;
    repeat (12 * CPB) @(posedge clk);
    #1 check(n_dv == nd && n_ferr == nf, "glitch ignored");
    // stop bit low: framing error, byte dropped
    drive(8'h81, 1'b0, CPB);
    repeat (2 * CPB) @(posedge clk);
    #1 check(n_dv == nd && n_ferr == nf + 1, "framing error flagged, no dv");
    // the receiver recovers for the next frame
    rx_byte_check(8'hC3, CPB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
