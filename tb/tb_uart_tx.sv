// Self-checking testbench for uart_tx at its default 217 clocks per bit.
//
// For each byte (0x3A first, then random ones) the testbench pulses i_tx_dv
// and then watches o_tx_serial with its own cycle counter: the start bit must
// be low for exactly CLKS_PER_BIT cycles, the eight data bits must appear
// least significant first, each for CLKS_PER_BIT cycles, and the stop bit
// must be high. o_tx_done must pulse once, 10*CLKS_PER_BIT cycles after the
// frame began, o_tx_active must cover the frame, and a second i_tx_dv sent
// during a frame must be ignored.
module tb_uart_tx;
  localparam int CPB = 217;
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

  logic       tx_dv = 1'b0;
  logic [7:0] tx_byte = '0;
  logic       active, serial, done;

  uart_tx dut (.i_clk(clk), .i_rst(rst), .i_tx_dv(tx_dv), .i_tx_byte(tx_byte),
               .o_tx_active(active), .o_tx_serial(serial), .o_tx_done(done));

  initial begin : watchdog
    repeat (12 * 10 * CPB + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one byte and check the whole frame cycle by cycle.
  task automatic send_and_check(input logic [7:0] b, input bit poke_during);
    logic [9:0] frame;
    int ndone;
    frame = {1'b1, b, 1'b0};            // stop, data (LSB first), start
    @(posedge clk); #1 tx_dv = 1'b1; tx_byte = b;
    @(posedge clk); #1 tx_dv = 1'b0; tx_byte = ~b;
    // now in the first cycle of the start bit
    ndone = 0;
    for (int k = 0; k < 10 * CPB; k++) begin
      check(serial == frame[k / CPB], $sformatf("byte %h bit %0d cycle %0d", b, k / CPB, k % CPB));
      check(active, "active during frame");
      if (done) ndone++;
      if (poke_during && k == 3 * CPB) begin
        tx_dv = 1'b1;
        tx_byte = 8'hFF;
        @(posedge clk); #1 tx_dv = 1'b0;
      end else begin
        @(posedge clk); #1;
      end
    end
    // o_tx_done is set by the edge that ends the stop bit
    check(ndone == 0, "no early done");
    check(done, $sformatf("done after 10*CPB cycles for %h", b));
    check(serial, "line high after frame");
    @(posedge clk); #1;
    check(!done, "done lasts one cycle");
    check(!active, "inactive after frame");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);
    #1 check(serial && !active, "idle line high");
    send_and_check(8'h3A, 1'b0);
    send_and_check(8'h00, 1'b1);
    send_and_check(8'hFF, 1'b0);
    for (int i = 0; i < 6; i++) send_and_check(8'($urandom), 1'b0);
    // the poked 8'hFF must not have started another frame
    repeat (2 * CPB) begin
      @(posedge clk); #1;
      check(serial && !active, "no frame without i_tx_dv");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
