// Workload testbench: UART transfer of 0x3A at 9600 baud from a 25 MHz clock.
//
// 25 MHz / 9600 = 2604.17, so both transceivers are built with
// CLKS_PER_BIT = 2604 (a 0.006 % rate error). Transceiver A sends 0x3A and
// a few random bytes to transceiver B over a crossed pair of lines while B
// answers each byte with its complement. The testbench checks every byte
// received, the frame time of 10 bit periods (26 040 clocks, 1.0416 ms) and
// the bit width seen on the line.
module tb_uart_9600;
  localparam int CPB = 2604;
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

  logic       dv_a = 1'b0, dv_b = 1'b0;
  logic [7:0] byte_a = '0, byte_b = '0;
  logic       act_a, act_b, ser_a, ser_b, done_a, done_b;
  logic       rdv_a, rdv_b, fe_a, fe_b;
  logic [7:0] rbyte_a, rbyte_b;

  uart_transceiver #(.CLKS_PER_BIT(CPB)) dut_a (
    .i_clk(clk), .i_rst(rst), .i_tx_dv(dv_a), .i_tx_byte(byte_a),
    .o_tx_active(act_a), .o_tx_serial(ser_a), .o_tx_done(done_a),
    .i_rx_serial(ser_b), .o_rx_dv(rdv_a), .o_rx_byte(rbyte_a), .o_rx_frame_err(fe_a));
  uart_transceiver #(.CLKS_PER_BIT(CPB)) dut_b (
    .i_clk(clk), .i_rst(rst), .i_tx_dv(dv_b), .i_tx_byte(byte_b),
    .o_tx_active(act_b), .o_tx_serial(ser_b), .o_tx_done(done_b),
    .i_rx_serial(ser_a), .o_rx_dv(rdv_b), .o_rx_byte(rbyte_b), .o_rx_frame_err(fe_b));

  // B echoes the complement of every byte it receives.
  always @(posedge clk) begin
    dv_b <= 1'b0;
    if (!rst && rdv_b) begin
      dv_b   <= 1'b1;
      byte_b <= ~rbyte_b;
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // bytes received by each side
  int         n_a = 0, n_b = 0;
  logic [7:0] last_a, last_b;
  always @(posedge clk) if (!rst) begin
    if (rdv_a) begin n_a <= n_a + 1; last_a <= rbyte_a; end
    if (rdv_b) begin n_b <= n_b + 1; last_b <= rbyte_b; end
  end

  initial begin : watchdog
    repeat (12 * 25 * CPB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int t0, tfall, trise;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      b = (i == 0) ? 8'h3A : 8'($urandom);
      @(posedge clk); #1 dv_a = 1'b1; byte_a = b;
      @(posedge clk); #1 dv_a = 1'b0; t0 = cyc;   // request taken at this edge
      // start bit width on the line
      wait (!ser_a); tfall = cyc;
      wait (ser_a);  trise = cyc;
      if (b[0]) check(trise - tfall == CPB, $sformatf("start bit %0d clocks", trise - tfall));
      wait (done_a); #1;
      check(cyc - t0 == 10 * CPB, $sformatf("frame %0d clocks", cyc - t0));
      wait (n_b == i + 1);
      #1 check(last_b == b, $sformatf("B received %h, sent %h", last_b, b));
      wait (n_a == i + 1);
      #1 check(last_a == ~b, $sformatf("A received %h, expected %h", last_a, ~b));
      check(!fe_a && !fe_b, "no framing error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
