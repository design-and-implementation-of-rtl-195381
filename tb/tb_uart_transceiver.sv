// Self-checking testbench for uart_transceiver, full duplex.
//
// Two transceivers are wired as on a board: TX of each to RX of the other.
// Both send at the same time, so each transmitter and each receiver work
// concurrently. The testbench checks that every byte sent by one side is
// received by the other, in order, and counts frames that overlap in time.
module tb_uart_transceiver;
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

  logic       dv_a = 1'b0, dv_b = 1'b0;
  logic [7:0] byte_a = '0, byte_b = '0;
  logic       act_a, act_b, ser_a, ser_b, done_a, done_b;
  logic       rdv_a, rdv_b, fe_a, fe_b;
  logic [7:0] rbyte_a, rbyte_b;

  uart_transceiver dut_a (
    .i_clk(clk), .i_rst(rst), .i_tx_dv(dv_a), .i_tx_byte(byte_a),
    .o_tx_active(act_a), .o_tx_serial(ser_a), .o_tx_done(done_a),
    .i_rx_serial(ser_b), .o_rx_dv(rdv_a), .o_rx_byte(rbyte_a), .o_rx_frame_err(fe_a));
  uart_transceiver dut_b (
    .i_clk(clk), .i_rst(rst), .i_tx_dv(dv_b), .i_tx_byte(byte_b),
    .o_tx_active(act_b), .o_tx_serial(ser_b), .o_tx_done(done_b),
    .i_rx_serial(ser_a), .o_rx_dv(rdv_b), .o_rx_byte(rbyte_b), .o_rx_frame_err(fe_b));

  localparam int N = 6;
  logic [7:0] sent_a [N], sent_b [N];
  int rcv_a = 0, rcv_b = 0, overlap = 0;

  // B receives what A sent, A receives what B sent.
  always @(posedge clk) if (!rst) begin
    if (rdv_b) begin
      check(rcv_b < N && rbyte_b == sent_a[rcv_b], $sformatf("B got %h", rbyte_b));
      rcv_b <= rcv_b + 1;
    end
    if (rdv_a) begin
      check(rcv_a < N && rbyte_a == sent_b[rcv_a], $sformatf("A got %h", rbyte_a));
      rcv_a <= rcv_a + 1;
    end
    if (fe_a || fe_b) check(1'b0, "framing error");
    if (act_a && act_b) overlap <= overlap + 1;
  end

  initial begin : watchdog
    repeat ((N + 4) * 11 * CPB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sent_a[0] = 8'h3A;
    sent_b[0] = 8'hC5;
    for (int i = 1; i < N; i++) begin
      sent_a[i] = 8'($urandom);
      sent_b[i] = 8'($urandom);
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      #1 dv_a = 1'b1; byte_a = sent_a[i];
      // B starts a few bit periods later so the frames overlap partly
      fork
        begin @(posedge clk); #1 dv_a = 1'b0; end
        begin
          repeat (3 * CPB + i) @(posedge clk);
          #1 dv_b = 1'b1; byte_b = sent_b[i];
          @(posedge clk); #1 dv_b = 1'b0;
        end
      join
      wait (done_b);
      @(posedge clk);
    end
    repeat (2 * CPB) @(posedge clk);
    check(rcv_a == N && rcv_b == N, $sformatf("received %0d/%0d of %0d", rcv_a, rcv_b, N));
    check(overlap > N * 5 * CPB, "transmissions overlapped (full duplex)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
