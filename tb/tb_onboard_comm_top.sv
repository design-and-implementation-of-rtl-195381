// End-to-end testbench for onboard_comm_top at its default parameters
// (25 MHz clock, UART 217 clocks per bit, I2C 100 kbit/s, SPI 8-bit address).
//
// The three interfaces run at the same time, each from its own thread:
//   UART  TX is looped back to RX: 0x3A and random bytes must come back.
//         Then the testbench drives RX itself while TX sends (full duplex,
//         TX decoded from the line by the testbench), and finally sends a
//         frame with a low stop bit (framing error).
//   I2C   0xCC to address 1010101 and 0xFC to 1110101 back to back (the
//         second started from STOP with i_ena held), a read of the slave's
//         byte, and a request withdrawn during START.
//   SPI   writes of 0x8A and 0xAB (the second returns the first, full
//         duplex), a read that returns 0xAB, random transfers, and a request
//         withdrawn in ENABLE.
// Every mechanism is counted and each must have happened at least once.
module tb_onboard_comm_top;
  localparam int CPB  = 217;
  localparam int QDIV = (25_000_000 + 4 * 100_000 - 1) / (4 * 100_000);   // 63
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

  // UART
  logic       u_dv = 1'b0, u_tx_active, u_tx_serial, u_tx_done, u_rx_dv, u_ferr;
  logic [7:0] u_byte = '0, u_rx_byte;
  logic       u_loop = 1'b1, u_drive = 1'b1;
  wire        u_rx_line = u_loop ? u_tx_serial : u_drive;
  // I2C
  logic       i_ena = 1'b0, i_rw = 1'b0;
  logic [6:0] i_addr = '0, i_saddr;
  logic [7:0] i_din = '0, i_rd, i_sdin = '0, i_dout;
  logic       i_busy, i_done, i_ack_err, i_dvalid, i_srw, i_scl, i_sda;
  // SPI
  logic       s_ena = 1'b0, s_rw = 1'b0;
  logic [7:0] s_addr = '0, s_wr = '0, s_rd, s_sdata, s_saddr, s_srx;
  logic       s_busy, s_done, s_srw, s_svalid, s_sclk, s_mosi, s_miso, s_cs_n;

  onboard_comm_top dut (
    .i_clk(clk), .i_rst(rst),
    .i_uart_tx_dv(u_dv), .i_uart_tx_byte(u_byte), .o_uart_tx_active(u_tx_active),
    .o_uart_tx_serial(u_tx_serial), .o_uart_tx_done(u_tx_done), .i_uart_rx_serial(u_rx_line),
    .o_uart_rx_dv(u_rx_dv), .o_uart_rx_byte(u_rx_byte), .o_uart_rx_frame_err(u_ferr),
    .i_i2c_ena(i_ena), .i_i2c_addr(i_addr), .i_i2c_rw(i_rw), .i_i2c_din(i_din),
    .o_i2c_rd_data(i_rd), .o_i2c_busy(i_busy), .o_i2c_done(i_done), .o_i2c_ack_err(i_ack_err),
    .i_i2c_slave_din(i_sdin), .o_i2c_dout(i_dout), .o_i2c_dout_valid(i_dvalid),
    .o_i2c_slave_addr(i_saddr), .o_i2c_slave_rw(i_srw), .o_i2c_scl(i_scl), .o_i2c_sda(i_sda),
    .i_spi_ena(s_ena), .i_spi_addr(s_addr), .i_spi_rw(s_rw), .i_spi_wr_data(s_wr),
    .o_spi_rd_data(s_rd), .o_spi_busy(s_busy), .o_spi_done(s_done), .o_spi_slave_data(s_sdata),
    .o_spi_slave_addr(s_saddr), .o_spi_slave_rw(s_srw), .o_spi_slave_rx_data(s_srx),
    .o_spi_slave_valid(s_svalid), .o_spi_sclk(s_sclk), .o_spi_mosi(s_mosi),
    .o_spi_miso(s_miso), .o_spi_cs_n(s_cs_n));

  // mechanism counters
  int n_uart_loop = 0, n_uart_duplex = 0, n_uart_ferr = 0;
  int n_i2c_write = 0, n_i2c_read = 0, n_i2c_restart = 0, n_i2c_abort = 0;
  int n_spi_write = 0, n_spi_read = 0, n_spi_abort = 0;

  // last UART byte received and pulse counts
  int         u_rx_count = 0, u_ferr_count = 0;
  logic [7:0] u_last;
  always @(posedge clk) if (!rst) begin
    if (u_rx_dv) begin
      u_rx_count <= u_rx_count + 1;
      u_last <= u_rx_byte;
    end
    if (u_ferr) u_ferr_count <= u_ferr_count + 1;
  end

  initial begin : watchdog
    repeat (60 * 11 * CPB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- UART thread ----------------
  task automatic uart_send(input logic [7:0] b);
    @(posedge clk); #1 u_dv = 1'b1; u_byte = b;
    @(posedge clk); #1 u_dv = 1'b0;
  endtask

  task automatic uart_drive(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      u_drive = f[i];
      repeat (CPB) @(posedge clk);
    end
    #1 u_drive = 1'b1;
  endtask

  // Decode the TX line from its levels (sample in the middle of each bit).
  task automatic uart_decode(output logic [7:0] b);
    @(negedge u_tx_serial);
    repeat (CPB + CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      b[i] = u_tx_serial;
      repeat (CPB) @(posedge clk);
    end
  endtask

  task automatic uart_thread();
    logic [7:0] b, dec;
    int n0, f0;
    // loopback
    for (int i = 0; i < 4; i++) begin
      b = (i == 0) ? 8'h3A : 8'($urandom);
      n0 = u_rx_count;
      uart_send(b);
      wait (u_tx_done);
      repeat (CPB) @(posedge clk);
      check(u_rx_count == n0 + 1 && u_last == b, $sformatf("UART loopback %h got %h", b, u_last));
      if (u_rx_count == n0 + 1 && u_last == b) n_uart_loop++;
    end
    // full duplex: TX sends 0x77 while the testbench sends 0x5C into RX
    #1 u_loop = 1'b0;
    n0 = u_rx_count;
    fork
      uart_send(8'h77);
      uart_decode(dec);
      begin repeat (2 * CPB) @(posedge clk); #1 uart_drive(8'h5C, 1'b1); end
    join
    repeat (CPB) @(posedge clk);
    check(dec == 8'h77, $sformatf("UART TX line decoded %h", dec));
    check(u_rx_count == n0 + 1 && u_last == 8'h5C, $sformatf("UART RX during TX got %h", u_last));
    if (dec == 8'h77 && u_last == 8'h5C) n_uart_duplex++;
    // framing error
    f0 = u_ferr_count;
    n0 = u_rx_count;
    uart_drive(8'hE1, 1'b0);
    repeat (2 * CPB) @(posedge clk);
    check(u_ferr_count == f0 + 1 && u_rx_count == n0, "UART framing error");
    if (u_ferr_count == f0 + 1) n_uart_ferr++;
  endtask

  // ---------------- I2C thread ----------------
  task automatic i2c_wait_done();
    do @(posedge clk); while (!i_done);
    #1;
  endtask

  task automatic i2c_thread();
    // 0xCC -> 1010101, then 0xFC -> 1110101 started from STOP
    @(posedge clk); #1 i_ena = 1'b1; i_addr = 7'b1010101; i_rw = 1'b0; i_din = 8'hCC;
    repeat (6 * QDIV) @(posedge clk);
    #1 i_addr = 7'b1110101; i_din = 8'hFC;
    i2c_wait_done();
    check(i_dout == 8'hCC && i_saddr == 7'b1010101 && !i_ack_err, $sformatf("I2C write 1: %h to %b", i_dout, i_saddr));
    if (i_dout == 8'hCC) n_i2c_write++;
    check(i_busy, "I2C second transfer starts from STOP");
    if (i_busy) n_i2c_restart++;
    repeat (4 * QDIV) @(posedge clk);
    #1 i_ena = 1'b0;
    i2c_wait_done();
    check(i_dout == 8'hFC && i_saddr == 7'b1110101 && !i_ack_err, $sformatf("I2C write 2: %h to %b", i_dout, i_saddr));
    if (i_dout == 8'hFC) n_i2c_write++;
    // read
    i_sdin = 8'h69;
    repeat (10) @(posedge clk);
    #1 i_ena = 1'b1; i_addr = 7'b0011001; i_rw = 1'b1;
    repeat (4 * QDIV) @(posedge clk);
    #1 i_ena = 1'b0;
    i2c_wait_done();
    check(i_rd == 8'h69 && i_srw && !i_ack_err, $sformatf("I2C read %h", i_rd));
    if (i_rd == 8'h69) n_i2c_read++;
    // withdrawn request
    repeat (10) @(posedge clk);
    #1 i_ena = 1'b1;
    @(posedge clk); #1 i_ena = 1'b0;
    repeat (3 * QDIV) @(posedge clk);
    #1 check(!i_busy && i_scl && i_sda, "I2C START withdrawn");
    if (!i_busy) n_i2c_abort++;
  endtask

  // ---------------- SPI thread ----------------
  task automatic spi_xfer(input logic [7:0] a, input logic w, input logic [7:0] d);
    @(posedge clk); #1 s_ena = 1'b1; s_addr = a; s_rw = w; s_wr = d;
    repeat (2) @(posedge clk);
    #1 s_ena = 1'b0;
    do @(posedge clk); while (!s_done);
    #1;
  endtask

  task automatic spi_thread();
    logic [7:0] prev, v;
    spi_xfer(8'h10, 1'b1, 8'h8A);
    check(s_sdata == 8'h8A && s_rd == 8'h00, $sformatf("SPI write 8A: slave %h", s_sdata));
    if (s_sdata == 8'h8A) n_spi_write++;
    spi_xfer(8'h11, 1'b1, 8'hAB);
    check(s_sdata == 8'hAB && s_rd == 8'h8A, $sformatf("SPI write AB: slave %h back %h", s_sdata, s_rd));
    if (s_sdata == 8'hAB) n_spi_write++;
    spi_xfer(8'h12, 1'b0, 8'h00);
    check(s_rd == 8'hAB && s_sdata == 8'hAB && s_saddr == 8'h12, $sformatf("SPI read %h", s_rd));
    if (s_rd == 8'hAB) n_spi_read++;
    for (int i = 0; i < 8; i++) begin
      prev = s_sdata;
      v = 8'($urandom);
      if (i % 2 == 0) begin
        spi_xfer(8'($urandom), 1'b1, v);
        check(s_sdata == v && s_rd == prev, "SPI random write");
        if (s_sdata == v) n_spi_write++;
      end else begin
        spi_xfer(8'($urandom), 1'b0, v);
        check(s_sdata == prev && s_rd == prev, "SPI random read");
        if (s_rd == prev) n_spi_read++;
      end
    end
    // withdrawn in ENABLE
    @(posedge clk); #1 s_ena = 1'b1;
    @(posedge clk); #1 s_ena = 1'b0;
    repeat (10) @(posedge clk);
    #1 check(!s_busy && s_cs_n, "SPI request withdrawn in ENABLE");
    if (!s_busy && s_cs_n) n_spi_abort++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk);
    fork
      uart_thread();
      i2c_thread();
      spi_thread();
    join
    check(n_uart_loop > 0,   "mechanism: UART loopback frame");
    check(n_uart_duplex > 0, "mechanism: UART full duplex");
    check(n_uart_ferr > 0,   "mechanism: UART framing error");
    check(n_i2c_write > 0,   "mechanism: I2C write");
    check(n_i2c_read > 0,    "mechanism: I2C read");
    check(n_i2c_restart > 0, "mechanism: I2C STOP -> START");
    check(n_i2c_abort > 0,   "mechanism: I2C START -> READY");
    check(n_spi_write > 0,   "mechanism: SPI write");
    check(n_spi_read > 0,    "mechanism: SPI read");
    check(n_spi_abort > 0,   "mechanism: SPI ENABLE -> IDLE");
    $display("mechanisms: uart loop=%0d duplex=%0d ferr=%0d | i2c write=%0d read=%0d restart=%0d abort=%0d | spi write=%0d read=%0d abort=%0d",
             n_uart_loop, n_uart_duplex, n_uart_ferr, n_i2c_write, n_i2c_read, n_i2c_restart,
             n_i2c_abort, n_spi_write, n_spi_read, n_spi_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
