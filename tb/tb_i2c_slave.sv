// Self-checking testbench for i2c_slave.
//
// The testbench is the bus master, written at bit level: it makes START and
// STOP conditions, clocks SCL with a 40-cycle bit period (10-cycle quarters)
// and pulls SDA low for 0 bits; SDA is high unless the testbench or the slave
// pulls it low. Checked: the slave acknowledges any address, reports address
// and R/W, presents a written byte on o_dout with one o_dout_valid pulse
// (0xCC to 1010101 and 0xFC to 1110101), returns i_din on reads most
// significant bit first, sends a second byte when the master acknowledges
// the first, releases SDA after a NACK and after STOP, and restarts on a
// repeated START in the middle of a transfer.
module tb_i2c_slave;
  localparam int Q = 10;   // system clocks per quarter SCL period
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

  logic       m_scl = 1'b1, m_sda_oe = 1'b0;
  logic       s_sda_oe;
  logic       sda;
  logic [7:0] din = 8'h00, dout;
  logic       dout_valid, rw_o;
  logic [6:0] addr_o;

  assign sda = !(m_sda_oe || s_sda_oe);

  i2c_slave dut (.i_clk(clk), .i_rst(rst), .i_scl(m_scl), .i_sda(sda), .o_sda_oe(s_sda_oe),
                 .i_din(din), .o_dout(dout), .o_dout_valid(dout_valid), .o_addr(addr_o), .o_rw(rw_o));

  int n_valid = 0;
  always @(posedge clk) if (!rst && dout_valid) n_valid <= n_valid + 1;

  task automatic quarter();
    repeat (Q) @(posedge clk);
    #1;
  endtask

  task automatic start_cond();
    m_sda_oe = 1'b0; m_scl = 1'b1; quarter();
    m_sda_oe = 1'b1; quarter();          // SDA falls while SCL high
    m_scl = 1'b0; quarter();
  endtask

  task automatic stop_cond();
    m_scl = 1'b0; m_sda_oe = 1'b1; quarter();
    m_scl = 1'b1; quarter();
    m_sda_oe = 1'b0; quarter();          // SDA rises while SCL high
  endtask

  // One bit: drive b (1 = release), return the level sampled with SCL high.
  task automatic bit_xfer(input logic b, output logic smp);
    m_scl = 1'b0; m_sda_oe = !b; quarter();
    m_scl = 1'b1; quarter();
    smp = sda; quarter();
    m_scl = 1'b0; quarter();
  endtask

  task automatic send_byte(input logic [7:0] v, output logic ack);
    logic s;
    for (int i = 7; i >= 0; i--) bit_xfer(v[i], s);
    bit_xfer(1'b1, s);
    ack = !s;
  endtask

  task automatic recv_byte(input logic master_ack, output logic [7:0] v);
    logic s;
    for (int i = 7; i >= 0; i--) begin
      bit_xfer(1'b1, s);
      v[i] = s;
    end
    bit_xfer(!master_ack, s);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       ack;
    logic [7:0] v;
    int         nv;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);

    // write 0xCC to 1010101
    nv = n_valid;
    start_cond();
    send_byte({7'b1010101, 1'b0}, ack);
    check(ack, "address 1010101 acknowledged");
    check(addr_o == 7'b1010101 && !rw_o, "address and R/W reported");
    send_byte(8'hCC, ack);
    check(ack, "data 0xCC acknowledged");
    check(dout == 8'hCC && n_valid == nv + 1, $sformatf("dout %h, %0d pulses", dout, n_valid - nv));
    stop_cond();
    check(sda, "SDA released after STOP");

    // write 0xFC to 1110101
    start_cond();
    send_byte({7'b1110101, 1'b0}, ack);
    check(ack && addr_o == 7'b1110101, "address 1110101 acknowledged");
    send_byte(8'hFC, ack);
    check(ack && dout == 8'hFC && n_valid == nv + 2, $sformatf("dout %h", dout));
    stop_cond();

    // read one byte, master NACKs
    din = 8'hB4;
    start_cond();
    send_byte({7'b0000011, 1'b1}, ack);
    check(ack && rw_o && addr_o == 7'b0000011, "read address acknowledged");
    recv_byte(1'b0, v);
    check(v == 8'hB4, $sformatf("read %h", v));
    check(sda, "slave released SDA after NACK");
    stop_cond();
    check(n_valid == nv + 2, "no dout_valid on reads");

    // read two bytes: ACK then NACK
    din = 8'h3C;
    start_cond();
    send_byte({7'b0000100, 1'b1}, ack);
    // i_din is loaded when the previous acknowledge ends, so the next byte
    // may be set up while the first one is on the bus
    fork
      recv_byte(1'b1, v);
      begin repeat (8 * Q) @(posedge clk); #1 din = 8'h81; end
    join
    check(v == 8'h3C, $sformatf("first of two %h", v));
    recv_byte(1'b0, v);
    check(v == 8'h81, $sformatf("second of two %h", v));
    stop_cond();

    // repeated START in the middle of a write restarts the slave
    start_cond();
    send_byte({7'b0001000, 1'b0}, ack);
    begin
      logic s;
      bit_xfer(1'b0, s);
      bit_xfer(1'b1, s);
    end
    m_scl = 1'b0; m_sda_oe = 1'b0; quarter();   // release SDA, then START again
    start_cond();
    send_byte({7'b1100110, 1'b0}, ack);
    check(ack && addr_o == 7'b1100110, "repeated START: new address taken");
    send_byte(8'h5E, ack);
    check(ack && dout == 8'h5E, "repeated START: data taken");
    stop_cond();
    check(n_valid == nv + 3, "one byte per completed write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
