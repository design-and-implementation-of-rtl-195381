// I2C master and slave together at 400 kbit/s fast mode (25 MHz clock).
//
// i2c_master is built with SCL_HZ = 400 000, which gives quarters of 16
// clocks and an SCL period of 64 clocks (390.6 kHz, never above 400 kHz).
// It talks to i2c_slave over a wired-AND bus as on a board. The testbench
// repeats the standard-mode example (0xCC to 1010101, 0xFC to 1110101) and
// a read, and checks the bytes, the acknowledges, the SCL period and that
// the rate does not exceed 400 kHz.
module tb_i2c_fast_mode;
  localparam int SCL_HZ = 400_000;
  localparam int QDIV   = (25_000_000 + 4 * SCL_HZ - 1) / (4 * SCL_HZ);   // 16
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

  logic       ena = 1'b0, rw = 1'b0;
  logic [6:0] addr = '0, s_addr;
  logic [7:0] data_wr = '0, data_rd, s_din = '0, s_dout;
  logic       busy, done, ack_err, m_scl_oe, m_sda_oe, s_sda_oe, s_valid, s_rw;
  wire        scl = !m_scl_oe;
  wire        sda = !(m_sda_oe || s_sda_oe);

  i2c_master #(.SCL_HZ(SCL_HZ)) u_m (
    .i_clk(clk), .i_rst(rst), .i_ena(ena), .i_addr(addr), .i_rw(rw), .i_data_wr(data_wr),
    .o_data_rd(data_rd), .o_busy(busy), .o_done(done), .o_ack_err(ack_err),
    .o_scl_oe(m_scl_oe), .o_sda_oe(m_sda_oe), .i_sda(sda));
  i2c_slave u_s (
    .i_clk(clk), .i_rst(rst), .i_scl(scl), .i_sda(sda), .o_sda_oe(s_sda_oe), .i_din(s_din),
    .o_dout(s_dout), .o_dout_valid(s_valid), .o_addr(s_addr), .o_rw(s_rw));

  int cyc = 0, last_rise = -1, n_ok = 0, n_bad = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge scl) if (!rst) begin
    if (last_rise >= 0 && busy) begin
      if (cyc - last_rise == 4 * QDIV) n_ok++;
      else if (cyc - last_rise < 4 * QDIV) n_bad++;
    end
    last_rise = cyc;
  end

  initial begin : watchdog
    repeat (6 * 22 * 4 * QDIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [6:0] a, input logic w, input logic [7:0] d);
    @(posedge clk); #1 ena = 1'b1; addr = a; rw = w; data_wr = d;
    repeat (4 * QDIV) @(posedge clk);
    #1 ena = 1'b0;
    do @(posedge clk); while (!done);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk);
    xfer(7'b1010101, 1'b0, 8'hCC);
    check(!ack_err && s_dout == 8'hCC && s_addr == 7'b1010101, $sformatf("write CC: %h", s_dout));
    xfer(7'b1110101, 1'b0, 8'hFC);
    check(!ack_err && s_dout == 8'hFC && s_addr == 7'b1110101, $sformatf("write FC: %h", s_dout));
    s_din = 8'h4B;
    xfer(7'b0110011, 1'b1, 8'h00);
    check(!ack_err && data_rd == 8'h4B && s_rw, $sformatf("read %h", data_rd));
    check(n_ok > 50 && n_bad == 0, $sformatf("SCL periods %0d ok %0d short", n_ok, n_bad));
    check(25_000_000 / (4 * QDIV) <= SCL_HZ, "SCL not above 400 kHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
