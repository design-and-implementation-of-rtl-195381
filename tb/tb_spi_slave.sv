// Self-checking testbench for spi_slave.
//
// The testbench is the SPI master, written at bit level in mode 0 with an
// SCLK half period of 6 system clocks: it lowers CS_n, sends the 8-bit
// address, the R/W bit and a data byte on MOSI least significant bit first,
// and takes MISO on every rising edge of the data phase. Checked: writing
// 0x8A and then 0xAB (each write returns the byte stored before it), a read
// that returns the stored byte and leaves it unchanged, the reported
// address, R/W and received byte with one o_frame_valid pulse per frame, and
// a frame cut short by CS_n rising, which must change nothing.
module tb_spi_slave;
  localparam int AW = 8, H = 6;
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

  logic          sclk = 1'b0, mosi = 1'b0, cs_n = 1'b1;
  logic          miso, rw_o, valid;
  logic [7:0]    data_o, rx_o;
  logic [AW-1:0] addr_o;

  spi_slave dut (.i_clk(clk), .i_rst(rst), .i_sclk(sclk), .i_mosi(mosi), .i_cs_n(cs_n),
                 .o_miso(miso), .o_data(data_o), .o_addr(addr_o), .o_rw(rw_o),
                 .o_rx_data(rx_o), .o_frame_valid(valid));

  int n_valid = 0;
  always @(posedge clk) if (!rst && valid) n_valid <= n_valid + 1;

  task automatic half();
    repeat (H) @(posedge clk);
    #1;
  endtask

  // Send nbits of a frame (all of it when nbits = AW+9); return MISO bits.
  task automatic frame(input logic [AW-1:0] a, input logic w, input logic [7:0] d,
                       input int nbits, output logic [7:0] got);
    logic [AW+8:0] bits;
    bits = {d, w, a};
    got = '0;
    cs_n = 1'b0; half();
    for (int i = 0; i < nbits; i++) begin
      sclk = 1'b0; mosi = bits[i]; half();
      sclk = 1'b1;
      if (i > AW) got[i - AW - 1] = miso;
      half();
    end
    sclk = 1'b0; half();
    cs_n = 1'b1; half(); half();
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] got;
    int nv;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);
    #1 check(data_o == 8'h00, "reset value");
    nv = n_valid;
    frame(8'h12, 1'b1, 8'h8A, AW + 9, got);
    check(data_o == 8'h8A && rx_o == 8'h8A, $sformatf("write 8A stored %h", data_o));
    check(addr_o == 8'h12 && rw_o, "address and write flag");
    check(got == 8'h00, $sformatf("write returned %h", got));
    frame(8'h34, 1'b1, 8'hAB, AW + 9, got);
    check(data_o == 8'hAB && addr_o == 8'h34, $sformatf("write AB stored %h", data_o));
    check(got == 8'h8A, $sformatf("second write returned %h", got));
    frame(8'h56, 1'b0, 8'hFF, AW + 9, got);
    check(got == 8'hAB, $sformatf("read returned %h", got));
    check(data_o == 8'hAB && !rw_o && addr_o == 8'h56, "read leaves data unchanged");
    check(n_valid == nv + 3, "one valid pulse per frame");
    // cut short after five data bits
    frame(8'h78, 1'b1, 8'h00, AW + 1 + 5, got);
    check(data_o == 8'hAB && n_valid == nv + 3, "aborted frame changes nothing");
    check(!miso, "MISO low while deselected");
    for (int i = 0; i < 5; i++) begin
      logic [7:0] v, prev;
      v = 8'($urandom);
      prev = data_o;
      frame(AW'($urandom), 1'b1, v, AW + 9, got);
      check(got == prev && data_o == v, $sformatf("random write %h", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
