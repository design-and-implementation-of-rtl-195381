// Self-checking testbench for spi_master at its defaults (8-bit address,
// SCLK half period of 4 clocks).
//
// The testbench plays the slave from the bus lines alone: while CS_n is low
// it takes MOSI on every SCLK rising edge and, after the address and R/W
// bits, drives its own byte on MISO least significant bit first, changing it
// after falling edges. Checked for writes of 0x8A and 0xAB and for reads:
// the address, R/W bit and data sent, the byte received on o_rd_data, the
// number of SCLK edges, the SCLK half period, CS_n low over the whole frame,
// the transfer length in clocks, and a request dropped in ENABLE (no chip
// select).
module tb_spi_master;
  localparam int AW = 8, HALF = 4;
  localparam int FRAME = AW + 1 + 8;
  localparam int XFER  = 2 + HALF * (2 * FRAME + 2);   // i_ena to o_done
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

  logic          ena = 1'b0, rw = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [7:0]    wr_data = '0, rd_data;
  logic          busy, done, sclk, mosi, cs_n;
  logic          miso = 1'b0;

  spi_master dut (.i_clk(clk), .i_rst(rst), .i_ena(ena), .i_addr(addr), .i_rw(rw),
                  .i_wr_data(wr_data), .o_rd_data(rd_data), .o_busy(busy), .o_done(done),
                  .o_sclk(sclk), .o_mosi(mosi), .o_cs_n(cs_n), .i_miso(miso));

  // ---------------- slave model ----------------
  logic [FRAME-1:0] got;        // bits in arrival order, first at [0]
  int               nbits = 0;
  logic [7:0]       model_byte = 8'h00;
  always @(posedge sclk) if (!rst) begin
    check(!cs_n, "SCLK rises only with CS_n low");
    if (nbits < FRAME) got[nbits] = mosi;
    nbits++;
  end
  always @(negedge sclk) begin
    if (nbits >= AW + 1 && nbits < FRAME) miso = model_byte[nbits - (AW + 1)];
  end
  always @(posedge cs_n) nbits = 0;

  // SCLK half period and CS_n activity
  int cyc = 0, last_edge = 0;
  int     n_half_ok = 0, n_half_bad = 0, n_cs = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(sclk) begin
    if (cyc - last_edge == HALF) n_half_ok++;
    else if (!rst && !cs_n && cyc - last_edge < HALF) n_half_bad++;
    last_edge = cyc;
  end
  always @(negedge cs_n) if (!rst) n_cs++;

  initial begin : watchdog
    repeat (20 * XFER + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [AW-1:0] a, input logic w, input logic [7:0] d,
                      input logic [7:0] slave_byte);
    int t0;
    model_byte = slave_byte;
    @(posedge clk); #1;
    ena = 1'b1; addr = a; rw = w; wr_data = d;
    t0 = cyc;
    repeat (2) @(posedge clk);
    #1 ena = 1'b0; addr = ~a; wr_data = ~d;
    do @(posedge clk); while (!done);
    check(cyc - t0 == XFER, $sformatf("transfer %0d cycles, expected %0d", cyc - t0, XFER));
    #1;
    check(got[AW-1:0] == a, $sformatf("address %h sent as %h", a, got[AW-1:0]));
    check(got[AW] == w, "R/W bit");
    if (w) check(got[FRAME-1:AW+1] == d, $sformatf("data %h sent as %h", d, got[FRAME-1:AW+1]));
    else   check(got[FRAME-1:AW+1] == 8'h00, "MOSI low while reading");
    check(rd_data == slave_byte, $sformatf("received %h, slave sent %h", rd_data, slave_byte));
    repeat (2) @(posedge clk);
    #1 check(cs_n && !busy && !sclk, "idle after transfer");
    check(nbits == 0, "CS_n was released");
  endtask

  initial begin
    int c0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);
    #1 check(cs_n && !sclk && !busy, "idle after reset");
    xfer(8'h12, 1'b1, 8'h8A, 8'h00);   // write 0x8A
    xfer(8'h12, 1'b1, 8'hAB, 8'h8A);   // write 0xAB (full duplex: old byte back)
    xfer(8'h12, 1'b0, 8'h00, 8'hAB);   // read
    for (int i = 0; i < 6; i++)
      xfer(AW'($urandom), 1'($urandom), 8'($urandom), 8'($urandom));
    // request withdrawn in ENABLE: no chip select
    c0 = n_cs;
    #1 ena = 1'b1;
    @(posedge clk); #1 ena = 1'b0;
    check(busy, "busy in ENABLE");
    repeat (20) @(posedge clk);
    #1 check(n_cs == c0 && cs_n && !busy, "withdrawn request leaves CS_n high");
    check(n_cs == 9, $sformatf("%0d chip selects", n_cs));
    check(n_half_ok >= 9 * 2 * FRAME - 9 && n_half_bad == 0,
          $sformatf("SCLK half periods: %0d ok %0d short", n_half_ok, n_half_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
