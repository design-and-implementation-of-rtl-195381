// Self-checking testbench for i2c_master at its defaults (25 MHz, 100 kbit/s).
//
// The bus is modelled as on a board: each line is high unless the master or
// the testbench pulls it low. The testbench plays the slave at bit level,
// from the line levels alone: it detects START and STOP, takes address, R/W
// and data bits on SCL rising edges, pulls SDA low to acknowledge after SCL
// falls, and sends a byte on reads. Checked: the address and byte sent
// (1010101 <- 0xCC, then 1110101 <- 0xFC back to back with i_ena held, as in
// the source article's example), a read, the SCL period, the transfer length of
// 20 SCL periods, a missing acknowledge (o_ack_err), and a request dropped
// before the START condition (no bus activity).
module tb_i2c_master;
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

  logic       ena = 1'b0, rw = 1'b0;
  logic [6:0] addr = '0;
  logic [7:0] data_wr = '0, data_rd;
  logic       busy, done, ack_err, scl_oe, sda_oe;
  logic       tb_sda_oe = 1'b0;
  logic       scl, sda;

  assign scl = !scl_oe;
  assign sda = !(sda_oe || tb_sda_oe);

  i2c_master dut (.i_clk(clk), .i_rst(rst), .i_ena(ena), .i_addr(addr), .i_rw(rw),
                  .i_data_wr(data_wr), .o_data_rd(data_rd), .o_busy(busy), .o_done(done),
                  .o_ack_err(ack_err), .o_scl_oe(scl_oe), .o_sda_oe(sda_oe), .i_sda(sda));

  // ---------------- bit-level slave model ----------------
  bit         model_nack = 1'b0;      // refuse the address
  logic [7:0] model_rd_byte = 8'h00;  // byte returned on reads
  logic [7:0] got_hdr, got_data;
  int         n_start = 0, n_stop = 0, n_frames = 0;
  bit         master_nacked;

  always @(negedge sda) if (scl && !rst) n_start++;
  always @(posedge sda) if (scl && !rst) n_stop++;

  initial begin : slave_model
    wait (!rst);
    forever begin
      // wait for a START
      @(negedge sda iff scl);
      for (int i = 7; i >= 0; i--) begin
        @(posedge scl);
        got_hdr[i] = sda;
      end
      @(negedge scl);
      if (!model_nack) begin
        #100 tb_sda_oe = 1'b1;
        @(negedge scl);
        #100 tb_sda_oe = 1'b0;
        if (!got_hdr[0]) begin
          for (int i = 7; i >= 0; i--) begin
            @(posedge scl);
            got_data[i] = sda;
          end
          @(negedge scl);
          #100 tb_sda_oe = 1'b1;
          @(negedge scl);
          #100 tb_sda_oe = 1'b0;
        end else begin
          for (int i = 7; i >= 0; i--) begin
            tb_sda_oe = !model_rd_byte[i];
            @(negedge scl);
            #100;
          end
          tb_sda_oe = 1'b0;
          @(posedge scl);
          master_nacked = sda;
        end
      end
      n_frames++;
    end
  end

  // ---------------- SCL period measurement ----------------
  int cyc = 0, last_rise = -1;
  int     n_period_ok = 0, n_period_bad = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge scl) begin
    if (last_rise >= 0 && busy && !rst) begin
      if (cyc - last_rise == 4 * QDIV) n_period_ok++;
      else if (cyc - last_rise < 4 * QDIV) n_period_bad++;
    end
    last_rise = cyc;
  end

  initial begin : watchdog
    repeat (8 * 22 * 4 * QDIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_start;

  task automatic wait_done();
    do @(posedge clk); while (!done);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (10) @(posedge clk);
    check(scl && sda && !busy, "bus idle after reset");

    // --- write 0xCC to 1010101, then 0xFC to 1110101 without releasing ena
    #1 ena = 1'b1; addr = 7'b1010101; rw = 1'b0; data_wr = 8'hCC;
    t_start = cyc;
    repeat (6 * QDIV) @(posedge clk);       // into the address phase
    #1 addr = 7'b1110101; data_wr = 8'hFC;  // next request, taken at STOP
    wait_done();
    check(cyc - t_start >= 20 * 4 * QDIV && cyc - t_start <= 20 * 4 * QDIV + 4,
          $sformatf("write took %0d cycles, expected %0d", cyc - t_start, 20 * 4 * QDIV));
    check(got_hdr == {7'b1010101, 1'b0}, $sformatf("header %b", got_hdr));
    check(got_data == 8'hCC, $sformatf("data %h", got_data));
    check(!ack_err, "first write acknowledged");
    check(busy, "still busy: second transfer started from STOP");
    repeat (4 * QDIV) @(posedge clk);
    #1 ena = 1'b0;
    wait_done();
    check(got_hdr == {7'b1110101, 1'b0}, $sformatf("header2 %b", got_hdr));
    check(got_data == 8'hFC, $sformatf("data2 %h", got_data));
    check(!ack_err, "second write acknowledged");
    repeat (2) @(posedge clk);
    #1 check(!busy && scl && sda, "bus released after STOP");
    check(n_start == 2 && n_stop == 2, $sformatf("%0d starts %0d stops", n_start, n_stop));

    // --- read 0x96 from 0101010
    model_rd_byte = 8'h96;
    repeat (20) @(posedge clk);
    #1 ena = 1'b1; addr = 7'b0101010; rw = 1'b1;
    repeat (4 * QDIV) @(posedge clk);
    #1 ena = 1'b0;
    wait_done();
    check(got_hdr == {7'b0101010, 1'b1}, $sformatf("read header %b", got_hdr));
    check(data_rd == 8'h96, $sformatf("read data %h", data_rd));
    check(master_nacked, "master answers a single read byte with NACK");
    check(!ack_err, "read acknowledged");

    // --- nobody acknowledges the address
    model_nack = 1'b1;
    repeat (20) @(posedge clk);
    #1 ena = 1'b1; addr = 7'b0000001; rw = 1'b0; data_wr = 8'h11;
    t_start = cyc;
    repeat (4 * QDIV) @(posedge clk);
    #1 ena = 1'b0;
    wait_done();
    check(ack_err, "missing acknowledge reported");
    check(cyc - t_start <= 11 * 4 * QDIV + 4, "NACK goes straight to STOP");
    model_nack = 1'b0;

    // --- request withdrawn before START: back to READY, bus untouched
    repeat (20) @(posedge clk);
    begin
      int s0;
      s0 = n_start;
      #1 ena = 1'b1; addr = 7'b1111111;
      @(posedge clk); #1 ena = 1'b0;
      check(busy, "busy while in START");
      repeat (3 * QDIV) @(posedge clk);
      #1 check(!busy && n_start == s0 && sda && scl, "aborted START leaves bus idle");
    end
    check(n_period_ok > 60 && n_period_bad == 0,
          $sformatf("SCL period %0d ok %0d short", n_period_ok, n_period_bad));
    check(n_frames == 4, $sformatf("%0d frames seen by slave", n_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
