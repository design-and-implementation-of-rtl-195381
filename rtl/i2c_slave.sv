// I2C single-byte slave.
//
// The bus has one slave, so the slave acknowledges whatever 7-bit address
// the master sends and reports it on o_addr. SCL and SDA pass a two-flop
// synchroniser and are compared with their previous values: SDA falling
// while SCL is high is a START and resets the receiver to the address
// phase from any state; SDA rising while SCL is high is a STOP and returns
// it to IDLE. Bits are taken on SCL rising edges and SDA is only changed
// after SCL falling edges:
//   ADDR      8 bits (address, then R/W) shifted in, most significant first
//   ADDR_ACK  SDA pulled low for one bit (acknowledge)
//   WRITE     8 data bits shifted in; the byte appears on o_dout with a
//             one-cycle o_dout_valid pulse, then WR_ACK acknowledges it
//   READ      i_din is shifted out, most significant first; RD_ACK samples
//             the master's answer: ACK sends i_din again, NACK ends
//   WAIT      bus released until the next START or STOP
//
// Interface: o_sda_oe = 1 pulls SDA low (open drain); i_scl / i_sda are the
// bus levels. i_din is loaded at the SCL falling edge that ends the address
// acknowledge (or the master's ACK of the previous byte) and must be stable
// then. Timing: SDA is driven 3 system clocks after the SCL falling
// edge (synchroniser and edge detector), so the SCL low time must exceed
// that; at the 100 kbit/s master timing it is 125 clocks.
//
// The acknowledge-any-address behaviour and the byte format are the
// source article's; the oversampled implementation, the state names and the
// continuation of a read after a master ACK are this implementation's own.
module i2c_slave
  import comm_pkg::*;
(
  input  logic              i_clk,
  input  logic              i_rst,        // synchronous, active high
  input  logic              i_scl,
  input  logic              i_sda,
  output logic              o_sda_oe,     // 1 = pull SDA low
  input  logic [DATA_W-1:0] i_din,        // byte returned to a read
  output logic [DATA_W-1:0] o_dout,       // last byte written by the master
  output logic              o_dout_valid, // one-cycle pulse with o_dout
  output logic [6:0]        o_addr,       // address of the last transfer
  output logic              o_rw          // R/W bit of the last transfer
);

  i2c_slave_state_e  state;
  logic [1:0]        scl_sync, sda_sync;
  logic              scl_p, sda_p;
  logic              scl_s, sda_s;
  logic              rise, fall, start_det, stop_det;
  logic [3:0]        cnt;
  logic [DATA_W-1:0] sh;
  logic              master_ack;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      scl_sync <= 2'b11;
      sda_sync <= 2'b11;
      scl_p    <= 1'b1;
      sda_p    <= 1'b1;
    end else begin
      scl_sync <= {scl_sync[0], i_scl};
      sda_sync <= {sda_sync[0], i_sda};
      scl_p    <= scl_sync[1];
      sda_p    <= sda_sync[1];
    end
  end

  assign scl_s     = scl_sync[1];
  assign sda_s     = sda_sync[1];
  assign rise      = scl_s && !scl_p;
  assign fall      = !scl_s && scl_p;
  assign start_det = scl_s && scl_p && sda_p && !sda_s;
  assign stop_det  = scl_s && scl_p && !sda_p && sda_s;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      state        <= I2CS_IDLE;
      cnt          <= '0;
      sh           <= '0;
      master_ack   <= 1'b0;
      o_sda_oe     <= 1'b0;
      o_dout       <= '0;
      o_dout_valid <= 1'b0;
      o_addr       <= '0;
      o_rw         <= 1'b0;
    end else begin
      o_dout_valid <= 1'b0;
      if (start_det) begin
        state    <= I2CS_ADDR;
        cnt      <= '0;
        o_sda_oe <= 1'b0;
      end else if (stop_det) begin
        state    <= I2CS_IDLE;
        o_sda_oe <= 1'b0;
      end else begin
        unique case (state)
          I2CS_IDLE, I2CS_WAIT: ;
          I2CS_ADDR: begin
            if (rise) begin
              sh  <= {sh[DATA_W-2:0], sda_s};
              cnt <= cnt + 1'b1;
            end else if (fall && cnt == 4'd8) begin
              o_addr   <= sh[DATA_W-1:1];
              o_rw     <= sh[0];
              o_sda_oe <= 1'b1;
              state    <= I2CS_ADDR_ACK;
            end
          end
          I2CS_ADDR_ACK: begin
            if (fall) begin
              cnt <= '0;
              if (o_rw) begin
                sh       <= i_din;
                o_sda_oe <= !i_din[DATA_W-1];
                state    <= I2CS_READ;
              end else begin
                o_sda_oe <= 1'b0;
                state    <= I2CS_WRITE;
              end
            end
          end
          I2CS_WRITE: begin
            if (rise) begin
              sh  <= {sh[DATA_W-2:0], sda_s};
              cnt <= cnt + 1'b1;
            end else if (fall && cnt == 4'd8) begin
              o_dout       <= sh;
              o_dout_valid <= 1'b1;
              o_sda_oe     <= 1'b1;
              state        <= I2CS_WR_ACK;
            end
          end
          I2CS_WR_ACK: begin
            if (fall) begin
              o_sda_oe <= 1'b0;
              state    <= I2CS_WAIT;
            end
          end
          I2CS_READ: begin
            if (rise) begin
              cnt <= cnt + 1'b1;
            end else if (fall) begin
              if (cnt == 4'd8) begin
                o_sda_oe <= 1'b0;
                state    <= I2CS_RD_ACK;
              end else begin
                sh       <= sh << 1;
                o_sda_oe <= !sh[DATA_W-2];
              end
            end
          end
          I2CS_RD_ACK: begin
            if (rise) begin
              master_ack <= !sda_s;
            end else if (fall) begin
              if (master_ack) begin
                cnt      <= '0;
                sh       <= i_din;
                o_sda_oe <= !i_din[DATA_W-1];
                state    <= I2CS_READ;
              end else begin
                state <= I2CS_WAIT;
              end
            end
          end
          default: state <= I2CS_IDLE;
        endcase
      end
    end
  end

  // The slave only pulls SDA low in a state that owns the data line.
  a_drive_owned: assert property (@(posedge i_clk) disable iff (i_rst)
    o_sda_oe |-> $past(state) inside {I2CS_ADDR, I2CS_ADDR_ACK, I2CS_WRITE,
                                      I2CS_WR_ACK, I2CS_READ, I2CS_RD_ACK});

endmodule
