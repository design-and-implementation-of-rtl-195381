// I2C single-byte master.
//
// One finite state machine moves through the states of the source article's
// I2C diagram: READY (bus idle, SCL and SDA high) -> START (SDA falls while SCL
// is high) -> ADR (seven address bits then the R/W bit, counted down by
// bit_cnt from 7 to 0) -> ACK (the slave's acknowledge; R/W = 0 continues to
// WRITE, R/W = 1 to READ) -> WRITE or READ (eight data bits, most
// significant first) -> the data acknowledge -> STOP (SDA rises while SCL is
// high). From STOP the master starts the next transfer at once if i_ena is
// still high and returns to READY otherwise; a START whose i_ena has dropped
// before SDA is pulled low goes back to READY without touching the bus.
//
// Bit timing: a divider splits every SCL period into four quarters of
// QDIV = ceil(SYS_CLK_HZ / (4*SCL_HZ)) system clocks (63 by default, so SCL
// runs at 99.2 kHz; 16 and 390.6 kHz for 400 kbit/s fast mode). SDA is
// changed in quarter 0 (SCL low), SCL is high in quarters 1 and 2, and SDA is sampled at the end of quarter 1. Both lines
// are open drain: o_scl_oe / o_sda_oe = 1 pulls the line low, 0 releases it;
// i_sda is the resolved bus level. The pull-down enables are registered, so
// the bus follows the state machine one clock later.
//
// Interface: i_ena high in READY latches i_addr, i_rw and i_data_wr and
// starts a transfer; o_busy stays high until it ends; o_done pulses for one
// cycle at the end of STOP, when o_data_rd holds the byte read (R/W = 1) and
// o_ack_err tells whether the slave failed to acknowledge the address or the
// written byte. A transfer takes 20 SCL periods (START, 9 address/ack bits,
// 9 data/ack bits, STOP). i_ena is a level: it is looked at in READY, at the
// end of quarter 1 of START (dropped: back to READY, bus untouched) and at
// the end of STOP (still high: next transfer, inputs latched again).
//
// From the source article: the state sequence, the bit_cnt address counter, the R/W
// branch (0 = write), 7-bit addressing, 8-bit data and the 100 kbit/s
// standard-mode rate. This implementation's own choices: the separate data
// acknowledge states, the master answering a read byte with NACK (it reads
// one byte per transfer), going to STOP on a missing acknowledge, the
// four-quarter bit timing, and the 25 MHz system clock assumed to size the
// divider.
module i2c_master
  import comm_pkg::*;
#(
  parameter int unsigned SYS_CLK_HZ = 25_000_000,
  parameter int unsigned SCL_HZ     = 100_000
) (
  input  logic              i_clk,
  input  logic              i_rst,       // synchronous, active high
  input  logic              i_ena,       // request a transfer
  input  logic [6:0]        i_addr,      // 7-bit slave address
  input  logic              i_rw,        // 0 = write, 1 = read
  input  logic [DATA_W-1:0] i_data_wr,   // byte to write
  output logic [DATA_W-1:0] o_data_rd,   // byte read
  output logic              o_busy,
  output logic              o_done,      // one-cycle pulse at end of transfer
  output logic              o_ack_err,   // slave did not acknowledge
  output logic              o_scl_oe,    // 1 = pull SCL low
  output logic              o_sda_oe,    // 1 = pull SDA low
  input  logic              i_sda        // SDA bus level
);

  // Quarter period rounded up, so SCL never runs faster than SCL_HZ.
  localparam int unsigned QDIV  = (SYS_CLK_HZ + 4 * SCL_HZ - 1) / (4 * SCL_HZ);
  localparam int unsigned CNT_W = (QDIV > 1) ? $clog2(QDIV) : 1;
  localparam logic [CNT_W-1:0] QLAST = CNT_W'(QDIV - 1);

  i2c_state_e        state;
  logic [CNT_W-1:0]  cnt;
  logic [1:0]        q;          // quarter of the current SCL period
  logic              qtick;      // last cycle of a quarter
  logic [2:0]        bit_cnt;
  logic [DATA_W-1:0] tx_sh;      // address+R/W, then write data
  logic [DATA_W-1:0] wr_data;
  logic [DATA_W-1:0] rx_sh;
  logic              rw;
  logic              sda_smp;    // SDA sampled at the end of quarter 1
  logic              scl_oe_d, sda_oe_d;

  assign qtick = (cnt == QLAST);

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      state     <= I2C_READY;
      cnt       <= '0;
      q         <= '0;
      bit_cnt   <= '0;
      tx_sh     <= '0;
      wr_data   <= '0;
      rx_sh     <= '0;
      rw        <= 1'b0;
      sda_smp   <= 1'b1;
      o_data_rd <= '0;
      o_busy    <= 1'b0;
      o_done    <= 1'b0;
      o_ack_err <= 1'b0;
    end else begin
      o_done <= 1'b0;
      if (state == I2C_READY) begin
        cnt <= '0;
        q   <= '0;
        if (i_ena) begin
          tx_sh     <= {i_addr, i_rw};
          wr_data   <= i_data_wr;
          rw        <= i_rw;
          o_busy    <= 1'b1;
          o_ack_err <= 1'b0;
          state     <= I2C_START;
        end
      end else begin
        cnt <= qtick ? '0 : cnt + 1'b1;
        if (qtick) begin
          q <= q + 1'b1;
          if (q == 2'd1) sda_smp <= i_sda;
          unique case (state)
            I2C_START: begin
              if (q == 2'd1 && !i_ena) begin
                state  <= I2C_READY;
                o_busy <= 1'b0;
              end else if (q == 2'd3) begin
                bit_cnt <= 3'd7;
                state   <= I2C_ADR;
              end
            end
            I2C_ADR: begin
              if (q == 2'd3) begin
                tx_sh <= tx_sh << 1;
                if (bit_cnt == 3'd0) state <= I2C_ACK;
                else                 bit_cnt <= bit_cnt - 1'b1;
              end
            end
            I2C_ACK: begin
              if (q == 2'd3) begin
                bit_cnt <= 3'd7;
                if (sda_smp) begin
                  o_ack_err <= 1'b1;
                  state     <= I2C_STOP;
                end else if (rw) begin
                  state <= I2C_READ;
                end else begin
                  tx_sh <= wr_data;
                  state <= I2C_WRITE;
                end
              end
            end
            I2C_WRITE: begin
              if (q == 2'd3) begin
                tx_sh <= tx_sh << 1;
                if (bit_cnt == 3'd0) state <= I2C_WACK;
                else                 bit_cnt <= bit_cnt - 1'b1;
              end
            end
            I2C_WACK: begin
              if (q == 2'd3) begin
                if (sda_smp) o_ack_err <= 1'b1;
                state <= I2C_STOP;
              end
            end
            I2C_READ: begin
              if (q == 2'd1) rx_sh <= {rx_sh[DATA_W-2:0], i_sda};
              if (q == 2'd3) begin
                if (bit_cnt == 3'd0) state <= I2C_RACK;
                else                 bit_cnt <= bit_cnt - 1'b1;
              end
            end
            I2C_RACK: begin
              if (q == 2'd3) begin
                o_data_rd <= rx_sh;
                state     <= I2C_STOP;
              end
            end
            I2C_STOP: begin
              if (q == 2'd3) begin
                o_done <= 1'b1;
                if (i_ena) begin
                  tx_sh     <= {i_addr, i_rw};
                  wr_data   <= i_data_wr;
                  rw        <= i_rw;
                  o_ack_err <= 1'b0;
                  state     <= I2C_START;
                end else begin
                  o_busy <= 1'b0;
                  state  <= I2C_READY;
                end
              end
            end
            default: state <= I2C_READY;
          endcase
        end
      end
    end
  end

  // Line drive for the current state and quarter (1 = pull low).
  always_comb begin
    scl_oe_d = 1'b0;
    sda_oe_d = 1'b0;
    unique case (state)
      I2C_READY: ;
      I2C_START: begin
        sda_oe_d = (q >= 2'd2);
        scl_oe_d = (q == 2'd3);
      end
      I2C_ADR, I2C_WRITE: begin
        scl_oe_d = (q == 2'd0) || (q == 2'd3);
        sda_oe_d = !tx_sh[DATA_W-1];
      end
      I2C_ACK, I2C_WACK, I2C_READ, I2C_RACK: begin
        scl_oe_d = (q == 2'd0) || (q == 2'd3);
      end
      I2C_STOP: begin
        scl_oe_d = (q == 2'd0);
        sda_oe_d = (q <= 2'd1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      o_scl_oe <= 1'b0;
      o_sda_oe <= 1'b0;
    end else begin
      o_scl_oe <= scl_oe_d;
      o_sda_oe <= sda_oe_d;
    end
  end

  // The master changes SDA while SCL is released only to make a START or a
  // STOP condition.
  a_sda_stable_scl_high: assert property (@(posedge i_clk) disable iff (i_rst)
    (!o_scl_oe && !$past(o_scl_oe) && (o_sda_oe != $past(o_sda_oe)))
      |-> ($past(state) inside {I2C_START, I2C_STOP}));

endmodule
