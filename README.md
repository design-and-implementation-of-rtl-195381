# Three serial interfaces as finite state machines: UART, I2C and SPI

Small battery-powered boards talk to their sensors and radios over a few
standard serial links. This RTL implements the three most common ones, a
UART, an I2C master/slave pair and an SPI master/slave pair, each as a
single explicit finite state machine with a small datapath (shift register,
bit counter, clock divider) and nothing else. That structure follows the
article "Design and Implementation of Power Efficient Onboard Communication
Interfaces using FSM", which argues that an FSM-only design of these
protocols needs little power, and which gives the state diagrams, the frame
formats and the test transfers used here. Everything else in this RTL was
chosen here: widths, handshakes, bit timing, synchronisers and error
handling. Each choice is listed below.

All blocks are synchronous to one system clock (25 MHz by default) with a
synchronous, active-high reset. The three interfaces are independent. The
top level, `onboard_comm_top`, places them side by side and brings out the
ports of each.

| Interface | Blocks | Default rate (25 MHz clock) | One transfer |
|---|---|---|---|
| UART, 8N1, full duplex | `uart_transceiver` = `uart_tx` + `uart_rx`, each with a `uart_baud_gen` | 217 clocks per bit, about 115 200 bit/s | 10 bits = 2170 clocks |
| I2C, 7-bit address, one data byte | `i2c_master`, `i2c_slave`, wired-AND bus in the top | 100 kbit/s nominal, 99.2 kHz (252 clocks per SCL period) | 20 SCL periods = 5040 clocks |
| SPI, mode 0, address + R/W + one data byte | `spi_master`, `spi_slave` | SCLK = clock / 8 | 17 bits, 146 clocks |

The state types of all machines are in `comm_pkg`.

## UART

### Frame and baud rate

A frame has a low start bit, eight data bits with the least significant
first, and a high stop bit. It has no parity bit. `uart_baud_gen` is a
modulo-`CLKS_PER_BIT` counter. It flags the last cycle of each bit period
(`o_bit_tick`) and the middle cycle (`o_half_tick`). The FSM that owns the
counter restarts it with `i_clear`. The ticks are decoded from the count
only, so the FSM may drive `i_clear` from a tick without forming a loop.

The default `CLKS_PER_BIT = 217` with a 40 ns clock is the setting of the
article's UART simulation. The article's prose calls this rate 9600 baud.
25 MHz / 217 is about 115 200 baud. For 9600 baud at 25 MHz, set
`CLKS_PER_BIT = 2604`.

### Transmitter (`uart_tx`)

The FSM is `IDLE -> START -> DATA -> STOP -> IDLE`, and each state lasts
one bit period. A one-cycle `i_tx_dv` in IDLE loads `i_tx_byte` into a
right-shifting register. DATA repeats eight times under a 3-bit counter and
drives bit 0 of the register each period. `o_tx_active` is high for the
whole frame. `o_tx_done` pulses on the cycle after the stop bit ends,
exactly 10 x `CLKS_PER_BIT` cycles after the `i_tx_dv` cycle. A request made
during a frame is ignored.

### Receiver (`uart_rx`)

The FSM is `IDLE -> START -> DATA -> STOP -> CLEANUP -> IDLE`. Its working
is the least obvious part of the UART:

* The line passes a two-flop synchroniser first.
* While IDLE, the baud counter is held at zero. A low line moves the FSM to
  START.
* In START, the FSM waits for the half-period tick and looks at the line
  again. If the line is high, it was a glitch and the FSM returns to IDLE.
  If it is low, the baud counter restarts at that moment. From then on every
  end-of-period tick falls in the middle of a bit.
* DATA samples eight bits. STOP samples the stop bit. If the stop bit is
  high, `o_rx_dv` pulses with the byte. If it is low, the byte is dropped and
  `o_rx_frame_err` pulses.
* CLEANUP spends one clock before returning to IDLE.

`o_rx_dv` comes about 9.5 bit periods plus 3 clocks after the falling edge
of the start bit. Mid-bit sampling tolerates a few percent of baud mismatch.
The testbench checks ±2 %.

## I2C

### The bus

SCL and SDA are open-drain lines with pull-up resistors, so a line is high
unless some device pulls it low. The devices here do not use tri-state
outputs. Each one has a pull-down enable output (`*_oe`, 1 = pull low) and
reads the resolved line level. `onboard_comm_top` resolves the lines as

    scl = !m_scl_oe
    sda = !(m_sda_oe | s_sda_oe)

On a board, each `*_oe` drives an open-drain pad instead. The master has no
SCL input, so slaves cannot stretch the clock.

### Master (`i2c_master`)

The state sequence is the article's:

```
READY --ena--> START --> ADR (8 bits) --> ACK --rw=0--> WRITE (8 bits) --> WACK --> STOP
  ^              |                         |--rw=1--> READ  (8 bits) --> RACK --> STOP
  |           ena=0                        '--NACK--------------------------------> STOP
  '--------------'                              STOP --ena=1--> START, --ena=0--> READY
```

`i_ena` is a level, not a pulse. It is looked at in three places:

* in READY, where it starts a transfer and latches `i_addr`, `i_rw` and
  `i_data_wr`;
* halfway through START, where a dropped request returns to READY before
  SDA has been pulled low, so the bus sees nothing;
* at the end of STOP, where a request that is still high starts the next
  transfer straight away. The inputs are latched again at that point.

To run a single transfer, hold `i_ena` high for at least half an SCL period,
then drop it before the transfer ends. To run transfers back to back, keep
`i_ena` high and change the inputs before each STOP ends.

The bit timing is the part that needs care. Every SCL period is four
quarters of `QDIV = ceil(SYS_CLK_HZ / (4*SCL_HZ))` clocks. The division
rounds up, so SCL never runs faster than `SCL_HZ`. QDIV is 63 by default,
which gives 99.2 kHz. With `SCL_HZ = 400_000` (fast mode), QDIV is 16 and
SCL runs at 390.6 kHz.

| quarter | data bit | START | STOP |
|---|---|---|---|
| 0 | SCL low, SDA set | both high | SCL low, SDA low |
| 1 | SCL high (SDA sampled at its end) | both high (`i_ena` checked at its end) | SCL high, SDA low |
| 2 | SCL high | SDA pulled low | SDA released: STOP |
| 3 | SCL low | SCL pulled low | both high |

So SDA changes only while SCL is low, except for the START and STOP edges,
and an assertion in the module checks this. The pull-down enables are
registered, so the bus follows the FSM one clock later.

`bit_cnt` counts from 7 down to 0 through the 7 address bits and the R/W
bit, and then through the 8 data bits, most significant first. After the
address, ACK samples the slave's answer:

* a missing acknowledge goes straight to STOP and sets `o_ack_err`;
* R/W = 0 continues to WRITE. WACK then samples the slave's acknowledge of
  the byte;
* R/W = 1 continues to READ. The master answers the byte with NACK in RACK,
  because it reads one byte per transfer.

`o_done` pulses at the end of STOP. At that point `o_data_rd` and
`o_ack_err` are valid.

### Slave (`i2c_slave`)

The bus in this design has one slave, so the slave acknowledges every
address and reports the address on `o_addr` and the R/W bit on `o_rw`. It
oversamples SCL and SDA through two-flop synchronisers:

* SDA falling while SCL is high is a START. It restarts the slave from any
  state.
* SDA rising while SCL is high is a STOP.
* Bits are taken on SCL rising edges. SDA is changed 3 clocks after SCL
  falling edges.

A written byte appears on `o_dout` with a one-cycle `o_dout_valid`, and the
slave acknowledges it. On a read, the slave sends `i_din`. `i_din` is loaded
at the SCL falling edge that ends the address acknowledge. If the master
answers with ACK, the slave sends `i_din` again, loaded at the end of that
ACK. On NACK it releases the bus until the next START or STOP.

## SPI

### Frame

```
CS_n  ‾‾\______________________________________________/‾‾
MOSI      A0 A1 .. A7 | R/W | D0 D1 .. D7
MISO                         Q0 Q1 .. Q7      (slave's stored byte)
```

Every field is sent least significant bit first. Both ends use an 8-bit
shift register. Data leaves from bit 0 and enters at bit 7, so after eight
clocks the received byte is in place. R/W = 1 is a write. The link is full
duplex: in a write, the master also receives the byte the slave held
before. The bus runs in mode 0. SCLK idles low, both sides sample on the
rising edge, and both change their outputs after the falling edge.

### Master (`spi_master`)

The FSM is `IDLE -> ENABLE -> CS -> ADDRESS -> RW -> DATA | READ_DATA ->
STOP -> IDLE`.

* ENABLE looks at `i_ena` a second time and goes back to IDLE if it has
  dropped. So `i_ena` must be held for at least two clocks.
* CS lowers chip select for half an SCLK period before the first edge.
* In ADDRESS, RW, DATA and READ_DATA, each bit is `SCLK_HALF` clocks low
  and then `SCLK_HALF` clocks high. MISO is sampled on the last high cycle.
* In READ_DATA, MOSI is held low.
* STOP keeps chip select low for half a period and then releases it.

A transfer takes `2 + SCLK_HALF*(2*(ADDR_W+9)+2)` clocks from the `i_ena`
cycle to `o_done`. `o_rd_data` then holds the byte received on MISO.

### Slave (`spi_slave`)

The slave counts SCLK rising edges while chip select is low, using
synchronised copies of SCLK, MOSI and CS_n. On the falling edge after the
R/W bit, it loads its stored byte (`o_data`) into its transmit register and
starts sending it. At the end of a write frame, the received byte replaces
`o_data`. A read frame leaves `o_data` unchanged. Raising chip select early
aborts the frame, and nothing is stored. Because the inputs are
synchronised, the slave needs an SCLK half period of at least 4 system
clocks. MISO is driven low while the slave is deselected.

## Top level (`onboard_comm_top`)

The ports are grouped by prefix:

* `*_uart_*`: the transceiver's ports. Connect `o_uart_tx_serial` to the
  far end's RX, and the far end's TX to `i_uart_rx_serial`.
* `*_i2c_*`: the master's request and result (`i_i2c_ena`, `i_i2c_addr`,
  `i_i2c_rw`, `i_i2c_din`, `o_i2c_rd_data`, `o_i2c_busy`, `o_i2c_done`,
  `o_i2c_ack_err`), the slave's data (`i_i2c_slave_din`, `o_i2c_dout`,
  `o_i2c_dout_valid`, `o_i2c_slave_addr`, `o_i2c_slave_rw`), and the
  resolved `o_i2c_scl` and `o_i2c_sda` for observation.
* `*_spi_*`: the master's request and result, the slave's stored byte and
  last frame, and the four bus lines for observation.

Parameters: `CLKS_PER_BIT` (217), `SYS_CLK_HZ` (25 000 000), `I2C_SCL_HZ`
(100 000), `SPI_ADDR_W` (8) and `SPI_SCLK_HALF` (4).

## What follows the article and what does not

These parts follow the article:

* the state sequences of all three machines;
* the bit counter that drives the UART DATA loops;
* the one-clock UART clean-up state;
* the I2C frame (7-bit address, R/W, acknowledge, 8-bit data, acknowledge)
  and the 100 kbit/s rate;
* the I2C slave that acknowledges any address;
* the SPI address, R/W and data phases, the single chip select and the 8-bit
  full-duplex shift registers;
* 217 clocks per UART bit at 25 MHz;
* the test transfers: UART 0x3A, I2C 0xCC to 1010101 and 0xFC to 1110101,
  SPI 0x8A then 0xAB.

These are this implementation's own choices:

* UART: LSB-first 8N1 frames, the `i_tx_dv` / `o_tx_done` / `o_tx_active`
  handshake, mid-bit sampling, the glitch and framing-error paths, and the
  synchroniser.
* I2C: the four-quarter timing, the separate data acknowledge states, the
  master's NACK after a read byte, the transition to STOP on a missing
  acknowledge, the check of `i_ena` halfway through START, the 25 MHz clock
  assumed for the I2C divider, the slave's internal state machine, and
  multi-byte reads in the slave.
* SPI: the 8-bit address width, the LSB-first order of every field, R/W = 1
  as write, mode 0, the SCLK divider, chip-select setup and hold, and a
  slave that stores one byte.

The article's results are power figures from a commercial synthesis flow:
about 91 µW for the UART, 67 µW for the I2C slave and 44 µW for the SPI
master. This RTL has no low-power features beyond its small size, such as
clock gating or power domains, so those figures cannot be checked or
claimed here.

## Testbenches and simulation

Each block has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it exercises |
|---|---|
| `tb_uart_baud_gen` | tick spacing at 217 and at 6 clocks per bit, restart in mid-period |
| `tb_uart_tx` | every cycle of nine frames (0x3A, 0x00, 0xFF, random), done timing, requests ignored while busy |
| `tb_uart_rx` | frames from a testbench-driven line, latency, ±2 % baud error, glitch, framing error |
| `tb_uart_transceiver` | two transceivers cross-wired and sending simultaneously |
| `tb_i2c_master` | bit-level slave model: the two article writes back to back, a read, NACK, withdrawn request, SCL period, 20-period transfer |
| `tb_i2c_slave` | bit-level master: writes, 1- and 2-byte reads, repeated START in mid-transfer |
| `tb_spi_master` | bit-level slave model: 0x8A, 0xAB, read, random transfers, exact transfer length, withdrawn request |
| `tb_spi_slave` | bit-level master: write/write/read sequence, aborted frame, random writes |
| `tb_uart_9600` | two transceivers at 9600 baud (`CLKS_PER_BIT = 2604`), 0x3A and random bytes echoed back, frame time 26 040 clocks |
| `tb_i2c_fast_mode` | master and slave at 400 kbit/s: the two writes and a read, SCL period 64 clocks |
| `tb_onboard_comm_top` | the whole design at default parameters, all three interfaces running at once; counts each mechanism (UART loopback, full duplex, framing error; I2C write, read, STOP->START, withdrawn START; SPI write, read, withdrawn ENABLE) and fails if any did not occur |

To run one with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    --top-module tb_onboard_comm_top -y rtl -y tb rtl/comm_pkg.sv tb/tb_onboard_comm_top.sv
./obj_dir/Vtb_onboard_comm_top
```

Every testbench runs in well under a second. The RTL passes
`verilator --lint-only -Wall`. The one remark is an unused package constant
when `uart_baud_gen`, which needs nothing from `comm_pkg`, is linted
together with the package. The RTL also elaborates with the slang front end
of Yosys and, with the concurrent assertions skipped
(`read_slang --ignore-assertions`), synthesises without latches.
