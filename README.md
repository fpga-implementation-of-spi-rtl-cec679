# SPI to I2C bridge

A host that only has an SPI port often needs to reach sensors, EEPROMs and
other parts that only speak I2C. This design lets an SPI master drive an I2C
bus: the host shifts a 32-bit command word into the bridge over SPI, the
bridge runs the matching I2C transfer as bus master, and the outcome (the byte
read, or the acknowledge status) comes back to the host in the next SPI word.

```
 SPI master          spi_to_i2c_bridge                         I2C bus
 (host)      +--------------------------------------------+
   sclk ---->|            +------------+                  |
   ss_n ---->| spi_slave  | spi_to_i2c |   i2c_master     |--- SCL --+-- slave 0
   mosi ---->|  32-bit    | controller |   START/addr/    |--- SDA --+-- slave 1
   miso <----|  shift reg | (4 states) |   data/ACK/STOP  |          +-- slave 2
             +--------------------------------------------+
```

The design follows the published "SPI to I2C bridge" architecture: an SPI
slave, a four-state bridge controller and an I2C master, with the I2C
transaction enable in bit 24 of the SPI word. Everything that description
leaves open (word layout, handshakes, bit timing, pin style) is decided here
and listed under "Design choices" below.

## One command, end to end

1. The host selects the bridge (`ss_n` low) and clocks 32 bits in on `mosi`.
   At the same time the bridge shifts out its transmit buffer on `miso`,
   which holds the response to the previous command.
2. When the word is complete and `ss_n` is high again, the controller takes
   the word and looks at bit 24. If it is 0 the word is dropped: no I2C
   activity, and the transmit buffer is left as it is.
3. If bit 24 is 1, the I2C master sends START, the 7-bit address with the R/W
   bit, waits for the slave's acknowledge, then writes or reads one data byte
   and sends STOP.
4. The controller writes the response word into the SPI transmit buffer as
   soon as the host is not selecting the bridge.
5. The host fetches the response with its next SPI word, which can be the
   next command.

One I2C transfer of one byte takes about 20 SCL periods: roughly 52 us at the
default 400 kHz. The host has to wait at least that long before reading the
response, or it reads the previous one again. A real host would wait a fixed
time, or poll: a response word always has bit 24 set.

## Command and response words

Command word, host to bridge:

| bits    | field                                  |
|---------|----------------------------------------|
| 31:25   | ignored                                |
| 24      | I2C transaction enable                 |
| 23:17   | 7-bit I2C slave address                |
| 16      | R/W: 0 write the slave, 1 read it      |
| 15:8    | ignored                                |
| 7:0     | byte to write (ignored for a read)     |

Response word, bridge to host, shifted out during the next SPI word:

| bits    | field                                            |
|---------|--------------------------------------------------|
| 31:25   | 0                                                |
| 24      | 1: this word carries a result                    |
| 23:16   | address and R/W bit of the command, echoed       |
| 15:10   | 0                                                |
| 9       | arbitration lost to another I2C master           |
| 8       | acknowledge error: the address or byte was NACKed|
| 7:0     | byte read (read), or the byte written (write)    |

After reset the transmit buffer is zero. `spi_i2c_pkg` holds the
`make_cmd` and `make_resp` functions that build both words.

## Bridge controller (`spi_to_i2c`)

Four states, encoded in two bits:

| state          | code | leaves when                                         |
|----------------|------|-----------------------------------------------------|
| `READY`        | 00   | SPI slave not busy and holding a new word: latch it, acknowledge it to the slave, go to `SPI_RX` |
| `SPI_RX`       | 01   | always: to `I2C` if bit 24 is set, else back to `READY` |
| `I2C`          | 10   | the I2C master's `busy` has risen and fallen again  |
| `SPI_LOAD_TX`  | 11   | the SPI slave is not selected: load the response, back to `READY` |

In `I2C` the controller raises `i2c_ena` with the command's address, R/W and
data, and lowers it on the first cycle the master reports `busy`, so exactly
one byte is transferred. A new word reaches `i2c_ena` two clock cycles after
the SPI slave flags it, and the response is loaded two cycles after the
master drops `busy` (if the host is not selecting the bridge then).

## I2C master (`i2c_master`)

### Bit timing

Each SCL period is four quarters of `QDIV = ceil(CLK_FREQ / (4 * BUS_FREQ))`
clock cycles:

```
quarter     0        1        2        3
SCL      ___low___________/‾‾‾‾‾‾‾high‾‾‾‾‾‾‾\___
SDA      (hold)   X change          ^ sample
```

SCL is held low in quarters 0 and 1, SDA changes at the start of quarter 1
(well inside the low phase), SCL is released for quarters 2 and 3, and SDA is
sampled at the end of quarter 2. START is SDA falling at the end of quarter 2
with SCL high; STOP is SDA rising at the same point. The SCL and SDA inputs
go through two-flop synchronizers, which adds 3 cycles to every period: at
50 MHz and 400 kHz a bit takes 131 cycles (382 kHz). Rounding QDIV up keeps the
rate at or below the nominal one.

### States

`ready`, `start`, `command` (address byte), `slv_ack1`, `wr`, `rd`,
`slv_ack2`, `mstr_ack`, `stop`, one-hot encoded. A NACK on the address or on a
written byte sets `ack_error` and goes straight to `stop`. When reading, the
master acknowledges each byte it wants more of and NACKs the last one.

### Command handshake

Put `addr`, `rw`, `data_wr` in place and raise `ena`. `busy` rises when the
command has been taken. It falls a quarter period before the end of the
byte's acknowledge bit; `data_rd` and `ack_error` are valid from then on. If
`ena` is still high at the end of the acknowledge bit, the inputs then
present are taken as the next command: the same address and direction add one
more byte to the transfer, a different one causes a repeated START. So to
move n bytes, keep `ena` high and update `data_wr` each time `busy` rises;
drop `ena` after the last rise. For a read, the decision to ACK or NACK the
byte is taken a quarter period into the acknowledge bit, from `ena` and
`addr`/`rw` at that moment. The bridge controller uses only single-byte
transfers; the multi-byte and repeated-START paths are there for other users
of the module and are tested on their own.

### Sharing the bus

- **Clock stretching.** A slave may hold SCL low after the master releases
  it. Quarter 2 only starts counting once SCL is seen high, so the master
  waits for as long as the slave needs.
- **Bus busy.** The master watches the bus for START and STOP and will not
  start while another master owns it. If another master's START appears
  while this one is still in its own START state, before it has pulled SDA
  low, it gives up and reports `arb_lost`. Only STARTs within the
  synchronizer delay of each other (2-3 clocks) lead to bit-by-bit
  arbitration.
- **Clock synchronization.** Once SCL has been seen high, the master ends its
  high phase as soon as another device pulls SCL low. If that happens in
  quarter 2, SDA is sampled at once. So SCL on the wired-AND bus has the
  longest low phase and the shortest high phase of the masters. This works
  between masters of different speeds; the tests pair 400 kHz with 100 kHz.
- **Arbitration.** When the master releases SDA to send a 1 (address bit,
  data bit, or NACK as receiver) and samples SDA low, another master has won.
  It releases both lines at once, drops `busy`, sets `arb_lost` and returns to
  `ready`, then waits for the winner's STOP. Nothing is lost on the bus,
  because the winner's data is what the bus carried. The controller reports
  this in bit 9 of the response. The host then decides whether to send the
  command again.

## SPI slave (`spi_slave`)

The slave is built around a 32-bit shift register that swaps its contents
with the host's as the bits go by, most significant bit first. `CPOL` sets the
idle level of `sclk`. `CPHA` = 0 samples on the leading edge, with the first
bit already on `miso` when `ss_n` falls. `CPHA` = 1 samples on the trailing
edge. Host and bridge must be set to the same mode.

The slave runs on the system clock: `sclk`, `ss_n` and `mosi` are
synchronized and `sclk` edges are found by comparing samples. **The system
clock must be at least 8 times the SCLK rate** (6.25 MHz SCLK at the default
50 MHz clock).

Flags seen by the controller:

- `rrdy`: a received word is waiting. It is set 3 clocks after the last
  sampling edge and cleared by `rx_req`.
- `trdy`: the transmit buffer may be reloaded. It is set when a selection
  starts and copies the buffer to the shift register, and cleared by
  `tx_load_en`.
- `roe`: a new word arrived while `rrdy` was still set, so the old word was
  lost.
- `busy`: the slave is selected.

`st_load_*` writes the three flags directly. `miso_oe` is high only while the
slave is selected.

## Pins

| port                | dir | meaning                                        |
|---------------------|-----|------------------------------------------------|
| `clk`, `reset_n`    | in  | system clock; asynchronous active-low reset    |
| `sclk`, `ss_n`, `mosi` | in | SPI from the host                           |
| `miso`, `miso_oe`   | out | SPI data to the host; drive the pin only when `miso_oe` is 1 |
| `scl_i`, `sda_i`    | in  | level on the I2C lines                         |
| `scl_oe`, `sda_oe`  | out | 1 = pull the line low; 0 = release it to the pull-up |

On an FPGA, connect each I2C line as `assign SDA = sda_oe ? 1'b0 : 1'bz;
assign sda_i = SDA;` (likewise SCL), and `MISO = miso_oe ? miso : 1'bz`.

Parameters of the top: `CLK_FREQ` (default 50 000 000), `I2C_FREQ` (400 000;
100 000 gives standard mode), `CPOL` and `CPHA` (both 0).

## Design choices and departures from the original

- The command and response layouts, except the enable bit at position 24,
  are this design's own. So are the one-byte-per-command scheme, the ena/busy
  handshake and the quarter-period bit timing.
- In the original schematic the SPI slave has no system-clock input. This
  one oversamples SCLK with the system clock, so the whole design runs in one
  clock domain. The cost is the 8x clock-to-SCLK ratio.
- Open-drain and tri-state pins are split into separate signals, so the RTL
  contains no tri-state logic.
- The original state table gives `slv_ack1` the same one-hot code as `wr`.
  Here `slv_ack1` gets its own bit.
- A NACK always ends the transfer with STOP, never with a repeated START.
  After losing arbitration the master releases the bus at once, without
  clocking out the rest of the byte. It has no slave mode to fall back to.
- The original frame table for a master transmitter ends the last written
  byte with N. Here a written byte is followed by whatever acknowledge the
  slave gives. A NACK is reported in the response as an error, like a NACKed
  address.
- SPI is quoted in the original at rates far above what this slave takes.
  Because SCLK is oversampled, it must stay at or below clk/8, which is
  6.25 MHz at 50 MHz.
- Arbitration loss is reported to the host in response bit 9. The original
  connection list has no such signal.
- Not built:
  - The SPI control, status, baud-rate and data registers of a general SPI
    peripheral. Mode and width are parameters instead.
  - I2C high-speed mode (3.4 Mbit/s).
  - 10-bit I2C addressing.
- For scale: the original, synthesized for a Spartan-3E, used 276 flip-flops.
  Generic synthesis of this RTL gives about 240 flip-flop bits.

## Files

- `rtl/spi_i2c_pkg.sv`: word layout, state encodings, `make_cmd` and
  `make_resp`
- `rtl/spi_slave.sv`, `rtl/spi_to_i2c.sv`, `rtl/i2c_master.sv`: the three
  blocks
- `rtl/spi_to_i2c_bridge.sv`: the top level
- `tb/spi_master_model.sv`: behavioural SPI host, all four modes
- `tb/i2c_slave_model.sv`: behavioural I2C slave with a 16-byte memory that
  returns bytes in the order written, and optional clock stretching
- `tb/tb_*.sv`: self-checking testbenches, one per block. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulation

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/spi_i2c_pkg.sv tb/tb_spi_to_i2c_bridge.sv --top-module tb_spi_to_i2c_bridge
./obj_dir/Vtb_spi_to_i2c_bridge
```

Replace the testbench name to run another one: `tb_spi_slave`,
`tb_spi_to_i2c`, `tb_i2c_master` or `tb_bridge_spi_modes` (the last needs
the same file list as the end-to-end test).

What the testbenches cover:

- `tb_spi_slave`: all four SPI modes, words in both directions, the flags,
  overrun and status loading.
- `tb_spi_to_i2c`: the controller on its own, against a stand-in I2C master.
  It checks every state transition, the response words, and the two-cycle
  latencies.
- `tb_i2c_master`: single-byte and multi-byte writes and reads, repeated
  START, NACK, clock stretching, and the SCL period. A second master at
  100 kHz on the same bus tests arbitration, clock synchronization and
  waiting for a busy bus.
- `tb_spi_to_i2c_bridge`: the whole bridge at its default parameters, with
  three slaves (one of them stretching the clock) and a competing master.
  - It runs writes, reads, dropped words, a NACKed address, and a response
    load held off while the host keeps the bridge selected.
  - It runs arbitration won and lost, and a command that must wait for the
    other master's STOP.
  - Every response word and every slave memory is compared against a model.
  - During the first transfers it measures the SCL period, which must be at
    least 125 clock cycles (400 kHz at 50 MHz).

  In the contention rounds the competing master starts 0 to 11 clocks after
  the SPI word ends. Depending on that offset, the bridge backs off at START,
  arbitrates bit by bit, or wins outright. Each outcome is checked against
  the response word and the slave memory.

  The run covers about 8 ms of bus time and takes a few seconds.
- `tb_bridge_spi_modes`: four copies of the whole bridge, one per SPI mode,
  each writing a byte to its own slave and reading it back.
