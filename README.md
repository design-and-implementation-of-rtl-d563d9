# I2C master controller, test-card slave and on-chip stress test

I2C needs only two open-drain wires, SCL and SDA, to link a master to many
addressed devices. This RTL is an I2C master controller for an FPGA. It
supports all the features of the bus that are usually exercised during
validation:

- combined messages (write-read, read-write), joined by a repeated START
- 7-bit and 10-bit slave addresses
- a word (start) address inside the slave
- any number of data bytes
- three data patterns: increment, Fibonacci and Gray code
- three bus speeds: 100 kHz, 400 kHz and 3.4 MHz

The controller runs against a *test card*: an I2C slave, also in RTL, that
behaves like a real memory-type device. A stress generator draws every
feature at random, transfer after transfer, and counts what gets lost. The
top level puts three such channels side by side. They run at the same time,
as a long-running stress test of the controller would be set up.

The design follows an MSc thesis on I2C validation on a Xilinx FPGA. The
thesis fixes the features, the bus formats and the three-controller setup.
Everything it leaves open was decided here, and is marked as such below and
in each file's header.

## Anatomy of a transfer

A transfer is one `xfer_t` descriptor (see `rtl/i2c_pkg.sv`). Its fields are:

- message type
- addressing mode
- slave address
- word address
- byte count `n`
- pattern and pattern start index
- speed

The controller builds the transfer from one or two *segments*:

```
write segment:  S  ADDR+W A  WADDR A  D0 A  D1 A ... Dn-1 A
read segment:   S  ADDR+W A  WADDR A  Sr ADDR+R A  D0 A ... Dn-1 NA

MSG_WRITE       write segment                    P
MSG_READ        read segment                     P
MSG_WRITE_READ  write segment  Sr  read segment  P
MSG_READ_WRITE  read segment   Sr  write segment P
```

A read can also skip the word address and start wherever the slave's word
pointer stands: the byte after the last one written or read. This is set by
`direct` in the descriptor, for `MSG_READ` only:

```
direct read, 7-bit:   S  ADDR+R A  D0 A ... Dn-1 NA  P
direct read, 10-bit:  S  ADDR+W A  Sr ADDR+R A  D0 A ... Dn-1 NA  P
```

`S` is START, `Sr` a repeated START and `P` STOP. `A` is an acknowledge
(SDA low on the 9th clock) and `NA` is no acknowledge. The master NACKs the
last byte it reads, which tells the slave to let go of SDA.

- In a write-read message, the read segment reads back the bytes that the
  write segment has just stored.
- In a read-write message, the old contents are read before they are
  overwritten.
- Because the second segment starts with a repeated START, the bus is never
  released in the middle of a combined message.

Transfers wait in a four-entry transmit FIFO inside the controller. A
combined message also arises from the queue. Suppose a plain `MSG_WRITE`
ends and the next queued transfer is a plain `MSG_READ`, or the reverse.
The controller then leaves out the STOP, and the second transfer's START
becomes a repeated START. `done` still pulses once for each transfer.

ADDR takes one byte in 7-bit mode and two bytes in 10-bit mode:

| mode   | first byte                   | second byte |
|--------|------------------------------|-------------|
| 7-bit  | `A6 A5 A4 A3 A2 A1 A0 R/W`   | none        |
| 10-bit | `1 1 1 1 0 A9 A8 R/W`        | `A7 ... A0` |

A 10-bit read first sends the full address with R/W = 0 and then the word
address. After the repeated START it sends only the first byte again, now
with R/W = 1. The slave accepts that short header only if it was fully
addressed earlier in the same message. This is the usual I2C rule. The
thesis shows only the address format.

A missing acknowledge ends the transfer at once with a STOP, and the
controller's `nack` flag is set. The acknowledge can be missing after an
address byte (no such device) or after a data byte. Data bytes come from
`i2c_pattern_gen`, starting at element `pstart`. All values are 8 bits wide:
Fibonacci sums are taken modulo 256 and the Gray code is that of an 8-bit
counter.

## Bit timing and the speed grades

`i2c_byte_engine` splits every bit into four phases, timed by
`i2c_scl_timer`:

| phase | SCL      | SDA                             |
|-------|----------|---------------------------------|
| 0     | low      | held from previous bit          |
| 1     | low      | set to the new bit              |
| 2     | released | sampled at the end of the phase |
| 3     | high     | unchanged; SCL pulled low at its end |

Because SDA changes only while SCL is low, any SDA edge while SCL is high is
a START or a STOP:

- START: SDA falls while SCL is high.
- STOP: SDA rises while SCL is high.
- Repeated START: SCL is held low for two phases with SDA released, then
  released, and SDA falls.

Phase lengths, for the default 100 MHz system clock:

| grade    | phase lengths            | SCL high:low | period (incl. filter) | SCL rate   |
|----------|--------------------------|--------------|-----------------------|------------|
| standard | 4 x 250 cycles           | 1:1          | 1004 cycles           | 99.6 kHz   |
| fast     | 4 x 63 cycles            | 1:1          | 256 cycles            | 390.6 kHz  |
| high     | 10, 10 low / 5, 5 high   | 1:2          | 34 cycles             | 2.94 MHz   |

Phase lengths are rounded up, so no grade runs faster than its nominal rate.
The high-speed grade uses the 1:2 high:low ratio that the thesis gives for
high-speed masters. The other two grades use equal halves.

**Clock stretching.** When the engine releases SCL, it starts timing the high
phase only once it actually sees SCL high. A slave that holds SCL low
therefore simply delays the bit. The engine sees SCL through its input
filter (below), which adds 4 cycles to every bit. That delay is the
"incl. filter" in the table. The standard-mode high time of 5 µs meets the
4 µs minimum.

One byte is 9 bits, so a byte takes 9 × (4 phases + 4) cycles plus any
stretching. At 400 kHz that is 2304 cycles. `tb_i2c_byte_engine` checks this
number exactly.

**Input filter.** The thesis asks high-speed devices to suppress spikes on
their SCL and SDA inputs. Both the engine and the test card read each line
through `i2c_input_filter`. This is a two-flip-flop synchroniser followed by
a window: the output changes only after the synchronised level has been the
same for `SPIKE_CYCLES + 1` cycles. With the default of 1, a one-cycle
(10 ns) pulse is ignored and a clean edge arrives 4 cycles late. The filter
is used at every speed grade. Without it, a single spike on SDA while SCL
is high would read as a false START or STOP.

## The test card

`i2c_slave` stands in for the real device on the far end of the cable:

- **Addresses.** It answers at one 7-bit address and one 10-bit address, so
  a single card serves both addressing modes.
- **Writes.** After `ADDR+W`, the first byte sets the word pointer. Each
  later byte is stored at the pointer, which then increments and wraps at
  `MEM_DEPTH`.
- **Reads.** After `ADDR+R`, it sends from the pointer and increments, until
  the master NACKs.
- **Refusals.** Any other address is left unacknowledged.
- **Clock stretching.** After the acknowledge clock of every byte, it holds
  SCL low for `STRETCH` cycles, like a device servicing an interrupt.
  The default of 1 µs is longer than the low time of the fast and high-speed
  clocks, so those get stretched. A standard-mode clock is already low
  longer than that.

It oversamples SCL and SDA on the system clock, through the input filter:

- START and STOP are SDA edges seen while SCL is high.
- Bits are taken on SCL rising edges.
- SDA is driven just after SCL falling edges.

This needs a system clock of at least about eight times the SCL rate. At
3.4 MHz with a 100 MHz clock the margin is about 30 times.

## Stress generator and what it measures

`i2c_stress_gen` draws a new random transfer from a free-running 32-bit LFSR
each time its previous transfer has finished. Because transfers take different numbers
of cycles, successive draws are unrelated. The draw covers:

- message type, addressing mode, word address and byte count (1..`MAX_NBYTES`)
- whether a read sends a word address
- pattern, pattern start and speed
- one time in eight, a slave address with no device behind it

It keeps four counters:

| counter          | what it counts                                             |
|------------------|------------------------------------------------------------|
| `xfer_count`     | completed transfers                                        |
| `nack_count`     | transfers ended by a missing acknowledge ("packet loss")   |
| `mismatch_count` | write-read bytes that did not come back as written         |
| `byte_count`     | data bytes moved                                           |

For `mismatch_count`, a second pattern generator predicts the read-back
bytes. On a healthy bus `mismatch_count` stays 0 and `nack_count` equals the
number of draws that went to an absent address.

`i2c_system` instantiates `N_CTRL` = 3 channels. Each channel has a stress
generator, a controller and its own bus with its own test card. Slave `i`
answers at 7-bit `0x50+i` and 10-bit `0x2A5+i`. The pull-up resistors are
modelled as a wired AND of the open-drain pull-down enables. Every SCL and
SDA is brought out to ports so that a logic analyser can be attached.
`n_xfers = 0` runs until `enable` drops.

The 32-bit counters are large enough for a four-hour run. In simulation,
with the random mix of speeds, a channel moves about 24 kB/s, or about
3.5 × 10^8 bytes in four hours. Only a run entirely at 3.4 MHz (about
5 × 10^9 bytes) would wrap `byte_count`.

## Files

| file | contents |
|------|----------|
| `rtl/i2c_pkg.sv` | enums, `xfer_t`, reference `pattern_value()` |
| `rtl/i2c_scl_timer.sv` | phase timer per speed grade |
| `rtl/i2c_input_filter.sv` | synchroniser and spike filter for SCL / SDA inputs |
| `rtl/i2c_byte_engine.sv` | START / repeated START / STOP, byte write and read, stretching |
| `rtl/i2c_pattern_gen.sv` | increment, Fibonacci, Gray-code generator |
| `rtl/i2c_xfer_fifo.sv` | transmit FIFO of transfer descriptors |
| `rtl/i2c_master_ctrl.sv` | transfer sequencer (message types, addressing) |
| `rtl/i2c_slave.sv` | test-card slave with 256-byte memory |
| `rtl/i2c_stress_gen.sv` | random transfer source and loss counters |
| `rtl/i2c_system.sv` | top: three channels |
| `tb/i2c_bus_monitor.sv` | decodes a bus into START/STOP/frame events |
| `tb/i2c_xfer_checker.sv` | predicts each transfer's bus traffic and compares |
| `tb/tb_*.sv` | one self-checking testbench per module |

Hierarchy: `i2c_system` → `i2c_stress_gen` (with an `i2c_pattern_gen`),
`i2c_master_ctrl` (with an `i2c_xfer_fifo`, an `i2c_byte_engine`, which holds an
`i2c_scl_timer` and two `i2c_input_filter`s, and an `i2c_pattern_gen`), and
`i2c_slave` (with two `i2c_input_filter`s).

Interfaces are valid/ready or strobe based:

- The controller queues `req` in its transmit FIFO (4 entries) when
  `req_valid && req_ready` (see "Transmit FIFO" below). `req_ready` means the FIFO has room. After each
  transfer the controller starts the oldest queued one, two cycles after it
  was queued at the earliest.
- During a transfer it strobes `rd_valid` / `wr_valid` once per data byte.
- It pulses `done` at the end, with `nack` valid.
- The engine accepts a command only while `cmd_ready`; an assertion checks
  this.
- All pads are open-drain: `*_oe = 1` pulls the line low.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog guards against hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/i2c_pkg.sv \
          tb/tb_i2c_system.sv --top-module tb_i2c_system
./obj_dir/Vtb_i2c_system
```

Replace `system` with `scl_timer`, `input_filter`, `pattern_gen`, `byte_engine`,
`xfer_fifo`, `master_ctrl`, `slave` or `stress_gen` to test one block.

- `tb_i2c_system` runs the top at its default parameters: three channels,
  200 random transfers each, about 12,000 checks, a few seconds. It predicts
  every frame on all three buses. It also fails unless each of these
  happened at least once:
  - each message type
  - each addressing mode
  - each pattern
  - each speed
  - a refused address
  - a read without word address
  - a repeated START
  - clock stretching
  - all three channels busy together
- `tb_i2c_master_ctrl` checks directed transfers frame by frame and the SCL
  period of each speed. It also queues eight transfers at once, which fills
  the FIFO. It checks that they run in order and that the three write/read
  pairs among them are joined without a STOP. Two of its transfers have a data byte refused, by
  keeping the card's acknowledge off the bus. The controller must send STOP
  at once and skip the rest of the message.
- `tb_i2c_slave` drives the slave from a master written with plain delays.
  One of its writes carries one-cycle spikes on both lines. The spikes must
  not disturb the transfer or add START/STOP conditions.

The simulator is two-state. The slave's memory is not reset, so reading a
location that was never written returns arbitrary data. The checkers only
compare the acknowledge bit of such bytes.

## Departures and limits

- **Clock.** The thesis gives no FPGA clock frequency. 100 MHz is assumed
  (`CLK_HZ`); the phase lengths follow from it.
- **High speed.** The 3.4 MHz grade uses the right 1:2 clock ratio, but its
  rate is only 2.94 MHz at 100 MHz: the phase lengths are rounded up and the
  input filter adds 4 cycles. There is no high-speed master code preamble.
  The current-source pull-up, the Schmitt-trigger inputs and the
  slope-controlled output buffers are analog pad features. They are not
  modelled; only the digital part of spike suppression is.
- **Single master.** There is one master per bus, so there is no
  arbitration and no clock synchronisation between masters.
- **Transmit FIFO and automatic combining.** As in the thesis, the
  controller checks its transmit FIFO after each transfer and runs the next
  one. If a plain write and a plain read of opposite direction follow each
  other in the FIFO, they are joined with a repeated START, again as in the
  thesis. Some of this is this design's own:
  - only plain `MSG_WRITE` / `MSG_READ` transfers are joined;
  - the second one must already be queued when the first one's last byte
    ends;
  - a transfer that ends with NACK always sends STOP;
  - `MSG_WRITE_READ` and `MSG_READ_WRITE` also ask for a combined message
    explicitly.
- **One transfer in flight per stress generator.** The stress generator
  waits for each transfer to finish before drawing the next, because it
  checks that transfer's read-back data. In the stress test the FIFO
  therefore never holds more than one entry, and no transfers are joined.
  Queueing and joining are tested in `tb_i2c_master_ctrl`, and the FIFO
  alone in `tb_i2c_xfer_fifo`.
- **Segment structure.** Joining each message type from the write and read
  segments above is a reading of the thesis' figures. The thesis also allows
  a read "directly by the first location". Here that is read as a read from
  the slave's current word pointer (`direct`).
- **Test card never refuses data.** The card acknowledges every data byte,
  so in the stress test only refused addresses produce a NACK. The
  controller's reaction to a refused data byte is covered by
  `tb_i2c_master_ctrl` only.
- **Test-card internals.** The card's memory size, its two addresses, its
  stretch time and its oversampling structure are this design's choices. The
  thesis describes the card only as replicating the real device.
- **Stress generator in hardware.** The thesis runs its stress test as a
  randomised regression and does not describe it as hardware. Here the
  generator, its NACK/mismatch counters and the 1-in-8 absent-address rate
  are this design's own.
- **Not modelled.** The pull-up resistors are modelled only as logic. The
  logic analyser is not modelled; the bus ports are where it would attach.
