# Compact I2C master bus controller

This is a small I2C master for on-chip use. It is meant for an ASIC or SoC
that needs to write single bytes to I2C slaves, and perhaps read them. It
does not try to be a general I2C IP core.

The host hands over a command: a 7-bit slave address and a data byte. The
command waits in a FIFO. When the bus is free, one finite state machine pops
it and carries out the whole transfer on SDA and SCL. A full-featured master
would also have a separate clock generator, a START/STOP generator and a bit
counter. Here the FSM does all of that work itself. The only other logic is
a counter that sets the bit rate. With the default division ratio of 512, a
51.2 MHz system clock gives standard-mode I2C at 100 kbit/s.

```
            start, addr_in, data_in (, rw_in)
                          |
                  +-------v-------+  full ──> fifo_full
                  |   i2c_fifo    |
                  | 512 x 15 bit  |
                  +-------+-------+
                 dout,    |  ^ re
                 empty    v  |
  +-------------+  tick  +---+-----------+ ──> i2c_scl_o   (0 = pull SCL low)
  | i2c_clk_gen +------->|    i2c_fsm    | ──> i2c_sda_o   (0 = pull SDA low)
  |  /128 pulse |        |  eight states | <── i2c_sda_i   (level on SDA)
  +-------------+        +---------------+ ──> ready_out, nack_out,
                                               rd_data_out, rd_valid_out
```

Everything runs on one clock, `clk_in`, and has one synchronous active-high
reset, `reset_in`.

## What goes over the bus

Every command becomes exactly one single-byte transfer:

| transfer | bits on the bus |
|---|---|
| write | START, A6..A0, `0`, ACK from slave, D7..D0, ACK from slave, STOP |
| read (only when `READ_EN = 1`) | START, A6..A0, `1`, ACK from slave, D7..D0 sent by the slave, NACK from master, STOP |
| nobody answers | START, A6..A0, R/W, NACK, STOP. The data byte is skipped. |

Bytes are sent MSB first. After a STOP the FSM always waits at least part of
a bit period in IDLE before the next START. The next queued command then
starts at the following bit-period boundary.

`nack_out` goes high if a transfer missed an expected acknowledge. That
means the address, or a byte being written. The flag stays high until the
next transfer starts. `ready_out` is high while the FSM is in IDLE.

## Bit timing: four quarters per SCL period

This is the part to understand before changing the FSM.

`i2c_clk_gen` gives a one-clock `tick` every `CLK_DIV/4` clocks. The default
is 128. The FSM counts ticks in a 2-bit quarter counter `q`, so one bit
period is four quarters, or `CLK_DIV` clocks. The FSM changes state only on
the last tick of a bit period. Within a bit, the levels it asks for are:

| state | q0 | q1 | q2 | q3 |
|---|---|---|---|---|
| IDLE | SCL 1, SDA 1 | 1, 1 | 1, 1 | 1, 1 |
| START | SCL 1, SDA 1 | 1, 1 | 1, **0** | 1, 0 |
| ADDR / RW / DATA | SCL 0, SDA *held* | 0, bit | 1, bit | 1, bit |
| WACK / WACK2 | 0, *held* | 0, released | 1, released | 1, released (sampled at end) |
| STOP | 0, *held* | 0, 0 | 1, 0 | 1, **1** |

Two rules give the I2C line discipline:

* **SDA never moves while SCL is high**, except for the falling edge in START
  and the rising edge in STOP. SCL falls at the start of q0. The SDA register
  keeps its old value through q0 and takes the new bit in q1, the middle of
  the low phase. An assertion in `i2c_fsm` (`a_sda_rule`) checks this rule.
* **ACK and read data are sampled at the end of q3.** That is after SCL has
  been high for half a bit period. `i2c_sda_i` first goes through a
  two-flop synchroniser. At the default division this adds 2 clocks,
  against a 256-clock high phase.

SCL and SDA come straight from flip-flops, so they cannot glitch. Both lag
the state and quarter registers by one clock. They lag equally, so the
relative timing in the table holds to the clock cycle.

Timing at the default `CLK_DIV = 512`:

* SCL is high for 256 clocks and low for 256 clocks.
* START to STOP is 77 quarters (9,856 clocks) for a full transfer.
* START to STOP is 41 quarters (5,248 clocks) when the address is refused.

The testbenches check all of these numbers exactly.

SCL is driven but never read back. A slave that stretches the clock by
holding SCL low is therefore not supported.

## The master FSM (`i2c_fsm`)

It has eight states, encoded in `i2c_pkg::i2c_state_e`:

```
IDLE ─(FIFO not empty: pop)─> START ─> ADDR x7 ─> RW ─> WACK ─┬─ACK──> DATA x8 ─> WACK2 ─> STOP ─> IDLE
                                                              └─NACK──────────────────────> STOP
```

* **IDLE.** At the end of a bit period, if the FIFO is not empty, the FSM
  pulses `fifo_re` for one clock. At the same time it latches the command
  from the FIFO's show-ahead output. The address and R/W bit go into an
  8-bit shift register. The data byte is kept aside, and `nack` is cleared.
* **ADDR and RW.** These send the shift register's MSB and shift it once
  per bit. A 3-bit down-counter ends ADDR after seven bits, and RW sends
  the eighth.
* **WACK.** Here SDA is released. A low level means ACK: the data byte is
  loaded and the FSM goes to DATA. A high level means NACK: `nack` is set
  and the FSM goes straight to STOP.
* **DATA.** A write shifts out eight bits. A read releases SDA and shifts
  eight sampled bits into `rd_data`.
* **WACK2.** A write samples the slave's ACK and sets `nack` on a NACK. A
  read leaves SDA released, so the master sends NACK, and pulses
  `rd_valid`.
* **STOP.** SDA goes low while SCL is low. Then SCL rises, and then SDA
  rises.

## Command FIFO (`i2c_fifo`)

This is a register array with a write pointer and a read pointer. The
default size is 512 words of 15 bits, with 9-bit pointers that wrap around.

* It is *empty* when the two pointers are equal.
* It is *full* when the write pointer plus one equals the read pointer.
  So at most 511 words are stored.
* A write while full is dropped, and so is a read while empty.
* A write and a read in the same cycle both take effect.
* The read port is show-ahead. The oldest word is always on `dout`, and
  `re` moves to the next word.
* Reset clears only the pointers.

In the top module a push is simply `start` high for one clock, with
`addr_in` and `data_in` valid. The host must watch `fifo_full`.

## Reads (`READ_EN`)

With the default `READ_EN = 0`, the FIFO word is 15 bits `{addr, data}` and
the controller only writes. `rw_in` is not used. `rd_data_out` and
`rd_valid_out` stay constant, and synthesis removes their logic.

With `READ_EN = 1`, the FIFO word gains the R/W bit and becomes 16 bits. A
command pushed with `rw_in = 1` reads one byte, and its `data_in` is
ignored. The byte appears on `rd_data_out`, with a one-clock `rd_valid_out`
pulse at the end of the acknowledge slot, shortly before the STOP.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `i2c_master_controller` | `FIFO_DEPTH` | 512 | FIFO entries, a power of two; holds `FIFO_DEPTH-1` commands |
| `i2c_master_controller` | `CLK_DIV` | 512 | clocks per SCL period; a multiple of 4, at least 8 (use 16 or more) |
| `i2c_master_controller` | `READ_EN` | 0 | 1 adds read transfers and widens the FIFO word to 16 bits |
| `i2c_fifo` | `WIDTH`, `DEPTH` | 15, 512 | word width and number of entries |
| `i2c_clk_gen` | `CLK_DIV` | 512 | as above |

The 15-bit word and the 512 division ratio are the controller's defining
numbers. The FIFO depth is this design's choice. With 512 entries, the
FIFO storage plus the 60 other flip-flops comes to 7,740 bits. That is
close to the 7,748 flip-flops reported for an FPGA build of the original
controller, and no other depth comes near it.

## Connecting the bus

The top-level ports are plain signals, not `inout`. Each line is open-drain,
so a pad needs one output-enable per line:

```systemverilog
assign SDA = i2c_sda_o ? 1'bz : 1'b0;   // pull-up resistor on the board
assign SCL = i2c_scl_o ? 1'bz : 1'b0;
assign i2c_sda_i = SDA;
```

The pull-ups and pads are outside this RTL. In the testbenches the SDA line
is modelled as the AND of every driver.

## Where this RTL departs from the original controller

* **One clock with an enable, not a divided clock.** The original runs its
  FIFO and FSM from a clock that was already divided by 512, and that
  divider lived in its testbench. Here the divider is in the design as
  `i2c_clk_gen`. It produces a clock enable, so the whole controller
  shares `clk_in`.
* **Split open-drain ports.** The `i2c_sda_o`, `i2c_scl_o` and `i2c_sda_i`
  ports take the place of the bidirectional SDA/SCL ports.
* **Status outputs and timing choices of its own.** `nack_out` is an
  addition. The reaction to a NACK (abort to STOP) is this design's
  choice, and so are the quarter-period timing and the input synchroniser.
* **SCL is low in the first half of STOP.** The original says only that
  SCL is high in START, STOP and IDLE. SDA must be pulled low while SCL is
  low, before SCL rises, so STOP cannot keep SCL high throughout.
* **Reads are optional.** The original port list has no R/W input and no
  read-data output, and its FIFO word is 15 bits. Its transfer steps still
  include a read. Reads are therefore an option (`READ_EN`) and are off by
  default.
* **The master NACKs a read byte.** The original has the master
  acknowledge the byte. An acknowledged slave would go on to drive the next
  byte and could hold SDA low through the STOP. This design therefore sends
  the NACK that I2C prescribes for the last byte read.
* **Not included:**
  * multi-master arbitration;
  * clock stretching;
  * multi-byte transfers;
  * repeated START;
  * 10-bit addressing.

## Files

| file | content |
|---|---|
| `rtl/i2c_pkg.sv` | widths, the command struct `i2c_cmd_t`, the state enum |
| `rtl/i2c_master_controller.sv` | top: FIFO, bit-rate counter, FSM |
| `rtl/i2c_fifo.sv` | command FIFO |
| `rtl/i2c_clk_gen.sv` | quarter-period tick generator |
| `rtl/i2c_fsm.sv` | eight-state master FSM |
| `tb/i2c_slave_model.sv` | behavioural slave (ACK/NACK, transmits for reads) |
| `tb/i2c_bus_monitor.sv` | passive decoder of START, bytes, ACKs and STOP, with timing |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Each testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_i2c_fifo`: the full-size FIFO against a queue model. It covers fill
  to full, a dropped write, drain to empty, an ignored read, 20,000 random
  read/write cycles and reset.
* `tb_i2c_clk_gen`: the tick spacing (128 clocks) and width (1 clock) at
  the default division.
* `tb_i2c_fsm`: the FSM with a test-generated tick and a queue acting as the
  FIFO. It covers writes, an absent slave, a refused data byte, back-to-back
  commands and reads. It checks the exact START-to-STOP timing and the SCL
  duty cycle.
* `tb_i2c_master_controller`: the whole controller at default parameters.
  Two slaves, one of which refuses data, share the bus with an empty
  address. A 520-command burst overruns the FIFO, and all accepted commands
  are checked on the bus in order. The whole run takes about
  5 million clocks.
* `tb_i2c_master_controller_rw`: the controller with `READ_EN = 1`,
  `CLK_DIV = 16` and `FIFO_DEPTH = 16`. It runs random bursts of mixed reads
  and writes. It checks read data against the slave's sequence, the
  master's NACK, and FIFO overruns.

The two end-to-end benches count every mechanism they are meant to
exercise, and count a failure if one never occurs. The mechanisms are:

* acknowledged write;
* read;
* address NACK;
* data NACK;
* FIFO full with dropped pushes;
* drain to idle;
* read after write.

To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/i2c_pkg.sv tb/tb_i2c_master_controller.sv --top-module tb_i2c_master_controller
./obj_dir/Vtb_i2c_master_controller
```

Replace the testbench name to run any of the others.

The RTL has been linted with Verilator and elaborated with Yosys/slang. It
has not been through timing analysis on a cell library.
