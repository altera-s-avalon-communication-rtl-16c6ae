# Two Avalon-MM slave peripherals: an output register and an LED flasher

Avalon-MM is the memory-mapped on-chip bus of Altera FPGA systems: masters
(a processor, a DMA engine) issue reads and writes, and a generated
interconnect fabric decodes each address into a `chipselect` for one slave,
inserts the wait states that slave needs and arbitrates between masters. A
slave only has to obey a small, synchronous protocol on its port. This
repository holds two example slaves written to that protocol, and a top
level that places them side by side:

| module | what it is |
|---|---|
| `avalon_pio_out` | write-only 16-bit output register: the smallest useful slave |
| `led_flasher` | 32-halfword slave with a 16-entry display RAM and a rate register; scans the RAM onto 16 LEDs |
| `avalon_examples_top` | both peripherals, each with its own slave port brought out |
| `avalon_pkg` | shared widths (16-bit data, 5-bit halfword address, 32-bit countdown) |

The interconnect fabric, the processor and the other system components a
real system would have (SDRAM controller, UART, off-chip flash and SRAM on
a tristate bus, an Ethernet MAC) are not part of this design.

## The slave-port protocol these peripherals assume

All signals are sampled on the rising edge of `clk`. A transfer starts just
after an edge, when the fabric drives `address`, `chipselect` and either
`read` or `write` (and `writedata` for a write).

* **Zero-wait-state write:** the slave captures `writedata` on the next
  edge. Both peripherals here take writes this way.
* **Zero-wait-state read:** the fabric latches `readdata` on the next edge,
  so the slave would have to produce it combinationally.
* **Read with one wait state:** the strobes are held for two cycles and the
  fabric latches `readdata` on the second edge. This is what a slave with a
  registered read port needs, and it is what `led_flasher` needs: its
  `readdata` register takes `RAM[address]` on the first edge and the fabric
  picks it up on the second. The wait state is configured in the fabric,
  not in the slave; a zero-wait read returns the previous read's data.

Data is little-endian and right-justified: a 16-bit halfword sits in bits
15..0, and the `address` of a 16-bit slave counts halfwords, not bytes.
Neither peripheral uses `byteenable` or an interrupt.

## `avalon_pio_out`

A 16-bit register whose clock enable is `write & chipselect`; its output
`pio_out` goes straight to the application (LEDs, say). There is no address
decode (the port has one location), no read-back and no reset: `pio_out` is
undefined until the first write.

## `led_flasher`

### Address map

| halfword address | access | contents |
|---|---|---|
| 0..15 (`address[4] = 0`) | read / write | display RAM entry `address[3:0]` |
| 16..31 (`address[4] = 1`) | write | linger register (all 16 addresses alias it) |

A read of 16..31 leaves `readdata` as it was. If `read` and `write` are
both asserted, the read is done and the write dropped.

### The scan and its rate

The scan engine only runs in cycles where `chipselect` is low. In each such
cycle it copies `RAM[display_address]` to the `leds` register and steps a
32-bit countdown. When the countdown is zero, it is reloaded with
`{linger, 16'h0000}` and `display_address` advances, wrapping from 15 to 0.
Each entry is therefore on the LEDs for

    linger * 65536 + 1   unselected clock cycles

At 50 MHz, linger = 1 gives about 1.3 ms per entry and linger = 0xFFFF
(the reset value) about 86 s.

Points that are easy to miss:

* **Bus accesses stretch the period.** While `chipselect` is high the LEDs
  and the countdown both hold, so every selected cycle adds one cycle to
  the current entry's time.
* **A new linger value waits for the next reload.** The countdown is not
  restarted by a write to the linger register. After reset the countdown is
  zero and is reloaded with the reset linger (0xFFFF) on the first
  unselected cycle, so a linger written later only takes effect after that
  full period. To get a new rate at once, write linger in the first cycle
  after reset, before the countdown has had an unselected cycle.
* **The LEDs lag the display address by one cycle,** since `leds` is a
  register fed from the RAM at the current address. Right after a reload
  that changes the rate, two LED changes can occur one cycle apart.

### Reset

`reset_n` is synchronous and active low. It clears `readdata`,
`display_address`, the countdown and `leds`, and sets linger to 0xFFFF. The
RAM keeps its contents.

### Hardware

One 16x16 memory with one write port and two read ports (bus read-back and
scan), a 16-bit linger register, a 32-bit down-counter with zero detect, a
4-bit display-address counter and two 16-bit output registers. Yosys
coarse synthesis of the top gives 68 flip-flop bits and 256 memory bits.

## Where this design departs from, or adds to, the published peripherals

* `leds` is cleared by reset; the original LED flasher leaves it unreset.
* The widths are parameters (`DATA_W`, `ADDR_W`, `COUNT_W`) with the
  published sizes as defaults; the original fixes them.
* Port names are the plain Avalon role names (`chipselect`, `read`, ...).
  When packaged as a component the usual prefix would be
  `avs_<interface>_`, e.g. `avs_s1_chipselect`.
* The name `avalon_pio_out` is this design's own.

## Simulation

Each testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. They use `tb/avalon_slave_bus.sv`, an
interface with a small bus-master model (`write_xfer`, `read_xfer` with a
chosen number of wait states) and assertions that `read` and `write` are
never asserted together and never without `chipselect`.

| testbench | what it covers |
|---|---|
| `tb_avalon_pio_out` | random write / chipselect combinations against a reference register; write timing with zero and one wait state |
| `tb_led_flasher` | RAM write (zero and one wait state) and read-back, one-cycle read latency, linger aliases, scan order and wrap, period for linger 0 and 1, hold during access, reset rate |
| `tb_avalon_examples_top` | both ports driven at once at default sizes; a scoreboard checks every LED step's entry and period (including cycles stretched by accesses) and counts each mechanism |

Run one with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/avalon_pkg.sv tb/tb_avalon_examples_top.sv \
        --top-module tb_avalon_examples_top -o sim
    ./obj_dir/sim

The end-to-end run takes about 1.3 million clock cycles (linger = 1 over
20 steps) and about a second of wall time. Verilator has no X state, so the
testbenches write the RAM before reading it and release reset before
checking outputs.
