# FAB/FIB converter link: register-mapped ADC/DAC board controlled over a shared 16-bit bus

This repository holds the digital logic of a two-channel radio-frequency
conversion board (called FAB below) and of the host-side FPGA logic (FIB) that
drives it. Each channel has a 14-bit ADC (up to 125 MSPS) and a 14-bit DAC (up
to 210 MSPS) and sits in a digital control loop. The board's logic is
a small CPLD. To the host, the CPLD looks like ten 16-bit registers behind a
6-bit address bus, a strobe and a read/not-write line. The registers hold the
converter samples, the converter sampling-clock dividers, the power-down
lines and the analogue input-switch settings.

Most of the difficulty is in the link, not in the registers. Host and board
share one bidirectional 16-bit data bus. It passes through an external bus
transceiver on the host board. That makes three tri-state drivers on one path:

```
 FPGA driver ── bus_fpga ──[ transceiver, dir ]── bus_board ── CPLD driver
  (fib_host_top)                                             (fab_cpld_top)
 address, strobe, read/not-write, clock ─────────────────────────►
```

The board runs on a copy of the host clock, delayed by the board traces. The
CPLD therefore synchronises the control lines, and the host must turn the
three drivers in a fixed order so that two outputs never drive against each
other. The sections below describe that protocol first, then the register
file, the clock dividers and the test routines.

All RTL is SystemVerilog-2017. `fab_fib_system` is the top.

## Blocks

| Module | Role |
|---|---|
| `fab_pkg` | Widths, register addresses, reset values, switch codes, and the packed layouts of the control and status registers |
| `fab_cpld_top` | The board's CPLD: bus slave, register file, four converter clock dividers, reset, bus driver, test-pin blinker |
| `fab_regfile` | The ten host-visible registers |
| `clk_divider` | Clock divider with constants 0 (stopped), 1 (pass-through) and n (divide by n) |
| `sync_2ff` | Two-flip-flop synchroniser for the address, strobe and read/not-write lines |
| `bus_driver` | Tri-state driver that always listens to the bus and drives it only on request |
| `reset_gen` | Power-on reset: held for `RESET_CLKS` cycles after power-up |
| `sawtooth_gen` | 14-bit two's-complement ramp from -0x2000 to +0x1FFF |
| `cpld_selftest` | Stand-alone CPLD test program: per-channel digital short, or a ramp on both DACs |
| `fib_host_fsm` | Host bus master. It reads ADC 1 and writes the value to DAC 1 ("digital short"), or writes a ramp to DAC 1 |
| `fib_host_top` | Host FPGA logic: power-on reset, `fib_host_fsm`, FPGA bus driver, LED blinker |
| `bus_transceiver` | Behavioural model of the 16-bit 74LVTH16245-type transceiver, ideal or with a delay |
| `fab_fib_system` | Top: host, transceiver and CPLD wired together. The stand-alone test program sits beside them on its own `st_` ports |

Everything except `bus_transceiver` is synthesizable. The transceiver is a
chip on the host board; its model exists so that both sides can be simulated
together.

## The link protocol

### Signals

| Signal | Direction | Meaning |
|---|---|---|
| `fibd[15:0]` | both ways | Data. Passes the transceiver |
| `fiba[5:0]` | host → board | Register address |
| `fibrnw` | host → board | 1 = read, 0 = write. At rest it is 1 (read) |
| `fibstrobe` | host → board | One-cycle access pulse |
| `fiback` | board → host | Reserved; held low. No handshake is used |
| `fibclk` | host → board | The host clock, forwarded. The CPLD runs from it |
| `ext_dir` | host → transceiver | 0 = board to FPGA, 1 = FPGA to board |

Timing is fixed by counting cycles; there is no acknowledge. The host waits a
set number of cycles after each strobe. The wait is long enough for the
board's synchroniser, its register stage and the transceiver delay.

### What the CPLD does with an access

Address, read/not-write and strobe each pass two flip-flops. The data bus is
not synchronised: the host holds the data stable for several cycles around a
write strobe, so it is sampled directly.

Take E as the host clock edge that raises the strobe. The CPLD:

* sees the synchronised strobe after edge E+2 and acts on it at edge E+3.
  A write loads the register at edge E+3.
* for a read, loads the addressed register into its read-data register at
  edge E+3. The value is on `fibd` from then on. It stays there until the
  next read, even if the address moves.

The CPLD drives `fibd` whenever the synchronised `fibrnw` says "read" and the
`fibrnw` pin also still says "read". The two conditions act differently:

* **Turn-on** waits for the synchronised line. It therefore happens two
  cycles after the host raised `fibrnw`, by which time the transceiver has
  already turned towards the FPGA.
* **Turn-off** follows the `fibrnw` pin directly. The CPLD lets go of the bus
  one pin-to-output delay after the host lowers `fibrnw`. That is a whole
  clock period before the host turns the transceiver towards the board. If the
  release waited for the synchroniser, the CPLD would still drive for a cycle
  after the transceiver had turned against it.

### The host state machine (`fib_host_fsm`)

One read-and-write transfer, in host cycles (default: 200 MHz, 25 ns wait):

| State | Cycles | Action on leaving the state |
|---|---|---|
| `READ_PRE1` | 1 | FPGA driver off, read address (0x02 = ADC 1) |
| `READ_PRE2` | 1 | transceiver towards the FPGA (`ext_dir = 0`) |
| `READ_PRE3` | 1 | strobe high, `fibrnw = 1` → edge E |
| `WAIT` | 4 | strobe low after the first cycle |
| `READ` | 1 | capture `fibd` (edge E+5; the data has been valid since E+3) |
| `WRITE_PRE1` | 1 | `fibrnw = 0` (the CPLD releases the bus), write address (0x04 = DAC 1) |
| `WRITE_PRE2` | 1 | transceiver towards the board (`ext_dir = 1`) |
| `WRITE_PRE3` | 1 | FPGA driver on |
| `WRITE` | 1 | data and strobe out |
| `WAIT` | 4 | strobe low, then back to `READ_PRE1` |

A read-and-write transfer therefore takes 16 cycles (80 ns), so ADC 1
samples reach DAC 1 at 12.5 MS/s. In sawtooth mode the host skips the read
and writes the next ramp value: 9 cycles per write.

* **One `WAIT` state, two callers.** Each calling state stores the state to
  return to. `WAIT` lasts `WAIT_TICKS + 1` cycles, where
  `WAIT_TICKS = max(1, CLK_FREQ_HZ * DELAY_NS / 1e9 - 2)`. With the defaults
  that is 3.
* **Why 25 ns.** The read capture comes two cycles after the CPLD's read data
  appears. That leaves room for up to about 10 ns of transceiver delay. The
  real part needs a few nanoseconds; the delayed-transceiver test uses 5 ns.
  A 15 ns setting (one tick) would capture
  the bus before the new read data reaches it, so the host would get the
  previous read's value. It would not hang, so the error would be easy to
  miss.
* **Turn order.** When reading, the FPGA driver goes off first, then the
  transceiver turns, then the CPLD drives. When writing, the CPLD lets go
  first, then the transceiver turns, then the FPGA drives. An assertion in
  `fib_host_fsm` and another in `fab_fib_system` check, once per clock
  cycle, that no two drivers face each other. The end-to-end testbench
  also checks the margins in time.
* **Between reads.** While `fibrnw` is high, the CPLD keeps presenting the
  last value it read. This is harmless, because the host captures only in
  `READ`.

### Changing the clock or the wait

`CLK_FREQ_HZ` and `DELAY_NS` on `fib_host_top` set the wait. The CPLD
latency is fixed at three edges after the strobe. Whatever the setting, the
`READ` capture edge must come later than E+3 by more than the transceiver
delay. With the defaults it comes at E+5, a 10 ns margin. `tb_fab_fib_system_xcvr_delay` is the quickest way to check a new
setting.

## Register file

All registers are 16 bits wide and all can be read back. Writes to the
read-only or unused addresses are ignored. Unused addresses read as zero.

| Address | Name | Access | Reset value | Content |
|---|---|---|---|---|
| 0x00 | CTRL | R/W | 0x4400 | see below |
| 0x01 | STAT | R | – | bit 3 ADC 2 out of range, bit 2 ADC 1 out of range (live pin values); bit 0 reserved for calibration; other bits 0 |
| 0x02 | ADC1 value | R | – | ADC 1 pins, bits 13:0 |
| 0x03 | ADC2 value | R | – | ADC 2 pins |
| 0x04 | DAC1 value | R/W | 0x0000 | 14 bits; bits 15:14 are dropped on write and read as 0 |
| 0x05 | DAC2 value | R/W | 0x0000 | as DAC1 |
| 0x06 | ADC1 clock divider | R/W | 0x0002 | see the clock divider section |
| 0x07 | ADC2 clock divider | R/W | 0x0002 | |
| 0x08 | DAC1 clock divider | R/W | 0x0001 | |
| 0x09 | DAC2 clock divider | R/W | 0x0001 | |

Control register (0x00):

| Bits | Field | Meaning |
|---|---|---|
| 15:12 | SW2 | analogue input switch of channel 2 |
| 11:8 | SW1 | analogue input switch of channel 1 |
| 7 | ADC2 power-down | ADC NAP mode |
| 6 | ADC1 power-down | |
| 5 | DAC2 sleep | DAC SLEEP mode |
| 4 | DAC1 sleep | |
| 3 | – | stored, no function |
| 2 | RST | writing 1 resets the whole board logic, this bit included |
| 1, 0 | CAL2, CAL1 | stored for a calibration unit; no function here |

The switch codes are one-hot. 0x1 connects the ADC input to the 2.5 V
reference, 0x2 to ground, 0x4 to the signal (the reset value) and 0x8 to the
opposite channel's DAC output.

The soft reset (bit 2) is OR-ed with the power-on reset and registered once.
That register is what drives the asynchronous reset of the register file and
the dividers. A write of 1 therefore takes effect one cycle after the write.
The reset then clears bit 2 itself, so the host does not have to.

The DAC pins carry the two's-complement negation of the DAC value register
(`NEGATE_DAC = 1`). A value written as +x is therefore sent as -x. The
ADC value registers are not altered. Set `NEGATE_DAC = 0` to send the
register value unchanged.

## Clock dividers

Each converter's sampling clock comes from its own `clk_divider`, fed by the
host clock:

* 0: the output is held low and the converter clock stops.
* 1: the host clock is routed straight through (a combinational clock
  multiplexer).
* n ≥ 2: a counter runs 0 … n-1. The output is high for the first ⌊n/2⌋
  counts, so one period is exactly n input cycles. The duty cycle is 50 % for
  even n and slightly below 50 % for odd n.

The reset values give 100 MHz ADC clocks and 200 MHz DAC clocks from a
200 MHz host clock. A new constant takes effect at once. The output can
glitch once at the moment of change, so change a divider only while its
converter is not in use. A fifth divider with the constant 10, on a 4-bit
counter, blinks test pin `tp1` to show that the CPLD is clocked.

## Test routines

* **CPLD digital short** (`cpld_selftest`, `st_saw_mode = 0`). Each ADC sample
  is registered and sent to the same channel's DAC one clock later, without
  negation. The ADCs are clocked at half the main clock, the DACs at the main
  clock.
* **CPLD sawtooth** (`st_saw_mode = 1`). Both DACs count up by one per main
  clock from -0x2000 to +0x1FFF and wrap. The period is 16384 cycles
  (81.92 µs at 200 MHz).
* **Host digital short** (`saw_mode = 0`). As described above: ADC 1 → DAC 1
  over the link, one transfer per 16 cycles.
* **Host sawtooth** (`saw_mode = 1`). One ramp step per write, one write per
  9 cycles. The mode input is sampled at the start of each transfer, so
  switching modes never cuts an access short.

On the real board the stand-alone routines and the register-based
program are separate CPLD programs. Here they are separate modules:
`cpld_selftest` stands beside the main system in the top, with its own ports.

## Departures and own choices

* **Soft-reset bit.** The bit map of the control register and its
  description put the board reset at bit 2; another description of the same
  feature names bit 3. Bit 2 is used; bit 3 is a plain stored bit.
* **Clock divider insides.** The divider was described as toggling its
  output on counter overflow. That can only divide by even numbers, yet any n
  is required. The counter-and-compare design above covers both.
* **Sawtooth direction.** The ramp counts up from -0x2000 to +0x1FFF, as the
  routine is described. The reference test code counted down; the waveform
  is the same, mirrored.
* **Write direction in the host state machine.** The state diagram of the
  host routine shows the read/not-write line at 1 on the way into a write. A
  write needs 0, and the host code drives 0, so 0 is used.
* **Read and write addresses of the host routine.** The host reads the ADC 1
  register and writes the DAC 1 register. The original host code used one
  address for both.
* **Wait length.** 25 ns, not the 15 ns that one host configuration used.
  The reason is given under "The host state machine".
* **Bus release from the pin** (see "What the CPLD does with an access").
  The reference CPLD code enabled its driver from the synchronised
  read/not-write line alone. That releases the bus one cycle after the host
  has turned the transceiver towards the board, so the two outputs drive
  against each other for that cycle. Here the pin also gates the enable,
  which removes the overlap.
* **Registered soft reset**, so that no combinational path runs from a
  register to its own asynchronous reset.
* **One 16-bit bus.** The host board splits the bus into two 8-bit link
  buses. Here it is one 16-bit bus with the same function.
* **Unused addresses read 0.**

## Not included

* The FPGA's PLL (200 MHz from a 50 MHz crystal) is a vendor macro.
  `clk_200` is its output.
* No calibration logic exists. The CAL bits are only stored. The switch
  codes for reference and ground exist so that a calibration routine can be
  added.
* The converters, variable-gain amplifiers, analogue switches, amplifiers,
  filters, reference and power supply are analogue parts. Their digital pins
  are top-level ports.
* The USB interface board and the host board's unused I/O tie-offs have no
  logic function.
* The acknowledge line has no function: the protocol is timed by counting
  cycles.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The most
important are:

* `tb_fab_fib_system`: the whole system at its default parameters, with a
  200 MHz clock. It covers:
  * the converter clock rates (100/200 MHz);
  * 60 digital-short windows, including both ends of the 14-bit range. DAC 1
    must equal the negated ADC 1, DAC 2 must stay at zero, and the transfer
    period must be exactly 16 cycles;
  * a mode switch into 200 sawtooth writes and back. Each write must show the
    negated ramp value, one write per 9 cycles;
  * the stand-alone test program;
  * the driver turn-around margins at every turn of the transceiver;
  * counts of reads, writes, wait cycles, transceiver turns in both
    directions, digital-short updates, sawtooth writes, mode switches and
    self-test steps. A mechanism that never happened counts as a failure.
* `tb_fab_fib_system_xcvr_delay`: the same link with a 5 ns transceiver
  delay, one full clock period. An ADC 1 change must reach DAC 1 within 25
  cycles, so no stale read value is accepted. In trials, delays up to 10 ns
  passed and 12 ns failed, as the 10 ns margin predicts.
* `tb_fab_cpld_top`: register access through the synchroniser, defaults,
  read latency, soft reset, clock divider settings, the blinker, and the rule
  that the CPLD driver never overlaps the host.
* `tb_fib_host_fsm`, `tb_fib_host_top`: state order, the wait length, the
  16- and 9-cycle periods, and the LED blinker. The LED test runs about 8
  million cycles and takes a few seconds.

Simulate with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/fab_pkg.sv tb/tb_fab_fib_system.sv --top-module tb_fab_fib_system
./obj_dir/Vtb_fab_fib_system
```

Replace the testbench name to run any other test. Verilator warns about a
circular combinational path through the transceiver model. The model joins
two tri-state nets in both directions, but only one direction is ever
enabled. It also warns about the initial values in `reset_gen`; these are the
intended power-up contents of its registers.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `fab_cpld_top` | `CLKDIV_WIDTH` | 16 | width of the converter clock dividers |
| | `RESET_CLKS` | 2 | power-on reset length |
| | `NEGATE_DAC` | 1 | send the negated DAC value to the pins |
| `fib_host_top` / `fib_host_fsm` | `CLK_FREQ_HZ` | 200 000 000 | host clock, used only to compute the wait |
| | `DELAY_NS` | 25 | wait to cover the board and transceiver delays |
| `fib_host_fsm` | `ADC_ADR`, `DAC_ADR` | 0x02, 0x04 | registers read and written by the digital short |
| `fib_host_top` | `LED_DIV` | 0xEEEEFF | LED blink divider |
| `bus_transceiver` | `PROP_DELAY` | 0 ns | model delay (simulation only) |
| `fab_fib_system` | `XCVR_DELAY` | 0 ns | passed to the transceiver model |
| `sawtooth_gen` | `WIDTH` | 14 | ramp width |
