# Backplane tester firmware

A backplane with 16 channels of 24+1 lines each (400 lines) is tested by
sending a known pattern through it and counting how often what comes back is
wrong. The lines are driven at double data rate (a new value at each clock
edge), so a line that is a few nanoseconds longer than its neighbours is
sampled in the wrong half period and corrupts the word. The firmware
therefore gives every receive line its own adjustable input delay: software
steps the delays until all 25 lines of a channel are sampled in the same
half period, and then counts the errors that remain. Software controls
everything through a small map of 16-bit registers reached over VME.

The pattern is a plain binary counter. The receiver needs no copy of the
sender's state: each received word must be the previous word plus one.

## Data path

```
 pattern_gen ──► oddr_model ×400 ──► tx ══ backplane ══ rx ──► rx_channel ×16
 (n, n+1 per clk)  (DDR out)                                   │
                                                               ├─ iodelay_model ×25  (tap 0..63, step up/down)
                                                               ├─ ddr_capture         (rise + fall sample per clk)
                                                               └─ err_checker         (y = x + 1, 16-bit count)
 vme_regs ◄──► register bus (from a VME slave, not included)
 idelayctrl_model  (200 MHz refclk, "reference valid" status bit)
```

* **pattern_gen** holds a 25-bit counter that steps by 2 each clock and
  outputs `n` for the high phase and `n+1` for the low phase. Sub channel
  `i` of every channel carries bit `i` of the count; all 16 channels carry
  the same pattern.
* **oddr_model** puts the two words on a line, one per clock phase.
* **iodelay_model** delays one receive line by `tap × 78 ps`, `tap` in
  0..63, stepped by one per clock pulse on `CE` (up if `INC`, else down),
  wrapping at both ends.
* **ddr_capture** samples each delayed line at the rising edge and at the
  following falling edge and hands both samples on at the next rising edge:
  one double word per clock.
* **err_checker** makes two checks per clock, `q_fall == q_rise + 1` and
  `q_rise == previous q_fall + 1`, and while the counting phase is on adds
  the number of failed checks (0, 1 or 2) to a 16-bit count that stops at
  `0xFFFF`.
* **rx_channel** joins 25 delays, one capture and one checker.
* **vme_regs** is the register file. It also turns delay register writes
  into step pulses.
* **bpt_top** joins them all.

## How the delays align a channel

Let a line's total delay, wire plus tap, be `d`, and let the half period be
`T/2`. A sample taken at a clock edge sees the word launched at the latest
edge no later than `edge − d`. All lines with `d` in the same window
`(k·T/2, (k+1)·T/2)` therefore deliver the same word at each edge. Lines in
different windows deliver words one or more counts apart, and the mixed
word fails the `+1` check. Because the count changes at every edge, bit 0
alone is enough to show the fault: if bit 0 is in the wrong window, every
check fails.

Tuning thus means pushing the early lines over the half-period boundary into
the window of the late ones. A line's delay can only grow by adding taps, so
the early lines are moved forward to meet the late ones. With 64 taps of
78 ps (4.9 ns) and a 10 ns clock, any line can be moved by a full half
period. The end-to-end testbench does exactly this. It draws wire delays of
3–7 ns, works out for each short line the number of taps that moves it past
5 ns, and writes those steps through the registers. After that the count
stays at zero.

The checker only needs consecutive words to count up, so it does not care
which edge a channel's window falls on, and it needs no alignment with the
sender. A single corrupted word costs two failed checks: the check into the
word and the check out of it. A channel's count is the sum over all its
lines; it says that a channel is bad, not which line is bad. For that,
software reads the readback registers, which show the sampled lines
directly.

## Register map

16-bit registers at byte addresses (bit 0 of an address is always 0).

| Address | Register | Access | Content |
|---|---|---|---|
| 0x0000 | versionreg | R | `0x0001`: first version for hardware testing |
| 0x0002 | statusreg | R | bit 0: reference clock valid; bit 1: counting phase active |
| 0x0004 | controlreg | R/W | bit 0: global reset; bit 1: counter reset (both active while 1, read back); bit 2: start counting; bit 3: stop counting (bits 2 and 3 are commands, read back 0, stop wins) |
| 0x0006 | pulsereg | R/W | storage only, no function assigned |
| 0x0100 + 2·ch | errorcount[ch] | R | failed checks of channel ch, saturating |
| 0x0200 + 8·ch + 0 | delayreg_A[ch] | R/W | bits 0..12: one tap **up** on sub channels 12..24 |
| 0x0200 + 8·ch + 2 | delayreg_B[ch] | R/W | bits 0..11: one tap **up** on sub channels 0..11 |
| 0x0200 + 8·ch + 4 | delayreg_C[ch] | R/W | bits 0..12: one tap **down** on sub channels 12..24 |
| 0x0200 + 8·ch + 6 | delayreg_D[ch] | R/W | bits 0..11: one tap **down** on sub channels 0..11 |
| 0x0400 + 4·ch + 0 | readbackreg_A[ch] | R | bits 0..11: sampled data of sub channels 0..11 |
| 0x0400 + 4·ch + 2 | readbackreg_B[ch] | R | bits 0..12: sampled data of sub channels 12..24 |

A write to a delay register moves every line whose bit is 1 by exactly one
tap. The step pulse follows the write by one clock. The written value stays
readable, but rewriting the same value moves the taps again. Reads of
unmapped addresses return 0, and writes to read-only or unmapped addresses
have no effect.

**Global reset** restarts the pattern, clears the error counts, sets every
tap to 0, resets the delay calibration block (so status bit 0 drops for a
moment) and ends the counting phase. **Counter reset** restarts the pattern
and clears the error counts. The hardware reset `rst_n` does all of that
and also clears the registers.

A typical session: write `0x0004` to controlreg to start counting, wait,
write `0x0008` to stop, then read the 16 error counters. For each bad
channel, step delays (A/B up, C/D down) and repeat. To clear the counts,
write `0x0002` and then `0x0000`.

## Interface and timing of the top (`bpt_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | pattern, capture and register clock (tested at 100 MHz) |
| `refclk` | in | 1 | 200 MHz delay reference |
| `rst_n` | in | 1 | reset, active low |
| `bus_addr`, `bus_wdata` | in | 16 | register address and write data |
| `bus_we`, `bus_re` | in | 1 | one-clock write or read strobe (never both) |
| `bus_rdata`, `bus_rvalid` | out | 16, 1 | read data, valid one clock after `bus_re` |
| `tx` | out | 16×25 | DDR pattern to the backplane |
| `rx` | in | 16×25 | DDR pattern from the backplane |
| `err_now` | out | 16×2 | failed checks per channel in the current clock (monitoring) |

Latency from a line to its error count is three rising edges: capture,
capture pipeline, then the count. The readback registers show the rising-edge
sample about two clocks behind the line. Parameters: `NCH` = 16, `NSUB` =
25, `VERSION` = `16'h0001`, `NTAPS` = 64, `TAP_NS` = 0.078.

The VME slave, which would turn VME bus cycles into `bus_we` / `bus_re`
strobes, is not included. Nothing about the VME cycle type, base address or
handshake is fixed here. Any slave that delivers a 16-bit address and data
word with a one-clock strobe will do.

## Vendor primitives and behavioural models

Three files model FPGA primitives and are meant for simulation only. On the
FPGA, the vendor cell goes in their place:

* `iodelay_model`: a variable input delay with `IDATAIN/DATAOUT/C/CE/INC/RST`
  pins, 64 taps of 78 ps, wrap-around. These values are typical of the
  Virtex-5 IODELAY with a 200 MHz reference. They are not taken from a data
  sheet here, so check them against the part you use.
* `idelayctrl_model`: `RDY` goes high 16 reference edges after `RST` and drops
  when the reference stops for 50 ns.
* `oddr_model`: a same-edge DDR output register. It selects between its
  two halves with the clock itself, which is how the primitive behaves but
  not how one writes logic.

The delay and wire models carry each input change in its own forked process.
This gives a true transport delay that keeps changes closer together than
the delay. A plain `x <= #d y` in Verilator 5 drops such changes, and a line
with a 6 ns delay toggling every 5 ns then arrives one half period late.

The other modules (`pattern_gen`, `ddr_capture`, `err_checker`,
`vme_regs`, and the wiring in `rx_channel` and `bpt_top`) are synthesizable.
`ddr_capture` uses both clock edges, as an input DDR cell does.

## Choices made here

These points are this design's own, not a fixed part of the specification
it implements:

* Bit `i` of the counter goes on sub channel `i`, with the same pattern on
  every channel. The counter is 25 bits wide and steps by one per clock edge.
* Two checks are made per clock, inside and across double words. Each
  failed check counts one, and the count saturates at `0xFFFF`.
* The delayreg_A/C and readbackreg_B fields are 13 bits wide (bits 0..12),
  since sub channels 12..24 are thirteen lines.
* The delay registers act on sub channels 12..24 for A/C and 0..11 for B/D,
  while readback A/B are the other way round (A = 0..11). Both follow the
  register description as given. The readback registers are interleaved
  A/B per channel at 0x0400 + 4·ch.
* The control register's start and stop bits are commands, and the reset
  bits are levels. Global reset also stops the counting phase.
* The pulse register has no defined use and is plain storage.
* Only one sample per line can be read back, the rising-edge sample, through
  readback A/B. A deeper capture buffer of 4 or 8 consecutive samples per
  line would help with finding edges, but it is not built and has no
  addresses.
* A one-clock synchronous register bus stands in for VME. The reference-clock
  flag is synchronised by two flip-flops.
* The hardware reset also resets the delay taps, so no step pulse from
  before the first reset edge can survive.

## Simulation

All files use `timescale 1ns/1ps`. Testbenches need `--timing`. Each one
prints `TB_RESULT checks=N failures=M` and ends with `$finish`.

```
verilator --binary --timing --assert -Irtl -Itb rtl/bpt_pkg.sv tb/tb_bpt_top.sv --top-module tb_bpt_top
./obj_dir/Vtb_bpt_top
```

| Testbench | What it shows |
|---|---|
| `tb_bpt_top` | full size (16×25, default parameters), about 2 s of run time: untuned skew gives errors on every channel; stop freezes the counts; counter reset clears them; tuning through A/B registers; 500 clean clocks; readback of all channels equal to the pattern; one injected glitch gives exactly 2 errors; detuning with D gives errors on that channel only; global reset; reference clock loss. Each of these is counted, and one that never happened is a failure. |
| `tb_rx_channel` | one channel with 3–7 ns wire skew: errors, tuning, no errors, detuning |
| `tb_vme_regs` | every register address, control and status bits, step pulse patterns |
| `tb_err_checker` | random corruptions against an independent count, counting phase gating, clear, saturation |
| `tb_ddr_capture`, `tb_pattern_gen`, `tb_oddr_model`, `tb_iodelay_model`, `tb_idelayctrl_model` | the single blocks |

`tb/bp_wire.sv` models one backplane wire: a delay plus a glitch input.
