# Soft-error tolerant flip-flops with timing pre-error sensing

A particle strike can flip a stored bit (a single-event upset, SEU). It can
also put a short glitch on a data line that a flip-flop then captures (a
single-event transient, SET). Triplicating every flip-flop guards against both,
but it triples the area and the clock load. This design uses cheaper
redundancy, at the level of a *group* of flip-flops:

* Every data bit is stored twice. A **primary** flip-flop samples it on the
  clock CP1. A **secondary storage element (SSE)** samples it on CP2, which is
  the same clock delayed by one buffer.
* One extra **parity flip-flop** per group stores the parity of the group's
  inputs, taken at the CP1 edge.
* After the edge, the parity of the primaries' outputs is compared with the
  stored parity. If they differ, ERROR goes high and the group's outputs
  switch from the primaries to the SSEs.

A single upset in any one flip-flop is masked. So is a glitch that only the
primary clock edge caught: the SSE sampled a little later and got the clean
value.

The same comparison also works as a timing monitor. The input parity reaches
the parity flip-flop through a **programmable delay**. Data that arrives
shortly before the clock edge is still captured correctly by the primaries,
but the parity flip-flop sees the old parity, so ERROR goes high. This is a
*pre-error*: a warning that the path is close to failing, raised before any
bit is actually wrong.

Radiation events are rare and random, while timing pre-errors repeat cycle
after cycle. So the ERROR lines of all groups are ORed and counted over a
window. The count tells the two apart. Timing pre-errors drive a closed loop
that lowers the supply voltage, or shortens the clock period, until the design
sits just above its failure point.

Next to this system there are three other parts, as used on the test chips for
this flip-flop family:

* a C-element based, single-phase clocked hardened flip-flop (SPCRC2-DFF);
* a system RAM with SECDED error correction and automatic write-back;
* a long shift-register chain with a built-in pattern test, for radiation
  testing of flip-flop cells.

## Files

| File | Contents |
|---|---|
| `rtl/rad_pkg.sv` | regulator mode and BIST pattern enums, pattern function |
| `rtl/secded_pkg.sv` | Hamming (39,32) SECDED encode/decode functions and types |
| `rtl/mbff_dff.sv` | D flip-flop with async clear to a chosen value |
| `rtl/mbff_parity_gen.sv` | N-bit XOR (even) / XNOR (odd) parity |
| `rtl/mbff_prog_delay.sv` | programmable delay line (behavioural model) |
| `rtl/clk_guard_filter.sv` | guard-gate clock glitch filter (behavioural model) |
| `rtl/mbff_ecu_mux.sv` | error computation and output selection |
| `rtl/mbff_system.sv` | one N-bit protected group |
| `rtl/error_monitor.sv` | OR, register, count-per-window, classify |
| `rtl/avs_controller.sv` | voltage / frequency regulation loop |
| `rtl/spcrc2_dff.sv` | SPCRC2-DFF cell (behavioural, node-level model) |
| `rtl/ecc_ram.sv` | SECDED RAM with write-back and bypass |
| `rtl/sr_bist.sv` | shift-register chain and its pattern test |
| `rtl/rad_ff_top.sv` | top level wiring all of the above |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

## The protected group (`mbff_system`)

```
 d ──┬──────────────► primary FFs (CP1) ── qp ─┬─► Po = parity(qp)
     ├──────────────► SSEs (CP2 = CP1+buffer) ─┼─ qs          │
     └─► PGEN ─► PD ─► parity FF (CP1) ── PiR ─┼──────► ERR = Po ^ PiR
                                              └─► q = ERR ? qs : qp
```

What each fault does in a group:

| Event | ERR | q |
|---|---|---|
| none | 0 | primaries |
| upset in a primary, or a glitch on d caught at the CP1 edge | 1 | SSEs (correct) |
| upset in an SSE | 0 | primaries (correct) |
| upset in the parity FF | 1 | SSEs, equal to primaries |
| d changes within the PD delay before CP1 (pre-error) | 1 for that cycle | SSEs, which also took the new value |
| glitch on cd1_n (only when the resets are separate) | 1 | SSEs |

A group only detects and masks; it does not rewrite a corrupted flip-flop. The
next clock edge replaces the bad bit. While the clock is gated there is no next
edge, so a second upset in the same group could then go wrong. The system can
use ERROR as the signal to run a refresh cycle.

Two faults in one group are not covered, and neither is a change of two input
bits that keeps the parity the same. With a two-bit change, the timing sensor
misses that cycle; a systematic timing problem shows up again in a later cycle.

### Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_BITS` | 2 | bits per group; 4- and 8-bit groups work the same way with a deeper parity tree |
| `EVEN_PARITY` | 1 | 1: XOR parity, and the parity FF resets to 1. 0: XNOR parity, resets to 0 |
| `SEPARATE_RESET` | 0 | 1: the SSEs use their own reset `cd2_n` |
| `CLK_FILTER` | 0 | 1: guard-gate filter on the primaries' clock |
| `SKEW_PS` | 55 | CP1→CP2 buffer delay |
| `XOR_PS`, `PD_BITS`, `PD_STEP_PS` | 40, 2, 25 | parity tree delay per level, and the PD steps |

The parity flip-flop's reset value is chosen so that ERROR is high during
reset. A reset glitch that clears only the primaries then hands the outputs to
the SSEs. The price is that ERROR is also high during a real reset, so ignore
it then.

The default configuration (2-bit, even parity, single-buffer skew, one common
reset) is the one built in silicon. The delay values are illustrative, not
characterised.

### Delays in the RTL

The protection depends on delays, so the clock skew, the parity-path delay
and the clock filter are written as SystemVerilog delays. They live in
`mbff_prog_delay` and `clk_guard_filter`, which are behavioural models. In a
real implementation each one is a standard-cell buffer chain and a hand-placed
cell. Synthesis ignores these delays. Everything else in the group is ordinary
logic.

### Timing rules when using groups in a design

In the model the flip-flops, the parity gates and the mux have no delay. In
silicon, a path that ends in a group has extra work to do, and the following
rules apply:

* **Setup.** Compared with a plain flip-flop, the path gets longer by three
  delays:
  * the launching group's output mux;
  * the capturing group's input parity tree;
  * the time ERROR takes to settle.

  The usual timing margin must cover this sum. In return, the loop can use up
  most of that margin, because the pre-error flag warns before real failures
  start.
* **Hold.** The SSEs sample one skew later than the primaries. Every path
  that ends in a group therefore needs that much more minimum delay.
* **Skew limit.** The skew must be shorter than a flip-flop's clock-to-Q delay
  plus the ERROR delay. Otherwise, just after an edge, the mux could briefly
  select an SSE that still holds the previous value.

A longer skew filters longer glitches on D. It also costs hold margin.

The primaries, SSEs and parity flip-flop are plain library D flip-flops.
Place the cells of one group apart from each other, so that one particle
cannot hit two of them.

## Error monitor and regulation loop

`error_monitor` works in three steps:

1. It ORs all group ERROR lines and registers the result.
2. It counts the error cycles in back-to-back windows of `WINDOW_CYCLES` (64)
   clocks.
3. At the end of each window it pulses `window_done` and classifies the count:
   * 3 or more: `timing_err`;
   * 1 or 2: `rad_err`.

The rule behind these numbers says only "more than two" for timing and "less
than two" for radiation. Treating a count of exactly 2 as radiation is this
design's choice.

`avs_controller` takes one step at each `window_done`:

* After a timing window, it steps back toward safety: +1 mV, or a longer clock
  period in frequency mode.
* After any other window, it steps toward lower power: −1 mV, or a shorter
  period.

Limits:

* The voltage starts at 1200 mV and never goes below 800 mV, where the memory
  stops working.
* The period starts at 13333 ps (75 MHz).

The outputs `vdd_mv` and `period_ps` are requests for an external regulator
or clock generator.

As a result, the loop settles into a dither a few millivolts above the point
where pre-errors start. The pre-error window (the PD setting) is the guard
band above real failure.

## SPCRC2-DFF (`spcrc2_dff`)

This is a hardened master–slave flip-flop with a single clock phase.

* **Input stage:** D is split into three rails: D, its inverse, and a copy
  delayed by two inverters. A glitch shorter than those two inverters never
  gets all three rails to agree, so it never enters the latch.
* **Latches:** each latch has four storage nodes:
  * master: MA, MB, MAn, MBn;
  * slave: SA, SB, SAn, SBn.
* **Holding:** while a latch holds, each node is driven only when the two
  nodes that control it agree.
* **Output:** a C-element of SA and SB.

A strike on any single node therefore changes neither the other nodes nor Q,
and the node recovers when the strike ends. The master is transparent while
CP is low and the slave while CP is high, so D is sampled on the rising edge.

The module is a node-level behavioural model of a transistor circuit. A
testbench can hold any node at a wrong value through the `strike` variable.

## ECC RAM (`ecc_ram`)

`ecc_ram` stores 8192 words of 32 bits (32 Kbyte) as 39-bit SECDED codewords:
Hamming positions 1..38 plus an overall parity bit.

* **Reads** return data one cycle after `req`, corrected, with `sec` or `ded`.
* **Write-back:** a corrected single error is written back the next cycle.
  `ready` is low during that cycle, so errors do not pile up in the array.
* **Bypass:** `ecc_bypass` returns the raw stored data, for measuring the
  array's own error rate.

The array is an ordinary SystemVerilog memory. A real chip would use a
foundry SRAM macro.

## Shift-register test (`sr_bist`)

`sr_bist` models the radiation-test structure. It is a single chain of
`ROWS × COLS` = 626 × 160 = 100160 flip-flops, each output driving the next
input. A test run goes through four steps:

1. Load a pattern: checkerboard, all 0 or all 1.
2. Hold it for `hold_cycles` clocks, the exposure.
3. Shift it out.
4. Count the bits that differ from the pattern.

A run takes `2·ROWS·COLS + hold_cycles + 2` clocks. For the smaller chains of
standard cells (126 × 160), set `ROWS=126`.

## Top level (`rad_ff_top`)

The top contains:

* a 32-bit register bank made of sixteen 2-bit groups, whose ERRORs feed the
  monitor and the regulator;
* a 32-bit register of SPCRC2-DFFs;
* the ECC RAM;
* the shift-register test.

Each part has its own ports. The processor, ROM and GPIO around the
microcontroller that this flip-flop family was evaluated in are not included;
neither are the SRAM macros.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mbff_system \
  -Irtl rtl/rad_pkg.sv rtl/secded_pkg.sv rtl/*.sv tb/tb_mbff_system.sv
./obj_dir/Vtb_mbff_system
```

(`rad_pkg.sv` and `secded_pkg.sv` must come first.)

`tb_rad_ff_top` runs the whole top at its default sizes in a few seconds. In
that time:

* a data path whose delay grows as the voltage falls drives the regulator down
  until pre-errors appear, and it then holds there;
* frequency mode is exercised;
* upsets are injected into the register bank and the SPCRC2 register, and
  they are masked;
* the RAM's correction, write-back, double-error detection and bypass are
  exercised;
* a full 100160-cell BIST run finds two injected upsets.

Each of these mechanisms is counted, and a mechanism that never happens
counts as a failure.

## Limits and departures

* The delay values, PD width and filter delay are assumptions, not measured
  cell data.
* The 64-cycle monitor window is an assumption, and so is the regulation
  policy of one step per window.
* The SPCRC2-DFF model has two logic states. It shows the logic of the
  hardening (which node is kept by which), not charge sharing or drive
  strength.
* The monitor treats a count of 2 per window as radiation.
* The SSEs are flip-flops; a latch-based SSE, which needs a larger hold
  margin, is not provided.
