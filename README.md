# Redundant PLL core with fault detection, isolation and recovery

PLLs and clock managers inside FPGAs are sensitive to single-event effects,
even in radiation-tolerant parts. A hit can make a PLL lose lock, stretch or
chop its output, or stop it altogether. A PLL that has lost lock does not
regain it until it is reset, and on a spacecraft that reset usually waits
for a telecommand sent after the ground sees telemetry. The logic the PLL
clocks is down for that whole time.

This core removes the wait. Two or three PLLs with identical settings run
in parallel from the same input clock, all powered and running (hot
redundancy). The core:

* watches each PLL's lock signal;
* isolates a PLL that loses lock and resets it automatically until it locks
  again;
* moves the output clocks to a healthy PLL through glitch-free clock
  multiplexers;
* reports every switch and every reset as telemetry.

All of this is plain synchronous logic plus one small clock-domain circuit
per multiplexer input, so it does not depend on any FPGA family. The PLLs
are outside the core. It sees only each PLL's clocks, its lock flag and its
reset input.

The design follows the article *Radiation Tolerant PLL for Onboard FPGAs*
(Jain, Mehta, Sharma, Bhandari, Poddar, Trivedi). Where this RTL makes its
own choices, or departs from the article, the sections below say so.

```
              +--------------------+   healthy[i]   +------------+  req (one-hot)
 pll_lock[i]->| pll_error_detect i |--------------->| switch_ctrl|-------------+
              |  sync + recovery   |--pll_rst[i]--> +------------+             |
              +--------------------+   (to PLL i)     | alert, counts        v
                       | not healthy (registered) -> kill[i]       +---------------------+
 pll_clk[i][k] ------------------------------------------------->  | glitch_free_clk_mux | -> clk_out[k]
                                                                    |   one per output k  |
                                                                    +---------------------+
```

## What happens when a PLL fails

Here is the timeline for the default configuration (three PLLs, no majority
voting) when the PLL in use is hit:

1. The PLL drops its lock flag. Its clock may stop, run at the wrong rate
   or keep running.
2. After `SYNC_STAGES` (2) master-clock cycles, the registered lock in
   `pll_error_detect` falls. At that moment `healthy[i]` goes low and
   `fault[i]` pulses for one cycle. Registering the lock costs these
   cycles, but a glitch on the lock line that falls between two clock edges
   cannot cause a switch.
3. On the next master-clock edge:
   * the selection register in `switch_ctrl` moves to the first healthy PLL
     in the fixed order PLL0, PLL1, PLL2;
   * `switch_alert` rises for 16 cycles;
   * `switch_count` increments;
   * the failed PLL's channel in every output multiplexer is cleared
     asynchronously (`kill`);
   * `pll_rst` of the failed PLL rises for 16 cycles, and its
     `reset_count` increments.
4. The new PLL's clock appears at each output within about two of its own
   cycles. No output pulse is ever shorter than a normal half period. In the
   end-to-end test (20 ns master clock, 8 ns PLL clock) the longest output
   gap at a failover was just under four master-clock cycles, most of it
   lock-detection latency.
5. The failed PLL re-locks after its reset and becomes healthy again. The
   output does **not** switch back. A PLL is only left when it fails, so
   each fault costs at most one switch.

Suppose the PLL does not lock within `LOCK_TIMEOUT` (4096) master-clock
cycles after a reset. It is then reset again, and this repeats for as long
as needed. A PLL that has failed for good therefore shows a steadily
climbing reset counter, but it never takes part in selection.

## Redundancy modes and the selection rules

The mode is the `MODE` parameter of `pll_fdir_top`, of type
`fdir_pkg::fdir_mode_e`. The article chooses the mode with compiler
directives; here it is a parameter.

| MODE              | PLLs | output clock present when         |
|-------------------|------|-----------------------------------|
| `MODE_DUAL`       | 2    | the chosen PLL is healthy         |
| `MODE_TRIPLE` (default) | 3 | at least one PLL is healthy  |
| `MODE_TRIPLE_MAJ` | 3    | at least two PLLs are healthy     |

The next selection depends on the current selection and the health flags.
Because the current selection is an input, the rules never leave a healthy
PLL.

**Dual** (`sel_next_dual`). Selection 0 is PLL0 (the primary) and 1 is
PLL1. The rule is `next = healthy1 & (sel | ~healthy0)`:

* go to PLL1 only when it is the only healthy PLL;
* stay on PLL1 while it stays healthy;
* fall back to PLL0 otherwise, including when both PLLs are down.

When both PLLs are down, selection 0 is still held, but the PLL0 channel is
cleared, so the output is quiet until a PLL returns.

**Triple** (`sel_next_triple`, `sel_next_triple_maj`). The selection is a
2-bit code: 0 = no output, 1/2/3 = PLL0/PLL1/PLL2.

* Keep the current PLL while it is healthy.
* Otherwise take the first healthy PLL in the order PLL0, PLL1, PLL2.
* With majority voting, the code is 0 (no output) whenever fewer than two
  PLLs are healthy. Without it, the code is 0 only when no PLL is healthy.

The article also gives sum-of-products equations for both triple modes. With
the code assignment above they agree with these rules in 30 of the 32
input combinations. The remaining cases are listed below. In each one the
printed equations would switch away from a PLL that is still healthy,
which the article's own description of the modes rules out. The RTL follows
the description.

* Majority: PLL2 selected and healthy, and exactly one other PLL healthy.
  The equations move to PLL0 or PLL1; this RTL stays on PLL2.
* No majority: PLL1 selected and healthy, and PLL0 also healthy. The
  equations move to PLL2; this RTL stays on PLL1.

The selection is registered on the master clock. The article also describes
a purely combinational version, in which the selection feeds back to itself
without a flip-flop. The registered form costs one master-clock cycle per
switch, but it has no combinational loop and no timing hazard.

## Lock monitoring and recovery (`pll_error_detect`)

There is one instance per PLL. It contains:

* a `SYNC_STAGES`-deep synchroniser for the lock;
* a three-state machine:
  * **WAIT**: waiting for lock, with a timeout;
  * **RUN**: PLL usable;
  * **RESET**: `pll_rst` held high for `RST_CYCLES`.

`healthy` is true only in RUN with the registered lock high. A loss of
lock in RUN gives the `fault` pulse and moves the machine to RESET.
At the top level each PLL's reset is the master reset OR-ed with its
automatic reset, both active high at the PLL.

The article also discusses watching the PLL output clocks instead of the
locks. It prefers the lock as the faster and simpler indicator, and the
clock-watching circuit is not part of this core. The core also has no
combinational, unregistered lock path: the article notes that such a path
switches falsely on lock glitches.

## Glitch-free clock multiplexing (`glitch_free_clk_mux`)

Each output clock has its own N-input multiplexer, and all of them follow
the same request. Each input channel has two flip-flops clocked by that
channel's own clock:

* the first samples, on the rising edge, the condition "requested and no
  other channel enabled";
* the second passes it on at the falling edge.

The output is the OR of each clock AND-ed with its enable. Enables change
only while their clock is low, and a channel turns on only after every
other channel is off, so a switch costs a short gap but never a runt pulse.

A plain glitch-free switch can hang when the old clock has died: the
old channel's enable can only be cleared by its own clock, and a dead
clock never delivers the edge. This design adds `kill[i]`, an asynchronous
clear per channel. The top drives it from a registered "PLL i not
healthy", so a failed PLL's channel is dropped at once and the new clock
can start. `kill` is held off while a command bypass is active, so that
ground can force any PLL onto the output.

Each PLL has `NUM_OUT` = 7 output clocks, and output *k* of the core selects
among output *k* of every PLL. The article does not state the number
directly. Seven matches the seven outputs of the FPGA PLL it describes,
and also its clock-buffer counts of 21 for two PLLs and 28 for three:
7 × (PLLs + 1).

## Telemetry and telecommand

| signal | meaning |
|--------|---------|
| `pll_sel` | current selection code |
| `pll_healthy[i]` | PLL i in use-able state |
| `clk_en[k][i]` | PLL i drives output k |
| `switch_alert` | high for `ALERT_CYCLES` master cycles after every switch; a new switch restarts it |
| `switch_count` | saturating count of selection changes, including the first selection after reset |
| `reset_count[i]` | saturating count of automatic resets of PLL i |
| `cmd_bypass`, `cmd_sel` | while `cmd_bypass` is high, the selection is `cmd_sel` (same code as `pll_sel`) whatever the health flags say |

The article asks for an alert "of finite duration", switch and reset
counters, and command bypass with PLL selection. The signal names, widths,
lengths and the bypass interface are this design's.

## Parameters of `pll_fdir_top`

| parameter | default | meaning | origin |
|-----------|---------|---------|--------|
| `MODE` | `MODE_TRIPLE` | redundancy scheme | default is this design's choice |
| `SYNC_STAGES` | 2 | lock synchroniser depth (≥ 2) | article: 2 to 4 cycles of detection delay |
| `RST_CYCLES` | 16 | length of an automatic PLL reset | own choice |
| `LOCK_TIMEOUT` | 4096 | cycles to wait for lock before resetting again | own choice |
| `ALERT_CYCLES` | 16 | length of the switching alert | own choice |
| `CNT_W` | 8 | counter width | own choice |
| `NUM_OUT` | 7 | output clocks per PLL | derived from the article's PLL and buffer counts |

`N` (2 or 3) follows from `MODE`. Choose the reset length and the lock
timeout to suit the PLL's data sheet. Generic synthesis of the default
configuration gives 138 flip-flop bits.

## Files

| file | content |
|------|---------|
| `rtl/fdir_pkg.sv` | mode enum, selection code type, code-to-one-hot helper |
| `rtl/pll_fdir_top.sv` | the core |
| `rtl/pll_error_detect.sv` | lock synchroniser, fault detection, auto reset, reset counter |
| `rtl/switch_ctrl.sv` | selection register, bypass, alert, switch counter |
| `rtl/sel_next_dual.sv`, `rtl/sel_next_triple.sv`, `rtl/sel_next_triple_maj.sv` | next-selection rules |
| `rtl/glitch_free_clk_mux.sv` | N-input glitch-free clock multiplexer with per-channel kill |
| `tb/pll_model.sv` | behavioural PLL for simulation: output clocks, lock after a set number of cycles, loses lock and stops on an upset until reset, or dead for good |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_pll_fdir_modes.sv` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_pll_fdir_top -y rtl -y tb +libext+.sv rtl/fdir_pkg.sv tb/tb_pll_fdir_top.sv
./obj_dir/Vtb_pll_fdir_top
```

Replace `tb_pll_fdir_top` with any other testbench name.

* `tb_pll_fdir_top` runs the core with every parameter at its default: three
  PLL models with seven outputs each. It covers:
  * power-up;
  * a lock glitch between two master-clock edges, which must be ignored;
  * failover from the PLL in use, with auto reset, re-lock and no switch
    back;
  * a standby PLL failing without a switch;
  * a second failover;
  * a PLL dead for good, with repeated timeout resets;
  * all remaining PLLs lost, with no output until recovery;
  * bypass and its release.

  It counts each of these and checks each output for runt pulses. It takes
  well under a second.
* `tb_pll_fdir_modes` runs the dual and the majority mode (one output per
  PLL, short lock timeout).
* The other testbenches check single modules:
  * the selection rules exhaustively, against reference models;
  * the switching matrix in all three modes, cycle by cycle, against a
    model under random health patterns;
  * the error detector's latencies and reset lengths;
  * the multiplexer, with three unrelated clocks, random switches and a
    clock that dies while high.

## Limits and how far to trust it

* Faults are detected only through the lock flag, so the core catches only
  faults that drop it. A PLL whose clock is disturbed while it still
  reports lock is not detected.
* Clearing a dead channel with `kill` while its clock is stuck high ends
  that last high pulse early. The clock was already broken at that point.
* The multiplexers do not align the phases of the PLLs. Output clocks shift
  phase at a switch, and a gap of a few cycles is unavoidable with this kind
  of switch. The article lists phase alignment of the PLLs as future work.
* Command bypass overrides the selection and the channel clear, but not
  the automatic recovery: a forced PLL that has no lock is still reset
  periodically by its error detector, which interrupts its clock.
* The vendor clock-buffer multiplexer variants that the article also tried
  are not included.
* Everything was checked in two-state simulation with idealised clocks. No
  timing analysis, FPGA implementation or radiation test has been done. For
  FPGA use, constrain each multiplexer's flip-flops to their own input clock
  and place the output OR on a clock-capable resource.
