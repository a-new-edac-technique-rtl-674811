# Pulse-detector EDAC register

A flip-flop may change state only at a clock edge. A change of its output at
any other moment must therefore be a soft error: a single event upset (SEU)
caused by a particle strike. This design protects a register by detecting
exactly that. Every flip-flop output feeds a pulse detector. The delayed clock
feeds a second pulse detector, which opens a short "clock window" after each
edge. A change of Q outside that window is flagged as an upset and undone at
once through the flip-flop's own direct preset or direct clear input.

The aim is to protect the register about as well as triple modular redundancy
(TMR) does, with less area. There is one flip-flop per bit instead of three.
The per-bit checker is small, and the clock pulse detector and a latch are
shared by a whole group of flip-flops.

Part of this circuit is logic and part of it is timing. The pulse detectors
and the delay element exist only through their propagation delays, and the
correction loop works only for the right ordering of delays. The RTL
therefore comes in two kinds:

- Plain synthesizable logic: the SEU decision, the correction demultiplexer,
  the OR network, the latch, and the structural blocks that wire them up.
- Behavioural models with `#` delays: the pulse detectors, the clock delay
  element and the library flip-flop. Each one says so in its first comment.
  In a real implementation these are standard cells or hand-sized inverter
  chains, and their delays come from the cell library.

## How an upset is caught and undone

Four signals per group, named as in the original scheme:

| signal | produced by | meaning |
|---|---|---|
| S3 | clock pulse detector | clock window: high for `PW_CLK` starting `T_DELAY` after each rising clock edge |
| S4 | Q pulse detector (one per bit) | high for `PW_Q` after every rising or falling change of Q |
| SEU | SEU function (one per bit) | `S4 & ~S3 & ~S5`: Q changed outside the window, and no correction has happened yet this cycle |
| S5 | group latch | set by the OR of the group's SEU signals, cleared by the next S3 |

**A normal load.** The clock rises at t=0. After 0.4 ns the delayed clock
opens the window S3, which stays open until 1.6 ns. The flip-flop output
changes at 0.5 ns, its clock-to-Q delay. S4 is then high from 0.5 to 1.5 ns,
which lies entirely inside the window, so SEU stays low.

**An upset.** Say a strike flips a bit at t=30 ns.

1. S4 rises at once. S3 is low, so SEU rises.
2. The demultiplexer is selected by the current, wrong value of Q. If Q now
   reads 0 it drives preset, and if Q reads 1 it drives clear.
3. The OR network passes SEU to the group latch. S5 rises 0.2 ns later, the
   latch response time `T_LATCH`.
4. S5 forces SEU low again, which ends the preset or clear pulse. The pulse
   lasts about 0.2 ns. The flip-flop captured the edge of that pulse, and Q
   returns to its correct value 0.5 ns after the strike (`T_CQ`).
5. The returning Q may cause a second S4 pulse. S5 is already high, so it is
   not taken for a new upset.
6. S5 stays high for the rest of the cycle. The next clock window clears it.

**Why the delays must be ordered.** Step 5 works only if the latch responds
faster than the flip-flop (`T_LATCH < T_CQ`). If it did not, the correction
would be seen as a fresh upset and undone again. The clock window must
surround the Q pulse of every legal load. If it did not, every load would
look like an upset and be "corrected" back. The default delays give the
window a 0.1 ns guard on each side:

    T_DELAY = T_CQ - 0.1      window opens before Q can change
    PW_CLK  = PW_Q + 0.2      window closes after the load's Q pulse ends

## What it cannot catch

- **Upsets inside the clock window.** A strike whose Q pulse falls entirely
  inside S3 looks like a legal load and stays uncorrected until the next
  clock edge loads fresh data. The exposure is about the window width
  divided by the clock period: 1.2 ns out of 100 ns at the defaults. A
  strike during the flip-flop's own clock-to-Q interval can also merge with
  the load. In a 1000-strike campaign on the default 8-bit register
  (`tb_pd_edac_register_full`), 11 strikes (1.1 %) were left uncorrected,
  all of them in the first 2 ns after the edge. Every later strike was
  corrected.
- **A second upset in the same group and cycle.** After the first
  correction, S5 holds detection off until the next edge. Upsets in
  *different* groups in the same cycle are all corrected. Several
  flip-flops of one group struck at the same instant (a multi-bit upset)
  are also all corrected, because their demultiplexers act together before
  S5 rises.
- **A strike on the latch itself,** together with one on its group. The
  model has no upset input on the latch, so this case is not simulated. To
  guard against multi-bit upsets, the latch should be placed away from its
  group's flip-flops.

## Groups and the register

`pd_edac_group` is one group of `N` flip-flops. Each flip-flop has its own
individual block: Q pulse detector, SEU function and demultiplexer. The
group shares one OR network and one common block: clock delay, clock pulse
detector and latch.

The OR network's delay grows with `N` and must stay well below the
flip-flop's preset/clear delay. `pd_edac_register` therefore splits a
`WIDTH`-bit register into `ceil(WIDTH/GROUP)` groups, and the last group
may be smaller. The defaults are `WIDTH = 8` and `GROUP = 8`. The group
size is this design's choice; the scheme itself only says that flip-flops
should be clustered.

### Top-level ports (`pd_edac_register`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | clock; Q follows D `T_CQ` after each rising edge |
| `rst` | in | 1 | asynchronous clear, active high; also masks detection and clears the latches |
| `d` | in | WIDTH | data |
| `q` | out | WIDTH | register state |
| `upset` | in | WIDTH | **simulation only**: a rising edge flips that flip-flop, modelling a particle strike; tie to 0 |
| `seu_latched` | out | ceil(WIDTH/GROUP) | S5 of each group: an upset was corrected in this cycle |

Hold `rst` high for longer than `PW_Q`. Otherwise the Q change that reset
causes could be seen as an upset after `rst` falls.

### Timing parameters (ns, package `pd_edac_pkg`)

| parameter | default | role |
|---|---|---|
| `T_CQ` | 0.5 | flip-flop clock/preset/clear-to-Q delay |
| `T_DELAY` | 0.4 | clock delay before the clock pulse detector |
| `PW_Q` | 1.0 | Q pulse width |
| `PW_CLK` | 1.2 | clock window width |
| `T_LATCH` | 0.2 | latch response time |

The 1 ns pulse width and the 100 ns clock period used in the testbenches
come from the scheme's own example of its exposure window. The other values
are this design's choices and satisfy the two ordering rules above. If you
change them, keep `T_LATCH < T_CQ`, `T_DELAY < T_CQ` and
`T_DELAY + PW_CLK > T_CQ + PW_Q`; `pd_edac_group` stops elaboration with an
error when one of them is broken.

## Files

`rtl/`, one module per file:

| module | kind | what |
|---|---|---|
| `pd_edac_pkg` | package | default timing constants |
| `pd_edac_register` | logic (top) | register split into groups |
| `pd_edac_group` | logic | N flip-flops, N individual blocks, OR network, common block |
| `pd_individual_block` | logic | per-bit part: Q pulse detector, SEU function, demultiplexer, reset masking |
| `pd_common_block` | logic | per-group part: delay element, clock pulse detector, latch |
| `pd_seu_function` | logic | `S4 & ~S3 & ~S5` |
| `pd_correction_demux` | logic | SEU to preset (Q=0) or clear (Q=1) |
| `pd_or_network` | logic | OR of the group's SEU signals |
| `pd_seu_latch` | logic + output delay | set/reset latch S5 |
| `pd_q_pulse_detector` | behavioural | Q XOR (Q delayed by `PW_Q`) |
| `pd_clk_pulse_detector` | behavioural | clk AND NOT(clk delayed by `PW_CLK`) |
| `pd_delay_element` | behavioural | clock delayed by `T_DELAY` |
| `pd_dff` | behavioural | D flip-flop with direct preset and clear, plus the strike input |

Lint reports two feedback paths in every group as combinational loops:
S5 → SEU → latch → S5, and Q → S4 → preset/clear → Q. Both are the
self-timed loops the scheme relies on, and they are intended. For the same
reason the latch is intended.

Synthesis ignores the `#` delays. The logic modules synthesize as ordinary
gates and a latch. The behavioural models do not give a working circuit
when synthesized: an inverter-chain pulse detector reduces to a constant.
`pd_dff` (an asynchronous load of a non-constant value) is not accepted by
synthesis at all. The detectors, the delay element and the flip-flop have
to be replaced by library cells or custom cells with characterised delays.

## Testbenches

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M` and has a watchdog. Beyond the
unit tests:

- `tb_pd_edac_register`: 12 bits in groups of 8, end to end. Covers loads,
  preset and clear corrections, latch set and clear, a blocked second upset,
  upsets in two groups at once, a multi-bit upset, an upset inside the
  window, and reset. It counts each scenario and fails if any never happened.
- `tb_pd_edac_group`: one 4-bit group under random loads and upsets.
- `tb_pd_edac_register_full`: the default 8-bit register, with the
  1000-strike campaign described above.
- `tb_pd_edac_register_sizes`: registers of 8 to 1024 bits in groups of 8,
  run side by side for 60 cycles, with one strike per register per cycle.

Simulating needs Verilator 5 with timing support:

    verilator --binary --timing -Irtl rtl/pd_edac_pkg.sv tb/tb_pd_edac_register_full.sv \
        --top-module tb_pd_edac_register_full
    ./obj_dir/Vtb_pd_edac_register_full

Use the same command with any other testbench name. Each one takes well
under a second.

## Choices made here that the scheme leaves open

- The Q pulse detector uses an XOR, so that it catches both rising and
  falling changes of Q. The clock pulse detector is the AND of the clock and
  its inverted, delayed copy.
- SEU also includes `~S5`. The basic detection rule is only "S4 and not
  S3". The S5 term is what keeps a correction from being undone.
- The latch is a set/reset latch. It is set by the group's SEU signal and
  cleared by S3, with clear taking priority.
- Reset is an active-high clear of every flip-flop through its direct clear
  input. While reset is high, detection is masked and the latches are held
  clear. The scheme only says that reset-induced changes must not be taken
  for upsets.
- The flip-flop has one delay for the clock, preset and clear paths. A
  correction acts on the edge of the preset or clear pulse, so it works even
  though the pulse is shorter than the flip-flop delay.
- The window guard margins, all delay values except the 1 ns pulse width,
  and the group size of 8 are this design's own.
- Area is not modelled. The scheme's motivation is a smaller area than TMR
  for registers of 8 to 1024 bits.
