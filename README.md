# PRESTO: a low-power programmable PRPG that doubles as a test decompressor

Pseudo-random scan patterns toggle about half of all scan cells on every
shift cycle. That is several times the switching of normal operation, and it
can overheat the chip, droop the supply or fail timing during test. PRESTO
(PREselected TOggling) is a pseudo-random pattern generator (PRPG) whose
toggling rate can be set. It puts a bank of **hold latches** between an
ordinary PRPG and the phase shifter that feeds the scan chains. A latch that
is frozen keeps the phase-shifter inputs it drives constant. A scan chain
whose three phase-shifter taps are all frozen then receives a constant value
and does not toggle while it shifts. Which latches are frozen, and for how
long, is programmed with three 4-bit codes.

The same hardware also works as a **low-power test data decompressor**.
Random choices are replaced by deterministic control data from the tester.
Logic BIST and ATPG-based compressed patterns can therefore share one
generator.

This RTL implements the fully operational generator, with both modes in one
circuit. The basic variant, with no hold/toggle phases, is the special case
Toggle code = 0000.

## Data path

```
            +------------+   N    +--------------+   N   +---------------+  S
 channels ->|  PRPG      |------->| hold latches |------>| phase shifter |---> chains[S-1:0]
 (decomp)   |  N-bit LFSR|        |  (enable[i]) |       | 3-input XORs  |
            +------------+        +--------------+       +---------------+
              |bits 0..9   bits 10..19|       ^ enable[i] = lp_off | (ctrl[i] & toggle_mode)
              v                       v       |
       weighted logic V        weighted logic H          control register (N)
              |                       |                         ^ once per pattern
   ctrl_si -> mux -> shift register (N) -----------------------+
                                      |
                         T flip-flop (toggle_mode) <- H (PRPG mode)
                                                   <- down counter (decompressor mode)
```

* `prpg_lfsr`: a 32-bit external-XOR LFSR, x^32+x^22+x^2+x+1. In
  decompressor mode, tester channel `c` is XORed into state bit
  `c*N/CHANNELS` on every step.
* `hold_latch_bank`: N latches. An enabled latch passes its PRPG bit in the
  same cycle. A disabled latch keeps the last value it passed.
* `phase_shifter`: each of the S outputs is the XOR of three latches:
  `t`, `t+a` and `t+2a+1` (mod N), where `t = j mod N` and
  `a = 1 + (j div N) mod (N/2-1)`. The three taps are always distinct, and no
  two outputs share a tap set.
* `control_shift_register`: an N-bit shift register and an N-bit control
  register. The shift register takes in one bit per shift cycle, either from
  weighted logic V or from `ctrl_si`. At `pattern_start` it is copied into the
  control register. A 1 in the control register lets the latch toggle.

## Programming the toggling rate: weighted logic

`weighted_logic` is used twice: as V, which feeds the shift register, and as
H, which drives the T flip-flop. It has four AND gates with 1, 2, 3 and 4
inputs, taken from distinct PRPG bits, so each outputs a 1 with probability
1/2, 1/4, 1/8 or 1/16. Bit `i` of the 4-bit code enables the gate with
probability 2^-(i+1), and the enabled gates are ORed:

    p(k) = 1 - prod over set bits i of k of (1 - 2^-(i+1))

| code | p(k) | mean phase length 1/p(k) |
|------|------|------|
| 0001 | 0.5 | 2.00 |
| 0010 | 0.25 | 4.00 |
| 0011 | 0.625 | 1.60 |
| 0100 | 0.125 | 8.00 |
| 0101 | 0.5625 | 1.78 |
| 0110 | 0.34375 | 2.91 |
| 0111 | 0.671875 | 1.49 |
| 1000 | 0.0625 | 16.00 |
| 1001 | 0.53125 | 1.88 |
| 1010 | 0.296875 | 3.37 |
| 1011 | 0.6484375 | 1.54 |
| 1100 | 0.1796875 | 5.57 |
| 1101 | 0.58984375 | 1.70 |
| 1110 | 0.38476563 | 2.60 |
| 1111 | 0.69238281 | 1.44 |

With switching code k, a fraction of about p(k) of the control register is 1,
so about p(k) of the latches may toggle. Switching code **0000** is caught by
a NOR gate and turns the low-power function off. All latches then become
transparent, and the generator behaves as a plain PRPG. The `lp_off` output
shows this state. Code 0000 is also the reset state.

### Which PRPG bits feed the gates

The LFSR state mostly shifts by one position per cycle. If a gate read
adjacent state bits, it would see the same random bits again one cycle later.
Its 1s would then come in clusters, although their overall rate would still
be p(k). Clustering matters in two places:

* **Hold/toggle phases.** A phase ends at the first 1 after it starts, so
  clusters stretch the phases. With adjacent bits, mean phase lengths came out
  up to 51 % longer than 1/p(k).
* **Control register.** Clusters pack its 1s together. Fewer scan chains then
  get an enabled tap than the independent-bit estimate S*(1-(1-p)^3)
  predicts.

V and H therefore read disjoint, spread-out bits (`WL_V_POS` and `WL_H_POS`
in `presto_pkg`). These positions were chosen by simulating the 32-bit LFSR
over all codes. With them:

* mean phase lengths stay within about 5 % of 1/p(k);
* active-chain counts stay within about 0.03*S of the independent-bit
  estimate.

For a different N or polynomial, choose new positions by the same criterion.

### Bit order

Code bit 0 selects the 1/2 gate. This gives p(0001) = 0.5,
p(1110) = 0.38476563 and p(1111) = 0.69238281, the published figures for
this scheme. An MSB-first reading would give 12.5 % for code 0010. Change
the gate-to-bit mapping in `weighted_logic.sv` if you want that reading.

## Toggle and hold phases (`mode_control`)

A T flip-flop (`toggle_mode`) splits each shift into alternating phases:

* **toggle phase** (`toggle_mode = 1`): the latches follow the control
  register.
* **hold phase** (`toggle_mode = 0`): every latch is frozen, whatever the
  control register holds. AND gates on the control register outputs do this.

Four 2-input multiplexers select the Toggle code during a toggle phase and
the Hold code during a hold phase. How a phase ends depends on the mode:

* **PRPG mode**: the selected code drives weighted logic H. The flip-flop
  toggles on each shift cycle where H outputs 1. A phase with code k
  therefore lasts 1/p(k) cycles on average (geometric distribution).
  * Toggle code 0000 never ends a toggle phase, so hold phases are off.
  * Hold code 0000 ends a hold phase after one cycle, so the generator cannot
    lock up in hold. This rule is a design choice.
* **Decompressor mode**: H is not used. `down_counter`, a 4-bit down counter,
  times the phases.
  * At `pattern_start`, the flip-flop loads `init_toggle` and the counter
    loads `offset`.
  * On each shift cycle with the counter at zero, the flip-flop toggles and
    the counter reloads from the register of the phase being entered: Hold
    when entering hold, Toggle when entering toggle.
  * A phase therefore lasts (register value + 1) shift cycles, and the first
    phase lasts offset + 1.
  * If the register of the phase to be entered is 0000, that phase is
    skipped. The flip-flop stays put and the counter reloads the current
    phase's register. So Hold = 0000 encodes a pattern entirely in toggle
    mode.

## Decompressor mode (`decomp = 1`)

* Weighted logic V and H are disabled.
* The shift register is fed only from `ctrl_si`, which carries the
  deterministic control data.
* `channels` is injected into the PRPG.
* Phases are counted as described above.
* `pattern_start` also clears the hold latches to 0, so every pattern starts
  from a known state.

The switching code is ignored in this mode, and `lp_off` stays low. In PRPG
mode, `det_ctrl = 1` also feeds the shift register from `ctrl_si`.

## Configuration chain (`lp_config_regs`)

The 17-bit `lp_cfg_t` (in `presto_pkg`) is shifted in through `cfg_si`, one
bit per clock while `cfg_shift` is high, MSB first:

| bits | field | use |
|------|-------|-----|
| 16:13 | switching | weight of V |
| 12:9 | hold | H code (PRPG) / hold length-1 (decompressor) |
| 8:5 | toggle | H code (PRPG) / toggle length-1 (decompressor) |
| 4 | init_toggle | first phase of a pattern (decompressor) |
| 3:0 | offset | length-1 of the first phase (decompressor) |

A one-cycle `cfg_update` copies the chain into shadow registers. The codes in
use therefore do not change while the next set is shifted in or during
capture. `cfg_so` is the end of the chain, so several generators can be
daisy-chained.

## Interface and timing (`presto_top`)

Parameters: `N = 32` (PRPG and latch width), `S = 64` (scan chains),
`CHANNELS = 2`. The PRPG feedback polynomials are tabulated for N = 8, 16,
24, 32, 48 and 64. The phase shifter needs `S <= N*(N/2-1)`.

* Clock `clk`; asynchronous active-low reset `rst_n`. Reset loads the PRPG
  seed `0x7F4A7C15`, sets the shift and control registers to all ones, clears
  the latches and the configuration, and puts the flip-flop in toggle mode.
* `shift_en`: each cycle it is high, the PRPG steps, one control bit is
  shifted in, and a phase decision is made.
* `pattern_start`: a one-cycle pulse before the first shift cycle of each
  pattern. It reloads the control register. In decompressor mode it also
  initialises the flip-flop and counter and clears the latches.
* `chains[S-1:0]`: combinational from registered state, valid in the same
  cycle as the PRPG state it reflects. It is meant to be sampled by the scan
  chains on the next edge.
* `seed_load`/`seed`: a synchronous PRPG reload.
* `toggle_mode` and `lp_off` are status outputs.

The shift counter and capture sequencing of the logic-BIST controller, and the
ATPG/tester that produce decompressor data, are outside this RTL. They drive
the ports above.

## Implementation choices not fixed by the scheme

* The PRPG is an LFSR (a ring generator would also do), with N = 32, S = 64,
  2 channels, and the injection points and seed given above.
* The hold latches are written as synchronous logic: `q = en ? d : held`, and
  `held` captures `q` at every edge. This behaves like a latch that is open
  during the cycle and closes at the edge, and it infers no level-sensitive
  storage.
* The phase-shifter tap pattern is simple and deterministic. It is not
  optimised for channel separation. For production use, replace it with a
  phase shifter synthesised for your PRPG.
* The PRPG bits that feed the weighted logic are spread out, as described
  above.
* The handling of code 0000 in the Hold/Toggle registers, the configuration
  chain order, and the reset values are design choices.
* Choosing the switching/hold/toggle codes for a target toggling rate is a
  software task and is not part of the RTL. Given a target toggling T (%) and
  S chains, the number of active chains is A = T*S/50. Pick the switching
  code whose expected number of active chains is just above A. Then pick the
  hold/toggle pair (15 x 15 choices) whose duty cycle best scales the active
  chains down to A.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_prpg_lfsr`: compares the LFSR with a step-by-step model, covering
  injection, stalls and seed loads. It also checks the maximal period of an
  8-bit instance.
* `tb_weighted_logic`: exhaustive. It checks p(k) for all 16 codes.
* `tb_control_shift_register`, `tb_hold_latch_bank`, `tb_down_counter`: random
  stimulus against reference models.
* `tb_phase_shifter`: recovers the tap sets from the outputs. It checks three
  taps per output, that all tap sets are distinct and all inputs used, and
  that the outputs are linear.
* `tb_lp_config_regs`: serial load, shadowing and field order.
* `tb_mode_control`: an exact model in both modes, including phase skips. It
  also checks that mean PRPG-mode phase lengths are within 10 % of 1/p(k).
* `tb_presto_top`: end to end at the default size. A cycle-accurate model of
  the whole generator checks all 64 chain inputs on every cycle, over about
  300 patterns of 64 shift cycles. The patterns cover LP off, four switching
  codes, deterministic control, and decompressor mode with random
  configurations. It checks that the control-register density matches p(k),
  and that each mechanism occurs at least once. It also reports the
  scan-input transition rate. This is about 0.50 with LP off, and 0.06 to
  0.17 with switching codes 0001, 0100, 1110 and 1111 and Hold/Toggle =
  0100/0010.
* `tb_presto_code_sweep`: a statistical sweep of the programming space at the
  default size.
  * All 15 switching codes, over 150 patterns each. For each code it measures
    the fraction of 1s in the control register and the number of active scan
    chains (at least one enabled tap).
  * Six hold/toggle pairs. For each pair it measures the fraction of shift
    cycles spent in toggle phases.

  Results for the 64 chains:

| switching code | p(k) | control 1s | active chains | S*(1-(1-p)^3) |
|---|---|---|---|---|
| 0001 | 0.500 | 0.499 | 56.2 | 56.0 |
| 0010 | 0.250 | 0.259 | 38.2 | 37.0 |
| 0100 | 0.125 | 0.135 | 22.8 | 21.1 |
| 1000 | 0.0625 | 0.0625 | 11.1 | 11.3 |
| 1110 | 0.385 | 0.395 | 49.1 | 49.1 |
| 1111 | 0.692 | 0.709 | 61.6 | 62.1 |

| hold | toggle | toggle duty cycle | (1/p(t))/(1/p(t)+1/p(h)) |
|---|---|---|---|
| 0001 | 0001 | 0.504 | 0.500 |
| 0010 | 1000 | 0.806 | 0.800 |
| 1000 | 1111 | 0.084 | 0.083 |
| 1111 | 0011 | 0.523 | 0.526 |

Together, these two tables are the inputs to the code-selection step
described above.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -y rtl rtl/presto_pkg.sv tb/tb_presto_top.sv --top-module tb_presto_top
./obj_dir/Vtb_presto_top
```
