# Triple-modular-redundant hybrid digital PWM generator

A digital PWM generator that keeps producing the right waveform when one of
its parts goes wrong. Three identical copies of a 10-bit hybrid DPWM run in
lock step from the same duty word; a 2-out-of-3 majority voter produces the
output, so a fault in any single copy is voted out, and an `error` flag shows
the cycles in which the copies disagree. A fault injector on the duty inputs
lets one copy be given a wrong duty word, to demonstrate the masking.

```
             duty ──┐
  inj_en/sel/duty ──┤ fault_injector ──► duty_rep[0] ─► hdpwm ─► pwm_rep[0] ─┐
                    │                ──► duty_rep[1] ─► hdpwm ─► pwm_rep[1] ─┼─► majority_voter ─► pwm_out, error
                    │                ──► duty_rep[2] ─► hdpwm ─► pwm_rep[2] ─┘
```

## The hybrid DPWM (`hdpwm`)

A pure counter DPWM needs a clock 2^N times the PWM frequency; a pure delay-line
DPWM needs 2^N delay taps and a 2^N:1 multiplexer. The hybrid splits the
10-bit duty word D between the two: the 5 MSBs go to a counter section, the
5 LSBs to a ring-counter ("delay line") section.

* **Ring-counter section (`ddpwm`).** A one-hot ring of 32 stages moves its
  single 1 by one stage per clock, so stage k is a tap delayed by k clocks
  from the start of a revolution. A 32:1 multiplexer selected by D[4:0] picks
  one tap; that is `RESET2`. The last stage, re-timed by a D flip-flop, is
  `SET2`, high in the first cycle of each revolution. The last stage also
  steps the counter.
* **Counter section (`cdpwm`).** A 5-bit up counter (leading-edge carrier)
  steps once per ring revolution. A zero comparator gives `SET1`; a
  comparator against D[9:5] gives `RESET1`.
* **Combination.** `SET = SET1 & SET2` fires once per 1024 clocks (counter 0,
  ring at stage 0). `RESET = RESET1 & RESET2` fires when counter = D[9:5] and
  ring stage = D[4:0], i.e. exactly D clocks after `SET`. An SR flip-flop
  (`sr_ff`) is set by `SET` and cleared by `RESET`; RESET wins when both are
  high.

### Timing

Number the clocks of a period 0..1023, with `SET` seen in clock 0 (the first
clock after reset release is clock 0). `RESET` is seen in clock D, and the
registered output is high in clocks 1..D. So:

* period = 2^RES_BITS = 1024 clocks;
* high time = D clocks exactly; D = 0 is a constant low, D = 1023 is high
  for 1023 of 1024 clocks (100 % is not reachable);
* the duty word is compared directly, not latched. Change it in clock 0 of a
  period (or while the output is already low). Changing it mid-pulse to a
  value the ring/counter has already passed skips that period's `RESET`, and
  the output stays high into the next period.

## Redundancy (`majority_voter`, `fault_injector`, `tmr_hdpwm`)

All three copies share clock and reset, so in the fault-free case their
outputs are equal in every cycle. The voter is combinational:

* `voted = a&b | b&c | a&c` — correct as long as at most one copy is wrong;
* `error` is high when the three outputs are not all equal. Two wrong copies that agree
  cannot be detected from the outputs alone; `error` then still shows the
  cycles where the remaining copy differs, but `pwm_out` follows the wrong
  pair.

The fault injector passes the common `duty` to all copies unless `inj_en` is
high, in which case copy `inj_sel` (0..2) receives `inj_duty` instead.
`inj_sel = 3` selects no copy. Only one copy can be faulted at a time through
this port.

## Top-level ports (`tmr_hdpwm`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; one PWM tap per clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `duty` | in | 10 | duty word D for all copies |
| `inj_en` | in | 1 | enable fault injection |
| `inj_sel` | in | 2 | copy to fault (3 = none) |
| `inj_duty` | in | 10 | duty word given to the faulted copy |
| `pwm_out` | out | 1 | voted PWM output |
| `error` | out | 1 | copies disagree in this clock |
| `pwm_rep` | out | 3 | the three copy outputs |

Parameters: `RES_BITS` (10) and `CNT_BITS` (5); the ring section gets
`RES_BITS - CNT_BITS` bits. Defaults live in `rtl/hdpwm_pkg.sv`.

Cost at the defaults: 39 flip-flops per copy (5 counter, 32 ring, 1 SET2,
1 SR), 117 in all, plus three 5-bit incrementers, comparators and 32:1
multiplexers.

## Files

| file | content |
|---|---|
| `rtl/hdpwm_pkg.sv` | resolution, split and replica count |
| `rtl/sr_ff.sv` | SR flip-flop, reset dominant |
| `rtl/cdpwm.sv` | up counter with zero and duty comparators |
| `rtl/ddpwm.sv` | ring counter, tap multiplexer, SET2 flip-flop |
| `rtl/hdpwm.sv` | one hybrid DPWM |
| `rtl/fault_injector.sv` | duty-input fault injection |
| `rtl/majority_voter.sv` | 2-of-3 voter with error flag |
| `rtl/tmr_hdpwm.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/hdpwm_pkg.sv tb/tb_tmr_hdpwm.sv --top-module tb_tmr_hdpwm -o sim
./obj_dir/sim
```

`tb_tmr_hdpwm` runs the top at its default parameters for 20 PWM periods
(about 20 000 clocks, under a second). It first replays three fault cases:

| period | common duty | faulted copy | injected duty |
|---|---|---|---|
| 1 | 0110000100 (388) | 2 | 0001111001 (121) |
| 2 | 0001111001 (121) | 1 | 1010101010 (682) |
| 3 | 1010101010 (682) | 0 | 0110000100 (388) |

Then come zero and full duty, an out-of-range select, an injected word equal
to the duty, and random periods. Every clock it checks each copy's output,
`pwm_out` and `error` against a reference model, and the high time of each
period. It also counts a failure if a masked fault on each copy, the error
flag, zero duty or full duty never occurred. `tb_hdpwm` checks one generator
through 24 periods with corner and random duty words. The unit benches cover
the counter, ring and SR sections, the voter (exhaustively) and the injector.

## Design choices not fixed by the source description

* Single clock domain: the ring counter's taps are clock cycles. There is no
  faster tap clock and no real delay line. Each step of the 5-bit counter
  therefore takes 32 clocks, and the period is 1024 clocks. That is the same
  clock rate a plain 10-bit counter DPWM would need. The hybrid structure is
  kept as described, but in this form it does not lower the clock frequency.
  To get that gain, the ring would have to become a delay line or a
  multi-phase clock. That part depends on the target technology and is not
  provided here.
* MSBs to the counter, LSBs to the ring.
* SR flip-flop with reset priority; asynchronous active-low reset
  everywhere. After reset, the ring starts at stage 0 and the counter at 0.
* Error flag = any disagreement between copies.
* The fault-injection interface (enable, select, value).
* The stand-alone 10-bit counter DPWM and 10-bit delay-line DPWM are the
  alternatives the hybrid replaces. They are not provided as separate tops.
  They can be had by instantiating `cdpwm` (with `advance` tied high) or
  `ddpwm` at 10 bits with an `sr_ff`.
* An implementation on a mid-size FPGA (Artix-7 class) reported about
  36 flip-flops and 44 LUTs for this function. This RTL uses 117 flip-flops,
  mostly the three 32-stage rings. A synthesis tool may map the rings to
  shift-register LUTs.
