# MFIBVP real-time multiplier

A real-time system often has to act before a computation would normally
finish. This multiplier is built for that situation. It produces the
product of two unsigned numbers most-significant part first. After each step
it gives a **lower and an upper bound** that are guaranteed to enclose the
exact product, and the caller may stop it at any step. The name stands for the
three ideas it combines:

* **MSB-First**: the result is resolved from the top digit down, so the early
  intermediate results are already close to the final value.
* **Interval-Bounded**: every intermediate result is an interval
  `[lower, upper]` that contains the true product. Its width `err` is the
  unit's own estimate of how far it may still be off.
* **Variable-Precision**: the run ends when all digits are done, when a phase
  budget (the time available) is used up, when `err` drops to a requested
  limit (the accuracy needed), or when an abort (a deadline) arrives.

With the default 64 x 64-bit operands and 4-bit digits, the interval is 12.5%
of the largest possible product after the first phase. After the second phase
it is 0.78%, so the accuracy `1 - err/(2^64-1)^2` is above 99% from phase 2
on. It gains about four more bits in every later phase.

## Datapath

```
 a,b ──► [operand regs] ──► pp_gen ──► wallace_tree ──► mfibvp_adder ──► lower, upper, err, phase
                               (64 rows)      (sum, carry)    (MSB-first, K bits/phase)
                                                                   ▲ load / step
 start, max_phases, err_limit, abort_req ──► vp_controller ───────┘──► busy, done, stop_reason
```

1. **Partial products** (`pp_gen`). This is a plain AND array, as in an
   unsigned array multiplier. Row `i` is `(a & {N{b[i]}}) << i`, 2N bits wide.
2. **Reduction** (`wallace_tree`). The rows are taken three at a time into
   row-wide 3:2 carry-save adders: `s = x^y^z` and `c = maj(x,y,z) << 1`. Rows
   left over pass to the next layer unchanged. Layers repeat until two rows
   remain, a sum vector `S` and a carry vector `C` with `S + C = a*b`. For 64
   rows this takes 10 layers (64→43→29→20→14→10→7→5→4→3→2). Every row is
   non-negative and the rows always add up to the product, which is below
   2^(2N). So no row ever needs a bit above bit 2N-1, and truncating to 2N bits
   loses nothing.
3. **Final MSB-first interval addition** (`mfibvp_adder`). `S + C` is formed
   one K-bit digit per phase, starting at the top digit. This is the part that
   makes the unit "real-time", and it is described next.

## How the bounds are formed

After phase `p` the adder has seen the top `p` digits of `S` and `C`. That
leaves `r = 2N - K*p` low bits unseen. It keeps two running sums:

```
lo_acc = top_p(S)  + top_p(C)          (unseen bits taken as 0)
cm_acc = top_p(~S) + top_p(~C)         (same, on the complemented operands)

lower  = lo_acc
upper  = 2*(2^(2N) - 1) - cm_acc       (= lower + 2*(2^r - 1): unseen bits taken as 1)
err    = upper - lower = 2*(2^r - 1)
```

The upper bound comes from running the lower-bound sum on the complemented
operands in parallel and subtracting it from the largest possible sum. No
separate rounding logic is needed. Each phase adds only the current digit:
a one-hot digit mask register walks down from the top K bits, and the masked
digits of `S`, `C`, `~S` and `~C` are added into the two accumulators. There
is no barrel shifter.

Things to keep in mind when you use the bounds:

* `err` does not depend on the operands. It is a fixed function of the phase
  count, so the accuracy reached after a given number of phases is
  deterministic. This is what lets a scheduler trade time for accuracy.
* Phase 0, just after the load, gives `lower = 0` and `upper = 2*(2^(2N)-1)`.
* `upper` is not clamped to the largest possible product `(2^N-1)^2`. Early
  on it can exceed 2^(2N) - 1, so `upper` and `err` are 2N+1 bits wide.
  `lower` never exceeds the product and is 2N bits wide.
* After the last phase (`2N/K`), `lower == upper == a*b`.

Accuracy `1 - err/(2^64-1)^2` at the defaults. These are exact values, and
they were also measured over 50 random operand pairs:

| phase | 0     | 1     | 2      | 3      | 4       | 32   |
|-------|-------|-------|--------|--------|---------|------|
| acc.  | -100% | 87.5% | 99.22% | 99.95% | 99.997% | 100% |

## Stopping early: `vp_controller`

A multiplication has an **obligatory part**, which always runs: the operand
capture, then one cycle for the partial products and reduction, ending with
the adder load. It then has an **optional part**: the adder phases. Before
each phase the controller checks these conditions in order:

| priority | condition                                  | `stop_reason`   |
|----------|--------------------------------------------|-----------------|
| 1        | all `2N/K` phases done                     | `STOP_COMPLETE` |
| 2        | `abort_req` high                           | `STOP_ABORT`    |
| 3        | `max_phases != 0` and `phase >= max_phases`| `STOP_BUDGET`   |
| 4        | `err <= err_limit`                         | `STOP_ACCURACY` |

If none holds, it issues a step. `max_phases = 0` means no budget, and
`err_limit = 0` means run to the exact product. Both are sampled with
`start`. Because `err` depends only on the phase, an error limit is in effect
a phase count. For example, `err_limit = 2^100` stops after phase 8.

## Interface and timing (`mfibvp_multiplier`)

| port          | dir | width            | meaning |
|---------------|-----|------------------|---------|
| `clk`, `rst_n`| in  | 1                | clock; synchronous active-low reset |
| `start`       | in  | 1                | start; `a`, `b`, `max_phases`, `err_limit` sampled |
| `a`, `b`      | in  | N                | unsigned operands |
| `max_phases`  | in  | clog2(2N/K+1)    | phase budget, 0 = none |
| `err_limit`   | in  | 2N+1             | stop once `err <= err_limit` |
| `abort_req`   | in  | 1                | stop before the next phase |
| `busy`        | out | 1                | computing |
| `done`        | out | 1                | finished; held until the next `start` |
| `stop_reason` | out | `stop_reason_e`  | why it finished |
| `phase`       | out | clog2(2N/K+1)    | digits resolved so far |
| `lower`       | out | 2N               | lower bound of `a*b` |
| `upper`, `err`| out | 2N+1             | upper bound, `upper - lower` |

Say `start` is high in cycle `t`. Then:

* Cycle `t+1`: partial products and reduction; the adder is loaded at the end
  of the cycle.
* From cycle `t+2+p`: the bounds of phase `p` are on the outputs, with
  `phase = p`.
* Cycle `t+3+P`: `done` rises, where `P` is the number of phases run.

A full product at the defaults takes 35 cycles from `start` to `done`.
`lower`, `upper`, `err` and `phase` are register outputs. Other logic can read
them at any time while `busy` is high: they are the intermediate results. A
`start` while busy is ignored. The reduction tree is combinational between the
operand registers and the adder. For 64 bits it is ten full-adder layers deep,
plus the AND gate, in a single cycle.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 64      | operand width |
| `K`       | 4       | digit width, i.e. product bits resolved per phase; `2N` must be a multiple of `K` |

## Design choices and departures

* **Meaning of K.** The 64-bit, K=4 configuration is taken as 4-bit digits and
  32 phases. Reading K as the number of phases would make the first phase
  already better than 99.99%. That contradicts the behaviour this unit is
  meant to have: about 87% after the first phase and better than 99% from the
  second.
* **The final adder's insides** are this design's own. It is the simplest
  MSB-first, digit-serial adder that has the interval behaviour described
  above: two accumulators and a digit mask. The complement-and-subtract upper
  bound is the method the MFIBVP approach prescribes.
* **Wallace tree.** It groups whole rows by threes. It is not a bit-level
  Dadda or Wallace column compressor, and it is not pipelined.
* **Timing.** Phases are clock cycles here, one per phase. The original work
  states its phase timing in transistor delays, not clock cycles.
* **Chosen here:** the handshake, the reset, the stop priority and the
  encoding of `stop_reason`.
* **Not included:** the conventional array multipliers (carry-propagate and
  carry-lookahead final adders). They are only reference points for
  comparison.

## Files

| file | contents |
|------|----------|
| `rtl/mfibvp_pkg.sv`        | `stop_reason_e`, sizing functions |
| `rtl/pp_gen.sv`            | AND-array partial products |
| `rtl/wallace_tree.sv`      | carry-save reduction to sum + carry |
| `rtl/mfibvp_adder.sv`      | MSB-first interval adder |
| `rtl/vp_controller.sv`     | variable-precision sequencer |
| `rtl/mfibvp_multiplier.sv` | top level |
| `tb/tb_*.sv`               | one self-checking testbench per module |

The adder, the controller and the top contain SVA assertions: the bounds
never cross, no step follows the last phase, at most one control action per
cycle, and `lower` fits in 2N bits.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog counts a failure if a testbench hangs. The package must come first
on the command line:

```
verilator --binary --timing --assert -Irtl \
    rtl/mfibvp_pkg.sv rtl/pp_gen.sv rtl/wallace_tree.sv rtl/mfibvp_adder.sv \
    rtl/vp_controller.sv rtl/mfibvp_multiplier.sv tb/tb_mfibvp_multiplier.sv \
    --top-module tb_mfibvp_multiplier -Mdir obj && obj/Vtb_mfibvp_multiplier
```

For a module's own testbench, replace the top and the testbench file
(`tb_pp_gen`, `tb_wallace_tree`, `tb_mfibvp_adder` or `tb_vp_controller`).

What the testbenches verify:

* **`tb_mfibvp_multiplier`** runs the full 64-bit configuration with default
  parameters:
  * 50 random pairs and the corner cases;
  * the bounds checked against the exact product in every phase;
  * the cycle of every phase and of `done`;
  * better than 99% accuracy from phase 2 on;
  * the exact result at the end;
  * every way a run can end (complete, budget, accuracy, abort), and a start
    while busy.

  It prints the mean accuracy per phase.
* **`tb_mfibvp_adder`** checks the bounds formula phase by phase for 128-bit
  operands.
* **`tb_wallace_tree`** checks `sum + carry` against the product for 64 rows,
  and for 5 rows, where rows are left over at every layer.
* **`tb_pp_gen`** checks every row.
* **`tb_vp_controller`** checks each stop reason, the step count and the
  latency against a model of the adder.

All testbenches pass with Verilator 5. Each one also fails when its module
is replaced by a copy with a deliberate bug. The RTL lints cleanly under
`verilator --lint-only -Wall` and elaborates in Yosys through its slang
front end.
