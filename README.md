# Power-token budget manager for a single out-of-order core

A core that must stay under a power budget cannot rely on DVFS alone. DVFS
decides from the average power of a long window (here 500K cycles), so it
never sees the short power spikes inside the window, and every step it takes
slows down all instructions, useful or not. This design adds a fine-grain
layer. It estimates the core's power every cycle in **power tokens** and
uses the estimate to switch microarchitectural power-saving techniques on
and off within tens of cycles. In the main configuration, the **two-level
scheme**, DVFS uses only its three mildest V/f modes to bring the average
down toward the budget. A **basic-block level manager (BBLM)** then removes
the spikes that remain.

The RTL is the power-management logic only. The core itself is outside this
design: its fetch, branch-prediction, decode and commit signals are ports,
and so are the controls of the techniques it implements.

## Power tokens

One token is the energy of one instruction sitting in the register update
unit (RUU) for one cycle. An instruction's cost is:

    cost = base tokens of its power group (8 groups) + cycles it spent in the RUU

The cost saturates at 255 (8 bits).

* **PTHT** (`ptht`). The power-token history table has 8192 entries of 8
  bits. It is direct mapped on PC[14:2] and has no tag. Fetch reads the cost
  of each instruction's previous execution. Commit writes the new cost
  (`token_cost`).
* **Current power** (`token_accountant`). A 16-bit register holds the sum of
  the costs of all instructions in the pipeline. Each cost is added when
  fetch accepts the instruction. The same cost is subtracted when the
  instruction commits, or through `sq_tokens` when it is squashed. The core
  therefore carries each instruction's fetch-time cost (`f_tok`) down the
  pipeline and returns it as `c_tok`. The value is a per-cycle power
  estimate that needs no performance counters.

Every mechanism below compares this total, `cur_tokens`, with `budget`,
which is also in tokens. Converting a budget in watts into tokens depends on
the power model and is left to the integrator.

The eight base costs in `token_cost.BASE_TOKENS` are placeholders
(4, 6, 8, 10, 12, 16, 20, 28). The grouping of instructions into 8
power classes is part of the scheme, but the numbers have to come from a
power model of the target core. Override the parameter with them.

## Power-token throttling (PTT)

With `cfg.ptt_en` set, `ptt_gate` lets a fetch lane through only while
`cur_tokens` plus the PTHT costs of that lane and all older lanes in the
group stay within the budget. The first lane that fails, and every younger
lane, is held, and `f_stall` is raised. There are two exceptions:

* Branches always pass, so that mispredictions are still found early.
* With `cfg.ptt_cp` set (PTT-CP), instructions the core's critical-path
  predictor marks in `f_critical` also pass.

PTT tracks the budget closely but costs a lot of performance, because it
stalls fetch outright.

## Basic-block level manager (BBLM)

This is the least obvious part of the design. BBLM works one basic block
ahead: it decides which technique to apply before the block's instructions
enter the pipeline.

1. **Measuring a block** (`bb_power_acc`, at decode). A basic block is the
   run of instructions after one branch, up to and including the next
   branch. A 16-bit register adds up the PTHT costs of the decoded
   instructions. When a branch is decoded, the block it closes is finished.
   Its energy, saturated to 9 bits, is written into the predictor entry of
   the **branch that opened the block**, not the one just decoded. That
   earlier branch is the one whose prediction leads into the block next
   time. The unit remembers that branch's predictor index. For this to
   work, the core must carry each branch's `bp_idx` from prediction to
   decode (`d_bp_idx`).
2. **Storing it** (`gshare_bblm`). The branch predictor is a 16-bit gshare
   with 2^16 entries. Each entry holds a 2-bit counter plus the 9-bit
   energy of the block that follows its branch. A prediction therefore
   returns the direction and also `bp_energy`, the expected energy of the
   block about to be fetched.
3. **Choosing a technique** (`bblm_selector`). With each prediction, the
   expected power after the block is `est = cur_tokens + bp_energy`. The
   excess over the budget, as a fraction of the budget, selects:

   | est vs. budget                  | technique                          | output     |
   |---------------------------------|------------------------------------|------------|
   | within budget                   | none                               |            |
   | excess < 15 % (X)               | critical-path reordering           | `tech_cp`  |
   | 15 % ≤ excess ≤ 65 % (Y)        | confidence (JRS) throttling        | `tech_jrs` |
   | excess > 65 %                   | decode-commit ratio throttling     | `tech_dcr` |

   The comparisons are done without a divider: `est*100` is compared with
   `budget*115` and `budget*165`.
4. **Applying and releasing**. The chosen technique becomes active only
   while the processor is over the budget. While over, the active level is
   raised whenever the latest choice is more aggressive, and is otherwise
   kept. Once power is under the budget, the techniques are switched off in
   reverse order, one level per cycle: DCR, then JRS, then CP. A block
   whose estimate is within the budget raises nothing, even if power is
   momentarily over.

The three techniques themselves (the critical-path predictor and
reordering, the JRS confidence estimator, and decode-commit ratio
throttling) are mechanisms of the core. This design drives only their
enables.

## Preventive switch-off and switch-on

`preventive_switch` looks at the trend of the power. It keeps the previous
cycle's `cur_tokens` and predicts the next cycle's power as
`cur + (cur - prev)`. BBLM acts on the resulting `over_budget`:

* **Switch-off** (`cfg.psoff_en`). If power is under the budget and rising,
  and the prediction crosses the budget, `over_budget` is raised one cycle
  early. The power-saving techniques then start before the crossing.
* **Switch-on** (`cfg.pson_en`). If power is over the budget and falling,
  and the prediction is back under it, `over_budget` is dropped early. The
  techniques' own hysteresis then carries the power below the budget.

`psoff_fire` and `pson_fire` pulse whenever a prediction changed the
result. Both predictions can be wrong: a rise that turns back, or a fall
that stops. They help at moderate budgets and may hurt at very tight ones.

## DVFS and the two-level scheme

`dvfs_controller` sums `cur_tokens` over a 500,000-cycle window. At the end
of each window it predicts the average power in every allowed mode. For a
mode k, measured from the current mode m, the prediction is
`avg * F_k / F_m`, with `F = VDD² · f`. The controller picks the fastest
mode whose prediction is within the budget. If none is, it picks the
slowest allowed mode. The test is done without division:
`sum * F_k <= budget * WINDOW * F_m`.

A mode change takes 4 cycles. During those cycles execution continues in the
old mode and `dvfs_busy` is high. The cycle count comes from a 50 mV/ns
regulator making a 60 mV step in 1.2 ns, which is 3.6 cycles at 3 GHz,
rounded up to 4.

| mode | VDD % | f %  | used by                |
|------|-------|------|------------------------|
| 0    | 100   | 100  | two-level, DVFS alone  |
| 1    | 95    | 95   | two-level, DVFS alone  |
| 2    | 90    | 90   | two-level, DVFS alone  |
| 3    | 90    | 75   | DVFS alone             |
| 4    | 90    | 65   | DVFS alone             |

`cfg.dvfs_max` limits the set: 2 for the two-level scheme, 4 for DVFS
alone. The requested operating point is output as `dvfs_vdd_pct` and
`dvfs_f_pct` for an external regulator and clock generator. The token
estimate is not rescaled by the mode.

## Configurations

`cfg` (`pt_pkg::cfg_t`) selects the mechanisms at run time:

| configuration                    | ptt_en | ptt_cp | bblm_en | psoff/pson | dvfs_en | dvfs_max |
|----------------------------------|--------|--------|---------|------------|---------|----------|
| two-level (main)                 | 0      | 0      | 1       | 1 / 1      | 1       | 2        |
| BBLM only                        | 0      | 0      | 1       | 0 or 1     | 0       | –        |
| PTT / PTT-CP                     | 1      | 0 / 1  | 0       | 0          | 0       | –        |
| BBLM + PTT                       | 1      | 0 or 1 | 1       | 0 or 1     | 0       | –        |
| DVFS alone                       | 0      | 0      | 0       | 0          | 1       | 4        |

## Interface to the core (`power_token_manager`)

The fetch, decode and commit groups are `W` (4) lanes wide, in program
order.

| group   | inputs                                                  | outputs                                        | timing |
|---------|---------------------------------------------------------|------------------------------------------------|--------|
| fetch   | `f_valid`, `f_pc`, `f_is_branch`, `f_critical`          | `f_tok` (carry it), `f_allow`, `f_stall`       | combinational |
| predict | `bp_valid`, `bp_pc` (one branch per cycle)              | `bp_taken`, `bp_idx` (carry it), `bp_energy`   | combinational |
| resolve | `bu_valid`, `bu_idx`, `bu_taken`                        | –                                              | next edge |
| decode  | `d_valid`, `d_tok`, `d_is_branch`, `d_bp_idx`           | –                                              | next edge |
| commit  | `c_valid`, `c_pc`, `c_group`, `c_ruu_cyc`, `c_tok`      | –                                              | next edge |
| squash  | `sq_tokens` (sum of carried costs of squashed instrs)   | –                                              | next edge |
| status  | `cfg`, `budget`                                         | `cur_tokens`, `over_budget`, `tech`, `tech_cp/jrs/dcr`, `psoff_fire`, `pson_fire`, `dvfs_mode`, `dvfs_vdd_pct`, `dvfs_f_pct`, `dvfs_busy`, `dvfs_window_done`, `dvfs_window_sum` | registered, except `over_budget` |

The PTHT is read combinationally because the three-stage fetch unit leaves
time for the lookup. `cur_tokens` includes every instruction accepted or
released up to the previous edge. The gshare history is updated at
resolve, so it is not speculative. Reset (`rst_n`, asynchronous,
active-low) clears both tables, all counters (set to weakly not-taken) and
the current power. Use a synchronous-reset or init-sweep variant if the
tables are to become SRAM macros.

Parameters of the top, with their defaults: `W` = 4, `PC_W` = 32,
`PTHT_ENTRIES` = 8192, `BP_HIST` = 16, `X_PCT` = 15, `Y_PCT` = 65,
`DVFS_WINDOW` = 500000, `DVFS_TRANS` = 4. Shared widths are in `pt_pkg`:
16-bit accounting, 8-bit PTHT entries, 9-bit block energy and 8 power
groups.

## Where this RTL makes its own choices

The mechanisms, sizes, thresholds and mode table follow the original
scheme. The points below were left open there and were decided here.
Change them first if your results differ.

* The base token costs of the 8 groups are placeholders (see above).
* BBLM's estimate `cur + block energy` and its excess measured relative to
  the budget.
* Techniques act only while power is over the budget. The release is one
  level per cycle.
* The block energy is written when the closing branch is decoded. The
  counter update at resolve does not touch it.
* DVFS selection is "fastest mode predicted within the budget", using
  `VDD² · f` scaling. Every transition takes 4 cycles, however large the
  voltage step.
* PTT cuts fetch off at the first refused lane. Squashed instructions
  release their tokens, but the PTHT is not updated for them.
* Table indexing uses PC bits above a 4-byte instruction, with no tags.
  Saturating arithmetic is used throughout.
* The PTHT and the predictor are flip-flop arrays with a full reset. This
  makes synthesis of the full-size tables slow. It is a modelling
  convenience, not a proposal for silicon.

## Verification

Each module has a self-checking testbench in `tb/` that compares it against
an independent model and prints `TB_RESULT checks=N failures=M`:

| testbench                 | what it checks |
|---------------------------|----------------|
| `tb_ptht`                 | reset contents, write priority, random reads vs. a reference table |
| `tb_token_cost`           | base + RUU cycles with saturation, all groups |
| `tb_token_accountant`     | running total vs. a model, saturation at both ends |
| `tb_ptt_gate`             | in-order acceptance, branch and critical bypass |
| `tb_bb_power_acc`         | write index and energy per closed block, multi-branch groups, 9-bit saturation |
| `tb_gshare_bblm`          | direction, index, history and energy field vs. a reference gshare |
| `tb_bblm_selector`        | threshold boundaries (1000/1001/1149/1150/1650/1651 for budget 1000), raise and progressive release |
| `tb_preventive_switch`    | rising and falling trend cases, random traces |
| `tb_dvfs_controller`      | window cadence and sum, mode choice, 4-cycle transition, mode limit |
| `tb_power_token_manager`  | whole design at default sizes (below) |
| `tb_budget_sweep`         | budgets of 95 % down to 40 % of the measured peak, unmanaged vs. PTT vs. BBLM: cycles and token area over the budget |

`tb_power_token_manager` runs the top with every parameter at its default.
A behavioural four-wide core drives it: up to 128 instructions in flight,
in-order commit, and one committed branch in six squashing. The run lasts
about 2.1 million cycles and steps through PTT, PTT-CP, BBLM with the
preventive switches, the two-level scheme and DVFS alone. Every cycle it
checks `f_tok`, `cur_tokens`, `f_allow`, `bp_energy` and the technique
outputs against its own model. It also counts how often each mechanism
acted, and fails if any never did: stalls, both bypasses, each technique,
releases, both preventive switches, squashes, learnt block energies, DVFS
windows, transitions and deep modes. It takes a few seconds with Verilator.

`tb_budget_sweep` uses the same kind of core model. Here the model also
reacts to the technique enables: it fetches two lanes under JRS
throttling and one lane under DCR throttling. The 100 % reference is the
peak token count of an unmanaged run. With the synthetic workload, PTT
leaves 2 to 6 % of the unmanaged area over the budget at every budget.
BBLM leaves 45 to 100 %: it does nothing at 95 % and 90 %, and its
reductions grow as the budget tightens. These numbers describe the
model workload only, not a real core.

To run one testbench:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        --top-module tb_power_token_manager -Irtl -y rtl \
        rtl/pt_pkg.sv tb/tb_power_token_manager.sv -o sim
    ./obj_dir/sim

Replace the top module and the testbench file name to run the others.

## Not included

* The out-of-order core: RUU, issue window, LSQ, functional units, caches
  and TLB.
* The critical-path predictor, the three power-saving techniques and the
  JRS confidence estimator.
* The voltage regulator and the clock generator.
