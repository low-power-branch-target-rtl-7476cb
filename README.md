# Low-power branch target buffer front end

A branch target buffer (BTB) tells the instruction fetcher, in the first pipeline stage, whether
the instruction being fetched is a taken branch and where it goes. A conventional fetcher looks up
the BTB on every fetch. Every look-up compares the fetch address against all tags of a
content-addressable memory, and that comparison is where most of the BTB's power goes. Yet only about
6–19 % of executed instructions are branches, so most look-ups find nothing.

This design skips the look-ups that are predicted to be useless. After each BTB hit it predicts
how many **non-branch instructions** follow the branch before the next branch comes: the NBIC,
short for *non-branch instruction count*. It then fetches that many instructions without touching
the BTB. No processor changes are needed beyond the fetcher: no ISA change, no compiler support,
no pre-decode table looked up on every cycle. The only logic active on every fetch is one small
down-counter.

The SystemVerilog is synthesizable (IEEE 1800-2017). It is checked with Verilator 5 lint and the
slang front end of Yosys.

## The repose counter

The fetcher holds a *repose counter* (`repose_counter`):

* **Counter is zero.** The fetch looks up the BTB.
  * On a hit, the counter is loaded with the predicted NBIC.
  * On a miss, it stays at zero, so the next fetch looks up the BTB again. It keeps doing so until a look-up hits.
* **Counter is not zero.** The fetch does not look up the BTB (the BTB is *reposed*), and the counter
  counts down by one.

Example: a branch hits and the predicted NBIC is 4. The next four fetches do no look-up. The fifth
fetch looks up the BTB again, and if the prediction was right it hits the next branch.

The prediction can be wrong in two ways:

* **Too short.** Some non-branch instructions are looked up. This wastes power but not time.
* **Too long.** The next branch is fetched without a look-up.
  * If that branch is taken, it is only discovered in execute. The instructions fetched after it
    are squashed: two cycles in the pipeline assumed here.
  * The look-ups then resume on instructions that may well be non-branches.

A long NBIC therefore costs performance, and that extra time can cost more energy than the skipped
look-ups save. Everything else in the design exists to predict the NBIC accurately.

## Where the NBIC comes from

Three predictors are built in. The 2-bit mode register (`cfg_mode_we`/`cfg_mode`, output `mode`)
picks one at run time:

| mode | value | predictor | module |
|---|---|---|---|
| `NBIC_FIXED` | 0 | One constant NBIC for every branch. It resets to 3 and can be rewritten with `cfg_nbic_we`/`cfg_nbic`, for example with a value found by profiling. | `fixed_nbic` |
| `NBIC_LAST` | 1 | The NBIC between the two most recent branches, held in the LD register. | `nbic_counter` on the decode stream |
| `NBIC_FIELDS` | 2 (reset) | Each branch's own NBIC, stored in its BTB entry. There are two values: `NBIC_T` for when the branch is taken and `NBIC_NT` for when it is not. On a hit the predicted direction picks one of them. | `btb` fields, filled by `nbic_gather` |

`NBIC_FIELDS` is the main configuration. It is the only one that predicts well enough to save
energy overall. The fixed predictor cannot follow the program. The last-distance predictor works
for a loop with a single branch, but is poor when branches with different distances alternate.
Per-branch fields that are split by direction capture the common loop pattern exactly. In a loop
whose body has N non-branches, `NBIC_T` of the loop branch becomes N. From then on the
loop branch is looked up on every iteration and none of the body instructions are.

### Counting on the decode stream (`NBIC_LAST`)

The distance counter counts non-branch instructions and copies its count into LD at every
branch. A branch is only recognised once it is decoded, so the counter sits on the decode stream
(`id_valid`, `id_is_branch`). The count ends one stage after fetch. At the moment branch *k* is
looked up in fetch, LD still holds the distance that ended at branch *k-1*, not the one
that ends at branch *k*. The prediction therefore lags one branch behind the ideal "last distance". The scheme
still works with this lag, and the design keeps it rather than adding a bypass.

### Gathering `NBIC_T` / `NBIC_NT` (`nbic_gather`)

This is the least obvious part of the design. The NBIC that follows a branch is only known when
the *next* branch arrives, and by then the first branch may have been evicted from the BTB.
`nbic_gather` watches the stream of executed, non-squashed instructions (`ex_*`):

1. Its own `nbic_counter` counts non-branches since the last executed branch.
2. When a branch executes, the count is the NBIC that followed the *previous* branch. The count
   goes into that previous branch's entry: into `NBIC_T` if that branch was taken, otherwise into
   `NBIC_NT`.
3. The current branch then becomes the previous one. Its BTB entry index is remembered. The
   BTB's update port returns this index in the same cycle it trains or allocates the entry
   (`up_idx`).

The later write goes straight to the remembered index, so it needs no second CAM search. The
write carries the previous branch's address. The BTB performs it only if the entry still holds
that branch and is not being re-allocated in the same cycle. So a branch that was evicted in the
meantime cannot overwrite another branch's fields.

Counting on the execute stream rather than in decode is this design's choice. It is the first
place where the previous branch's direction is known, and it sees only correct-path instructions.
New entries start with both fields at 0, so their first hit reposes nothing. A loop therefore
needs two iterations after allocation before its body is reposed:

* The first iteration allocates the branch.
* The second writes `NBIC_T`.
* The third is the first one fetched with look-ups suppressed.

## The branch target buffer (`btb`)

`btb` is a fully associative CAM with `ENTRIES` entries (default 64). Each entry holds:

* a valid bit;
* the branch address without its two low bits (tag);
* the target;
* a 2-bit saturating direction counter;
* the two `NBIC_W`-bit fields (default 8 bits).

It has three ports:

* **Look-up** (combinational, gated by `lk_en`). With `lk_en` low no tag is compared and all
  outputs are zero. This is the saving the whole design is after. On a hit, `lk_taken` is the
  counter's upper bit.
* **Update** (one clock, from execute). A branch already in the BTB trains its counter, and
  takes a new target when taken. An unknown branch is allocated in round-robin order:
  * its counter starts weakly taken or weakly not-taken, after its first outcome;
  * its NBIC fields start at `INIT_NBIC` (0).

  Every executed branch is inserted, taken or not, because `NBIC_NT` needs not-taken branches
  to be present.
* **Field write** (one clock), described in the previous section. It can target the same
  entry as an update in the same cycle. This is normal in a one-branch loop. The two ports
  write disjoint fields.

## Top level and pipeline interface (`lp_btb_top`)

`lp_btb_top` wires together the fetcher PC (`fetch_unit`), the repose counter, the BTB, the
gatherer and the three predictors. It assumes a pipeline that resolves branches two stages after
fetch. All pipeline inputs are sampled on the rising edge; all `if_*` outputs are combinational in
the cycle of the fetch.

| group | signals | meaning |
|---|---|---|
| fetch | `if_stall` in; `if_pc`, `if_lookup`, `if_hit`, `if_pred_taken`, `if_pred_next`, `if_repose` out | See the notes below this table. |
| decode | `id_valid`, `id_is_branch` | One decoded, non-squashed instruction per cycle. This stream feeds the last-NBIC counter. |
| execute | `ex_valid`, `ex_is_branch`, `ex_pc`, `ex_taken`, `ex_target` | One executed, non-squashed instruction per cycle. Branches train the BTB and the NBIC fields. |
| redirect | `ex_redirect`, `ex_redirect_pc` | The pipeline raises these when the actual next pc differs from the `if_pred_next` it carried. |
| config | `cfg_mode_we`, `cfg_mode`, `cfg_nbic_we`, `cfg_nbic`; `mode` out | Predictor select and fixed NBIC. They take effect on the next cycle. A `cfg_mode` of 3 selects `NBIC_FIELDS`. |

Notes on the fetch signals:

* `if_pc` is the address fetched this cycle, unless `if_stall` is high.
* `if_lookup` says whether the BTB was searched for this fetch.
* The pipeline must carry `if_pred_next` with the instruction, to compare it with the actual
  next pc in execute.
* `if_repose` is the repose counter.

On a redirect:

* The pc restarts at `ex_redirect_pc`.
* The fetch of that cycle is squashed and does no look-up.
* The repose counter is cleared, so the new path starts with look-ups.

A stalled fetch neither looks up the BTB nor counts down. A taken branch that slipped through while
the BTB was reposed shows up here as an ordinary misprediction. The pipeline needs nothing else.

The run-time mode register is this implementation's addition. The three predictors were
originally proposed as separate designs. Keeping all three costs one 8-bit register and one 8-bit
counter with its LD register. It also lets a single build compare them. For a single-predictor
build, tie `cfg_mode_we` low. Synthesis then still keeps the unused predictor's registers, and
they can be removed by hand.

Parameters of the top: `ENTRIES` (64), `PC_W` (32), `NBIC_W` (8), `FIXED_NBIC` (3),
`RESET_PC` (0). Instructions are 4-byte words. Counters saturate at 2^`NBIC_W`−1.

## Where this RTL follows the original scheme and where it chooses

Taken from the scheme as published:

* the repose counter and its rules;
* "keep looking up until a hit";
* the three NBIC predictors;
* the LD register on the decode stream and its one-branch lag;
* `NBIC_T`/`NBIC_NT` chosen by predicted direction and filled from the previous branch's outcome;
* fields initialised to zero;
* 8-bit NBIC;
* the fixed NBIC of about 3.

A fixed NBIC of 16 also appears in the published comparison. The fixed register can be set to 16.

Chosen here, because the scheme leaves these open:

* a BTB size of 64;
* full associativity with round-robin replacement;
* the 2-bit direction counter and its initial state;
* insertion of all executed branches;
* the execute-stage placement of the gathering counter and index-addressed field writes;
* saturation of the counters;
* clearing the repose counter on a redirect;
* the stall/redirect interface;
* the reset pc;
* the run-time mode register.

Not built:

* the processor around the front end: decoder, execute stage, caches;
* the energy model used to judge the scheme.

The energy model is arithmetic over event counts: energy ≈ P_R·cycles + (P_L − P_R)·look-ups. Here
P_R is the processor's power with the BTB idle, and P_L its power during a look-up. `if_lookup` and
the redirect count give exactly the events that the formula needs.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_btb`: 4 entries. Random look-ups, updates and field writes are checked against an array
  model, covering replacement, counter training, field writes to evicted entries and gated
  look-ups.
* `tb_repose_counter`, `tb_nbic_counter`, `tb_fixed_nbic`, `tb_fetch_unit`, `tb_nbic_gather`:
  random stimulus against reference models. There are directed cases for a 4-instruction repose,
  counter saturation at 255 and the reset value 3.
* `tb_lp_btb_top`: the whole front end **at its default parameters**. The testbench models a
  3-stage pipeline running a synthetic program:
  * nested loops (a 6-instruction inner body);
  * an alternating branch;
  * 80 never-taken branches, more than the BTB holds, so entries are replaced every pass;
  * a jump back to the start.

  It checks:
  * that the executed stream follows the program exactly;
  * `if_lookup` against an independent repose-counter model on every cycle;
  * the exact `NBIC_FIELDS` behaviour in the inner loop's steady state: only the loop branch is
    looked up.

  The run goes through `NBIC_FIELDS`, then a run-time switch to `NBIC_LAST`, then `NBIC_FIXED` with
  3, 5 and 16. It fails if any of these ever fails to occur: a reposed fetch, a look-up miss, a
  hit, a taken branch missed while reposed, a mispredict, a replacement, `NBIC_T` and `NBIC_NT`
  writes, a stall, a mode switch.

For each mode the end-to-end run prints:

* the look-up precision of branches (share of branches looked up);
* the look-up precision of non-branches (share not looked up);
* the overall look-up precision;
* the performance loss: taken-but-reposed branches × 2 cycles / instructions;
* an energy estimate per instruction, E = P_R·cycles + (P_L − P_R)·look-ups, with the BTB
  taking 10 % of processor power.

A fixed NBIC of 0 never reposes the BTB. It turns the front end into a conventional BTB, which
serves as the energy reference. The run requires `NBIC_FIELDS` to use less energy than this
reference. On the synthetic program (2 passes per mode, `NBIC_FIELDS` measured warm):

| mode | branch | non-branch | overall | perf. loss | energy vs conventional |
|---|---|---|---|---|---|
| conventional (`NBIC_FIXED` = 0) | 100 % | 0 % | 23 % | 0 % | — |
| `NBIC_FIELDS` | 100 % | 55 % | 66 % | 0 % | −6.2 % |
| `NBIC_LAST` | 96 % | 41 % | 53 % | 1.9 % | −1.9 % |
| `NBIC_FIXED` = 3 | 100 % | 28 % | 44 % | 0 % | −1.9 % |
| `NBIC_FIXED` = 16 | 82 % | 31 % | 42 % | 7.4 % | +2.4 % |

These are properties of that small program, not benchmark results. Its 80-branch region
deliberately overflows the BTB every pass and so holds the non-branch precision down. No real
program traces were run.

The RTL also carries assertions:

* at most one CAM entry matches a look-up;
* no look-up happens on a stalled or squashed fetch;
* a hit implies a look-up;
* a field write comes with a branch update.

Each check was also shown to catch a deliberately broken copy of its module.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/lpbtb_pkg.sv \
          $(ls rtl/*.sv | grep -v lpbtb_pkg) tb/tb_lp_btb_top.sv --top-module tb_lp_btb_top -o sim
./obj_dir/sim
```

For a single block, list the package, the block, the modules it instantiates and its testbench,
for example `rtl/lpbtb_pkg.sv rtl/nbic_counter.sv rtl/nbic_gather.sv tb/tb_nbic_gather.sv`. The
end-to-end run takes well under a second.

## Files

| file | content |
|---|---|
| `rtl/lpbtb_pkg.sv` | word size, `nbic_mode_e`, direction-counter type and update function |
| `rtl/btb.sv` | CAM BTB with NBIC fields |
| `rtl/repose_counter.sv` | look-up gating counter |
| `rtl/nbic_counter.sv` | distance counter + LD register |
| `rtl/fixed_nbic.sv` | fixed-NBIC register |
| `rtl/nbic_gather.sv` | run-time collection of `NBIC_T`/`NBIC_NT` |
| `rtl/fetch_unit.sv` | fetch pc and next-pc selection |
| `rtl/lp_btb_top.sv` | the front end |
| `tb/tb_*.sv` | one self-checking testbench per module |
