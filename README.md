# Global History Stack branch predictor

A gshare predictor indexes its table with the branch address XOR a global
history register (GHR) of recent conditional outcomes. With a short GHR (8
bits here) one function call is enough to flush the caller's history: by the
time the callee returns, the GHR holds only the callee's branches, and the
caller's next branches are predicted from the wrong context.

This design keeps the caller's context alive across calls. The return
address stack (RAS) already records exactly when a call starts and ends, so
each RAS entry gets a second field holding the GHR as it was at the call.
That extended stack is the **Global History Stack (GHS)**. A return pops the
return address *and* the history, and the caller carries on with its own
branch history. Three further mechanisms refine this:

* **Zeroing.** A call clears the GHR, so a function's branches see the same
  starting history whichever call site they were reached from.
* **Retaining.** On a return only the upper bits of the GHR are restored
  from the stack, and the callee's `RETAIN` newest outcomes stay in the low
  bits. A caller branch that tests the function's return value can then
  still correlate with the callee branches that decided that value.
  With 8 history bits and `RETAIN = 2`, 6 bits are restored; this
  configuration is called r6.
* **BTB old history.** Each BTB entry gets a call bit and an old-history
  field. When a callee returns, its final GHR is written into the BTB entry
  of the call instruction that invoked it. That entry's PC is the return
  address minus one instruction (4 bytes). The next time the same call
  executes and hits that entry, the GHR is loaded from the field instead of
  zeroed. The callee thus resumes from the history its previous invocation
  ended with, which exposes correlation between consecutive calls. The history
  belongs to a call *site*, not to a function. On a BTB miss the GHR
  starts at 0.

All mechanisms can be switched on and off at run time, so the same hardware
runs every configuration:

| configuration | `cfg` constant (`ghs_pkg`) | ghs_en | zero_en | btb_hist_en | retain_en |
|---|---|---|---|---|---|
| plain gshare | `CFG_BASELINE` | 0 | 0 | 0 | 0 |
| GHS | `CFG_GHS` | 1 | 1 | 0 | 0 |
| GHS+r6 | `CFG_GHS_R6` | 1 | 1 | 0 | 1 |
| GHS+BTB | `CFG_GHS_BTB` | 1 | 1 | 1 | 0 |
| GHS+BTB+r6 (full scheme) | `CFG_GHS_BTB_R6` | 1 | 1 | 1 | 1 |

## How the history register moves

The GHR shifts left and the newest outcome enters at bit 0 (taken = 1). For
each control instruction:

| instruction | GHR next value |
|---|---|
| conditional | `{ghr[6:0], taken}` |
| jump | unchanged |
| call | `btb_hist_en`: old-history field if the call hits a BTB entry with the call bit set, else 0. Otherwise `zero_en`: 0. Otherwise unchanged. The GHR *before* this change is pushed onto the stack together with PC+4. |
| return | `ghs_en` and the stack not empty: the popped history, or with `retain_en` `{popped[7:2], ghr[1:0]}`. Otherwise unchanged. Before this change, with `btb_hist_en`, the current GHR is written to the BTB entry of PC = return target − 4, if that entry still belongs to a call with that PC. |

The BTB reload takes priority over zeroing: with both on, a call never keeps
the caller's history.

### Worked example (10-bit history)

```
0x12004CA4  call 0x12005F48     GHR 1000111101 -> push (0x12004CA8, 1000111101)
   ... branches in 0x12005F48 leave GHR 0100101110
0x12005F4C  call 0x12006684     push (0x12005F50, 0100101110)
0x12006688  bne  taken          GHR 1001011101   (no zeroing in this example)
0x1200669C  beq  not taken      GHR 0010111010
0x120066A4  ret                 pop: target 0x12005F50, GHR <- 0100101110
```

With zeroing on, the innermost function starts from 0000000000 and returns
with 0000000010, and the same pop restores 0100101110. `tb_ghs_example`
replays this trace in both variants.

## Interface and timing of `ghs_predictor`

The predictor consumes the program's control instructions **in program
order, one per clock cycle, as they resolve**:

| port | dir | meaning |
|---|---|---|
| `cfg` | in | mode bits (`ghs_cfg_t`); may change between any two instructions |
| `ev_valid`, `ev_pc`, `ev_type` | in | an instruction of class `BR_COND`, `BR_JUMP`, `BR_CALL` or `BR_RET` |
| `ev_taken`, `ev_target` | in | its actual direction and target; jumps, calls and returns must be taken (an assertion checks this) |
| `pred_taken`, `pred_target_valid`, `pred_target` | out | the prediction made from the state *before* this instruction: gshare direction; target from the BTB, or from the stack for a return |
| `mispredict` | out | wrong direction, or taken with no target or the wrong target |
| `ghr` | out | the global history register |
| `ghs_restore_evt`, `btb_reload_evt`, `btb_save_evt`, `ras_overflow_evt`, `ras_underflow_evt` | out | one-cycle pulses when a mechanism acts |

Outputs are combinational from the current state and the `ev_*` inputs. At
the rising edge the pattern table counter, the BTB, the stack and the GHR
are all updated with the outcome. Reset (`rst_n` low, synchronous) sets
every counter to weakly not-taken, empties the BTB and the stack, and
clears the GHR.

This is a commit-order model: the history is only ever updated with resolved
outcomes, and at most one control instruction is handled per cycle. A
front end that predicts speculatively, several branches per fetch group,
would also need to checkpoint and repair the GHR and the stack on a
misprediction. That is not part of this design.

## Blocks

| module | role | default size |
|---|---|---|
| `ghs_predictor` | top; wiring, prediction selection, event pulses | — |
| `gshare_pht` | 2-bit counter table, index `PC[13:2] ^ {0, ghr}` | 4096 counters (flip-flops, reset in one cycle) |
| `ghr_unit` | the GHR and its next-value rules above | 8 bits, `RETAIN` = 2 |
| `ghs_ras` | stack of (return address, history) | 10 entries |
| `btb_hist` | direct-mapped BTB with call bit and old-history field | 512 entries, tag `PC[31:11]`, index `PC[10:2]` |
| `ghs_pkg` | `br_type_e`, `ghs_cfg_t`, the `CFG_*` constants, `INSTR_BYTES` = 4 | — |

Top parameters: `PHT_ENTRIES`, `GHR_BITS` (≤ log2 `PHT_ENTRIES`),
`RAS_DEPTH`, `BTB_ENTRIES`, `RETAIN` (< `GHR_BITS`).

## What is given and what is chosen here

These parts follow the published Global History Stack scheme:

* gshare with 4K entries and 8 history bits; a 10-entry stack; a 512-entry BTB.
* The history field in each stack entry, pushed on a call and popped on a return.
* Zeroing, and r6 retaining, read as "the 6 most significant GHR bits are
  overwritten, the last 2 kept".
* The call bit and old-history field in the BTB; the write on return at
  return address − 4; the reload on a hit with the call bit; GHR = 0 on a miss.

These are this implementation's own choices:

* The one-instruction-per-cycle, resolved-outcome interface, and the
  `mispredict` and event outputs.
* Counter reset value 01. Index bits: the history is XORed into the *low* index bits.
* A BTB that is direct-mapped, allocates taken conditionals, jumps and calls
  (not returns), clears the old-history field when an entry changes owner,
  and drops a history write whose call entry has been evicted.
* The stack on overflow overwrites its oldest entry. Popping an empty stack
  leaves the GHR alone and gives no target.
* The BTB save uses the *actual* return target minus 4, not the stack's
  prediction.
* The BTB reload has priority over zeroing.
* Global run-time enables. Choosing a mechanism per function, for example by
  the compiler, is not provided.

The processor around the predictor is not part of this RTL: a 4-wide
embedded core with caches.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_gshare_pht` | index hashing and counter saturation against a model; 20k random updates |
| `tb_ghr_unit` | every next-value rule in every mode, directed and 20k random |
| `tb_ghs_ras` | the worked-example pushes, overflow/underflow, 20k random push/pop against a queue model |
| `tb_btb_hist` | hit/call/history fields, write through return − 4, foreign writes dropped, eviction clears history; 20k random ops |
| `tb_ghs_predictor` | full design at default sizes. It runs a synthetic 8-function program with recursion deep enough to overflow the stack, under all five modes with mode switches and no reset in between. Every output is compared with an independent model every cycle (about 157k checks). Each mechanism must occur. |
| `tb_ghs_example` | the worked example above at `GHR_BITS = 10` |
| `tb_ghs_correlation` | three correlation patterns, each run in all modes: a loop around a call, a branch that alternates across calls, and a branch on a return value. It requires GHS, GHS+BTB and r6 respectively to at least halve the mispredictions of the mode without the mechanism. |

Direction mispredictions of the watched branch, in the run used here with
2000 iterations (8000 loop-branch instances):

| mode | loop branch after a call | branch alternating across calls | branch on callee's last outcome |
|---|---|---|---|
| baseline | 3892 | 520 | 1 |
| GHS | 10 | 1001 | 963 |
| GHS+r6 | 3149 | 1001 | 1 |
| GHS+BTB | 16 | 3 | 1019 |
| GHS+BTB+r6 | 3655 | 3 | 1 |

The table shows the trade-offs of the scheme. Restoring the history fixes
the loop, but it hides the return-value correlation that plain gshare gets
for free. Retaining restores that correlation but lets the callee's noise
back into the loop branch. Which mode wins depends on the program. The
testbenches use synthetic programs; no benchmark traces are included.

To run a testbench with Verilator 5 (from the directory that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ghs_pkg.sv rtl/gshare_pht.sv rtl/ghr_unit.sv rtl/ghs_ras.sv \
  rtl/btb_hist.sv rtl/ghs_predictor.sv tb/tb_ghs_predictor.sv \
  --top-module tb_ghs_predictor -Mdir obj && ./obj/Vtb_ghs_predictor
```

Each testbench finishes in well under a second of simulation time. To change
a size, override the top's parameters. The testbench models take the sizes
from their own `localparam`s, which must be changed to match.
