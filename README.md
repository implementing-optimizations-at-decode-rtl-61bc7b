# Speculative decode: memory reference combining and silent store squashing

In a modern out-of-order core the scheduler decides several cycles ahead which
functional units and cache ports each instruction will use. An optimization
that only becomes known while an instruction executes — "these two loads hit
the same double-word", "this store writes the value already in memory" —
comes too late to change that schedule, so it buys little. Speculative decode
moves the decision to the decode stage: a predictor guesses that the
optimization will apply, the decoder rewrites the architected instructions
into a different sequence of implementation micro-ops that expresses the
optimization explicitly, and the scheduler simply schedules that sequence.
If the guess was wrong, a check built into the rewritten sequence raises a
trap. The front end is then flushed, and the failing instruction is fetched
again and decoded without rewriting.

This RTL implements that front end for two optimizations:

* **memory reference combining**: two word loads, or two word stores, to
  consecutive addresses become one double-word access;
* **silent store squashing**: a store predicted to write the value already in
  memory is replaced by a load and a compare-and-trap, so it never occupies
  the store path.

The out-of-order core that executes the micro-ops is not part of the RTL.
The front end talks to it through plain valid/PC/data ports.

## Block structure

```
              in_valid/in_pc/in_inst (a group of up to 4 instructions per cycle)
                 |                |                     |
                 v                v                     v
        sequence_detector   combining_predictor   silence_predictor
          (pairs in the        (lookup by PC)       (lookup by PC)
           fetch stream)            |                     |
                 |  allocate        | combine? info       | NoSquash/Check/Squash
                 |  (4 ports)       | (4 lookup ports)    | (4 lookup ports)
                 +------------>     v                     v
                               sd_decoder  ---------------------> out_valid/out_uop
                                   ^                              (up to 13 micro-ops)
          rec_valid/rec_pc, flush -+
   core feedback: up_* (alignment) -> combining_predictor
                  tr_* (store value), vf_* (verify result) -> silence_predictor
```

| file | contents |
|---|---|
| `rtl/sd_pkg.sv` | instruction fields, micro-op struct `uop_t`, `sil_state_e`, `next_info_t` |
| `rtl/sd_frontend.sv` | top: wires the four blocks together |
| `rtl/sd_decoder.sv` | architected instruction -> micro-op translation, recovery |
| `rtl/combining_predictor.sv` | 1024-entry tagged alignment-history table |
| `rtl/sequence_detector.sv` | finds combinable pairs, allocates predictor entries |
| `rtl/silence_predictor.sv` | 1024-entry value/confidence/threshold table |

## Instruction sets

The architected instructions (U-ISA) use a 32-bit MIPS-style layout:
`opcode[31:26] rs[25:21] rt[20:16] rd[15:11] imm[15:0]`. `lw` is 0x23 and `sw` is 0x2b.
Both address memory as `rs + sext(imm)`. ALU instructions are the
register-register group (opcode 0, except jumps/syscall/break) and the
immediate group (opcodes 0x08-0x0f). Only these classes matter to the front end.
Everything else passes through unchanged.

The micro-ops (`uop_op_e` in `sd_pkg`) assume 64-bit registers in the core,
used in 32-bit mode: only bits 31:0 of a register are architected.

| micro-op | meaning |
|---|---|
| `UOP_ORIG` | the architected instruction, unchanged (`inst` field) |
| `UOP_DLW dst, imm(src1)` | `dst <= {mem[a+4], mem[a]}`, traps if `a` is not 8-byte aligned |
| `UOP_EXTHI dst, src2` | `dst <= src2[63:32]` |
| `UOP_SETHI dst, src1, src2` | `dst <= {src2[31:0], src1[31:0]}` |
| `UOP_DSW imm(src1), src2` | `mem[a] <= src2[31:0]; mem[a+4] <= src2[63:32]`, traps if unaligned |
| `UOP_VLD TMP, imm(src1)` | verify load into temporary register 32 |
| `UOP_VCMP TMP, src2` | reports silent / not silent to the silence predictor |
| `UOP_VTRAP TMP, src2` | the same, and traps when the values differ |

Each micro-op carries the PC of the architected instruction it came from.
For a combined store, the `dsw` carries the PC of the *first* store. That
PC is the one to re-fetch if the `dsw` traps.

## The rewrites

```
lw rA,d(rB) ; [ALU]* ; lw rC,d+4(rB)     ->  dlw rA,d(rB) ; [ALU]* ; exthi rC,rA
sw rA,d(rB) ; sw rC,d+4(rB)              ->  sethi rA,rA,rC ; dsw d(rB),rA
sw rA,d(rB)   silence state Check        ->  vld TMP,d(rB) ; vcmp TMP,rA ; sw rA,d(rB)
sw rA,d(rB)   silence state Squash       ->  vld TMP,d(rB) ; vtrap TMP,rA
```

Load combining: the first load becomes `dlw`. Its destination then holds both
words, and its low half is exactly what the original load would have produced.
The decoder remembers the pair. Instructions up to the distance stored in the
predictor entry may follow, but only ALU instructions that write neither the
base nor `rA`. When a load at `d+4` from the same base arrives, it becomes
`exthi`. Any other instruction cancels the pair, and the second load is
decoded normally. This is always safe, because the `dlw` already delivered
the first word.

Store combining needs both stores before anything can be emitted. The first
store is held in the decoder until the next instruction arrives, which may
be in the same fetch group or in the next one. The `sethi`/`dsw` pair is
emitted with the second store. If the next instruction does not complete
the pair, or a cycle brings no instruction at all, the held store is emitted
unchanged.
`sethi` changes only the upper half of `rA`, which is invisible in 32-bit mode.

A store that is predicted combinable is not also considered for squashing.
A first instruction whose data register is r0 is never combined.

## Predicting alignment: `combining_predictor` and `sequence_detector`

A double-word access must be 8-byte aligned, and the decoder cannot see
addresses. The combining predictor is a direct-mapped table (1024 entries,
index PC[11:2], 20-bit tag). It is keyed by the PC of the first instruction
of a pair. Each entry keeps the last four alignment outcomes of that
instruction, newest in bit 0: 1 means the address was double-word aligned.
The decoder is told to combine on a tag hit when the history is:

* `1111`: the address has been aligned every time;
* `1010`: the base moves by one word per visit, so aligned and unaligned
  alternate and the next visit is aligned.

Every other pattern means "do not combine". The core reports an outcome
(`up_*`) for every word load or store it executes. Only an entry whose tag
matches uses it.

Entries come from the sequence detector, which watches the fetched stream.
It keeps the most recent word load or store as a candidate. A later
instruction completes a pair when all of these hold:

* it is of the same kind;
* it uses the same base register;
* its offset is 4 higher.

For loads, ALU instructions may come between (at most `MAX_DIST` = 4
instructions from first to second load), but not ones that write the base
or the first load's destination. A first load that overwrites its own base
never starts a pair. Stores must be adjacent. Each new load or store becomes
the candidate, so in a run of four accesses at offsets 0/4/8/12 all three
overlapping pairs get entries. The history then learns which of them is
actually aligned. With a base that is only word-aligned, the 4/8 pair gets
combined and the 0/4 and 8/12 pairs do not.

A newly allocated entry starts from history `0000`, so a pair is combined
only after it has been seen aligned several times. Finding an entry again
that already belongs to the same PC keeps its history.

## Predicting silence: `silence_predictor`

This is the part with the most behaviour packed into little state. Each of
1024 PC-indexed entries (no tag) has:

* `value`: low 8 bits of the last value the store wrote;
* `confidence` (6-bit, saturating): +1 when a store writes the same low 8
  bits as last time, -1 when it writes different ones;
* `threshold` (6-bit, saturating): -1 after each silent verify; +4 after a
  verify that found the store not silent, which also clears `confidence`.

The three prediction states are not stored. They follow from the counters:

| condition | state | decoded as |
|---|---|---|
| confidence < threshold | No squash | the store |
| confidence = threshold | Check | load + compare + store |
| confidence > threshold | Squash | load + trap (no store) |

Confidence moves one step at a time, so a store always reaches Check before
Squash. In Check, the store still executes and the compare only trains the
threshold. A silent result lowers the threshold below the confidence, and
the next instance is squashed. In Squash, a store that turns out not to be
silent traps. The penalty then clears the confidence and raises the
threshold by 4, so the store must repeat its value more often before it is
tried again.

A worked trace (threshold starts at 4, the reset value used here):

| event | value | conf | thres | state |
|---|---|---|---|---|
| store 100 to A, fourth time | 100 | 3 | 4 | No squash |
| store 100 to B | 100 | 4 | 4 | Check -> silent, thres 3 |
| another store writes 50 to B | | | | |
| store 100 to B | 100 | 5 | 3 | Squash -> trap |
| after the trap | 100 | 0 | 7 | No squash; store re-fetched and executed |

The core trains the table through two ports:

* `tr_*`: every store that executes, including a squashed store whose trap
  did not fire;
* `vf_*`: every `vcmp` and `vtrap`.

The table is a plain 1024 x 20-bit memory. A valid bit per entry, cleared at
reset, makes untouched entries read as value 0, confidence 0 and the
initial threshold.

## Decoding a fetch group

Up to `FETCH_W` = 4 instructions arrive per cycle, slot 0 the oldest. Empty
slots are allowed anywhere in a group and are skipped. Both predictors have
one lookup port per slot, so every instruction gets its own prediction in
the fetch cycle.

The decoder's state is small: one pending `dlw` (destination, base, offset,
instructions still allowed) and one held store. Inside a cycle the slots are
translated one after the other, and each slot sees the state left by the
slot before it. In hardware this is a chain of four copies of the
single-instruction translation logic. So a pair may lie inside one group,
or start in one group and end in the next. The result is the same as
decoding the stream one instruction at a time, provided no cycle is left
completely empty, since an empty cycle releases a held store. The decoder
testbench checks exactly that.

Each slot emits 0 to 4 micro-ops, and the decoder packs them in program order
from output slot 0. A held store emits nothing in its own slot. The worst
case is a store held from the previous cycle, released by slot 0, followed by
four Check-form stores: 1 + 4 x 3 = 13 = `OUT_W`.

The sequence detector works the same way, with one candidate passed from slot
to slot. A pair is reported on `al_*[s]`, where `s` is the slot of the second
instruction. The combining predictor applies the allocations of a cycle in
slot order, so the later one wins when two pairs map to the same entry.

## Recovery

A trap (an unaligned `dlw`/`dsw`, or a `vtrap` that found different values)
is reported as `rec_valid` with `rec_pc`. `rec_pc` is the PC carried by the
failing micro-op. On this pulse:

* the decoder drops its output, a held store and any pending load pair;
* the sequence detector drops its candidate;
* the decoder remembers `rec_pc`, and the next instruction fetched from that
  PC is decoded with no rewriting (`ev_nosd` pulses).

The core must first discard everything younger than the failing micro-op.
Fetch must then restart at `rec_pc`. The predictors learn from the failed
outcome (alignment 0, or not silent) through the normal training ports, so
the same rewrite is not attempted again right away. `flush` clears the same
state without marking a PC, for other redirects such as branch mispredictions.

## Interface and timing

* Up to `FETCH_W` architected instructions per cycle on `in_valid[s]`,
  `in_pc[s]` and `in_inst[s]`. The predictions for every slot are read
  combinationally from the tables in the same cycle.
* Micro-ops appear on `out_valid`/`out_uop` (`OUT_W` = 13 slots) on the next
  clock edge, packed from slot 0 in program order. The core must accept a
  whole group in one cycle; there is no back-pressure port, so fetch must be
  held by the core itself.
* Each training port (`up_*`, `tr_*`, `vf_*`) takes one report per cycle. A
  core retiring several loads and stores per cycle has to queue its reports.
  A report that arrives late only delays learning; correctness never depends
  on the predictors.
* Predictor writes (allocation, training) take effect at the next edge.
  Same-cycle writes to one entry are merged.
* The `ev_*` outputs have one bit per input slot. A bit pulses for an
  allocation, a load pair, a store pair, a Check, a Squash, or a decode
  without rewriting, in the slot of the instruction that caused it.
* Reset is asynchronous, active low.

Parameters of `sd_frontend` (defaults are the evaluated configuration
unless marked):

| parameter | default | |
|---|---|---|
| `FETCH_W` | 4 | instructions per cycle |
| `COMB_ENTRIES` | 1024 | combining predictor entries |
| `HIST_BITS` | 4 | alignment history length |
| `SIL_ENTRIES` | 1024 | silence predictor entries |
| `VALUE_BITS` | 8 | stored bits of the last value |
| `CONF_BITS`, `THRES_BITS` | 6, 6 | counter widths |
| `PENALTY` | 4 | threshold increase on a failed verify |
| `INIT_THRES` | 4 | reset threshold (design choice) |
| `MAX_DIST` | 4 | load pair window (design choice) |
| `OUT_W` | 13 | micro-op slots, 3 x `FETCH_W` + 1 (design choice) |

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_combining_predictor`: pattern decisions, tag aliasing and replacement
  on all four ports. Then 5000 random cycles, each with several allocations
  and an outcome, against a reference model.
* `tb_silence_predictor`: the worked trace above, 8-bit value comparison,
  and 4000 random training cycles against a reference model. Each cycle looks
  up a different PC on each port.
* `tb_sequence_detector`: accepted pairs (overlapping, with ALU gaps, the
  largest gap) and every rejection rule. The same stream is replayed one
  instruction per cycle, in random groups with random empty slots, and in
  full groups.
* `tb_sd_decoder`: every rewrite, pair cancellation, store release by an
  instruction and by an empty cycle, and decoding without rewriting after
  recovery. Then pairs inside a group and across groups, and the
  13-micro-op worst case. Finally a 3000-instruction random stream with
  random predictions is decoded twice, serially and in random groups; the
  micro-op sequences must be identical.
* `tb_sd_frontend`: end to end at the default parameters. The testbench runs
  a loop kernel (6064 dynamic instructions) on a golden instruction-level
  model and feeds the recorded stream to the front end, mostly in full groups
  of four. Fetch pauses while the training reports are queued up. It executes the
  micro-ops on an in-order core model with 64-bit registers and raises the
  traps. It also returns all training, and re-feeds from the failing
  instruction after a trap. At the end, registers and memory must match the
  golden model. It also requires every mechanism to have happened at least
  once. A typical run takes about 1900 cycles. It has about 220 combined
  load pairs, 120 store pairs, 20 Check and 80 Squash decodes, and 31 + 5
  alignment traps plus 18 silence traps. Each trap is followed by a decode
  without rewriting. The counts change with the random group sizes.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/sd_pkg.sv \
  rtl/sequence_detector.sv rtl/combining_predictor.sv rtl/silence_predictor.sv \
  rtl/sd_decoder.sv rtl/sd_frontend.sv tb/tb_sd_frontend.sv --top tb_sd_frontend
./obj_dir/Vtb_sd_frontend
```

For a single block, list `rtl/sd_pkg.sv`, the block's file and its testbench.
All runs take well under a second.

## Departures and limits

* **Width.** The front end takes four instructions per cycle, as the
  evaluated machine does. The training ports take one report each per cycle,
  and there is no back-pressure from the core into the decoder.
* **Double-word only.** The 128-bit (quad-word) variant of combining is not
  implemented. Its sequences and prediction rules are not specified beyond
  "analogous".
* **Encoding.** The U-ISA layout is MIPS32-style. The micro-op struct is
  this design's own. Adapting to another ISA means changing the field
  helpers in `sd_pkg`.
* **No core.** The out-of-order core, and with it the draining, re-fetching
  and the trap checks, is outside the RTL. The end-to-end testbench contains
  a functional in-order model of it, not a timing model.
* **Design choices** not fixed by the scheme itself:
  * the tag width;
  * the next-instruction info (pair kind + 3-bit distance);
  * initial history 0000 and initial threshold 4;
  * the single-candidate detector and its `MAX_DIST` window;
  * the rule that intervening ALU instructions must not overwrite the first
    load's destination;
  * the one-cycle hold of a first store;
  * the precedence of combining over squashing;
  * the exclusion of r0;
  * the derived (stateless) encoding of the three silence states.
* **Store combining and silence training.** Combined stores do not train the
  silence predictor.
