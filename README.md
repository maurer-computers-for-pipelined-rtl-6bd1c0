# Pipelined and non-pipelined processors for single-pass instruction sequences

This RTL runs programs written as *single-pass instruction sequences* (the
program algebra PGA) on top of a machine whose every operation ends with a
yes/no reply. The program uses only five kinds of instruction:

| instruction | meaning |
|---|---|
| `a`    | perform basic action `a`, ignore the reply, go on with the next instruction |
| `+a`   | perform `a`; reply T: go on with the next instruction, reply F: skip it |
| `-a`   | perform `a`; reply F: go on with the next instruction, reply T: skip it |
| `#k`   | jump `k` instructions forward (`#0` is deadlock) |
| `!`    | terminate |

Two extensions are also built in: conditional jumps `+a#k` / `-a#k`, which
perform `a` and jump `k` forward on reply T / F, and the backward jump `\#k`.
A run ends in one of two ways. It *terminates* when it executes `!`. It ends
in *deadlock* when control leaves the program: a jump past the end, `#0`, or
a skip past the end.

Two micro-architectures execute such programs and give the same machine
state and the same outcome:

* **`sp_npl_core`** handles one instruction at a time in four operations,
  fetch, prep (decode), exec and postp (program counter update and
  termination check). It takes four cycles per instruction.
* **`sp_pl_core`** overlaps the same four operations as a four-stage
  pipeline, one step per cycle. It has no branch prediction and no
  forwarding, because nothing in it can cause a data hazard. Its only
  hazards are control hazards: skips and jumps. It handles them with three
  rules: stall when a jump is decoded, discard the next instruction after a
  skipping test, and restart fetching after a jump is processed.

The register set, the four operations and the pipeline control follow a
published formal model of these two micro-architectures. The places where
this RTL departs from that model, or fills a gap in it, are marked below:
the fetch increment, the backward-jump rule, and the edge cases.

The machine that performs the basic actions is a small load/store computer
(`lsm_isa`). `maurer_top` holds one computer of each kind side by side.

## Program representation

Each program memory word holds one instruction, `instr_t` in `pga_pkg`:

| field | bits | contents |
|---|---|---|
| `itype` | 3 | `IT_BSC` 0, `IT_PTST` 1, `IT_NTST` 2, `IT_FJMP` 3, `IT_PCFJMP` 4, `IT_NCFJMP` 5, `IT_BJMP` 6, `IT_TERM` 7 |
| `act`   | 16 | the basic action (for `a`, `+a`, `-a`, `+a#k`, `-a#k`) |
| `disp`  | 8 | the jump distance `k` (for the jumps) |

The program memory holds 256 words (`pga_pkg::PA_W = 8`). A program of `n`
instructions sits at addresses `0 .. n-1`. The run is started with
`pcbr = n - 1`, the highest program address.

## Registers shared by both processors

| register | role |
|---|---|
| `pc`   | address of the next fetch. It holds up to `pcbr + 3`, so it is `PA_W + 1` bits wide. |
| `pcbr` | highest program address |
| `ir`   | fetched instruction. A fetch beyond `pcbr` loads `#0` and replies F. |
| `ditr`, `bar`, `dr` | decoded type, basic action and displacement. `bar` is only written by instructions with an action, and `dr` only by jumps. |
| `eitr`, `irr` | type and reply of the executed instruction. `irr` is T when no action was performed. |
| `rr_fetch` ... `rr_postp` | one reply bit per operation. The fetch reply is F beyond the program; the postp reply is F after `!`. |

The operations are separate combinational modules: `pga_fetch`, `pga_prep`,
`pga_exec` and `pga_postp`. Both processors use all four. In the pipelined
processor, `pga_postp` takes its pipelined form (`PIPELINED = 1`).

**Fetch increments `pc` on every fetch, including a failed one.** After the
last instruction has been fetched, `pc = pcbr + 1` and the next fetch fails.
The jump arithmetic below relies on this. The formal model also gives a
bounded form of the fetch equation, where `pc` stops at `pcbr`. That form
contradicts the model's own prose, and it would fetch the last instruction
again and again, so this RTL does not use it.

## Non-pipelined processing (`sp_npl_core`)

A five-state machine cycles through FETCH → PREP → EXEC → POSTP → FETCH.
Each state performs one operation in one clock cycle.

* A failed fetch ends the run in deadlock.
* A postp with reply F (the instruction was `!`) ends the run terminated.
* `steps` counts operations: `4 × instructions`, plus one for a final failed
  fetch.

In postp, `pc` already points one past the instruction. A skip therefore
adds 1, and a jump by `k` goes to `pc - 1 + k` (or `pc - 1 - k` for `\#k`).
A target outside `0 .. pcbr`, or `k = 0`, sets `pc = pcbr + 1`, so the next
fetch fails.

## Pipelined processing (`sp_pl_core`)

### Stages and the status register

The four operations become stages: fetch, prep, exec and postp. A 4-bit
status register `plsr` records which stages are enabled in the current step.
Every enabled stage reads the registers as they stood at the start of the
cycle, and all of them write at its end. Every stage writes different
registers, with one exception: `pc`. The stall rule below guarantees that
fetch and postp never both change `pc` in the same step. The assertion
`a_no_pc_conflict` checks this.

### The control flags

During a step the stages raise four flags. They are same-cycle signals and
are never stored:

| flag | raised when | effect on the next step |
|---|---|---|
| `jdf` | prep decodes `#k`, `\#k` or `!` | stop fetch and prep (stall) until the jump has been post-processed |
| `isf` | exec runs `+a` with reply F, or `-a` with reply T | do not execute the instruction now in prep (it is the one to skip); fetch and prep continue, even if that instruction was a jump that stalled them |
| `cjf` | exec runs a conditional jump that is taken | discard the instruction now in prep, and stop fetch and prep |
| `jpf` | postp has moved `pc` for a jump | restart fetching at the new `pc`; the instruction fetched before the stall is dropped |

`pga_plctr` turns these into the next `plsr`:

```
fetch' = rr_fetch & ((fetch & !jdf & !cjf) | isf | jpf)
prep'  = rr_fetch & ((fetch & !jdf & !cjf) | isf)
exec'  = prep & !isf & !cjf
postp' = exec
```

The run goes on while `plsr' ≠ 0` and the last postp reply is T. When it
stops, a last postp reply of F means terminated; otherwise the run ends in
deadlock. `steps` counts cycles.

### Why jump targets are `pc - 2 + k`

A skip is done by discarding the next instruction, so postp leaves `pc`
alone on tests. A jump at address `j` is post-processed two fetches later,
when `pc = j + 2`, so its target is `pc - 2 + k`. A conditional jump does
not stall at decode, so one more fetch has happened and its target is
`pc - 3 + k`. A backward jump goes to `pc - 2 - k`.

### Example

Take the program `a; +b; #3; c; #2; d; !` where `+b` replies F. Each row
below is one step; F, P, E and O mark the fetch, prep, exec and postp stages.

| step | F | P | E | O | note |
|---|---|---|---|---|---|
| 1 | a | | | | |
| 2 | +b | a | | | |
| 3 | #3 | +b | a | | |
| 4 | c | #3 | +b | a | `+b` replies F: `isf`, so `#3` is dropped |
| 5 | #2 | c | | +b | |
| 6 | d | #2 | c | | `jdf`: stall |
| 7 | | | #2 | c | |
| 8 | | | | #2 | `jpf`: pc := address of `!`, `d` dropped |
| 9 | ! | | | | |
| 10 | (fails) | ! | | | |
| 11 | | | ! | | |
| 12 | | | | ! | terminated |

The run takes 12 steps. The non-pipelined processor takes 20 for the same
program.

### Behaviour at the edges (read before writing programs)

These follow from the pipeline control rules above and are kept unchanged:

* **A taken conditional jump directly followed by a jump instruction**
  (`#k`, `\#k`, `+a#k`, `-a#k`) jumps by the *second* instruction's
  distance. The second instruction is decoded while the conditional jump
  executes, and the decode overwrites `dr`. Put a non-jump instruction after
  a conditional jump.
* **A taken `+a#1` / `-a#1` in the next-to-last position** ends in deadlock
  instead of running the last instruction. The fetch that ran past the end
  blocks the restart.
* **A conditional jump in the last position** computes its target one too
  low. This has no effect: the restart is blocked, and every jump taken from
  there leaves the program anyway.

The non-pipelined processor has none of these effects.

One rule is this design's own addition, for backward jumps. When a `\#k` is
post-processed to an address inside the program, the fetch reply is set back
to T. Without this rule, a loop closed by a backward jump in the last
position could never refetch, because its premature fetch failed. Programs
without backward jumps are not affected.

### What the processors leave out

* **Conditional backward jumps** (`+a\#k`, `-a\#k`) are not implemented.
  They would follow the forward ones: a taken jump goes to `pc - 3 - k`. But
  the 3-bit instruction type has no free codes, so adding them means widening
  `itype_e`.
* **No stored flags or reply register.** In the formal model, the flags, the
  step reply and the halt reply live in registers. A separate control
  operation clears them after each step. Here they are combinational within
  the cycle, so a step and its control update take one clock edge together.
  The observable sequence of `plsr` values is the same.

## The load/store machine (`lsm_isa`)

* **Data memory:** `2^K` words of `L` bits (`lsm_data_mem`).
* **Operating unit:** an `M`-bit memory used as `M/L` registers `R0..R3`
  (`lsm_operating_unit`).
* **Load and store registers:** `U` pairs of load address/data registers
  `la`/`ld`, and `V` pairs of store address/data registers `sa`/`sd`.

The load/store discipline is strict:

* only `ld` feeds the operating unit;
* only the operating unit writes `la`, `sa` and `sd`;
* `load:n` (`ld[n] := mem[la[n]]`) and `store:n` (`mem[sa[n]] := sd[n]`)
  are the only actions that touch memory.

The default parameters are `K = 8`, `L = 16`, `M = 64`, `U = V = 2`.

A basic action is 16 bits: `{op[3:0], ra[1:0], rb[1:0], imm[7:0]}` (see
`lsm_pkg`). The action is performed at the end of the cycle in which it is
requested, and its reply is available combinationally within that cycle.

| op | action | reply |
|---|---|---|
| LOAD / STORE | `load:ra`, `store:ra` | T |
| SETI | `R[ra] := imm` | T |
| MOVLD | `R[ra] := ld[rb]` | T |
| TOLA / TOSA / TOSD | `la[ra]` / `sa[ra]` / `sd[ra] := R[rb]` | T |
| ADD, SUB, INC | arithmetic on `R[ra]`, modulo `2^L` | T |
| DEC | `R[ra] := R[ra] - 1` | result ≠ 0 |
| EQZ | no change | `R[ra] == 0` |
| LT | no change | `R[ra] < R[rb]` |

The data manipulation set (everything except LOAD and STORE) and the
encoding are choices of this implementation. Any set of actions that
respects the read/write separation above can replace them. The processors
only see `basic_action_if`: a request (`valid`, `act`) and a combinational
`reply`.

## Using `maurer_top`

Each computer has its own ports (`pl_*` for the pipelined one, `npl_*` for
the non-pipelined one). To run a program:

1. Write the program through `*_prog_we/waddr/wdata`.
2. Write the data memory through `*_dm_we/addr/wdata`.
3. Pulse `*_start` for one cycle with `*_pcbr = n - 1`.
4. Wait for `*_done`, then read `*_terminated` / `*_deadlock` and `*_steps`.
5. Read results through `*_dm_addr` / `*_dm_rdata`.

The pipelined side also shows `pl_plsr`, `pl_flags` and the action bus.

Reset is asynchronous and active low. It clears every register except the
program and data memories, which must be written before use.

## Verification

Each module has a self-checking testbench in `tb/`:

* **Stage modules** (`tb_pga_fetch`, `tb_pga_prep`, `tb_pga_exec`,
  `tb_pga_postp`, `tb_pga_plctr`): random or exhaustive inputs against the
  equations, written out independently in each testbench.
* **`tb_sp_npl_core`, `tb_sp_pl_core`:** the example above and its companion
  `a; +b; c; #3; d; e` (8 pipelined / 13 non-pipelined steps). In the
  pipelined case the enabled stages are checked step by step. Then several
  hundred random programs of all instruction types are run against an
  interpreter that executes the instruction sequence directly
  (`tb/tb_pga_ref.svh`), comparing outcome and the sequence of actions. The
  random programs avoid the edge cases listed above.
* **`tb_maurer_top`:** runs, at default parameters, a summing loop (backward
  jump, skip), a zero-counting loop (conditional jump) and a jump out of the
  program on both computers. It checks the stored results, equal machine
  state on both sides and the non-pipelined step count. It also checks that
  every pipeline mechanism occurred. The pipelined computer needs 108 and
  132 steps where the non-pipelined one needs 308 and 320.

Run one testbench with plain Verilator from the project root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/pga_pkg.sv rtl/lsm_pkg.sv tb/tb_maurer_top.sv --top-module tb_maurer_top
./obj_dir/Vtb_maurer_top
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>`.

## Files

| file | contents |
|---|---|
| `rtl/pga_pkg.sv`, `rtl/lsm_pkg.sv` | types: instruction word, pipeline status, flags; action encoding |
| `rtl/basic_action_if.sv` | processor–machine interface |
| `rtl/pga_fetch.sv`, `pga_prep.sv`, `pga_exec.sv`, `pga_postp.sv` | the four operations |
| `rtl/pga_plctr.sv` | pipeline control and halt reply |
| `rtl/pga_prog_mem.sv` | program memory |
| `rtl/sp_npl_core.sv`, `rtl/sp_pl_core.sv` | the two processors |
| `rtl/lsm_data_mem.sv`, `lsm_operating_unit.sv`, `lsm_isa.sv` | the load/store machine |
| `rtl/maurer_top.sv` | both computers side by side |
| `tb/*.sv`, `tb/*.svh` | testbenches, reference interpreter and machine model |
