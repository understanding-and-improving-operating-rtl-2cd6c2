# OS-aware branch prediction

Programs that lean heavily on the operating system, such as databases, mail servers, Java
virtual machines and compilers driving the file system, spend a large share of their branches
in kernel code. A conventional branch predictor lets user and kernel branches share everything:
one global history register and one table of counters. The two kinds of code disturb each other
in two ways:

* **History pollution.** Most kernel visits are short and start without warning: a TLB refill,
  a timer tick or a page fault. When one arrives, the global history register is full of user
  branches. The first kernel branches are then predicted from user history, and when the user
  program resumes, its history is full of kernel branches.
* **Table aliasing.** Kernel branches are biased differently from user branches: many more are
  always taken, and more are only weakly biased. When a user branch and a kernel branch land on
  the same counter, they pull it in opposite directions.

The processor already knows which mode it is running in, because the processor status
register records the privilege level. The designs here use that one bit to keep user and
kernel state apart:

* **Split-history Gshare** (`split_bhsr_gshare`): two history shift registers, a U-BHSR
  (user branch history shift register) and a K-BHSR (kernel). The mode bit chooses which one is
  XORed with the branch address. The counter table is still shared. It costs one extra
  register and loses no table capacity.
* **Split Gshare** (`split_gshare`): split histories *and* split tables. A U-BHT (user branch
  history table) of 16K counters takes half of a 32K Gshare. A K-BHT of 2K counters is enough
  because the kernel has few active branch sites. In all it holds 18K counters instead of 32K.

Both ideas carry over to any predictor that uses Gshare-style indexing. Three such predictors
are included, **Bi-Mode**, **Agree** and **Multi-Hybrid**, each in two forms:

* split history only (`os_aware_bimode`, `os_aware_agree`, `os_aware_multi_hybrid`);
* split history and split tables (`split_bimode`, `split_agree`, and `os_aware_multi_hybrid`
  with `GS_K_BITS > 0`).

All of it is synthesizable SystemVerilog (IEEE 1800-2017). The top, `os_aware_bp_top`,
places the eight predictors side by side behind one mode decoder. A processor would use one of
them; together they let a single branch stream exercise and compare all eight.

## Where the mode bit comes from

`mode_decode` reads a MIPS R10000-style status register. The two-bit KSU field (bits 4:3)
gives the base privilege level: 00 is kernel, 01 supervisor, 10 user. The processor is also in
kernel mode while the exception level bit EXL (bit 1) or the error level bit ERL (bit 2) is set.
This matters here, because the TLB refill handler, the most frequent kernel code of all, runs
with EXL set on top of a user KSU. The result is:

    kernel = (KSU == 00) | EXL | ERL

Supervisor level goes to the user side. For another architecture, only this block changes:
on IA-64, for example, kernel would be `PSR.cpl == 0`.

## The split history (the part that needs care)

`split_history` holds the two registers (`bhsr` instances) and is shared by every predictor.
Each register holds the last N directions of its own mode's conditional branches, with 1 for
taken. The newest direction enters at the most significant bit.

**Selection.** The mode of the branch being predicted picks the register, combinationally.
Switching modes costs nothing: nothing is copied and nothing is flushed. On a kernel visit the
user register simply stops moving, so when the program resumes it finds exactly the history it
left (`tb_split_bhsr_gshare` checks this on every return).

**Speculation.** A predictor has to produce the next prediction before the previous branch
has resolved. So the predicted direction is shifted into the selected register at the clock
edge after the prediction. Each prediction also returns the history it used (`pred_hist`). The
front end keeps that checkpoint with the branch.

**Repair.** When a branch turns out to have been mispredicted, the front end presents
`res_valid` with the branch's mode, its checkpoint and its true direction. The register of that
mode is reloaded with the checkpoint shifted by the true direction. That discards the
directions of every younger branch, which are on the wrong path and will be squashed. A repair
beats a prediction in the same cycle. The other mode's register is not touched.

**Kernel-entry zeroing (optional).** With `ZERO_K_ON_ENTRY = 1`, the first kernel prediction
after a user one sees an all-zero kernel history, and the K-BHSR restarts from zero. This
variant was found to perform about the same as the plain scheme: what matters is keeping user
state out of the kernel's history, not which history the kernel starts from. It is therefore
off by default. `k_entry` flags kernel entries in either setting.

## Interface of every predictor: predict, resolve, commit

All predictors share a three-port protocol. It follows a front end in which histories are
updated speculatively and counters are trained in program order at commit.

| port    | when                     | inputs                                  | effect |
|---------|--------------------------|-----------------------------------------|--------|
| predict | branch fetched           | `pred_valid`, `pred_pc`, `pred_mode`    | prediction and bookkeeping outputs in the same cycle; history shifts at the edge |
| resolve | branch mispredicted      | `res_valid`, `res_mode`, `res_hist`, `res_taken` | that mode's history repaired at the edge |
| commit  | branch retires, in order | `cmt_valid`, the branch's returned index (or indices), `cmt_taken` | counter(s) stepped at the edge |

The caller stores what the predict port returned (index, history, and, depending on the
predictor, the choice, the component directions or the mode). It hands those back unchanged
on resolve and commit; the predictor keeps no per-branch state of its own. Tables are read
combinationally, so a commit in cycle *t* is visible to predictions from cycle *t+1* on.

**Reset.** Histories and the mode tracker reset to zero and user. Counter tables cannot be
reset in one cycle if they are RAMs, so each `bht` clears itself with a sweep: one entry per
cycle to "weakly not taken" (2'b01). `ready` stays low until the largest table is done. That is
2^15 = 32,768 cycles for the top at default sizes. Commits offered before `ready` are dropped.

Counters are 2-bit saturating. A counter predicts taken when its upper bit is set (the helpers
are in `os_aware_pkg`).

## The predictors

### `split_bhsr_gshare`: split history, one table

    index = (mode == kernel ? K-BHSR : U-BHSR) XOR pc[16:2]        (HIST_BITS = 15)
    prediction = BHT[index][1]                                     (32K counters)

User and kernel branches still divide the one table, but dynamically. Neither side can end up
with less table than in a conventional Gshare of the same size.

### `split_gshare`: split history and split tables

    user:   U-BHT[U-BHSR(14) XOR pc[15:2]]    16K counters
    kernel: K-BHT[K-BHSR(11) XOR pc[12:2]]     2K counters

The mode bit picks the prediction from one table and routes each commit to that same table
(`cmt_mode`). Indices and histories are carried at 14 bits, the kernel's zero-extended. This
removes user/kernel aliasing completely, at the price of a user table half the size. That can
cost accuracy on programs with many user branch sites.

### `os_aware_bimode`

This is Bi-Mode: a choice table (16K counters) indexed by address picks one of two direction
tables (16K each). The direction tables are indexed by split history XOR address. Only the
chosen direction table is trained. The choice counter is trained with the outcome, except
when it chose against the outcome and the chosen direction counter was right anyway. In all
this is 48K counters, 1.5 times the Gshare budget.

### `os_aware_agree`

The counters (32K, indexed by split history XOR address) predict whether the branch will
*agree* with its biasing bit, not its direction. The biasing bit lives in the host's branch
target buffer (2K entries) and is set from the branch's first outcome. The bit arrives on
`pred_bias` and returns on `cmt_bias`. The prediction is the bias when the counter's upper bit
is set, and its complement otherwise.

### `os_aware_multi_hybrid`

Five component predictors share a 32K-counter budget. In priority order they are: 2bc (4K
counters indexed by address), GAs (4K: 8 global-history bits concatenated with 4 address
bits), Gshare (16K, split history), Pshare (8K, indexed by a 13-bit local history from a
1K-entry table XOR address) and always-taken. Each address selects one of 2K entries of five
2-bit selection counters, standing in for the copies a host would keep in its branch target
buffer. The prediction comes from the highest-priority component whose selection counter is
3, or from always-taken if none is. At commit:

* If some component that was right has its selection counter at 3, the wrong components'
  selection counters are decremented.
* Otherwise the right components' selection counters are incremented.

All selection counters start at 3. Only the Gshare component is OS-aware. GAs keeps one
conventional global register, with the same speculative update and repair, and local
histories are updated at commit. The low 4 bits of `pred_gas_idx` are address bits passed
straight through.

**Split-table form.** With `GS_K_BITS > 0`, the Gshare component becomes a split Gshare: a
U-BHT of 2^`GS_BITS` counters and a K-BHT of 2^`GS_K_BITS`, each with its own mode's history.
The commit then needs the branch's mode (`cmt_mode`). The top builds this form with an 8K U-BHT
and a 2K K-BHT, half the Gshare share plus the fixed kernel table. The other four components
stay shared by both modes.

### `split_agree`

Agree with split tables: a U-BHT of 16K agree counters and a K-BHT of 2K, each indexed by its
own mode's history XOR address. That is 18K counters in place of the 32K of `os_aware_agree`.
The biasing bit is handled exactly as there. `cmt_mode` routes training to the right table.

### `split_bimode`

Bi-Mode with split direction tables. The user side has a taken table and a not-taken table of
8K counters each (16K together), and the kernel side 1K each (2K together). One choice table of
16K counters, indexed by address, is shared by both modes: it records each branch's own bias,
and user and kernel branches do not share addresses. The update rules are those of
`os_aware_bimode`, applied to the direction tables of the branch's mode.

## Parameters (defaults)

| module | parameter | default | meaning |
|---|---|---|---|
| `split_bhsr_gshare` | `HIST_BITS` | 15 | history length = log2(table entries) |
| `split_gshare` | `U_BITS`, `K_BITS` | 14, 11 | U-BHT 16K, K-BHT 2K |
| `os_aware_bimode` | `HIST_BITS`, `CHOICE_BITS` | 14, 14 | direction tables 2 x 16K, choice 16K |
| `os_aware_agree` | `HIST_BITS` | 15 | 32K counters |
| `os_aware_multi_hybrid` | `GS_BITS`, `PS_BITS`, `BC_BITS`, `GAS_HBITS`+`GAS_ABITS`, `LHT_BITS`, `SEL_BITS` | 14, 13, 12, 8+4, 10, 11 | component sizes |
| `os_aware_multi_hybrid` | `GS_K_BITS` | 0 | 0: split history only; otherwise K-BHT size of the split Gshare component |
| `split_agree` | `U_BITS`, `K_BITS` | 14, 11 | U-BHT 16K, K-BHT 2K |
| `split_bimode` | `U_BITS`, `K_BITS`, `CHOICE_BITS` | 13, 10, 14 | user 2 x 8K, kernel 2 x 1K, choice 16K |
| all predictors | `PC_LSB` | 2 | lowest address bit used |
| all predictors | `ZERO_K_ON_ENTRY` | 0 | kernel-entry zeroing variant |

The 32K default is the size at which the headline accuracy results are usually quoted. For
other sizes in the 8K to 256K range, change `HIST_BITS` (13 to 18). For the split Gshare, the
user table is half the equivalent Gshare and the kernel table stays at 2K.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each block bench keeps an independent
model of the histories and tables and compares every prediction with it. The benches drive
small parameter values, random branch streams with user and kernel bursts, commits a few
branches behind and random repairs:

* `tb_mode_decode`: every KSU/EXL/ERL combination plus random status words.
* `tb_bht`: the exact length of the clearing sweep, saturation at both ends, read after write.
* `tb_bhsr`: shifts, repairs, clears and their priorities.
* `tb_split_bhsr_gshare`: the plain scheme and the zeroing variant side by side. It also checks
  that the user history is unchanged across each kernel visit.
* `tb_split_gshare`: both tables. It also checks that kernel training leaves the user counter
  at the same index alone.
* `tb_os_aware_bimode`, `tb_os_aware_agree`, `tb_split_bimode`, `tb_split_agree`: each
  scheme's prediction and update rules. The Bi-Mode benches exercise the skipped choice update.
  The split-table benches require both the user and the kernel tables to be trained.
* `tb_os_aware_multi_hybrid`: the shared-table and split-table forms side by side, each against
  its own model. At least three components must win selections in each.

`tb_os_aware_bp_top` runs the top at its default sizes, end to end. The bench generates a
300,000-branch trace:

* A user loop of 64 branch sites: loop, biased, correlated and periodic branches.
* Interrupting it, kernel visits: a one-branch TLB refill handler entered with EXL set; a
  six-branch scheduler scan whose outcomes follow a slowly drifting system load; and an
  exception dispatch tree (not-taken, not-taken, taken, or not-taken three times then taken).

A pipeline model keeps at most four unresolved branches in flight and resolves and commits
them in order. When any predictor mispredicts, all histories are repaired, younger branches
are squashed and fetch restarts. The bench checks every split-Gshare prediction against its
own model. It counts every mechanism, and each must occur: mode switches both ways, kernel
entry through EXL and through KSU, repairs, squashes, fetch stalls, commits to both split
tables, both Bi-Mode tables (both kernel tables in the split form), Agree disagreements in both
forms, and Multi-Hybrid selections in both forms. Every
predictor must be right on more than 80% of branches. With the default random seed it
reports:

| predictor (default size) | mispredicted of 300,000 |
|---|---|
| conventional 32K Gshare, one history (bench model) | 47,008 |
| split-history Gshare, 32K | 41,849 |
| split Gshare, 16K + 2K | 45,353 |
| OS-aware Bi-Mode | 26,503 |
| OS-aware Agree | 42,254 |
| OS-aware Multi-Hybrid | 7,085 |
| Agree, split tables, 16K + 2K | 35,464 |
| Bi-Mode, split tables, 16K + 2K direction counters | 18,297 |
| Multi-Hybrid, split Gshare component 8K + 2K | 7,155 |

On this trace, splitting the history removes 28% of the *user* mispredictions (24,017
against 33,412). Kernel mispredictions *rise* (17,832 against 13,596). Here the kernel's own
history is a random sequence of visit types, so it takes more contexts to train than the
periodic user history the shared register offers. The split tables do better in the kernel:
the split Bi-Mode makes 3,869 kernel mispredictions against 10,571 for its split-history form,
and the split Agree 12,794 against 17,345. A synthetic stream only exercises the
mechanisms. It says nothing reliable about accuracy on real operating-system workloads, and
no such trace was run.

`tb_size_sweep` builds both Gshare forms at every budget from 8K to 256K counters. It also
builds the kernel-zeroing variant at 32K. One 100,000-branch trace of the same shape runs
through all of them. Branches go one at a time: each is predicted, then committed with a repair
if it was mispredicted. Every prediction of all 13 instances is checked against a model, and so
is the length of each clearing sweep. The bench prints user + kernel mispredictions for each
size, next to a modelled conventional Gshare of that size:

| budget | conventional Gshare | split history | split tables (U-BHT = budget/2, K-BHT 2K) |
|---|---|---|---|
| 8K | 12,565 + 4,589 | 2,638 + 4,295 | 1,802 + 3,631 |
| 16K | 13,932 + 4,490 | 6,198 + 4,478 | 2,578 + 3,631 |
| 32K | 13,391 + 4,560 | 1,730 + 4,795 | 5,753 + 3,631 |
| 64K | 12,891 + 4,731 | 1,747 + 5,128 | 1,721 + 3,631 |
| 128K | 14,417 + 4,740 | 1,755 + 5,480 | 1,746 + 3,631 |
| 256K | 15,246 + 4,887 | 2,132 + 5,745 | 1,751 + 3,631 |

With kernel zeroing at 32K the figures are 1,721 + 659. The kernel visits in this trace do not
depend on one another, so a fresh kernel history suits them. The jumps from size to size come
from how the 64 user sites happen to collide in each table; they are not a trend.

## What is this design's own

These follow the published scheme: the split history registers chosen by the status
register's mode bit; the split tables with sizes 16K + 2K, also for Agree and Bi-Mode, and a
user table of half the Gshare share for the Multi-Hybrid; Gshare indexing; speculative
history with correction on misprediction and in-order counter training; the Bi-Mode, Agree and
Multi-Hybrid component lists, sizes and priority order; and the zeroing variant.

These are choices made here, where the source is silent:

* the status-register bit positions, EXL and ERL counting as kernel, supervisor counting as
  user;
* the shift direction and the address bits used;
* the checkpoint-based repair and the three-port protocol;
* combinational table reads and the clearing sweep with its initial value;
* the Bi-Mode division of its 1.5x budget, the equal taken/not-taken halves of its split
  tables and the one shared choice table;
* the Agree and Bi-Mode update rules and the Multi-Hybrid selection rule, taken from the usual
  forms of those predictors;
* the GAs split and the Pshare local-history table in the Multi-Hybrid.

Not included:

* the host processor and its branch target buffer, whose signals are ports;
* any power gating of the unused table in the split-table predictors. Both of the tables are
  read every cycle.

## Simulating

Verilator 5 is enough. From the project root:

    verilator --binary --timing -Irtl -y rtl rtl/os_aware_pkg.sv tb/tb_os_aware_bp_top.sv \
              --top-module tb_os_aware_bp_top -o sim
    ./obj_dir/sim

Any other bench runs the same way: name its file and module. Every bench ends with a line
`TB_RESULT checks=N failures=M`. The end-to-end bench takes about a second after a few seconds
of compilation. The package `os_aware_pkg.sv` must come first on the command line; `-y rtl`
finds the rest. To lint a module on its own:

    verilator --lint-only -Wall -Irtl -y rtl rtl/os_aware_pkg.sv rtl/split_gshare.sv

## Files

| file | content |
|---|---|
| `rtl/os_aware_pkg.sv` | mode enum, 2-bit counter type and update functions, address width |
| `rtl/mode_decode.sv` | status register to mode bit |
| `rtl/bhsr.sv` | one history shift register with speculative shift, repair, clear |
| `rtl/split_history.sv` | U-BHSR and K-BHSR behind a mode-selected port |
| `rtl/bht.sv` | table of 2-bit counters with clearing sweep |
| `rtl/split_bhsr_gshare.sv` | Gshare with split history |
| `rtl/split_gshare.sv` | Gshare with split history and split tables |
| `rtl/os_aware_bimode.sv`, `rtl/os_aware_agree.sv`, `rtl/os_aware_multi_hybrid.sv` | the three other predictors with split history (Multi-Hybrid optionally with split tables) |
| `rtl/split_bimode.sv`, `rtl/split_agree.sv` | Bi-Mode and Agree with split history and split tables |
| `rtl/os_aware_bp_top.sv` | all of the above side by side |
| `tb/tb_*.sv` | one self-checking bench per module, the end-to-end bench and the size sweep |
