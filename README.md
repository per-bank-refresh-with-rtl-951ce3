# AETR: per-bank DRAM refresh with adaptive early termination

DRAM cells lose their charge, so every row must be refreshed within its
retention time. Commodity parts refresh every row every 64 ms, sized for the
weakest cell, though almost all rows hold their data far longer. Refreshing
one bank at a time (per-bank refresh) lets the other banks of the rank keep
serving reads and writes. But it needs more refresh commands, and each costs
extra time and energy.

Adaptive early termination refresh (AETR) combines per-bank refresh with
skipping. The rows of a bank are split into small *base row groups*, each
classed as either

* **short** (holds a weak cell): refreshed every 64 ms, or
* **long**: refreshed every 256 ms.

Neighbouring base groups of the same class are merged into larger row
groups. Each row group carries a 4-bit flag in its first row. Reading that
flag every 64 ms tells the controller two things. It says whether the rest of
the group must be refreshed now. It also gives the group's size, which says
where the next group starts. One flag read can therefore skip up to 32 base
groups at once. Only the bank being refreshed is ever blocked.

This repository holds synthesizable SystemVerilog for the refresh side of the
scheme. That is the flag builder, the flag store, the refresh timing, the
per-bank Refresh Counters, the refresh controller, and the per-bank access
gate. It also holds self-checking testbenches for every block and for the
whole design, at reduced and at full size.

## The flag

```
 bit 3        bits 2..0
 ret_short    size_code   000 001 010 011 100 101 110 111
                size  =    1   2   3   4   8  16  24  32   base row groups
```

`ret_short = 1` marks a 64 ms group and `0` a 256 ms group. The flag is
`aetr_pkg::flag_t`. `aetr_flag_decode` turns the code into the size.

Only 4 bits are spent per group, so the split between class and size is a
trade-off. This design uses 1 class bit and 3 size bits. A 2:2 split (four
classes of 64/128/256/512 ms, sizes 1/2/4/8) is the alternative that was
rejected. It needs roughly six times as many refresh commands, because large
groups save more than finer retention classes do. The 2:2 split is not built.

## Building the groups (`aetr_flag_builder`)

Groups are built from a retention profile: one bit per base group, 1 = weak.
The profile comes from retention testing of the device, which lies outside
this design. It is streamed in bank by bank, group 0 first, over a
valid/ready handshake. The builder works in two steps:

1. It collects a *run* of consecutive base groups with the same bit. A run
   is at most 32 long and never crosses a bank boundary.
2. It cuts the run into pieces of allowed sizes, largest piece first, and
   writes `{bit, code}` at the first base group of each piece. It writes one
   piece per cycle and stalls the stream meanwhile.

The rule is that two neighbours merge only if their class bits agree and the
merged size is on the list. Cutting largest-first is this design's way of
carrying out that rule. Worked example, 16 base groups, only group 11 weak:

| base groups | flag written | group |
|---|---|---|
| 0–7 | `0_100` at 0 | long, 8 |
| 8–10 | `0_010` at 8 | long, 3 |
| 11 | `1_000` at 11 | short, 1 |
| 12–15 | `0_011` at 12 | long, 4 |

Groups 0–10 are all long, but they cannot form one group: 11 is not an
allowed size. So the run splits into 8 + 3. The testbenches check exactly
this layout.

Only the entries at group starts are written. The other entries of
`aetr_flag_store` are never read and are not reset. The store is one 4-bit
entry per base group per bank (8 × 32768 × 4 = 1 Mbit by default). It has
one write port and one synchronous read port with one cycle of latency. In a
real device these bits are extra cells in the first row of each group. Here
they are a separate array.

## Walking a bank: Refresh Counter and early termination

Each bank has a **Refresh Counter** (`aetr_refresh_counter`). It holds the
index of the first base group of the bank's next row group. For each group
it visits, `aetr_refresh_controller` does the following:

1. It reads the flag at `{bank, counter}`.
2. It decides:
   * `ret_short = 1`: refresh the whole group;
   * `ret_short = 0` in a long round (one window in four): refresh the whole group;
   * `ret_short = 0` otherwise: **early termination**. Only the flag row is
     read, which also refreshes it, and the rest of the group is skipped.
3. It issues the command (`cmd_valid`, `cmd_bank`, `cmd_group`, `cmd_size`,
   `cmd_refresh`) and adds the group size to the counter.

When the counter would step past the end of the bank, it returns to 0 and
marks the bank done for the current 64 ms window.

The 256 ms groups are refreshed in the window where `round_idx == 0`.
Between two such windows, the flag rows of those groups are still read every
64 ms. Flags and slots are fixed, so each group is met at the same point of
every window. Its refresh interval is therefore 64 ms (short) or 256 ms
(long). Only the wait for an access in flight can shift it, by a few cycles.

## Timing: windows, slots and bank busy time

The timing is the least obvious part, and almost all of it is this design's
own choice.

* **Window.** `aetr_refresh_timer` counts `T_WINDOW` cycles: 64 ms at a
  667 MHz clock, 42,688,000 cycles. `window_start` restarts every Refresh
  Counter. `round_idx` counts windows modulo 4.
* **Slots.** A `tick` comes every `T_TICK` cycles. Each tick goes to the next
  bank in round-robin order. If that bank is already done, the slot goes
  unused. `T_TICK = T_WINDOW / (N_BANKS*GROUPS + 1)`, which is 162 cycles
  (about 244 ns). That gives every base group its own slot, so a round
  finishes even if no group was merged. When groups are merged, a bank
  finishes early and stays idle for the rest of the window. The first tick
  of a window coincides with `window_start` and is not used, hence the `+ 1`.
* **Per command.** The command runs tick → flag read → decode → wait until
  the bank has no access in flight → issue. A tick that arrives meanwhile is
  held and served next.
* **Busy time.** After a command, the bank is busy for `T_FLAG` cycles
  (read the flag row). A refresh adds `size × T_REF_BASE` cycles.
  `T_FLAG = 18` is tRCD + tRP (13 ns each). `T_REF_BASE = 18` is an assumed
  value. A bank gets a slot only every 8 × 162 = 1296 cycles, and even a
  32-group refresh (594 cycles) ends before its next slot.
* **Guard.** `deadline_miss` (sticky) is set if a bank has not finished its
  round when the next window starts. With the default parameters this
  cannot happen. With other parameters it tells you the slots are too
  sparse.

The statistics outputs count the same quantities as a refresh-overhead
comparison does. `n_cmd` counts issued commands, `n_refresh` counts commands
that refreshed rows, and `n_ref_cycles` counts cycles spent refreshing.

## Per-bank parallelism (`aetr_bank_gate`)

Each bank has its own access handshake, `acc_valid[b]`/`acc_ready[b]`. An
accepted access occupies its bank for `T_ACCESS = 27` cycles, which is
tRCD + CL + tRP. When the controller wants bank *b*, it raises `ref_req[b]`.
From then on:

* bank *b* accepts no new access (`acc_blocked[b]` shows a request held back);
* the refresh starts once the access in flight has finished (`bank_free[b]`);
* all other banks keep accepting accesses.

Assertions check both rules. The gate stands in for the per-bank admission
logic of a real memory scheduler (FR-FCFS with request and command queues),
which is not part of this design.

## Top level and defaults

`aetr_top` wires the builder, store, timer, controller and gate together.
Its ports are plain vectors:

| group | ports |
|---|---|
| flag build | `build_start`, `prof_valid`/`prof_ready`/`prof_short`, `build_busy`, `build_done` |
| refresh | `refresh_en`, `window_start`, `round_idx`, `cmd_*`, `ref_busy[N_BANKS]` |
| accesses | `acc_valid`, `acc_ready`, `acc_blocked` (one bit per bank) |
| statistics | `n_cmd`, `n_refresh`, `n_ref_cycles`, `deadline_miss` |

To use it:

1. Hold `refresh_en` low.
2. Pulse `build_start` and stream `N_BANKS*GROUPS` profile bits until
   `build_done` is high.
3. Raise `refresh_en`.

| parameter | default | origin |
|---|---|---|
| `N_BANKS` | 8 | DDR3 rank with 8 banks |
| `GROUPS` | 32768 | 8192 refresh groups per 64 ms per bank, base group = ¼ of a per-bank group |
| `T_WINDOW` | 42,688,000 | 64 ms at 667 MHz |
| `LONG_ROUNDS` | 4 | 256 ms / 64 ms |
| `T_TICK` | 162 | derived, see above (own choice) |
| `T_FLAG`, `T_REF_BASE`, `T_ACCESS` | 18, 18, 27 | DDR3 13-13-13 ns timings; `T_REF_BASE` assumed |

Reset (`rst_n`) is active low and asynchronous. It clears all control
state, but not the flag store.

## Departures and choices to be aware of

* The 64/256 ms classes, the 1:3 flag, the size list, the merge rule and the
  size-stepping Refresh Counter follow the published scheme. The rest is this
  design's own choice:
  * cutting runs largest piece first;
  * round-robin slot pacing with one slot per base group;
  * which of four windows is the long round;
  * the busy-time model and the access gate;
  * all handshakes and the reset behaviour.
* The cycle counts assume a 667 MHz clock. That is a DDR3-1333-class bus; a
  DDR3-1866 part would run at 933 MHz. For another clock, change
  `T_WINDOW`, `T_FLAG`, `T_REF_BASE` and `T_ACCESS`.
* The flags are built once, before refresh starts. Re-profiling while
  refresh runs is not supported.
* The DRAM device (cell array, decoders, row buffer), the retention
  profiling, the memory scheduler and the processor system are outside the
  design. The refresh command and access handshake are brought out as ports.

## Testbenches and how to run them

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_aetr_flag_decode` | all 16 flags |
| `tb_aetr_refresh_counter` | random steps against a model, wrap, clear |
| `tb_aetr_refresh_timer` | window and slot positions, round sequence, enable |
| `tb_aetr_flag_store` | random read/write against a model, read-during-write |
| `tb_aetr_flag_builder` | the worked example; random profiles in 3 banks against an independent greedy model; all 8 sizes occur |
| `tb_aetr_refresh_controller` | order, group, size, refresh/skip and exact busy time of every command; one visit per group per window; counters; `deadline_miss` on a short window |
| `tb_aetr_bank_gate` | ready/free/blocked every cycle against an occupancy model |
| `tb_aetr_top` | whole design, 8 banks × 128 groups, six windows |
| `tb_aetr_full` | whole design at default size: 262,144 base groups, eight 64 ms windows = 512 ms (342 M cycles); prints commands, refreshing commands and refresh cycles over the 512 ms |

`tb_aetr_top` and `tb_aetr_full` share the stimulus and checker in
`tb/aetr_check_env.sv`. It generates a random profile, computes the expected
groups independently, streams the profile with gaps, and then drives random
accesses. It checks:

* every command's group, size and refresh/skip decision;
* that every base group is refreshed within 64 ms (weak) or 256 ms (long),
  plus one slot;
* that every flag row is read within 64 ms plus one slot.

It also requires each of these to have happened at least once: a skip, a
refresh of a short group, a refresh of a long group, every size, a finished
round, an access served while another bank refreshes, and an access held back
by a refresh. The full-size run takes just under two minutes of wall-clock
time. It produces 8,890 merged groups from 262,144 base groups. Over 512 ms
it issues 71,120 commands, of which 72% only read the flag row. It spends
10.8 M bank-busy cycles on refresh, about 152 cycles per command.

Build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  rtl/aetr_pkg.sv tb/tb_aetr_top.sv --top-module tb_aetr_top -Mdir obj_top -o sim
obj_top/sim
```

Replace `tb_aetr_top` with any testbench name. To lint the RTL:
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/aetr_pkg.sv rtl/aetr_top.sv`
(it reports only style warnings about `rst_n` being used by both the flops
and the assertions).
