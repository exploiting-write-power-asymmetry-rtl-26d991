# WPAS: write-power-asymmetry scheduling for a PCM main memory

Phase-change memory (PCM) writes draw a lot of current, and each chip can only
supply so much at once. A memory controller therefore caps how many writes run
in parallel. The cap depends on what those writes do to the cells. Writing a 0
(RESET: short, high current) costs more power than writing a 1 (SET: long, low
current), typically 2x to 5x. A controller that charges every changed bit as if
it were a RESET overestimates the power of most writes. It then serialises
writes that could have run together.

This RTL implements the alternative scheme, WPAS, from *Exploiting write power
asymmetry to improve phase change memory system performance* (Wang, Wang, Hou):

1. The last-level cache (LLC) keeps one small counter per PCM chip in every
   line. Each time the upper cache writes a line back, the counter adds the
   power the changes will cost. A bit that becomes 0 costs `POWER_RATIO` units
   and a bit that becomes 1 costs one unit.
2. When the line is evicted, the counters travel with it to the memory
   controller. Sending them takes one extra cycle on the channel (`t_MOD`).
3. For each rank, the memory controller keeps a *power pool*: the units each
   chip can still supply. A write may start only if every chip's counter fits
   in that chip's pool entry. Issuing the write subtracts the counters, and
   completing it adds them back.

Because the unit is one SET, a pool of `POWER_RATIO x CHIP_BUDGET` units holds
the same physical power as `CHIP_BUDGET` RESETs. Writes that mostly set bits
are charged less, so more of them fit at once.

## Worked example (four chips, 4-bit banks, ratio 2, budget 4 RESETs per chip)

| | chip0 | chip1 | chip2 | chip3 |
|---|---|---|---|---|
| bank A old data | 1001 | 0011 | 1010 | 1000 |
| bank B old data | 1000 | 0000 | 0001 | 1000 |
| write X to bank A | 1010 | 1011 | 1000 | 1111 |
| X, content-blind count | 2 | 1 | 1 | 3 |
| X, WPAS count | 3 | 1 | 2 | 3 |
| write Y to bank B | 1111 | 1001 | 1000 | 0000 |
| Y, content-blind count | 3 | 2 | 2 | 1 |
| Y, WPAS count | 3 | 2 | 3 | 2 |

- **Content-blind accounting.** The pool starts at 4 per chip. X leaves
  2, 3, 3, 1. Y needs 3 units on chip0, where only 2 remain, so Y waits until
  X completes.
- **WPAS.** The pool starts at 8 per chip. X leaves 5, 7, 6, 5, and Y fits
  at once.

With the timing used in the example (t_AL=0, t_CWD=1, t_WR=6, t_RP=4,
t_BURST=4, t_MOD=1):

- Under WPAS, Y issues 5 cycles after X. Only the data burst and the counter
  cycle separate them.
- Under content-blind accounting, Y issues 11 cycles after X, when X has
  returned its power.

`tb_mod_calculator`, `tb_power_pool` and `tb_cmd_scheduler` reproduce these
numbers exactly.

## Block structure

```
wpas_top
├── llc                      set-associative write-back LLC with per-chip counters
│   └── mod_calculator       old/new comparison, weighted count, saturating add
└── mem_controller
    ├── txn_queue            32-entry FIFO from the LLC
    ├── addr_map             line address -> rank/bank/row/column (4 schemes)
    ├── cmd_queue  x RANKS   32-entry age-ordered queue with counter copies
    ├── power_pool x RANKS   per-chip budget, comparator, consume/release
    └── cmd_scheduler        picks and times commands for the channel
```

Shared sizes and types live in `rtl/wpas_pkg.sv`:

- the 512-bit line and 8 chips of 64 bits each;
- 4-bit counters;
- 2 ranks of 8 banks, 32768 rows and 1024 columns;
- the `txn_t` (LLC to controller) and `cmd_t` (queued command) structs.

A line goes out as eight 64-bit beats on the channel. Chip *c* is x8 and owns
byte lane *c* of every beat. So bit *k* of the line belongs to chip
`(k mod 64) / 8`.

The processor with its L1/L2 caches and the PCM devices are outside the RTL.
Their signals are the top-level ports:

- the upper-level cache port `req_*`/`resp_*`;
- the PCM channel `pcm_cmd_*` and `pcm_r*`.

## Counters (`mod_calculator`, `llc`)

The comparison is combinational. The LLC reads the old data while it matches
the tag, so the comparison adds no cycle. Counters only ever grow between fill
and eviction. A bit that flips twice is charged twice, which is conservative.
A fill from memory clears them.

**Saturation is the part to understand before using this design.** A 4-bit
counter holds at most 15 units, which is 7 RESETs. A chip's share of a line
(64 bits) can need up to 128 units. The power pool therefore treats a
saturated counter (15) as "may need everything": the write is charged the
chip's whole capacity and can only run with no other write drawing from that
chip. This keeps the power limit safe. It is expensive when lines change
heavily, though.

With about 11 changed bits per chip, which matches the average modification
rate reported for the evaluated workloads, weighted counts near 15 are common
when fewer than ~70 % of the changed bits are ones.

## Power pool and issue rule (`power_pool`, `cmd_scheduler`)

Each rank has its own pool of `CHIPS` entries. The reset value is full
capacity, `POWER_RATIO * CHIP_BUDGET`. The comparator checks every slot of the
rank's command queue in parallel. It uses `need <= available`, so a write that
exactly exhausts a chip may issue.

Each cycle the scheduler issues at most one command. A command is ready when:

- its bank is idle (close-page policy: one access per bank at a time);
- no older command in the same queue targets the same bank, which preserves
  read-after-write order to a line;
- the channel is free: `t_BURST` after a read, `t_BURST + t_MOD` after a
  write;
- for a write, all eight counters fit the rank's pool.

Within a rank the oldest ready command wins, and ranks alternate round-robin.
Timing of an issued command:

- **Write.** Holds its bank and its power for `t_AL + t_CWD + t_WR + t_RP`
  cycles. Its charge returns to the pool in the cycle the bank becomes free.
- **Read.** Holds its bank for `t_RCD + t_CL + t_BURST + t_RP` cycles. Its
  data returns from the channel with the line address as tag.

## Parameters

Defaults are the main configuration of the published evaluation where one
exists.

| parameter | default | origin |
|---|---|---|
| `LLC_SETS`, `LLC_WAYS` | 32768, 16 | 32 MB, 16-way, 64 B lines |
| `LLC_LAT` | 20 | LLC latency |
| `POWER_RATIO` | 2 | RESET/SET power; 3 and 5 also evaluated |
| `CNT_W` (package) | 4 | bits per chip counter |
| `TQ_DEPTH`, `CQ_DEPTH` | 32, 32 | transaction queue, command queue per rank |
| `SCHEME` | 2 (row:col:bank:rank) | 1 = rank:row:col:bank, 3 = row:col:rank:bank, 4 = row:rank:bank:col |
| `T_BURST`, `T_MOD` | 4, 1 | data burst, counter transfer |
| `T_AL`, `T_CWD`, `T_WR` | 0, 1, 6 | DDR3-style write timing |
| `T_RCD`, `T_RP` | 22, 60 | 55 ns and 150 ns at an assumed 2.5 ns clock |
| `T_CL` | 5 | own choice |
| `CHIP_BUDGET` | 16 RESETs per chip | own choice; the source gives no figure |

## Where this RTL departs from, or adds to, the published scheme

- **Saturation rule.** What happens when a 4-bit counter overflows is not
  specified. Here a saturated counter reserves the whole chip; see above.
- **Issue comparison.** The scheme is stated as "counter smaller than pool".
  The RTL issues on "counter not larger than pool", so that a chip's full
  budget can be used. Changing one comparison in `power_pool` restores the
  strict form.
- **Write occupancy.** One formula for the write interval includes `t_BURST`,
  but the timing diagram's span (11 cycles) does not. The RTL follows the
  diagram.
- **Memory timing.** `t_RP` is 150 ns for the evaluated memory but 4 cycles in
  the DDR3 timing example. The RTL defaults use 150 ns, at a memory clock
  chosen here. Activation is not a separate command.
- **Own choices.** These include the chip budget, CAS latency, scheduling
  order, same-bank ordering rule, and the channel interface. The channel
  carries a whole line per command, with the address as the read tag.
- **LLC simplifications.** The LLC is blocking: one request at a time. It uses
  round-robin replacement. A write-back that misses fetches the line first,
  since the old data is needed for the comparison. After reset it clears its
  valid bits one set per cycle: 32768 cycles at full size, with `init_done`
  signalling the end.
- **One channel** is modelled.
- **Not built.** The sub-rank variant (one chip per write, evaluated as
  "WPAS-S") is not built: here every write spans all eight chips of a rank.
  The processor, L1/L2 caches and PCM cells are outside the RTL.
- **Content-blind baseline.** The content-blind accounting used for
  comparison is the same RTL with `POWER_RATIO = 1`, so every changed bit
  costs one unit against a pool of `CHIP_BUDGET`.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_mod_calculator` | worked-example counts for both accountings; random lines against a bit-level reference at ratios 1, 2, 3 and 5, including saturation |
| `tb_power_pool` | worked-example pool values; random consume/release against a model; saturated counters |
| `tb_txn_queue`, `tb_cmd_queue` | order, contents, full/empty, removal from any slot |
| `tb_addr_map` | every address bit lands in the right field for all four schemes |
| `tb_cmd_scheduler` | 5- and 11-cycle issue spacing of the worked example; random traffic: bank, channel, power and ordering rules, exact release time |
| `tb_llc` | 20-cycle hit latency; read data; each eviction carries the latest data and exactly the expected counters |
| `tb_mem_controller` | address decoding; read-after-write data; no power or bank violation in the channel model; overlapping writes and power stalls occur |
| `tb_wpas_top` | end to end with a small LLC (details below) |
| `tb_wpas_top_full` | every parameter at its default (details below) |
| `tb_workload_mix` | synthetic workloads on two controllers (details below) |
| `tb_power_ratio_sweep` | the same workloads at power ratios 2, 3 and 5 (details below) |
| `tb_config_sweep` | the same workloads at command queue depths 8 to 64 and with all four address mappings (details below) |

`tb/pcm_channel_model.sv` is a behavioural model of the PCM ranks. It stores
data and answers reads. It also checks the physical limit independently of the
controller's bookkeeping: it computes the real cost of each write from the data
it replaces.

`tb_wpas_top` runs end to end with a small LLC and must see each mechanism at
least once:

- LLC hit, miss and dirty eviction;
- a saturated counter;
- overlapping writes;
- a power stall and a bank stall;
- both ranks used;
- a read served during a write.

`tb_wpas_top_full` runs the full 32 MB LLC with every parameter at its default.
It fills one set and checks the eviction of a twice-modified line: its data and
its per-chip counters. It then reads the line back from PCM.

`tb_workload_mix` feeds the same synthetic stream to two controllers. One uses
power-aware accounting with 4-bit counters. The other uses content-blind
accounting with 3-bit counters, the size used by the baseline. Twelve streams
are shaped by the read/write ratio and the share of ones among modified bits of
twelve SPEC CPU2006 workloads. Each stream is 400 transactions to 64 lines,
with `t_RP` = 60. The testbench reports completion times, for example:

| workload | R/W | ones share | speedup of completion time |
|---|---|---|---|
| lbm_m | 1.34 | 0.96 | 1.77 |
| libquantum_m | 2.64 | 0.98 | 1.53 |
| mcf_m | 4.03 | 0.55 | 1.09 |
| hmmmer_m | 1.03 | 0.49 | 1.21 |

These are memory-only times on synthetic traffic, not processor IPC.

It also prints how often 1, 2, 3 or 4 writes were in flight in a rank. For
lbm_m, two or more writes overlap in about 65 % of the busy cycles with
power-aware accounting, against about 11 % with content-blind accounting.
For the workloads with over 90 % ones, the testbench checks that writes overlap
more often under power-aware accounting.

`tb_power_ratio_sweep` runs the same streams at power ratios 2, 3 and 5. Here
the gain shrinks as the ratio grows, the opposite of the published trend, for example lbm_m 1.77, 1.64 and 1.41, and
mix_3 1.61, 1.10 and 0.97. A 4-bit counter holds 7 RESETs at ratio 2 but only
3 at ratio 5, so at high ratios most counters saturate and reserve a whole
chip. A larger pool would otherwise favour high ratios. Use a wider `CNT_W`
if the ratio is above 2.

`tb_config_sweep` spreads the lines over more columns and runs both
accountings at command queue depths 8, 16, 32 and 64 and with address mappings
1, 3 and 4. The gain grows from depth 8 to depth 16 or 32 on most streams, for
example mix_4 1.80, 1.95, 1.95 and 1.95. It barely changes beyond 32 on these
streams. All four mappings give a gain on the streams
with many ones.

If the baseline is also given 4-bit counters, the power-aware controller loses
on workloads with fewer than about 60 % ones. There the saturation rule above
dominates. A wider counter (change `CNT_W`) removes this.

## Simulating

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/wpas_pkg.sv tb/tb_wpas_top.sv --top-module tb_wpas_top
./obj_dir/Vtb_wpas_top
```

Replace `tb_wpas_top` with any other testbench name. All state that is read is
reset, so the two-state simulation starts cleanly from random initial values.
The full-size testbench builds a model with a 32 MB array. It needs about
0.5 GB to compile and runs in under a second.
