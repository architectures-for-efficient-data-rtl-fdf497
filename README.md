# Hardware engines for Apriori frequent-itemset mining

Apriori finds the sets of items that occur together in at least a given number of
transactions, such as the products bought together in a supermarket or the features
that appear together in network packets. It works level by level. It starts from the
frequent single items. It then builds candidate (m+1)-itemsets from the frequent
m-itemsets (*generation*), drops candidates that have an infrequent subset
(*pruning*), and counts how many transactions contain each remaining candidate
(*support*). Most of the time goes into support counting, because the whole database
has to be streamed past every candidate.

This RTL holds two FPGA-style engines for that kernel. They sit side by side in
`apriori_top` and share only the clock and reset:

* **A systolic array** of 560 identical units. Each unit holds one candidate. The
  database streams through the chain one item per cycle. The same units also perform
  candidate generation. Results are *injected* into the passing stream rather than
  sent over a separate bus.
* **A bitmapped CAM array** of 88 blocks of 16 candidates each. Each block keeps the
  few item codes its candidates use in a small CAM. A bitmap then says which
  candidates need the matched item. It counts support only, with one item per cycle
  and no stalls.

The host side is not part of this RTL: the processor, the memory that supplies the
stream, and pruning. Their connections are the top-level ports.

## Files

| file | contents |
|---|---|
| `rtl/apriori_pkg.sv` | token type, token kinds, modes, widths |
| `rtl/sys_set_comparator.sv` | local memory, index pointer, comparator, support counter of a unit |
| `rtl/sys_inject_ctrl.sv` | stall / injection controller and item buffer of a unit |
| `rtl/sys_unit.sv` | one systolic unit (the two above) |
| `rtl/sys_array.sv` | chain of `N_UNITS` units |
| `rtl/sys_controller.sv` | host front end of the array: feed, return, mode switch |
| `rtl/cam_array.sv` | shift-loaded CAM of item codes |
| `rtl/cam_encoder.sv` | match lines to bitmap row address |
| `rtl/bitmap_ram.sv` | candidate bitmap, one row per CAM entry |
| `rtl/cam_counters.sv` | per-candidate item counters and support counters |
| `rtl/bcam_block.sv` | one bitmapped CAM block |
| `rtl/bcam_array.sv` | `N_BLOCKS` blocks on one shared stream |
| `rtl/apriori_top.sv` | both engines |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## The systolic array

### Tokens

Everything that moves through the array is a `token_t` (`apriori_pkg`): a valid bit,
a 3-bit kind and a 32-bit payload.

| kind | meaning |
|---|---|
| `TK_ITEM` | an item of the set being streamed, more follow |
| `TK_LAST` | the last item of the set (every set or transaction ends with one) |
| `TK_RESULT` | a result that a unit injected |
| `TK_FLUSH` | end of a support pass: every loaded unit injects its support count |
| `TK_CLEAR` | every unit forgets its candidate and zeroes its support counter |

Item codes are 16 bits. Sets and transactions must be sorted in ascending order, with
no repeated items. The join rule below depends on that order, and so does the subset
test.

### One unit

A unit holds one candidate of up to `MAX_K` = 16 items in a small local memory
(`sys_set_comparator`). An index pointer selects one entry of that memory. The unit
behaves according to the array's mode:

* **Load**: an empty unit takes the next set that reaches it into its local memory.
  It swallows those tokens and sends bubbles downstream. Units therefore fill in
  order: the first set loaded goes to unit 0.
* **Support**: each streamed item is compared with `mem[index]`. On a match the
  pointer advances. Both sequences are sorted, so this merge is a subset test. When
  the pointer reaches the end of the candidate, the support counter steps once. The
  pointer returns to 0 at the end of each transaction. A `TK_FLUSH` makes the unit
  inject its count.
* **Generate**: the unit holds `c2 = (i1 … i(m-1), i*)`. A streamed set
  `c1 = (i1 … i(m-1), im)` with the same first m-1 items and `im < i*` makes the unit
  inject `i*` right after `c1`. The new candidate is `c1` followed by `i*`. Streaming
  all frequent m-itemsets past units that hold those same itemsets yields every
  (m+1)-candidate of the Apriori join exactly once.

### Injection and stall

This part needs the most care. A unit (`sys_inject_ctrl`) sits between the upstream
pipeline register and its own output register. Each cycle it does one of three
things: forward the incoming token, put a result into its output register, or drain
a result it parked earlier. Injecting holds the upstream units for one cycle. Units
downstream are not delayed at all: they simply see one more token. A pass over
*n* items that produces *r* results therefore takes *n + r* cycles at the array
output, plus the pipeline depth.

The controller follows this table. `gen` is the unit's one-cycle request to inject,
and `stall_mem` is set while the one-entry item buffer holds a parked result:

| in_stall | stall_mem | gen | out_stall | stall_mem next | action |
|:-:|:-:|:-:|:-:|:-:|---|
| 0 | 0 | 0 | 0 | 0 | forward the upstream token |
| 0 | 0 | 1 | 1 | 0 | result into the output register; upstream holds one cycle |
| 1 | 0 | 0 | 1 | 0 | everything holds |
| 0 | 1 | x | 1 | 0 | parked result into the output register |
| 1 | 0 | 1 | 1 | 1 | downstream stalled: result parked in the item buffer |
| 1 | 1 | x | 1 | 1 | everything holds |

So `out_stall = in_stall | stall_mem | gen`. No result is generated while the buffer
is full. A request always comes the cycle after a token was accepted, and a token is
only accepted with the buffer empty, so a request never meets a full buffer. An
assertion checks this.

`out_stall` is combinational from `in_stall`. A stall from the host therefore reaches
all 560 units within the same cycle. Timing closure of that OR chain is left to
whoever implements the array, for example by splitting it into registered
segments, which then need deeper item buffers.

The results that follow a flush token arrive in reverse unit order: unit
*N−1* first and unit 0 last. In generation mode, the results after a set come from
the matching units, highest-numbered first.

### Controller

`sys_controller` registers the host's valid/ready stream once before unit 0. It
returns the array output to the host as a valid/ready stream, and a host that is not
ready stalls the array. In support mode it raises `m_frequent` for every returned
support count that is at least `min_support`. Removing candidates remains the host's
job.

A mode change (`mode_we`, `mode_req`) closes the input and waits for the array to
empty. The array is empty once `N_UNITS+2` cycles pass, not counting cycles in which
the host stalls the array, with nothing leaving it. The new mode then takes effect
and `mode_busy` drops. This works because the front token of an unstalled array moves
every cycle.

### Running one Apriori level on the array

1. Load mode: send `TK_CLEAR`, then up to 560 candidates.
2. Support mode: send the whole database, then `TK_FLUSH`. Read one `TK_RESULT` per
   loaded unit after the returned flush token. If there are more candidates than
   units, repeat from step 1 with the next group. Each group costs one more pass
   over the database.
3. On the host: keep the candidates with enough support, which gives L(m).
4. Load L(m) into the units, switch to generate mode and stream L(m) through them.
   After each returned set, its `TK_RESULT` items give the new candidates.
5. On the host: prune, then continue at step 1 with the new candidates.

## The bitmapped CAM array

### Why it is faster

The systolic array needs one comparator per candidate item and moves every candidate
past every item. In real candidate sets, a few item codes are shared by many
candidates. For example, eleven 7-item candidates can together use only twelve
distinct codes. A block therefore keeps those codes in a 16-entry CAM. Each streamed
item is compared once per block instead of once per candidate item.

### One block (`bcam_block`)

```
data_in ─► CAM (16 codes) ─► encoder ─► bitmap RAM row (16 bits, one per candidate)
                                                    │
                     counter 0 … counter 15  ◄──────┘  (+1 where the bit is set)
                     at the transaction's last item: counter == size ⇒ support +1
```

* Cycle 0: CAM lookup, encoding and the bitmap RAM read address.
* Cycle 1: the bitmap row arrives from the registered read, and every candidate whose
  bit is set advances its item counter. If the item was the last of the transaction,
  each candidate whose counter equals its size gains one support. The item counters
  then restart.
* The support of a transaction is therefore visible two clock edges after its last
  item. One item enters every cycle, and there is no stall.

Each block is loaded while nothing streams:

1. `cam_clear` empties the CAM.
2. `cam_shift` shifts `data_in` into entry 0 and moves the other entries down. Of *n*
   codes shifted in, the *j*-th (counting from 0) lands in entry *n−1−j*.
3. `bm_we` writes the bitmap row for each entry.
4. `len_we` sets each candidate's size. A size of 0 marks an unused slot.
5. `cnt_clear` zeroes the counters.

Items within a transaction must be distinct, because a repeated item would be
counted twice. The order of items does not matter here.

### The array (`bcam_array`)

All blocks see the same stream. `cfg_blk` steers the load signals to one block, and
`rd_blk`/`rd_idx` read any support counter combinationally. The host has to pack
candidates into blocks so that each block gets at most 16 candidates using at most
16 distinct codes. With 2-itemsets that means 15 per block, because the first
candidate brings two codes.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `N_UNITS` | 560 | the unit count reported for one Virtex-II Pro 100 |
| `MAX_K` | 16 | this design's choice (longest candidate) |
| `N_BLOCKS` | 88 | 1400 "units" were reported for the CAM design; read as candidates: 88 × 16 = 1408 |
| `NC` | 16 | 16 counters per block, as in the original block diagram |
| `DEPTH` | 16 | this design's choice; the example group needs 12 codes |
| `ITEM_W` | 16 | 16 bits per cycle from the host memory |
| `DATA_W` | 32 | this design's choice; counts up to 100,000 transactions need 17 bits |

## Where this RTL departs from, or adds to, the original

* The original describes the units, the injection table, and the CAM, bitmap and
  counters. The rest is this design's own: the token format, the flush, clear and
  load mechanisms, the controller (drawn there only as a box), the valid/ready host
  interfaces, the bitmapped-CAM load and read-back ports, and reset (asynchronous,
  active low).
* A support count is read out by injecting it into the stream after a flush token.
  The original draws a "Support Out" per unit but does not say how it reaches the
  host.
* Under a downstream stall, the item buffer holds the *generated result*, as the
  stall table implies. One timing illustration of the original can also be read as
  the buffer holding a data item. Either way the output stream has the same order.
* In the unit diagram, the support counter update goes through an extra register. Here
  it happens on the same clock edge as the final match.
* The original speaks of the mode being reconfigured only as future work. Here it is
  a signal that is changed between passes, after a drain.
* Both engines are one array each, clocked by one clock. The original spreads the CAM
  blocks over two FPGAs.
* Candidate pruning is not built in hardware.

## Workloads

The original evaluates two standard synthetic benchmarks, T40I10D100K (about 15 MB;
transactions of about 40 items) and T10I4D100K (about 4 MB; about 10 items), at
minimum supports from 0.15 % to 5 %. The following limits apply at the default sizes:

* 100,000 transactions need 17-bit counters; 32 bits are built. Both benchmarks use
  about 1000 distinct items (a property of the benchmark generator), which fit the
  16-bit codes. Transactions stream through, so their length is not limited.
* A level with more candidates than 560 (systolic) or about 1400 (CAM, fewer when
  codes do not group well) needs several passes over the database.
* Candidates longer than 16 items do not fit. This is unlikely for T10I4D100K. For
  T40I10D100K at the lowest supports the longest frequent itemset is not known here.

`tb_workload_quest` runs both kinds of data at reduced size: 300 transactions over
1000 item codes, a minimum support of 5 %, with levels 1 and 2 on both engines. At
most 1120 level-2 candidates are counted. It checks every support. It also checks
that each systolic support pass leaves the array as one dense burst of
*items + 1 + results* cycles, and that the CAM array takes exactly one cycle per
item. One run printed:

| data | items streamed | frequent items | 2-candidates generated | systolic cycles (4 passes) | CAM cycles (2 passes) |
|---|---|---|---|---|---|
| T10I4-like | 3632 | 108 | 5778 | 16652 | 7264 |
| T40I10-like | 13441 | 383 | 73153 | 55888 | 26882 |

"Items streamed" is one pass over the data. The counts depend on the random seed.
The systolic array needs two passes per level here and the CAM array one, because a
systolic pass holds at most 560 candidates while a CAM pass holds up to 1408. Each
systolic pass also adds one cycle per candidate to drain the results.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The end-to-end test,
`tb_apriori_top`, runs both engines at their default sizes:

* It generates 200 transactions over 40 item codes, with four planted 4-item
  patterns.
* On the systolic array it runs Apriori through level 3. This includes generation in
  hardware, pruning in the testbench, and two support passes for levels that have
  more than 560 candidates. The host randomly refuses output, so injections meet
  stalls and results get parked.
* It counts the 2- and 3-candidates on the bitmapped CAM array, which takes several dozen blocks.
* It compares every support, every generated candidate and the final frequent sets
  with a brute-force count. It also requires that each mechanism happened at least
  once: injection, upstream stall, parked result, mode switch, load, multi-pass
  level, frequency flag, CAM hit and multiple blocks.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/apriori_pkg.sv tb/tb_apriori_top.sv --top-module tb_apriori_top
./obj_dir/Vtb_apriori_top
```

The full-size end-to-end test takes about two minutes to compile and half a minute to
run. The per-module testbenches take seconds.
