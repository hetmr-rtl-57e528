# FPGA kernels for hybrid CPU/FPGA MapReduce

HETMR runs a MapReduce job in a *hybrid* way. One phase, map or reduce,
runs on a multi-core CPU. The other runs on an FPGA that sits behind PCIe.
The phase that goes to the FPGA is the job's bottleneck. For string-matching
and similarity jobs, most of the work is computing the edit distance between
strings. For machine-learning jobs such as logistic regression, most of the
work is in the map phase, where a combiner accumulates one value per key.

This RTL is the FPGA side of that system:

* a **string-distance kernel**: 96 bidirectional systolic arrays that compute
  the Levenshtein distance or the Smith-Waterman score of 96 string pairs
  at once. A character-interleaved memory layout feeds them.
* a **data-parallel combiner**: a dual-port block-RAM accumulator that
  several map pipelines share.
* the **memory kernels** that move data between board DRAM and a kernel.
  The input kernel has circular addressing for iterative jobs.
* the **control registers** that the host executor programs before a run.
  The host then waits for an interrupt.

The host software is not part of this RTL. That covers profiling, the
CPU/hybrid decision, the CPU executor and the DMA data mover. The PCIe
endpoint and the DRAM controller are not part of it either.

```
 host registers ─► kernel_ctrl ──start/config──┬──────────────┬──────────────┐
                        ▲ irq                  ▼              ▼              ▼
 DRAM ──read──► mem_rd_kernel ──rows──► ed_engine ──results──► mem_wr_kernel ──write──► DRAM
                (circular)              96 × ed_array            done ──► kernel_ctrl
                                        (129 × ed_pe each)

 map pipelines (outside) ──lanes──► dp_combiner ─► combiner_object (dual-port RAM) ──drain──►

 map pipelines (outside) ──16 streams──► mem_wr_streams (FIFO per stream, round robin) ──write──► DRAM
```

`hetmr_fpga_top` places the kernels side by side. On the real device, only
one kernel from the library is loaded at a time. The combiner's lanes and
readout are top-level ports, because the map pipelines that feed it are not
part of this design.

## The bidirectional string-distance array (`ed_pe`, `ed_array`)

This is the part that takes the most thought. The edit distance of S
(length ≤ m) and T fills a matrix `D(i,j)`. Each cell depends on its left,
upper and upper-left neighbours. `ed_array` computes the matrix with
**2m+1 processors** in a line:

* The characters of S enter at the left end and move right, one processor
  per cycle.
* The characters of T enter at the right end and move left.
* Both strings are injected in the same cycles. Every character is followed
  by one empty slot (character code 0).

Character `s_i` is injected in slot `2(i-1)` and `t_j` in slot `2(j-1)`.
They therefore meet in processor `k = m + (j - i)`, in cycle `m + i + j - 1`
after the first injection. So:

* **Each processor owns one diagonal** `j - i = k - m` of the matrix.
* Successive cells of a diagonal arrive in the same processor two cycles
  apart. The processor's own register therefore holds `D(i-1,j-1)` when it
  needs it.
* `D(i,j-1)` sits in the left neighbour (diagonal `d-1`), and `D(i-1,j)` sits
  in the right neighbour (diagonal `d+1`). Both were computed one cycle
  earlier, because neighbours compute in alternate cycles.
* Before a pair, `clear` loads every processor with the matrix border value
  of its diagonal. For Levenshtein that is `|k-m|`; for Smith-Waterman it is
  0. This border value is exactly what the first cell of the diagonal needs.

The recurrences (see `ed_pe`):

| mode | cell | result |
|---|---|---|
| `DIST_LEV` | `min(D(i-1,j-1)+[s≠t], D(i,j-1)+1, D(i-1,j)+1)` | register of processor `m + len(T) - len(S)`, which ends up holding `D(len S, len T)` |
| `DIST_SW`  | `max(0, H(i-1,j-1)+(+2 / -1), H(i,j-1)-1, H(i-1,j)-1)` | maximum of the running best values of all processors |

Strings shorter than m are zero-padded. A cell is only computed when two
non-zero characters meet, so padding never enters the matrix. The result is
valid **m+2 cycles after the last injection**. A global `en` freezes all
processors. A late input row therefore stalls the array without disturbing
the exact spacing between characters, and that spacing is what the diagonal
mapping relies on.

Each processor moves two bytes per cycle: one byte in each direction.

## The interleaved layout and the engine (`ed_engine`)

A systolic array can only use character k+1 after character k. If the
strings were stored one after another, each array could read just two bytes
per cycle from memory. The host therefore stores the strings **transposed**:

* Row k (192 bytes) holds character k of 96 string pairs.
* Byte `2p` of the row is the character of S for pair p, and byte `2p+1` is
  the character of T.
* A batch is `STRLEN` rows.

One row feeds all 96 arrays in a single transfer.

How `ed_engine` runs a batch:

1. It clears the arrays for one cycle.
2. It injects the `STRLEN` rows, one row every two cycles.
3. It counts each string's length from its non-zero bytes.
4. It drains for `STRLEN+2` cycles.
5. It offers one 192-byte result row, with the result of pair p as a 16-bit
   value in bits `[16p +: 16]`.

With rows on time, a batch takes **3·STRLEN + 4 cycles**. At the default
STRLEN = 64, that is 196 cycles for 96 pairs. A missing row holds the arrays
(`stall_cycles` counts these cycles). A result row that is not taken holds
the engine.

## Memory kernels (`mem_rd_kernel`, `mem_wr_kernel`)

The input kernel streams `section_words` words from `base_addr`, and does so
`iterations` times. A word counter beside the address counter sends the
address back to `base_addr` at the end of every pass. This is the circular
access that iterative ML jobs use to re-read their data in on-board memory
at each iteration, without a restart from the host. `wrap_count` counts the
returns to `base_addr`.

On the DRAM side, read data returns in order after any latency, and the
memory cannot stall it. The kernel therefore issues a request only while its
FIFO has room for the response. The count includes requests still in
flight. With a DRAM that answers every cycle, the kernel delivers one word
per cycle.

The output kernel writes its input stream to consecutive words from
`base_addr`. It pulses `done` when the memory accepts the last of
`num_words` words. It has no buffer, so DRAM back-pressure reaches the
kernel directly. Addresses count words of the stream width (192 bytes at
the defaults).

### One write stream per pipeline (`mem_wr_streams`)

Map pipelines whose keys cannot be predicted cannot share a combiner
without write conflicts. In that case each pipeline gets its own output
stream instead: a DRAM region (`base_addr[s]`, `num_words[s]`) and a 4-word
FIFO. A round-robin arbiter writes one word per cycle from the streams onto
a single DRAM write port. The arbiter starts after the stream granted last.
The toolchain allows at most 16 streams between memory and kernel, so that
is the default. A stream accepts only as many words as its region holds.
`done` pulses after the last word of all streams.

## Combiner object and data-parallel combiner (`combiner_object`, `dp_combiner`)

A map-side combiner keeps one accumulated value per key in a dual-port
block RAM. Port A only reads and port B only writes.

* **Cycle t:** a pair `(k, v)` arrives and k drives address A.
* **Cycle t+1:** the old value comes out of the RAM. `c1` adds v to it
  (`c1` is addition here), and the sum is written through port B to
  address k.

Each cycle accepts a new pair. The write of cycle t+1 shares a clock edge
with the read for the next pair. If the next pair has the same key, it would
see the old value. A one-entry **bypass** prevents this: it substitutes the
sum being written (`bypass_count` counts how often). Two sequencers reuse
the same ports:

* `clear` zeroes all keys through B.
* `drain` reads all keys in order through A, one key per cycle, on `out_*`.

Several map pipelines writing one RAM would conflict. When the pipelines run
in lock-step over the same key set, as the dimensions of a logistic
regression do, all lanes carry the same key in a given cycle. `dp_combiner`
then sums the valid lanes in a registered adder tree and gives the combiner
object a single pair. The multiplexing is fixed in advance, so no conflict
can occur. An assertion checks that all lanes agree on the key. Lanes must
stay idle while the combiner is clearing or draining.

## Control and a run (`kernel_ctrl`, `hetmr_fpga_top`)

The registers are 32 bits wide. Their indices are in `hetmr_pkg::reg_idx_e`:

| idx | name | meaning |
|---|---|---|
| 0 | CTRL | write bit0=1: start; bit1=1: clear irq/done/timeout |
| 1 | STATUS | bit0 running, bit1 done, bit2 timeout, bit3 irq |
| 2, 3, 4 | RD_BASE, RD_WORDS, RD_ITERS | input section start, length, passes |
| 5, 6 | WR_BASE, WR_WORDS | output start, number of result rows |
| 7 | JOB_PARAM | static job parameter; for the string kernel, the number of batches (= RD_WORDS·RD_ITERS/STRLEN) |
| 8 | CYCLES | cycle budget, 0 = none |
| 9 | ELAPSED | cycles of the current or last run |

A run goes as follows:

1. The host writes the string rows to DRAM.
2. It programs registers 2–8.
3. It writes CTRL = 1. One start pulse goes to the three kernels.
4. It waits for `irq`. The interrupt is raised when the output kernel's last
   word has been written, or at timeout if the budget runs out first.

`irq` is a level signal and stays high until CTRL bit 1 is written.

## Parameters

| parameter | default | where from |
|---|---|---|
| `NUM_ARRAYS` | 96 | the design's replication factor and 192-byte rows |
| array length | 2·STRLEN+1 | the design |
| `STRLEN` | 64 | own choice; the design makes it a function of the string length |
| character / result width | 8 / 16 bits | 1-byte characters from the design; 16-bit results chosen so that 96 fill one row |
| Smith-Waterman scores | +2, −1, gap −1 | own choice (`hetmr_pkg`) |
| stream / DRAM word | 1536 bits | one 192-byte row. The board DRAM is 384 bytes/cycle wide, so half of it is used. |
| `FIFO_DEPTH` | 16 | own choice |
| `WS_STREAMS`, `WS_W` | 16, 64 bits | 16 streams is the toolchain limit; the 64-bit word (key and value) is own choice |
| `LANES`, `KEYS`, value width | 8, 1024, 32 | 32-bit values from the 4-byte data points; the rest are own choices |

## Where this departs from, or goes beyond, the design

* The processor arithmetic is this implementation's. The design gives the
  chain of 2·strlen+1 processors and the two opposite byte streams, not the
  cell logic. So are the empty slot between characters, the result readout
  and the stall signal. The characters that leave the far ends of the array
  are dropped; only the distance goes back to memory, as part of a result
  row. Because of the empty slot, each array takes a new row
  every other cycle. The 96 arrays therefore consume 96 bytes per cycle,
  half of the row rate a 2-byte-per-cycle feed would suggest.
* Strings longer than `STRLEN` are not handled: the host must truncate them
  or build with a larger `STRLEN`. Each array processes one pair per batch;
  pairs from successive batches do not overlap in the array.
* Only one static job parameter register exists. The cycle budget ends a
  run with a timeout flag, but it does not stop the kernels. The host must
  let them finish, or reset them, before the next start.
* Not built: the logistic-regression map pipelines, which the design names
  but does not describe, so the combiner is tested with synthetic lanes.
  Also not built: key-space partitioning for pipelines that do not share
  a key set, the PCIe endpoint, the DRAM controller, and all host
  software.
* Capacity: the combiner holds 1024 keys. Logistic-regression jobs with
  more than 1024 dimensions (the evaluated range goes to 2^26) need a larger
  `KEYS` or a key-partitioned design.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The shared
reference models are in `tb/ed_ref_pkg.sv`: plain row-by-row Levenshtein and
Smith-Waterman. `tb/dram_model.sv` is a behavioural DRAM with latency and
random back-pressure. Example:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/hetmr_pkg.sv tb/ed_ref_pkg.sv rtl/*.sv tb/dram_model.sv \
  tb/tb_hetmr_fpga_top.sv --top-module tb_hetmr_fpga_top
./obj_dir/Vtb_hetmr_fpga_top
```

The testbenches:

* `tb_ed_array` checks both modes on 303 random and corner-case pairs,
  including stalls, at the m+2 latency.
* `tb_ed_engine` checks the layout, stalls, back-pressure and the
  3·STRLEN+4 batch time.
* `tb_hetmr_fpga_top` runs the whole flow at 4 arrays × STRLEN 6 with a
  host model. It covers the circular second pass, a timeout run and the
  combiner and four write streams. It counts that each of these happened at
  least once: stall, wrap, write back-pressure, bypass, timeout, and two
  streams taking words in the same cycle.
* `tb_workload_strmatch` runs title-like strings against query words and
  against other titles, through two instances of the design (Levenshtein and
  Smith-Waterman). It checks every result and the run time.
* `tb_hetmr_full` runs the same flow at the default sizes. That is
  96 × 129 processors, one batch read twice, the combiner with 8 lanes
  and 1024 keys, and 16 write streams. Verilator needs about 1.5 minutes to build it, and it runs
  in about a second.
