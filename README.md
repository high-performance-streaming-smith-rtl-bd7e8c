# Streaming Smith-Waterman systolic array

This is synthesizable SystemVerilog for an accelerator that scores many pairwise
local alignments (Smith-Waterman, linear gap penalty) of short DNA sequences, one
after another, at close to one full array of cell updates per clock.

A query of up to 131 symbols sits in a linear systolic array, one symbol per
Processing Element (PE). The target sequence streams through the array one symbol
per clock, so PE *i* computes column *i* of the similarity matrix and a whole
anti-diagonal is updated each cycle. A conventional array of this kind runs one
alignment at a time, and it idles while the wavefront fills and drains. This design
does not. The next alignment's target follows the previous one straight away,
with a single **New Read (NR)** token between them. Each PE keeps a small **queue of
query symbols** for the alignments still to come. When the NR token passes a PE,
that PE reports its column maximum and resets. It then takes its next query symbol
when the next target arrives. There is no central controller. Every block learns
from the packets it receives how long each alignment is, and all data flows one
way. An alignment therefore costs `tlen + 1` array cycles whatever its query length.
Only the very first alignment costs `tlen + NUM_PE - 1` cycles.

The default build has 10 such modules of 131 PEs each, which is 1310 cell updates
per clock.

## Dataflow of one module

```
 records ──► Input Parser ──┬──► T_load ch ──► Target Loader ──► Target ch ──┐
 (memory)                   │                                               ▼
                            ├──► Q_load ch ──► Query Loader ──► Query Buffer ► PE 0 ► PE 1 ► … ► PE 130
                            │                                  (one queue/PE)                       │
                            └──► Output ch ─────────────────────► Output Parser ◄── PE_Exit ch ◄──┘
                                                                      │
                                                                 results (memory)
```

Every arrow labelled `ch` is a blocking FIFO (`sw_fifo`) with a valid/ready handshake.
The kernels on either side of a channel run on their own. Nothing flows back except
ready, so any number of alignments can be in flight. The limit is the space in the
channels and queues.

| Block | Module | Role |
|---|---|---|
| Input Parser | `sw_input_parser` | Splits each input record. The header and query words go to Q_load, the header and target words go to T_load, and `{number, qlen, tlen}` goes to the Output channel. |
| Target Loader | `sw_target_loader` | Unpacks the target words into one token per symbol, then adds one NR token. It never leaves a gap in its output. |
| Query Loader | `sw_query_loader` | Writes query word *k* into queues `256k … 256k+255` in one cycle. |
| Query Buffer | `sw_query_buffer` | Holds one 64-deep FIFO of query symbols per PE. |
| PE array | `sw_pe_array`, `sw_pe` | The systolic array. |
| Output Parser | `sw_output_parser` | Pairs the k-th score with the k-th Output-channel packet and writes the result. |
| Module | `sw_module` | The whole figure above. |
| Top | `sw_top` | `NUM_MODULES` independent modules side by side. |

Shared types and widths are in the package `sw_pkg`.

## The token stream and the Processing Element

This is the core of the design. Each token in the target stream (`sw_tok_t`) is:

| field | width | symbol token | NR token |
|---|---|---|---|
| `nr` | 1 | 0 | 1 |
| `sym` | 2 | target symbol b_j (A=0, C=1, G=2, T=3) | unused |
| `qlen` | 8 | query length of this alignment | same |
| `h` | 16 | H of the left neighbour's column in this row (0 entering PE 0) | running maximum of the alignment (0 entering PE 0) |

PE *i* holds its query symbol a_i and three registers: `h_up = H(i, j-1)`,
`h_diag = H(i-1, j-1)` (the left value received with the previous row) and `col_max`.
For a symbol token carrying `h_left = H(i-1, j)` it computes

```
H(i,j) = max(0, h_diag + s(a_i, b_j), h_up - GAP, h_left - GAP)
s = MATCH (+2) if a_i == b_j, else MISMATCH (-1);  GAP = 1
```

It then forwards the token with `h = H(i,j)` and updates its registers.

An **NR token** leaves with `h = max(h, col_max)`. The PE then clears `h_up`,
`h_diag` and `col_max` and marks itself as waiting for a new alignment. The NR token
that leaves PE `NUM_PE-1` therefore carries the best score of the alignment. Symbol
tokens that leave the array are dropped. Only NR tokens enter the PE_Exit channel.

**Activation.** On the first token of the next alignment, a waiting PE compares its
index with the `qlen` field. If `PE_IDX < qlen`, the PE pops its next query symbol
from its queue. If that queue is still empty, it stalls the stream until the symbol
arrives. If `PE_IDX >= qlen`, the PE stays inactive for this alignment. It forwards
`h = 0` and does not touch the NR maximum. Inactive PEs are always the
highest-numbered ones, so no active PE sees their output. An alignment with an empty
target is just an NR token. Its active PEs still pop their query symbol, so the
queues stay in step.

Each PE has one output register, and its `in_ready` depends on `out_ready` through
combinational logic. Ready therefore ripples back through the whole array. When
nothing stalls, the array takes one token per clock and a token leaves `NUM_PE`
cycles after it entered.

With the defaults, query `AGTC` against target `ACGT` gives this matrix, and the
best score is 5:

```
        A  G  T  C
    A   2  1  0  0
    C   1  1  0  2
    G   0  3  2  1
    T   0  2  5  4
```

Several testbenches use this case.

## Why alignments overlap, and why the queues are 64 deep

The last PE starts an alignment about `NUM_PE` cycles after the first PE does. In
that time the Query Loader must already have placed the queries of all later
alignments that the first PE has started. With targets of length `tlen`, about
`NUM_PE/(tlen+1)` alignments are in the array at once. Each PE queue must hold that
many symbols, and the Output channel must hold that many packets:

* **Query queues, 64 entries.** These keep the array at the full streaming rate down
  to 2-symbol targets with 131 PEs. With only 4 entries, the array could start a new
  alignment only every ~33 cycles for short targets. That is far below the rate the
  streaming scheme promises.
* **Output channel, 128 entries.** This is more than the largest number of
  alignments that can be in flight.
* **Other channels, 4 entries.** Their depth only matters for start-up.

The Query Loader writes a whole 512-bit word (256 symbols) per cycle, so a query of
131 symbols takes 2 cycles (header and word) to place. Query loading therefore never
limits the rate. The input port takes one memory word per cycle. A record is
`1 + ceil(qlen/256) + ceil(tlen/256)` words, 3 words for any record up to 256/256.
Only targets of 1 symbol are limited by the input port rather than by the array:
such an alignment costs 3 cycles instead of 2.

## Memory formats

Input records, one after another on a module's read stream (`rd_*`, 512-bit words):

| word | contents |
|---|---|
| 0 | header: `[23:16]` query length (0-255), `[15:0]` target length (0-65535), rest ignored |
| next `ceil(qlen/256)` | query, 2 bits per symbol, symbol 0 in bits `[1:0]` |
| next `ceil(tlen/256)` | target, same packing |

A query longer than `NUM_PE` is scored against its first `NUM_PE` symbols only.

Results on the write stream (`wr_*`, 32 bits): `{alignment number [31:16], score [15:0]}`.
Alignments are numbered from 0 after reset and wrap at 65536. Results come out in
input order.

Both streams use valid/ready. A transfer happens on a rising edge with both high.
The reset `rst_n` is synchronous and active-low.

## Parameters

| Parameter | Where | Default | Notes |
|---|---|---|---|
| `NUM_MODULES` | `sw_top` | 10 | Largest configuration evaluated. Peak rate is `NUM_MODULES x NUM_PE` cells/clock. |
| `NUM_PE` | `sw_top`, `sw_module`, `sw_pe_array`, `sw_query_buffer` | 131 | Maximum query length scored in full. Must be ≤ 255. |
| `MATCH`, `MISMATCH`, `GAP` | `sw_module`, `sw_pe_array`, `sw_pe` | 2, -1, 1 | Linear gap. |
| `QB_DEPTH` | `sw_module` | 64 | Per-PE query queue depth (see above). |
| `TLD_DEPTH`, `QLD_DEPTH`, `TGT_DEPTH`, `EXIT_DEPTH`, `OUT_DEPTH` | `sw_module` | 4, 4, 4, 4, 128 | Channel depths. |

The widths (2-bit symbols, 8-bit query length, 16-bit target length, score and
alignment number, 512-bit words) are constants in `sw_pkg`.

## Measured behaviour

These are measured with `tb_sw_workloads`: one module with 131 PEs, scores checked
against a software model. Utilisation means useful cell updates divided by
(`NUM_PE` × cycles from the first word read to the last result written). The
"streaming model" column assumes the first alignment costs `tlen + 130` cycles and
every later one `tlen + 1`.

| data set | measured | streaming model |
|---|---|---|
| 300 × (query 131, target 400) | 99.6 % | 99.6 % |
| 100 × (131, 400) | 99.4 % | 99.4 % |
| 100 × (131, 50) | 95.5 % | 95.6 % |
| 100 × (131, 10) | 80.8 % | 81.4 % |
| 100 × (131, 2) | 45.7 % | 46.6 % |
| 100 × (131, 1) | 22.9 % | 30.4 % (limited by the input port, 3 words per record) |
| 100 × (100, 400) | 75.9 % | 75.9 % |
| 100 × (128, 256) | 96.8 % | 96.8 % |

Apart from the 1-symbol case, each run is within 9 cycles of the model. Those 9
cycles are the fixed pipeline latency of the parser, the loaders and the channels.
For long runs of (131, 400), each alignment costs exactly 401 cycles: 400/401 =
99.75 % of the peak rate.

## Relation to the original design and known departures

The following points match the design this RTL implements:

* The dataflow of kernels and channels.
* Per-PE query queues.
* The New Read token and the activity check against the query length.
* The streaming timing.
* The array of 131 PEs and up to 10 modules.

The following are choices made here. The original was written in OpenCL, and its
details are not available.

* **Scoring.** Match +2, mismatch -1 and linear gap 1 are the values that reproduce
  the example matrix above. The scoring scheme of the original is not known.
  Amino-acid alphabets and substitution matrices are not supported.
* **The score travels in the NR token.** Each PE folds its column maximum into the
  token. Every token also carries the query length. In the original, this check is
  described as happening when the NR token is seen.
* **Memory.** Each module sees plain valid/ready word streams, not a DDR controller
  with addresses. The 512-bit word, the record layout and the result word are
  defined here. The memory, the host and the distribution of records over modules
  are outside this RTL.
* **Queue and channel depths** are set as explained above.
* **Traceback is not implemented.** Only the best score of each alignment is
  produced, not its position or the alignment itself.
* **Ready ripple.** Back-pressure (ready) ripples combinationally through all 131
  PEs. This is simple and correct, but a timing-driven implementation would want
  to break it. A global stall or skid buffers every few PEs would do that.
* **Limits.** Query lengths above `NUM_PE` are truncated. Target lengths are limited
  to 65535. Alignment numbers wrap at 65536.

## Simulating

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog. The simulator is
two-state, so every register that is read has a reset value.

| Testbench | What it does |
|---|---|
| `tb_sw_fifo` | Tests one block. |
| `tb_sw_pe` | Tests one block. |
| `tb_sw_query_buffer` | Tests one block. |
| `tb_sw_pe_array` | Tests one block (12 PEs). |
| `tb_sw_input_parser` | Tests one block. |
| `tb_sw_target_loader` | Tests one block. |
| `tb_sw_query_loader` | Tests one block. |
| `tb_sw_output_parser` | Tests one block. |
| `tb_sw_module` | One 16-PE module end to end. Includes the exact `tlen+1` spacing of results. |
| `tb_sw_top` | 3 modules × 16 PEs with random stalls. Counts that NR exits, overlapping alignments, idle PEs, queue look-ahead, array stalls, output stalls and concurrent modules all occur. |
| `tb_sw_top_full` | The default 10 × 131 build. Each module runs the worked example and five (131, 400) alignments. |
| `tb_sw_workloads` | The data sets in the table above. |

`tb/sw_tb_pkg.sv` holds the software reference (`sw_ref_score`) and the record
packing used by all of them.

Example (from the repository root):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sw_pkg.sv tb/sw_tb_pkg.sv tb/tb_sw_top_full.sv --top-module tb_sw_top_full -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl` / `-Itb`. The full-size build
compiles in about 3 minutes and simulates in under a second. `tb_sw_workloads`
compiles in about a minute and runs in about 5 seconds.
