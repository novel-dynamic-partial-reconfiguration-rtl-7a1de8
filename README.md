# Linear SVM classifier cores with reconfigurable partitions

This RTL classifies a query vector Q with a linear support vector machine
whose training has been done offline. A core holds the support vectors x_i,
their training coefficients alpha_i and their class labels y_i (+1 or -1) in
on-chip memory. It computes

    score(Q) = sum over i of  y_i * alpha_i * (x_i . Q)        (bias taken as 0)
    class    = MSB of score   (1 for a negative score, 0 otherwise)

The costly part is the SV dot products of M features each. The design works
them out in a linear systolic array, and it comes in two shapes:

* **A1**, for many more features than support vectors (for example microarray
  data: M = 1024 genes, 20 support vectors). It has one processing element
  (PE) per support vector. The query flows through all PEs, and every PE
  builds the dot product of its own support vector.
* **A2**, for many more support vectors than features (M = 20, SV = 1024). It
  has one PE per feature and holds the query in registers. Support vectors
  flow through the chain, one per clock. Each PE adds its own feature's
  product to a running sum.

Both shapes classify one query in **M + SV + 4 clocks**, which is 1048 at
either default size.

The top level `svm_top` puts two designs side by side:

* a **quad-core classifier** of four A1 cores. Each core sits in its own
  reconfigurable partition, so it can be taken out of service and reloaded
  with a different training set while the other three keep classifying;
* one stand-alone **A2 core**.

## Data formats

| quantity | format | default width |
|---|---|---|
| feature x_ij, query feature Q_j | two's complement, B bits | B = 8 |
| coefficient alpha_i | unsigned, AW bits (alpha is never negative) | AW = 8 |
| label y_i | 1 bit: 0 means +1, 1 means -1 | 1 |
| dot product (Multiplier A) | signed, AWID = 2B + clog2(M+1) | 27 (A1), 21 (A2) |
| alpha_i * y_i (Multiplier B) | signed, AW + 1 | 9 |
| kernel term | signed, KW = AWID + AW + 1 | 36 (A1), 30 (A2) |
| score | signed, ACCW = KW + clog2(SV+1) | 41 (both) |

No widths are truncated anywhere, so the score is exact: no stage can
overflow. The label bit uses the same convention as the output class. A
query that equals a support vector with label bit b, and is dominated by it,
is classified as b.

## The A1 array: skewed memories feeding a query pipeline

This is the part that needs the most care. The hardware consists of:

* **Memories.** Support vector k has its own memory, `svm_sv_fifo`. It is M
  deep and holds x_k0 ... x_k(M-1). The query sits in `svm_query_fifo`.
* **Query pipeline.** PE 0 pops one query feature per clock. Each PE
  registers the query feature, with its valid/first/last tags, and passes it
  to the next PE. Feature j therefore reaches PE k k clocks after it reached
  PE 0.
* **Read address chain.** The sequencer drives the read address of memory 0.
  A register chain passes the address on, one stage per memory. Memory k reads address j exactly k clocks after
  memory 0 does, so x_kj and Q_j meet in PE k in the same clock.
* **PE operation.** Each PE (`svm_a1_pe`) multiplies and accumulates. A
  `first` tag restarts the sum. A `last` tag closes it: the finished dot
  product appears on the PE's result port for one clock.
* **Result output.** The PEs finish one clock apart, PE 0 first. At most one
  result is valid in any clock, which an assertion checks. The output stage
  of `svm_a1_mult_a` selects that result and registers it. The result is a
  stream of one dot product per clock, in SV order.

Timing in clocks, counted from the clock in which feature 0 is addressed
(t = 0), with m active features:

| event | clock |
|---|---|
| x_kj and Q_j in PE k | j + k + 1 |
| dot product of SV k on Multiplier A output | m + k + 2 |
| alpha_k, y_k addressed (Multiplier B start) | m + k |
| alpha_k * y_k on Multiplier B output | m + k + 2 |
| kernel term k (stage-2 multiplier) | m + k + 3 |
| score strobe (accumulator) | m + SV + 3 |
| class_valid (decision) | m + SV + 4 |

Multiplier B therefore starts reading about M clocks after the feature
stream. It then delivers alpha_k * y_k in the same clock as dot product k.
An assertion in the core checks this alignment.

## The A2 array: a partial-sum chain

The A2 core stores the training set by column:

* **Memories.** Memory j (`svm_sv_fifo`, SV deep) holds feature j of every
  support vector. The query features are held in M registers.
* **Read address chain.** The sequencer issues one SV index per clock. As in
  A1, the index passes from memory to memory through a register chain, one
  clock per stage. Feature j of SV i reaches PE j exactly when SV i's partial
  sum arrives from PE j-1.
* **PE operation.** Each PE (`svm_a2_pe`) adds x_ij * Q_j and registers the
  sum.
* **Output.** The last PE delivers one complete dot product per clock. One
  more output register makes the latency match A1's.

The rest of the core is the same as A1: Multiplier B (`svm_mult_b`), the
stage-2 multiplier (`svm_kernel_mult`), the accumulator and the decision
block.

The A2 chain is always M PEs long. Setting a smaller active feature count
zeroes the query registers at index m_len and above. The latency stays
M + sv_len + 4.

## Sequencing

`svm_core_ctrl` is a single cycle counter. After the start handshake it does
three things:

* It issues the feature (A1) or SV (A2) stream from clock 0.
* It issues the coefficient stream from clock `lat` (A1: m_len; A2: M).
* It returns to idle in clock lat + sv_len + 3.

The decision strobe comes lat + sv_len + 4 clock edges after the handshake
edge. A new query can start in the clock after class_valid. Queries are not
overlapped.

## Loading a core

The training data, labels, coefficients and active sizes all enter through
one command port of type `svm_pkg::svm_load_t`
(`valid, target, row, col, data`). The port takes one word per clock:

| target | effect |
|---|---|
| `LD_FEATURE` | x[row][col] (row = SV index, col = feature index) |
| `LD_LABEL` | label bit of SV `row` from data[0] (1 = y of -1) |
| `LD_COEFF` | alpha of SV `row` from data[AW-1:0] |
| `LD_CFG_M` | active feature count m_len, clamped to 1..M |
| `LD_CFG_SV` | active SV count sv_len, clamped to 1..SV |

Writes outside the array are ignored. On an FPGA these contents would be part
of the core's configuration image. The port lets any memory initialisation
path or host write them. Memory contents and label bits survive reset; the
size registers reset to M and SV. Do not load while the core is busy: an
assertion flags this.

Queries are loaded as follows:

* **A1:** push features 0 .. m_len-1 into the query FIFO (`q_push`, `q_data`,
  `q_full`). The FIFO holds NQ whole queries (default 1). `ready` goes high
  once a whole query is stored and the core is idle.
* **A2:** write the query registers by address (`q_wr`, `q_addr`, `q_data`)
  while the core is idle.

Then pulse `start` while `ready` is high. The results are `class_valid` (one
clock), `class_label` and the full `score`.

## Reconfigurable quad core

`svm_quad_core` holds four independent A1 cores. Each core has its own load,
query, start and result ports, so each core can run a different study. The
original design makes each core a reconfigurable partition. A core is swapped
for a variant by writing a partial bitstream, with different memory
contents, M, SV or B. The region is sized for the largest variant.

The RTL models what the rest of the chip sees of such a swap. While
`rp_reconfig[k]` is high:

* core k is held: its sequencer and pipeline are cleared and its query FIFO
  is emptied, so a queued query is dropped;
* all its outputs read 0, and `q_full` reads 1, so nothing leaks into the
  static logic;
* its load port stays open for the new contents and the new m_len/sv_len.

When `rp_reconfig[k]` falls, the new variant runs. The other cores never
notice. A change of B cannot happen at run time, because it is a parameter.
Variants with smaller M or SV are covered by the run-time size registers.

Outside this RTL are the device configuration port (JTAG/ICAP), bitstream
generation, floorplanning and relocation of a partition. For scale, the
original work reports these figures for a 20-SV, 1024-feature core:

* full bitstream 1673 kB, 202.78 ms over a 66 Mbps JTAG link;
* partial bitstream 199 kB, 24.12 ms;
* therefore about 8x faster to reconfigure one partition than the whole
  device.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `svm_top`, `svm_quad_core`, `svm_a1_core` | B, M, SV | 8, 1024, 20 | reported A1 implementation |
| `svm_top` (A2_M, A2_SV), `svm_a2_core` | B, M, SV | 8, 20, 1024 | reported A2 implementation |
| `svm_quad_core`, `svm_top` | NCORES | 4 | quad-core design |
| all cores | AW | 8 | design choice (coefficient width is not given) |
| A1 | NQ | 1 | design choice (queries held in the FIFO) |

One description of the quad core gives B = 9 per core; the implementation
results use B = 8, which is the default here. All widths follow from B, M, SV
and AW.

At the defaults, per A1 core:

* 20 memories of 1024 x 8 bits;
* a 1024 x 8 query FIFO;
* 20 PEs of 8 x 8 multipliers.

The A2 core has 20 memories of 1024 x 8 bits and 20 PEs. Each PE and each of
the two later multipliers is one hard multiplier on an FPGA. That gives
SV + 2 = 22 for A1 and M + 2 = 22 for A2, close to the 22 and 21 DSP blocks
reported for the two implementations.

## Files

| file | block |
|---|---|
| `rtl/svm_pkg.sv` | load command, pipeline tag type, width function |
| `rtl/svm_sv_fifo.sv` | training-set memory (one per PE) |
| `rtl/svm_query_fifo.sv` | query FIFO (A1) |
| `rtl/svm_a1_memory.sv`, `rtl/svm_a2_memory.sv` | memory blocks with pipelined read address |
| `rtl/svm_a1_pe.sv`, `rtl/svm_a1_mult_a.sv` | A1 PE and systolic array |
| `rtl/svm_a2_pe.sv`, `rtl/svm_a2_mult_a.sv` | A2 PE and partial-sum chain |
| `rtl/svm_mult_b.sv` | alpha_i * y_i |
| `rtl/svm_kernel_mult.sv` | stage-2 multiplier |
| `rtl/svm_accumulator.sv` | sum over support vectors |
| `rtl/svm_decision.sv` | sign decision |
| `rtl/svm_core_ctrl.sv` | sequencer |
| `rtl/svm_a1_core.sv`, `rtl/svm_a2_core.sv` | complete cores |
| `rtl/svm_quad_core.sv` | four reconfigurable A1 cores |
| `rtl/svm_top.sv` | quad core plus A2 core |

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares against values computed independently in the testbench, checks the
latencies, and ends with `TB_RESULT checks=N failures=F`. Two testbenches
cover whole configurations:

* `tb/tb_svm_top.sv` runs the whole system at the default sizes. It loads
  all five cores and classifies on every core; the queries are chosen so
  that both classes occur. It reconfigures core 2 to a smaller variant
  (m_len = 300, sv_len = 12) while the other cores classify. It also pushes
  queries while a run is in progress, and checks that every one of these
  mechanisms happened.
* `tb/tb_svm_dim_sweep.sv` repeats the dimensionality experiment: an A1 core
  with 1024 support vectors and 16-bit data, with m_len swept from 1 to 16.
  Classification time grows from 1029 to 1044 clocks (+1.4%). This testbench
  takes several minutes to compile because of its 1024 PEs.

To simulate one testbench with Verilator, run from the repository root:

    verilator --binary --timing --assert -Irtl rtl/svm_pkg.sv tb/tb_svm_top.sv \
        --top-module tb_svm_top -Mdir obj_top -o sim
    ./obj_top/sim

Verilator finds the other modules in `rtl/` through `-I` and the file names.

## Departures and limits

* The clock rates and resource counts reported for the Virtex-4 devices are
  not reproduced here: the RTL is not tied to a device. The 1048-clock
  latency is reproduced exactly.
* Nothing in the original fixes these choices, which are this design's own:
  * how dot products leave the A1 array (a registered select);
  * the exact split of the four extra pipeline clocks;
  * the load port;
  * the run-time size registers;
  * the hold-and-decouple behaviour during reconfiguration;
  * the signed number format;
  * the coefficient width;
  * the label encoding.
* A new query starts only after the previous result. The original does not
  describe overlapping queries.
* The training memories are addressed RAMs read again for every query. The
  original calls them FIFOs; their data are always consumed in order.
* The bias term is fixed at zero, as in the original.
