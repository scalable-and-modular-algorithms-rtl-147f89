# Linear-array floating-point matrix multipliers

This RTL computes C = A × B for square double-precision matrices. It uses
three algorithms, all built as a *linear array*: a line of identical
processing elements (PEs) in which each PE talks only to its two neighbours.
Operands flow in at one end. Partial sums stay inside the PEs. Finished C
elements flow back out of the same end. Every wire is short, and the number
of PEs grows with the area you have.

| Array | Idea | PEs | Storage | I/O per cycle | Latency |
|---|---|---|---|---|---|
| Algorithm 1 | one C column element per PE per row group, s rows each | n²/s | n² words | 3 words | Θ(n²) |
| Algorithm 2 | Algorithm 1 with r lanes and r² multiply-adders per PE | n²/(r²s) | n² words | 3r words | Θ(n²/r) |
| Algorithm 3 | block product with sqrt(M)×sqrt(M) blocks on p PEs | p | M words | 3 words every sqrt(M)/p cycles | sqrt(M) + n³/p |

The algorithms and their cycle counts follow the source publication, and
the simulations check them cycle for cycle. The rest is this design's own
choice and is marked as such below and in each file's opening comment:
the memory interface, index tags on data words, the control FSMs, the
internals of the floating-point units, and how Algorithm 3 accumulates
across blocks.

`matmul_top` puts the three arrays side by side. Each array has its own
start/done handshake, run-time problem size and external-memory ports.

## The Algorithm 1/2 array (`mm_array`, `mm_pe`, `mm_ctrl`)

### Data movement

Take r = 1 first. Let d = n.

- **B enters row-major and A enters column-major.** Both enter at PE 0,
  one element per cycle, and move one PE to the right every cycle through
  the PE's input registers RR.B and RR.A.
- **Time is cut into phases of d cycles.** B starts one phase early. In
  phase 0 only row 0 of B enters. In phase k (k ≥ 1), row k of B and
  column k−1 of A enter together. The stream is n+1 phases long.
- **Each PE owns one column j of C and s of its rows.** When b_kj passes
  the PE that owns column j, that PE copies it into one of two registers,
  RR.B1 or RR.B2, picked by the parity of k. Row k of B arrives one phase
  before column k of A, so the next B value is loaded into the other
  register while the current one is still in use.
- **Every passing a_ik triggers one multiply-add in its owner.** When a_ik
  passes a PE that owns row i, the PE computes c'_ij += a_ik · b_kj. The
  partial sum c'_ij lives in the PE's local storage, one word per owned
  row.
- **First and last steps are flagged.** At k = 0 the adder adds zero
  instead of the stored value. At k = n−1 the sum is final.

### Which PE owns what

The source gives the ownership pattern only through worked examples. This
design uses the following general rule.

With RG = (N/r)/s row groups, the PE at chain position l owns:

- column `l mod d`
- rows `(l div d) + m·RG`, for m = 0 … d/RG − 1

Local storage word m holds row m.

The PEs are identical and do no division. A small configuration chain
runs beside the data. PE l receives (column, group) from PE l−1 and passes
on (column+1, wrapping at d). If the run-time n is smaller than the build's
N, the PEs whose group is past the last one own nothing and only forward
data.

### Algorithm 2: lanes

With r > 1:

- A and B each travel on r lanes. Lane x of A carries rows x·d … x·d+d−1,
  and lane y of B carries columns y·d … y·d+d−1, where d = n/r.
- Each PE has r² multiply-adders. MAC (x, y) works on sub-matrix
  C^{xy} = A^x · B^y at the same (i, j) position.
- So one PE updates r² elements of C per cycle. The array is r² times
  shorter, and a run is about r times faster.
- The lanes move in lock step, so one ownership test on lane 0 serves all
  MACs.

### The result chain and the CoutBuffer (the subtle part)

Final values leave each PE to the left, one word per lane per cycle,
through a registered output (`c_out`). A PE may produce its own final
value in the same cycle that a word from its right neighbour arrives. The
rule is:

1. The PE's own result always takes the output register.
2. A colliding incoming word is pushed into the PE's **CoutBuffer**, a
   small FIFO.
3. In a cycle with no own result, the oldest buffered word goes out. The
   new incoming word is pushed behind it.
4. With an empty buffer and no own result, the incoming word passes
   straight through.

Order within a lane is kept, and no word is lost.

The buffer only grows in cycles where the PE has an own result, and a PE
produces at most s·r final values per lane. So `R·S` words per lane are
always enough. An assertion in `cout_buffer` checks this.

With r lanes, a PE produces r finals for lane y at once, one from each
MAC (x, y). The one for x = 0 goes out at once and the other r−1 are
pushed. The buffer therefore takes up to r words per cycle
(`cout_buffer` parameter `NPUSH`).

### The data-hazard rule

The adder reads c'_ij when the product arrives and writes the new sum back
LAT_ADD cycles later. The same c'_ij is next updated one phase (d cycles)
later. So the design needs **d = n/r > LAT_ADD**. With the 11-stage adder
this means n/r ≥ 12. Nothing checks this at run time.

### Timing

Count cycles from the first cycle a B element is in PE 0's register
(cycle 1):

- a_ik reaches PE l at cycle d + k·d + i + l + 1.
- The last C element of the array is final at cycle
  **n·d + NPE + d − 1 + LAT_MUL + LAT_ADD**.

The testbenches check this number exactly. Draining all n² results
through the r lanes takes longer: PE 0 emits one word per lane per cycle.
The published latency ignores this drain.

## The Algorithm 3 array (`alg3_array`, `alg3_pe`, `alg3_ctrl`)

### Blocking

Let SM = sqrt(M) and NB = n/SM. C is computed one SM×SM block at a time.

- For each block row g and block column h of C, and for z = 0 … NB−1,
  the block product A_gz · B_zh is added into the PEs' local storage.
- z is the innermost loop, so a block of C never leaves the array until
  it is final. The design does the whole accumulation in hardware and
  needs no host to add blocks.
- A block is spread over the p PEs by column. PE k owns columns
  k, p+k, 2p+k, … of every row: W = SM/p columns, so M/p words in all.

### Slots

The controller sends a stream of **slots**. A slot carries one element
a_iq of the current A block and one element of the *next* B row, plus
tags. A slot stays W cycles in each PE and then moves right. During those
W cycles the PE multiplies a_iq by its W stored elements of B row q, one
per cycle, and updates c'_i,t·p+k.

While row q is in use, row q+1 arrives spread over the SM slots of column
q: slot i carries element i. Each PE copies the elements of its own
columns into the *other* bank of its 2·W B registers. The two banks swap
at every column of A, including the step from one block product to the
next.

The very first B row has nothing to ride on, so it is **preloaded**:
SM slots that carry only B and stay one cycle per PE. After the preload,
a new slot enters every W cycles without a gap. So a run streams for
**SM + NB³·SM²·W = sqrt(M) + n³/p** cycles.

### Results

The adder output is flagged *last* on the last update of the last block
product. The final value then goes left through the same
priority-plus-CoutBuffer chain as in Algorithm 1. Each PE's buffer is
sized M/p words.

The last PE's last final result appears at:

**SM + NB³·SM²·W + (p−1)·W + LAT_MUL + LAT_ADD**

The testbenches check this exactly.

An element is updated once every M/p cycles, so M/p > LAT_ADD.

## Floating-point units (`fp_mul`, `fp_add`)

Both units are double precision in the "least-compliant" style:

- round toward zero
- denormals read as zero and results that would be denormal flush to zero
- no exception flags
- no NaN or infinity handling: overflow saturates to the largest finite
  number, which is what round-toward-zero gives

The depths are 8 stages for the multiplier and 11 for the adder.

All the arithmetic is done in the first stage. The remaining stages are a
delay line that a retiming synthesis run can spread the logic into. This
is a choice of this design. The published work gives only the depths and
the feature set.

Both shifters in the adder are built from fixed-distance steps: the
alignment shifter and the leading-zero normaliser.

## Known limits

- **One product per start.** The published performance figures assume
  that successive products are streamed back to back, so that one
  product's pipeline fill overlaps the next. Here each array runs one
  product per `start`. A new product can start only after `done`, so every
  run pays the full fill and drain.
- **No run-time checks on n.** The constraints on n listed under
  Interfaces are not checked in hardware.
- **Single-cycle arithmetic stage.** The floating-point units compute in
  one stage followed by a delay line. A real implementation at the
  published clock rates needs register retiming, or a hand-pipelined
  unit of the same depth.
- **No host-side accumulation.** Algorithm 3 accumulates the block
  products in its own storage. It does not use a host processor for this
  step, which the published system can do.

## Interfaces

Each array has the same ports:

- `*_start`, and `*_n` (the run-time n).
- `*_busy`, and `*_done` (a one-cycle pulse when all n² C elements are
  written).
- A read port each for A and B, and a write port for C. All three use
  word addresses into row-major matrices with the build's N as row pitch.
  Reads are synchronous: the word must be on `*_rd_data` one cycle after
  `*_rd_en`.
- Algorithm 2 has r ports of each kind, one per lane.

The run-time n must meet these conditions:

- Algorithms 1 and 2: n ≤ N, a multiple of r·RG, and n/r > LAT_ADD.
- Algorithm 3: a multiple of sqrt(M), and ≤ N.

Data words carry their row/column indices as tags. The controllers create
the tags, and the C write address is formed from the tags that come back.

## Parameters of `matmul_top`

| Parameter | Default | Meaning |
|---|---|---|
| `ALG1_N`, `ALG1_S` | 20, 20 | Algorithm 1: 20 PEs, the largest Algorithm 1 array reported for the target FPGA |
| `ALG2_N`, `ALG2_R`, `ALG2_S` | 24, 2, 12 | Algorithm 2: 12 PEs of 4 MACs |
| `ALG3_P`, `ALG3_SQRT_M`, `ALG3_N` | 8, 1024, 1024 | Algorithm 3: M = 1024² words, n = 1024 |
| `LAT_MUL`, `LAT_ADD` | 8, 11 | floating-point pipeline depths |

**Where this departs from the source.**

- **Algorithm 2 size.** The source runs Algorithm 2 at n = 20 with r = 2.
  That gives n/r = 10, which does not cover the 11-stage adder under the
  hazard rule above. This build therefore uses N = 24 (n/r = 12).
- **Algorithm 2 PE count.** The source reports 5 PEs for its r = 2 array,
  which does not match its own n²/(r²s) count for n = 20. The build keeps
  the formula: s = 12 gives 12 PEs.
- **Algorithm 3 PE count.** The source does not give a single p for its
  main configuration. p = 8 is this design's choice.
- **Algorithm 3 storage.** The storage is RTL arrays. A 1024²-word M is
  far more than an FPGA's block RAM, because the source places that
  storage in board SRAM.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_fp_mul`, `tb_fp_add` | Exact special cases plus thousands of random operands against the simulator's own doubles. The result must equal the correctly rounded value or the value one ulp toward zero. Latency is exactly LAT. |
| `tb_cout_buffer` | Random multi-push/pop against a queue model. Must reach full. |
| `tb_local_store` | Random writes and reads against an array model. |
| `tb_mm_pe` | One r = 2 PE: own results, their exit cycle, forwarding delay, injected words passing in order, configuration chain. |
| `tb_mm_ctrl` | Stream order, phases, lanes and tags for n = 8 and 4; C write addresses; done. |
| `tb_mm_array` | Three builds, including the 4×4, s = 2, 2-stage example of Algorithm 1. Full C checks with integers and random doubles. Last-result cycle against the formula. Run-time n smaller than N. |
| `tb_alg3_pe` | One PE fed a hand-built slot stream with two block products per block: every result, exit cycle, slot pass-through, parked words. |
| `tb_alg3_ctrl` | The whole slot stream against the loop nest, cycle by cycle, for n = 8 and 4. C addresses and done. |
| `tb_alg3_array` | Two builds. Full C checks and the last-result formula. |
| `tb_matmul_top` | All three arrays at once with reduced sizes and the real 8/11-stage units. It covers full and smaller run-time sizes, C checks, all three latency formulas, and counts of each mechanism: CoutBuffer parking in every array, RR.B1/RR.B2 alternation, both Algorithm 2 lanes, B-bank swaps, preload, accumulation over z, concurrent operation. |
| `tb_matmul_top_full` | The top at its default parameters. Algorithms 1 (n = 20) and 2 (n = 24) run to completion and are fully checked, including their latency formulas. |

**Algorithm 3 at full size is only simulated in part.** A full-size
Algorithm 3 run (n = 1024, p = 8) takes about 134 million cycles. That is
too long for simulation, so `tb_matmul_top_full` follows its first
3,000,000 cycles. Over that window it checks:

- the preload;
- the bank swaps;
- every update of the words in rows 0, 1, 512 and 1023 against the exact
  partial sum they must hold.

The largest complete Algorithm 3 run simulated is p = 2, sqrt(M) = 16,
n = 32 with the default pipeline depths (`tb_matmul_top`).

Running a testbench with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mm_pkg.sv rtl/*.sv \
    tb/tb_matmul_top.sv --top-module tb_matmul_top
./obj_dir/Vtb_matmul_top
```

List `rtl/mm_pkg.sv` first. The Algorithm 1/2 and Algorithm 3 array
testbenches also need `tb/mm_env.sv` and `tb/alg3_env.sv`. The
end-to-end testbenches include `tb/matmul_top_tb_body.svh`.

## Files

- `rtl/mm_pkg.sv`: shared types (stream words, slots, index tags).
- `rtl/fp_mul.sv`, `rtl/fp_add.sv`: floating-point units.
- `rtl/cout_buffer.sv`, `rtl/local_store.sv`: the result FIFO and the
  partial-sum storage.
- `rtl/mm_pe.sv`, `rtl/mm_ctrl.sv`, `rtl/mm_array.sv`: Algorithms 1 and 2.
- `rtl/alg3_pe.sv`, `rtl/alg3_ctrl.sv`, `rtl/alg3_array.sv`: Algorithm 3.
- `rtl/matmul_top.sv`: the three arrays side by side.
