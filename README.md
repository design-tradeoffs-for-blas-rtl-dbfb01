# Double-precision BLAS engines for an FPGA

This RTL implements three floating-point linear-algebra engines, one for each
level of the BLAS:

| engine     | operation            | work            | time (cycles)     | default size                         |
|------------|----------------------|-----------------|-------------------|--------------------------------------|
| `vec_dot`  | u · v (level 1)      | 2n flops        | about n/k         | k = 4 multiplier/adder pairs         |
| `mat_vec`  | y = A x (level 2)    | 2n² flops       | about n²/k        | k = 4 lanes, x blocks of b = 256     |
| `mat_mul`  | C = A B (level 3)    | 2n³ flops       | about n³/k        | k = 8 PEs, 128 × 128 blocks          |

All numbers are IEEE-754 doubles. Each engine pairs k pipelined multipliers
with k pipelined adders, so it finishes 2k flops per cycle once its pipeline
is full. The adder has 19 stages and the multiplier 12. The whole design is
built around one difficulty: an accumulation `s += x` into a 19-stage adder
cannot accept a new x every cycle. Each engine removes that hazard in its own
way:

- `vec_dot` and `mat_vec` use a **reduction circuit**.
- `mat_mul` interleaves **independent accumulations**, so that a partial sum
  is reused only after the adder has finished with it.

`blas_top` puts the three engines side by side. Each engine keeps its own
ports, and they share only the clock and reset.

## Arithmetic units

`fp_add` and `fp_mul` compute the full result in one combinational function,
then pass it through a delay line of `LAT` registers. The latency and
throughput seen from outside match a real pipeline of that depth. A register
retimer would be needed to turn the delay line into balanced stages. Both
units:

- round to nearest even;
- handle infinities and NaN;
- flush subnormal inputs and results to signed zero.

A `tag_i`/`tag_o` sideband travels with every operation. The reduction circuit
and the engines use it to know which set or row a result belongs to.

`adder_tree` sums K values with K−1 adders in ⌈log₂K⌉ levels. Its latency is
⌈log₂K⌉ · 19 cycles.

## The reduction circuit

`reduction_circuit` takes a stream of values, one per cycle, split into sets
by `in_last`. It gives out the sum of every set, in arrival order. A set may
be any length, from one value up, and sets may follow each other with no gap.
Its internals are this design's own; only its use and its cost are taken from
the architecture (two adders, with time linear in the set length).

**Stage 1: collecting.** Adder A1 keeps up to 19 partial sums of the open set
circulating through its pipeline. Each cycle, the value at the input is added
to whatever leaves the pipeline in that cycle:

- If the departing partial sum belongs to the same set, the two are combined.
- Otherwise the input starts a new partial sum.
- With no input, the partial sum goes round again, added to a zero of its own
  sign.

Once a set is closed, its partial sums are retired into a FIFO as they leave
A1. A set retires at most 19 of them, and stage 1 records how many.

**Stage 2: combining.** Adder A2 pairs the retired partial sums of each set.
Every item is tagged with its set, and each tag has two things:

- a holding register, where a lone item waits for a partner;
- a counter of the items still outstanding.

When a set's counter reaches one, the held item is the set's sum. A small
reorder table then releases the sums in set order. The reorder table is
needed because short sets can finish before long ones.

**Flow control.** `TAGS` sets can be open or in progress at once. `in_ready`
falls in two cases:

- every tag is in use;
- the FIFO could not take every partial sum still inside A1.

The circuit is fed by an upstream pipeline (multipliers plus adder tree) of
`SLACK` stages that cannot be stopped mid-flight. The parameter `SLACK` makes
`in_ready` fall that many values early, so nothing in that pipeline is lost.
`vec_dot` and `mat_vec` set `SLACK` to their pipeline depth plus one.

A set of s values completes about s + (1 + ⌈log₂ min(s,19)⌉) · 19 cycles
after its first value. Long sets are accepted at full rate. A run of very
short sets, only a few values each, can use up the tags and briefly stall the
input. The testbench measures both cases.

## Level 1: `vec_dot`

Each cycle, K elements of u and K of v enter:

1. K multipliers form the products.
2. The adder tree reduces them to one number per cycle.
3. The reduction circuit sums the n/K numbers of the vector.

`in_last` marks the last chunk, and n must be a multiple of K. Vectors can
follow each other back to back. The result comes out about n/K + 12 + 2·19 +
T_red cycles after the first chunk.

## Level 2: `mat_vec`

A is processed in n/b column blocks A^g, each with the matching b-word
slice x^g of x.

**Lanes.** Each of the K lanes (`mv_lane`) holds its own copy of x^g, so all
K lanes can look up their x_j in the same cycle.

**Streams.** x is streamed in one word per cycle and passed from lane to
lane. A streams in row by row within a block, K elements per cycle. Each
element carries its column index within the block, so a sub-row may hold any
K distinct columns in any order.

**Datapath.** Each cycle:

1. The lanes multiply their elements of A with their x lookups.
2. The adder tree sums the K products.
3. The reduction circuit adds up the b/K sub-rows of a row, giving
   (A^g x^g)_i.
4. A final adder accumulates these block results into an on-chip buffer of n
   words: y_i += (A^g x^g)_i.

During the last block, the finished y_i stream out on `y_valid`/`y_data` in
row order.

**Double-banked x store.** Every lane keeps two banks of x, 2b words per lane.
x^{g+1} loads into one bank while the engine computes with the other. Loading
therefore overlaps computing, and the only visible cost of a block change is
the first block's load. `a_ready` stays low until the block's x copy has
reached every lane.

## Level 3: `mat_mul`

The engine is a linear array of K processing elements (`mm_pe`). It uses
blocks of s × s with s = √m, where m is the on-chip storage for partial sums:

- PE p owns columns p, p+K, p+2K, … of the current output block C^{gh}.
- Each PE holds m/K partial sums in a RAM.

**Schedule.** For each output block, the controller runs the block products
A^{gz} · B^{zh} for z = 0 … n/s−1. Within one block product, for each q:

- Column q of A^{gz} enters PE 0, one element every R = s/K cycles, and moves
  down the array one PE per cycle.
- Each PE multiplies that element a_iq with the R elements of row q of B^{zh}
  that it holds. It adds each product into c'_ij in its RAM.
- In the same slots, row q+1 of B travels down the array into each PE's second
  register bank.

So the array waits for B only once, for the first s words. The external
memory sees one read of A and one read of B every R cycles.

**Hazard.** A partial sum c'_ij is rewritten every s·R = m/K cycles, which
must exceed the adder depth. The PE checks this at elaboration. It holds
easily at the defaults: 2048 cycles against 19.

**Drain.** After the last block product of an output block, the controller
first waits for the pipelines to empty. It then sends a drain token down the
array, two cycles per PE. On arrival, each PE puts one of its partial sums
into the `c` chain every K cycles, and passes on the words from the PEs before
it in the cycles between. These offsets make the chain leave PE K−1 as one
gap-free, row-major stream of C^{gh}. The controller writes that stream to
external memory. The drain stops the array for s² cycles per output block.
For n = 2048 and s = 128 that adds about 0.4 % to n³/K, and 3 % for n = 256.

**External memory interface.** The interface is this design's own choice:

- two read ports with a one-cycle latency, for A and B;
- one write port, for C;
- matrices stored row-major, element (r, c) at address r·n + c.

n is given at run time, as a multiple of s up to `N_MAX`.

## Parameters

| module              | parameter          | default | meaning                                                |
|---------------------|--------------------|---------|--------------------------------------------------------|
| `blas_pkg`          | `ADD_LAT`/`MUL_LAT`| 19 / 12 | adder / multiplier pipeline depth                      |
| `blas_top`          | `K1`               | 4       | multiplier/adder pairs of `vec_dot`                    |
| `blas_top`          | `K2`, `B`          | 4, 256  | lanes and x block size of `mat_vec`                    |
| `blas_top`          | `K3`, `S`          | 8, 128  | PEs and block edge √m of `mat_mul`                     |
| `blas_top`          | `N_MAX`            | 2048    | largest n for `mat_vec` and `mat_mul`                  |
| `reduction_circuit` | `TAGS`, `FIFO_DEPTH`, `SLACK` | 32, 64, 0 (64, 128, pipe+1 inside the engines) | sets in flight, partial-sum FIFO, early `in_ready` |

Constraints:

- K must be a power of two that divides B (for `mat_vec`) or S (for `mat_mul`).
- n must be a multiple of B or S.

The evaluated design space is wider than the defaults:

- `vec_dot`: k from 1 to 5.
- `mat_vec`: k up to 8, and b from 256 to 2048 words.
- `mat_mul`: k up to 8, and √m from 16 to 128.

Every point is reached by changing the parameters; nothing is hard-wired.

## Departures and limits

- **On-chip storage.** The x store is double-banked (2b words per lane rather
  than b), and y is accumulated on chip rather than in external memory.
  `mat_mul` accumulates across z in the PE RAM; it has no separate adder
  stage at the end of the array.
- **Drain.** The `mat_mul` drain is serial and stalls the array, as described
  above. A drain overlapped with the next block would need a second C RAM per
  PE.
- **Subnormals.** Subnormals are flushed to zero.
- **Reduction circuit.** Its internals are this design's own.
- **Not included.** There is no external memory controller and no host
  interface. The engines present plain valid/ready streams (`vec_dot`,
  `mat_vec`) or a simple SRAM-like port (`mat_mul`).
- **Not measured.** The area and clock-rate figures of the original
  implementation (a Virtex-II Pro at 170–200 MHz) were not reproduced. The
  floating-point delay lines would need retiming before they could reach such
  clock rates.

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog and checks cycle
counts against the engine's expected time. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl rtl/blas_pkg.sv \
          tb/tb_mat_mul.sv --top-module tb_mat_mul -o sim
./obj_dir/sim
```

| testbench              | covers                                                                 |
|------------------------|------------------------------------------------------------------------|
| `tb_fp_add`, `tb_fp_mul` | random and special operands against the simulator's `real` arithmetic; latency |
| `tb_adder_tree`        | K = 4 tree, latency 2·19                                               |
| `tb_reduction_circuit` | short, gapped and long sets; order, exact sums, no stall on long sets  |
| `tb_vec_dot`           | n from 4 to 2048, result latency, in_ready never falling               |
| `tb_mat_vec`           | K = 4, b = 128, n = 256 and 128, permuted columns, x-load overlap, time bound |
| `tb_mat_mul`           | K = 4, s = 16, n = 32 and 16; exact read count n³/s, write count n², time bound |
| `tb_blas_top`          | every engine at its default parameters, end to end (see below)         |

`tb_blas_top` keeps every default parameter. It runs:

- two 2048-element dot products and 100 short ones;
- a 512 × 512 matrix-vector product;
- a 256 × 256 matrix multiply on the 8-PE, 128 × 128-block array.

It also counts each mechanism and fails if any never happened:

- back-pressure from the reduction circuit;
- x loading overlapped with computing;
- accumulation of block results into y;
- prefetch of B into the second bank;
- the drain.

It runs in under 10 seconds. The testbenches generate their own data with
`$urandom`, using values that make the sums exact, so results are compared
bit for bit or within a tight tolerance.
