# Matrix multiplier with serial shift-and-add processing elements

This design multiplies square matrices of 8-bit signed elements, Y = A x B,
with N = 3 by default. It does not use one big parallel multiplier array.
Instead each row of the result has its own small *processing element* (PE).
A PE holds a bit-serial shift-and-add multiplier, one adder and a short FIFO
of partial sums. The PEs never exchange data. They run in lock step on
operands that come from separate memory banks, so one multiplication step
yields a whole column of products. A control state machine and a set of
row, column and matrix counters read the operands from memory. The same
machine writes the finished results into a result memory.

Datapath, from left to right:

```
 load port ──► A banks (3 x 64x8) ──a[0..2]──┐
          └──► B memory (64x8)  ────b────────┤
                                             ▼
                 ┌────────────── matrix_formation_unit ──────────────┐
                 │ PE i:  shift_add_mult ─► pe_adder ─► sum_fifo ─┐   │
                 │                 ▲                              │   │
                 │                 └──────── FIFO head ◄──────────┘   │
                 └──────────────────────────┬─────────────────────────┘
                                            ▼
                      result memory (64 x 18) ──► read port
   row_col_counter ◄──► control_unit (drives every block above)
```

## How a product is accumulated: the circulating FIFO

This section covers the least obvious part of the design.

For matrix pair m, the control unit visits the N·N pairs (k, j) with k as
the outer loop and j as the inner loop. In each step:

1. It reads word `m*N + k` from all three A banks at once, so PE i receives
   A[i][k]. It reads word `m*N*N + k*N + j` of the B memory, which holds
   B[k][j], and sends that value to every PE.
2. It pulses `start`. Each PE's multiplier forms A[i][k]·B[k][j] in W+2 = 10
   cycles and raises `stop`.
3. In the `stop` cycle it pulses `acc_en`. Each PE adds the product to the
   value at the head of its FIFO, pops the head, and pushes the new sum at
   the tail, all in the same cycle. While k = 0 the signal `first` is high.
   The head is then ignored and nothing is popped, so the FIFO fills with
   the first products of columns 0, 1 and 2.

The FIFO is N entries deep, one entry per result column. During each pass
over j, the partial sums of columns 0..N-1 leave the head in order, pick up
one more product each, and return to the tail in the same order. After the
pass with k = N-1, PE i's FIFO holds Y[i][0], Y[i][1] and Y[i][2], oldest
first.

In the drain phase the control unit pops the FIFOs one per cycle: PE 0
first, then PE 1, then PE 2. It writes each value to word
`m*N*N + i*N + j` of the result memory. The element counter used for the
compute loop is reused here, so `rowcount` names the PE being drained and
`count` is the offset of the word.

## The shift-and-add multiplier

`shift_add_mult` keeps the multiplicand whole and uses the multiplier one
bit per clock, least significant bit first. It has three states:

- `M_IDLE` waits for `start`.
- `M_INIT` loads the operands. The multiplier goes into the low half of a
  17-bit product register, and the upper 9 bits are cleared.
- `M_SHIFT` runs 8 times. Each time it tests the LSB of the product
  register. If the bit is 1, it adds the sign-extended multiplicand to the
  upper part. Then it shifts the whole register right by one place
  (arithmetic shift).

The operands are two's complement. The multiplier's top bit therefore has
weight −2⁷, so in the eighth step the multiplicand is subtracted instead of
added. When the machine returns to idle, it raises `stop` for one cycle and
the low 16 bits of the register hold the signed product. The 9-bit upper
part cannot overflow: its largest magnitude is 2⁸, which occurs for
(−128)·(−128).

## Widths

| quantity | width | why |
|---|---|---|
| matrix element | 8 bit signed | operand width of the multiplier |
| product | 16 bit signed | 8 × 8 |
| result element | 18 bit signed (`ACC_W = 2W + clog2(N)`) | a sum of 3 products, e.g. 3·16384 = 49152, needs 17 bits plus sign |
| memory address | 6 bit (64 words) | `addr(5:0)` |
| `count` / `rowcount` / `colcount` | 4 / 2 / 2 bit | for N = 3 |

## Host interface (`matmul_top`)

Reset is synchronous and active high (`rst`).

**Loading** (only while `busy` is low): drive `ld_we_n` low for one cycle
together with `ld_target`, `ld_row`, `ld_addr` and `ld_data`. The write
enable is active low, as in the input memories.

| target | `ld_target` | where element goes |
|---|---|---|
| A[i][k] of pair m | 0 | bank `ld_row = i`, word `m*3 + k` |
| B[k][j] of pair m | 1 | word `m*9 + k*3 + j` |

Load-port writes are ignored while a run is in progress.

**Running:** hold `start` high for one cycle while idle. Set `mat_last` to
the index of the last pair; pairs 0..`mat_last` are processed. With 64-word
memories, up to 7 pairs fit (`mat_last` ≤ 6). `busy` stays high until the
cycle after `stop`. `stop` is a one-cycle pulse that appears once all
results are stored.

**Reading results:** Y[i][j] of pair m is at word `m*9 + i*3 + j`. Drive
`rd_enable` high with `rd_addr`; `rd_data` follows one cycle later. The
read port is independent of the computation.

`count`, `rowcount`, `colcount` and `matcount` show the counters for
observation.

## Timing

| event | cycles |
|---|---|
| one multiplication (`start` to `stop`) | W + 2 = 10 |
| one element step (read, start, multiply) | W + 4 = 12 |
| one matrix pair (9 steps + 9 drain cycles) | N²(W+5) = 117 |
| `start` sampled to `stop` high, P pairs | P·117 + 2 |
| `start` to first result written | N²(W+4) + 2 = 110 |

All three PEs work in parallel, so a pair costs 9 serial multiplications,
not 27. The schedule does not overlap memory reads or the drain with
multiplication. That overlap is the obvious next step for throughput.

## Modules

| file | role |
|---|---|
| `rtl/matmul_pkg.sv` | default sizes, load-target and state enums |
| `rtl/pixel_mem.sv` | 64 × 8 memory, active-low write, registered read with `rd_enable` |
| `rtl/parallel_mem_unit.sv` | three `pixel_mem` banks on one address bus, one per row of A |
| `rtl/row_col_counter.sv` | element / row / column / matrix counters |
| `rtl/shift_add_mult.sv` | serial-parallel signed multiplier with Start/Stop |
| `rtl/pe_adder.sv` | accumulating adder |
| `rtl/sum_fifo.sv` | fall-through FIFO of partial sums, push and pop in one cycle allowed |
| `rtl/processing_element.sv` | multiplier + adder + FIFO for one result row |
| `rtl/matrix_formation_unit.sv` | the N PEs, stop combining and drain selection |
| `rtl/result_mem.sv` | 64 × 18 result memory with a separate host read port |
| `rtl/control_unit.sv` | the sequencing state machine and address generation |
| `rtl/matmul_top.sv` | top level |

The parameters of `matmul_top` are `N`, `W`, `ADDR_W`, `ACC_W` and
`MAT_W`, and every submodule takes its size from them. Keep
`N*N*(mat_last+1) <= 2**ADDR_W`; nothing checks it.

Assertions check the protocol: no push into a full FIFO without a pop, no
pop from an empty FIFO, no drain of an empty FIFO, and no multiplier start
while it is busy.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. Each one has a watchdog. Example with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/matmul_pkg.sv \
          tb/tb_matmul_top.sv --top-module tb_matmul_top -Mdir obj
./obj/Vtb_matmul_top
```

Coverage of the testbenches:

- `tb_matmul_top` runs the design at its default size. The runs are:
  - one pair of small positive matrices;
  - seven random signed pairs, which fill the memories;
  - a run during which the host keeps writing to the operand memories
    (the writes must be ignored);
  - an all-(−128) pair, which gives the largest possible sums.

  It checks every result against a model and checks the cycle count of each
  run. It also counts how often each mechanism occurred: multiplications,
  negative multipliers (the subtract step), cyclic FIFO additions,
  write-backs, steps of the matrix counter, and ignored host writes. It
  fails if any count is zero.
- `tb_matmul_dims` builds the design for 2 × 2 and 4 × 4 matrices with the
  helper `tb/matmul_dim_check.sv`. It runs random pairs and all-(−128)
  pairs through each size and checks the results and the cycle counts.
- `tb_shift_add_mult` tests all corner operand pairs and 2000 random pairs,
  and checks the 10-cycle latency.
- `tb_processing_element` and `tb_matrix_formation_unit` compare drained
  rows with a model.
- `tb_control_unit` checks the exact order of reads, accumulations and
  writes for runs of 1, 3 and 7 pairs. In this test a delay stands in for
  the multipliers.
- The memory, FIFO, counter and adder testbenches cover their blocks alone.

## Relation to the original description, and departures

The original description of this design supplies the following:

- the block structure: input memory, multiplier module, adder, FIFO, output
  memory, row/column counter and control unit;
- 8-bit operands and the 16-bit product;
- the shift-and-add multiplier, with its Start/Stop state machine that
  tests the LSB and then adds and shifts;
- the signed serial-parallel multiplier;
- the FIFO used for cyclic addition;
- 64-word memories with a 6-bit address and an active-low write enable;
- three parallel memory banks with registered outputs;
- the `count`/`rowcount`/`column`/`rd_enable` signals and their widths;
- PEs that run in isolation;
- the 3 × 3 example with its nine sum-of-products equations.

The following are choices made here:

- one PE per result row, and the k-outer / j-inner order;
- the broadcast of B to all PEs;
- the signed method of the multiplier (subtract in the last step);
- the 18-bit accumulator;
- the memory layout and the host ports;
- the state machine of the control unit.

Known differences:

- **Multiplier and adder count.** The original implementation is reported
  to contain 48 multiplier elements and 32 adders, with no description of
  how they are arranged. That count does not fit a 3 × 3 product. This
  design uses 3 multipliers and 3 adders, and reuses each of them over the
  9 steps of a pair.
- **Feedback path.** The original block diagram draws a connection from the
  FIFO output back to the multiplier module. Here the FIFO head feeds back
  into the adder of the same PE. The adder is read as part of the
  "adder/multiplier unit".
- **Counter sequence.** The original timing diagram shows the row count
  running through the values 0 to 3. For a 3 × 3 matrix the counters here
  wrap after 2.
- **Problem statement.** The introduction states the problem as
  matrix-times-vector, but the worked example is matrix-times-matrix. The
  matrix-times-matrix form is built. A vector is the special case in which
  only column 0 of B is used.
- **Square matrices only.** The original mentions matrices of arbitrary
  n × m size but describes only square ones. Here both matrices are N × N.
- **Performance figures.** The original states no cycle counts for latency
  or total computation time, so the numbers in the Timing section are this
  design's own.
