# Sparse matrix-vector multiplier in SystemVerilog

This design computes y = A·x in IEEE-754 single precision when A is sparse.
A arrives as a stream of its non-zeros in compressed-row order (CRS): row by
row, each non-zero given as a (row index, column index, value) triple. x sits
in on-chip memory. Only the non-zeros are multiplied. No zero of A is stored
or touched.

The work is split over eight identical **sparse engines** (SEs). Each engine
owns a set of rows and computes their dot products with x one row at a time,
using a pipelined floating-point multiply-accumulate unit. A **result memory**
collects y.

Main sizes at the default parameters:

| quantity | value | set by |
|---|---|---|
| x elements (matrix columns) | 64 | `COL_W` = 6 |
| rows per engine | 64 | `ROW_W` = 6 |
| engines | 8 | `N_SE` |
| matrix rows | 512 | `N_SE * 2**ROW_W` |
| non-zeros per row | 1 to 64 | `2**COL_W` |
| non-zeros queued per engine | 1024 | `FIFO_DEPTH`, `SPARSE_DEPTH` |
| multiplier / adder latency | 8 / 8 cycles | `MUL_LAT`, `ADD_LAT` |

## How a matrix flows through the design

1. **Load x.** Drive `x_we`, `x_addr` and `x_data`. Each x element is written
   into the coefficient RAM of all eight engines at once.
2. **Pulse `res_clear`.** After the clear, rows with no non-zeros read back
   as 0.0.
3. **Stream the non-zeros.** Use `nz_valid`/`nz_ready`, with `nz_row`
   (9 bits), `nz_col` (6 bits) and `nz_val`. The rows must arrive in order:
   all non-zeros of a row must come together. Inside a row the columns may
   come in any order. Rows with no non-zeros are simply left out.
4. **End the matrix.** Send one beat with `nz_eom` = 1. It carries no element
   and closes the last open row in every engine.
5. **Read y.** Wait until `busy` falls. Then put a row on `res_raddr`;
   `res_rdata` gives y[row] one clock later. Each result can also be
   captured as it is written, on `res_wvalid`/`res_wrow`/`res_wdata`.

`nz_ready` goes low while any engine's FIFO is full. This is the stall: the
stream simply waits.

**Row-to-engine mapping.** The low three bits of `nz_row` select the engine.
The upper six bits are the row index inside that engine. So rows 0..7 go to
engines 0..7, and neighbouring rows are worked on in parallel. Engine `e`
writes its local row `r` back to global row `{r, e}`.

## Inside a sparse engine (`sparse_engine`)

```
 row,col,val ──► controller ──► col_id FIFO ──► Coeff RAM (x) ──┐
                     │                                           ├─► MAC ──► row result
                     ├──────► Sparse RAM (values) ───────────────┘
                     └──────► row_cnt FIFO ──► (row start)
```

Inside the engine each non-zero is a 12-bit `row_col_id` word, with the
row index in the upper 6 bits and the column index in the lower 6 bits,
plus its 32-bit value.

**Write side of the controller (`se_controller`).** The controller compares
the row index of each non-zero with the row index of the one before it:

- Same row: the running count, row_cnt, goes up by one.
- New row (or the `nz_eom` beat): the finished row is written to the
  **row_cnt FIFO** as `{row index, row_cnt − 1}`, and a new count starts.

Every column index goes into the **col_id FIFO**. Every value goes into the
**Sparse RAM**, at consecutive addresses. So the Sparse RAM and the col_id
FIFO stay in step: entry k of one belongs to entry k of the other.

**Read side of the controller.** A row starts only when two things hold:

- its entry is in the row_cnt FIFO, which means the row is complete;
- the MAC has handed over the previous row's result.

Then, for row_cnt cycles, the controller pops one column index per cycle:

- the column index is the Coeff RAM read address, which fetches x[col];
- the Sparse RAM is read at the next address in order, which fetches the
  matrix value.

Both RAMs have one clock of read latency. The pair reaches the MAC one clock
later, and the final pair carries a "last" flag.

**Memories.** Both RAMs are simple dual-port block RAMs (`sdp_ram`):
- one write port and one read port;
- synchronous read;
- write-first: a read of the address being written returns the new data.

The FIFOs (`sync_fifo`) are show-ahead: the head word is always visible.

**Why the col_id FIFO must be deeper than a row.** A row becomes visible to
the read side only when the next row's first element (or `nz_eom`) arrives.
Take a 64-element row: it needs 64 FIFO places, plus one for the element
that closes it. With fewer places the stream would stop for good. The
default depth of 1024 is far above this. An elaboration-time assertion
checks it.

## The multiply-accumulate unit (`fp_mac`)

This is the least obvious part of the design.

**The problem.** The adder takes 8 cycles. A plain accumulator
(`acc = acc + p`) could therefore add only one product every 8 cycles.

**Interleaved partial sums.** The MAC keeps 8 partial sums instead of one.
Product k is added into partial sum k mod 8. A partial sum is reused only
every 8 products. By then the addition it took part in has left the 8-stage
adder, so products enter at one per cycle with no stall. In one case the
partial sum's new value is still on the adder output and not yet written to
the register: it is then taken straight from the adder output (a bypass).
Each addition carries its slot number through the adder as a tag, so the
result is written back to the right partial sum.

**Reduction.** After the row's last product, and once the adder is empty,
the 8 partial sums are added as a pairwise tree on the same adder:

1. four additions, 8 → 4;
2. two additions, 4 → 2;
3. one addition, 2 → 1.

Before each round the MAC waits for the adder to drain.

**Handing over the result.** The result appears on `out_data` (mult_out)
with `out_valid` (conv_done). It stays there until `out_ready`. At that
moment the partial sums are cleared for the next row.

**Timing.** A row of n elements fed back to back takes n + MLAT + 4·ALAT + 11
cycles from its first pair to conv_done. That is n + 51 cycles at the
default latencies, and each step of this figure is checked by a testbench.
In a full engine the controller and RAMs add 3 cycles, counted from the beat
that closes the row. An engine works on one row at a time, so its throughput
is about n/(n + 54) products per cycle. With eight engines the design
sustains roughly 8n/(n + 54) products per cycle: about 2.7 per cycle for 27
non-zeros per row. The fixed cost of about 54 cycles per row dominates
for very sparse rows. Measured on random 512×64 matrices (from the first
non-zero to the last result):

| non-zeros | count | cycles | products per cycle |
|---|---|---|---|
| 2 % | 622 | 2813 | 0.22 |
| 5 % | 1674 | 3714 | 0.45 |
| 9 % | 2934 | 3937 | 0.75 |

Denser rows use the engines better, as the figures show.

**Rounding order.** The order of additions is fixed: slot k mod 8, then the
tree. The rounded result is therefore fully determined, but it can differ
in the last bits from a sequential left-to-right sum. The testbenches model
exactly this order.

## Floating-point units (`fp_mul`, `fp_add`)

Each engine has one multiplier, so the design has eight 24×24 significand
multipliers in all. Both units handle binary32 operands. They are fully
pipelined, accept one operation per cycle and have a latency of exactly
`LATENCY` cycles (8 by default).

**Multiplier stages** (4 working stages):
1. unpack the operands and add the exponents;
2. form two 24×12 partial products of the significands;
3. add them into the 48-bit significand product;
4. normalise, round and pack.

**Adder stages** (5 working stages):
1. unpack, order the operands by magnitude, take the exponent difference;
2. shift the smaller significand into line, keeping guard, round and
   sticky bits;
3. add or subtract;
4. normalise: one place right on a carry, or left by the leading-zero
   count;
5. round and pack.

In both units, registers after the working stages delay the result to the
full latency. The split into stages is this design's own choice. A
different latency can be set with `MLAT`/`ALAT`. It must be at least 4 for
the multiplier and 5 for the adder. The MAC adapts its number of partial
sums to the adder latency.

Numeric behaviour:
- rounding is to nearest, ties to even;
- subnormal inputs are read as zero, and subnormal results are flushed to a
  signed zero;
- overflow gives ±infinity;
- a NaN input, inf·0 or inf − inf gives the quiet NaN `7FC00000`;
- an exact cancellation gives +0.

## Result collection (`rr_arbiter`, `result_ram`)

Up to eight engines can finish a row in the same cycle. A round-robin
arbiter grants one of them per cycle the single write port of the result
memory. An engine whose result is waiting holds it, and starts its next row
only after the write. `conv_done[e]` shows which engines are waiting.

The result memory has a "written" flag for each row. `res_clear` resets all
the flags in one cycle, and a row whose flag is clear reads as 0.0. This is
how rows without non-zeros get their zero result.

## Choices made here, and departures from the original description

The engine structure comes from the published design: controller, Coeff RAM
64×32, Sparse RAM 1024×32, two 1024-deep FIFOs, and a MAC with an 8-cycle
multiplier and adder. So do the row-index comparison in the controller, the
stall on a full FIFO, the write-first dual-port RAM, the eight engines and
the result memory. The following are this implementation's own choices:

- **x size.** 64 elements: a 6-bit column index and a 64-word coefficient
  RAM. The original text also mentions a 630-element vector (stored 63×10).
  That is not consistent with a 6-bit column index, so it is not
  implemented.
- **row_cnt FIFO width.** Each entry is 12 bits wide, `{row, count−1}`, not
  6. The row index is needed to address the result. Storing count − 1 lets a
  full 64-element row fit in 6 bits.
- **Interface details.** The valid/ready handshakes and the `nz_eom` beat
  are choices made here, as is synchronous active-low reset. So are the
  row-to-engine mapping, the single shared input stream and the result
  arbiter.
- **Accumulator structure.** The interleaved partial sums with a tree
  reduction, and the floating-point corner-case handling described above,
  are also choices made here.
- **Input rules the hardware trusts.** The hardware does not check that the
  input is well formed. Each row must come contiguously, with at most 64
  elements and no repeated column. A row that came back later would be
  computed again as a separate row and overwrite the first result. In
  simulation, assertions report a row longer than 64 elements and FIFO
  overflow or underflow.
- **Not modelled.** Timing closure on a particular FPGA is outside the scope
  of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/spmv_pkg.sv` | shared type `fp32_t`, default sizes |
| `rtl/spmv_top.sv` | top: 8 engines, arbiter, result memory |
| `rtl/sparse_engine.sv` | one sparse engine |
| `rtl/se_controller.sv` | row counting, FIFO/RAM control, row issue |
| `rtl/fp_mac.sv` | multiply-accumulate with partial sums and tree reduction |
| `rtl/fp_mul.sv`, `rtl/fp_add.sv` | pipelined binary32 multiplier and adder |
| `rtl/sync_fifo.sv`, `rtl/sdp_ram.sv` | FIFO and simple dual-port RAM |
| `rtl/result_ram.sv`, `rtl/rr_arbiter.sv` | result memory with clear, round-robin arbiter |
| `tb/fp_ref_pkg.sv` | reference binary32 arithmetic (through `real`), MAC order model |
| `tb/tb_*.sv` | self-checking testbenches: one per module except the arbiter, plus `tb_spmv_density` |

## Simulating

Every testbench checks itself. At the end it prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/spmv_pkg.sv tb/fp_ref_pkg.sv tb/tb_spmv_top.sv --top-module tb_spmv_top
./obj_dir/Vtb_spmv_top
```

Replace `tb_spmv_top` with any other testbench name.

**`tb_spmv_top`** runs the whole design at its default parameters. It uses
two matrices:

1. The 4×7 example
   `[10 6 0 0 0 0 0; 1 0 0 0 0 4 0; 0 3 0 0 0 0 0; 0 0 0 3 0 0 5]`
   with x = (1..7). It must give y = (22, 25, 6, 47) exactly.
2. A random 512×64 matrix. Every row must match the reference bit for bit,
   and every row must be written once.

It also requires each of these to happen at least once:
- the input stall;
- arbitration between engines;
- the end-of-matrix beat;
- a full 64-element row;
- an empty row reading back as zero;
- the result clear.

**Smaller testbenches:**
- `tb_spmv_density` runs random 512×64 matrices with 2 %, 5 % and 9 %
  non-zeros. It checks every result and prints the cycle count for each
  density.
- `tb_sparse_engine` checks one engine. This includes the result latency
  after the closing beat, and a stall caused by a full col_id FIFO.
- `tb_se_controller` checks every FIFO write and the order of the RAM read
  addresses.
- `tb_fp_mac` checks results and latency for rows of 1 to 70 elements.
- `tb_fp_mul` and `tb_fp_add` check against double-precision references,
  including special values.
- `tb_sync_fifo`, `tb_sdp_ram` and `tb_result_ram` check the storage blocks.

**Changing the design.** Parameters of `spmv_top`:
- `N_SE`: number of engines, a power of two;
- `ROW_W`, `COL_W`: row and column index widths;
- `FIFO_DEPTH`, `SPARSE_DEPTH`: FIFO and Sparse RAM depths;
- `MLAT`, `ALAT`: multiplier and adder latencies.

Two rules apply. `FIFO_DEPTH` must exceed `2**COL_W`. `SPARSE_DEPTH` must be
at least `FIFO_DEPTH`. The MAC uses `ALAT` rounded up to a power of two (at
least 4) as its number of partial sums.
