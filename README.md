# Two min-sum LDPC decoders: a dual-codeword 1200-bit decoder and a 600-bit UWB decoder

This repository holds synthesizable SystemVerilog for two fully parallel
low-density parity-check (LDPC) decoders. Both use the min-sum algorithm with
8 iterations.

- **Code II decoder** (`ldpc2_decoder`) handles a rate-0.6 (1200,720) code. It
  keeps two codewords in flight at once and decodes a pair in 36 clocks, which
  is 40 information bits per clock.
- **Code I decoder** (`ldpc1_decoder`) handles a rate-3/4 (600,450) code for a
  multiband-OFDM ultra-wideband receiver. It decodes one codeword in 77 clocks,
  which is 480 Mb/s at 82 MHz.

`ldpc_top` places both decoders side by side. They share only the clock and
reset.

The main idea is the same in both decoders: build as few processing units as
the throughput target allows, then keep them busy every clock. Code I shares
its units between row and column sets over time. Code II splits the matrix into
quadrants and works on two codewords in alternate half-periods. Its check and
bit arrays are therefore never idle, and the wiring between them stays fixed.

## Arithmetic

| Quantity | Format |
|---|---|
| Channel value (LLR) | 5-bit sign-magnitude: sign plus 4-bit magnitude, LSB = 1/16. Positive means bit 0 is more likely. |
| Message between nodes | 6-bit sign-magnitude: sign plus 5-bit magnitude, same LSB. |
| Bit-node sums | 8-bit two's complement. |

- **Check node.** Uses the usual min-sum simplification. The node finds the
  smallest and second-smallest input magnitudes. An edge whose own magnitude
  equals the minimum gets the second minimum; every other edge gets the
  minimum. The output sign is the XOR of all input signs with the edge's own
  sign. No offset or scaling is applied.
- **Bit node.** Each outgoing message is the channel value plus the other two
  incoming check messages, converted back to sign-magnitude and clipped to ±31.
  The decoded bit is the sign of the channel value plus all three check
  messages.
- **Loading.** Channel values enter through the bit nodes themselves. In a
  loading step the check messages are forced to zero, so the bit nodes write
  the channel values into the message storage. No separate initialisation
  path exists.

`tb/ldpc_ref_pkg.sv` is a plain integer model of exactly this arithmetic. Both
decoders match it bit for bit.

## Parity-check matrices

Both codes have column weight 3. The matrices are not stored as tables; they
are defined by closed formulas in `rtl/ldpc_pkg.sv`. The decoders are wired
from those formulas at elaboration time, and the model evaluates the same
formulas.

- **Code I.** H is 150 × 600. Column c = 150q + t has edge k in
  row (A_k·t + G_k·q + H_k·t·q + B_k) mod 150. Rows have weight 11 (100 rows)
  or 14 (50 rows).
- **Code II.** H is 480 × 1200 and consists of four 240 × 600 quadrants,
  h00 h01 / h10 h11.
  - Edge 0 of every column lies in the upper row half and edge 2 in the lower
    half.
  - Edge 1 lies in the upper half for local columns 0..299 and in the lower half
    for 300..599.
  - So every quadrant holds exactly 900 edges, and rows have weight 7, 8 or 9.
  - The matrix has no 4-cycles, and row i and row i+240 have the same edge
    pattern.

These are stand-in codes. They were chosen to have the row- and column-weight
structure the two architectures are sized for. They are **not** the
PEG-constructed codes the architectures were originally designed around, so
error-rate figures measured with them say nothing about those codes. To use
another code, replace the `c1_*` / `c2_*` functions. Any code with the same
partition properties keeps the hardware unchanged.

## Code II decoder: two codewords, four quadrants, 36 clocks

This is the hardest part of the design.

### Units

- **240 check-node units** (`cnu9`): one per row of a row half, up to 9 inputs,
  combinational.
- **600 bit-node units** (`bnu`, `PIPE=0`): one per column of a column half,
  combinational.

In one clock the check array processes one row half (1800 edges) and the bit
array one column half (1800 edges). A full iteration over one codeword
therefore needs 2 clocks per array.

### Schedule

Clock n = 0..35 of a run, with phase = n mod 2 and period P = n / 2.

- **Bit array.** In period P it works on codeword P mod 2, on column half
  `phase`. Periods 0 and 1 are the loading steps of codewords 0 and 1.
- **Check array.** It works one period behind the bit array, on the same
  codeword, on row half `phase`.
- While the check array works on codeword 0, the bit array works on codeword 1,
  and the other way round. Neither array ever waits.
- A run takes 2 + 2 + 8 × 4 = 36 clocks.
- The hard decisions of the last bit-node step leave in clocks 32..35 as four
  600-bit blocks, in this order:
  1. codeword 0, bits 0..599
  2. codeword 0, bits 600..1199
  3. codeword 1, bits 0..599
  4. codeword 1, bits 600..1199

### Message memories (RE-5B)

Two memories of five sub-blocks (A–E) connect the arrays. MMU-0 carries
bit→check messages and MMU-1 carries check→bit messages.

- **Producers.** Each producer writes one quadrant pair per clock into fixed
  sub-blocks:
  - the bit array writes its upper-half edges into B or D and its lower-half
    edges into C or E;
  - the check array does the same with its left and right column-half edges.
- **Consumers.** Each consumer always reads A and C.
- **Exchange.** The memory moves data between sub-blocks with a two-clock
  pattern:

  ```
  phase 0:  A <= D   C <= E   B <= new   D <= new
  phase 1:  A <= B   C <= new E <= new   (D holds)
  ```

- **Result.** The consumer receives, one period later and in its own order,
  the quadrant pairs the producer wrote in the other order.

So every unit reads and writes the same register slots every clock, and no
multiplexer on the wide message paths depends on the phase. The only switching
left is the zero-forcing during loading.

- **MMU-0 slot layout.** Slots are indexed by (row, candidate position). Every
  row has five candidate positions per column half, and not every position
  holds an edge.
- **MMU-1 slot layout.** Slots are indexed by (column, edge).

### Input ring buffer (RS)

The channel values of the pair enter serially into a ring of four 600-value
blocks (`rs_input_buffer`).

- **Filling.** After each 600 values the ring rotates once. When filling
  ends, block 3 holds codeword 0's first half and the others follow in order.
- **Decoding.** The ring rotates every clock during decoding, so the block at
  the output is always the one the bit array needs in that clock. This works
  because the bit array visits (cw0, half 0), (cw0, half 1), (cw1, half 0) and
  (cw1, half 1) in that repeating order.

## Code I decoder: time-shared pipelined units, 77 clocks

### Units

- **150 bit-node units** (`bnu`, `PIPE=1`).
- **50 check-node units** (`cnu14`, up to 14 inputs).

Both unit types have one pipeline register. The minimum search in `cmp14` is
split into two stages around that register.

### Sets and message bank

- The 600 columns form 4 column sets of 150 and the 150 rows form 3 row sets
  of 50.
- A 1800-entry message bank (`ldpc1_msg_mem`) holds one message per edge.
- The bank has two fixed switch networks. The check-side network presents the
  edges of row set s to the 50 check units. The bit-side network presents
  column set s to the 150 bit units.
- Bit-node results overwrite the edge entries with bit→check messages, and
  check-node results overwrite them with check→bit messages.

### Schedule

Clock n = 0..76.

| Clocks | Activity |
|---|---|
| 0..3 | Loading steps for column sets 0..3 |
| 4 | Idle (pipeline drain) |
| each of 8 iterations | 3 row-set reads, 1 drain clock, 4 column-set reads, 1 drain clock (9 clocks) |

- Every unit writes back one clock after it reads.
- The drain clocks guarantee that a set is never read before the previous
  phase has written it.
- The decoded bits leave in clocks 73..76, one 150-bit column set per clock
  (`out_set`).

The distributor (`ldpc1_distributor`) is a 600-value shift register filled
serially; it presents the 150 channel values of the active column set.

## Interfaces and timing

Both decoders have the same input and output handshake.

- **Input.** Channel values are accepted while `in_ready` is high, `IN_LANES`
  per clock, in column order. For Code II, codeword 0 comes first, then
  codeword 1.
- **Decoding.** It starts the clock after the last value is accepted. `busy`
  is high for exactly 36 clocks (Code II) or 77 clocks (Code I), and
  `in_ready` is low during that time.
- **Output.** `out_valid` marks the four output blocks. `out_cw`/`out_half`
  or `out_set` name each block.
- **Reset.** `rst_n` is an asynchronous, active-low reset.

Loading does not overlap decoding. With the default `IN_LANES = 1`:

| Decoder | Load clocks | Decode clocks | Information bits per clock |
|---|---|---|---|
| Code II (per pair) | 2400 | 36 | about 0.59 |
| Code I | 600 | 77 | about 0.66 |

The decoding cores reach the full rates of 40 and 5.84 information bits per
clock only when a front end delivers channel values in parallel with
decoding. This design does not provide such a front end; widening `IN_LANES`
shortens the load time but does not overlap it.

## Where this design departs from or adds to the original architecture

- The parity-check matrices are substitutes (see above).
- The RE-5B sub-block exchange pattern, the slot layouts, the check-port
  masking and the exact Code I clock schedule (which clock is idle) are this
  design's own. They are built to the described unit counts, pipelining,
  memory sizes and cycle counts: 9 clocks per Code I iteration with 5 loading
  clocks, and 36 clocks per Code II pair.
- The decoders always run 8 iterations; there is no early stop on a zero
  syndrome.
- The input handshake, serial loading and output block format are this
  design's own.
- The Code I encoder, the OFDM baseband that shares the UWB chip with the
  Code I decoder, and the pads of the test chips are not included.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`.

- **Units.** The comparators are checked against a sort. The node units are
  checked against direct formulas. The memories are checked with tagged data,
  and the message bank against a row table built independently from H.
- **Decoders.**
  - `tb_ldpc1_decoder` decodes 5 codewords and `tb_ldpc2_decoder` 3 pairs.
  - The inputs are random values and the all-zero codeword with three noise
    levels.
  - Every decoded bit is compared with `ldpc_ref_pkg::minsum`, and the run
    lengths (77 and 36 clocks) are checked.
- **Top.** `tb_ldpc_top` runs both decoders at once at the default parameters
  and checks all outputs against the model. It also counts how often the
  following were exercised, and fails if any never happened:
  - ring rotation
  - loading through the bit nodes
  - RE-5B exchange
  - two-codeword interleave
  - Code I pipeline overlap
  - backpressure
  - actual error correction

To run one testbench with Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_ldpc_top \
  rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv rtl/*.sv tb/tb_ldpc_top.sv -o sim
./obj_dir/sim
```

For the other testbenches, replace `tb_ldpc_top` with their names. The
top-level test takes under two minutes to build and run.

## Files

| File | Contents |
|---|---|
| `rtl/ldpc_pkg.sv` | Formats, code formulas and their inverse maps |
| `rtl/ldpc_top.sv` | Both decoders side by side |
| `rtl/ldpc2_decoder.sv` | Code II decoder: `rs_input_buffer`, `mmu_re5b`, `cnu9` (`cmp9` → `cmp4`, `cmp2`), `bnu` |
| `rtl/ldpc1_decoder.sv` | Code I decoder: `ldpc1_distributor`, `ldpc1_msg_mem`, `cnu14` (`cmp14` → `cmp4`, `cmp2`), `bnu` |
| `tb/` | Testbenches and the reference model |
