# Layered min-sum LDPC decoder for IEEE 802.11n, 648-bit codewords

This is a partly parallel ("hybrid") decoder for the low-density parity-check
codes of IEEE 802.11n at block length 648. It handles code rates 1/2 and 5/6.
The parity check matrix of these codes is a grid of 27x27 sub-matrices, with
24 block columns. Each sub-matrix is either zero or a cyclically shifted
identity. The decoder uses that structure directly:

- 27 check node datapaths work on the 27 check rows of one block row (a
  *layer*) at the same time.
- The 648 soft values are stored as 24 words of 27 values, one word per
  block column.
- A barrel shifter turns the shifted identity into a lane-to-lane wiring.
  Lane r of the rotated word holds the variable connected to check row r.

Decoding is layered min-sum. Each layer updates the soft values at once, so
the next layer already sees the new values. That roughly halves the number
of iterations needed, compared with flooding schedules.

The design also applies *differential shifting*, a power-saving idea. The
classic hybrid decoder has a second barrel shifter that rotates results back
before they are written. This design drops that shifter. Words are written
back still rotated, and the next read rotates by the *difference* between
the stored rotation and the one wanted.

## Block diagram

```
 ld_*  ──►┌──────────────┐ rd  ┌────────────┐   ┌──────────────┐
          │ vn_mem       │────►│ read barrel│──►│ 162-bit reg  │──► out_qn / out_bits
 out ◄────│ 24 x 162 bit │     │ shifter    │   └──────┬───────┘
          └──────▲───────┘     └─────▲──────┘          │ lane r (6 bit)
                 │ wr (unrotated)    │ (s - rot[c]) mod 27
                 │ overlaps next     │
                 │             ┌─────┴──────┐   ┌──────▼───────┐   ┌─────────┐
                 │             │ addr_gen   │──►│ cn_datapath  │◄─►│ cn_mem  │  x27
                 └─────────────│ (control)  │   │   r = 0..26  │   │ 12 x 38 │
                   27 x Qn     │ hmatrix_rom│   └──────────────┘   └─────────┘
                               └────────────┘
```

## Number formats

| value | meaning | format |
|---|---|---|
| Qn | total (a posteriori) value of a code bit | 6-bit two's complement, saturated to ±31 |
| Qnm | Qn minus this row's old check message | 6-bit, saturated to ±31 |
| Rmn | check-to-variable message | sign + 4-bit magnitude (±15) |
| check message | compressed Rm of one row | 38 bits, see below |

A positive value means bit 0. The output hard decision is the sign bit.

The rows of one layer share a *compressed check message* (`cn_msg_t` in
`ldpc_pkg`). It holds one row's complete min-sum output in 38 bits:

| field | bits | content |
|---|---|---|
| `min1` | 4 | smallest \|Qnm\| of the row, clipped to 15 |
| `min2` | 4 | second smallest |
| `idx` | 5 | block column that holds the smallest |
| `signs` | 24 | sign of Qnm, one bit per block column |
| `xsign` | 1 | xor of all signs |

The message for block column c is rebuilt as follows:

- The magnitude is `min2` if `c == idx`, otherwise `min1`.
- The sign is `xsign ^ signs[c]`.

## One layer, step by step

Take a layer of weight w, meaning it has w non-zero sub-matrices: 7 or 8 at
rate 1/2, 22 at rate 5/6. Each layer goes through the same four phases.

1. **Read pass (w reads).** For the k-th sub-matrix (column c, shift s),
   `addr_gen` reads word c. The word goes through the read barrel shifter,
   rotated by (s − rot[c]) mod 27, and then into the 162-bit register.
   Two cycles after the read, datapath r gets Qn and does the following:
   - Rebuilds its old message Rmn(i−1) for column c from its `cn_mem` word
     for the layer. This is zero in the first iteration.
   - Computes Qnm = Qn − Rmn(i−1).
   - Stores Qnm at position k of its Qnm memory.
   - Feeds Qnm to the min finder.
2. **Drain (2 cycles).** The last read passes through the memory and the
   register.
3. **Fin (1 cycle).** Each datapath writes its new 38-bit message into
   `cn_mem[layer]` and keeps a copy in a holding register.
4. **Write pass (w cycles, the first in the fin cycle).** For the k-th
   sub-matrix, each datapath reads Qnm back and adds the new Rmn(i) for
   column c. The result, saturated, is the new Qn. The 27 new values are
   written to word c *without* being rotated back, and `rot[c]` becomes s.

### Overlapping layers

Run strictly one after the other, a layer would take 2w+3 cycles. Instead,
`addr_gen` has two sequencers. The read sequencer starts on the next layer
while the write sequencer is still returning the previous one. Layered
decoding requires each read to see the newest value of its word, so three
rules apply:

- **Pending columns.** A read marks its block column pending; the
  write-back clears the mark. A read of a pending column stalls until the
  word is back. The memory is never asked to forward a word written in the
  same cycle.
- **Two layers in flight.** The first read of a layer waits until at most
  one other layer is between its first read and its last write. Each
  datapath has one Qnm memory and one holding register, enough for two
  layers.
- **One write pass at a time.** A layer's fin waits until the write
  sequencer is free.

Within a datapath, the overlap is safe for the following reasons:

- The next layer overwrites Qnm position k no earlier than the cycle in
  which the current layer reads it back. The Qnm memory reads
  asynchronously, so that read still gets the old entry.
- The min finder restarts on the next layer's first value. The new
  message of the previous layer is kept in the holding register from fin on.

The results are bit-identical to the strict schedule; only the timing
differs. How much overlap is possible depends on how many columns two
consecutive layers share, and in which order they are visited. At rate 5/6,
consecutive layers share almost every column. There the rules cost about
3–4 stall cycles per layer. At rate 1/2 the layers are short, so the
two-layer limit and the wait for fin dominate.

### Differential shifting

Lane r of a stored word always holds code bit 27c + (r + rot[c]) mod 27.
Loading a word sets rot[c] = 0. The rules that keep this true are:

- Reading for shift s rotates by (s − rot[c]) mod 27, so lane r receives bit
  27c + (r + s) mod 27. That is the bit connected to check row r.
- Writing the datapath outputs unrotated leaves the word rotated by s.

`addr_gen` keeps rot[] in 24 five-bit registers. After the last iteration it
reads all 24 words once more with shift (0 − rot[c]) mod 27. The words
therefore leave the decoder in natural order, and no shifter is needed on
the output.

## Interface and timing (`ldpc_decoder`)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ld_valid`, `ld_col`, `ld_data` | in | 1, 5, 162 | write the 27 LLRs of block column `ld_col`; lane i (bits 6i+5:6i) is code bit 27·`ld_col`+i |
| `ld_ready` | out | 1 | idle; loads are accepted |
| `start`, `rate_sel`, `iters` | in | 1, 1, 4 | start a decode; `rate_sel` 0 selects rate 1/2, 1 selects 5/6; `iters` is the iteration count (0 counts as 1) |
| `busy`, `done` | out | 1 | busy from start to done; `done` pulses for one cycle |
| `out_valid`, `out_col`, `out_qn`, `out_bits` | out | 1, 5, 162, 27 | the 24 result words in column order, one per cycle |

How to use it:

1. While `ld_ready` is high, load all 24 words, in any order.
2. Pulse `start`.
3. Collect the output words.

While the decoder is busy, `ld_valid` and `start` are ignored.

Latency from the start cycle to `done`, measured with the built-in
ascending column order, is:

| rate | first iteration | each further iteration | 3 iterations | 10 iterations |
|---|---|---|---|---|
| 1/2 (12 layers, 88 sub-matrices) | 144 | 137 | 445 | 1404 |
| 5/6 (4 layers, 88 sub-matrices) | 124 | 102 | 355 | 1069 |

The first iteration includes the pipeline fill and the final write pass.
Each total includes 27 cycles for the output pass. A strict read-then-write
schedule would need 212 and 188 cycles per iteration.

Only information bits count toward throughput: 324 at rate 1/2, 540 at 5/6.
At 3 iterations that gives:

- 60.8 Mbps at rate 1/2 with an 83.5 MHz clock;
- 108.8 Mbps at rate 5/6 with a 71.5 MHz clock.

The reference decoder reports 60.68 and 113.78 Mbps at those clocks, which
means about 446 and 339 cycles per codeword. Rate 1/2 matches. Rate 5/6 is
about 5 % slower, because of the stalls on columns shared between
consecutive layers. The reference's own overlap rules are not known; the
rules here are this design's.

## Where this design departs from the reference decoder, and why

These differ from the reference decoder on purpose:

- **Qnm width.** The reference keeps Qnm in a 24 × 5-bit memory. With Qnm
  clipped to 5 bits, the layered update loses the channel value as soon as
  Qnm clips. In simulation, decoding then collapsed after two or three
  iterations, even from an almost error-free input. Here Qnm has the Qn
  width (6 bits, ±31), and the Qnm memory is 24 × 6. The magnitude is
  clipped to 15 only inside the min finder, where the 4-bit `min1`/`min2`
  fields are.
- **Overlap rules.** The stall rules of the overlapped schedule are this
  design's own (see "Overlapping layers").
- **Rotation bookkeeping.** The rotation of each word is tracked at run
  time. The alternative is to precompute differential shift amounts and
  reorder the initial memory contents. With run-time tracking, words are
  loaded and unloaded in natural order.
- **One decoder, two rates.** Both rates run on one decoder, chosen per
  codeword. The reference numbers come from separate builds per rate.
  `cn_mem` has 12 words per datapath, which is enough for the 12 layers of
  rate 1/2. Rate 5/6 uses 4 of them.

These parts are missing or are this design's own choice:

- **Sub-matrix reordering** is a power technique that reorders the
  sub-matrices inside a layer. Its ordering rule is not available. Here
  sub-matrices are processed in ascending block column order. The order
  lives in `hmatrix_rom` (`build_tab`) and can be replaced by any
  permutation within a layer. The check message indexes signs and the
  minimum by block column, so the order does not change the results.
- **Glitch reduction** added registers at unknown places. The only such
  register here is the 162-bit register between the shifter and the
  datapaths.
- The **base matrices** are the 802.11n matrices for Z = 27. The 1296- and
  1944-bit codes and rates 2/3 and 3/4 are not included.
- The following are this design's own choices: plain min-sum (no scaling
  or offset), a fixed iteration count with no early termination, tie
  handling in the min finder (the earlier column wins), saturation points,
  reset, and the load/output handshake.

## Known numerical behaviour

Qn has only 6 bits. In columns of degree 12 (rate 1/2, block columns 0, 4
and 8), the true sum of messages far exceeds ±31, so it is clipped. After
clipping, later negative updates can flip a sign that the full-precision
sum would keep. A codeword that was almost corrected can then diverge again
over many iterations.

The bit-exact reference model shows the effect with channel LLRs of mean
magnitude 4 (about 2 % raw bit errors):

- after 3 iterations, 0 of 40 rate-1/2 codewords failed;
- after 10 iterations, 3 of 40 failed.

With mean magnitude 3 (about 1 % raw errors), none of 40 failed at either
count. Rate 5/6 did not show the effect in these tests.

Keep the channel LLRs scaled well below the ±31 limit, or widen Qn. Widening
Qn means changing `QW` in `ldpc_pkg` and the saturation limits in
`cn_datapath`.

## Files

RTL (`rtl/`):

| file | block |
|---|---|
| `ldpc_pkg.sv` | sizes, types, message struct, base matrices, helper functions |
| `ldpc_decoder.sv` | top level: memory, shifter, register, 27 datapaths with their check memories |
| `addr_gen.sv` | controller, address generation, differential shift, pipeline tags |
| `hmatrix_rom.sv` | per-layer list of (block column, shift), built at elaboration |
| `vn_mem.sv` | 24 × 162 variable node memory (1R1W, synchronous read) |
| `barrel_shifter.sv` | 27-lane cyclic rotator, 5 stages |
| `cn_datapath.sv` | one check row: subtract, Qnm memory, min finder, add |
| `cn_min_finder.sv` | running min / second min / index / signs |
| `cn_r_select.sv` | expands a 38-bit message into Rmn for one column |
| `qnm_mem.sv` | 24 × 6 Qnm memory (asynchronous read) |
| `cn_mem.sv` | 12 × 38 check node memory |

Testbenches (`tb/`) are all self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`.

- `tb_<block>.sv` tests one block against values computed in the testbench.
- `ldpc_model_pkg.sv` holds the reference model. It contains a GF(2)
  Gauss-Jordan encoder, which draws random valid codewords for either rate.
  It also contains a layered min-sum decoder with the same number formats.
  That decoder stores every edge's message in full and takes each Rmn as
  the minimum over the other edges of the row, so it shares no structure
  with the compressed hardware.
- `tb_ldpc_decoder.sv` runs the full decoder at its real size. It covers
  both rates, rate changes between codewords, 1, 3 and 10 iterations, and
  weak to strong channels. It compares all 648 outputs bit for bit with the
  model, checks the cycle count, and checks that commands are ignored while
  busy. It also counts differential shifts, Qnm saturations, corrected
  codewords, read stalls and cycles in which reads and writes overlap. Each
  of these must occur at least once.
- `tb_ldpc_workloads.sv` runs the evaluation points: for each rate, 10
  codewords at 10 iterations and one at 3 iterations. It prints the
  resulting throughput.

## Simulating

Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ldpc_pkg.sv tb/ldpc_model_pkg.sv tb/tb_ldpc_decoder.sv \
    --top-module tb_ldpc_decoder -o sim
./obj_dir/sim
```

For a block testbench, `tb/ldpc_model_pkg.sv` is not needed. For example:

```
verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv \
    tb/tb_cn_datapath.sv --top-module tb_cn_datapath -o sim
```

The other modules are found through `-Irtl` (file name = module name).
Every testbench finishes in well under a second of simulation.
