# Hybrid random/burst error correction for SRAM words

Radiation upsets in space memories show up in two shapes: isolated bit flips
scattered over a word (random errors) and runs of neighbouring cells flipped by
one particle strike (burst, or adjacent, errors). Codes that handle one shape
well tend to fail on the other. This design protects every 16-bit memory word
with two codes at once and decodes both on every read:

* a **modified decimal matrix code (MDMC)** aimed at random errors: the word is
  cut into 4-bit symbols, each symbol carries 3 Hamming check bits, and the bit
  columns of the symbol matrix carry XOR check bits that say *which* bits of an
  erroneous symbol flipped;
* a **flexible unequal error control (FUEC) code** aimed at bursts: 10 parity
  bits whose syndrome is looked up in a table of every run of 1 to 5 adjacent
  flipped bits.

A small merge unit decides, per read, which decoder's answer to trust.

## The stored row

Each write stores one 54-bit row (default configuration):

| bits    | content                          | produced by      |
|---------|----------------------------------|------------------|
| [15:0]  | data X0..X15                     | write data       |
| [25:16] | FUEC code bits C0..C9            | `fuec_encoder`   |
| [37:26] | MDMC horizontal bits P0..P11     | `mdmc_encoder`   |
| [53:38] | MDMC vertical bits V0..V15       | `mdmc_encoder`   |

That is 38 check bits for 16 data bits. Both codes are kept because the scheme
runs them side by side. If you only count the FUEC part, the overhead is 10 bits.

## Random-error path: MDMC

`mdmc_encoder` splits the word into four symbols, D0-D3, D4-D7, D8-D11 and
D12-D15. It lays them out as a K1 x K2 matrix; symbol i sits at row i/K2,
column i%K2.

* **Horizontal bits**: each symbol goes through a Hamming (7,4) encoder
  (`hamming_encoder`) and gets 3 bits: p0 = d0^d1^d3, p1 = d0^d2^d3,
  p2 = d1^d2^d3. Symbol 0 gives P0-P2 and symbol 3 gives P9-P11.
* **Vertical bits**: bit b of column c is the XOR of bit b of every symbol in
  column c.

`mdmc_decoder` re-encodes the data it receives and builds two syndromes:

* **Horizontal syndrome**: for each symbol, the recomputed 3-bit value minus
  the stored one, taken as an unsigned integer modulo 8. It is non-zero
  exactly when the two differ. A non-zero value marks the symbol as erroneous.
* **Vertical syndrome**: the recomputed vertical bits XOR the stored ones. For
  each column, it is the set of bit positions that flipped in that column.

Every marked symbol is XORed with its column's vertical syndrome.

**Choosing the layout.** The default is K1 = 1, K2 = 4. A 16-bit word is then
one row of four symbols, which gives 12 horizontal and 16 vertical bits. With
one symbol per column, the vertical bits are simply a copy of the data. The
decoder then works as duplication: the Hamming bits choose which copy to trust,
symbol by symbol. Because of this, random errors are corrected very well. Any
number of flipped data bits is repaired, as long as every hit symbol's Hamming
bits notice the change.

One blind spot: the Hamming bits do not notice flips of exactly bits 0, 1 and 2
of one symbol (pattern 0111), because that pattern leaves all three check bits
unchanged.

With K1 = 2, K2 = 2 you get a true 2 x 2 matrix with 8 vertical bits. It
corrects one erroneous symbol per column. Its measured rates are in the table
below.

## Burst-error path: FUEC

The FUEC codeword has 26 bits, ordered C0..C9 then X0..X15. Burst adjacency is
counted in this order. Each code bit is the XOR of these data bits:

```
C0 = X0 X4 X5 X6 X7          C5 = X1 X6 X10 X13
C1 = X1 X5 X9 X10 X14        C6 = X2 X7 X10 X11 X15
C2 = X2 X6 X8 X11 X15        C7 = X3 X8 X12 X14
C3 = X3 X7 X11 X12           C8 = X4 X9 X12 X13
C4 = X5 X10 X13 X15          C9 = X4 X7 X10 X13 X15
```

The syndrome bit is S_i = C_i XOR (the same data XOR).

`fuec_decoder` does not store a look-up table. At elaboration it computes the
syndrome of every run of L adjacent flipped bits, for L = 1..5 at every
position: 120 runs in all. It then compares the received syndrome with all of
them in parallel. A match gives the error pattern (`e_hat`), and the word is
XORed with it. A non-zero syndrome with no match raises `uncorrectable`.

**Shared syndromes.** With these equations, four pairs of runs have the same
syndrome:

| run A (wins)   | run B            |
|----------------|------------------|
| C0 alone       | X0 alone         |
| X1 alone       | X11..X15 (5 bits)|
| C2 alone       | X10..X14 (5 bits)|
| X4 alone       | C8..X0 (3 bits)  |

X0 only enters C0, so its column of the parity-check matrix is the same as
C0's. The decoder picks the shorter run, then the one that starts lower, since
shorter bursts are more likely. When it picks wrongly, the merge unit below
catches most of those cases.

## Merging the two decoders (`hybrid_select`)

Both decoders see the same received row. The result is chosen in this order:

1. **Neither code sees an error**: return the data as read (`ST_CLEAN`).
2. **FUEC decoded a burst, and its corrected data re-encodes to the stored
   MDMC horizontal bits**: take the FUEC result (`ST_BURST_FIXED`).
3. **Otherwise, MDMC marked at least one symbol**: take the MDMC result
   (`ST_RANDOM_FIXED`).
4. **Otherwise** only check bits disagree: return the data as read
   (`ST_CHECK_ONLY`).

The cross-check in step 2 does the important work. A random multi-bit error can
land on a syndrome that FUEC reads as a burst. Such a guess almost never
reproduces the Hamming bits, so it is rejected (`rd_burst_rejected`) and the
MDMC answer is used. This also resolves the tie between X0 alone and C0 alone.
The FUEC decoder guesses C0 and leaves the data as read. Those data fail the
Hamming check, so MDMC repairs X0.

In the other direction, FUEC covers MDMC's blind spot. For example, a 3-bit
burst on bits 0-2 of a symbol is invisible to the Hamming bits, but FUEC
decodes it.

## Interface and timing (`hybrid_ecc_memory`)

| port                | dir | width   | meaning |
|---------------------|-----|---------|---------|
| `clk`, `rst_n`      | in  | 1       | clock; synchronous active-low reset (clears `rd_valid` only) |
| `wr_en`, `wr_addr`, `wr_data` | in | 1, ADDR_W, 16 | write a word |
| `rd_en`, `rd_addr`  | in  | 1, ADDR_W | read a word |
| `err_inj`           | in  | 54      | bits to flip in the row being read, captured with `rd_en` |
| `rd_valid`          | out | 1       | result valid |
| `rd_data`           | out | 16      | corrected data |
| `rd_status`         | out | 2       | `ecc_pkg::ecc_status_e` (clean, burst fixed, random fixed, check bits only) |
| `rd_fuec_syndrome`  | out | 10      | S0..S9 |
| `rd_fuec_uncorr`    | out | 1       | FUEC syndrome not in its table |
| `rd_sym_err`        | out | K1*K2   | MDMC symbols marked erroneous |
| `rd_burst_rejected` | out | 1       | the FUEC guess failed the cross-check |

Timing:

* A write takes effect at the clock edge where `wr_en` is high.
* A read issued at edge t returns its result after edge t+1, with `rd_valid`
  high. That is one cycle of latency: the array output is registered, and
  decoding is combinational behind it.
* One read and one write can be issued per cycle. A read of the address being
  written returns the old word.
* Two assertions in the top check the read handshake.

`err_inj` models upsets in the cells. Tie it to zero in a real memory. The
array (`ecc_sram`) is a plain register array that synthesis can map onto an
SRAM macro, and it is not reset.

## Measured correction

`tb_hybrid_ecc_memory` injects errors into the 16 data bits only. The codes are
linear, so whether an error is corrected depends on the error pattern and not
on the stored data. The testbench therefore covers every pattern exhaustively:
every position of every run length, and all 65535 non-zero random patterns.

| error type        | 1    | 2    | 3    | 4     | 5     | 6     | 7     | 8     |
|-------------------|------|------|------|-------|-------|-------|-------|-------|
| adjacent, 1x4 (%) | 100  | 100  | 100  | 100   | 91.67 | 72.73 | 70.0  | 77.78 |
| random, 1x4 (%)   | 100  | 100  | 100  | 97.53 | 94.00 | 89.09 | 83.11 | 76.69 |
| adjacent, 2x2 (%) | 100  | 100  | 100  | 100   | 91.67 | 54.55 | 30.0  | 33.33 |
| random, 2x2 (%)   | 100  | 73.33| 37.14| 13.57 | 4.08  | 1.05  | 0.21  | 0.03  |

For comparison, the published scheme reports these rates:

* adjacent errors: 100 % up to 5 bits, then 46 / 4 / 2 % for 6 / 7 / 8 bits;
* random errors: 100 % up to 6 bits, then 80.76 / 68.43 % for 7 / 8 bits.

Those figures come from a different error-sampling method that is not described
in detail, so this table is not an exact reproduction.

One 5-bit run is not corrected: X10..X14. Two things go wrong at once:

* its FUEC syndrome equals that of a single flip of C2, so the FUEC guess is
  rejected;
* it flips bits 0-2 of symbol 3, the Hamming blind spot, so MDMC cannot repair
  that symbol.

## Where this RTL makes its own choices

These points are not fixed by the published scheme:

* **Hamming equations**: the (7,4) code with check bits at positions 1, 2
  and 4.
* **Horizontal syndrome**: read as the 3-bit difference, modulo 8.
* **Correction rule**: a marked symbol is XORed with its column's vertical
  syndrome.
* **Default matrix layout**: K1 = 1, K2 = 4.
* **FUEC error set and tie rule**: all-ones runs of 1 to 5 bits; ties broken as
  described above.
* **FUEC size**: the equations give 10 code bits, and those are used.
* **Priority bits**: the FUEC code is meant to protect some bits more
  strongly than others, but which bits are critical is not specified. This
  RTL treats every data bit alike, beyond what the 10 equations themselves
  give.
* **Merge rule**: the whole `hybrid_select` unit.
* **Memory details**: the row layout, the 256-word depth, the port structure,
  the one-cycle read latency, the reset and the `err_inj` port.

Each file's opening comment says which parts follow the published scheme and
which are choices made here.

## Files

* `rtl/ecc_pkg.sv`: sizes, the FUEC equations (`FUEC_ROW`), the syndrome
  function and the status enum.
* `rtl/hamming_encoder.sv`, `rtl/mdmc_encoder.sv`, `rtl/mdmc_decoder.sv`: the
  MDMC.
* `rtl/fuec_encoder.sv`, `rtl/fuec_decoder.sv`: the FUEC code.
* `rtl/hybrid_select.sv`: the merge unit.
* `rtl/ecc_sram.sv`: the storage array.
* `rtl/hybrid_ecc_memory.sv`: the top level.
* `tb/tb_<module>.sv`: a self-checking testbench for each module. Each one
  prints `TB_RESULT checks=N failures=M`.
* `tb/tb_hybrid_ecc_memory_2x2.sv`: the end-to-end test with the 2x2 layout.

## Simulating

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ecc_pkg.sv \
          tb/tb_hybrid_ecc_memory.sv --top-module tb_hybrid_ecc_memory -o sim
./obj_dir/sim
```

For any other testbench, change the file and `--top-module`. Each run finishes
in well under a second.

## Changing the configuration

* **Depth**: set `ADDR_W`.
* **MDMC layout**: `K1`, `K2` may be any pair with K1*K2*4 = 16. The row width
  and the port widths follow automatically.
* **Burst length**: `fuec_decoder` takes `BURST`, the longest run it corrects.
* **FUEC code**: to change it, edit `FUEC_ROW` in `ecc_pkg`. The look-up table
  is rebuilt from it at elaboration.
* **Word width**: the package fixes 16 data bits and 10 FUEC bits, so changing
  the word width needs a new FUEC matrix as well.
