# Classic McEliece hardware core: systemizer, encapsulation and decapsulation helpers

Classic McEliece is a code-based key-encapsulation scheme. Its public key is
the systematic form `[I | T]` of a binary `(n-k) x n` parity-check matrix `H`.
Encapsulation picks a random error vector `e` of weight `t` and sends the
syndrome `C0 = [I | T] e`. Two things dominate the hardware cost.

* **Key generation** has to bring a matrix of several megabits into
  systematic form by Gaussian elimination over GF(2). Roughly a third of
  random matrices have a singular left square part. In that case the key
  pair is thrown away and generation restarts.
* **Encapsulation** has to multiply the whole key by `e`.

This core implements the parts that do that work:

| block | module | what it does |
|---|---|---|
| F2 systemizer with hybrid early abort | `hea_systemizer` | `H -> [I | T]`; a quick check run that fails early, then a full run |
| combinational systolic line | `comb_sl`, `sl_pe` | reduces one S-bit row word per clock |
| permutation memory | `perm_mem` | tracks where each pivot was found, for the row swaps |
| FixedWeight | `fixed_weight` | turns random bits into an error vector of weight `t` |
| Encode | `encode` | `C0 = [I | T] e`, streaming the key row by row |
| index scan | `error_index_scan` | lists the positions of the ones in a recovered `e` and checks its weight |
| compare | `ct_compare` | compares two C1 values without exiting early |
| RAM | `ram_sdp` | simple dual-port RAM with a registered read |
| top | `mceliece_top` | wires these together; shared constants are in `mce_pkg` |

The default parameters are those of **mceliece348864**: `n = 3488`,
`n-k = 768`, `t = 64`, `m = 12`, `sigma1 = 16`, with 32-bit column blocks.

Some parts of a complete implementation are *not* in this core:

* SHAKE256;
* the hash processor;
* the support (field ordering) and Goppa polynomial generators;
* the evaluation of `H` from them;
* the Goppa decoder;
* the key-generation and decapsulation controllers.

Their data paths are brought out as ports of `mceliece_top` (`mat_*`,
`rnd_*`, `e_rec_*`, `c1_*`, `cmp_*`).

## The systemizer

### Column blocks and the systolic line

`H` is stored as `NB = ceil(n/S)` column blocks. Each block holds `n-k` words
of `S` bits, and row `r` of block `b` is at address `b*(n-k) + phys(r)`.
Elimination runs in `NL = (n-k)/S` phases. Phase `p` uses column block `p`
as its *pivot block*.

The block's rows are streamed through `comb_sl`, one word per clock. This is
a chain of `S` processor elements. Element `j` owns column `j` of the block
and holds at most one pivot row. A word passes all `S` elements in the same
clock, and each element sees it already reduced by the elements before it:

* If the word has a 1 in column `j` and element `j` already holds a pivot,
  the pivot is XORed in and bit `j` of an *operation mask* is set.
* If element `j` holds no pivot yet, the word becomes its pivot.

Every row therefore leaves the line with an operation: an S-bit XOR mask,
plus "this row became pivot `j`". The operation is written to the
**operation memory**. Each later column block is then streamed with those
operations replayed (`ext_en`). No pivot search happens there; the block is
simply transformed the way the pivot block was. The operations in the pivot
block depend only on the pivot block, so this is exact.

After a block is streamed, the pivot rows held in the elements are upper
triangular within the block. **Back-substitution** takes `S-1` clocks: for
`j = S-1 .. 1`, every pivot row `i < j` with a 1 in column `j` receives row
`j`. In the pivot block the line records these decisions in an `S x S` bit
matrix `u`, and in every other block it replays them. The pivot rows are
then written back to the physical rows they came from (`S` clocks).

### Early abort

If some element has no pivot after the pivot pass, column block `p` has fewer
than `S` independent columns below row `pS`. The left square part is then
singular, so the run stops with `fail` at once. The fail/check chain of the
processor elements gives this signal.

### Row map instead of row swaps

Pivot `j` of phase `p` has to end up as logical row `pS + j`. Moving rows
would cost `NB` memory accesses per swap. Instead, a row map (logical to
physical) is changed, which costs 4 clocks per pivot.

`perm_mem` records for each pivot the stream position (logical row) at which
it was found, and the physical row that holds it. Swapping logical rows
`pS+j` and `loc[j]` can displace a later pivot `k` that sits at logical row
`pS+j`. The comparators (`perm_op[k] = loc[k] == pS+j`) find it, and its
position is moved to `loc[j]`.

### Two kinds of run (HEA)

* **Check run** (`full = 0`). Only the left square part is processed, and
  only by forward elimination. The logical rows `0..pS-1` are not streamed,
  and blocks right of the square part are not touched. This is the cheapest
  way to find out whether the key is usable.
* **Full run** (`full = 1`). The caller writes `H` again, because the check
  run has overwritten it, and starts a full run. This is single-pass
  Gauss-Jordan over all blocks. Rows above the pivot block are streamed as
  well, so they are cleared in the same pass. At the end the left part is
  `I` and the right part is `T`. `T` is read on the `pk_*` port, two clocks
  per word.

### Cycle counts (measured in simulation, 768 x 3488 matrix)

| s | check run (this core) | published check | full run (this core) | published finish |
|---|---|---|---|---|
| 16 | 636,610 | 611.8 k | 7,501,514 | 7,173 k |
| 32 (default) | 172,258 | 160.0 k | 1,958,558 | 1,800 k |
| 64 | 51,538 | 44.63 k | 538,640 | 459.4 k |
| 128 | 19,042 | 14.51 k | 161,753 | 120.6 k |

The "published" columns are the cycle counts reported for the same method.
A matrix with one repeated row lacks a single pivot, and that only shows in
the last phase. Such a check run therefore aborts close to its end, after
172,064 clocks at `s = 32`. A matrix that is rank-deficient in its first
column block aborts after the first phase. The gap to the published figures comes from
per-pass overhead. Each pass has a 3-clock drain plus the write-back, and
this core does not overlap consecutive passes; the overlap is described below
under departures. The overhead grows with `s`.

## Encapsulation

**FixedWeight** (`fixed_weight`) reads `sigma1*t + 512` random bits
(96 fields of 16 bits) from a valid/ready stream.

* **Range check.** The low `m` bits of each field form an index candidate.
  The first `t` candidates below `n` go into `int_RAM`. All fields are
  consumed whatever their value, so the timing does not depend on the data.
* **OneGen.** Each index is split into an `e_RAM` word address and a bit
  position. The word is read, and if that bit is already set the result is
  an error; otherwise the word is written back with the bit set.

`error` (too few candidates in range, or a repeated index) means the caller
must restart with fresh randomness. Run time at the defaults:
`NW + 48*(1+2) + 3t + 2` clocks.

**Encode** (`encode`) streams `T` row-major, one 32-bit word per clock,
straight out of the systemizer memory. The key is never copied into a
column-major buffer. Per clock:

1. AND the key word with the matching word of `e`.
2. XOR-reduce the result to one bit.
3. Accumulate that bit over the row.

Each finished row bit goes into a 32-bit shift register. Every 32 rows, the
register is XORed into `RAM_Encode`, which was first loaded with `e[0..n-k-1]`
(the identity part). Run time: `(n-k)/W + (n-k)*k/W + PK_LAT + 3` clocks.
That is 65,308 clocks with one clock of key latency; the published 32-bit
design needs 66,053. In the top, the key latency is 2 clocks and
FixedWeight plus Encode together take 65,759 clocks.

The encapsulation controller in `mceliece_top` runs FixedWeight, then Encode.
If FixedWeight fails, it reports `encap_error` instead of running Encode.

## Decapsulation helpers

* `error_index_scan` walks a recovered `e` one bit per clock. It writes the
  index of every 1 to `idx_*`, stopping after `t` entries, and raises
  `weight_ok` only if exactly `t` ones were seen. It takes
  `NW*(W+1) + 2` clocks whatever the data.
* `ct_compare` reads the stored C1 from `RAM_C1` word by word, alongside
  the recomputed stream. It ORs the word differences together and decides
  only at the end.

## Interfaces and timing conventions

* Reset is the active-low asynchronous `rst_n`.
* `start` signals are one-clock pulses. `done` pulses for one clock, and the
  result flags stay valid until the next start.
* All memories have one clock of read latency. The systemizer's public-key
  port has two.
* Memories are written as arrays (`ram_sdp` and the systemizer's data memory:
  `109 x 768` words of 32 bits, 2.68 Mbit at the defaults). A synthesis tool
  can map them to block RAM.
* The external `pk_*` port of the top must not be used while an encapsulation
  is running, because Encode owns it then.

## Departures and limits

* **Passes are not overlapped.** The original design interleaves the
  operation-memory writes of one pass with the reads of the next to save
  time and block RAM. Here the passes run one after another.
* **Row map.** Row swaps use the row map described above. How the original
  design performs the swap is only sketched.
* **`n-k` must be a multiple of `S`.** mceliece6960119 (`n-k = 1547`) is
  therefore not supported. `n` need not be a multiple of `S`: the last block
  is padded, and the padding never affects the result.
* **Encode needs `W` to divide both `n-k` and `k`.** A 160-bit Encode for
  mceliece348864 is not supported.
* **FixedWeight extra randomness.** FixedWeight draws `sigma1*t + 512` bits.
  This is the sizing used in this design, not the specification's
  `sigma1*tau`.
* **Restarts are left to the caller.** Regenerating `H` for the full run and
  restarting on a FixedWeight error both happen outside this core.
* **Other parameter sets.** mceliece460896, 6688128 and 8192128 need larger
  memories. They are reached by overriding `ROWS`, `COLS`, `T` and `MB`
  (for example `ROWS=1248, COLS=4608, T=96, MB=13`).
  * Encode has been simulated at all three sizes.
  * The systemizer has been simulated at 1248 x 4608 with `s = 32`: check
    692,928 clocks, full run 6,418,193 clocks.
  * The top as a whole has been simulated only at the default size.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_hea_systemizer` | 40 random 16x46 matrices, S = 4, padded last block. It compares success/fail and every word of `T` with a reference Gauss-Jordan elimination, and bounds the cycle counts. |
| `tb_comb_sl`, `tb_sl_pe` | pivot generation, replay and back-substitution against a software model |
| `tb_perm_mem` | captures, comparators and updates |
| `tb_fixed_weight` | `e` and the error flag against a model of the algorithm, including out-of-range and repeated indices; exact cycle count |
| `tb_encode` | `C0` against a reference product; exact cycle count |
| `tb_error_index_scan`, `tb_ct_compare`, `tb_ram_sdp` | index lists and weight flags, compare results, RAM read-during-write behaviour |
| `tb_systemizer_workloads` | The systemizer at 768 x 3488 with `s = 64` and `s = 128`: early abort, check run, full run, and 64 rows of `T` compared. To add `s = 16` or another matrix size, extend the `CFG_` lists. |
| `tb_encode_workloads` | Encode at the mceliece348864, 460896, 6688128 and 8192128 sizes: all of `C0` and the exact cycle count. It takes 65,308 / 131,083 / 261,304 / 339,512 clocks, against 66,053 / 132,293 / 262,917 / 341,125 published for the 32-bit design. |
| `tb_mceliece_top` | Runs at the full mceliece348864 size with no parameter override: an aborted check run, a check run plus full run compared against a reference `T`, a failed and a successful encapsulation with all of `C0` compared, both outcomes of the weight check and of the compare. Each mechanism is counted. It takes a few seconds of simulation. |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/mce_pkg.sv rtl/*.sv \
    tb/tb_mceliece_top.sv --top-module tb_mceliece_top -Mdir obj
./obj/Vtb_mceliece_top
```

Replace the testbench name to run another one. The `rtl/*.sv` glob lists the
package twice; Verilator accepts that. If it does not, list the modules
explicitly after `rtl/mce_pkg.sv`.
