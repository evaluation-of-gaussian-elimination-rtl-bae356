# GF(2) Gaussian elimination for Classic McEliece public keys

Classic McEliece key generation ends by taking a binary matrix of
`MT = m*t` rows and `n` columns to systematic form `[I_MT | T]`. The
right-hand part `T` is the public key. If the left `MT x MT` part is
singular, the attempt is thrown away and key generation starts again with
new randomness. For the largest parameter set, mceliece8192128, the matrix
is 1664 x 8192 bits (1.7 MB). This reduction is the most expensive step of
key generation in software.

This RTL is an accelerator for that step. It keeps the whole matrix on
chip and reduces it one W-bit column block per clock cycle. It then either
streams the reduced matrix back or reports that the matrix cannot be
reduced. It follows the organisation of the HLS kernel described in *"Evaluation of
Gaussian elimination using HLS for fast public key generation in the
Classic McEliece"* (Kihara, Iwai, Matsubara, Kurokawa):

- a matrix held on chip;
- a forward-elimination loop and a backward-substitution loop, both
  pipelined;
- blocking of the row operations;
- an on-chip cache.

That publication describes an HLS build, not RTL. The
micro-architecture below is therefore this design's own where noted.

## The reduction

The engine runs the loop nest of the Classic McEliece reference key
generation (systematic form). It works over GF(2), where adding two rows
means XOR. For each pivot `r = 0 .. MT-1`, the pivot column is column `r`:

1. **Forward elimination.** Rows `r+1 .. MT-1` are visited in order. A row
   whose bit in column `r` differs from the pivot row's bit is added into
   the pivot row. After the pass the pivot bit is 1 if any row at or below
   `r` had it set.
2. **Check.** If the pivot bit is still 0, the left part is singular.
   The run stops and reports `fail`.
3. **Backward substitution.** Every row `k != r` that has a 1 in column `r`
   gets the pivot row added to it. Column `r` then becomes the unit vector
   `e_r`.

Every row is visited at every pivot, whatever its bits. There is no pivot
search and no row swap. The run time therefore depends only on the size
and on where the run fails. If the left part is invertible, the result is the unique reduced
form. A matrix built as `L * [I | R]` with `L` invertible always comes out
as `[I | R]`, and the testbenches use this property.

## Block-serial schedule (the part to read carefully)

Each row is stored as `NB = ceil(N/W)` words of `W` bits. Word `b` of row
`k` sits at address `k*NB + b`, and column `c` is bit `c % W` of word
`c / W`. One word goes through the datapath per cycle.

**Which blocks are touched.** At pivot `r`, every row that takes part is
zero left of the pivot block `pb = r / W`:

- rows `>= r` hold only zeros in columns `< r`;
- rows `< r` hold identity bits there, and the pivot row has zeros
  there, so adding it changes nothing.

So only blocks `pb .. NB-1` are processed. Over the run this removes
about 4 % of the work for mceliece8192128 at W = 1024, and more with a narrower W.

**Where the mask comes from.** Whether a row is added is decided by its
bit in column `r`, which is in block `pb`. That is the first block the
row sends. `elim_datapath` computes the mask from that block (`first`)
and holds it in a register for the rest of the row's blocks. So a row's
blocks must arrive back to back, starting with `pb`.

**The pivot-row cache.** The pivot row is copied into a register file of
`NB` words (phase LOAD). The forward pass then changes only this cached
copy and writes nothing to the matrix store. The backward pass reads each
row, XORs in the cached pivot row when its mask is set, and writes the row
back. When the backward pass reaches row `r` itself, it writes the cached
(updated) pivot row to the store instead.

**Pipeline.** The matrix store returns a word one cycle after the read
(stage 0). The datapath result is written back in the next cycle (stage 1).
Reads and writes in one pass never touch the same word in the same cycle.
One drain cycle follows the forward pass, so the check sees the last update
to the cache. Another drain cycle follows the backward pass, so the next
pivot's LOAD never reads a word while it is being written. Per pivot, the
phases are:

```
LOAD (NB-pb) | FWD (MT-1-r)(NB-pb) | drain | CHECK | BWD MT(NB-pb) | drain | NEXT
```

The cycle count for a matrix that reduces is therefore

```
cycles = sum_{r=0}^{MT-1} [ (2*MT - r) * (NB - floor(r/W)) + 4 ]
```

If the run fails at pivot `f`, the pivots before `f` cost the same, and
pivot `f` adds `(MT - f)(NB - floor(f/W)) + 2`. The count of the last run
is on the `cycles` output.

## Modules

| module | role |
|---|---|
| `gauss_elim_top` | top: store, engine and host interface wired together; the store belongs to the engine while `busy`, to `matrix_io` otherwise |
| `gauss_ctrl` | loop nest above as a state machine (IDLE, LOAD, FWD, DRAIN, CHECK, BWD, NEXT); issues reads, stage-1 datapath commands and write-backs; counts cycles |
| `elim_datapath` | pivot-row cache (`NB x W` bits), mask logic and `W` AND/XOR lanes; operations LOAD, FWD, BWD, PIV |
| `matrix_ram` | `MT*NB x W` store with one synchronous read port and one write port; read word held while `re` is low |
| `matrix_io` | host streams: load, wait for the engine, unload on success, back to load |
| `gauss_pkg` | `dp_op_t`, the datapath command |

## Using it

Ports of `gauss_elim_top`. Reset is synchronous and active low.

- `in_valid / in_ready / in_data[W]`: the matrix, row by row, block 0
  (columns `0..W-1`) first. Padding bits beyond column `N-1` must be 0.
  After the last of `MT*NB` words, the elimination starts by itself.
  `in_ready` stays low until the next matrix can be loaded.
- `busy` is high while the engine runs. `done` pulses for one cycle at the
  end, and `fail` is valid at that time. `cycles` gives the length of the
  run.
- On success, the reduced matrix comes back on `out_valid / out_ready /
  out_data[W] / out_last` in the load order, at up to one word per cycle.
  The public key is bits `MT .. N-1` of each row; the host extracts it.
  On failure nothing is returned, and `in_ready` rises again for the next
  attempt.

## Sizes

The defaults are `MT = 1664`, `N = 8192` (mceliece8192128) and `W = 1024`,
which gives 13312 words of 1024 bits. The publication does not give the
unroll width. `W = 1024` was chosen because its cycle count comes out
close to the ~0.1 s the HLS build reports for this set at 300 MHz. The
other parameter sets need their own `MT` and `N`. The exception is
mceliece6688128, which has the same row count and can use the default
build with its missing columns loaded as zeros.

| set | MT x N | cycles (W=1024) | at 300 MHz | reported HLS latency |
|---|---|---|---|---|
| mceliece348864 | 768 x 3488 | 3,543,552 | 11.8 ms | 24.5 ms |
| mceliece460896 | 1248 x 4608 | 11,384,640 | 37.9 ms | 55.1 ms |
| mceliece6688128 | 1664 x 6688 | 27,815,808 | 92.7 ms | 184 ms |
| mceliece6960119 | 1547 x 6960 | 24,194,190 | 80.6 ms | 107 ms |
| mceliece8192128 | 1664 x 8192 | 31,969,984 | 106.6 ms | 95.2 ms |

`W` trades lanes for cycles. Halving it roughly doubles the run time
and halves the datapath and the cache.

## Where this departs from the HLS kernel, and what is not here

- The HLS build's unroll factors, array partitioning and pipeline overlap
  are not published. Here the row loop is unrolled `W` wide. The store is
  a single array (split into physical RAMs by the memory compiler). The
  two passes do not overlap.
- "Cache" is read as an on-chip copy of the pivot row.
- The rest of key generation runs on the host and is not part of this
  RTL. That covers the irreducible polynomial, the permutation, the
  parity-check matrix, SHAKE256 and the retry loop. The same goes for the
  vendor shell and runtime that move data over PCIe. The top has plain
  valid/ready streams where that shell would connect.
- Only the systematic form is implemented, not the semi-systematic
  variant.
- The synthesized size and the timing at 300 MHz have not been checked
  on an FPGA.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_matrix_ram` | random reads and writes against a shadow array; read latency, hold, read-during-write |
| `tb_elim_datapath` | 200 random pivot positions: load, forward rule, pivot bit, backward rule, write-back |
| `tb_gauss_ctrl` | the exact command, address and write-back schedule against a written-out loop nest; success and failure at pivots 0, 3 and the last; cycle counts |
| `tb_matrix_io` | load with gaps, start pulse, refusal while running, return after failure, unload under stalls, `out_last` |
| `tb_gauss_elim_top` | 20 x 44 matrices with W = 8, back to back: solvable, singular, solvable, random. Checks against a bit-level reference model and the cycle formula. Every mechanism must occur: forward add, backward clear, pivot write-back, pivot-block move, failure, success, load stall, unload stall |
| `tb_gauss_elim_full` | one mceliece8192128 matrix at the default parameters (about 20 s of simulation) |
| `tb_gauss_elim_sets` | all five parameter sets, each in its own build, result and cycle count checked (about 40 s) |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/gauss_pkg.sv \
    tb/tb_gauss_elim_top.sv --top-module tb_gauss_elim_top -Mdir obj
./obj/Vtb_gauss_elim_top
```

`gauss_ctrl` asserts that a word is never read in the cycle it is written,
and that the forward pass stays below the pivot row. `matrix_io` asserts
that an offered result word stays stable until it is taken.
