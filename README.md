# Iterative soft decoding of Imai-Kamiyanagi codes for memory ECC

Memories that store 32-, 64- or 128-bit blocks are often protected with a
double-error-correcting code. The Imai-Kamiyanagi code gives distance 5 with
a parity check matrix that is built from small pieces (a Kronecker product
of BCH check matrices), so it is cheap to check. This RTL reads such a
code word back from the memory as *soft* values (how sure the read is about
each bit) and decodes it iteratively by passing probabilities over the
code's Tanner graph. This is belief propagation. Reliable bits can then
overrule unreliable ones, and some patterns of three or more errors are
corrected. A block the decoder cannot repair is flagged, not passed on
silently.

The design has three parts:

| block | module | role |
|---|---|---|
| encoder | `ik_encoder` | write path: K data bits to an N-bit code word |
| iterative decoder | `ik_decoder` (uses `ik_prior`, `ik_syndrome`) | read path: N soft values to K data bits, status, iteration count |
| output buffer | `ik_output_buffer` | 2-entry FIFO between decoder and data output |
| top | `ik_ecc_top` | the three above wired together |

Shared types, the code construction and the fixed-point arithmetic are in
`ik_pkg`. The DRAM itself (cell arrays, decoders, sense amplifiers) is not
part of the RTL. Its write data (`wr_codeword`) and soft read data
(`rd_llr`) are ports of the top.

## The code

For a block of K data bits the code has R check bits and length N = K + R:

| K | N | R | m |
|---|---|---|---|
| 32 (default) | 46 | 14 | 4 |
| 64 | 81 | 17 | 5 |
| 128 | 148 | 20 | 6 |

The parity check matrix is stacked from three parts (`(x)` is the
Kronecker product, n = 2^m - 1):

```
H = [ A (x) H1     0 ]   2m rows   (A is 2 x 3)
    [ B (x) 1_n    I ]   2 rows    (B is 2 x 3, I is 2 x 2)
    [ 1_3 (x) H3   0 ]   m rows
```

- H1 column i is alpha^i in GF(2^m).
- H3 column i is alpha^(3i). Together these are the check matrix of a
  double-error-correcting BCH code.
- The field is built on x^4+x+1, x^5+x^2+1 and x^6+x+1.
- A has columns 01, 10, 11. B has columns 00, 01, 10.
- The full code has 3n + 2 columns. It is shortened by dropping the
  leftmost columns until N remain.

With this choice, every sum of at most two columns is nonzero and
distinct, so the minimum distance is 5 for all three sizes. The numbers
n0 = 3, r0 = 2 and r1 = 2 give exactly the check-bit counts above. The
matrices A and B are not given in the source of the construction. The
values here are one valid choice, found by exhaustive search.

H is computed at elaboration by `ik_pkg::ik_hmat(K)`. No table is read
from a file. Encoding is systematic:

- `ik_systematic` runs Gaussian elimination on H. It picks pivot columns
  starting from the rightmost column.
- The R pivot columns carry parity bits.
- The data bits go to the other columns in ascending order.

For K = 32, the parity positions are columns 25-28 and 36-45. The
positions are also given by `ik_encoder.parity_mask`.

## The decoding algorithm

Notation:

- L(m) is the set of bits in check m.
- M(l) is the set of checks on bit l.
- `lambda_l = 4*y_l/N0` is the channel value of bit l. BPSK sends bit 0
  as +1.

One iteration:

```
prior        p1_l = 1 / (1 + exp(lambda_l)),  p0_l = 1 - p1_l
init         q(m,l) = p_l
horizontal   S = prod (q0 + q1),  D = prod (q0 - q1)   over l' in L(m), l' != l
             r(m,l) = (S + D, S - D)            # = ((1+dr)/2, (1-dr)/2) * S
vertical     q(m,l) = p_l * prod r(m',l)        over m' in M(l), m' != m
posterior    Q_l    = p_l * prod r(m,l)         over all m in M(l)
decide       c_l = 1 if Q1_l > Q0_l;  stop when H*c = 0
```

This is the probability-domain form of belief propagation. It is the same
as viewing each bit as the root of a parity check tree whose leaves are
processed first.

### Arithmetic without division

Only the ratio of the two members of a pair is ever used: the next
product, the sign of q0 - q1, or the decision Q1 > Q0. So a pair is kept
only up to a positive factor:

- Each pair is two signed 16-bit mantissas. They are shifted together by
  the same power of two until the larger magnitude lies in [2^14, 2^15).
  See `pair_norm`.
- A product of pairs is two 16x16 multiplications and one shift.
- Normalising with a shift replaces the division by (q0 + q1). The
  decoder has multipliers but no divider.
- Check messages and bit messages are kept at least one LSB. This stops a
  pair from collapsing to (0, 0) when two checks disagree with full
  certainty.

The prior table in `ik_prior` is filled at elaboration. It uses an
integer Taylor series of exp in Q16.

- Input: `lambda` as a signed 8-bit value with 3 fraction bits, so
  -16 to +15.875.
- Output: `(p0, p1)` scaled by 2^15 - 1.

### Schedule

The decoder handles one edge of the Tanner graph per clock. An edge is a
1 in H. There are E = 248, 562 or 1227 edges for K = 32, 64 or 128.

Each check node (row) is handled in two passes:

- A forward pass writes prefix products into a scratch memory.
- A backward pass multiplies each prefix by the running suffix product.
  This gives the "all but this edge" product without division.

Each bit node (column) is handled the same way. Its forward pass starts
from the prior, and the end of that pass is the posterior, from which the
bit is decided.

Memories and tables:

- The message memories `qm` and `rm` are indexed by edge in row order.
- The column pass reaches them through `COL_EDGE`.
- `ROW_START`, `COL_START`, `EDGE_COL` and `COL_EDGE` are computed from H
  at elaboration.
- The memories have combinational reads.

Timing, counted from the edge that accepts a block:

| phase | cycles |
|---|---|
| load priors | E |
| one iteration: horizontal (2E), vertical (2E), syndrome check (1) | 4E + 1 |
| result valid after | E + iters * (4E + 1) |

For K = 32: one iteration gives 1241 cycles. The worst case, 20
iterations, gives 20108 cycles.

## Interfaces

`ik_ecc_top` (defaults: K = 32, MAX_ITER = 20, LW = 8, LF = 3,
OB_DEPTH = 2):

- `wr_data[K]` gives `wr_codeword[N]`. The path is combinational. Store
  the data columns in the data array and the parity columns in the
  parity array.
- `rd_valid/rd_ready` with `rd_llr[N]` (signed LW bits each): one block of
  soft read values, accepted only when the decoder is idle.
- `out_valid/out_ready` with these outputs:
  - `out_data[K]`: the decoded data.
  - `out_ok`: 1 when a code word was reached. 0 when MAX_ITER iterations
    ended with a nonzero syndrome, which is a detected error.
  - `out_iters`: the number of iterations used.

All handshakes transfer on a rising edge where valid and ready are both
high. Valid, once raised, holds its data until ready. `rst_n` is an
asynchronous, active-low reset. The message memories need no reset.

## Where this design makes its own choices

The source gives the code sizes, the stacked form of H, the update
equations, the stop rule and the block diagram. It does not give these,
so they are choices of this design:

- **A, B, n0, r0, r1, H1, H3**: chosen as above to reach the tabulated
  sizes and distance 5.
- **Decision rule**: c = 1 when the probability of 1 is larger. This
  follows the definition of the probabilities. A literal reading of the
  stop rule ("c = 1 if q0 > 0.5") would invert every bit.
- **Maximum iterations (20), fixed-point formats, serial edge schedule,
  handshakes, output buffer depth**: not specified by the source.
- **Normalisation by powers of two**: replaces the divisions of the
  equations. The ratios are unchanged.
- **Soft read values**: how the memory produces them is left open. The
  decoder expects `4*y/N0` per bit, as for BPSK on a Gaussian channel.

## How far it can be trusted

Each block has a self-checking testbench in `tb/`:

- **`tb_ik_encoder`, `tb_ik_syndrome`**: compare against reference code
  words and parity check matrices from an independent model of the
  construction, for all three sizes.
- **`tb_ik_prior`**: compares all 255 inputs against floating-point
  `1/(1+exp(lambda))`.
- **`tb_ik_decoder`** (K = 32):
  - Checks a floating-point model of the equations bit for bit. Decided
    word, success flag and iteration count must all match, over 86 error
    patterns.
  - Checks the exact latency.
  - Checks that output is held under back-pressure.
  - Checks that decoding on an AWGN channel leaves fewer bit errors than
    hard decisions.
- **`tb_ik_output_buffer`**: random traffic against a queue model. An
  assertion checks that an offered word is held.
- **`tb_ik_ecc_top`**: end to end at the default size, with a memory model
  in the testbench. It must see at least one of each: a clean read, a
  correction, a detected failure, a read stall and a full output buffer.
- **`tb_ik_workloads`**: all three code sizes over AWGN at 3, 4 and 5 dB
  Eb/N0. It checks latency and error reduction, and prints decoded
  against hard-decision bit errors. One run of 10 blocks per point gave
  these data bit errors (hard decision / iterative):

  | code | 3 dB | 4 dB | 5 dB |
  |---|---|---|---|
  | (46,32) | 49 / 9 | 45 / 2 | 35 / 0 |
  | (81,64) | 119 / 13 | 116 / 2 | 119 / 1 |
  | (148,128) | 263 / 39 | 280 / 21 | 260 / 4 |

  The sample is small, so these numbers only show the trend.

Limits worth knowing:

- Belief propagation on this matrix is not a bounded-distance decoder.
  The matrix is dense, with check weights up to 36 for K = 32, and has
  many short cycles. A single error that the channel reports with full
  confidence is sometimes *not* corrected. The floating-point model
  behaves the same way; 3 of the 86 test patterns fail in both. When the
  channel values carry real reliability information, as on a Gaussian
  channel, the decoder removes most errors.
- `out_ok = 1` is not proof of correct data. At low SNR the decoder can
  converge to a different code word. One such block was seen in 60 at
  Eb/N0 = 5 dB for K = 32.
- Bit error rates down to 1e-6 need far more blocks than RTL simulation
  can run, so the coding-gain figures for the three codes have not been
  reproduced here.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --assert -Irtl -y rtl rtl/ik_pkg.sv tb/tb_ik_ecc_top.sv \
          --top-module tb_ik_ecc_top -Mdir obj
./obj/Vtb_ik_ecc_top
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.

- To change the code size, set `K` to 32, 64 or 128 on `ik_ecc_top` or
  `ik_decoder`. Everything else follows from the package functions.
- To use other A or B matrices, edit `A_COL` and `B_COL` in `ik_pkg`. Then
  re-check the distance, for example with the column-sum test described
  above.
- Simulation speed is about 2e4 cycles per second for K = 128, mostly
  spent in the wide message memories.
