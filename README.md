# Direct and transform convolvers in SystemVerilog

Cyclic convolution `y(k) = sum_i h(i) x((k-i) mod N)` can be computed directly,
with N² multiply-adds, or through a transform: `y = B · diag(d) · A · x`, where
A and B are transforms and only the diagonal step needs real multipliers. This
RTL implements both approaches for small orders so they can be compared side by
side. It contains:

| Design | Module | Computes | Rate | Latency |
|---|---|---|---|---|
| Mersenne number-theoretic transform (NTT) | `ntt_convolver` (+ `ntt_coef`) | length-5 cyclic convolution mod 31 | 1 per clock | 3 |
| Mersenne NTT, radix -2 | `ntt_convolver` with `NEG = 1` | length-10 cyclic convolution mod 31 | 1 per clock | 3 |
| Rectangular transform (RT), fully parallel | `rt_parallel` (+ `rt_coef`) | order-4 cyclic convolution, 5 spectral products | 1 per clock | 14 |
| Direct, fully parallel mesh | `direct_parallel` | order-4 cyclic convolution | 1 per clock | 4 |
| RT, one multiplier | `rt_multiplexed` | order-4 cyclic convolution | 1 per 5 clocks | 5 + 1 |
| Direct, 4 cells, circulating taps | `direct_multiplexed` | order-4 cyclic convolution, one output per clock | 4 outputs per 4 clocks | 1 |
| Overlap-save block convolver | `overlap_save` | linear convolution of a stream, 3 taps, 4 samples per clock | 1 block per clock | 2 |
| RT, bit-serial cells | `rt_bitserial` | order-4 cyclic convolution, words as 20-bit serial streams | 1 per 20 clocks | 35 |
| Direct, bit-serial cells | `direct_bitserial` | order-4 cyclic convolution, words as 19-bit serial streams | 1 per 19 clocks | 26 |

`convolver_top` places all nine next to each other. They share only the clock
and the reset; each has its own ports, with prefixes `ntt_`, `ntt2_`, `rtp_`, `rts_`,
`dp_`, `ds_`, `rtm_`, `dm_` and `os_`. The three RT designs share one kernel
input, `rt_h`, and one `rt_coef` that turns it into `d4`.

The transforms are chosen so that they need no multipliers. RT coefficients
are only -1, 0 and +1. NTT coefficients are powers of two modulo a Mersenne
number, and such a product is just a bit rotation. Every transform is
computed directly, as a regular array of nearest-neighbour cells, not through
an FFT-style graph.

## Rectangular transform of order 4

The order-4 cyclic convolution is factored with M = 5 spectral products
(a Winograd-style construction: the polynomial `z⁴ - 1` is split into
`(z-1)(z+1)(z²+1)`):

```
        | 1  1  1  1 |              | 1  1  1  0 -1 |
        | 1 -1  1 -1 |              | 1 -1  1  1  0 |
    A = | 1  1 -1 -1 |          B = | 1  1 -1  0  1 |
        | 1  0 -1  0 |              | 1 -1 -1 -1  0 |
        | 0  1  0 -1 |

              |  1  1  1  1 |
              |  1 -1  1 -1 |
    4·G =     |  2  0 -2  0 |        d = G·h,   y = B·diag(d)·A·x
              | -2  2  2 -2 |
              |  2  2 -2 -2 |
```

G has quarter entries, so the hardware uses `d4 = 4·G·h`. Those are integers,
and `rt_coef` computes them with adds and shifts. Because the final result is
an integer, dividing by 4 at the output (an arithmetic shift right by 2) is
exact. The matrices are in `rt_pkg`. The testbenches hold their own copies
and check, among other things, that `B·diag(4Gh)·A = 4·H`.

### The parallel RT mesh (`rt_parallel`)

This is the part that takes the most care. It is built in three stages:

1. **`rt_pre_array`**: a 4-row by 5-column systolic mesh. Row r carries input
   `x(3-r)` to the right, and column m sums downward. The cell at (r, m) adds,
   subtracts or passes x, following `A[m][3-r]`. A zero coefficient gives a
   "dummy" cell that only delays. Every cell registers both its x output and
   its sum output. To make each x word meet its column sum, row r's input
   first goes through r skew registers. Column m's result therefore leaves the
   mesh in cycle `t + 4 + m`: the outputs are skewed by one cycle per column.
2. **A row of 5 multipliers**: `p(m) = u(m) · d4(m)`, one register each. The
   skew is kept.
3. **`rt_post_array`**: the transposed arrangement. Product m travels down
   column m, and output row k sums from left to right with the signs of
   `B[k][m]`. The skewed products arrive exactly in step with the row sums.
   Row k leaves the mesh `5 + k` cycles after its first product.

Finally, row k is delayed by `3 - k` cycles so that all four outputs line up.
It is then shifted right by 2 into an output register. From input to output
this makes `4 + 1 + 5 + 3 + 1 = 14` cycles, and a new vector can enter every
cycle. If you change the mesh, keep these skew and deskew counts consistent.
`tb_rt_pre_array` and `tb_rt_post_array` check them cycle by cycle.

### One multiplier (`rt_multiplexed`)

The same factorisation is computed one spectral index per clock:

- a combinational chain of 4 add/subtract/pass cells forms `u = A[m]·x`;
- a single multiplier forms `u·d4(m)`;
- four accumulators add that product into `acc(k)` with the sign of `B[k][m]`.

`start` latches x. `busy` is then high for exactly 5 cycles, and `done`
pulses with `y = acc/4`. A `start` pulse while busy is ignored.

## Direct convolvers

**`direct_parallel`** is an N × N mesh (N = 4). Row i holds tap `h(i)`, and
column c accumulates `y(N-1-c)`. The top row receives `x(3), x(2), x(1), x(0)`
from left to right. Each cell passes its x word to the row below, one column
to the left. The leftmost column wraps around to the rightmost one, and this
wrap-around produces the cyclic index. Every cell registers its sum and its x,
so rows work on the same vector one cycle apart. No skew is needed, and the
latency is N.

**`direct_multiplexed`** uses N cells. Cell k holds `x(k)`, and the taps
circulate in a ring of registers, loaded as `h(0), h(3), h(2), h(1)`. In
iteration t, cell k holds `h((t-k) mod N)`, so the chain of multiply-add cells
produces `y(t)`. The ring then rotates by one position, with the last register
feeding the first. The outputs `y(0)…y(3)` appear on the 4 clocks after
`start`, each marked by `y_valid` and its index `y_idx`.

## Bit-serial versions (`rt_bitserial`, `direct_bitserial`)

The parallel meshes above move whole words between cells. The bit-serial
versions keep the same meshes but send every word as a stream of bits, LSB
first, one bit per clock. This trades throughput for cell size: a serial
adder is one full adder and a carry flip-flop. A flag bit travels beside each
data stream and marks the LSB of every word, so the cells know when a new word
starts.

Two cells do all the work:

- **`bs_addsub_cell`** adds (coefficient +1) or subtracts (-1) a passing operand
  bit into a partial-sum bit, keeping the carry in place. For subtraction it
  adds the complement, with the carry preset to 1 at the LSB. A coefficient
  of 0 gives a dummy cell that only delays the sum by one clock. The operand,
  the sum and the flag all leave through registers.
- **`bs_sp_mult`** multiplies a serial operand by a parallel coefficient. It is
  a row of NB carry-save cells. Each clock, cell j adds `a & d(j)`, its own
  carry and the sum bit of cell j+1, so cell 0 emits one product bit per
  clock, one clock after the matching operand bit. At each LSB all sums and
  carries restart from zero. The product is therefore exact modulo `2^NB`.

All arithmetic is two's complement modulo `2^NB`, so the frame length NB is
chosen to hold the largest result: `NB = 2W + 4 = 20` for the RT (which forms
4·y before the final shift) and `NB = 2W + clog2(N) + 1 = 19` for the direct
mesh. A new input vector is accepted every NB clocks (`in_ready`), and all
four outputs are presented together with `out_valid`.

**`rt_bitserial`** has the same three stages as `rt_parallel`. A serialiser
feeds the 4×5 pre-addition plane, with r extra registers on row r's bit and
flag. Five serial-parallel multipliers take the parallel `d4` words. A 4×5
post-addition plane follows, and then one deserialiser per output row. Row k
finishes k clocks after row 0. The four words are collected, shifted right by
2 and presented together, NB + 15 = 35 clocks after the input was accepted.

**`direct_bitserial`** is the `direct_parallel` mesh built from bit-serial
cells. Cell (i, c) holds tap `h(i)` as a parallel word. Its `bs_sp_mult` forms
`h(i)·x` serially, and its `bs_addsub_cell` adds that stream into the partial
sum coming down column c. The x bits and their flag move diagonally with the
same wrap-around as in the parallel mesh. Each row works one clock after the
row above, so all columns finish at the same time. The latency is
NB + N + 3 = 26 clocks.

## Mersenne number-theoretic transform

The NTT works modulo `2⁵ - 1 = 31`. Because 2 has order 5 in that field, a
length-5 transform needs no multiplications:

```
v = T·x        T[k][j] = 2^(jk mod 5)
g = 25·T·h     (25 = 5⁻¹ mod 31, the inverse transform's 1/N, computed by ntt_coef)
u(k) = g(k)·v(k)
y = T⁻¹·u      T⁻¹[k][j] = 2^(-jk mod 5)
```

The result is the exact cyclic convolution **modulo 31**. The word length
fixes the transform length. Inputs must be small enough that the true
convolution stays below the modulus, or the result is the residue. The
testbenches deliberately make the result wrap around the modulus.

How the arithmetic is done (`mersenne_pkg`):

- **Residues.** A residue is a 5-bit one's-complement word. Both `00000` and
  `11111` stand for zero.
- **Multiplying by `2^i`.** This is a rotation left by i bits. In
  `ntt_transform` it costs only wiring.
- **Addition.** Each transform output is a column of carry-save full-adder
  rows, one row per input word. The carry vector of each row is rotated left
  by one bit, so the carry out of the MSB re-enters at the LSB (end-around
  carry). One end-around-carry adder then resolves the sum and carry pair.
- **`mersenne_mult`.** This computes `a·b mod 31` as the sum, over the set bits
  `a(i)`, of b rotated left by i. The sum uses the same carry-save rows.
- **`ntt_convolver`.** This has three phases (direct transform, 5 multipliers,
  inverse transform), with a register after each phase. The output is
  normalised so that zero always reads as 0.

All NTT modules take the Mersenne exponent `P` as a parameter, and the
transform length equals P. The testbenches also run P = 7 (modulus 127).

### Radix -2, length 2p (`NEG = 1`)

Modulo `2^p - 1`, `(-2)^p = -2^p = -1`, so -2 has order 2p. It generates a
transform of twice the length on the same word length: length 10 over
modulus 31. Setting `NEG = 1` on `ntt_transform`, `ntt_coef` and
`ntt_convolver` selects it, and all port arrays grow to 2P words.

- **Powers of -2 cost no more than powers of 2.** `(-2)^e · x` is x rotated
  left by `e mod p` bits. When e is odd, the result is also complemented,
  because in one's-complement arithmetic negation is a bitwise NOT.
- **The inverse uses `(-2)^(-e)`.** The factor `1/(2p)` goes into g. For
  L = 10 that factor is 28, because `10 · 28 = 280 = 1 mod 31`.
- **Everything else is unchanged.** The carry-save rows, the multipliers and
  the three register stages are the same, so a length-10 convolution completes
  every clock with latency 3.

`convolver_top` has one instance of each transform.

## Overlap-save linear convolution (`overlap_save`)

Filtering a continuous stream with an NT-tap kernel (NT = 3), PB = 4 samples
per clock, works as follows:

- Each block of 4 new samples is extended by the last 2 samples of the
  previous block. Those 2 samples are held in history registers, which start
  at zero and advance only on `in_valid`.
- Only the 4 valid outputs of the order-6 cyclic convolution are formed. A
  3 × 4 array of direct cells computes them.
- x words move diagonally, as in `direct_parallel`. Instead of wrapping around,
  the rightmost cell of row r receives the overlap sample `x(-r)`, delayed by
  r registers.
- Registers sit between the rows, on both the sums and the x paths. The last
  row is combinational, so a block's outputs appear 2 clocks after the block.

In the ports, `x[0]` is the oldest sample of a block and `y[k]` is output k of
that block.

## Word widths and reset

- The integer convolvers use `W = 8`-bit two's-complement inputs and taps.
- Outputs are `2W + 2` bits (RT, direct order 4) or `2W + clog2(N)` bits, so
  they cannot overflow.
- `d4` is `W + 4` bits.
- All widths are parameters.
- Reset is synchronous and active high. It clears the valid pipelines, the
  control state and the NTT and overlap registers. Pipelined datapath
  registers are not reset, because their contents are qualified by the valid
  bits.
- Kernels (`rt_h`, `ntt_h`, `ntt2_h`, `dp_h`, `ds_h`, `dm_h`, `os_h`, and
  `d4`/`g`) must be held steady while a computation that uses them is in
  flight.

## How this RTL departs from the architecture description

The array structures, cell types, cell placement, skewing and matrices follow
the original study of these architectures. The following are this
implementation's own choices:

- **Cell granularity.** The RT and direct order-4 convolvers exist both with
  word-level cells (one register per cell output) and with bit-serial cells.
  The bit-serial framing is this design's choice: the LSB flag, the
  serialisers and deserialisers, and the frame lengths NB. The study also
  mentions bit-level pipelining of bit-parallel cells by bit skewing. That
  is not implemented.
- **NTT pipelining and carry propagation.** The NTT array has one register
  per phase instead of full bit-level pipelining. Each carry-save column is
  closed by a word-level end-around-carry adder. The study instead uses three
  half-adder stages for the final carry propagation.
- **Radix -2 NTT.** The study names the length-2p, radix -2 transform but
  draws only the length-p array. The length-10 version reuses that array
  with 2p words. Negations become bitwise complements, and `1/(2p)` is
  folded into g.
- **NTT spectral multiplier.** Its internal organisation (rotate-and-add rows)
  is not specified in the study; it is the simplest scheme that fits
  one's-complement arithmetic.
- **Coefficient networks.** `rt_coef` and `ntt_coef` are additions. The
  study treats `d` and `g` as precomputed constants.
- **RT scaling.** The 1/4 scaling is applied at the output of the RT
  convolvers.
- **Direct mesh registers.** The direct parallel mesh has a register in every
  cell. The study's drawing shows none but assumes full pipelining.
- **Multiplexed chains.** The multiplexed RT chain and the direct chain with
  circulating taps are combinational within one clock. The study notes that
  both can be pipelined, with time-skewed inputs for the direct one.
- **Handshakes.** Valid/start/busy/done handshakes, widths and reset are not
  specified in the study.
- **Not implemented.** RT orders above 4 built by Kronecker nesting. Their
  matrices are not given.

## Simulating

Each module has a self-checking testbench, `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=<n> failures=<n>`. The testbenches compare against reference
models written inside them: integer matrix products, direct convolution
sums and modular arithmetic. They also check latencies and rates.
`tb_convolver_top` runs all nine designs concurrently at their default sizes.
It counts that every mechanism actually occurs, as listed in the table below.

| Design | Mechanisms counted |
|---|---|
| NTT (both radices) | modular wrap, all-ones zero codes, back-to-back inputs |
| Pipelined designs | back-to-back inputs, kernel reloads |
| Bit-serial designs | inputs accepted on the first cycle `in_ready` allows |
| Multiplexed designs | start pulses ignored while busy |
| Overlap-save | dependence on the previous block, gaps in the stream |

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mersenne_pkg.sv rtl/rt_pkg.sv tb/tb_convolver_top.sv \
    --top-module tb_convolver_top -Mdir obj_top
./obj_top/Vtb_convolver_top
```

Replace `convolver_top` with any module name to run that module's testbench.
The packages are always listed first; `-Irtl` lets Verilator find the rest.
Every run takes well under a second.

## Files

- `rtl/rt_pkg.sv`: RT matrices A, B and 4G, and their accessor functions.
- `rtl/mersenne_pkg.sv`: rotation, carry-save row with end-around carry,
  end-around adder, normalisation and the modular inverse.
- `rtl/rt_pre_array.sv`, `rtl/rt_post_array.sv`, `rtl/rt_parallel.sv`,
  `rtl/rt_coef.sv`, `rtl/rt_multiplexed.sv`: the RT designs.
- `rtl/direct_parallel.sv`, `rtl/direct_multiplexed.sv`: the direct designs.
- `rtl/bs_addsub_cell.sv`, `rtl/bs_sp_mult.sv`: the bit-serial cells.
- `rtl/rt_bitserial.sv`, `rtl/direct_bitserial.sv`: the bit-serial convolvers.
- `rtl/ntt_transform.sv`, `rtl/mersenne_mult.sv`, `rtl/ntt_coef.sv`,
  `rtl/ntt_convolver.sv`: the NTT design.
- `rtl/overlap_save.sv`: the linear convolver.
- `rtl/convolver_top.sv`: all of them side by side.
