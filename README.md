# RNS FIR filter with isomorphic multiply-add taps

A residue number system (RNS) splits a wide integer datapath into several
narrow, independent channels. Pick P pairwise co-prime moduli
m_1 ... m_P, with product M. Any integer in [0, M) is then uniquely
represented by its residues x mod m_i. Addition and multiplication act on
each residue separately, with no carry passing between channels. A 48-bit
multiply-add becomes nine 6-bit multiply-adds that run side by side. Each
one is short, fast and has little switching activity.

This RTL builds an N-tap FIR filter, y(n) = sum a(k) x(n-k), on that
principle. Binary samples are converted to residues. Each modulus gets its own
transposed-form filter. The results are converted back to binary at the end.
Inside every tap, the modular multiplication is done by *isomorphism*: operands
are mapped to discrete logarithms, the logarithms are added, and the sum is
mapped back. This works only for prime moduli, and it replaces the multiplier
with small tables and an adder.

The default size is a 48-bit dynamic range and 64 taps. A 16-bit, 16-tap
configuration is provided as a parameter set.

## Datapath

```
 coef_in ──► bin2rns ──► coef_bank (N x P residues, clock-gated shift chain)
                                │ a(k) residues
 x_in ──► bin2rns ──► [reg] ──► rns_fir_channel m_1 ─┐
                          ├───► rns_fir_channel m_2 ─┤
                          │           ...            ├──► rns2bin ──► [reg] ──► y_out
                          └───► rns_fir_channel m_P ─┘
```

* `rns_fir`: the top level. It holds the two converters, the coefficient bank,
  P channel filters and the pipeline registers.
* `rns_fir_channel`: an N-tap transposed-form filter for one modulus. Tap k
  updates `r_k <= <x * a(k) + r_(k+1)>_m` for every accepted sample, with
  `r_N = 0`. The channel output is `r_0`.
* `rns_tap`: one multiply-add plus its register.
* `rns_madd`: `z = <x*y + w>_m`. For a prime modulus it is `iso_mult`
  followed by `mod_add`. For the single power-of-two modulus a base may
  contain, it is a binary multiply-add truncated to log2(m) bits.
* `iso_mult`: the isomorphic multiplier (next section).
* `mod_add`: `<a+b>_m`. It adds, compares with m, and subtracts m when
  needed.
* `bin2rns` and `rns2bin`: the input and output converters.
* `coef_bank` and `clock_gate`: the coefficient registers.

Residues travel in a fixed 8-bit field (`rns_pkg::res_t`). That is enough for
any modulus up to 256.

## The isomorphic multiplier

For a prime m, the nonzero residues 1 ... m-1 form a cyclic group under
multiplication. A generator g exists whose powers g^0 ... g^(m-2) run through
all of them. Each nonzero x therefore has an index i(x) with g^i(x) = x, and

    <x * y>_m = g^( <i(x) + i(y)>_(m-1) )

`iso_mult` has three parts:

1. Two forward tables, `LOG[x]`, one per operand. Each is m entries of
   log2(m) bits.
2. An index adder modulo m-1. It is an ordinary adder followed by one
   conditional subtraction.
3. A reverse table, `EXP[i]`.

Zero has no logarithm. A separate zero detector forces the product to 0 when
either operand is 0. The tables are computed at elaboration from m, so no
table files are involved. g is taken as the smallest primitive root of m. A
synthesis tool turns the tables into multi-level logic. For moduli of 6 to 8
bits they stay small: the default base needs at most 61-entry tables.

Optimised variants of the tables and index adder exist, and the cheaper one
would be picked per base. This design uses the plain form for every modulus.

## Converters

**Binary to RNS** (`bin2rns`). The residue of a DW-bit two's complement number
is a weighted sum of its bits. Bit j weighs `<2^j>_m`. The sign bit weighs
`<-2^(DW-1)>_m`. The weights are constants, so each residue is a sum of up to
DW small constants, below DW*m, followed by one reduction modulo the constant
m. Negative numbers come out as M + x.

**RNS to binary** (`rns2bin`) uses the Chinese Remainder Theorem:

    X = < sum_i M_i * <x_i * M_i^-1>_(m_i) >_M ,  M_i = M / m_i

The per-channel products are small constant multiplications. The weighted sum
is below P*M. The final reduction modulo M subtracts j*M, where j is the
largest value with j*M <= sum; P-1 comparisons in parallel find it. Values in
the upper half of [0, M) are returned as X - M. The result is exact whenever
the true output lies in [-2^(DW-1), 2^(DW-1)). The base guarantees this
because M >= 2^DW. Keeping inputs and coefficients small enough for the result
to fit is the user's job: the sum wraps modulo M, not modulo 2^DW.

Both converters are plain combinational logic with one register stage on each
side of the channel filters. Latency and throughput matter more here than
converter area. The converters are paid once per filter, while every tap
gains from the narrow channels.

## Coefficients and clock gating

Coefficients change only when a new filter mask is selected. They are loaded
serially, one per cycle with `coef_we` high, starting with a(0). Each one
passes through its own `bin2rns` and enters a shift chain. After N writes,
a(0) sits in tap 0 and a(N-1) in tap N-1. The chain is clocked through
`clock_gate`, a latch-and-AND integrated clock gate. The latch is
transparent while the clock is low, which makes the gate glitch-free. So the
N*P*8 coefficient flip-flops receive clock edges only during loading.

This matters more in RNS than in binary. The residues of an operand take more
bits than its binary form, and gating removes most of the power cost of that
extra storage. The latch in `clock_gate` is intentional; in a standard-cell
flow it maps onto the library's clock-gating cell.

Reloading a mask while samples are flowing is allowed. Taps already hold
partial sums made with the old coefficients, so the next N outputs mix both
masks, exactly as a transposed-form filter does.

## Interface and timing (`rns_fir`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock |
| `rst_n`   | in  | 1     | asynchronous active-low reset; clears taps, coefficients, pipeline |
| `coef_we` | in  | 1     | write one coefficient (a(0) first, N writes per mask) |
| `coef_in` | in  | DW    | coefficient, two's complement |
| `x_valid` | in  | 1     | input sample valid; when low, the filter holds its state |
| `x_in`    | in  | DW    | input sample, two's complement |
| `y_valid` | out | 1     | output valid |
| `y_out`   | out | DW    | filter output, two's complement |

A sample accepted at rising edge t produces `y_out`, with `y_valid` high,
right after edge t+2. There are three register stages: the input converter
register, the tap registers and the output register. The filter accepts one
sample per cycle. Each `y_valid` pulse corresponds to exactly one accepted
sample.

## Parameters and bases

| parameter | default | meaning |
|-----------|---------|---------|
| `DW`      | 48      | dynamic range in bits (input, coefficient and output width) |
| `N`       | 64      | number of taps |
| `P`       | 9       | number of moduli |
| `MODULI`  | `BASE48` = {64, 61, 59, 53, 47, 43, 31, 29, 13} | the RNS base |

The small configuration is `DW=16, N=16, P=BASE16_P, MODULI=BASE16` with
`BASE16` = {61, 59, 32}. Both bases are in `rns_pkg`.

Bases are chosen by this rule: primes from 3 to 71, plus at most one power of
two from 4 to 256, with 2^d <= M <= 2^(d+2), so that coverage exceeds the
range by no more than 2 bits. Many bases meet it. Ideally the choice would
minimise area or power for the target timing, but that needs synthesis. The
two bases here minimise total residue bits, then the number of moduli.
Another base can be passed through `P` and `MODULI`. Every modulus must be a
prime or a power of two, all must be co-prime, and M must be at least 2^DW;
an assertion in `rns2bin` checks the last condition at the start of
simulation.

Sizes at the defaults: 576 tap multiply-adds (64 taps x 9 channels). The
512 taps of the eight prime channels hold 1024 forward tables and 512 reverse
tables. The 64 taps of the modulus-64 channel use the binary path. After coarse synthesis this is about
9,100 flip-flop bits and 16,600 word-level cells.

## Departures and own choices

* The RNS base is this design's own choice (see above). The selection rule is
  the reference one, but the cost function is not.
* The isomorphic multiplier uses the plain log/antilog scheme with an explicit
  zero flag. The optimised table variants, one of which would be picked per
  base, are not implemented.
* Converter structures, the valid/hold handshake, the reset behaviour, the
  pipeline registers, the order of the coefficient shift chain, and the
  binary multiply-add used for the power-of-two channel are all this design's
  own choices.
* The two's complement multiply-add and FIR filter that RNS is usually
  compared against are not included.
* No timing, area or power claim is made for this RTL. Nothing has been
  placed or routed.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_mod_add`, `tb_iso_mult`, `tb_rns_madd`: exhaustive operand sweeps for
  several prime and power-of-two moduli, against integer arithmetic.
* `tb_rns_tap`, `tb_rns_fir_channel`: random residues with a random sample
  enable. The channel output is checked against a direct-form convolution
  modulo m.
* `tb_bin2rns`, `tb_rns2bin`: random and extreme signed values on the 16- and
  48-bit bases.
* `tb_clock_gate`: gated, enabled and glitch cases, counting gated edges.
* `tb_coef_bank`: serial load order, hold while gated, reload, reset.
* `tb_rns_fir` (16-bit, 16 taps) and `tb_rns_fir_full` (defaults: 48-bit, 64
  taps) run the whole filter. Each loads two masks, streams 600 random samples
  with random gaps, and checks every output against a 64-bit binary model of
  the filter, along with the two-cycle latency. They also require that each
  of these happened: serial loads, gated-clock edges equal to the number of
  loads, held cycles, negative outputs, zero samples and zero coefficients.
* `tb_madd_dse` (with helper `madd_dse_lane`): a full RNS multiply-add unit
  (converters, per-modulus `rns_madd`, CRT) for dynamic ranges 16, 20, ...,
  48 bits, each range with its own base. It checks Z = X*Y + W on random
  operands, a quarter of them with a reduced-range Y.

All pass.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rns_pkg.sv tb/tb_rns_fir_full.sv --top-module tb_rns_fir_full
./obj_dir/Vtb_rns_fir_full
```

Replace `tb_rns_fir_full` with any other testbench name. The full-size build
takes about half a minute, and the simulation runs in well under a second. To
change the filter, override `DW`, `N`, `P` and `MODULI` on `rns_fir`; the
tables and converter constants are recomputed at elaboration.
