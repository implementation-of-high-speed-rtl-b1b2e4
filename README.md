# Block FIR filter built from multiple constant multipliers

This is a fixed-coefficient FIR filter that takes **L input samples per clock
and returns L output samples per clock**, and that needs no general-purpose
multiplier. It combines two ideas:

* **Block processing.** The N-tap filter is rewritten as a small matrix
  product per block of L samples, so one clock does L samples' worth of work
  and the clock can run at 1/L of the sample rate.
* **Transpose form with multiple constant multiplication (MCM).** Because the
  coefficients are known when the hardware is built, every input sample is
  multiplied by all the coefficients it meets at once, by shifts and
  additions, with shared partial results. The delay line moves behind the
  multipliers (transpose form), which is what lets one MCM serve every tap of
  a sample.

The default build is a 16-tap low-pass filter, 4 samples per clock, 8-bit
two's-complement samples and coefficients, and 20-bit full-precision outputs.

## The block formulation

For an N-tap filter `y(n) = sum_{i=0}^{N-1} h(i) x(n-i)` and block size L
(N a multiple of L, M = N/L), block k of the output is

    Y_k = [y(kL), y(kL+1), ..., y(kL+L-1)]
    Y_k = sum_{m=0}^{M-1} S_{k-m} . c_m

where `c_m = [h(mL), h(mL+1), ..., h(mL+L-1)]` is the m-th slice of the
coefficients and `S_k` is the L x L input matrix of block k:

    S_k[l][j] = x(kL + l - j),    0 <= l, j < L

`S_k` is Toeplitz: every diagonal holds one sample, so the whole matrix has
only **2L-1 distinct samples**,

    s[i] = x(kL - L + 1 + i),     0 <= i <= 2L-2,    S_k[l][j] = s[l-j+L-1],

the last L-1 samples of the previous block followed by the L samples of the
current one. The inner products `r^m_k = S_k . c_m` are computed for all m from
the *current* block, and the sum over blocks is done in transpose form:

    Y(z) = r^0(z) + z^-1 ( r^1(z) + z^-1 ( r^2(z) + ... + z^-1 r^{M-1}(z) ) )

so the only state besides the input samples is one partial sum per stage and
output lane.

## Datapath

    x_in[0..L-1] ──► register_unit ──► s[0..2L-2] ──► mcm_unit x (2L-1)
                                                          │ products s[i]*h(n)
                                                          ▼
                      y_out[0..L-1] ◄── pipeline_adder_unit ◄── adder_network
                                         (transpose chain)       r[m][l]

| module | role |
|---|---|
| `fir_pkg` | default sizes, the example coefficient set, CSD helper functions |
| `register_unit` | keeps the current and previous block, presents the 2L-1 distinct samples of `S_k` |
| `mcm_unit` | one per distinct sample: all products `s[i] * h(n)` that sample needs, by shift-add |
| `adder_network` | `r[m][l] = sum_j s[l-j+L-1] * h(mL+j)`, from the MCM products |
| `pipeline_adder_unit` | transpose-form chain of M-1 register stages per lane, output register |
| `fir_mcm_top` | wires the above together |

Sample `s[i]` meets coefficient `h(mL+j)` only in output lane
`l = j + i - (L-1)`, and only if that lane exists. The top therefore gives MCM
number i just those coefficients and zero for the others; a zero constant
costs no hardware. The end samples `s[0]` and `s[2L-2]` each meet M
coefficients, the middle sample `s[L-1]` meets all N.

## How the multiple constant multiplier is built

`mcm_unit` receives its constants as a parameter array and builds its
shift-add network at elaboration time (the helper functions are in
`fir_pkg`). Three steps:

1. **Odd fundamentals (sharing across constants).** Each constant is
   `sign * F * 2^s` with F odd. Constants with the same F share one network;
   the others are a wire shift and possibly a negation. In the default set
   `-6 = -(3 << 1)` shares with `-3`, `74 = 37 << 1` and `110 = 55 << 1` need
   only 37 and 55.
2. **Canonical signed digits.** Each fundamental is recoded into CSD (digits
   -1, 0, +1, no two adjacent non-zero), which has the fewest non-zero digits
   of any signed-digit form: `127 = 2^7 - 1`, `55 = 2^6 - 2^3 - 1`.
3. **Shared 3x and 5x (sharing within constants).** A pair of non-zero
   digits two places apart (`1 0 1` or `1 0 -1`, either sign) is replaced by
   one shifted copy of `5x = 4x + x` or `3x = 4x - x`. These two terms are
   computed once per MCM and reused by all its constants. Pairs are taken
   greedily from the least significant digit. Example: `35 = 2^5 + 2^2 - 1`
   becomes `(3x) + (x << 5)`, `37 = 2^5 + 2^2 + 1` becomes `(5x) + (x << 5)`.

For the default coefficients, the full MCM (the one for `s[L-1]`) needs the
fundamentals 3, 7, 9, 35, 37, 55 and 127: 9 adders/subtractors including the
shared 3x and 5x. Plain CSD without sharing would need 10. Negative
constants add a negation each. This is a simple, predictable form of common
subexpression elimination, not an optimal search.
Synthesis tools will usually merge and rebalance these adders further.

## Interface and timing (`fir_mcm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid` | in | 1 | `x_in` holds a new block this clock |
| `x_in[L]` | in | XW each | `x_in[i] = x(kL+i)`, oldest sample in element 0 |
| `out_valid` | out | 1 | `y_out` holds a new block |
| `y_out[L]` | out | XW+HW+clog2(N) each | `y_out[l] = y(kL+l)` |

* Throughput: one block (L samples) per clock.
* Latency: block k presented in clock c gives `Y_k` with `out_valid` in clock
  c+2 (one register in `register_unit`, one in `pipeline_adder_unit`).
* Idle clocks: with `in_valid` low nothing advances and `out_valid` is low
  two clocks later; the filter treats the stream as if the gap were not there.
  There is no back-pressure: the consumer must take every output block.
* The top carries an assertion, `a_latency`, that checks this two-clock
  valid timing in simulation (`--assert` in Verilator).
* Reset clears the sample history and all partial sums, as if the filter had
  seen zeros forever.
* Outputs are full precision, so there is no rounding, saturation or overflow.
  The largest reachable magnitude for the default set is
  `128 * 710 + 127 * 32 = 94944` (-128 on every positive tap, +127 on every
  negative one), well inside 20 bits.

Parameters: `N` (taps, default 16), `L` (block size, default 4; N must be a
multiple of L), `XW` and `HW` (sample and coefficient widths, default 8) and
`H` (the N coefficients, default `fir_pkg::H_DEFAULT`). The coefficient set is
fixed at elaboration. To change the filter, change `H`; every size and the
shift-add networks follow. `L = 1` gives a plain transpose-form filter, and
`N = L` gives a single coefficient slice with no transpose chain.

The default coefficients are a symmetric low-pass of windowed-sinc shape,
scaled so that the largest tap is 127:
`-3 -7 -6 9 35 74 110 127 127 110 74 35 9 -6 -7 -3`.
They are an example chosen for this build. The architecture does not depend on
them or on their symmetry. No use is made of symmetry to halve the
multipliers.

The critical path runs from the `register_unit` register through one MCM,
the adder network and one stage adder into the `pipeline_adder_unit`
register. If a faster clock is needed, a register between `adder_network`
and `pipeline_adder_unit` is the natural place to add one. It adds one clock
of latency.

## Where this design makes its own choices

The block formulation, the register unit / MCM / adder network /
pipeline adder unit split, the transpose-form accumulation and the use of
shift-add MCMs with horizontal and vertical subexpression sharing follow the
architecture this RTL implements. These are choices of this design:

* all sizes (N = 16, L = 4, 8-bit data) and the coefficient set;
* the valid-only handshake, the two-clock latency and the reset behaviour;
* one MCM per distinct sample of `S_k` (2L-1 MCMs), each with only the
  coefficients it needs;
* the CSD recoding and the fixed {3x, 5x} pattern set for sharing;
* full-precision output width.

Not included: the reconfigurable variant in which the coefficients come from
a run-time coefficient store and general inner-product multipliers replace
the MCMs. That variant is the larger, slower reference point for this design,
not part of it. Here, changing the filter means re-elaborating with another
`H`.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_mcm_unit` | every 8-bit input against `x * T[t]` for the default set and for a corner-case set (0, -128, powers of two, ±3, ±85, 127, -127, shared fundamentals) |
| `tb_register_unit` | the 2L-1 samples after every block against the testbench's own record, with random idle clocks |
| `tb_adder_network` | each `r[m][l]` against the matrix-product definition, random and extreme products |
| `tb_pipeline_adder_unit` | `y = sum_m r^m_{k-m}` with random idle clocks; one-clock valid timing |
| `tb_fir_mcm_top` | the whole filter at its default parameters against direct-form convolution: impulses in every lane (output equals the coefficients), random data, the worst-case pattern that reaches the largest output, a long run of -128, a mid-stream reset, random idle clocks, exact two-clock latency. Fails if any of these never happened |
| `tb_fir_mcm_top_cfg` | five builds side by side with asymmetric coefficients including -128: (N, L) = (16, 4), (8, 2), (24, 8), (5, 1), (4, 4) |

`tb_fir_mcm_top_cfg` matters because the default coefficients are symmetric,
and a symmetric set cannot reveal a reversed coefficient order. All
testbenches run in seconds.

Running one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fir_pkg.sv tb/tb_fir_mcm_top.sv --top-module tb_fir_mcm_top
    ./obj_dir/Vtb_fir_mcm_top

Replace the testbench name to run the others. Lint the design with
`verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/fir_pkg.sv rtl/fir_mcm_top.sv`.
With `-Wall` it reports an unused `5x` term in MCMs whose constants have no
`1 0 1` digit pair; synthesis removes that term. Linting a submodule on its
own also reports the package constants it does not use.

## Trust and limits

* The functional behaviour is checked exhaustively for the MCM and against an
  independent convolution for the full filter in six configurations. It has
  not been checked on an FPGA or with gate-level simulation.
* Area and timing depend on the coefficients: each non-zero CSD digit pair or
  single digit is an adder. No FPGA or ASIC figures are claimed here.
* The subexpression sharing is heuristic. An optimal MCM search would find
  fewer adders for many coefficient sets. The functions `fir_pkg::hterm` and
  `mcm_unit`'s `owner` are the places to change that.
