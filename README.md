# PPBF: a probabilistic parallel bit-flipping LDPC decoder

This is a hard-decision LDPC decoder for the binary symmetric channel. It decodes one
iteration per clock cycle and needs no global operation at any point.

Gradient-descent bit flipping (GDBF) and its probabilistic variant (PGDBF) flip only the
variable nodes whose "energy" is the largest in the whole word. Finding that maximum needs
a comparator tree over all N nodes, and that tree sets both the critical path and most of
the area. PPBF removes the search. Every variable node decides on its own whether to flip,
with a probability that depends only on its own energy:

| energy E_n | meaning | flip probability |
|---|---|---|
| 0 | agrees with the channel, all checks satisfied | 0 |
| 1 | | 0.01 |
| 2 | | 0.1 |
| 3 | | 0.9 |
| 4 | disagrees with the channel, all checks unsatisfied | 1 |

The energy is computed per node and per iteration:

    E_n = (v_n xor y_n) + sum over the d_v checks of v_n of c_m,    c_m = xor of the d_c VNs of check m

Here y is the received word and v the current estimate. Because a node with energy 1 or 2
may also flip, the decoder escapes the two-state oscillations in which GDBF and PGDBF get
stuck on some low-weight error patterns.

The RTL is written for variable-node degree d_v = 3. Its default code is the (155,64)
Tanner code.

## Block structure

```
                 +-------------------------------+
   rt_load/data->| ppbf_rg                       |   p[n][1..3]
                 |  ppbf_csts (R^t ring, S bits) |----------------+
                 |  cross-bar (fixed wiring)     |                |
                 |  N x ppbf_pcu                 |                v
                 +-------------------------------+     +--------------------+
 y_in, start --> ppbf_ctrl --load/iterate------------->| N x ppbf_vnu       |--> v_out
                   ^                                   +--------------------+
                   | syndrome                              | v        ^ cv[n][0..2]
                   |                          +-------------------------------------+
                   +--------------------------| ppbf_check_array                    |
                                              |  connection network 1 -> M x        |
                                              |  ppbf_cnu (d_c-input XOR) ->        |
                                              |  connection network 2               |
                                              +-------------------------------------+
```

| file | role |
|---|---|
| `rtl/ppbf_pkg.sv` | shared constants, the Tanner base matrix, the R^t fill and cross-bar hash functions, the controller state type |
| `rtl/ppbf_decoder.sv` | top level |
| `rtl/ppbf_ctrl.sv` | start / iterate / stop control |
| `rtl/ppbf_rg.sv` | probabilistic signal generator: ring, cross-bar, PCUs |
| `rtl/ppbf_csts.sv` | the cyclically shifted truncated random sequence R^t |
| `rtl/ppbf_pcu.sv` | probability controlling unit: three gates |
| `rtl/ppbf_vnu.sv` | variable node unit |
| `rtl/ppbf_check_array.sv` | both connection networks and the check node row |
| `rtl/ppbf_cnu.sv` | check node unit: a d_c-input XOR |

## The random signals: one short ring instead of N generators

The hardest part to follow is where the flip probabilities come from. A straightforward
design gives every node its own LFSR. This design uses a single ring `R^t` of S flip-flops
(S = 155 by default). It is filled with bits that are 1 with probability p = 0.1 and
rotates by one position every iteration. The ring is the only source of randomness in
the decoder.

A fixed cross-bar connects four ring positions to each node's probability controlling
unit (PCU). The PCU builds all three non-trivial probabilities from p = 0.1 with three
gates:

- `p1 = r0 AND r1`, giving 0.01. The two taps are always different ring positions.
- `p2 = r2`, giving 0.1.
- `p3 = NOT r3`, giving 0.9.

The node's energy selects one of {0, p1, p2, p3, 1}. Only one of the three PCU outputs is
used in a given iteration, so correlation among them does no harm.

Successive iterations see different bits because the ring rotates. Different nodes
see different bits because the cross-bar scatters the taps. The bits are reused,
so they are correlated over time and across nodes. The published evaluation of this
decoder reports no measurable loss for S = 216 on a 1296-bit code.

Design choices that the decoder description leaves open:

- **Initial ring content.** At reset, ring bit i is 1 when `mix32(mix32(SEED) ^ i) mod
  1000 < 100`, where `mix32` is a fixed 32-bit integer hash in `ppbf_pkg`. This gives a
  density of about 0.1; the default seed gives 14 ones in 155. The `rt_load`/`rt_data`
  port overwrites the ring in one cycle while the decoder is idle.
- **Cross-bar.** PCU n, tap t reads ring position `xbar_tap(S, n, t)`, a hash of
  (n, t) reduced modulo S. The wiring is fixed at elaboration.
- **No reset between frames.** The ring is not reset between frames; it rotates only on
  cycles in which an iteration happens.

## Variable node unit

Each VNU holds two bits, the channel value `y_n` and the estimate `v_n`. In one cycle it
does the following:

1. XOR1 computes `v_n xor y_n`.
2. It adds the three check values, giving a 3-bit energy.
3. A 5-way multiplexer selects `{0, p1, p2, p3, 1}` by the energy.
4. XOR2 toggles `v_n` when the multiplexer output is 1.

`load` writes `y_in` into both registers, so that `v^(0) = y`. The VNU registers have no
reset; a frame always starts with `load`.

## Check nodes and connection networks

`ppbf_check_array` holds the fixed wiring for the parity-check matrix H, together with M
check node units.

H is quasi-cyclic. It is given as an `MB x NB` base matrix `BASE` of circulant shifts with
block size Z. An entry s ≥ 0 stands for the Z×Z permutation whose row i has its one in
column `(i + s) mod Z`. An entry of -1 stands for a zero block.

The two connection networks are derived from BASE at elaboration:

- Connection network 1 feeds CNU m from VNs `b*Z + (i + s) mod Z`.
- Connection network 2 gives VN n the checks `r*Z + (col - s) mod Z`, one per non-zero
  block row, in block-row order.

Elaboration stops with an error if the code is not regular with column weight 3 and row
weight DC.

The default base matrix is the Tanner (155,64) code: 3×5 circulants of size 31, with
block (j,l) = I_{5^j·2^l mod 31}:

    { 1,  2,  4,  8, 16}
    { 5, 10, 20,  9, 18}
    {25, 19,  7, 14, 28}

This construction is the standard published definition of the code; the decoder
description names the code but does not print its matrix. The end-to-end testbench
rebuilds H from the formula and confirms that it has rank 91, that is dimension 64. The
row weight is 5 (155·3/93).

## Control and timing

`ppbf_ctrl` has two states, IDLE and RUN.

- **Start.** `start` is accepted only in IDLE (`ready = 1`). At that clock edge y is
  loaded into all VNUs and the iteration counter is cleared. A `start` while decoding is
  ignored.
- **Each RUN cycle.** The OR of all check outputs is examined before any iteration. If
  it is zero, or K iterations have been done, the decoder returns to IDLE. Otherwise one
  iteration happens at the next edge: every VNU updates and the ring rotates.
- **Done.** `done` is high for one cycle, `k + 1` cycles after the start edge, where k is
  the number of iterations performed. `success` and `iterations` stay valid until the next
  start. `v_out` holds the decoded word.

A word that is already a codeword finishes with zero iterations. Back-to-back frames take
k + 2 cycles each: one to load, k to iterate, and one in which the zero syndrome (or the
limit) is seen.

The throughput estimate θ = N·F_max / k_ave, with k_ave = 10, counts only the k
iteration cycles. With this controller the exact figure is N·F_max / (k_ave + 2). If that
matters, the load can overlap the last cycle of the previous frame.

K = 300 is this design's choice; the decoder description leaves the limit open. The
limit matters for error rate. On the Tanner code at crossover probability 0.04, K = 100
gave a frame error rate of 4.8e-2 and K = 300 gave 2.75e-2; the published curve is near
1.3e-2. The algorithm listing (`while s ≠ 0 and k ≤ K`) differs by one from the text
(stop when k = K). The RTL follows the text and performs at most K iterations.

The iteration counter is not cleared when a frame ends, so it also serves as the
`iterations` output.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `Z` | 31 | circulant size |
| `MB`, `NB` | 3, 5 | base matrix rows (block rows) and columns; N = NB·Z, M = MB·Z |
| `DC` | 5 | check node degree |
| `BASE` | Tanner shifts | `shift_t [0:MB-1][0:NB-1]`, signed 16-bit shifts; -1 = zero block |
| `S` | 155 | length of the random ring (the published Tanner-code build uses S = 155) |
| `K` | 300 | iteration limit |
| `SEED` | 1 | seed of the built-in ring content |

`ppbf_pkg::DV = 3` is fixed: the PCU and the VNU multiplexer are built for energies 0–4.

For the rate-1/2, 1296-bit, (3,6)-regular code in the published comparison, set Z = 54,
MB = 12, NB = 24, DC = 6 and S = 216, and supply its base matrix. That matrix is not
included here. `tb_ppbf_decoder_n1296` runs the decoder at exactly this size with a
stand-in (3,6)-regular base matrix.

## Size

Flip-flops at the default size:

| registers | count |
|---|---|
| VNUs: y and v | 310 |
| ring | 155 |
| controller: state, 9-bit counter, done, success | 12 |
| **total** | **477** |

The published FPGA build of the same configuration reports 476 one-bit registers. Its
controller is not described.

The logic is N three-bit adders with 5-way multiplexers, N AND gates for the PCUs, M
five-input XORs and one M-input OR. No part of the logic spans the whole word except that
final OR, the stopping test.

## Simulation

Every testbench is self-checking. Each prints `TB_RESULT checks=<n> failures=<n>` and
stops on a cycle watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/ppbf_pkg.sv rtl/*.sv \
        tb/tb_ppbf_decoder.sv --top-module tb_ppbf_decoder -Mdir obj -o sim
    obj/sim

Replace the testbench file and top name to run the others.

| testbench | what it checks |
|---|---|
| `tb_ppbf_decoder` | See below. |
| `tb_ppbf_fer_tanner` | Frame error rate on the Tanner code at crossover probability 0.04 and 0.032, 2000 frames each. The rate must stay below 4e-2 and 2e-2. Also checks the done latency of every frame. |
| `tb_ppbf_decoder_n1296` | The same reference-model comparison at N = 1296, M = 648, d_c = 6, S = 216. It uses a stand-in (3,6)-regular QC base matrix and the all-zero codeword plus channel errors. Words with up to 8 errors must be corrected. The stand-in has weight-6 codewords, so heavily corrupted words may decode to another codeword; these are counted, not failed. |
| `tb_ppbf_check_array` | The syndrome and every VN's three check values, against an H built from the Tanner formula, for single-bit and random words. |
| `tb_ppbf_vnu` | Energy, flip selection, load and update under random stimulus, with all five energies covered. |
| `tb_ppbf_rg` | Every PCU output against the ring bits that the cross-bar table names. The frequencies of p1/p2/p3 over S rotations must be near 0.01/0.1/0.9. Also checks the reload. |
| `tb_ppbf_csts` | Ring density, rotation direction, wrap-around after S shifts, hold, load priority and reset. |
| `tb_ppbf_ctrl` | Zero-iteration frames, frames stopping after j iterations and frames stopping at K. Also done timing (k + 1 cycles) and that a start while busy is ignored. |
| `tb_ppbf_pcu`, `tb_ppbf_cnu` | Exhaustive. |

`tb_ppbf_decoder` runs the top at its default parameters for about 60 frames. It sends
random codewords of the Tanner code with 0 to 40 channel errors. It builds its own H and
code basis by Gaussian elimination, and it runs a cycle-accurate model of the algorithm.
The checks are:

- `v_out` matches the model every cycle.
- `iterations`, `success` and the done latency match the model.
- At least 90 % of the 1–4-error words are decoded back to the sent codeword.
- Every mechanism occurs at least once: a zero-iteration frame, a frame decoded by
  iterating, a frame stopped at K, flips at energies 1, 2, 3 and 4, a ring reload and an
  ignored start.

The testbench takes the ring's reset content and the cross-bar table from `ppbf_pkg`,
because both are design choices. It computes everything else independently.

## How far to trust it

Measured frame error rates on the Tanner code, default parameters, 2000 frames per point:

| crossover probability | frame errors | FER | average iterations | published curve (read from plot) |
|---|---|---|---|---|
| 0.04 | 55 | 2.75e-2 | 22.0 | about 1.3e-2 |
| 0.032 | 21 | 1.05e-2 | 12.6 | about 5e-3 |

No frame decoded to a wrong codeword; every error was a frame stopped at K. The rates
are about twice the published ones. They depend on the ring content and the cross-bar
pattern, which this design chooses itself: with `SEED = 3` the rates were 1.9e-2 and
8.5e-3. Lower rates, in the error floor, were not simulated.

The decoding algorithm was checked bit-exactly against an independent model. The Tanner
code's matrix was checked by its rank.

Where this design departs from, or adds to, the decoder description:

- d_c = 5 is used for the Tanner code, because N·d_v / M = 5. The description prints
  d_c = 6 there, which is the degree of its 1296-bit code.
- S = 155 = N is used, as in the published Tanner-code build, although the method is
  described as using S < N.
- The following are this design's own choices: the ring fill, the cross-bar pattern, the
  four PCU taps, the VNU load path, the handshake, K and the one-cycle stopping test.
