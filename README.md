# VLPPLA: a variable latency parallel prefix Ling adder

An exact N-bit adder needs a carry network about log2(N) levels deep. With
random operands, though, carries rarely travel far. This adder therefore
produces its sum in one short clock cycle from a carry network cut down to
carry chains of at most L elements. In the same cycle it computes one signal,
the OEDS (overall error detection signal), that is 1 exactly when that fast
sum is wrong. In that rare case the operands stay put for one more cycle and
the result comes from the full network instead. For uniformly random 64-bit
operands with L = 7, about 2 % of additions take the second cycle, so an
addition costs 1.02 short cycles on average.

The design is built on a **Ling adder** with a **Brent–Kung** prefix
topology. Defaults: N = 64, L = 7. The 32-bit adder and the L = 15 adder are
the same RTL with other parameter values.

## Ling carries and the two chains

Per bit, the preprocessing stage forms

    g_i = a_i b_i     p_i = a_i + b_i     d_i = a_i xor b_i
    alpha_i = g_i + g_(i-1)     beta_i = p_i p_(i-1)     (g_-1 = p_-1 = 0)

The Ling carry H_i = c_i + c_(i-1) is a prefix of (alpha, beta) pairs that
skips every other bit:

    H_2k   = (alpha_2k,   beta_2k-1) o (alpha_2k-2, beta_2k-3) o ... o (alpha_0, 0)
    H_2k+1 = (alpha_2k+1, beta_2k)   o (alpha_2k-1, beta_2k-2) o ... o (alpha_1, beta_0)

Here `(G,P) o (G',P') = (G + P G', P P')`. So the N carries form two
independent chains of N/2 elements, one for even bits and one for odd bits.
Both chains use the same wiring. In the RTL, element e of the chain of
parity q sits at bit i = 2e + q. A node at bit i takes its partner from bit
i − 2·dist, where dist is the distance in chain elements. The sum comes from
c_i = p_i H_i:

    s_0 = d_0,   s_i = d_i xor p_(i-1) H_(i-1),   cout = p_(N-1) H_(N-1)

The adder has no carry-in.

## The truncated Brent–Kung network

A full Brent–Kung network over a 32-element chain has 9 rows: 5 up-sweep
rows that build power-of-two groups and 4 down-sweep rows that fill in the
other positions. Let L = 2^(M+1) − 1. The speculative network keeps only the
first M up-sweep rows and the last M down-sweep rows:

| N, L   | rows kept (of 1..9) | rows left for correction |
|--------|---------------------|--------------------------|
| 64, 7  | 1, 2, 8, 9          | 3, 4, 5, 6, 7            |
| 64, 15 | 1, 2, 3, 7, 8, 9    | 4, 5, 6                  |

With G = (L+1)/2, the up-sweep rows leave group prefixes of G elements. The
down-sweep rows then give chain element k a window:

- **k < L:** the window starts at element 0, so the carry is exact. The 2L
  low Ling carries (H_0..H_13 for L = 7) are therefore exact.
- **k ≥ L:** the window starts at element G·⌊(k − G + 1)/G⌋ and holds at
  most L elements. For L = 7, H_14..H_21 (k = 7..10) all start at element 4,
  i.e. at bit 8 or 9.

This splits the carries into N/(L+1) **blocks** that share a window start.
For N = 64 and L = 7 there are 8 blocks: block 1 is H_0..H_13, then each
next block takes 8 carries (H_14..H_21, H_22..H_29, …), and block 8 is
H_62..H_63. For L = 15 there are 4 blocks: H_0..H_29, H_30..H_45,
H_46..H_61 and H_62..H_63.

## When the fast sum is wrong: the error signals

A speculated carry H*_i misses the carry-in to its window, so it differs
from H_i only when:

- the window itself produces nothing,
- the window propagates all the way through, and
- the part that was cut off produces a carry.

Bit s_(i+1) is affected only if p_i = 1 as well. Together, "propagates with
no generate" is exactly d = 1 on every bit of the window. For each block,
the worst case is the first carry of the block. There the condition becomes
a run of L+1 half-sums across the window start, with a set Ling carry just
below it. With ws = G(b−1), the block error detection signal (BEDS) of
block b ≥ 2 is

    E_b = AND(d[2ws-1 .. 2ws+L-1]) p[2ws-2] H[2ws-2]     (even chain)
        + AND(d[2ws   .. 2ws+L  ]) p[2ws-1] H[2ws-1]     (odd chain)

E_1 = 0, and the OEDS is E = E_1 + … + E_NB. For N = 64, L = 7, block 2 is
`d7..d14 p6 H6 + d8..d15 p7 H7`. This test covers the sum bits and the
carry-out, so **E = 1 if and only if the speculated {cout, sum} is wrong**.
It never flags a sum that happens to be right. An adder that compared the
Ling carries themselves would also correct sums that come out right anyway,
since a carry error only matters when p = 1. The testbenches check this
"if and only if" directly.

The expressions use the exact Ling carries H from the correction network.
This is how the OEDS is normally written down, and it keeps each E_b equal
to "block b holds a wrong carry".

A note for timing-driven changes: if the speculated H* is used in place of
H below each block, the OEDS does not change. The only extra case would be
one that the block below already flags. The E_b of the higher blocks do
change, so this RTL keeps the exact form.

## Correction and cycle behaviour

    a,b --> [operand regs, enable] --> preprocessing --+-> speculative network -> postproc -> S*[N-1:2L], S[2L-1:0]
                    ^                                   +-> restored rows ------> postproc -> S [N-1:2L]
                    |                                   +-> error detection ----> E, E_1..E_NB
                    +-------------- not E (one cycle) ------------------------------'
    result regs {S[2L-1:0]}, {cout*, S*}, {cout, S}  -->  MUX tree (0: S*, 1: S) --> sum, cout

The correction network continues from the nodes left by the shared up-sweep
rows. It then adds the missing rows and a second copy of the last M
down-sweep rows, which must see exact inputs. It is meant to be timed as a
**two-cycle (multicycle) path** from the operand registers to the exact
result register. Everything else is a single-cycle path.

Cycle by cycle, for an addition accepted at clock edge t0:

| cycle after t0 | OEDS = 0                              | OEDS = 1                                              |
|----------------|---------------------------------------|-------------------------------------------------------|
| 1st            | operands in registers; `in_ready` = 1 | `in_ready` = 0, the operands stay                     |
| 2nd            | `out_valid`, speculated sum (correct) | correction cycle: `in_ready` = 1; output shows S* with `out_valid` = 0 |
| 3rd            |                                       | `out_valid`, exact sum, `out_corrected` = 1            |

Additions with OEDS = 0 stream at one per cycle. The operand enable is "not
E", limited to one held cycle by a correction-state bit. Without that bit, a
set E would hold the same operands forever.

## Interface of `vlppla_top`

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `clk`, `rst_n`  | in  | 1     | clock; synchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | operand handshake; transfer on a rising edge with both high |
| `a`, `b`        | in  | N     | unsigned operands |
| `out_valid`     | out | 1     | `sum`/`cout` hold a finished result for one cycle |
| `sum`, `cout`   | out | N, 1  | a + b |
| `out_corrected` | out | 1     | the result went through the correction cycle |
| `out_beds`      | out | N/(L+1) | E_1..E_NB of that addition (bit b−1 is E_b) |
| `oeds`          | out | 1     | live OEDS of the addition now in the operand registers |

There is no output back-pressure: a consumer must take `sum` in the cycle
`out_valid` is high.

Parameters: `N` (64), `L` (7, must be 2^m − 1 with 3 ≤ L < N), and `NB`,
which is derived as N/(L+1) and should not be overridden.

## Measured behaviour

The testbench `tb_vlppla_error_rate` runs one million uniformly random
additions through each configuration. Every sum was exact.

| adder        | additions corrected (P_E) | average cycles per addition |
|--------------|---------------------------|-----------------------------|
| N=32, L=7    | 0.0088                    | 1.0088                      |
| N=64, L=7    | 0.0203                    | 1.0203                      |
| N=64, L=15   | 4.1e-5                    | 1.00004                     |

The 32-bit, L = 7 figure agrees with the published error probability of
0.0087 for that configuration.

## Where this RTL departs from, or adds to, the source design

- Only the Brent–Kung topology is implemented. Variable latency Ling adders
  with Beaumont-Smith, Knowles, Kogge–Stone and Sklansky networks (L = 8 or
  16) exist in the same family, but their truncated networks and error
  expressions are not specified here.
- The valid/ready handshake, the correction-state bit, the synchronous reset
  and the registered MUX-tree select are this design's own choices. The
  source block diagram draws E straight into the MUX select. Here the select
  is registered together with the result, so data and select always belong to
  the same addition.
- The last M down-sweep rows are duplicated in the correction network rather
  than shared with the speculative one.
- No carry-in: c_-1 = 0, so s_0 = d_0.
- The result registers capture every cycle an addition is present. That is
  why the wrong speculated value is visible, with `out_valid` low, during a
  correction cycle.

## Files

`rtl/` — synthesizable SystemVerilog, one module per file:

| file | block |
|------|-------|
| `vlppla_pkg.sv` | prefix node type `gp_t`, the `o` operator, geometry helpers |
| `vlppla_preproc.sv` | g, p, d, alpha, beta |
| `vlppla_spec_prefix.sv` | truncated Brent–Kung Ling network (speculated H*) |
| `vlppla_error_correct.sv` | restored rows (exact H) |
| `vlppla_error_detect.sv` | BEDSs and OEDS |
| `vlppla_postproc.sv` | sums and carry-out from Ling carries (used twice) |
| `vlppla_operand_stage.sv` | operand registers, enable, correction state |
| `vlppla_result_stage.sv` | result registers and MUX tree |
| `vlppla_top.sv` | the adder |

`tb/` — self-checking testbenches. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog.
`vlppla_ref_pkg.sv` is the reference model they share. It uses rippled
carries, term-by-term windowed Ling carries, and block errors defined as
"a carry of the block is wrong". No prefix network appears in it.

- `tb_vlppla_top`: the full-size end-to-end test. It runs 4000 additions with
  gaps and long-chain operands. It checks every result, its latency, the
  correction flag and every BEDS. It requires each mechanism to occur: fast
  and corrected additions, stalls, idle and back-to-back cycles, and
  E_2..E_8.
- `tb_vlppla_waveform_vectors`: replays three reference 64-bit operand pairs
  cycle by cycle. For the third pair it checks the exact wrong speculated
  value (`089e5c00d80176996`) shown during the correction cycle, then the
  corrected `089e5c00e00176996`.
- `tb_vlppla_error_rate`: the Monte Carlo error-rate and average-latency
  workload (3 × 10^6 additions), using `vlppla_mc_driver.sv`.
- One testbench per block. The network and detection tests cover
  (N, L) = (64, 7), (64, 15) and (32, 7).

To simulate with Verilator 5, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/vlppla_pkg.sv tb/vlppla_ref_pkg.sv rtl/vlppla_*.sv \
        tb/tb_vlppla_top.sv --top-module tb_vlppla_top -Mdir obj_top
    ./obj_top/Vtb_vlppla_top

For the error-rate test, add `tb/vlppla_mc_driver.sv` and use
`tb_vlppla_error_rate` as the top. A block test needs only the package, the
reference package, the block and its testbench. Lint with
`verilator --lint-only -Wall rtl/vlppla_pkg.sv rtl/vlppla_*.sv --top-module vlppla_top`.
The only lint warnings are two unused signals in the top: `g`, and the low
bits of the exact sum. Those low bits are not needed because the low result
comes from the speculated copy, which is exact there.
