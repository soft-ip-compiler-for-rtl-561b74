# Pipelined Reed-Solomon decoder with selectable sub-architectures

This is a synthesizable SystemVerilog Reed-Solomon (RS) decoder for any
(N, K) code over GF(2^M). The structure follows the soft-IP architecture of
J. K. Park and J. T. Kim, "Soft IP Compiler for a Reed-Solomon Decoder". Their
idea is one decoder whose sub-blocks come in several variants. Each variant
performs the same function at a different area and speed, and a
*characteristic parameter* selects it. Four such choices are implemented here:

| parameter | value | sub-architecture |
|---|---|---|
| `SYND` | `SC_RSC` | recursive syndrome calculator (Horner's rule, constant multipliers only) + **corrector** |
| `SYND` | `SC_CSC` | constructive syndrome calculator (power registers, variable multipliers), no corrector |
| `KES`  | `KES_MEA` | modified Euclidean key-equation solver: 4 multipliers, slow |
| `KES`  | `KES_IBMA` | inversionless Berlekamp-Massey solver: 3T+3 multipliers, 3T+1 cycles |
| `KES`  | `KES_RIBMA` | reformulated (systolic) inversionless Berlekamp-Massey solver: 3T+1 cells, 6T+2 multipliers, 2T+1 cycles |
| `NCELL` | 1, 2, ... | number of key-equation solvers used in turn |
| `NSHR` | 1, 2, ... | number of input shift registers in front of the syndrome calculator |

The defaults are the DVB outer code: (204, 188) over GF(2^8) with
p(x) = x^8+x^4+x^3+x^2+1, first root alpha^0 (`B = 0`), `SC_RSC`, `KES_MEA`,
one solver cell and one input shift register. For DVB, the original exploration picks this
point under both its area constraint and its speed constraint. The decoder corrects up to
T = (N-K)/2 symbol errors per block and flags blocks it cannot correct.
Erasure decoding is not implemented (see "Departures").

## Data flow

```
 in_sym ──► shift regs ──┬──────────────► FIFO (3 or 4 blocks) ─────────────┐
  (NSHR)                 │                                                  ▼
                         └─► syndrome ─► key equation ─► Chien search  ─► corrector ─► out_sym
                             calculator   solver          + Forney         (RSC only)
```

The four stages work on four consecutive blocks at the same time. Each stage
hands its result to the next with a valid/ready pair and a holding register.
A stage that finishes early waits, and back-pressure finally reaches
`in_ready`.

### Symbol order and why the corrector exists

A block is sent highest-degree coefficient first. That is r_(N-1), r_(N-2),
..., r_0, the order in which a systematic encoder emits data and then parity.
The syndromes are S_i = R(alpha^(B+i)) for i = 0..N-K-1.

* **RSC** uses Horner's rule, S_i <- S_i * alpha^(B+i) + r. This works only
  if r_(N-1) comes first, so it suits this order. Its Chien search is the plain
  one: it starts from the unscaled coefficients of Lambda and visits positions
  0, 1, ..., N-1. That is the **reverse** of the stream order. The errors of a
  block are therefore known before its first symbol leaves the FIFO, but they
  are found in the wrong order. The **corrector** (`rs_corrector`) keeps them
  as a list of (position, value) pairs of at most T entries. While the block
  streams out of the FIFO, it walks that list from its end and XORs each value
  into the matching symbol. The FIFO must hold four blocks: the one being
  received, the one in the solver, the one being searched and the one being
  corrected.
* **CSC** adds up the terms r_j (alpha^(B+i))^j directly. Each syndrome has a
  power register stepped by a constant multiplier and a variable multiplier
  for r_j times that power. This costs N-K extra registers and N-K variable
  multipliers. Here it is paired with a Chien search that runs in
  stream order (positions N-1 down to 0). Its coefficient registers are
  preloaded with Lambda_l * alpha^(-l(N-1)). It reads the FIFO itself and
  emits corrected symbols directly, so no corrector is needed and the FIFO
  holds three blocks.

### Key equation solvers

All solvers return Lambda(x) (degree <= T) and an error evaluator Omega(x)
(degree < T), scaled by the same unknown constant. Forney's formula cancels
that constant. For MEA and iBMA, Omega(x) = S(x) Lambda(x) mod x^(2T).

* **`rs_kes_ibma`** (inversionless Berlekamp-Massey). Each of the 2T
  iterations takes one clock. It forms the discrepancy on T+1 multipliers and
  updates Lambda on 2T+2 more. The iteration then re-uses the discrepancy
  multipliers for T clocks to produce Omega. With the load cycle a block takes
  exactly **3T+1 cycles** (25 for T = 8).
* **`rs_kes_mea`** (Euclid's algorithm without division). It keeps two
  polynomial pairs in register files, (Rp, Lp) = (x^2T, 0) and
  (Qp, Up) = (S, 1). The invariant Rp = Lp*S and Qp = Up*S mod x^2T holds
  throughout. A check cycle swaps the pairs when deg Rp < deg Qp. It stops
  when deg Qp < T, giving Lambda = Up and Omega = Qp. Otherwise a reduction
  step follows: Rp <- b*Rp + a*x^l*Qp and Lp <- b*Lp + a*x^l*Up, where a and
  b are the leading coefficients. The step processes one coefficient index
  per clock on four multipliers, and only up to the highest index that can
  change. An error-free block takes 2 cycles. With T = 8 the worst case
  measured over random 1..8-error blocks is **226 cycles**.
* **`rs_kes_ribma`** (reformulated inversionless Berlekamp-Massey). It is a
  row of 3T+1 identical cells, each holding one coefficient delta_i of a
  combined discrepancy/locator polynomial and one theta_i of its shadow. In
  every clock each cell computes gamma*delta_(i+1) + Delta*theta_i on its
  own two multipliers, where Delta = delta_0 is the discrepancy.
  The discrepancy therefore never needs a sum over many products, and the
  critical path is one multiplier and one adder. After 2T clocks the upper
  T+1 cells hold Lambda and the lower T cells hold the "high-order"
  evaluator, Omega_h(x). This is a different polynomial from S Lambda mod x^2T.
  Forney's formula then takes the factor X^-(2T+B) instead of X^-B. The top
  sets this exponent (`FE`) in the Chien block automatically. With the load
  cycle a block takes **2T+1 = 17 cycles** for T = 8.
* **`rs_kes_cells`** wraps NCELL copies of the chosen solver. Syndrome sets
  go to the cells in turn (write pointer), and results are taken from them
  in the same turn (read pointer). Blocks therefore leave in arrival order
  even when a cell with an easy block finishes before one with a hard block.
  A solver that needs C cycles per block keeps up with the
  Chien search when NCELL >= ceil(C / (N+1)). Two MEA cells are enough for
  T = 8.

### Chien search and Forney evaluation

`rs_chien_forney` scans one position per clock. For position j (X = alpha^j)
it forms Lambda(X^-1) as an even and an odd part. It also forms Omega(X^-1)
and a factor X^-FE, each held in registers stepped by constant multipliers.
A zero of Lambda marks an error, whose value is

    Y = X^-FE * Omega(X^-1) / Lambda_odd(X^-1)        (Lambda_odd = x Lambda')

FE = B for the MEA and iBMA solvers, and 2T+B for the RiBMA solver.
The division uses a 2^M-entry inverse ROM. This ROM is computed at
elaboration from the field definition by walking alpha^i and alpha^-i
together, so no table file is involved. The search has two pipeline stages:
evaluation, then division. At the last position of a block it compares the
number of roots found with deg Lambda and reports a mismatch as `out_fail`.

## Timing and throughput

* The syndrome calculators take one symbol per clock. Their result appears
  with `synd_valid` on the cycle after the block's last symbol.
* The Chien search needs 1 load cycle and N scan cycles, so at most one block
  enters every **N+1 cycles**. The decoder accepts a new block only that
  often, even when input is continuous. With `KES_IBMA`, the testbench
  checks that back-to-back blocks leave exactly N+1 = 205 cycles apart.
* With `KES_MEA`, T = 8 and one cell, blocks that need more than 205 solver
  cycles slow the pipeline. `in_ready` then drops at the last symbol of the
  block behind them. With `NCELL = 2` the solvers keep up, and blocks leave
  every 205 cycles.
* The input shift registers (`NSHR`) add NSHR cycles of latency. They move
  only when the syndrome calculator and FIFO accept a symbol.
* Latency from the last input symbol of a block to its first output symbol
  depends on the solver's time and on the blocks ahead of it. It is not fixed.

The original work estimates MEA at 3t^2 - 2t + 2 cycles, which is 178 for
t = 8. The schedule here is slower in the worst case (226). For DVB, a
single MEA cell therefore does not keep up with continuous input.
`KES_IBMA`, `KES_RIBMA` or two MEA cells do.

## Interface (`rs_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low reset, asynchronous assertion |
| `in_valid`, `in_ready` | in/out | 1 | a symbol is taken on a cycle where both are high |
| `in_sym` | in | M | received symbol, r_(N-1) first; a block is N taken symbols, with gaps allowed |
| `out_valid` | out | 1 | decoded symbol present (no back-pressure on the output) |
| `out_sym` | out | M | decoded symbol, same order as the input |
| `out_last` | out | 1 | last symbol of a block |
| `out_fail` | out | 1 | with `out_last`: more errors than T were detected; the block was passed through unchanged or partly changed |

Parameters: `M`, `POLY` (primitive polynomial including x^M), `N`, `K`,
`B` (exponent of the first generator root), `SYND`, `KES`, `NCELL` (number of
key-equation cells, at least 1), `NSHR` (number of input shift registers, at
least 1). The code must satisfy K < N <= 2^M - 1 with N - K even. This is
checked at elaboration. Extended codes, with N = 2^M, are not supported.

## Files

| file | content |
|---|---|
| `rtl/gf_pkg.sv` | GF(2^m) multiply and alpha powers (elaboration-time constants and datapath) |
| `rtl/rs_pkg.sv` | enums for the architecture choices |
| `rtl/rs_shift_reg.sv` | NSHR input delay stages for symbol, valid and erasure flag |
| `rtl/rs_fifo.sv` | symbol FIFO, fall-through read, any depth |
| `rtl/rs_rsc.sv`, `rtl/rs_csc.sv` | syndrome calculators |
| `rtl/rs_kes_mea.sv`, `rtl/rs_kes_ibma.sv`, `rtl/rs_kes_ribma.sv` | key equation solvers |
| `rtl/rs_kes_cells.sv` | NCELL solvers used round-robin |
| `rtl/rs_chien_forney.sv` | Chien search and Forney evaluation, either scan order |
| `rtl/rs_corrector.sv` | error list and output correction for the RSC configuration |
| `rtl/rs_decoder.sv` | top level |
| `tb/rs_ref_pkg.sv` | reference model: log/antilog GF tables, systematic encoder, syndromes, error injection |
| `tb/rs_dec_harness.sv` | drives and checks one decoder configuration; used by the decoder-level tests |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus `tb_rs_decoder` (eight configurations), `tb_rs_decoder_full` (defaults), `tb_rs_decoder_codes` (DVD, VSBS and CCSDS code sizes) and `tb_rs_decoder_gf128` (GF(2^7)) |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gf_pkg.sv rtl/rs_pkg.sv tb/rs_ref_pkg.sv tb/tb_rs_decoder.sv \
    --top-module tb_rs_decoder
./obj_dir/Vtb_rs_decoder
```

What the tests cover:

* `tb_rs_decoder` runs 400 blocks in each of eight configurations:
  RSC/CSC combined with MEA/iBMA/RiBMA on (204,188), CSC+MEA on (15,9), and
  RSC with two MEA cells and three shift registers on (204,188). The blocks
  carry 0, T, random and T+1 errors, the first few with idle input cycles
  and the rest back to back. Every symbol of a correctable block is compared
  with the transmitted codeword. The test also requires each of these to
  happen: a pipeline stall, a FIFO-full stall (RSC), a correction and a
  detected uncorrectable block. With iBMA, RiBMA or two MEA cells, blocks
  must leave exactly N+1 cycles apart. With two cells, both must be busy at
  the same time.
* `tb_rs_decoder_codes` decodes the (208,192), (208,188) and (255,223) codes
  over the same field, in the configurations that suit them: MEA with 1 or
  73 shift registers, iBMA and RiBMA. `tb_rs_decoder_gf128` decodes the
  (127,121) code over GF(2^7).
* `tb_rs_decoder_full` runs the defaults, without parameter overrides, on 60
  blocks.
* The block testbenches check the syndromes against direct evaluation. They
  check Lambda and Omega algebraically: roots at the injected errors, deg
  Lambda equal to the number of errors, and Omega = S Lambda mod x^2T. For
  RiBMA, the error values obtained through Forney's formula are checked
  instead of Omega. The multiplexed-cell test feeds three MEA cells back to
  back, and checks that results leave in order and that the cells overlap.
  The block testbenches also check the Chien/Forney values in both scan orders and with B != 0,
  the corrector and FIFO against queue models, and GF multiplication
  exhaustively against log tables.
* In the reference encoder and checkers, GF products come from log/antilog
  tables, not from the RTL's shift-and-add multiplier.

## Departures from the original architecture, and what is not here

* **Erasure decoding** is not implemented. This covers the alpha^k generator,
  the polynomial expansion and erasure-capable solvers. The original names
  these blocks but does not describe them. The input shift registers still
  carry an erasure flag, which the top ties low.
* **Extended codes** such as (128,122) over GF(2^7) are not supported. Their
  extra symbol has no field position for the Chien search to scan.
* **CCSDS conventions** are not provided: its own field polynomial, its first
  root and its dual-basis symbol mapping. Only the (255,223) size is
  exercised, in the default field.
* **Pipeline period** is N+1 cycles per block: one load cycle, then N scan
  cycles. The original budgets N+2, with one more cycle for the
  pipeline register inside the Chien/Forney block. Here that register only
  adds latency. The next block's load overlaps with it.
* **MEA cycle count** is up to 226 for T = 8 against the original estimate of
  178. The original does not give its cell schedule, so this one is a simple
  serial schedule of its own.
* **Handshakes**: the original requires hand-shaking between sub-block FSMs
  without defining it. Valid/ready with holding registers is this design's
  choice, as are the reset style and the `out_fail` flag.
* **Chien scan order with CSC**: the original states that the CSC
  configuration needs no corrector but does not say how. Here the Chien
  search runs in stream order, with preloaded coefficient registers.
* The area/speed estimator and the design-space search that pick the
  parameters are software, not hardware, and are not part of this RTL.
  Choose `SYND`, `KES`, `NCELL` and `NSHR` by hand.
