# DGLDPC decoder with SPC product codes at the check nodes

This is a fully parallel, fixed-point decoder for a doubly-generalized LDPC
(DGLDPC) code. In an ordinary LDPC code, variable nodes are repetition codes
and check nodes are single-parity-check (SPC) codes. This code swaps in
stronger local codes on both sides:

* **Super-variable nodes (SVNs)** use a (4,3) SPC code. Each SVN transmits
  three bits and attaches to the graph through four edges: the three bits and
  their parity.
* **Super-check nodes (SCNs)** use a (4,3)² SPC product code (SPC-PC). This is
  a 4×4 array of bits in which every row and every column has even parity. It
  has 9 free bits and 7 independent checks. Its minimum distance is 4, against
  2 for a plain SPC.

The default configuration is the code called DGLDPC-1:

| quantity | value |
|---|---|
| SVNs (columns of the adjacency matrix) | 1000 |
| SCNs (rows of the adjacency matrix) | 250 |
| edges | 4000 (4 per SVN, 16 per SCN) |
| transmitted bits | 3000 |
| independent parity checks | 1748 |
| code rate | 0.4173 |

The key idea is in the SCN. An exact MAP decoder for a 16-bit product code is
expensive. Here each SCN decodes its product code iteratively instead, in the
style of a turbo decoder: row decoders and column decoders swap extrinsic
information for a few *local* iterations. The whole decoder wraps a *global*
message-passing loop between the SVNs and the SCNs around those local
decoders. The number of local iterations sets the trade-off between error
performance and work. The published evaluation of the code ran 1, 3, 5 and 6
local iterations and reported 5 as best. With this design's own edge map the
trend is different (see "Observed behaviour" below). Both iteration counts are
run-time inputs.

## Message flow of one global iteration

All messages are log-likelihood ratios, L = ln(P(0)/P(1)), so a positive
value favours a 0.

1. **SVN → SCN.** SVN *v* has channel LLRs `ch[0..2]` for its three bits and
   the last messages `c2v[0..3]` from its four SCNs. It forms the inputs
   `x[j] = ch[j] + c2v[j]` for j < 3 and `x[3] = c2v[3]`. An SPC soft-in
   soft-out (SISO) decoder gives, for each edge, `s[j]`: the tanh rule over
   all the *other* inputs. The message on edge j is `v2c[j] = ch[j] + s[j]`
   (`s[3]` for the parity edge). It leaves out only what came in on that edge.
   In the first global iteration every `c2v` reads as zero.
2. **SCN local decoding.** Each SCN takes its 16 incoming messages as
   "channel" values I and runs the local turbo decoder described below.
3. **SCN → SVN.** The SCN returns, for each of its 16 bits, the sum of that
   bit's extrinsic values over both dimensions.
4. **Decision and stopping.** Each SVN takes a hard decision on each
   transmitted bit from `ch[j] + c2v[j] + s[j]`. The parity of those three
   decisions is the SVN's fourth edge bit. Every SCN then checks whether its
   16 edge bits form a product-code codeword. Decoding stops when all SCNs
   pass (converged) or after `max_iter` global iterations.

## The SCN local turbo decoder (`spc_pc_decoder`)

Number the 16 bits of an SCN in row-major order, t = row·4 + column.
Dimension 1 is made of the four row codes, and dimension 2 of the four column
codes. For each dimension c the decoder keeps an array of extrinsic values
E_c, cleared when a decode starts. One local iteration is:

```
for c in 1..D:                               # D = 2: rows, then columns
    A_c[t]  = sum over l != c of E_l[t]       # a-priori from the other dimensions
    for every component code (row or column) of dimension c:
        E_c[bit b] = tanh-rule over the other bits b' of that code of (I[b'] + A_c[b'])
```

After `tau_max` local iterations the output for bit t is E_1[t] + E_2[t]. The
channel value I itself is not included, because it came from the SVN. With
two dimensions this is the classic row/column exchange: the rows receive the
columns' latest extrinsic values as a-priori information, and the other way
round. Dimension c always sees the *newest* E of the dimension decoded just
before it. So the order of the dimensions matters, and it is rows first.

The hardware follows that dataflow literally:

* `spc_pc_dim_decoder` holds, for one dimension, one `spc_siso` per component
  code (4 for the default). All component codes of that dimension run in
  parallel. The regrouping from the 4×4 array into rows or columns is the
  interleaver between the dimensions. Here it is fixed wiring.
* `spc_pc_decoder` instantiates one such unit per dimension, and E_1, E_2 and
  I are registers. Each clock cycle updates one dimension. A decode therefore
  takes `D·tau_max` update cycles plus one cycle to register the output sum.
  That is `D·tau_max + 1` clock edges from the edge that samples `start` to
  the one that raises `done`: 11 edges for the default of 5 local iterations.

The decoder is written for any (n, n−1)^D product code (`NSPC`, `D`). The
testbenches also run a (3,2)³ instance.

## Fixed-point arithmetic (`dgldpc_pkg`)

* An LLR is 8 bits signed with 2 fractional bits (LSB = 0.25, range ±31.75),
  kept symmetric (±127 LSB). Every sum saturates.
* The tanh rule 2·atanh(∏ tanh(x/2)) is built from a two-input "box-plus":

  |a ⊞ b| = min(|a|,|b|) + f(|a|+|b|) − f(||a|−|b||), with f(x) = ln(1+e^−x)

  The sign of a ⊞ b is sign(a)·sign(b). This form is exact, so the only error
  is in rounding f. The f table (16 entries) is computed at elaboration from
  the formula, rounded to the LSB. It is zero beyond x = 4.
* `spc_siso` forms a forward and a backward chain of box-plus operations.
  Output b combines the forward chain up to b−1 with the backward chain from
  b+1. Box-plus rounding is not associative, so this grouping is part of the
  arithmetic's definition. The reference models in `tb/` use the same
  grouping.

To change the word length or scaling, edit `LLR_W` / `LLR_FRAC` in the
package. The table rounding adapts on its own. The testbenches' reference
package `tb/llr_ref_pkg.sv` has matching constants.

## The edge map

The adjacency matrix of DGLDPC-1 (250×1000) is not available, so this design
defines its own edge map with a closed formula. Edge j (0..3) of SVN v goes
to the global socket

```
g = j·N_SVN + ((ADJ_A[j]·v + ADJ_B[j]) mod N_SVN)
SCN = g div 16,   position in the 4×4 array = g mod 16
```

Each `ADJ_A[j]` must be coprime to `N_SVN`, which makes the map a
permutation. The defaults, A = {1, 723, 103, 341} and B = {0, 373, 912, 302},
were chosen by a search:

* no SVN has two edges to the same SCN;
* only one pair of SVNs shares two SCNs (a 4-cycle).

The resulting code has rate 0.4173, matching the rate quoted for DGLDPC-1.
But its error-rate performance is not that of the original code. To use
another graph, override `ADJ_A`/`ADJ_B` (with `N_SVN`), or replace the
`make_s2v` function in `dgldpc_decoder.sv` with any permutation of the 4000
sockets.

## Module hierarchy

```
dgldpc_decoder                top: storage, edge wiring, 1000 SVNs, 250 SCNs
├── global_ctrl               global iteration FSM and stopping rule
├── svn_decoder   ×N_SVN      (4,3) SPC node, combinational
│   └── spc_siso
├── spc_pc_decoder ×M_SCN     SCN local turbo decoder, sequential
│   └── spc_pc_dim_decoder ×D
│       └── spc_siso ×NSPC^(D-1)
└── scn_codeword_check ×M_SCN product-code codeword test
    └── spc_pc_encoder        systematic SPC-PC encoder (re-encode and compare)
```

`spc_pc_encoder` fills the (n−1)^D information corner of the hypercube. It
then adds checks one dimension after the other, so the last dimension also
produces the checks on checks. It is used here for the convergence test, but
it works as a stand-alone product-code encoder.

## Interface and timing of `dgldpc_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ch_we`, `ch_addr`, `ch_llr[3]` | in | 1, ⌈log2 N_SVN⌉, 3×8 | write the three channel LLRs of SVN `ch_addr`; ignored while busy |
| `start` | in | 1 | begin decoding; `tau_max`, `max_iter` sampled |
| `tau_max` | in | 4 | local turbo iterations per global iteration (0 acts as 1) |
| `max_iter` | in | 8 | global iteration limit (0 acts as 1) |
| `busy`, `done` | out | 1 | decoding; one-cycle end pulse |
| `converged` | out | 1 | the decisions form a codeword |
| `iter_count` | out | 8 | global iterations used |
| `bits_hat` | out | 3·N_SVN | decisions; bit 3v+j is bit j of SVN v |

Loading takes one cycle per SVN (1000 cycles). Each global iteration takes
`2·tau_max + 3` cycles:

* `2·tau_max` dimension updates;
* one cycle for the output sum;
* one cycle for the decision check;
* one cycle to start the next local decode.

From the edge that samples `start` to the edge that raises `done` there are
`iter_count·(2·tau_max + 3) + 1` edges. With 5 local iterations that is 13
cycles per global iteration. At the 5.17 global iterations per codeword
reported for the original code at Eb/N0 = 1.6 dB, that would be about 68
cycles per codeword, plus the load. Outputs stay valid until the next `start`, and the channel LLRs stay
stored between codewords.

An assertion in the top checks that all SCNs are idle whenever a global
iteration starts. They run in lockstep.

## Observed behaviour of the local iteration count

Two models were run on this design's edge map at Eb/N0 = 1.6–3 dB: the RTL,
and an unquantised floating-point model of the same equations. Both decode
best with **one** local iteration. With 3, 5 or 6 local iterations, many
words at 1.6–2 dB fail to converge within 50 global iterations.

* At 3 dB most words converge within about 5 global iterations, whatever
  `tau_max` is.
* A random edge permutation behaves the same way in the floating-point model.
  So the trend comes from the local algorithm, not from the structured edge
  map.

The published results for the original DGLDPC-1 graph report the opposite:
more local iterations, up to 5, helped. Treat `tau_max` as a parameter to
tune for the graph in use. `tb_dgldpc_full` prints, for each `tau_max`, how
many words converged and in how many global iterations.

## Departures and own choices

The following are this design's choices, where the decoding algorithm
leaves the hardware open:

* LLR format (8 bits, 2 fractional), saturation everywhere, and box-plus with
  a rounded correction table in place of real-valued tanh.
* Fully parallel organisation, with one dimension of every SCN updated per
  cycle.
* Systematic SVN: code bits 0–2 are transmitted and bit 3 is the local
  parity. This is what makes 1000 SVNs give 3000 transmitted bits at rate
  0.417.
* The edge map above.
* Early stopping when every SCN sees a codeword. The stopping rule is
  inferred: the code's evaluation reports converged codewords and average
  iterations per codeword, which implies such a test, but it is not
  described.
* SCN-to-SVN messages are zero in the first global iteration.
* Load port, start/done handshake and reset behaviour.

Not built:

* An encoder for the full DGLDPC code. No generator matrix is given, and
  with an invented edge map any encoder would be invented too. The
  testbenches make codewords by Gaussian elimination instead.
* The MAP-based SCN decoder used only as a comparison baseline.

## Verification

Each module has a self-checking testbench in `tb/`:

* Expected values come from a behavioural model built on real arithmetic
  (`llr_ref_pkg`): box-plus, the SPC extrinsic and the SCN local decoder.
* `tb_spc_siso` also checks against the unquantised tanh rule, to within
  1.0.
* `tb_spc_pc_decoder` checks the latency for 1, 2, 3, 5, 6 and 15 local
  iterations. It also checks that a single wrong bit in a product codeword
  is always corrected.
* `tb_spc_pc_encoder` checks all 512 information words and the minimum
  weight of 4.

The end-to-end testbenches use `dgldpc_tb_core`. For each codeword it:

* builds the code's parity checks and solves them by Gaussian elimination
  over GF(2), then draws random codewords (not just all-zero);
* sends them through a BPSK/AWGN channel at 3.0, 2.0, 1.6 and 2.5 dB Eb/N0,
  and the last word at −1.0 dB, where it cannot converge;
* decodes with every combination of 1/3/5/6 local and 10/20/50 global
  iterations;
* compares decisions, iteration count and converged flag bit-exactly with a
  behavioural model of the whole decoder;
* checks that converged words equal the codeword sent, and checks the cycle
  count.

It also counts early stops, stops at the limit, corrected words and ignored
writes while busy, and fails if any of these never happened.

* `tb_dgldpc_decoder` runs a 64-SVN, 16-SCN instance with 24 codewords.
  It takes seconds.
* `tb_dgldpc_full` runs the default DGLDPC-1 size with sixteen codewords.
  It prints, per local iteration count, the converged words and the global
  iterations used.

Run any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dgldpc_pkg.sv tb/llr_ref_pkg.sv $(ls rtl/*.sv | grep -v dgldpc_pkg) \
    tb/dgldpc_tb_core.sv tb/tb_dgldpc_decoder.sv --top-module tb_dgldpc_decoder
./obj_dir/Vtb_dgldpc_decoder
```

The packages come first. Each testbench ends with a line
`TB_RESULT checks=N failures=M`.

Building the full-size testbench takes about 4 minutes and 6.5 GB of memory,
because all 1250 nodes are flattened into one model. The simulation itself
then takes well under a minute.
