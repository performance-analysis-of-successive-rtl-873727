# 2-bit successive-cancellation polar decoder with a two stage channel estimator

A polar code of length N = 2^n is decoded by successive cancellation (SC):
the N input bits u_0 .. u_{N-1} are decided one after another, each from LLRs
that are pushed down a binary tree of f and g operations and corrected by the
bits already decided. Plain SC takes 2N-2 steps per codeword. This design
cuts that to **3N/4 - 1 clock cycles** (767 cycles for N = 1024) in two ways:

* **2-bit last stage.** The last level of the tree, where a pair of LLRs
  becomes two bits, is replaced by a *P node*: a handful of gates and one
  magnitude comparator that decide u_{2i-1} and u_{2i} at once, with no f
  node, g node or second hard decision in between.
* **Precomputation.** A g node needs the partial sum of bits that are not
  decided yet when its inputs arrive. Every processing element therefore
  computes f, g(u=0) = d+c and g(u=1) = d-c in the same cycle; the right
  g result is picked by a mux later, when the partial sum is known. A tree
  node then costs one cycle, not two.

Next to the decoder sits a least-squares **channel estimator** for BPSK,
QPSK and 16QAM. It needs no general multiplier or divider: all symbol
coordinates are ±1 or ±3, so products are sign flips of r or 3r, and the
division by the symbol energy is a multiplication by one of six constants.

The top level `polar_sc_top` holds both parts side by side. The default
configuration is a (1024, 512) polar code with 6-bit LLRs.

## Number format

LLRs are **Q-bit sign-magnitude** (default Q = 6): bit Q-1 is the sign
(1 = negative, so the hard decision is 1), bits Q-2..0 the magnitude, range
±31. The f node works directly on this form (XOR of signs, minimum of
magnitudes), so it can produce a "negative zero", which counts as a decision
of 1. The g node converts both inputs to two's complement (S2C), adds and
subtracts, and converts back (C2S), saturating at ±31 and returning zero as
+0.

Bit order is natural: the codeword is x = u · F^{⊗n} with F = [1 0; 1 1],
and a tree node with LLR vector a of length L has

    left child  a_L[i] = f(a[i], a[i+L/2])                 = sign·sign·min
    right child a_R[i] = g(a[i], a[i+L/2], β_L[i])        = a[i+L/2] + (1-2β_L[i])·a[i]

where β_L are the partial sums (re-encoded bits) of the left child. Channel
LLR i is code bit i; `u_hat` bit i is u_i.

## The decoding tree and the schedule

This is the part to understand before changing anything.

**Hardware.** Stage s (s = 1 .. n-1) is an array of N/2^s processing
elements, each an `f_node` and a `g_node`, plus three register banks of
N/2^s LLRs: f results, g(u=0) results and g(u=1) results. Stage s reads the
LLR vector of the tree node it works on (length N/2^(s-1)):

* stage 1 reads the channel LLRs (captured at start);
* stage s > 1 reads the f bank of stage s-1 when its node is a left child;
  when it is a right child it reads, position by position, the g(u=0) or
  g(u=1) bank of stage s-1, chosen by the left sibling's partial sums. This
  mux is the output mux of the g node, moved behind the registers.

After stage n-1 the tree has length-2 nodes, which the **last stage**
handles: in one cycle the first P node decides u[4j], u[4j+1] from stage
n-1's f pair; their partial sums (u[4j]⊕u[4j+1], u[4j+1]) pick stage n-1's
g pair; the second P node decides u[4j+2], u[4j+3]. So one last-stage cycle
finishes one length-4 node j (j = 0 .. N/4-1).

**Schedule.** Node j = 0 needs stages 1, 2, .., n-1 and then a P cycle.
Node j > 0 shares its ancestors with node j-1 down to a certain level: if
j has t trailing zero bits, only stages n-1-t .. n-1 must run again, the
first of them on a right child. The cycle count is

    T(n-1) = 2,  T(s) = 1 + 2·T(s+1)   =>   T(1) = 3N/4 - 1.

For N = 8 (n = 3) the decode is five cycles:

| cycle | unit    | node        | result                                   |
|-------|---------|-------------|------------------------------------------|
| 1     | stage 1 | root        | f, g(0), g(1) of the two length-4 halves |
| 2     | stage 2 | left half   | from stage 1 f bank                      |
| 3     | P       | j = 0       | u0 .. u3                                 |
| 4     | stage 2 | right half  | from stage 1 g banks, picked by β(u0..u3)|
| 5     | P       | j = 1       | u4 .. u7                                 |

The controller (`sc_ctrl`) is a three-state machine (IDLE, STAGE, PNODE)
holding the current stage and j; after the P cycle of node j it jumps to
stage n-1-ctz(j+1). Whether the node of stage s is a right child is bit
n-1-s of j, so the stage input muxes need no extra state.

## The P node

With c and d the two LLRs of a length-2 node, frozen1/frozen2 marking
frozen positions (decided 0) and comp = (|c| ≥ |d|):

    u_{2i-1} = ~frozen1 & (sign(c) ^ sign(d))
    u_{2i}   = ~frozen2 & ( ~comp & sign(d)
                          |  comp & ~frozen1 & sign(d)
                          |  comp &  frozen1 & sign(c) )

u_{2i} is the sign of g(c, d, u_{2i-1}) = d ± c: if |d| is larger it is
sign(d); otherwise it is sign(c), flipped when u_{2i-1} = 1. When u_{2i-1}
is 1 the signs of c and d differ, so the flipped sign(c) equals sign(d);
when u_{2i-1} is frozen it is 0 and the result is sign(c). At equal
magnitudes the decision follows c, where the sum d ± c would be exactly 0.
That tie rule is the only place where this decoder can differ from an SC
decoder that takes hard decisions on g outputs.

## Partial sums

`psg` keeps, for every tree level l = 1 .. n-2, the partial sums (N/2^l
bits) of the last finished left child at that level. In each P cycle the four
new bits are encoded with the polar butterfly, then folded upwards as long
as the finished node is a right child:

    β_parent = { β_right , β_left_sibling ⊕ β_right }   (upper half, lower half)

and written into the register of the first ancestor that is a left child.
The fold is combinational, so the sums are ready for the stage activation in
the very next cycle. When the last node finishes, the fold reaches the root
and gives the re-encoded codeword `x_hat`.

## Channel estimator

`ls_estimator` computes, for two received samples R1 = R[1,k], R2 = R[2,k]
carrying the symbols XF = X_F[k] and XS = X_S[k],

    ε = (R1·conj(XF) + R2·conj(XS)) / (|XF|² + |XS|²)

in four parts:

* **Coordinate precalculator** (`ls_coord_precalc`): r and 3r = r + (r<<1)
  for Re R1, Im R1, Re R2, Im R2.
* **LS control unit** (`ls_ctrl`): from the modulation and the coordinates,
  the mux selects C0..C7 (0, r or 3r), the sign controls S0..S5 and the
  normalization selects F0, F1. BPSK ignores the imaginary coordinates.
* **LS unit** (`ls_unit`): eight muxes and six add/subtract units,
  S0 = ReR1·ReXF + ImR1·ImXF, S1 = the same for R2/XS,
  S2 = ImR1·ReXF − ReR1·ImXF, S3 = the same for R2/XS, S4 = S0+S1 (real
  part), S5 = S2+S3 (imaginary part). Each unit computes (±a) + (±b); a
  negation is an XOR with the control bit plus a carry-in.
* **Final normalization** (`ls_normalize`): D = |XF|² + |XS|² is one of 2,
  4, 12, 20, 28, 36, so the division is a multiplication by
  K_D = round(2^FRAC / D), a constant (shift-and-add) multiplier; F0/F1 pick
  the product. Other D values give 0.

Samples are W-bit two's complement (default 10), coordinates 3-bit two's
complement in {−3, −1, 0, 1, 3}. The outputs are ε·2^FRAC (default
FRAC = 12), W+FRAC+4 bits. There is one register after the LS unit and one at
the output: `out_valid` follows `in_valid` by two cycles, one estimate per
cycle. The rounding of K_D limits the relative error of ε to at most 0.2 %.

## Interfaces and timing

`sc_decoder` (and the `dec_*` ports of the top):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `start` | in | 1 | with `busy` low: capture `llr_in` and `frozen`, start |
| `llr_in` | in | N×Q | channel LLRs, `llr_in[i]` = code bit i |
| `frozen` | in | N | 1 = u_i is frozen |
| `busy` | out | 1 | high for exactly 3N/4 − 1 cycles |
| `done` | out | 1 | one-cycle pulse after the last P cycle |
| `u_out`, `u_out_index`, `u_out_valid` | out | 4, n−2, 1 | u[4·index + k] in bit k, the cycle after it is decided |
| `u_hat`, `x_hat` | out | N | decoded bits and their re-encoding, valid from `done` until the next decode |

`start` is accepted in the cycle `done` is high, so back-to-back codewords
take 3N/4 cycles each (768 at N = 1024, 1.33 decoded bits per cycle). Reset
(`rst_n`, synchronous, active low) clears the controller and the valid flags;
the data registers are always written before they are read. The frozen set
is an input, so any (N, K) code of length N runs on the same hardware.

`ls_estimator`: `in_valid`, `mode` (`polar_pkg::mod_e`), `r1_re` .. `r2_im`,
`xf_re` .. `xs_im` in; `out_valid`, `eps_re`, `eps_im` out, two cycles later.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `polar_sc_top`, `sc_decoder`, `psg`, `sc_ctrl` | `N` | 1024 | code length, power of two, ≥ 8 |
| `polar_sc_top`, `sc_decoder`, node modules | `Q` | 6 | LLR bits, sign + magnitude |
| `polar_sc_top`, estimator modules | `W` | 10 | received sample bits |
| `polar_sc_top`, `ls_estimator`, `ls_normalize` | `FRAC` | 12 | fraction bits of ε |

Storage at N = 1024, Q = 6: 6144 bits of captured channel LLRs, about
3·N·Q = 18 400 bits of stage registers, N − 4 partial-sum bits plus N
codeword bits, and N decoded bits, about 28 700 flip-flops in all.

## What is the source design and what is this implementation's choice

Taken from the published architecture: the f node (sign extraction, XOR,
compare and select, concatenation), the g node (S2C, adder, subtractor, C2S,
Usum mux), the P-node signals and gate structure (frozen1, frozen2, comp on
the q−1 magnitude bits), the tree-based organisation, the partial sum
generator as an encoder-like unit, the 2b-SC precomputation latency 3N/4 − 1,
the (1024, 512) code size, and the estimator's four parts, their control
names (C0..C7, S0..S5, F0, F1), the r/3r precalculation and the
BPSK/QPSK/16QAM support.

Chosen here, where the source is silent or unclear:

* The equation for u_{2i} above is derived from what the P node must
  compute (the sign of d ± c), including the tie rule.
* Q = 6, W = 10, FRAC = 12; saturation in the g node; the subtraction order
  d − c.
* The register organisation of the tree, the controller, the handshake and
  the reset.
* The estimator's formula (an LS estimate over two received samples), the
  assignment of components to muxes, the widths of C, S and F, the constant
  reciprocals and the two pipeline registers.

Not part of this design:

* The step from channel estimate to decoder LLRs. The source's block diagram
  shows the estimator feeding the first decoder stage but does not say how;
  the two parts therefore have separate ports.
* The path decorrelator the block diagram places after the decoder; it is
  described only as future work.
* The source's timing, power and throughput figures are for an FPGA build of
  its own and are not reproduced or checked here; the testbenches check cycle
  counts only.

## Files

* `rtl/polar_pkg.sv` — shared enums (controller states, modulation, mux
  select).
* `rtl/f_node.sv`, `rtl/g_node.sv`, `rtl/p_node.sv` — processing nodes.
* `rtl/psg.sv`, `rtl/sc_ctrl.sv`, `rtl/sc_decoder.sv` — decoder.
* `rtl/ls_coord_precalc.sv`, `rtl/ls_ctrl.sv`, `rtl/ls_unit.sv`,
  `rtl/ls_normalize.sv`, `rtl/ls_estimator.sv` — channel estimator.
* `rtl/polar_sc_top.sv` — top level.
* `tb/polar_ref_pkg.sv` — reference model: a bit-by-bit SC decoder written
  from the textbook recursion (same number format, same tie rule), a polar
  encoder, an erasure-channel frozen-set construction and a noisy BPSK LLR
  generator.
* `tb/tb_<module>.sv` — one self-checking testbench per module.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
after a fixed number of cycles if the design hangs.

* `tb_f_node`, `tb_g_node`, `tb_p_node`: all 4096 input pairs (and all four
  frozen patterns) at Q = 6, against integer arithmetic.
* `tb_psg`: random bits in decoding order, every level register against the
  encoding of the last finished left child at that level, and the final codeword.
* `tb_sc_ctrl`: the cycle-by-cycle schedule at N = 32 against the tree walk,
  3N/4 − 1 cycles, one `done` pulse.
* `tb_sc_decoder`: N = 64, noisy codewords and random LLRs with random
  frozen masks (ties, negative zeros, saturation), bit-exact against the
  reference decoder, plus the latency and the `u_out` stream.
* `tb_sc_decoder_n8`: the eight-bit tree, all 256 frozen masks with random
  LLRs plus noisy (8, 4) codewords, against the reference, with the
  five-cycle order stage 1, stage 2, P, stage 2, P checked cycle by cycle.
* `tb_ls_*`: each estimator part exhaustively or with 20 000 random vectors;
  `tb_ls_estimator` checks the complex LS formula and the two-cycle latency.
* `tb_polar_sc_top`: the full default size, N = 1024. Three noisy
  (1024, 512) codewords and one random LLR vector, bit-exact against the
  reference; 767 cycles per decode; the high-SNR codeword decoded without
  error. 300 estimates over all three modulations. It also counts left- and
  right-child stage activations, P cycles, frozen bits in P nodes, both
  comparator outcomes, g picks with partial sum 1, the fold to the root and
  the use of 3r; each must occur.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/polar_pkg.sv tb/polar_ref_pkg.sv tb/tb_polar_sc_top.sv \
        --top-module tb_polar_sc_top
    ./obj_dir/Vtb_polar_sc_top

(`tb/polar_ref_pkg.sv` is needed only by the decoder testbenches.) The
full-size top testbench builds in about half a minute and runs in well
under a second.
