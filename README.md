# Extended lapped transform processor

An M-band extended lapped transform (ELT) is a paraunitary filter bank whose
basis functions are 2KM samples long (K is the overlap factor; K = 1 is the
modulated lapped transform). Its polyphase matrix factors into K butterfly
stages, block delays between them, and one type-IV DCT:

    analysis   E(z)J  = C^IV · I* · Z1 · D_0 · Z2 · D_1 · … · Z2 · D_{K-1}
    synthesis  J E'(z) = D_{K-1} · Z2' · … · D_1 · Z2' · D_0 · Z1' · I* · C^IV

where each D_k pairs element m of an M-vector with element M-1-m through a
plane rotation by an angle θ_{m,k}, Z_i delays the upper half of the vector by
i blocks (Z_i' the lower half), I* exchanges the two halves, and C^IV is the
M-point DCT-IV.

This RTL computes that transform on a serial stream at the input sample rate
(one sample per clock) with only K + M/4 + (a few) arithmetic units, in two
parts:

* a **pipelined butterfly chain**: one butterfly unit per D_k, each doing the
  M/2 rotations of a block one after the other, fed by a delay-invert unit
  that brings sample m and sample M-1-m together in time;
* a **constant-geometry DCT-IV**: one column of M/4 four-point processor
  elements (PEs) that is used log2(M)+2 times per block, with a fixed
  perfect-shuffle network between iterations.

The default size is M = 32 subbands and K = 2. Both are parameters
(M a power of two, at least 8; K at least 1).

## Dataflow of one block (analysis)

A block is M consecutive input samples x_0 … x_{M-1}.

1. **Delay-invert unit (`di_unit`).** During the first M/2 samples the input
   switch shifts x_0 … x_{M/2-1} into a chain of M/2 registers. During the
   next M/2 samples a single walking selector bit reads the chain back newest
   first, while the live sample passes the switch. This gives, one per cycle,
   the pairs (x_{M/2-1}, x_{M/2}), (x_{M/2-2}, x_{M/2+1}), …, (x_0, x_{M-1}),
   i.e. (v_m, v_{M-1-m}) with m counting down from M/2-1 to 0. Each pair
   carries its index m as a sideband.

   For M = 8: inputs x0 … x7 give pairs (x3,x4), (x2,x5), (x1,x6), (x0,x7)
   during cycles 4 … 7 of the block.

2. **Butterfly units (`butterfly_pe` + `rot_rom`).** Unit j applies
   D_{K-1-j}. For the pair (a, b) = (v_m, v_{M-1-m}):

       a' = −cos θ_{m,k} · a + sin θ_{m,k} · b
       b' =  sin θ_{m,k} · a + cos θ_{m,k} · b

   The cos/sin values come from a per-unit ROM addressed by m. Result and
   index are registered (one cycle).

3. **Block delays (`bsr_delay`).** A block of shift registers on the upper line
   (the a' stream) follows every butterfly. A butterfly line carries data only
   M/2 cycles per block, and the delay line shifts only on those cycles. So a
   line of M words delays by two blocks (Z2), and a line of M/2 words by one
   block (Z1). Between butterflies the line is M long; after the last one it
   is M/2 long. The pair order is the same at every stage, so the units chain
   without any reordering.

4. **Decimator bank (`decimator_bank`).** Writes each pair into an M-word
   register vector, applying I* (u_m → w_{m+M/2}, u_{M-1-m} → w_{M/2-1-m}) and
   the sign change (−1)^j that the DCT-IV factorization needs on its input.
   After the pair with index 0 it pulses `start` for the DCT-IV.

5. **DCT-IV (`dct4_psn`)**, described next. Its result is the subband vector.

## The constant-geometry DCT-IV

The DCT-IV is computed, without normalization, as

    X_k = Σ_j x_j cos(π/M (j+½)(k+½)),   M = 2^n.

It uses a factorization in which every stage consists of the same pattern:
M/4 independent 4-point operations on elements 4p … 4p+3, followed by the
same fixed reordering. Only one column of M/4 PEs is built, and it is
iterated. `dct4_psn` runs this schedule, one stage per clock:

| step | PE input | operation | coefficients of PE p |
|------|----------|-----------|----------------------|
| load | P1(din) | – | – |
| 0 | registers | O2 | 2d_0^0 = √2 |
| i = 1 … n−2 | P^T_{M,2}(registers) | O1 | 2d_i^k, k = p mod 2^i |
| n−1 | registers | O3 | 2d_{n−1}^{2p}, 2d_{n−1}^{2p+1} |
| n | registers | O4 | s(4p), s(4p+1) |
| n+1 | registers | O5 | s(4p+2), s(4p+3) |

**PE operations** (`dct4_pe`, two multipliers each; x = (x1,x2,x3,x4)):

| code | name | result |
|------|------|--------|
| 000 | O1 | (x1+x3+d·x4, x2+x4+d·x3, x1+x3−d·x4, x2+x4−d·x3) |
| 001 | O2 | (x1+x4+d·x3, x2+x3+d·x4, x1+x4−d·x3, x2+x3−d·x4) |
| 010 | O3 | (x1+x2+d1·x2, x1+x2−d1·x2, x3+x4+d2·x4, x3+x4−d2·x4) |
| 011 | O4 | (d1·x1, d2·x2, x3, x4) |
| 100 | O5 | (x1, x2, d1·x3, d2·x4) |

In matrix form, O2 = M2·A(d) with A(d) = [1 0 0 1; 0 1 1 0; 0 0 d 0; 0 0 0 d]
and M2 = F2 ⊗ I2. O1 = O2·R, where R swaps x3 and x4. O3 = M1·B(d1,d2) with
B = [1 1 0 0; 0 d1 0 0; 0 0 1 1; 0 0 0 d2] and M1 = I2 ⊗ F2. F2 is the 2×2
sum/difference butterfly.

**Coefficients** (`dct4_rom`, computed at elaboration):

* d_i^t = cos[(h_{2^i}(t) + ½)·π / 2^{i+1}], where h is the Hadamard order,
  defined by h_1(0) = 0, h_{2k}(2t) = h_k(t) and h_{2k}(2t+1) = 2k−1−h_k(t).
  For example, h_4 = (0, 3, 1, 2).
* s(r) = sin[π/(2M)·(h_M(r) + ½)]. This is the output normalization. Without
  the last two steps (parameter `SCALE_OUT = 0`), register r holds
  X / s(r), which is the "scaled output" form. It saves two cycles and the
  scaling multiplications when the scale can be absorbed downstream.

**Fixed wirings** (index maps computed at elaboration):

* P_{M,2} (unshuffle) takes (x_0, x_2, …, x_{M−2}, x_1, x_3, …, x_{M−1}).
  Its inverse is the perfect shuffle P^T: PE-column output k goes to input
  2k mod (M−1), and output M−1 stays in place.
* P1 = (P_{M,2}·R_M)^{n−2}, where R_M applies R in every group of four.
* After the last step, register r holds X_{M−1−h_M(r)}. The output port is
  wired back to natural order.

With SCALE_OUT = 1 the engine takes n+3 cycles per block (8 for M = 32),
against the M cycles between blocks, so it is idle most of the time. `done`
rises n+2 edges after the edge that takes `start`.

It is not obvious that this schedule gives the DCT-IV, in particular the
choice of O1 rather than O2 for the middle stages and the output order. It
was checked by multiplying out the stage matrices for M = 8, 16, 32 and 64.
`tb_dct4_psn` compares the hardware against the defining sum.

## Synthesis part

`elt_synthesis` mirrors the analysis part:

1. Sign change, then the same DCT-IV engine. The DCT-IV matrix is symmetric,
   and applied twice it gives M/2 times the identity.
2. `interpolator_bank` scales by 2/M with a rounded shift, exchanges the
   halves (I*), and sends the vector as M/2 pairs, m = M/2−1 … 0.
3. Delay lines on the **lower** line (Z1' of M/2 words before D_0, Z2' of M
   words before each further unit), then butterfly units D_0, D_1, …,
   D_{K−1}. D_k is symmetric and its own inverse, so the same unit is used.
4. `di_out` writes each pair to addresses m and M−1−m of a block buffer, and
   reads the buffer out in order, one sample per cycle. There are two buffers,
   used alternately, so the output stream has no gaps. Output samples are
   saturated to 16 bits.

The analysis and synthesis products multiply to a pure delay of 2K−1 blocks.
`elt_top` chains the two parts, and its output reproduces the input.

## Interfaces and timing

`elt_top #(M = 32, K = 2)`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; synchronous, active-low reset |
| in_valid, in_data | in | 1, 16 | input sample, one per cycle (gaps allowed) |
| sub_valid, sub_vec | out | 1, M×32 | subband vector, one pulse per block |
| out_valid, out_data | out | 1, 16 | reconstructed sample stream |

* Blocks are counted from reset: the first M valid samples form block 0.
* `sub_valid` for a block is seen at the (K+n+4)-th rising edge after the
  edge that takes its last sample. That is 11 edges for M = 32, K = 2.
* Subbands are unnormalized DCT-IV values, √(M/2) times the orthonormal
  transform.
* With continuous input, input sample t comes back out 167 cycles later at
  the default size.
* The delay lines advance only when data flows. The last 2K−1 blocks of a
  stream therefore come out only after 2K−1 more blocks have been fed in
  (zeros, for example).
* Assertions check the one-hot DI selector, and that no block arrives while
  the DCT-IV, the up-sampler or an output buffer is still busy with the
  previous one.

## Number format and accuracy

* Samples are 16-bit integers, carried internally as 32-bit two's complement
  (`elt_pkg::IW`).
* All coefficients are 16-bit with 14 fraction bits, range [−2, 2).
* Products are rounded half-up.
* Internal words do not overflow, even though the unscaled DCT-IV stages grow
  by up to about 830× for M = 32: 16 + 10 + 2 bits fits in 32.
* Measured errors:
  * subbands are within a few LSB of a real-valued model (about 2·10⁻⁴
    relative);
  * analysis followed by synthesis reproduces 16-bit input to within ±8 LSB.

  The error comes mainly from 14-bit cos/sin values, whose squares do not sum
  exactly to 1. A wider `CW`/`CF` reduces it.

## Rotation angles

The angles θ_{m,k} are the free parameters of an ELT. They set the prototype
filter. The RTL uses a fixed, smooth, non-trivial set:

    θ_{m,k} = π·((2m+1)/(4M) + (k+1)/(4K+4))

It is in `elt_pkg::theta`. This set makes a valid paraunitary filter bank
(perfect reconstruction holds for any angles). It is **not** an optimized
low-pass prototype. For a real filter bank, replace `theta` with angles
designed for the application; nothing else changes.

## Departures and interpretations

* **Middle DCT stages use O1 (with the R exchange).** One form of the
  algorithm gives code 001 (O2) for these stages. The matrix factorization
  includes R, and only that variant yields the DCT-IV, so O1 is used.
* **First-stage coefficient.** The first stage uses 2d_0^0 = √2 in every PE.
  d_0 has a single value.
* **Shuffle wiring.** The shuffle is the true perfect shuffle, output k to
  input 2k mod (M−1), not 2k mod M.
* **Output scaling.** The output scaling factors are the sines s(r) of the
  normalization matrix D*.
* **Synthesis order.** The synthesis factor order is the exact transpose of
  the analysis order, so the pair reconstructs.
* **Output stage.** The output DI and switch are built as a double block
  buffer.
* **Not built: two-channel variant.** Processing two channels at once, with a
  two-bank DI and delays of 2M and M, would keep the butterfly units busy in
  both halves of a block. It is a variant and is not built here.
* **Choices of this design.** These are not taken from any specification:
  * word widths and rounding;
  * the valid/index handshakes;
  * the synchronous reset;
  * the rotation angles.

## Files

* `rtl/elt_pkg.sv`: formats, PE operation codes, index and coefficient
  functions.
* `rtl/elt_top.sv`: analysis and synthesis side by side.
* `rtl/elt_analysis.sv`: `di_unit`, `butterfly_pe` + `rot_rom`, `bsr_delay`,
  `decimator_bank`, `dct4_psn`.
* `rtl/elt_synthesis.sv`: `dct4_psn`, `interpolator_bank`, `bsr_delay`,
  `butterfly_pe`, `di_out`.
* `rtl/dct4_psn.sv`: `dct4_pe` (×M/4) and `dct4_rom`.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends with
  `TB_RESULT checks=… failures=…`.
* `tb/tb_elt_mon*.sv`: event monitors and their counter package, used by
  `tb_elt_top`.
* `tb/tb_dct4_psn_run.sv`: the per-configuration runner used by
  `tb_dct4_psn`.
* `tb/tb_elt_workloads.sv`, `tb/tb_elt_run.sv`: end-to-end runs of `elt_top`
  at other sizes, one runner instance per size.

## Simulating

All testbenches are self-checking and use only `$urandom` stimulus. For
example, with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/elt_pkg.sv tb/tb_elt_top.sv --top-module tb_elt_top -o sim
    ./obj_dir/sim

What each testbench checks:

* **`tb_elt_top`** runs the default configuration (M = 32, K = 2) end to end
  in well under a second. It checks:
  * every subband against a real-arithmetic model of the factorization;
  * every output sample against the delayed input;
  * the subband rate and latency;
  * a gap-free output.

  It also counts that every mechanism is used: DI pairing, each butterfly,
  each delay line, each PE operation, the shuffle feedback, both output
  buffers. The counting is done by small monitors (`tb_elt_mon*`) that the
  testbench binds into the design's modules.
* **`tb_elt_workloads`** runs `elt_top` end to end, with the same checks,
  at four other sizes:
  * M = 8, K = 1 (the MLT);
  * M = 8, K = 3;
  * M = 16, K = 2, with random idle cycles in the input;
  * M = 64, K = 1.
* **`tb_elt_analysis`** runs M = 8, K = 3.
* **`tb_elt_synthesis`** runs M = 16, K = 1.
* **`tb_dct4_psn`** runs M = 8, 32 and 64, and M = 16 with
  `SCALE_OUT = 0`, through the runner `tb_dct4_psn_run`.

To change the size, override `M`/`K` on `elt_top`. The coefficient tables and
wirings are recomputed at elaboration.
