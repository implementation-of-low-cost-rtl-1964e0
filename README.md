# Radix-2 Montgomery multiplier with a configurable carry-save adder

This is a radix-2 Montgomery modular multiplier for RSA-sized operands. Its default size is K = 1024 bits. It computes

    S = A * B * 2^-(K+2)  (mod N-hat)

Operands and result are plain binary numbers, but the running sum inside is kept in
carry-save form as two words, SS (sum) and SC (carry). So every clock cycle costs one
full-adder delay plus a multiplexer, whatever the operand width. The work is done by a
single row of adder cells. The same row also does what a carry-save design would
otherwise need a wide carry-propagate adder for:

* It precomputes D-hat = B-hat + N-hat, so that each iteration adds at most one operand
  (0, N-hat, B-hat or D-hat) instead of two.
* It converts the final carry-save pair into a binary result.

Both of these are carry-propagating additions. The row handles them by iterating
`(SS, SC) <- SS + SC` until SC is zero. To make those loops about half as long, each adder cell can be
reconfigured. It is either one full adder (three-input carry-save addition, "1F") or two
half adders in series (two two-input carry-save additions in one cycle, "2H"). In addition, an
iteration that would add zero to an even pair with both low bits clear is skipped: its
halving is merged into the shift of the next cycle.

## What it computes, and what the caller must supply

* `a_in`, `b_in` and `n_hat_in` are K bits wide. `result` is K+1 bits. It is congruent to
  A·B·2^-(K+2) modulo N-hat and is smaller than 2^(K+1). There is no final comparison and
  subtraction: the K+2 halvings (K+6 iterations, B pre-scaled by 8) play the role of Walter's
  extended Montgomery factor. Check in your application whether the result may be fed back as an
  operand. The ports are K bits and the result can be K+1 bits.
* **N-hat must be 1 mod 4** (bit 0 = 1, bit 1 = 0). The skip detector relies on this: with
  B-hat = B·8, the three low bits of whatever is added are either 000 or {N-hat[2], 0, 1}. For an
  odd modulus N, use N-hat = N when N ≡ 1 (mod 4) and N-hat = 3N otherwise. The result is then
  also congruent modulo N, because N divides N-hat. With N < 2^(K-2), 3N fits in K bits. The
  multiplier does not form N-hat itself.

## Datapath

Datapath width is W = K+5: B-hat needs K+3 bits, D-hat needs K+4 bits, and every carry-save sum
stays below 2^(K+5).

| Element | Role |
|---|---|
| `N-hat`, `B-hat`, `D-hat` registers | operands. B-hat = B<<3 is loaded at start. D-hat is captured from SS after the precomputation. |
| `A` register | shifts right by 1 or 2 per iteration. Bits 0 and 1 are A(i+1) and A(i+2). |
| `SS`, `SC` registers | carry-save accumulator, stored *before* the halving of the last iteration |
| `q-hat`, `A-hat`, `skip` flip-flops | quotient and multiplier bit for the current iteration, and whether the previous one skipped |
| M1 / M2 (`opnd_mux4`) | feed SC / SS to the adder: unshifted, >>1, >>2, or the load operand (N-hat / B-hat) |
| SM3 (`sm3`) | picks the third operand x from (A-hat, q-hat): 00 → 0, 01 → N-hat, 10 → B-hat, 11 → D-hat. Outputs ~x. |
| CCSA (`ccsa`, cells `cfa`) | one row of W configurable full adders, mode input `alpha` |
| Zero_D (`zero_d`) | NOR over SC, ends the two conversion loops |
| M4 / M5 (`lsb_mux`) | 3-bit taps of SC / SS at >>1 or >>2, for the skip detector |
| Skip_D (`skip_d`) | next quotient(s) and the skip decision, from the low bits only |
| `mm_ctrl` | the sequencer |

### The configurable cell

Each cell has inputs ss_j, sc_j and x_j and computes p = ss_j ^ sc_j.

* With `alpha = 1` the cell is a full adder: sum = p ^ x_j and carry = ss_j·sc_j + p·x_j.
* With `alpha = 0` the cell ignores x. Its third input becomes t = ss_(j-1)·sc_(j-1), the
  first-half-adder carry of the bit below, so it gives sum = p ^ t and carry = p·t. The
  generate term ss_j·sc_j is switched off.

In 2H mode, the row as a whole performs two consecutive half-adder additions of SS and SC. A
pending carry ripple therefore advances two bit positions per cycle instead of one. Resolving
(2^m − 1) + 1 takes about m/2 cycles instead of m. The cell's critical path is still one
full-adder delay plus a 2-to-1 multiplexer.

## Deferred shift and the skip detector

This is the least obvious part of the design.

**Deferred halving.** Iteration i computes (SS[i] + SC[i] + x)/2. The adder writes the
un-halved sum and carry words into the registers. M1/M2 apply the `>> 1` in the next cycle,
together with the next addition. When iteration i+1 is skipped, its halving is added on top,
so M1/M2 select `>> 2`. The registers therefore hold SS[i] shifted left by one or two bits,
depending on the stored `skip` flag. This is why M4/M5 take bits [3:1] or [4:2].

**Quotient.** With B-hat[2:0] = 0 and N-hat ≡ 1 (mod 4), the quotient of iteration i is just
q_i = SS[i]_0 ^ SC[i]_0. It does not depend on A or B. In the bit-0 full adder x_0 = q_i, so the
carry out of bit 0 is SS0 | SC0. Bit 1 of x is always 0, and bit 2 of x is N-hat_2 · q. Writing
SSj, SCj for bit j of SS[i], SC[i]:

    SS[i+1]_0 = SS1 ^ SC1            SC[i+1]_0 = SS0 | SC0
    q(i+1)    = SS[i+1]_0 ^ SC[i+1]_0
    skip(i+1) = ~(A(i+1) | SS[i+1]_0 | SC[i+1]_0)
    q(i+2)    = (N-hat_2 & q_i) ^ (SS2 ^ SC2) ^ (SS1 & SC1)      (used only when skipping)

When skip(i+1) = 1, iteration i+1 would add zero to a pair whose low bits are both 0. Its result
is simply (SS[i+1] >> 1, SC[i+1] >> 1), so it costs no cycle. The detector then stores q(i+2)
and A(i+2) instead of q(i+1) and A(i+1). It runs in parallel with the wide addition and sees
only three bits of each word, so it stays off the critical path.

**Skip rate.** In a non-skipped iteration the new SC_0 is SS0 | SC0. So once the low carry bit
is 1 it stays 1 until the end of the loop, and a skip is only possible while the accumulator's
low bits are still all zero. In practice the skips come from the trailing zero bits of A, and
for random operands only a few iterations (1 to 3 of 1030 at K = 1024) are skipped. The
precomputation and conversion loops (typically 4 to 7 cycles each at K = 1024) are
therefore not fully hidden. The equations above are exact: the testbenches compare every
result and cycle count with a word-level model.

**Last iteration.** A skip is never allowed in the last iteration (i = K+4): it would halve the
result once more than the algorithm requires. For even K this case cannot arise anyway,
because every executed iteration on such a path has odd index. For odd K it does arise, for
example when A = 0.

## Sequence and latency

| Phase | Cycles | What happens |
|---|---|---|
| start (idle) | 0 | load N-hat, B-hat = B<<3, A; clear q-hat, A-hat, skip |
| precompute | 1 | 1F: (SS, SC) = B-hat + N-hat + 0 |
| precompute loop | n_pre + 1 | 2H steps until SC = 0. In the last cycle D-hat ← SS and SS, SC ← 0. |
| iterations | K + 6 − skips | i = −1 … K+4, one 1F addition per executed iteration |
| conversion | 1 + (n_post − 1) + 1 | one 2H step that also applies the pending shift, then 2H steps until SC = 0 |
| done | – | `done` pulses one cycle after SC = 0 is seen |

The total latency, counted from the clock edge that samples `start` to the edge after which `done`
is high, is n_pre + n_iter + n_post + 3 cycles. For random 1024-bit operands the simulated range
was 1038 to 1045 cycles. The worst case is a carry chain that runs the full length of the word.
The 2H loops then take about K/2 cycles each, where a plain one-level CSA adding zero would take
about K. For example, with B-hat + N-hat = (2^K − 8) + 9 the precomputation needs 511 cycles
instead of 1021, and the whole product needs 2053 cycles at K = 1024.

## Interface and timing

* `clk`, and `rst_n` (asynchronous, active low; resets everything).
* `start`: a one-cycle pulse while `busy` is low. `a_in`, `b_in` and `n_hat_in` are sampled
  on that edge and may change afterwards. `start` is ignored while busy.
* `busy`: high from the edge after `start` until the result is ready.
* `done`: a one-cycle pulse. `result` is valid from then on, until the next `start`.
* `skip_taken`: pulses once for each skipped iteration (a statistic).

## Departures from the published architecture, and own choices

The datapath follows the published SCS-MM-New multiplier block by block: the registers, M1 to
M5, SM3, the CCSA and its configurable cell, Zero_D, Skip_D and the loop structure of the
algorithm. Where it departs or had to fill gaps:

* **Operand size.** The algorithm is written for a generic k; 1024 is a choice.
* **N-hat.** How the new modulus is formed is not part of the published description. Here
  it is taken as an input and must be ≡ 1 (mod 4) (see above).
* **Skip detector equations.** The quotient and skip equations are referred to but not
  spelled out. They were derived from the carry-save arithmetic and checked exhaustively;
  the bit-0 carry term is an OR. The inputs and the structure of the detector match the
  published one.
* **Skip benefit.** The published description expects skipping to hide most of the
  precomputation and conversion cycles. With the exact equations it does not (see *Skip
  rate*). Latency is about K + 6 plus half the two carry-chain lengths, not K + 6.
* **Last iteration.** The published loop would allow a skip in the last iteration, which gives
  a wrong result. That skip is suppressed here (only reachable for odd K).
* **Final conversion.** The algorithm tests SC before the final conversion. Here one 2H step
  always runs first, because it also applies the pending shift. This costs at most one cycle.
* **Control.** The control part is not published. The state machine, the clear of SS/SC at
  the start of the loop and the start/busy/done handshake are this design's own.
* **Result range.** No reduction below N-hat is done, as in the published algorithm.
* **CFA cell.** The cell is written as its Boolean function (propagate XOR, sum XOR,
  carry = gated generate OR propagate-and-third) rather than as a netlist of particular
  gates.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_scs_mm_new` (K = 61; odd, so that the refused last-iteration skip occurs) runs corner
  cases (zero and all-ones operands, N-hat = 1, 5, 13, 2^K − 3, a full-length carry chain in
  the precomputation) and 400 random products.
  Each result is compared bit-exactly with `mm_ref_pkg`, an independent word-level model of the
  algorithm. The testbench also checks the congruence modulo N-hat and modulo N, the exact
  latency and the number of skips, and that a start pulse while busy is ignored. It also checks that both 2H loops need at most half (plus
  one) of the steps a plain one-level CSA would need. It fails if skipping, a refused last-iteration skip, a
  multi-step precomputation, a multi-step conversion or N-hat = 3N never occurred.
* `tb_scs_mm_new_full` runs the default K = 1024 configuration: one worst-case carry chain,
  then three random moduli, each used for a product and a squaring of that product.
* Unit tests:
  * `cfa`, `lsb_mux` and `skip_d` are tested exhaustively. For `skip_d` the reference is a
    real 3-bit carry-save addition.
  * `ccsa` is checked for sums in both modes and for the halved carry-chain length.
  * `sm3`, `opnd_mux4` and `zero_d` are tested on random and one-hot data.
  * `mm_ctrl` is driven through complete scripted sequences.

To simulate, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/mm_pkg.sv \
        tb/mm_ref_pkg.sv tb/tb_scs_mm_new.sv --top-module tb_scs_mm_new
    ./obj_dir/Vtb_scs_mm_new

Unit tests follow the same pattern (`tb/tb_<module>.sv`, top `tb_<module>`). The simulator has
no X state, so all registers that are read are reset.

## Files

* `rtl/mm_pkg.sv`: the select encoding, controller states and control struct
* `rtl/scs_mm_new.sv`: top: registers and wiring
* `rtl/mm_ctrl.sv`: sequencer
* `rtl/ccsa.sv`, `rtl/cfa.sv`: configurable adder row and cell
* `rtl/sm3.sv`, `rtl/opnd_mux4.sv`, `rtl/lsb_mux.sv`: multiplexers
* `rtl/skip_d.sv`, `rtl/zero_d.sv`: detectors
* `tb/mm_ref_pkg.sv`: reference model used by the multiplier testbenches
