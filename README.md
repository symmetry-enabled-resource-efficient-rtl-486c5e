# Bit-serial systolic Montgomery multiplier over GF(2^l)

This is a small hardware multiplier for binary-field elliptic-curve cryptography on
very constrained devices. It computes the Montgomery product

    P = C · D · v^-(l-1)/2  mod F

over GF(2^l), where F is any irreducible polynomial of odd degree l with f_l = f_0 = 1. It
uses a one-dimensional systolic array of only (l+1)/2 processing elements (PEs). Each PE
handles one bit per clock, and the operands go in and the result comes out one bit at a time.
One multiplication takes 3l-2 schedule steps, and the critical path is one AND gate plus a
three-input XOR. The default size is l = 233, for example with F = v^233 + v^74 + 1
(NIST B-233/K-233). F is an input, so any modulus of that degree can be used.

The RTL follows a published systolic design: the recurrences, the schedule, the PE
circuits, the control signals and the output stage. The sections below point out where this
implementation fills gaps in that description or departs from it.

## 1. Why half as many PEs as bits

With the Montgomery factor Q = v^(l-1)/2, the product C·D·Q^-1 splits into two halves that
can be computed independently:

    A = Σ_{k=(l-1)/2}^{l-1} C·d_k·v^(k-(l-1)/2)   (the high half of D: positive powers of v)
    B = Σ_{k=0}^{(l-3)/2}   C·d_k·v^(k-(l-1)/2)   (the low half of D: negative powers of v)
    P = A + B

Both halves are evaluated by Horner's rule in (l+1)/2 iterations:

    A^i = A^(i-1)·v      mod F + C·d_(l-i)        A^0 = 0
    B^i = B^(i-1)·v^-1   mod F + C·d_(i-1)        B^0 = 0,  and d_(l-1)/2 is replaced by 0 in B

In the last B iteration, d_(l-1)/2 is replaced by 0 because that bit already belongs to A.
The iteration is just a division of B by v.

At bit level, with v^-1 = Σ f_j v^(j-1), both recurrences have the same shape: one
shifted-in bit, one bit times the modulus, and one bit times C.

    a^i_(l-1-j) = a^(i-1)_(l-2-j) ⊕ a^(i-1)_(l-1)·f_(l-1-j) ⊕ d_(l-i)·c_(l-1-j)    (a^(i-1)_(-1) = 0)
    b^i_j       = b^(i-1)_(j+1)   ⊕ b^(i-1)_0·f_(j+1)       ⊕ d_(i-1)·c_j          (b^(i-1)_l  = 0)

Because the shapes match, one PE computes a coefficient of A or of B with the same three AND
gates and the same XOR. Only the order of the inputs differs: A walks the coefficients from
the top (j = 0 is bit l-1) and B walks them from the bottom. So PE_i does iteration i of
*both* recurrences, first A and then B. That is why there are (l+1)/2 PEs and not l.

## 2. The schedule: who computes what, when

The iteration space is the grid (i, j) with i = 1..(l+1)/2 and j = 0..l-1. It is
projected along j, so one PE per iteration i, and scheduled at

    cycle = 2(i-1) + j            (within each phase; B starts l cycles after A)

Each PE therefore runs two cycles behind its predecessor. Why two: node (i, j) needs bit j+1
of the previous iteration, a^(i-1)_(l-2-j). That bit was produced at cycle 2(i-2)+j+1, which is
one cycle earlier. It therefore crosses one register, D_i. The c and f bits of column j were
used by the previous PE two cycles earlier, so they cross two registers (D_c D_c, D_f D_f).

Node timing for l = 5 (3 PEs, A phase; B is the same, shifted by 5 cycles):

    j →         0  1  2  3  4
    PE_1 (i=1)  0  1  2  3  4
    PE_2 (i=2)  2  3  4  5  6
    PE_3 (i=3)  4  5  6  7  8

Cycle by cycle, for a whole operation (t = 0 is the first cycle in which PE_1 computes):

| cycles      | PE_1 inputs                     | last PE output                   |
|-------------|----------------------------------|----------------------------------|
| 0 .. l-1    | A streams c_(l-1-t), f_(l-1-t)   | –                                |
| l-1 .. 2l-2 | (B from t = l)                   | A^(l+1)/2, MSB first             |
| l .. 2l-1   | B streams c_(t-l), f_(t-l+1)     | –                                |
| 2l-1 .. 3l-2| –                                | B^(l+1)/2, LSB first             |

The last result bit appears at step 3l-2. P can be read from the next cycle on.

Two pieces of state need care:

* **The held bit.** All coefficients of iteration i need a^(i-1)_(l-1) (in B, b^(i-1)_0).
  That is the *first* bit the previous PE produced. Every PE therefore has a second
  register after D_i. The strobe t2 loads it once, in the cycle when D_i holds the first bit
  of the phase, and it then holds that bit for the l cycles the next PE needs it. In PE_1, t2
  is high at cycles 1 and l+1.
* **The zero at the end of the column.** For the last coefficient (j = l-1), the shifted-in
  bit must be a_(-1) = 0 (in B, b_l = 0). At that cycle the previous PE's D_i already holds
  the first bit of its next phase, so a control bit z = 0 forces the input to zero through an
  AND gate. In PE_1, z is low at cycles l-1 and 2l-1.

## 3. The processing elements

All three PE types compute `res = (c & d) ^ (f & held) ^ (next & z)`.

* **PE_1** (`mmm_pe_first`) receives both operand orders as separate serial streams:
  c_(l-1-j) and c_j, and f_(l-1-j) and f_(j+1). It also receives d_(l-1) and d_0. The
  control bit t1 selects the A or the B set. Its "previous iteration" inputs are tied to 0
  (A^0 = B^0 = 0).
* **PE_i** (`mmm_pe_mid`) receives c and f already in the right order from PE_(i-1). Only
  its d bit changes with t1: d_(l-i) in A, d_(i-1) in B.
* **PE_(l+1)/2** (`mmm_pe_last`) uses d_(l-1)/2 in A and a constant 0 in B. It has no
  registers. Its result bit goes straight to the output stage, with four strobes: first A
  bit, A bit, first B bit, B bit.

In the source design the operand selection and output steering are drawn as tri-state
buffer pairs. Here they are 2:1 selections and load enables, which is the same function
without internal tri-state nets.

## 4. Control

`mmm_ctrl` runs a counter t = 0 .. 3l-2 after `start` and drives PE_1's control word
`ctrl_t` = {act, t1, t2, z}. Its fields are defined in `mmm_pkg`:

| signal | high/low when (PE_1's view)                     | purpose                          |
|--------|--------------------------------------------------|----------------------------------|
| act    | 1 for t < 2l                                     | a bit is in flight               |
| t1     | 1 for t < l                                      | A phase (1) / B phase (0)        |
| t2     | 1 at t = 1 and t = l+1                           | load the held bit                |
| z      | 0 at t = l-1 and t = 2l-1                        | zero the shifted-in bit          |

The counter also picks the serial operand bits out of the registered C and F. A `mmm_ctrl_delay`
stage (two registers, the "D_t" pair) sits in front of every PE after the first, so PE_i sees
PE_1's control word 2(i-1) cycles later.

**Departure from the source:** the source structure puts the D_t pairs on t2 only and
broadcasts t1 and z to all PEs. With the schedule above, the PEs change phase two cycles
apart. A broadcast t1 would therefore give PE_2 onward the wrong d bit, and a broadcast z
would clear a live B bit in other PEs. Here all four bits travel through the D_t pairs. The
cost is 3 extra flip-flops per D_t stage, 696 at l = 233.

The last PE has no D_i register, so its bits come out one cycle earlier than a registered PE
would deliver them. For this reason it takes t2 from the middle of its D_t pair, one register
earlier.

## 5. Output stage

`mmm_out_unit` holds A and B. SR-A and SR-B are (l-1)-bit shift registers. SR-A shifts in
all l bits of A, MSB first, and the MSB drops out of its top end. The MSB is caught
separately, in its own flip-flop, by the "first A bit" strobe. B works the same way, LSB
first, with SR-B shifting the other way and its own flip-flop for b_0. Then l XOR gates give

    p_j = a_j ⊕ b_j

Where the source's bit-level listing pairs coefficients differently, this follows the
algebra (P = A + B as polynomials) and the source's own array drawing, which pairs a_k with
b_k. The registers only move while `act` is high, so P holds until the next operation.

## 6. Top level and interface (`mmm_top`)

| port          | dir | width | meaning                                                |
|---------------|-----|-------|--------------------------------------------------------|
| clk, rst_n    | in  | 1     | clock; asynchronous active-low clear of all registers  |
| start         | in  | 1     | start; C, D, F registered on this edge; ignored while busy |
| c_i, d_i      | in  | L     | operands, bit k = coefficient of v^k                   |
| f_i           | in  | L+1   | modulus F, f_L = f_0 = 1                               |
| busy          | out | 1     | operation in progress                                  |
| done          | out | 1     | one-cycle pulse; p_o valid from this cycle on          |
| p_o           | out | L     | C·D·v^-(L-1)/2 mod F                                   |

`done` comes exactly **3L cycles after the start edge**. That is the 3L-2 schedule steps, plus
the start cycle, plus the cycle that stores the last bit. Only one operation runs at a time.

To use it as a field multiplier, map the operands into the Montgomery domain, C = σ·Q and
D = μ·Q with Q = v^(l-1)/2, and chain products there. To leave the domain, multiply by 1:
P·1·Q^-1 = σ·μ mod F. The test bench does exactly this round trip.

Parameter: `L` (default 233). It must be odd and at least 3; an elaboration-time assertion
checks this.

## 7. Cost

For l = 233, synthesis gives 117 PEs and 2,801 flip-flop bits in total:

* 696 in the PEs (6 per registered PE);
* 928 in the control delay chain;
* 466 in SR-A, SR-B and the two result flip-flops;
* the rest in the operand registers and the counter.

The array logic is three two-input ANDs and one three-input XOR per PE (351 ANDs in all),
plus 233 output XORs. That matches the source's count of 1.5(l+1) ANDs and 2l+1 two-input XORs. The source counts
4(l-3)+8 = 928 latches. That equals the PE registers plus a t2-only delay chain. The extra
here comes from the pipelined t1/z/act bits (section 4) and from the output and operand
registers, which the source does not count.

## 8. Verification

Every module has a self-checking test bench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference model
(`tb/mmm_ref_pkg.sv`) works on whole words: multiply-and-reduce by shift-and-add, then
divide by v (l-1)/2 times. It shares no structure with the array.

| test bench            | what it checks                                                          |
|-----------------------|-------------------------------------------------------------------------|
| tb_mmm_pe_first/mid   | random inputs against a cycle model of the PE equations                 |
| tb_mmm_pe_last        | all 512 input combinations                                              |
| tb_mmm_ctrl_delay     | reset value, 1- and 2-cycle delays                                      |
| tb_mmm_out_unit       | reassembly of A, B, P from the serial order; hold afterwards            |
| tb_mmm_ctrl           | every control and stream bit, every cycle; busy/done; start while busy  |
| tb_mmm_siso_array     | l = 13: A at cycle 2l-1, A/B/P at 3l-1, 300 random moduli and operands  |
| tb_mmm_schedule       | l = 5: each PE's D_i register against the node timing of section 2      |
| tb_mmm_top            | l = 233 (defaults): trinomial and random F, Montgomery round trips, latency 3l, counts of t1 switches, t2 loads, z clears and ignored starts |
| tb_mmm_top_sizes      | l = 3, 5 (v^5+v^2+1) and 163 (v^163+v^7+v^6+v^3+1) round trips and latency |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mmm_pkg.sv tb/mmm_ref_pkg.sv tb/tb_mmm_top.sv --top-module tb_mmm_top
    ./obj_dir/Vtb_mmm_top

Every test finishes in well under a second, including the full-size one.

## 9. Choices not fixed by the source

* The storage elements are called latches in the source but are used as one-cycle delays.
  Here they are positive-edge flip-flops with an asynchronous clear.
* t1, z and act travel through the D_t pairs together with t2 (section 4). `act` is an
  addition of this implementation.
* The last PE takes t2 one register earlier (section 4).
* The t2 instants are cycles 1 and l+1 of a PE's own phase count.
* The controller (a counter with decodes), the serialisation of C and F by indexing, the
  operand registers and the start/busy/done handshake are this implementation's own. The
  source gives only the waveforms the array needs.
* No overlap of consecutive operations. PE_1 is free after cycle 2l-1, so a pipelined
  controller could start the next operation before the current one drains. That was not
  attempted.

## Files

`rtl/`: `mmm_pkg` (control word type), `mmm_pe_first`, `mmm_pe_mid`, `mmm_pe_last`,
`mmm_ctrl_delay`, `mmm_out_unit`, `mmm_siso_array` (the array), `mmm_ctrl`, `mmm_top`.
`tb/`: the test benches above and `mmm_ref_pkg`.
