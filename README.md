# Carry-save Montgomery modular multiplier with iteration skipping

Public-key cryptography spends most of its time on modular multiplication of
large numbers, typically 160 to 2048 bits. Montgomery's method avoids division.
It adds, bit by bit, A_i·B and (when needed) N into an accumulator, and halves
the accumulator after every addition. The cost lies in the additions. A
1024-bit adder either ripples its carries through 1024 positions or is large.

This design keeps the accumulator in **carry-save form**: a pair of words
(SS, SC) whose sum is the value. One row of full adders then adds a third
operand without any carry propagation. Its delay does not depend on the word
width. The multiplier has only one such adder row, and it does three jobs:

1. It precomputes `D = B + N`. Each iteration then adds a single operand
   (0, N, B or D) instead of two.
2. It runs the K+2 Montgomery iterations.
3. It converts the carry-save result back to an ordinary binary number.

Two refinements make this cheap in clock cycles.

- **The adder row is configurable.** In one mode it is an ordinary full-adder
  row (three inputs). In the other it acts as two half-adder rows in series
  (two inputs). That second mode moves carries two places per clock, which
  halves the cycles of jobs 1 and 3.
- **A skip detector** spots iterations that would add zero to an even
  accumulator. The design skips them by shifting one place further. Over a
  product, about as many cycles are saved this way as jobs 1 and 3 cost.

The clock period is set by one 4-way operand selection plus one full adder.

## What is computed

For an odd K-bit modulus N and operands 0 ≤ A, B < 2N the multiplier returns

    S = A · B · 2^-(K+2)  mod N,   with 0 ≤ S < 2N.

The result is *not* fully reduced. Running K+2 iterations instead of K keeps
S below 2N without a final comparison and subtraction. S can therefore be fed
straight back as an operand, as in modular exponentiation. To leave the
Montgomery domain, multiply by 1 and subtract N once if the result is still ≥ N.

The iteration is the radix-2 recurrence

    q_i = (S_i + A_i·B) mod 2
    S_{i+1} = (S_i + A_i·B + q_i·N) / 2,      i = 0 … K+1,

where S is held as (SS, SC). The added operand is
x = {0, N, B, D}[A_i, q_i].

## Datapath (`scs_mm_new`)

```
            +-----+   x   +---------------------+  sum, carry   (/2 in loop,
 A^,q^ ---->| SM3 |------>|                     |-------------> realigned in
 B,N,D ---->+-----+       |  CCSA, K+2 cfa cells|               2H passes)
                          |  alpha = mode       |                  |
 SS reg -->[M1 >>skip]--->|                     |                  v
 SC reg -->[M2 >>skip]--->+---------------------+            SS, SC regs
 SS[3:0] ->[M4]--+                                                  |
 SC[3:0] ->[M5]--+--> Skip_D --> skip, q^, A^ flip-flops            |
 x[2:0] ---------+        ^                                         |
 A shift reg (A(i+1), A(i+2)), B0                          Zero_D(SC) --> control
```

- **Registers.** SS and SC (K+2 bits), B, N, D, a shift register for A, the
  flip-flops skip, q^ and A^, and the output register s.
- **`ccsa` / `cfa`.** The configurable adder row (see the next section). Its
  output always satisfies `inputs = sum + 2·carry`.
- **`sm3`.** Selects x from the stored bits (A^, q^). One choice is zero, so it
  is an AND-OR of three words. The select bits come straight from flip-flops,
  so no decision logic lies in front of the selector.
- **`shift_mux`.** Used as M1 and M2 (full width) and as M4 and M5 (3 bits).
  When the previous cycle decided to skip, it shifts the register words one
  more place. M4 and M5 do the same for the three low bits that feed the skip
  detector, so the detector does not wait for the wide multiplexers.
- **`zero_d`.** A NOR over SC. It reports when a carry-save pair has become a
  plain binary number.
- **Register update.**
  - In an iteration, the registers take `(sum >> 1, carry)`. Sum bit 0 is
    always 0 because q makes the total even, and an assertion checks this.
  - In a half-adder pass, they take `(sum, carry << 1)`: the value is kept and
    only the representation changes.

## The configurable adder cell

Each `cfa` cell takes the SS and SC bits of its column, a and b, and computes
`t = a ^ b`.

| alpha | third input | sum | carry | acts as |
|-------|-------------|-----|-------|---------|
| 1 | x_j | t ^ x_j | t ? x_j : a | one full adder (1F_CSA) |
| 0 | c1_{j-1} = a_{j-1} & b_{j-1}, from the cell below | t ^ c1_{j-1} | t & c1_{j-1} | second of two half adders (2H_CSA) |

In half-adder mode the first half adder of column j (t, and a&b) feeds the
second half adder of column j+1. One clock therefore does two carry-save
additions of SS and SC, and every carry moves two places. Repeating this until
SC = 0 turns a carry-save pair into binary. That takes about half the length of
the longest carry chain, in cycles: at most about K/2 for a K-bit word.

## Skipping iterations (the subtle part)

Take an iteration with A_i = 0 and q_i = 0. Then x = 0. Since q_i = 0, the
total is even, so the low bits of SS and SC are equal. If both are 0, the
iteration only halves the pair, and shifting SS and SC right by one place gives
the same value. The skip detector `skip_d` finds such an iteration one cycle
ahead.

`skip_d` works during iteration i, in parallel with the wide adder. It looks
at the three low bits of SS[i], SC[i] and x. Those bits give the two low
columns of the *next* state:

    SS[i+1]_0 = sum_1, SC[i+1]_0 = carry_0
    SS[i+1]_1 = sum_2, SC[i+1]_1 = carry_1

From these it computes

    q(i+1)    = SS[i+1]_0 ^ SC[i+1]_0 ^ (A(i+1) & B_0)
    skip(i+1) = ~(A(i+1) | q(i+1) | SS[i+1]_0)
    q(i+2)    = SS[i+1]_1 ^ SC[i+1]_1 ^ (A(i+2) & B_0)

and stores in flip-flops:

- the skip bit;
- q^ and A^: (q(i+2), A(i+2)) on a skip, (q(i+1), A(i+1)) otherwise.

In the next cycle, M1 and M2 apply the extra shift and SM3 selects x from q^
and A^. Skipping therefore adds nothing to the clock period: the detector is a
few gates on 3-bit values, and its results are registered.

Details worth knowing when changing the code:

- The A shift register moves by 1, or by 2 after a skip, so that `a_sr[0]` is
  always A(i+1) and `a_sr[1]` is A(i+2).
- Iteration K+1 may be skipped (decided in iteration K). The shift it still
  owes is applied by M1/M2 in the first conversion cycle. That is why the
  conversion ends only when SC = 0 *and* no skip is pending.
- Skipping is disabled in iteration K+1, because there is no iteration K+2.
- Iteration 0 is never skipped. D is stored and the accumulator cleared in the
  same cycle that loads q^ = A_0 & B_0 and A^ = A_0.

## Control and timing (`mm_ctrl`)

| state | per cycle | leaves when |
|-------|-----------|-------------|
| IDLE / DONE | on `start`: sample operands, SS = B, SC = N, clear skip, q^, A^ | start |
| PRE | one half-adder pass | SC = 0: store D, clear SS and SC, set up iteration 0 |
| LOOP | one iteration (full-adder mode); index += 1, or 2 on a skip | after iteration K+1 (or K when K+1 is skipped) |
| CONV | one half-adder pass | SC = 0 and no skip pending: copy SS to `s` |

`done` is high for the one cycle spent in DONE. A new `start` is accepted in
that same cycle.

**Latency.** The latency is data dependent. Counting clock edges after the
edge that samples `start`, done appears after:

    (B+N passes + 1) + (K+2 − skipped iterations) + (conversion passes + 1)

Measured at K = 1024 over 70 products (random, sparse-A and extreme operands):

| | cycles |
|---|---|
| mean | 1029 |
| precompute, average | 13 |
| iterations, average | 1003 |
| conversion, average | 12 |
| maximum | 1541 |

The maximum comes from the longest possible B+N carry chain (N = 2^K − 1,
B = 2N − 1), which needs about K/2 passes.

## Interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| start | in | 1 | one-cycle pulse while `busy` = 0; samples a, b, n |
| a, b | in | K+1 | operands, each < 2N |
| n | in | K | odd modulus |
| busy | out | 1 | multiplication in progress |
| done | out | 1 | one-cycle pulse; `s` valid from this cycle |
| s | out | K+1 | Montgomery product, < 2N, held until the next `done` |

Parameter `K` (default 1024) is the modulus width. SS, SC and D are K+2 bits.

## Where this RTL makes its own choices

The architecture follows the published SCS-MM-New multiplier:

- the configurable carry-save row;
- SM3;
- the skip detector and its equation;
- Zero_D;
- the M1/M2 and M4/M5 multiplexers;
- the repeated 2H_CSA passes for B+N and for the final conversion.

The following are choices of this implementation:

- **Gates of the CFA cell, SM3 and Skip_D.** The cells are written for
  function, not copied gate for gate. The skip detector derives q(i+1) and
  q(i+2) from the low sum and carry bits directly. Its gate count differs
  from the published figure of four XOR, three AND, one NOR and two
  multiplexers.
- **Where the halving happens.** The division by two of an iteration is done
  before the registers. M1/M2 only add the skip shift. Cycle counts and
  values are the same as doing both shifts at the multiplexers.
- **Handshake, reset and the output register.** These are not part of the
  published description.
- **Iteration 0 is never skipped.** The setup of the first iteration is not
  described in the source.
- **Operand range.** Operands are taken as K+1 bits and must be below 2N. This
  is the standard condition for K+2 iterations to give S < 2N.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

- `tb_cfa`: all 32 input combinations.
- `tb_ccsa`: random words in both modes, plus carry chains that must advance
  two places per pass.
- `tb_sm3`: all four selections with random words.
- `tb_skip_d`: all 8192 input combinations against a column-by-column
  arithmetic model.
- `tb_zero_d`, `tb_shift_mux`: directed and random words.
- `tb_mm_ctrl`: the controller against a stand-in datapath with random skips
  and random pass counts.
- `tb_scs_mm_new`: full size (K = 1024). It runs 70 products: corner cases,
  random operands, sparse multipliers, and chained products that feed results
  back in as operands.
- `tb_scs_mm_new_small`: the same checks at K = 8 over about 3000 products.

Both end-to-end testbenches check each result three ways:

- against a plain binary Montgomery recurrence (`tb/mm_ref_pkg.sv`);
- that S·2^(K+2) ≡ A·B (mod N);
- that S < 2N.

They also compare the exact cycle count with a word-level model of the
carry-save schedule. Finally, they count each mechanism (half-adder passes,
each of the four x choices, skips, a skip of the last iteration, conversion
passes) and fail if any never happened.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mm_pkg.sv tb/mm_ref_pkg.sv \
    tb/tb_scs_mm_new.sv --top-module tb_scs_mm_new
./obj_dir/Vtb_scs_mm_new
```

Swap in any other testbench name for a block test. The full-size run takes
about two seconds.

## Files

- `rtl/mm_pkg.sv`: the state encoding and the control strobe struct.
- `rtl/scs_mm_new.sv`: the top level (registers and wiring).
- `rtl/mm_ctrl.sv`: the control part.
- `rtl/ccsa.sv`, `rtl/cfa.sv`: the configurable carry-save adder row and its
  cell.
- `rtl/sm3.sv`, `rtl/skip_d.sv`, `rtl/zero_d.sv`, `rtl/shift_mux.sv`: the
  operand selector, skip detector, zero detector and skip multiplexers.
- `tb/`: one testbench per module, the two end-to-end testbenches, and the
  reference-model package.
