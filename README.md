# Three-stage pipelined redundant-representation GF(2^m) multiplier

Elliptic-curve scalar multiplication over binary fields GF(2^m) spends almost
all of its time in field multiplications. With projective coordinates, one
point doubling takes 5 to 7 multiplications and one point addition takes 14
to 16, and kP needs about m doublings and m/2 additions. A common way to go
faster is to use several multipliers in parallel. This design uses a single
bit-serial multiplier instead, and pipelines it.

The multiplier works in a redundant, permuted normal-basis representation.
It yields one product coefficient per clock. Each coefficient is the parity of
m AND terms, so the combinational path is one AND gate followed by
1 + log2(m) levels of XOR gates. That is nine XOR levels for 129 <= m <= 256.
Two pipeline registers cut this path into three stages of at most three XOR
levels each. In a unit-gate model (AND = 1 gate delay, XOR = 2) the clock
period drops from 19 to 7 gate delays at m = 256. Only 72 register bits are
added: 64 after the first stage and 8 after the second.

The RTL is parameterised by the field size `M` (default 256). It contains:

* the multiplier (`pipelined_wu_multiplier`) and its parts;
* a double-and-add sequencer for kP (`binary_scalar_mult_ctrl`);
* a top level (`ecsm_pipelined_top`) that places the two side by side.

## The representation and the product rule

Let n = 2m + 1 and let beta be a primitive n-th root of unity. Field elements
are written in the basis c_i = beta^i + beta^-i, for i = 1..m. When a type-II
optimal normal basis exists, this basis is just a reordering of it. Since
c_i c_j = c_{i+j} + c_{i-j}, the product C = A*B has the coefficients

    C_k = sum_{i=1..m} a_i * (b_{k-i} + b_{k+i})          (over GF(2))

Indices are taken modulo n and folded into 0..m with b_{-j} = b_j, and
b_0 = 0. This needs no reduction polynomial. A convenient equivalent view,
used by the testbenches as their reference: map each operand to the
palindromic polynomial sum a_i (x^i + x^(n-i)), multiply modulo x^n - 1, and
read C_k as the coefficient of x^k. In this basis the unit element is the
all-ones vector, and squaring is the permutation a_i -> position 2i (folded).

A bit i-1 of every vector port holds coefficient i.

**m = 256 is not a field.** This basis exists only when n = 2m + 1 is prime and
2 has a suitable order modulo n. For m = 256, n = 513 = 27 x 19, which is not
prime. The RTL then computes exactly the rule above in the ring
GF(2)[x]/(x^513 - 1), restricted to palindromic elements. Gate count and
timing are those of the field case, but the result is not a field
multiplication. For cryptographic use, pick an M with such a basis, for
example M = 233 (n = 467). The hardware works unchanged for any M >= 2.

## The operand ring (`wu_b_ring`)

Operand B is stored as its whole palindromic sequence s_0..s_{2m}, where
s_0 = 0, s_j = b_j and s_{n-j} = b_j. That takes 2m + 1 one-bit cells, wired
as one circular shift register and drawn as two columns plus one extra cell:

```
          +-----[ cell 2m : b1 ]<-----------+
          v                                 |
  cell 0    [ b0      ]--XOR--[ b2      ]  cell 2m-1     row 1 -> d_1
  cell 1    [ b1      ]--XOR--[ b3      ]  cell 2m-2     row 2 -> d_2
   ...                  ...                  ...
  cell m-2  [ b(m-2)  ]--XOR--[ b(m)    ]  cell m+1      row m-1
  cell m-1  [ b(m-1)  ]--XOR--[ b(m+1)=b(m) ] cell m     row m   -> d_m
          |                                 ^
          +---------------------------------+
```

At every clock, cell p passes its bit to cell p+1 (mod n). Row i XORs left
cell i-1 with right cell 2m-i. Directly after loading, row i gives
b_{i-1} + b_{i+1}, the B-factor of a_i in C_1. Each rotation advances k by
one. After t shifts, row i gives b_{k-i} + b_{k+i} with k = t + 1. The
palindrome takes care of the folding of the indices. This is why the right
column holds b_m twice: b_{m+1} = b_m.

`load` copies a new operand into all cells in one clock, and has priority over
`shift`.

## The XOR tree and its pipeline split

| stage | logic | outputs (m = 256) | outputs (general) |
|---|---|---|---|
| 0 (`wu_stage0`) | ring XOR row, m AND gates (a_i & d_i), 2 tree levels | 64 | ceil(m/4) |
| register 0 (`stage_latch`) | | 64 bits + valid + last | |
| 1 (`xor_tree_levels`) | 3 tree levels | 8 | ceil(m/32) |
| register 1 (`stage_latch`) | | 8 bits + valid + last | |
| 2 (`xor_tree_levels`) | remaining levels (3 for 129 <= m <= 256) | 1 = C_k | 1 |

Stage 0 is the slowest stage: one AND plus three XORs. For m = 160 the
registers are 40 and 5 bits wide. The tree pairs neighbouring signals, and
missing inputs are zero when a width is not a power of two. In total there
are m AND gates and 2m - 1 useful XOR gates, the same as the unpipelined
structure.

## Control and timing (`pipelined_wu_multiplier`)

* **Operand handshake.** `a` and `b` are taken when `in_valid` and `in_ready`
  are both high. A is held in an m-bit register; B goes into the ring.
  While `in_valid` is high and `in_ready` low, the operands must not change
  (an assertion checks this).
* **One coefficient per clock.** A counter runs from 0 to m-1. Stage 0
  computes C_{cnt+1}, and the ring rotates after each coefficient.
* **Back-to-back products.** `in_ready` is high when the multiplier is idle,
  and also in the clock in which stage 0 computes C_m. Once C_m is in
  register 0, the next operands can already be in the ring. A steady stream
  therefore completes one product every m clocks, with no bubble.
* **Valid and last tags.** Each stage register carries a valid flag and a
  flag marking C_m. `product_collector` shifts the serial bits into a word
  (C_1 first, so that C_k ends in bit k-1). When C_m arrives, it copies the
  word into `out_p` and pulses `out_valid` for one clock.
* **Latency.** A product is registered in `out_p` m + 2 clocks after the
  clock edge that took its operands. That is m clocks of stage 0, two
  pipeline registers and the output register, less the overlap of the first
  clock.
* **Reset.** Synchronous and active low. It clears the control state, the
  ring, the tags and the output registers.

There is no back-pressure on the output. `out_p` holds its value until the
next product completes, which is at least m clocks later.

## Scalar multiplication sequencer (`binary_scalar_mult_ctrl`)

This block runs the most-significant-bit-first binary method for kP. It sets
Q <- P at the leading one of k. Then, for each lower bit, it doubles Q and,
if the bit is 1, adds P. It does not do any point arithmetic itself. It
issues commands `PT_COPY`, `PT_DOUBLE` and `PT_ADD` on a `cmd_valid`/`cmd_ready`
handshake, then waits for `op_done` before issuing the next command. The
leading one is found by scanning down from bit m-1, one clock per zero bit.
k = 0 finishes at once, with `infinity` set.

A k whose top bit is set needs (bit length - 1) doublings and (number of
ones - 1) additions. The sequencer issues exactly these, which the
testbenches check.

## Top level (`ecsm_pipelined_top`)

The point-addition and point-doubling datapath is not part of this RTL. In a
full processor it would sit between the sequencer and the multiplier. It would
take the sequencer's commands, run the coordinate-system formulas, and send
its field multiplications to the multiplier. The top therefore brings out both
interfaces: the multiplier's operand and product ports (`mul_*`) and the
sequencer's start and command ports (`ksm_*`, `pt_*`). Conversion between
ordinary normal-basis coordinates and this basis is a fixed bit permutation.
It exists only for M with a type-II basis, and it is left to the user. All
ports of the top take and return coordinates in the permuted basis.

## Own choices and departures from the published design

Taken from the published design:

* the (2m+1)-cell ring with its contents and shift direction;
* the AND row and the XOR tree;
* the split into three stages of one AND + three XOR levels, then three XOR
  levels, then three XOR levels;
* the 64- and 8-bit registers at m = 256;
* the double-and-add order of operations.

Choices of this implementation:

* The pipeline registers are edge-triggered flip-flops, where the source speaks
  of latches.
* The handshakes, the counter, the valid/last tags, the A register, the
  serial-to-parallel output register and the reset are new. The register
  overhead is therefore larger than the 72 bits counted for the tree alone.
  There are 4 tag bits, the output word and the collector, and the A register
  and counter (which any bit-serial multiplier needs).
* Stage 2 reduces whatever is left, so sizes above 256 still work, but with
  a deeper last stage.
* Scalars without a leading one at bit m-1, and k = 0, are handled.
* Point arithmetic and basis conversion are outside the RTL (see above).

## Files

| file | contents |
|---|---|
| `rtl/wu_mult_pkg.sv` | default size, stage-level constants, width helper, point command type |
| `rtl/wu_b_ring.sv` | operand-B ring with the row XORs |
| `rtl/wu_stage0.sv` | AND row and first two tree levels |
| `rtl/xor_tree_levels.sv` | group of balanced XOR levels (stages 1 and 2) |
| `rtl/stage_latch.sv` | pipeline register with valid/last tags |
| `rtl/product_collector.sv` | serial-to-parallel product register |
| `rtl/pipelined_wu_multiplier.sv` | the multiplier |
| `rtl/binary_scalar_mult_ctrl.sv` | double-and-add sequencer |
| `rtl/ecsm_pipelined_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_field_sizes.sv`, `tb/mult_size_check.sv`, `tb/field_table_check.sv` | multiplier at m = 5, 160, 180, 200, 220, 233; field properties at m = 5 |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=F` and stops. Each one
also has a watchdog that counts a failure if the run hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/wu_mult_pkg.sv tb/tb_ecsm_pipelined_top.sv --top-module tb_ecsm_pipelined_top
./obj_dir/Vtb_ecsm_pipelined_top
```

Replace the testbench name to run another one.

* `tb_ecsm_pipelined_top` runs the top at its default size (m = 256).
  * Multiplier side: 25 products, partly back to back and partly with gaps.
    It checks each product, the m + 2 latency, the m-clock spacing, A*1 = A,
    and the 64/8-bit register widths.
  * Sequencer side: five kP runs against a model that tracks Q as an integer
    multiple of P.
  * It counts each mechanism and requires each to occur at least once:
    accept from idle, accept back to back, operand held off, copy, double,
    add, scalar with leading zeros, k = 0, and point command held off.
  * It finishes in well under a second.
* `tb_field_sizes` runs the multiplier at the other evaluated key sizes
  (m = 160, 180, 200 and 220) and at m = 233, where the basis is a true
  normal basis. At m = 5 it also multiplies all 32 x 32 operand pairs. From
  that table it shows that the multiplier is a GF(2^5) field multiplier:
  * all-ones is the unit;
  * the product is commutative, associative and distributive;
  * there are no zero divisors;
  * every nonzero element has exactly one inverse;
  * the nonzero elements form a cyclic group of order 31.
* The unit testbenches check each part against its rule, written out
  independently.

The reference products use the cyclic-convolution rule, so they share no
structure with the ring and tree.
