# Pos-Neg binary signed-digit multiplier for the RNS moduli {2^n-1, 2^n, 2^n+1}

This is a combinational multiplier for residue number system (RNS) arithmetic. An integer is
carried as its three residues modulo 2^n-1, 2^n and 2^n+1, and a product is formed by multiplying
the matching residues. Each channel is independent of the others. Inside a channel no carry
travels along the word. Every residue is held as n *binary signed digits* (BSD), each in
{-1, 0, 1}. The redundancy lets every addition absorb its carries one position away. The whole
multiplier is a single level of digit products followed by log2(n) levels of constant-delay
adders.

The default size is n = 8 (moduli 255, 256, 257, dynamic range 16 776 960). The same RTL has also
been simulated at n = 16.

## The Pos-Neg digit

Each digit is two bits of equal weight, `pos` and `neg` (struct `pn_digit_t` in
`rtl/posneg_pkg.sv`):

| pos neg | value |
|---------|-------|
| 0 0     | -1    |
| 0 1     | 0     |
| 1 0     | 0     |
| 1 1     | +1    |

The *posibit* `pos` counts +1 when set. The *negabit* `neg` stands for -1 when clear and 0 when
set. So a digit's value is `pos + neg - 1`. Three properties are used throughout:

* Swapping the two bits never changes the value.
* Inverting both bits negates the digit.
* The value of an n-digit word is (sum of all 2n bits, each at its digit's weight) - (2^n - 1).
  Adding digits is therefore just counting ones, and ordinary full adders can do it.

Words are packed arrays `pn_digit_t [N-1:0]` with digit 0 least significant. The bit order of a
word is `{d[N-1].pos, d[N-1].neg, ..., d[0].pos, d[0].neg}`.

Residues are **redundant**. An N-digit word can hold any value in [-(2^N-1), 2^N-1], and the
multiplier's output is only *congruent* to the product. For example, residue 3 mod 255 may come
out as 3 or as -252. It may also come out under many different digit patterns. Turning a result
into a canonical binary residue, and converting integers into and out of the residue system, are
outside this design.

## Modular addition without carry propagation (`posneg_cell`, `posneg_rns_adder`)

Each digit position is a 4:2 compressor made of two full adders:

```
 FA1:  x.pos + x.neg + y.pos          = u      + 2*d_i        (d_i goes to position i+1)
 FA2:  y.neg + d_{i-1} + u            = s.pos  + 2*s_{i+1}.neg (the negabit of the next digit)
```

FA2's carry-in comes from FA1 of the position below, never from another FA2. So no signal crosses
more than one position, and an addition of any width takes two full-adder delays. The output digit
i is `{s_i.pos, s_i.neg}`. Its negabit is produced by position i-1.

Two signals leave the top position: `d_{N-1}` and `s_N.neg`, both of weight 2^N. The modulus
decides what re-enters at position 0, as `d_{-1}` and `s_0.neg`:

| modulus | 2^N is congruent to | d_{-1}        | s_0.neg          |
|---------|---------------------|---------------|------------------|
| 2^N-1   | 1                   | d_{N-1}       | s_N.neg          |
| 2^N     | 0                   | 0             | 1 (a zero value) |
| 2^N+1   | -1                  | NOT d_{N-1}   | NOT s_N.neg      |

For 2^N+1, inverting the two bits does two things. It negates what wrapped round, and it adds
exactly the +2 that the -(2^N-1) offset of the encoding needs. To see this, write the sum as
`x + y + (2^N-1) + d_{-1} + s_0.neg - 2^N*(d_{N-1} + s_N.neg)`. Each row of the table makes this
congruent to x + y. For 2^N, the negabit of result digit 0 is always 1.

## Multiplication (`posneg_digit_mul`, `posneg_ppg`, `posneg_reduction_tree`, `posneg_rns_mul`)

**Digit products.** A product of two digits is again a digit, so there is no carry:

* A zero operand passes its own encoding through (x is checked first).
* Otherwise the result is `11` when the signs agree and `00` when they differ.

**Partial products with modular rotation.** Row i is `y_i * X * 2^i` modulo the modulus. Shifting
X left by i pushes its top i digits past position N-1. Because 2^N is congruent to 1, 0 or -1,
those digits come back into the bottom i positions:

* unchanged for 2^N-1, which makes the row a cyclic rotation of X;
* as zero digits for 2^N;
* with their sign inverted for 2^N+1.

So digit k of row i is `y_i*x_{k-i}` for k >= i. For k < i it is `(+1, 0 or -1) * y_i*x_{N-i+k}`.
The rotation is pure wiring, and all N rows are N digits wide.

**Reduction tree.** The N rows are added in pairs, (0,1), (2,3), and so on, by `posneg_rns_adder`
instances. The pair sums are then added in pairs again, until one row remains. For N = 8 that is
4 + 2 + 1 adders in three levels. Every level costs the same two full-adder delays. The critical
path is therefore one digit product plus 2*ceil(log2 N) full adders, however wide the word is.

**Channels.** `bsd_rns_mul` holds three `posneg_rns_mul` instances, one per modulus. They differ
only in the `MODULUS` parameter.

## Files and hierarchy

```
bsd_rns_mul                      top: three channels
└─ posneg_rns_mul (x3)           one modulus
   ├─ posneg_ppg                 N x N digit products + rotation
   │  └─ posneg_digit_mul        one digit product
   └─ posneg_reduction_tree      log2(N) levels of adders
      └─ posneg_rns_adder        N-digit modular adder
         └─ posneg_cell          one position: 4:2 compressor
            └─ full_adder (x2)
posneg_pkg                       pn_digit_t, modulus_e, PN_ZERO, pn_negate()
```

Parameters:

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `bsd_rns_mul`, `posneg_rns_mul`, `posneg_ppg`, `posneg_reduction_tree`, `posneg_rns_adder` | `N` | 8 | digits per residue |
| all but the top | `MODULUS` | `MOD_2N_M1` | `MOD_2N_M1`, `MOD_2N` or `MOD_2N_P1` |
| `posneg_reduction_tree` | `ROWS` | `N` | number of rows added |

Top ports (all `pn_digit_t [N-1:0]`): `x_m1, y_m1, x_m, y_m, x_p1, y_p1` in; `p_m1, p_m, p_p1`
out. The suffixes `_m1`, `_m` and `_p1` stand for the moduli 2^N-1, 2^N and 2^N+1.

There is no clock, reset or register. The design is combinational from input to output. To
pipeline it, register between the levels of `posneg_reduction_tree`: each level has the same
delay.

## Where this design makes its own choices

* **Zero encoding.** Where a digit is forced to zero (rotation for 2^N), this design uses
  `pos=0, neg=1`.
* **Two zero operands.** When both digits of a digit product are zero, x's encoding is the one
  passed on.
* **Digit-product logic.** The gate equations come from the digit-product truth table. They are
  not a particular printed sum-of-products form.
* **Odd row counts.** The tree is defined for a power-of-two number of rows. For any other count,
  a row without a partner passes unchanged to the next level. N = 5 is tested.
* **Full adders.** These are plain XOR/majority adders.
* **Negabit position of digit 0 for 2^N+1.** The inverted `s_N.neg` is placed as the negabit of
  digit 0. Because a digit's two bits are interchangeable, the value is the same wherever it sits.

The size reported for this structure in 180 nm at n = 8 and 16 depends on a synthesis flow. This
RTL does not reproduce those numbers.

## Verification

Every testbench in `tb/` is self-checking. Each ends with one line,
`TB_RESULT checks=<n> failures=<n>`. The reference arithmetic is in `tb/tb_pn_pkg.sv`, written
separately from the RTL. It computes the integer value of a Pos-Neg word and makes random
redundant encodings of integers.

| testbench | what it covers |
|-----------|----------------|
| `tb_posneg_cell` | all 32 input combinations of one position, against the full-adder equations |
| `tb_posneg_digit_mul` | all 16 digit pairs: value and encoding |
| `tb_posneg_rns_adder` | the worked addition X=(1 -1 1 1), Y=(1 1 -1 0) at n=4, bit for bit in all three moduli (results 2, 1, 0); all 65 536 pairs at n=4; random pairs at n=8 |
| `tb_posneg_ppg` | every row's value and every digit, n=4 exhaustive and n=8 random, all moduli |
| `tb_posneg_reduction_tree` | 8x8 and 5x5 trees (the 5x5 tree uses pass-through), random rows |
| `tb_posneg_rns_mul` | n=4 exhaustive, n=5 and n=8 random, all moduli |
| `tb_bsd_rns_mul` | the top at its defaults (n=8), end to end: random signed integers in (-M/2, M/2], random redundant encodings and raw bit patterns; checks each channel and the Chinese-remainder reconstruction of A*B mod M; counts each mechanism (digit-product cases, negated rotation, carries wrapped, dropped and inverted) and fails if any never happened |
| `tb_bsd_rns_mul_n16` | the same end-to-end test with N = 16 |
| `tb_bsd_rns_mul_example` | N = 4 (moduli 15, 16, 17): A = 137 given as the residue encodings (01 11 00 01), (11 01 11 00), (01 10 11 00) is squared and rebuilt as 2449; then 137 * B for every B in (-2040, 2040] |

To run one with plain Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/posneg_pkg.sv tb/tb_pn_pkg.sv tb/tb_bsd_rns_mul.sv --top-module tb_bsd_rns_mul
./obj_dir/Vtb_bsd_rns_mul
```

Each testbench finishes in well under a second.

## Trust and limits

* The arithmetic is checked exhaustively at n = 4 and by random tests at n = 5, 8 and 16. The
  checks cover value congruence and, for the adder and the digit product, the exact bits.
* The outputs are redundant residues, as described above. Comparing them with plain integers needs
  a value conversion, as the testbenches do.
* The top channels are combinational. Timing, area and power depend on the synthesis flow and are
  not characterised here.
