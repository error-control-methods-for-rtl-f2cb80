# Fault-tolerant GF(2^4) multipliers on the all-one polynomial

A transient fault in a finite-field multiplier can do real damage. In
elliptic-curve and other public-key hardware, a single flipped product bit
can be enough for fault-based cryptanalysis to recover a key. This RTL
hardens a bit-parallel GF(2^4) multiplier against single soft errors in two
ways and puts the results side by side:

* **Triple modular redundancy (TMR).** Three copies of the multiplier feed
  majority voters. There are three voter arrangements: 1 voter, 4 voters and
  7 voters.
* **Parity prediction with Hamming correction.** A second, cheaper path
  predicts the check bits of a (7,4) Hamming code for the product. A
  mismatch locates a wrong product bit, and the design flips it back.

The multiplier at the centre uses the irreducible *all-one polynomial* (AOP)
f(x) = 1 + x + x^2 + x^3 + x^4. Its reduction is almost free.

Everything is combinational. There are no clocks, registers or resets, so
every output is valid one logic delay after the operands settle.

## 1. Multiplying modulo an all-one polynomial

Let alpha be a root of f. Multiplying f(alpha) = 0 by (alpha + 1) gives
alpha^(m+1) = 1. The powers of alpha are therefore cyclic with period m+1.
`aop_gf_mult` uses this in two steps:

1. It forms the product as a cyclic convolution over the m+1 "extended"
   coefficients:
   `C_k = XOR over all i+j = k (mod m+1) of a_i & b_j`, for k = 0..m.
2. It folds the extra coefficient back, using alpha^m = 1 + alpha + ... + alpha^(m-1):
   `c_k = C_k ^ C_m`, for k = 0..m-1.

For m = 4 the result is as follows. Here d0..d3 and e0..e2 are the
coefficients of x^0..x^6 in the plain polynomial product:

    c[0] = d0 ^ e0 ^ e1      c[1] = d1 ^ e0 ^ e2
    c[2] = d2 ^ e0           c[3] = d3 ^ e0

The AOP of degree m is irreducible only when m+1 is prime and 2 is a
primitive root modulo m+1. Below 101 that means m = 2, 4, 10, 12, 18, 28, 36,
52, 58, 60, 66, 82 and 100. `aop_gf_mult` takes any M. It checks the rule
while elaborating and stops with an error otherwise. The function that
applies the rule, `aop_irreducible`, is in `gf_aop_pkg`.

## 2. TMR: three copies and their voters

`maj_voter` takes the bitwise majority `x&y | y&z | x&z`. This is the
carry function of a full adder. The three TMR variants differ only in how
many voters they have and how those voters are stacked:

| Module            | Voters | Structure                                                  | Single fault that still reaches the output |
|-------------------|--------|------------------------------------------------------------|--------------------------------------------|
| `tmr_one_voter`   | 1      | copies -> V                                                | the voter V                                |
| `tmr_four_voter`  | 4      | copies -> V1, V2, V3 (each votes all copies) -> Va         | the final voter Va                         |
| `tmr_seven_voter` | 7      | copies -> V1..V3 -> Va, Vb, Vc (each votes V1..V3) -> Vf   | the final voter Vf                         |

Any fault confined to one multiplier copy is masked in all three. Faults
in two copies that hit the same bit are not masked. The testbenches check
both cases. TMR detects nothing and reports nothing: it has no way to say
which copy failed.

The original description says the seven-voter version masks an error in
"any one" voter. That holds for every voter except the last one, Vf. Like
the final voter of the other variants, Vf feeds the output directly. The
RTL follows the structure, and the tests show a fault in Vf reaching the
output.

## 3. Parity prediction and Hamming correction

This is the subtle part of the design. `aop_mult_hamming` connects it as
follows:

    a,b ─┬─> aop_gf_mult ──> c_raw ──┬──────────────────────────────> XOR ─> c
         │                           └─> gf_parity_gen ─> p' ─┐       ^
         └─> parity_predictor ──────────────────────────> p ──┴─> hamming_block ─> h
             (poly_mult + check-bit equations)                     (syndrome, decode)

**The code.** The four product bits are the data bits of a (7,4) Hamming
code. They are taken in this order:
c1 = c[0], c2 = c[2], c3 = c[1], c4 = c[3].
The three checks are

    p0' = c1 ^ c3 ^ c4      p1' = c1 ^ c2 ^ c4      p2' = c2 ^ c3 ^ c4

`gf_parity_gen` computes them from the multiplier's actual output.

**The prediction.** `parity_predictor` never builds the reduced product.
It multiplies the operands as plain polynomials (`poly_mult`) and writes
each check as "overall parity of the product minus one data bit". The
overall parity of c[0..3] is `ps = d0^d1^d2^d3^e1^e2`. e0 drops out
because it appears in all four product bits. The checks are then

    p0 = ps ^ d2 ^ e0        (removes c2 = c[2])
    p1 = ps ^ d1 ^ e0 ^ e2   (removes c3 = c[1])
    p2 = ps ^ d0 ^ e0 ^ e1   (removes c1 = c[0])

The predictor runs in parallel with the multiplier, so it adds no delay to
the product itself.

**Decoding.** `hamming_block` forms the syndrome s = p ^ p' and decodes it:

| syndrome {s2,s1,s0} | meaning                  | action          |
|---------------------|--------------------------|-----------------|
| 000                 | no error                 | none            |
| 001, 010, 100       | a check bit is wrong     | none (err = 1)  |
| 011                 | c1 = c[0] is wrong       | flip c[0]       |
| 101                 | c3 = c[1] is wrong       | flip c[1]       |
| 110                 | c2 = c[2] is wrong       | flip c[2]       |
| 111                 | c4 = c[3] is wrong       | flip c[3]       |

Each data bit is covered by at least two checks. A syndrome with a single 1
therefore always points at the prediction path, and it never causes a
miscorrection. `err` flags any non-zero syndrome.

**Limits.** The design corrects one wrong product bit. Two or more wrong
product bits, or a wrong product bit together with a wrong check bit, are
beyond a distance-3 code and may be miscorrected. A fault inside the
shared operands is invisible to both paths.

## 4. Departures from the original description

* **Predicted parity.** The published equations for the overall parity
  include e0. The published p2 leaves e0 out. Taken literally, they predict
  the wrong check bits for 112 of the 256 operand pairs. Both are corrected
  here so that the prediction agrees with the AOP reduction in section 1.
  The equations for p0, p1 and p0'..p2' are used unchanged.
* **Bit order.** The order c1 = c[0], c2 = c[2], c3 = c[1], c4 = c[3] is
  the only one under which those unchanged equations agree with the
  reduction.
* **Decoder terms.** The terms for c3 and c4 are the published ones. The
  published terms for c1 and c2 are not used. One of them decodes a
  check-bit error and the other repeats the c3 term. The RTL uses the terms
  that the check equations imply (table above).
* **Fault-injection inputs.** Every protected module has XOR masks on its
  multiplier copies, its voters and its check bits. These are a test hook
  of this design, not part of the published scheme. Tie them to zero in
  use. Each is one XOR gate per bit.
* **Error flag.** The `err` output is added. The published scheme only
  says that a non-zero syndrome means an error.
* **One top.** The published scheme builds and measures each variant as
  its own design. `aop_error_control_top` places the four protected
  variants on shared operands so that they build and test together. For
  any one of them, use its module on its own.
* **Size.** The TMR modules and `aop_gf_mult` are generic in M. The
  Hamming path exists only for 4-bit operands, so the top must keep M = 4.

## 5. Published cost figures

On an FPGA, for 4-bit operands, the original work reports these figures.
This RTL has not been measured against them.

| Variant              | Gate count | Power (mW) | Delay (ns) |
|----------------------|-----------:|-----------:|-----------:|
| unprotected AOP      | 84         | 96         | 12.3       |
| TMR, 1 voter         | 234        | 101        | 12.326     |
| TMR, 4 voters        | 732        | 116        | 13.807     |
| TMR, 7 voters        | 2,226      | 162        | 18.755     |
| parity prediction    | 207        | 99         | 16.183     |

The trade-off:

* Parity prediction costs less area and power than any TMR variant.
* It adds delay, because the syndrome decode and the correcting XOR sit
  after the multiplier.
* TMR with few voters is nearly as fast as the bare multiplier.

## 6. Files

| File | Contents |
|------|----------|
| `rtl/gf_aop_pkg.sv` | field size, Hamming widths, `gf4_t`/`ham_chk_t`, AOP irreducibility function |
| `rtl/aop_gf_mult.sv` | AOP multiplier, generic M |
| `rtl/maj_voter.sv` | bitwise majority voter |
| `rtl/tmr_one_voter.sv`, `rtl/tmr_four_voter.sv`, `rtl/tmr_seven_voter.sv` | the three TMR variants |
| `rtl/poly_mult.sv` | unreduced GF(2)[x] product |
| `rtl/parity_predictor.sv` | predicted check bits from the operands |
| `rtl/gf_parity_gen.sv` | check bits of the actual product |
| `rtl/hamming_block.sv` | syndrome, error flag, correction vector |
| `rtl/aop_mult_hamming.sv` | the complete parity-prediction multiplier |
| `rtl/aop_error_control_top.sv` | all four protected variants side by side |
| `tb/gf_ref_pkg.sv` | reference models for the testbenches |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## 7. Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and exits. Take the
top-level run as an example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/gf_aop_pkg.sv tb/gf_ref_pkg.sv tb/aop_error_control_top_tb.sv \
      --top-module aop_error_control_top_tb -o sim
    ./obj_dir/sim

To run another module's test, substitute `<module>_tb`. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/gf_aop_pkg.sv rtl/<module>.sv`.

## 8. What the tests establish

* The reference multiplier in `gf_ref_pkg` uses shift-and-add with
  reduction after every shift. It shares no code or method with the RTL's
  convolution.
* `aop_gf_mult` is tested as follows:
  * M = 4 and M = 2: every operand pair.
  * M = 10 and M = 12: 500 random pairs each.
* Each TMR testbench runs all 256 operand pairs, each with:
  * no fault;
  * a random fault in each copy (must be masked);
  * a random fault in each voter (masked, except the final voter, whose
    fault must appear at the output);
  * a double-copy fault (must appear at the output).
* The Hamming testbenches compare against the column form of the check
  matrix, not the RTL's row equations.
  * Every single product-bit fault must be corrected, with the right
    syndrome.
  * Every single check-bit fault must be flagged and must leave the product
    alone.
* The top-level testbench runs at the default size. Over all 256 pairs it
  exercises every one of these mechanisms, counts how often each acted, and
  fails if any never did:
  * copy masking;
  * first-level and second-level voter masking;
  * final-voter exposure;
  * product-bit correction;
  * check-bit flagging.
* Every testbench has been shown to fail on a deliberately broken copy of
  its module.

Not covered:

* Timing, area and power.
* Multi-bit faults in the Hamming path, where miscorrection is expected.
