# A divider-based symmetric cipher on a Vedic 8-by-8 divider

This is synthesizable SystemVerilog for a small symmetric-key cipher whose only
real work is a division. A character `x` is bit-reversed to `n`, and `n` is
divided by the key `k`:

    n = q*k + r,    cipher word y = {r, q}   (8-bit remainder, 2-bit quotient)

Decryption multiplies back: `z = q*k + r` equals `n`, and reversing `z`'s bits
gives `x`. Each 8-bit character becomes a 10-bit cipher word.

The divider is not a restoring or non-restoring array. It is a "Vedic"
divider. A 2-by-2 divider gives a quotient estimate from the top halves of the
operands. A multiplier, a comparator and a subtractor then turn that estimate
into a remainder. There is at most one correction step. The 4-by-4 divider is
built this way around the 2-by-2 one, and the 8-by-8 divider the same way
around the 4-by-4 one. The original circuit was designed for quantum-dot
cellular automata (QCA), where every gate is a three-input majority gate or an
inverter. The RTL keeps that gate structure through a `maj3()` function. It is
ordinary synchronous logic, and nothing in it depends on QCA.

Worked example, key `k = 01010101` (85), string "Wiley":

| char | x        | n = reverse(x) | q  | r        | y = {r, q}   |
|------|----------|----------------|----|----------|--------------|
| W    | 01010111 | 11101010       | 10 | 01000000 | 0100000010   |
| i    | 01101001 | 10010110       | 01 | 01000001 | 0100000101   |
| l    | 01101100 | 00110110       | 00 | 00110110 | 0011011000   |
| e    | 01100101 | 10100110       | 01 | 01010001 | 0101000101   |
| y    | 01111001 | 10011110       | 01 | 01001001 | 0100100101   |

The concatenated cipher text is 50 bits long:
`01000000100100000101001101100001010001010100100101`.

## The Vedic division step

Split the dividend and divisor into halves of `h` bits: `A = {A2, A1}`,
`B = {B2, B1}`. One level of the divider (`vedic_div4` with h = 2,
`vedic_div8` with h = 4) does this:

1. Divide the high halves with the level below: `Q = A2 / B2`, `Rt = A2 mod B2`.
2. Append the low dividend half to that remainder: `C = {Rt, A1}`.
3. Multiply the estimate by the low divisor half: `D = Q * B1`.
4. If `C >= D`, the result is `Q` with remainder `C - D`.
5. Otherwise `Q` was one too large. Use `Q - 1`, form a new `C = {B2, A1}`
   and a new `D = (Q-1) * B1`, and the remainder is `C - D`.

Step 5 matches the exact identity (the new C should be
`{Rt + B2, A1}`) only when `Rt = 0`. At the 4-bit level that is always true
when C < D. At the 8-bit level it is not, and the RTL follows the rule exactly
as stated above.

Step 4 is why this is cheap. It needs no division wider than 2 by 2, only one
small multiplication and one subtraction. In hardware, both passes are computed
side by side. The comparator's `C < D` output then picks the quotient and
remainder:

```
          A2  B2                    B1
           |  |                      |
        [div level below]--Q------[mult]--D--+
           |                 |               |
           Rt--{Rt,A1}= C ---+-----[comparator: C<D]---+
                  |                                     |
                [sub C-D] ---- R1 ---------------[2:1 mux]--> R
                                                        |
           Q --[decrement]--Q-1--[mult with B1]--D'     |
           {B2,A1}=C' --------[sub C'-D']------- R2 ----+
           Q / Q-1 --------------------------------[2:1 mux]--> q
```

Two worked 4-by-4 cases:

* `1111 / 1010`: Q = 11/10 = 01, Rt = 01. C = 0111, D = 01 x 10 = 0010.
  Then C >= D, so the result is q = 01, r = 0101 (15 = 1*10 + 5).
* `1110 / 0101`: Q = 11/01 = 11, Rt = 00. C = 0010, D = 11 x 01 = 0011.
  C < D, so Q becomes 10, C' = {01, 10} = 0110 and D' = 10 x 01 = 0010, giving
  r = 0100 (14 = 2*5 + 4).

### Where the algorithm is exact

The quotient is always 2 bits, at both levels. There is only one correction
step. So the divider returns the true quotient and remainder only when the
true quotient is at most 3 and within one of the first estimate. Outside that
range the outputs are what the algorithm computes, and they are not a
division. Exhaustive simulation gives these counts:

| unit       | operand pairs with exact result            |
|------------|--------------------------------------------|
| vedic_div4 | 196 of 240 (divisor non-zero)              |
| vedic_div8 | 50277 of 65280 (divisor non-zero)          |
| cipher     | 152 keys divide every character exactly; 161 keys decrypt every character correctly |

Every key below 64 fails, because the quotient would need more than 2 bits.
The key of the worked example, `01010101`, is exact for all 256 characters.
**Pick a key from the exact set.** The exhaustive testbench marks every key
in its `key_roundtrip` and `key_exact` arrays and prints the size of each
set. A division by a zero top half (`B2 = 0`) gives quotient 0 and remainder 0 at the 2-by-2 level, so such
divisors are never exact.

The 8-by-8 divider needs the correction pass. For the character 'e' with key
85, the first pass gives C = 00000110 < D = 00001010. The correct q = 01,
r = 01010001 comes only from the corrected pass. A single-pass 8-bit level
would therefore break the worked example. That is why `vedic_div8` carries the
same correction hardware as `vedic_div4`.

## Blocks

```
crypto_top                 input register -> encrypt -> decrypt -> output register
├── encrypt_block          reverse bits, divide by key, pack {r, q}
│   └── vedic_div8         8-by-8 Vedic divider (2-bit q, 8-bit r)
│       ├── vedic_div4     4-by-4 Vedic divider (2-bit q, 4-bit r)
│       │   ├── div2x2     2-by-2 divider, majority-gate equations
│       │   ├── mult2x2    2-by-2 multiplier (2 x half_adder)
│       │   ├── comparator #(4)
│       │   ├── subtractor #(4) x2
│       │   └── decrementer (subtractor #(2))
│       ├── mult_nx2 #(4) x2   4-by-2 multiplier (ripple_adder #(6))
│       ├── comparator #(8)
│       ├── subtractor #(8) x2
│       └── decrementer
└── decrypt_block          z = q*k + r, reverse bits
    ├── mult_nx2 #(8)      8-by-2 multiplier
    └── ripple_adder #(8)
```

`vedic_pkg` holds the widths (`MSG_W = 8`, `Q_W = 2`, `CIPHER_W = 10`), the
majority function `maj3()` and `reverse_bits()`.

### Gate-level pieces

* **div2x2**: `q1 = a1 b0 ~b1`, `q0 = a0 b0 ~b1 + a1 b1 (a0 + ~b0)`,
  `r1 = a1 ~a0 b1 b0`, `r0 = a0 b1 (~a1 + ~b0)`. Each AND is a majority gate
  with one input at 0, and each OR has one input at 1. Division by 00 gives
  00 r 00.
* **half_adder**: `carry = M(a,b,0)`, `sum = M(M(a,b,1), ~carry, 0)`.
* **full_adder**: `carry = M(a,b,c)`, `sum = M(~carry, c, M(a,b,~c))`. This is
  three majority gates and two inverters.
* **subtractor**: a ripple chain of full adders computing `a + ~b + 1`. The
  final carry is the "no borrow" (a >= b) flag.
* **comparator**: 2-bit slices. Each slice computes `X = M(a1,~b1,a0)` and
  `Y = M(a1,~b1,~b0)`. Then `a>b = M(X,Y,0)` and `a>=b = M(X,Y,1)`. Slices are
  merged from the most significant one down with `gt = M(gt_hi, ge_hi, gt_lo)`
  and `ge = M(gt_hi, ge_hi, ge_lo)`. Equality is `ge & ~gt`. The width must be
  even.
* **decrementer**: a 2-bit subtractor with constant 1. 00 wraps to 11.
* **mult_nx2**: `a & b0` plus `(a & b1) << 1`, added by a ripple adder.

## Top level: `crypto_top`

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1  | clock |
| `rst_n`      | in  | 1  | asynchronous active-low reset, clears all registers |
| `in_valid`   | in  | 1  | `msg_in` and `key` hold an operation this cycle |
| `msg_in`     | in  | 8  | plaintext character x |
| `key`        | in  | 8  | key k |
| `out_valid`  | out | 1  | the outputs below are valid |
| `cipher_out` | out | 10 | y = {r, q} |
| `q_out`      | out | 2  | quotient |
| `r_out`      | out | 8  | remainder |
| `msg_out`    | out | 8  | the character recovered by decrypting `cipher_out` with the same key |

Timing: each result appears exactly **two cycles** after its `in_valid`. One
operation can be issued every cycle, with no stalls and no back-pressure. The
combinational path between the two register stages runs through the whole
8-by-8 divider and the decryption multiplier and adder. If it is too long for
your clock, add pipeline registers at the divider levels; nothing in the
algorithm prevents that.

The decryption block is wired to the encryption block's own q and r, so
`msg_out == msg_in` shows that the pair works. To use the decryption side on
its own, instantiate `decrypt_block`. It takes the 10-bit cipher word
(`r = y[9:2]`, `q = y[1:0]`) and the key.

## Choices made in this RTL

These points are not fixed by the original design. Each one was decided here:

* **Clocking.** The original is a QCA circuit with four-phase clock zones. Its
  latencies are quoted in QCA clock cycles (about 14 for the 4-bit divider,
  17.5 for the 8-bit divider, 20.75 for the whole cipher). Those figures mean
  nothing for CMOS. Here the datapath is combinational, with one input and one
  output register stage.
* **8-bit correction pass.** It is included, as explained above, so that the
  published cipher words are reproduced.
* **Corrected C is `{B2, A1}`** as the algorithm states, not the
  mathematically exact `{Rt + B2, A1}`. Using the exact form for `c2` in
  both `vedic_div4.sv` and `vedic_div8.sv` raises the 8-by-8 divider's exact
  pairs from 50277 to 50656. It does not change any result for key 85.
* **Quotient selection** is a 2:1 multiplexer on the comparator's `C < D`.
  The remainder uses the same select.
* **Multiplier structures.** The 4-by-2 multiplier of the 8-bit level and the
  decryption multiplier are shift-and-add arrays. Only their names were given.
  The decryption multiplier was described as a 4-bit one, but `q*k` multiplies
  a 2-bit quotient by an 8-bit key, so here it is 8-by-2. Decryption keeps the
  low 8 bits of `q*k + r`.
* **Comparator equality and the `r0` term of div2x2.** Both are the readings
  that give correct results: equality is `~lt & ~gt`, and `r0` uses an OR in
  its bracket.
* **Reset.** Asynchronous and active low.

Not built: the QCA cell layout, clock zones and the five-input majority gate.
These are technology, not logic. The original also mentions that the block
cipher could become a stream cipher with a key-feedback generator, but gives no
design for it, so none is built.

## Verification

Each module has a self-checking testbench in `tb/` named `tb_<module>.sv`. It
compares against integer arithmetic or against an integer model of the
algorithm in `tb/vedic_ref_pkg.sv`. That model is written from the algorithm's
steps with `/`, `%`, `*` and `-`, not from the gates. Every testbench prints
`TB_RESULT checks=N failures=M`.

* Leaf blocks (`full_adder`, `half_adder`, `div2x2`, `mult2x2`, `decrementer`,
  `comparator` 4 and 8 bits, `subtractor` 4 and 8 bits, `ripple_adder`,
  `mult_nx2` 4 and 8 bits) are tested exhaustively.
* `tb_vedic_div4` covers all 256 operand pairs against the model, plus the 196
  exact pairs and both worked examples against true division.
* `tb_vedic_div8` covers all 65536 pairs against the model, every dividend with
  key 85 against true division, and the five table rows.
* `tb_encrypt_block` and `tb_decrypt_block` check the "Wiley" cipher words in
  both directions, plus all characters and cipher words.
* `tb_crypto_top` is end to end at default sizes. It runs "Wiley", all 256
  characters with key 85, and 3000 random character/key pairs with random idle
  gaps. It checks every result and its 2-cycle latency. It also requires that
  the first-pass cases C > D, C = D and C < D (correction) each occur.
* `tb_crypto_exhaustive` runs all 65536 character/key pairs through the top.
  It counts the keys that decrypt every character correctly (161) and the keys
  that divide every character exactly (152).

The divider assertions check that the comparator outputs are one-hot.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vedic_pkg.sv tb/vedic_ref_pkg.sv tb/tb_crypto_top.sv \
    --top-module tb_crypto_top -Mdir obj_top
./obj_top/Vtb_crypto_top
```

Replace `crypto_top` with any module name to run its testbench. Every run
takes well under a second.
