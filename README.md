# Diffie-Hellman key agreement and AES-128 link hardware

Two systems that share no secret want to exchange a confidential message over
an open serial line. Each system carries the same three pieces of hardware,
driven by its own 32-bit processor:

* a **Diffie-Hellman unit** that computes `A^B mod P` on 128-bit numbers. With
  public `alpha` and `p`, system A computes `RA = alpha^a mod p` from its
  secret `a`, B computes `RB = alpha^b mod p`. They swap `RA` and `RB`, and each
  raises what it received to its own secret. Both end with the same
  `K = alpha^(ab) mod p`, which an eavesdropper seeing `alpha`, `p`, `RA` and `RB`
  cannot compute without solving a discrete logarithm;
* an **AES-128 encryption core**, used by the sender with `K` as the key;
* an **AES-128 decryption core**, used by the receiver with its own copy of `K`.

All three sit behind small word buffers because the processor bus is 32 bits
wide while every operand is 128 bits. `secure_comm_node` is the hardware of one
system. The processor software, the serial port and the link between the two
systems are not part of the RTL: the node's ports are where they connect.

The Diffie-Hellman unit is the unusual part. It uses no hardware multiplier
array. Products come from a **sequential, recursive Karatsuba multiplier**, and
reductions from a **subtract-only modulo unit**. Both are built on plain
ripple-carry adders under small state machines, which trades time for area.
Most of what follows is about that unit.

## Session, step by step

With `p = 2^127 - 1` and `alpha = 3`, as in the system testbench:

| step | node A | link | node B |
|---|---|---|---|
| 1 | write `alpha`, `a`, `p`; start; read `RA` | | write `alpha`, `b`, `p`; start; read `RB` |
| 2 | | `RA` ->, <- `RB` | |
| 3 | write `RB` as base; start; read `K` | | write `RA` as base; start; read `K` |
| 4 | write message block and `K` to the encryptor; start; read ciphertext | ciphertext -> | write ciphertext and `K` to the decryptor; start; read message |

Only the base has to be rewritten in step 3. The operand buffers keep the
exponent and modulus.

## The Diffie-Hellman unit

```
dh_peripheral
 ├─ in_buffer x3 (A, B, P)        32-bit words -> 128-bit operands
 ├─ a_over_b_mod_p                square-and-multiply state machine
 │   ├─ karatsuba_mult #(128)     256-bit product
 │   │   └─ karatsuba_mult #(64) ─ #(32) ─ #(16) ─ #(8) ─ kara4 ─ mult2
 │   │      (each level: one sub-multiplier + one ripple_carry_adder)
 │   └─ mod_p                     256-bit value mod 128-bit P
 └─ out_buffer                    128-bit C -> 32-bit words
```

### Square-and-multiply (`a_over_b_mod_p`)

The unit scans the exponent from bit 127 down to bit 0:

```
C = 1
for i = 127 downto 0:
    C = C*C mod P
    if B[i] == 1:  C = C*A mod P
```

It handles every bit, leading zeros included, so every exponentiation makes
128 squarings, each followed by a reduction, and each 1 bit adds one more
multiplication and reduction. The base `A` need not be below `P`: `C*A` is still below `2^256`.

The unit talks to its multiplier and to its modulo unit through the same
handshake. Each sub-unit is **held in reset except while the state machine
waits on it**. Entering the wait state releases reset and raises start. When
the sub-unit raises done, the result is taken and the state machine moves on,
which puts the sub-unit back in reset, ready for its next use. The modulo unit
samples the product on the same clock edge that resets the multiplier, so the
product needs no extra register.

### Sequential Karatsuba multiplier (`karatsuba_mult`, `kara4`, `mult2`)

Split `x = x1*2^m + x2` and `y = y1*2^m + y2` with `m = N/2`:

```
x*y = x1*y1*2^(2m) + ((x1+x2)*(y1+y2) - x1*y1 - x2*y2)*2^m + x2*y2
```

That is three half-size products instead of four. Each level of the tree has
**one** half-size multiplier, used three times in turn, and **one** `2N`-bit
ripple-carry adder, used for every addition and subtraction. A state machine
steps through them one operation per clock:

| state | operation |
|---|---|
| W1 | wait for `x1*y1` on the sub-multiplier |
| SX | `x1 + x2` on the adder |
| W2 | wait for `x2*y2` |
| SY | `y1 + y2` |
| W3 | wait for `sx*sy` (low `m` bits of the two half sums) |
| C1, C2, C3 | add the carry terms `cx*sy*2^m`, `cy*sx*2^m`, `cx*cy*2^(2m)` |
| D1, D2 | subtract `x1*y1` and `x2*y2`, giving the middle term |
| R1 | `{x1*y1, x2*y2} + middle*2^m`, raise done |

The half sums are `m+1` bits wide, but the sub-multiplier takes `m` bits. The
design writes `x1+x2 = cx*2^m + sx` and `y1+y2 = cy*2^m + sy` and rebuilds the
full middle product with the three carry corrections (C1..C3). These cost three
adder clocks per level and need no wider sub-multiplier.

`kara4` is the same sequence at 4 bits. Its sub-multiplier is the combinational
`mult2`, so its multiply states take one clock each and it has no wait states.
`karatsuba_mult` recurses on itself down to `N = 8`, where it instantiates
`kara4`.

**Latency.** A product takes `T(N) = 3*T(N/2) + 12` clock edges, counted from
the edge that samples start to the edge that sets done, with `T(4) = 12`:

| N | 4 | 8 | 16 | 32 | 64 | 128 |
|---|---|---|---|---|---|---|
| clocks | 12 | 48 | 156 | 480 | 1452 | 4368 |

### Subtract-only modulo (`mod_p`)

`Y = X mod P` for a 256-bit `X` and a 128-bit `P`, with only a ripple-carry
adder used as a subtractor (`rem + ~d + 1`, whose carry out means
`rem >= d`). Subtracting `P` one at a time could take up to `2^128` clocks. The
unit therefore works with shifted copies of `P`:

1. **NORM**: shift `d = P` left one bit per clock while `2d <= X` and the top
   bit of `d` is clear.
2. **SUB**: each clock, subtract `d` from the remainder if it does not borrow,
   then halve `d`. Stop after the step with `d = P`.

The remainder is then the smallest non-negative value congruent to `X`. The
unit takes at most `2*256 + 3` clocks, and about 260 for a full-size product.
`P = 0` is not a valid modulus: the unit returns `X[127:0]`.

**Exponentiation time.** With this reduction time, a 128-bit exponentiation
takes 0.56 M clocks (exponent 0) to 1.14 M clocks (all ones), and about
0.9 M clocks for a random exponent. The example `670^5 mod 53 = 8` takes
568,664 clocks.

## The AES-128 cores

`cipher_serial_table` runs one round per clock. The S-box is a 256-entry
constant table. Round keys are generated on the fly by `aes_key_expand`, so no
round key is stored.

* start: `state = plaintext ^ key`.
* rounds 1..10, one per clock: SubBytes, ShiftRows, MixColumns (not in round
  10), then AddRoundKey with the round key computed in the same clock.
* `ready` pulses for one clock at the 10th edge after start. `ciphertext` holds
  its value until the next result.

`inv_cipher_serial_table` needs the round keys in reverse order. It first runs
the key schedule forward for 10 clocks to reach the last round key. It then
whitens the block, and runs 10 inverse rounds, each one clock:
InvShiftRows, InvSubBytes, AddRoundKey, then InvMixColumns (not in the last
round). Each round's key comes from running `aes_key_expand` **backwards**: the
four schedule equations are each invertible, so
`w3 = w3'^w2'`, `w2 = w2'^w1'`, `w1 = w1'^w0'` and
`w0 = w0' ^ SubWord(RotWord(w3)) ^ Rcon[i]`.
`ready` pulses at the 21st edge after start.

`crypto_pkg` holds the S-box, the inverse S-box and the GF(2^8) helpers. Each
S-box entry is the multiplicative inverse in GF(2^8), modulo
`x^8+x^4+x^3+x+1` with 0 mapped to 0, followed by the affine map with constant
`0x63`. The inverse table is its inverse permutation.

**Byte order.** A block is `[127:0]` with the first byte of the standard's byte
sequence in bits `[127:120]`. A hex literal therefore reads like the published
test vectors. Column `c` of the state is bits `[127-32c -: 32]`.

## Processor side: buffers and peripherals

* `in_buffer` takes the word on `data` at each **rising edge** of `en`, detected
  against `en` one clock earlier, and shifts it in at the bottom. After four
  writes, the first word written is in bits `[127:96]`. Holding `en` high
  takes only one word.
* `out_buffer` captures a result on `load`. Each rising edge of `en` then puts
  the next word on `data` one clock later, most significant word first. It
  wraps after the fourth word, so a result can be read again.
* `word_wr_t` (`crypto_pkg`) bundles one write: `en`, `sel`, `data`.

`dh_peripheral`:

* `sel` 0 writes A, 1 writes B, 2 writes P.
* Raise `start`, wait for `finish`, then read four words.
* Raise `reset` before the next computation: it clears the exponentiation unit
  but keeps the operand buffers.

`aes_peripheral #(DECRYPT)`:

* `sel` 0 writes the data block, 1 writes the key.
* Pulse `start` for one clock. `done` is set by the core's `ready` and cleared
  by the next `start`. Then read four words.
* `done` follows start by 11 clocks for encryption and 22 for decryption: the
  core's latency plus the flag register.

All resets are synchronous and active high: `rst` for a whole peripheral, and
`reset` for the arithmetic units, as their handshake uses it.

## What follows the source design and what does not

This RTL follows a published student design of the same system, with two
FPGA boards, a soft processor on each, and a serial link. What the RTL takes
from that design:

* the structure of the Diffie-Hellman unit: a Karatsuba multiplier built level
  by level, each level from one half-size multiplier and one ripple-carry
  adder under a state machine; a 2-bit schoolbook multiplier at the bottom; a
  modulo unit made of a state machine and an adder; square-and-multiply over
  both;
* the module and pin names of the multiplier (`A`, `B`, `C`, `clk`, `reset`,
  `start`, `done`), of the modulo unit (`X`, `Y`, `finish`) and of the
  exponentiation unit;
* the start/reset/done handshake, including resetting each sub-module after
  use;
* the 32-to-128-bit input buffers and the 128-to-32-bit output buffers, each
  stepping on a rising edge of an enable;
* the AES-128 round structure, and the AES modules' pin names.

What is this design's own:

* **Modulus as an input.** The exponentiation unit and the modulo unit take
  `P` as a 128-bit input. The source units show no modulus pin.
* **Key as an input.** The AES cores take the key as a 128-bit input, so that
  the agreed key can be used. The source cores show no key pin.
* **Modulo by shifted subtraction.** The source describes the modulo as
  subtracting until the minimum is reached. The shifted-subtraction walk
  bounds this at about 512 clocks.
* **Karatsuba details.** The carry-correction states, the state order and the
  `2N`-bit adder width are this design's own.
* **Binary exponent scan.** The exponent is scanned one bit at a time. The
  source names the 2^k-ary method but lists this binary form.
* **AES cores.** One round per clock, on-the-fly and backwards key schedules,
  the one-clock `ready` pulse and the latencies are this design's own. The
  source used existing AES cores without describing their insides.
* **Buffers.** Word order, the `sel` field, the output buffer's `load` and
  wrap, and the AES peripheral's `done` flag are this design's own.
* **Speed.** The source reports roughly 128 clocks per exponentiation step
  after its optimisation. This multiplier needs 4368 clocks per 128-bit
  product, so an exponentiation takes about a million clocks. The
  architecture, one shared half-size multiplier per level, makes that
  inherent.
* **Source example.** The source's own example, `670^5 mod 53`, is `8` by
  arithmetic, and that is what the testbenches check. A waveform of the source
  design shows 358 for it, which no modulus of 53 can give.

Not included:

* the processor and its software;
* the serial port;
* the source's first, fully combinational Karatsuba multiplier and its first
  exponentiation unit (`B-1` repeated multiplications). Both were abandoned
  designs, one for area and one for speed.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The references are computed independently of
the RTL: the simulator's own wide `*`, `%` and `+`, a reference
square-and-multiply in SystemVerilog, and the published AES-128 test vectors
(FIPS-197 Appendices A.1, B and C.1).

| testbench | what it checks |
|---|---|
| `tb_ripple_carry_adder` | 8-bit exhaustive with both carry-ins; 256-bit random |
| `tb_mult2` | all 16 products |
| `tb_kara4` | all 256 products, latency 12, reset clearing |
| `tb_karatsuba_mult` | 128-bit random and corner products, latency 4368; 8-bit sweep |
| `tb_mod_p` | small, edge (P = 1, P = 2^128-1, X < P, X = kP) and random cases; clock bound |
| `tb_a_over_b_mod_p` | 670^5 mod 53, B = 0, B = 1, a Fermat test mod 2^127-1, random 128-bit |
| `tb_in_buffer`, `tb_out_buffer` | word order, edge triggering, wrap, reset |
| `tb_dh_peripheral` | both exponentiation examples through the word interface |
| `tb_aes_key_expand` | published round keys, and the backward step against the forward one |
| `tb_cipher_serial_table`, `tb_inv_cipher_serial_table` | two published vectors, latency, single-clock `ready` |
| `tb_aes_peripheral` | published vector and eight random encrypt/decrypt round trips |
| `tb_secure_comm_node` | full two-node session at full size |

`tb_secure_comm_node` runs a whole session between two nodes at full size:
random 128-bit secrets, public values, shared key, the published vector, and
four messages sent from A to B. It also counts the mechanisms of the design
and fails if any never occurs: squarings, multiply steps and skipped
multiplies, modulo subtractions taken and skipped, Karatsuba carry corrections,
sub-multiplier waits, buffer traffic, encryptions and decryptions. It takes
about 1.8 M clocks, around 10 s in verilator.

## Simulating

Every testbench builds the same way. `crypto_pkg` goes first. Verilator finds
the other modules in `rtl/` through `-Irtl`:

```
verilator --binary --timing -Irtl rtl/crypto_pkg.sv tb/tb_secure_comm_node.sv \
          --top-module tb_secure_comm_node
./obj_dir/Vtb_secure_comm_node
```

Replace the testbench name to run any other. Lint a module with, for
example, `verilator --lint-only -Wall -Irtl rtl/crypto_pkg.sv rtl/secure_comm_node.sv`.

When linted on its own as the top, `karatsuba_mult` draws an `UNDRIVEN`
warning. Verilator does not expand a top module's instance of itself there.
Under any parent the recursion elaborates in full. The operand width is the
parameter `W` of `a_over_b_mod_p`, `mod_p` and `dh_peripheral`, and `N` of
`karatsuba_mult`. These need `W` to be a power of two, at least 8, and a
multiple of 32 where the word buffers are used.

## Files

| file | content |
|---|---|
| `rtl/crypto_pkg.sv` | widths, `word_wr_t`, S-box tables, GF(2^8) helpers |
| `rtl/ripple_carry_adder.sv`, `rtl/mult2.sv` | adder and 2-bit multiplier |
| `rtl/kara4.sv`, `rtl/karatsuba_mult.sv` | sequential Karatsuba multiplier |
| `rtl/mod_p.sv`, `rtl/a_over_b_mod_p.sv` | modulo unit, square-and-multiply |
| `rtl/in_buffer.sv`, `rtl/out_buffer.sv` | 32/128-bit word buffers |
| `rtl/dh_peripheral.sv`, `rtl/aes_peripheral.sv` | buffered peripherals |
| `rtl/aes_key_expand.sv`, `rtl/cipher_serial_table.sv`, `rtl/inv_cipher_serial_table.sv` | AES-128 |
| `rtl/secure_comm_node.sv` | one system's crypto hardware (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |
