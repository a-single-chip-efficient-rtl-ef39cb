# Digital envelope engine: DES and RSA on one chip

A digital envelope solves the key-distribution problem of symmetric ciphers.
The bulk data `x` is encrypted with a fast secret-key cipher under a fresh
session key `k`. Only that short key is encrypted with the slow public-key
cipher, under the receiver's public key `(N, E)`:

    y   = DES_k(x)            data, secret-key cipher
    y'  = k^E mod N           session key, public-key cipher
    y'' = (y, y')             the envelope

The receiver recovers `k = y'^D mod N` with the private exponent `D`, then
`x = DES_k^-1(y)`.

This RTL puts both ciphers on one chip. They run at the same time: the DES
core encrypts the block while the public key is still being loaded and the
modular exponentiation runs. The DES data path is iterative, with a register
inside each round. The RSA exponentiation does the squaring and the
multiplication of each exponent step in parallel, on two Montgomery
multipliers. Either cipher can also be used on its own, which is how the
receiver side works.

## Block structure

```
envelope_top ─┬─ des_core ─┬─ des_key_processor   PC-1, C/D registers, rotators, PC-2
              │            └─ des_f ── 8 × des_sbox_rom
              └─ rsa_modexp ── 2 × mont_mul
des_pkg        DES tables and permutation functions (shared)
```

| module | role |
|---|---|
| `envelope_top` | chip pins, byte-serial key loading, envelope sequencing, output serialiser |
| `des_core` | IP, 16 Feistel rounds on one round unit, FP; encrypt and decrypt |
| `des_key_processor` | round keys K1..K16 (encryption) or K16..K1 (decryption), one per round |
| `des_f` | round function F: expansion E, key XOR, S-boxes, permutation P |
| `des_sbox_rom` | one S-box as a 64 × 4 ROM with a registered read |
| `rsa_modexp` | M^E mod N: parallel right-to-left square and multiply in Montgomery form |
| `mont_mul` | bit-serial radix-2 Montgomery product A·B·2^-W mod N |

## The chip interface

The pins are `clk`, `Reset`, `Start`, `Bus_Bits[7:0]`, `key[63:0]`,
`pt[63:0]`, `Encrypt`, `Done`, `ct[63:0]` and `Output[7:0]`, 213 in all.
The 64-bit public key parts do not get their own pins. They arrive one byte
per cycle on `Bus_Bits`, and the RSA result leaves one byte per cycle on
`Output`.

One envelope, with `RSA_W = 64` (so 8 bytes per RSA word), goes like this:

| cycle | what happens |
|---|---|
| 0 | `Start` = 1. `key`, `pt`, `Encrypt` are captured and DES starts. `Bus_Bits` = byte 0 of N |
| 1 .. 7 | `Bus_Bits` = N bytes 1..7 (least significant byte first) |
| 8 .. 15 | `Bus_Bits` = exponent bytes 0..7 |
| 16 | RSA starts on message = `key`, exponent, modulus N |
| 33 | DES finished; its result is held internally |
| 4568 | `Done` rises. `ct` = y. `Output` = byte 0 of y' |
| 4569 .. 4575 | `Output` = bytes 1..7 of y' |
| 4576 | `Output` = 0 |

- `Done` stays high until the next `Start` or `Reset`.
- A `Start` that arrives while an envelope is in progress is ignored.
- `Reset` is synchronous and active high. It abandons any operation in progress.
- The Start-to-Done time is 2·(RSA_W/8) + T_rsa + 1 cycles, where T_rsa is
  the exponentiation time given below.

**Using the ciphers separately.** `Encrypt = 0` makes the DES core decrypt
`pt`. The RSA part computes `key^X mod N` for whatever exponent X is loaded.
So a receiver runs two operations:

1. With `key = y'` and the private exponent D on `Bus_Bits`, the session key
   comes out on `Output`. The `ct` of this run is meaningless.
2. With `key = k`, `pt = y` and `Encrypt = 0`, the data comes out on `ct`.

The RSA message is the `key` port, truncated or zero-extended to `RSA_W`
bits. The hardware computes `(key mod N)^E mod N`. The session key can
therefore be recovered only if it is below N. With a 64-bit modulus whose top
bit is set, most 64-bit keys qualify. A key that does not qualify must be
replaced.

## DES engine

### One round in two cycles

A single round unit is used 16 times. Fully unrolling the 16 rounds would give
more DES throughput than the slow RSA side could ever use. Each round is
split by a register, and that register is the S-box ROM's own registered
read port:

- **Phase A.** `E(R) xor K_i` addresses the eight ROMs. The ROMs capture it
  at the clock edge.
- **Phase B.** The ROM outputs pass through P and are XORed into L. The
  halves swap and the key processor steps to the next key.

A block takes 16 × 2 + 1 = **33 cycles**, from `start` in cycle 0 to the
`done` pulse in cycle 33. A new block may start in the `done` cycle. The
output is FP(R16 ‖ L16): the halves are not swapped after round 16.

### Key processor

PC-1 drops the parity bits (every eighth bit) of the 64-bit key. This leaves
two 28-bit halves C and D in registers. Each round a cyclic shifter rotates
both halves. A comparator on the round counter picks the rotation amount:
one place before rounds 1, 2, 9 and 16, two places otherwise. PC-2 selects
the 48-bit round key from C‖D. PC-2 is combinational, so the key for the
next round is ready as soon as the registers are stepped.

Decryption needs the keys in the order K16 … K1. The 16 rotations add up to
28 places, a full turn, so C16‖D16 equals the PC-1 output. For decryption the
processor therefore loads PC-1 without rotating it, then rotates right each
round, by the amount that produced the key it has just used. The F function
and the data path are the same in both directions.

### S-boxes as ROM

The eight S-boxes are 64 × 4-bit ROMs (2048 bits in all) filled from the
standard tables in `des_pkg`. The row/column split of the S-box input
(outer two bits select the row, inner four the column) is folded into the
stored contents: entry `b` holds `S(row = {b5,b0}, col = b4..b1)`. The ROM
is then addressed with the raw 6-bit input. All other permutations are
wiring, generated by table-driven functions in `des_pkg`. Bit 1 of a DES
word is the MSB of the packed vector.

## RSA engine

This is the least obvious part of the design.

### Parallel square and multiply

The exponent is scanned from its least significant bit:

    Y := 1; Z := M
    for i in 0 .. W-1:
        if e_i = 1:  Y := Y·Z mod N
        Z := Z·Z mod N
    result Y

Within one step both products read only the old Z. They are therefore
independent and run at the same time:

- multiplier A always squares Z;
- multiplier B computes Y·Z when `e_i = 1` and is idle otherwise.

Every step costs exactly one multiplication time, whatever the bit, so the
run time does not depend on the exponent's value. All W bits are
processed, including leading zeros.

### Montgomery arithmetic

Neither product uses a division. `mont_mul` computes `A·B·R^-1 mod N`,
with R = 2^W, one bit of A per cycle:

    S := (S + a_i·B + q·N) / 2,   q = (S + a_i·B) mod 2

Adding q·N makes the sum even, so halving it is exact.

- N must be odd.
- B must be below N; A may be any W-bit value.
- S stays below 2N, so it needs W+1 bits (the sum needs W+2).
- One conditional subtraction at the end gives a result below N.
- A product takes W+2 cycles.

Every Montgomery product carries a factor R^-1. The exponentiation therefore
works on values of the form X·R mod N, converting in at the start and out at
the end:

1. **R² mod N.** Start from 1 and double it modulo N 2W times, one
   doubling per cycle. Each doubling needs at most one subtraction because
   the value stays below N.
2. **Into Montgomery form.** In parallel, Z := mont(M, R²) = M·R and
   Y := mont(1, R²) = R.
3. **The W loop steps.** Products of two Montgomery-form values stay in that
   form.
4. **Out of Montgomery form.** result := mont(Y, 1).

With the one-cycle start and capture overhead of each multiplication, an
exponentiation takes

    T_rsa = 2W + 1 + (W+2)(W+3) cycles     (4551 for W = 64)

Restrictions: N must be odd and greater than 1. For a 64-bit modulus, its top
bit should be set so that 64-bit session keys lie below it.

## Parameters

| parameter | module | default | meaning |
|---|---|---|---|
| `RSA_W` | `envelope_top` | 64 | RSA word width in bits; a multiple of 8 |
| `W` | `rsa_modexp`, `mont_mul` | 64 | operand width |
| `BOX` | `des_sbox_rom` | 1 | which S-box (1..8) |

`RSA_W` may be raised, for example to 512 or 1024. Run time grows as W²,
and the multiplier registers grow linearly.

## How this compares with the published figures

The published implementation targets an Altera APEX 20KE device. It
reports 54.7 MHz for the combined chip and 3.5 Gbit/s, computed as
64 bits × clock frequency. That formula assumes one 64-bit block per clock.
Neither an iterative DES nor an RSA exponentiation delivers that:

| | published claim | this RTL |
|---|---|---|
| DES | 6432 Mbit/s at 100.5 MHz (1 block/clock) | 1 block per 33 cycles: 195 Mbit/s at 100.5 MHz |
| RSA | 3501 Mbit/s at 54.7 MHz | 64 bits per 4551 cycles: 0.77 Mbit/s at 54.7 MHz |
| I/O pins | 213 used | 213 |
| memory bits | 32768 used | 2048 (S-box ROMs) |

The RTL follows the architecture as described (iterative DES with a split
round, parallel Montgomery square and multiply), not the throughput formula.
The published text also says the parallel square and multiply needs only
log2 k steps. With one step per exponent bit it needs k steps, and this
design takes W.

## Departures and own choices

These points are not fixed by the published description and were decided here:

- the byte order and sequencing of `Bus_Bits` and `Output`;
- that `Done` is a level held until the next `Start`;
- that the `key` port serves as the RSA message;
- the RSA width of 64 bits;
- the start/busy/done handshakes inside the chip;
- the radix-2 bit-serial form of the Montgomery multiplier, R² precomputation
  and domain conversion;
- synchronous active-high reset;
- one shared comparator result driving both key-half rotators.

The published simulation shows a key, plaintext and ciphertext triple. That
triple is not a standard DES pair, so it is not used as a test vector. All
DES vectors come from the standard's worked example and an independent
software model.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog stops a
testbench that hangs.

- `tb_des_sbox_rom`: all 512 entries form permutations per row; two full
  rows and single entries are checked against the standard; read latency.
- `tb_des_f`: F values from the standard's worked example and random vectors.
- `tb_des_key_processor`: all 16 subkeys of two keys, in both orders; hold
  while not advancing.
- `tb_des_core`: 7 known-answer vectors, encrypt and decrypt, the 33-cycle
  latency, ignored start while busy, back-to-back blocks.
- `tb_mont_mul`: 64 products checked through P·2^W ≡ A·B (mod N), P < N, and
  the W+2 latency. It also confirms that the final subtraction occurs.
- `tb_rsa_modexp`: the textbook key (N = 3233, E = 17, D = 2753), a 64-bit
  key pair round trip, random operands, E = 0, and the exact cycle count.
  The testbench's own reference uses left-to-right exponentiation with plain
  wide integers.
- `tb_envelope_top`: the full chip at its default size. Four envelopes are
  built (one of them with the key and data block of the published
  simulation run) and then opened again through the receiver sequence. The test counts
  these mechanisms and fails if any never occurs:
  - DES encryption and decryption;
  - single-place and double-place key rotations;
  - exponent steps with and without the multiplication;
  - the final Montgomery subtraction;
  - a `Start` ignored while busy;
  - a `Reset` in mid-envelope.

  It also checks the 4568-cycle Start-to-Done time and the `Output` byte
  timing.

The testbenches need no external files. To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/des_pkg.sv tb/tb_envelope_top.sv \
          --top-module tb_envelope_top -y rtl -y tb
./obj_dir/Vtb_envelope_top
```

Replace `tb_envelope_top` with any other testbench name. Each one finishes
in well under a second.
