# Hash-then-encrypt MAC: SHA-1 + AES-128 in SystemVerilog

A message authentication code (MAC) proves to a receiver that a message is
unchanged and comes from someone holding a shared secret key. This design
builds a MAC by hashing first and encrypting second:

    MAC = AES-128_k( Partial-SHA-1(M) )

where `Partial-SHA-1` keeps the left-most 128 of the 160 bits of the SHA-1
digest. This 128-bit value fits one AES block exactly. The sender sends `M`
and the MAC. The receiver decrypts the MAC with the same key, which gives the
partial digest back. It then hashes the message it received and compares the
two values. If an attacker changes a single bit of either the message or the
MAC, the two values differ.

The device has a 128-bit message input, a 128-bit key input and a 128-bit
output. It runs in one of two modes:

| `de_encrypt` | `data_in`      | `data_out`                          | latency (start cycle to `done` cycle) |
|--------------|----------------|-------------------------------------|---------------------------------------|
| 0 (generate) | message M      | MAC                                 | 94 cycles (SHA-1 82, AES 11, output 1) |
| 1 (verify)   | received MAC   | decrypted partial digest            | 22 cycles (AES decrypt 21, output 1)   |

Example: message `00112233445566778899aabbccddeeff` with key
`000102030405060708090a0b0c0d0e0f` gives the MAC
`4ebc7a40bebe5f78c91a592c527a4e9f`. Decrypting it returns
`739e0e8490eacbcb2ea11d4a5dbefbae`, the first 128 bits of SHA-1(M). Now
change one byte of the MAC in transit, to `4ebc7a40bebe4078c91a592c527a4e9f`.
That MAC decrypts to `b1a2533ec438eb6cfb14af34fa3554fd`, so the contrast
reports a mismatch. `tb/tb_mac_top.sv` runs exactly this exchange.

The design keeps no RAM and no look-up tables. The AES S-box is computed by
GF(2^8) inversion rather than read from a 256-byte table. Round keys are
made on the fly. The SHA-1 message schedule keeps only 16 words.

The architecture was first published with an implementation on an Altera
APEX 20KE device (EP20K600EBC652). That build used 17153 logic cells and 388
pins, with no memory bits, and ran at 12.4 MHz. The AES part alone ran at
13.4 MHz and the SHA-1 part at 33.8 MHz. Those figures describe that build,
not this RTL. No timing constraints come with this RTL.

## Block structure

```
mac_top
├── SHA-1 padding (an assignment)  {M, 1, 0...0, 64'd128}
├── sha1_core                      80 steps + chaining additions
│   └── sha1_w16                   16-word message schedule window
├── Partial SHA-1 (a bit slice)    digest[159:32]
├── aes_core                       iterative AES-128 encrypt / decrypt
│   ├── aes_key_expand             round keys forwards and backwards
│   │   └── 4 x aes_sbox
│   └── aes_round                  one (inverse) round, combinational
│       └── 16 x aes_sbox
│           └── gf_inv             A^254 with power boxes and multipliers
│               └── 4 x gf_mul
└── digest_contrast                receiver's digest comparison
```

`mac_pkg` holds the shared types (`block128_t`, `digest_t`, ...), the
SHA-1 constants, and small pure functions: GF(2^8) `xtime`, squaring,
constant multiplication, the AES affine maps and the round constant.

## The S-box without a table: GF(2^8) inversion

This is the least familiar part of the design. The AES S-box maps byte `x`
to `Affine(x^-1)`. The inverse is taken in GF(2^8) modulo
x^8+x^4+x^3+x+1, and `0^-1` is defined as 0. Every non-zero `A` satisfies
`A^255 = 1`, so `A^-1 = A^254`. This power is also 0 for `A = 0`, so the
AES convention comes for free.

Squaring in a field of characteristic 2 is linear: `(a+b)^2 = a^2 + b^2`.
A squarer, and so any `A^(2^n)` box, is therefore only a small XOR network
(`gf_sq`, `gf_pow2n` in `mac_pkg`). Only true multiplications cost real
logic. `gf_inv` builds `A^254` with an addition chain that needs few of
them:

```
A^3   = A^2 * A                  (the "A^3" box: square, then multiply)
A^4   = (A^2)^2
A^6   = (A^3)^2      A^24  = (A^3)^8
A^30  = A^6 * A^24               multiplier 1
A^7   = A^3 * A^4                multiplier 2
A^224 = (A^7)^32
A^254 = A^30 * A^224             multiplier 3
```

In short, `A^-1 = ((A^3)^2 * (A^3)^8) * (A^3 * A^4)^32`. The obvious chain
`A^2 * A^4 * ... * A^128` needs six multipliers; this one needs three, plus
the one inside the `A^3` box, so `gf_inv` holds four `gf_mul` instances in
all. `gf_mul` is a plain standard-basis multiplier: a carry-less product
followed by reduction by `0x11B`.

`aes_sbox` puts the affine map (forward) or the inverse affine map (inverse)
on either side of one shared inverter:

- forward: `y = Affine(inv(x))`
- inverse: `y = inv(InvAffine(x))`

The mode input `dec` drives the muxes around the inverter. The same 16
S-box units therefore serve both encryption and decryption.

## AES-128 core

`aes_core` is iterative. One round datapath (`aes_round`) is reused for all
ten rounds, and one round runs per clock.

- **Encryption.** The start cycle loads `state = din ^ key` (round key 0).
  Rounds 1 to 10 follow, one per cycle. Each round is ByteSub, ShiftRow,
  MixColumn and AddRoundKey. Round 10 leaves out MixColumn.
- **Decryption.** The standard inverse cipher needs round key 10 first, and
  the key schedule only runs forwards from the cipher key. So the core first
  steps the key schedule ten times, which takes ten cycles. The last of
  those cycles also adds round key 10 to the state. Ten inverse rounds
  follow: InvShiftRow, InvByteSub, AddRoundKey, then InvMixColumn. The last
  round leaves out InvMixColumn.
- **Key schedule.** `aes_key_expand` holds one round key. It can step
  forwards or backwards. The backward step inverts the AES-128 recurrence:

  ```
  v3 = w3 ^ w2    v2 = w2 ^ w1    v1 = w1 ^ w0
  v0 = w0 ^ SubWord(RotWord(v3)) ^ Rcon[i]
  ```

  The round keys used in decryption therefore come out in the order
  10, 9, ..., 0 without storing any of them. The schedule's `rk_d` output
  is the key the register will hold after the current edge. This lets a
  round use its key in the same cycle the key is formed.
- **Byte order.** Byte `k` of a 128-bit value is bits `[127-8k -: 8]`. The
  state fills column by column, as in FIPS-197, so test vectors read left to
  right.

ShiftRow is applied before ByteSub. The two commute, and applying ShiftRow
first lets both directions share one S-box bank.

## SHA-1 core

`sha1_core` runs the standard SHA-1 compression, one step per clock:

```
TEMP = ROTL5(A) + f_t(B,C,D) + E + W_t + K_t
E = D;  D = C;  C = ROTL30(B);  B = A;  A = TEMP
```

The 80 steps fall into four groups of 20 steps, each group with its own
`f_t` and `K_t`. After step 79, a final cycle adds A to E to the incoming
chaining value, and `done` pulses. The core takes a chaining value
(`cv_in`) and returns the next one (`cv_out`). A message of several blocks
can therefore be hashed by feeding `cv_out` back into `cv_in`;
`tb_sha1_core` does this for the 448-bit FIPS example. `mac_top` only ever
hashes one block, starting from the standard initial value H0..H4.

`sha1_w16` keeps the message schedule in 16 registers instead of 80, a
sliding window. `w[0]` is always the current step's `W_t`. Each step shifts
the window by one word and appends

    W(t+16) = ROTL1( W(t+13) ^ W(t+8) ^ W(t+2) ^ W(t) )

This is the usual recurrence `W_t = ROTL1(W_{t-3} ^ W_{t-8} ^ W_{t-14} ^
W_{t-16})`, re-indexed. The window is declared as a packed register vector,
so synthesis does not infer a memory for it. In the published build, the
16-word schedule took 2291 logic cells against 5198 for the 80-word array.

The 128-bit message always fits one block. `mac_top` pads it with a fixed
assignment: the message, a single 1 bit, 319 zeros, and the 64-bit length
128.

## Interface and timing of `mac_top`

| port           | dir | width | meaning |
|----------------|-----|-------|---------|
| `clk`          | in  | 1     | clock |
| `rst`          | in  | 1     | synchronous reset, active high; clears `data_out` to 0 |
| `start`        | in  | 1     | start one operation; sampled only when the device is idle |
| `de_encrypt`   | in  | 1     | 0 = generate a MAC, 1 = decrypt a received MAC |
| `data_in`      | in  | 128   | message (generate) or received MAC (verify) |
| `key_in`       | in  | 128   | secret key |
| `data_out`     | out | 128   | MAC, or decrypted partial digest; holds until the next result |
| `done`         | out | 1     | one-cycle pulse in the cycle `data_out` takes the new value |
| `own_digest`   | in  | 128   | receiver's own partial SHA-1 of the received message |
| `digest_match` | out | 1     | decrypted MAC == `own_digest` (valid with `match_valid`) |
| `match_valid`  | out | 1     | high in the same cycle as `done` after a verify operation |

The first seven ports are the device interface of the published design:
3 x 128 + 4 = 388 pins. The other four are additions:

- `done` saves the user from counting cycles.
- `own_digest`, `digest_match` and `match_valid` bring out the receiver's
  contrast step.

The receiver's own SHA-1 of the message it received is outside this device.
A second instance, or an earlier pass through any SHA-1, supplies
`own_digest`.

`data_in`, `key_in` and `de_encrypt` are sampled in the start cycle and
need not be held. A `start` while the device is busy is ignored.
Assertions in `aes_core` and `sha1_core` flag such a start at their own
ports.

## What follows the published design and what is this RTL's own

These parts follow the published design:

- the MAC construction, and the left-most-128-bit truncation;
- the 128-bit message, key and output;
- the encrypt and decrypt modes;
- the round structure of AES;
- the S-box built on the three-multiplier `A^254` inverter, with no table;
- the SHA-1 step equations, with four 20-step stages and the final
  chaining additions;
- the 16-word message schedule;
- no memory bits.

These choices are this RTL's own:

- **Timing.** One AES round and one SHA-1 step per clock. The latencies
  above follow from that. The published build's cycle counts are not known.
- **Decryption.** The inverse cipher, and the key schedule run backwards
  after a 10-cycle forward pass.
- **S-box sharing.** The S-box bank is shared by both directions through
  muxes around one inverter.
- **The `A^3` box.** It is built as a square followed by a multiply, so
  there are four multiplier instances in `gf_inv`.
- **Interface.** The `start`/`done` handshake, the synchronous reset, and
  the registered digest comparison.
- **Padding.** It handles only the single-block 128-bit case.
- **Standard details.** The S-box affine constants, the round constants,
  and SHA-1's `f_t`, `K_t` and initial value are taken from the AES and
  SHA-1 standards (FIPS-197, FIPS 180-1).

Known limits:

- Only 128-bit messages can be authenticated through `mac_top`. Longer
  messages would need a padding and block-feeding front end around
  `sha1_core`.
- SHA-1 alone is no longer considered collision resistant. This design
  reproduces a published architecture and is not a recommendation for new
  systems.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog stops a
testbench that hangs. Expected values never come from the module under
test. They come from FIPS examples, or from vectors produced by an
independent software SHA-1/AES model and written into the testbenches.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_gf_mul`          | all 65536 products against a shift-and-add reference; FIPS `{57}*{83}={c1}` |
| `tb_gf_inv`          | `a * inv(a) = 1` for all 255 non-zero bytes; `inv(0)=0`; `{53}^-1={ca}` |
| `tb_aes_sbox`        | FIPS S-box entries; inverse undoes forward for all bytes; permutation with no fixed points |
| `tb_aes_round`       | FIPS-197 Appendix B round 1; random normal, final, forward and inverse rounds |
| `tb_aes_key_expand`  | all 11 round keys of two keys, forwards then backwards |
| `tb_aes_core`        | FIPS-197 C.1 and four random vectors, both directions, latency 11 / 21 |
| `tb_sha1_w16`        | 80 schedule words of random blocks against an 80-word expansion; hold when idle |
| `tb_sha1_core`       | "abc", the two-block 448-bit FIPS message with chaining, the 128-bit example; latency 82 |
| `tb_digest_contrast` | equal pairs, and single-bit differences in every byte position |
| `tb_mac_top`         | the full example above (generate, verify, falsified MAC rejected) and three random message/key pairs; latencies 94 / 22; counts generate, verify, match and mismatch, each must occur |
| `tb_mac_link`        | a whole exchange: sender device, a channel that leaves the data alone, replaces a MAC byte or flips a message bit, and a receiver made of its own SHA-1 core and a second device in verify mode; only unaltered exchanges may be accepted |

`tb_mac_top` runs the top at its default parameters and takes well under a
second. To run any testbench with Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mac_pkg.sv tb/tb_mac_top.sv \
          --top-module tb_mac_top -o sim
./obj_dir/sim
```

Replace `tb_mac_top` with any other testbench name. To lint a module on its
own:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/mac_pkg.sv rtl/mac_top.sv --top-module mac_top
```

Lint reports only unused-signal warnings. These are deliberate:

- the low 32 digest bits are dropped by Partial SHA-1;
- `aes_core` does not use the key schedule's `rk_q` and `rnd_q` outputs;
- modules that do not use the SHA-1 initial value leave that package
  constant unused.
