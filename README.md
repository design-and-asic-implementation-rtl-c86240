# Modified Rijndael: a 128-bit block cipher with a triple-substitution S-box and a two-mode ShiftRow

This is synthesizable SystemVerilog for a variant of Rijndael (AES-128) that is
meant to be harder to attack than the standard cipher. Two of Rijndael's steps are
changed:

* **ByteSub** uses a *triple-substitution* S-box: each byte is replaced by
  `S(S(S(x)))`, where `S` is the ordinary Rijndael S-box. The three passes are folded
  into a single 256-entry table, so each look-up costs no more than one AES S-box.
* **ShiftRow** has two modes, chosen by a `mode_in` pin. Mode 1 rotates rows
  0..3 left by 1, 3, 0, 2 bytes. Mode 0 rotates them by 2, 0, 3, 1. In both modes
  neighbouring rows differ in offset by at least two. One plaintext and key
  therefore give two different ciphertexts, one per mode.

Everything else is plain Rijndael with a 128-bit block and a 128-bit key: ten
rounds, MixColumn with `c(x) = 03x³+01x²+01x+02`, and XOR round-key addition. The key
schedule has the usual RotWord/SubWord/Rcon structure. Its SubWord also uses the
triple-substitution S-box, so the round keys differ from AES ones. The cipher is
therefore **not AES-compatible**. An AES test vector will not pass through it.

The chip holds an encryption core and a decryption core side by side. Each has
its own data and key ports, so one party's data can be encrypted while another
party's data is decrypted in the same cycles.

## Top level and timing

```
                 rijndael_top
  plain_text_in ──►┌──────────────────┐──► cipher_text_out
  enc_key ────────►│ rij1: enc core   │──► enc_done
                   └──────────────────┘
  clk, rst, load, mode_in ──► (shared by both cores)
                   ┌──────────────────┐
  cipher_text_in ─►│ rij2: dec core   │──► plain_text_out
  dec_key ────────►└──────────────────┘──► dec_done
```

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | asynchronous reset, active high; clears all registers |
| `load` | in | 1 | both cores capture their inputs on this edge |
| `mode_in` | in | 1 | ShiftRow mode: 1 = LS1302, 0 = LS2031 |
| `plain_text_in`, `enc_key` | in | 128 | block and key to encrypt |
| `cipher_text_out`, `enc_done` | out | 128, 1 | encryption result and its one-cycle valid pulse |
| `cipher_text_in`, `dec_key` | in | 128 | block to decrypt and the *cipher key* used to encrypt it |
| `plain_text_out`, `dec_done` | out | 128, 1 | decryption result and its valid pulse |

Each core has two registers and the whole cipher sits between them:

```
 edge k   : load=1 → text, key, mode captured in the input register
            (10 rounds + key schedule settle, all combinational)
 edge k+1 : result captured in the output register, *_done = 1 for one cycle
```

The result is therefore visible two clock edges after the cycle in which `load` was
applied. The output holds until the next result arrives. Because the two
registers act as a pipeline, `load` may stay high: a new block is then accepted
on every edge and a result comes out on every edge. `mode_in` is captured with
each block. It is meant to stay fixed for a session. The receiver must decrypt
with the same mode that the sender used to encrypt.

The cost of this structure is a very long combinational path: ten rounds plus
the key schedule. A layout in a 45 nm library of this unrolled architecture has been reported at
about 265 000 cells and 0.97 mm², and it missed 100 MHz by about 1.3 ns. Adding
pipeline registers between rounds would be the first change for a faster clock.
That change would alter the latency this RTL follows.

## The state and byte order

A 128-bit block is a 4×4 byte matrix `a(r,c)`, filled column by column, as in
Rijndael: bits `[127:120]` are `a(0,0)`, then `a(1,0)`, `a(2,0)` and `a(3,0)`,
then `a(0,1)`, and so on down to `a(3,3)` in bits `[7:0]`. Column `c` is the
32-bit word at `[127-32c -: 32]`, with row 0 in its top byte. The same order is
used for keys. `rijndael_pkg::byte_lsb(r,c)` gives the bit position of a byte.

## The two ShiftRow modes

Row `r` rotates **left** by `row_offset(mode, r)` bytes in encryption. In
decryption it rotates **right** by the same amount. Encryption moves the bytes
like this (the rows are shown after the shift):

```
mode_in = 1 (LS1302)              mode_in = 0 (LS2031)
a01 a02 a03 a00   (by 1)          a02 a03 a00 a01   (by 2)
a13 a10 a11 a12   (by 3)          a10 a11 a12 a13   (by 0)
a20 a21 a22 a23   (by 0)          a23 a20 a21 a22   (by 3)
a32 a33 a30 a31   (by 2)          a31 a32 a33 a30   (by 1)
```

Both shifts are only wiring. The mode selects between them with one 128-bit
2:1 multiplexer per round.

## Rounds

Encryption (`rijndael_enc_top`):

```
state = plaintext ^ K0
rounds 1..9 : ByteSub(S3) → ShiftRow(mode) → MixColumn → ^ Ki
round 10    : ByteSub(S3) → ShiftRow(mode)             → ^ K10
```

Decryption (`rijndael_dec_top`) expands the same cipher key forward and uses
the round keys from last to first:

```
state = ciphertext ^ K10
rounds 9..1 : InvShiftRow(mode) → InvByteSub(S3⁻¹) → ^ Ki → InvMixColumn
round 0     : InvShiftRow(mode) → InvByteSub(S3⁻¹) → ^ K0
```

MixColumn (`mix_column`) uses one `xtime` (multiply by 02) per byte:
`b(r) = 2a(r) ^ 3a(r+1) ^ a(r+2) ^ a(r+3)`. Inverse MixColumn (`inv_mix_column`)
multiplies by `d(x) = 0Bx³+0Dx²+09x+0E`. Each byte goes through a chain of three
`xtime` units, which gives 2b, 4b and 8b. The multiples `0E = 8^4^2`, `0B = 8^2^1`,
`0D = 8^4^1` and `09 = 8^1` are formed per byte and then combined across the column.
`xtime` shifts the byte left and XORs in `1B` when the bit shifted out was 1.

## S-boxes and key schedule

`s3_sbox` is the table `S(S(S(x)))` written as a constant case statement. For
example `S(00)=63`, `S(63)=FB` and `S(FB)=0F`, so entry 00 is `0F`. `s3_isbox` is its
exact inverse. Synthesis turns each one into a 256×8 ROM. The design has 420 of
them: 160 in each core's rounds, 40 in each core's key schedule, and the Rcon
tables.

`key_expand` builds round key `i` from round key `i-1` (words w0..w3):

```
t  = S3(RotWord(w3)) ^ {Rcon(i), 00, 00, 00}     Rcon = 01 02 04 08 10 20 40 80 1B 36
w0 ^= t;  w1 ^= w0;  w2 ^= w1;  w3 ^= w2
```

For an all-zero cipher key, round key 1 is `0e0f0f0f_0e0f0f0f_0e0f0f0f_0e0f0f0f`
and round key 10 is `2b650cb3_8f52de04_171d3144_26a36a0e`. These are good values
to check first when porting the design.

A known answer for the whole cipher uses plaintext
`12345678_87654321_23456789_98765432` and the all-zero key:

| mode_in | ciphertext |
|---|---|
| 0 | `b77217bf_5cc35f59_a1fe84ad_47784d33` |
| 1 | `a60d0124_7de0ee08_76faa0a9_2770a629` |

## Files

Everything is in `rtl/`, one module per file:

| module | role |
|---|---|
| `rijndael_pkg` | types (`byte_t`, `word_t`, `block_t`, `round_keys_t`), `NR = 10`, `byte_lsb`, `row_offset` |
| `rijndael_top` | the two cores side by side (instances `rij1`, `rij2`) |
| `rijndael_enc_top`, `rijndael_dec_top` | input register → key schedule + 10 unrolled rounds → output register |
| `enc_round`, `dec_round` | one round; parameter `FINAL = 1` leaves out (Inverse) MixColumn |
| `key_expand`, `rcon` | key schedule and its round constants |
| `sub_bytes`, `inv_sub_bytes` | 16 parallel `s3_sbox` / `s3_isbox` |
| `s3_sbox`, `s3_isbox` | triple-substitution S-box and its inverse |
| `shift_row`, `inv_shift_row` | two-mode ShiftRow and its inverse |
| `mix_columns`, `inv_mix_columns` | four `mix_column` / `inv_mix_column` units |
| `mix_column`, `inv_mix_column`, `xtime` | column transforms and multiplication by 02 |
| `add_round_key` | XOR with the round key |

The design has no parameters to size. The number of rounds `NR` is fixed at 10
for a 128-bit key. The round constants and the key-schedule step are written for
that key length only.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/rijndael_ref_pkg.sv`, a behavioural model that shares no code with the RTL.
The model computes the Rijndael S-box from GF(2⁸) arithmetic (inverse, then the
affine map). It composes that S-box three times and inverts the resulting table.
It also has its own loop-based ShiftRow, MixColumn, key schedule and full cipher.
Call `ref_init()` once before using it.

* The S-boxes, `xtime` and `rcon` are tested exhaustively over all inputs.
* The column and state transforms are tested on FIPS-197 MixColumns example
  columns, on random data and in round trips.
* The ShiftRow tests place byte `0x<r><c>` in every cell and check each position
  listed above.
* `key_expand` is tested on the all-zero key and on 200 random keys.
* The core testbenches check reset, the two-edge latency, the one-cycle `done`
  pulse, output hold, the known answers above, 600 random blocks with
  back-to-back loads, idle gaps and mode switches, and an asynchronous reset
  with data in flight.
* `tb_rijndael_top` runs the whole chip end to end at its only configuration. It
  encrypts a random stream and decrypts ciphertexts from that stream, so each one
  must round-trip to its plaintext. Unrelated ciphertexts are decrypted in the
  same cycles. It counts mode-1 and mode-0 blocks, mode switches, back-to-back
  loads, idle cycles, cycles in which both cores finish, round trips and resets.
  It fails if any count is zero. It takes about 30 s in Verilator.

To run a testbench with Verilator (5.x), name the two packages and let Verilator
find the modules in `rtl/` by file name:

```
verilator --binary --timing -y rtl rtl/rijndael_pkg.sv tb/rijndael_ref_pkg.sv \
    tb/tb_rijndael_top.sv --top-module tb_rijndael_top
./obj_dir/Vtb_rijndael_top
```

Replace `tb_rijndael_top` with any other `tb_*` name to test a single block.

## Choices not fixed by the cipher definition

* **Reset.** `rst` is asynchronous and active high. It clears the data registers,
  the captured mode and the `done` flags.
* **Handshake.** `done` is a one-cycle pulse per result, not a sticky flag. The
  cores are pipelined so that they accept a block every cycle. There is no
  back-pressure: the next result replaces the previous one.
* **Decryption key.** `dec_key` takes the original cipher key, not the last round
  key. The decryption core runs its own forward key schedule. It does not share
  the schedule with the encryption core, because the two cores may use different
  keys.
* **Inverse S-box.** `s3_isbox` holds the inverse of `s3_sbox`, computed for every
  entry.
* **Names.** The S-boxes are called `s3_sbox` and `s3_isbox` because a
  SystemVerilog identifier cannot begin with a digit.
