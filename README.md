# Iterative AES-128 encryption/decryption core

This is a compact AES-128 block cipher for FPGAs. It encrypts or decrypts one
128-bit block at a time. A single round datapath is reused for all ten rounds,
under the control of a round counter. A pipeline register in the middle of
the round halves the critical path, so a round takes two clock cycles. A
cipher key is expanded once into a small key memory. After that, any number
of blocks, in either direction, run on the stored round keys without paying
for key generation again.

Performance at the default size:

| quantity | cycles |
|---|---|
| key expansion (`key_load` to `key_ready`) | 11 |
| one block (`start` to `done`) | 21 |
| block issue interval (back to back) | 21 |

At 200 MHz, one block every 21 cycles is about 1.2 Gbit/s. The core has not
been through an FPGA timing run, so that figure is arithmetic only.

## Structure

```
                 user_key                      text_in
                    |                             |
   +----------------v---------+        +----------v----------------------+
   | key_schedule             |        | aes_round                       |
   |  key register            |        |  initial AddRoundKey            |
   |  RotWord/SubWord(4 S-box)|        |  state_q --(Inv)Sub/Shift--> mid_q
   |  Rcon XOR, XOR chain     |        |  mid_q --(Inv)Mix/AddRoundKey--> state_q
   +------------+-------------+        +----------^-----------+----------+
                | next_key                        | round_key | text_out
          +-----v--------+  rdata                 |
          | key_memory   +------------------------+
          | 11 x 128 bit |
          +-----^--------+
                | we/waddr/raddr, rcon, load/step, last, mode
          +-----+--------+
          | aes_control  |  round counter 1..10, Rcon register, FSM
          +--------------+
```

| module | role |
|---|---|
| `aes_top` | wires the three parts together; top-level ports |
| `aes_control` | FSM: key expansion, round sequencing, key addresses, Rcon |
| `key_schedule` | key register plus one combinational expansion step |
| `key_memory` | 11 round keys of 128 bits (the 44-word expanded key) |
| `aes_round` | state register, mid-round pipeline register, both directions |
| `sub_bytes`, `inv_sub_bytes` | 16 parallel `sbox` / `inv_sbox` |
| `shift_rows`, `inv_shift_rows` | byte permutations (wiring only) |
| `mix_columns`, `inv_mix_columns` | GF(2^8) column mixing |
| `add_round_key` | 128-bit XOR |
| `sbox`, `inv_sbox` | 256-entry byte tables |
| `aes_pkg` | types, sizes, GF(2^8) functions, the computed S-box tables |

## The round datapath and its pipeline register

`aes_round` holds two 128-bit registers. `state_q` keeps the block between
rounds. `mid_q` sits halfway through a round:

| direction | first half (`step_a`): `state_q` to `mid_q` | second half (`step_b`): `mid_q` to `state_q` |
|---|---|---|
| encrypt | SubBytes, then ShiftRows | MixColumns, then AddRoundKey |
| decrypt | InvShiftRows, then InvSubBytes | AddRoundKey, then InvMixColumns |

In the final round (`last` = 1), MixColumns or InvMixColumns is bypassed.
Both directions are built in full, and the `mode` bit from the controller
picks one. Each half-round lies between two registers. The longest path is
therefore one S-box lookup plus a byte permutation, or one column mix plus a
128-bit XOR.

Decryption uses the plain inverse cipher. The last round key comes first, and
InvMixColumns follows AddRoundKey. This needs no modified decryption keys,
and it is why the round keys are kept in memory: decryption reads them in
reverse order.

## Key expansion and the key memory

The expanded key is 44 32-bit words (11 round keys). `key_schedule` holds the
current round key as four words. `key_word(0)` is bits 127:96 and
`key_word(3)` is bits 31:0. The next round key is:

```
t       = SubWord(RotWord(key_word(3))) ^ {rcon, 24'h0}
next(0) = key_word(0) ^ t
next(i) = key_word(i) ^ next(i-1)      i = 1..3
```

RotWord rotates the word left by one byte. SubWord uses four S-box instances.

On `key_load`, round key 0 (the user key itself) is written to key memory
address 0, and the key register is loaded. For rounds r = 1..10, one per
cycle, `next_key` is written to address r and becomes the current key. The
controller supplies the round constant 01, 02, 04, 08, 10, 20, 40, 80, 1B,
36. Each constant is the previous one multiplied by 02 in GF(2^8).

`key_memory` is an 11 x 128-bit array. It has one synchronous write port and
one asynchronous read port, which fits FPGA distributed RAM.

## Controller and timing

`aes_control` has five states: `S_IDLE`, `S_KEYEXP`, `S_RND_A`, `S_RND_B` and
`S_DONE`. One counter, `round_q`, runs from 1 to 10 in both key expansion and
block processing.

Cycle by cycle, counting the cycle in which `start` is sampled as cycle 0:

| cycle | state | action | key address (enc / dec) |
|---|---|---|---|
| 0 | idle/done | `load`: state = text_in ^ K | 0 / 10 |
| 2r-1 (r = 1..10) | `S_RND_A` | `step_a` | – |
| 2r | `S_RND_B` | `step_b`, `last` when r = 10 | r / 10 - r |
| 21 | `S_DONE` | `done` = 1, `text_out` valid | – |

`start` and `key_load` are accepted while `ready` is high. For `key_load`, it
is enough that the core is idle. The done cycle counts as idle, so a new
block can start in the same cycle in which the previous one reports `done`.
Requests that arrive while the core is busy are ignored. They are not queued.

`text_out` is the state register, and it is valid from `done` onwards. It
holds its value until the next block's initial AddRoundKey, one edge after
the next `start`.

Two assertions in `aes_control` check the rules:

* The round counter stays within 1..10 while the core is working.
* A block is never loaded without a complete set of round keys.

## Top-level interface (`aes_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | single clock for everything |
| `reset` | in | 1 | synchronous, active high; also forgets the key |
| `encrypt` | in | 1 | 1 = encrypt, 0 = decrypt; sampled with `start` |
| `key_load` | in | 1 | one-cycle request: expand `user_key` |
| `start` | in | 1 | one-cycle request: process `text_in` |
| `user_key` | in | 128 | cipher key; sampled with `key_load` only |
| `text_in` | in | 128 | plaintext or ciphertext; sampled with `start` only |
| `text_out` | out | 128 | result, valid from `done` |
| `key_ready` | out | 1 | round keys are complete |
| `ready` | out | 1 | `start` would be accepted now |
| `done` | out | 1 | one-cycle strobe: `text_out` holds the result |

Byte order: byte 0 of a block (and of the key) is bits 127:120. The state is
filled column by column. State row r, column c is byte r + 4c, so column c is
bits 127-32c down to 96-32c. This is the usual AES byte order, and a vector
such as `00112233...` is the same hex string on the port.

The single parameter `NR_P` (default 10) sets the number of rounds and the
key-memory depth. The key schedule is the 4-word AES-128 schedule, so only
the default gives a standard cipher.

## S-box tables

Neither S-box is typed in. `aes_pkg` computes both while the design
elaborates:

1. It takes the multiplicative inverse in GF(2^8), modulo
   x^8 + x^4 + x^3 + x + 1, as x^254 by square-and-multiply. Zero maps to
   zero.
2. It applies the affine map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 63`.

The inverse table is the inverse permutation of the forward table. The
results are constant 256 x 8 tables, which become ROMs. The core uses 36 of
them:

* 16 forward S-boxes in SubBytes
* 16 inverse S-boxes in InvSubBytes
* 4 forward S-boxes in the key schedule

Two examples: S(53) = ED, and InvS(95) = AD.

## Design choices and departures

These follow the source description:

* The three-part organisation: round module, key schedule with its own
  S-boxes, and a controller with a 1..10 round counter that issues the ten
  round constants in order.
* The four round steps and their inverses.
* The InvMixColumns matrix (0E 0B 0D 09, circulant).
* The key-word split.
* The single synchronous clock.
* Register arrays placed between the round steps.
* The encrypt/decrypt control bit.

These were not specified and are choices of this implementation:

* One pipeline register per round, placed after (Inv)ShiftRows/(Inv)SubBytes,
  with the state register as the other. This gives a 2-cycle round. The core
  processes one block at a time. It does not interleave several blocks in
  the round pipeline, and it is not unrolled.
* The key memory as 11 x 128 bits with an asynchronous read.
* Expanding the key once per `key_load` rather than on the fly for each
  block.
* The handshake (`key_load`/`start`/`ready`/`done`).
* Synchronous active-high reset.
* The names `text_in`/`text_out`. The same ports carry plaintext or
  ciphertext, depending on `encrypt`.
* The forward ShiftRows direction and the forward MixColumns matrix, which
  were taken from the AES standard.

Not supported: 192-bit and 256-bit keys. They need 12 or 14 rounds and a
52- or 60-word expanded key (6- or 8-word key schedule). This core holds 44
words and runs 10 rounds.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs. The
expected values come from `tb/aes_ref_pkg.sv`, a behavioural AES model
written another way:

* inverse by exhaustive search
* affine map bit by bit
* MixColumns as a general GF(2^8) matrix product
* the state as a [row][col] array

Fixed vectors are also used:

* all-ones key, plaintext `27dabd46f9da52d79967b7a0b33a492e`, ciphertext
  `b25481921106069a0ee0be3811ab5ad5`
* key `000102..0f`, plaintext `00112233..ff`, ciphertext `69c4e0d8...`
* key `2b7e1516...`, plaintext `3243f6a8...`, ciphertext `3925841d...`,
  with its published round keys 1 (`a0fafe17...`) and 10 (`d014f9a8...`)

`tb_aes_top` runs the whole core at its default size. It runs the three
known-answer pairs in both directions. It then uses random keys, each with a
burst of back-to-back blocks in random directions, checked against the
model. It checks both latencies (11 and 21 cycles). It counts key
expansions, encryptions, decryptions, direction switches, back-to-back
starts, key reuse and ignored starts, and fails if any of these never
happens. `tb_aes_control` checks the controller's outputs cycle by cycle, and
`tb_aes_round` checks the state after every round.

Simulate with Verilator 5. The packages come first. Replace the testbench
name as needed:

```
verilator --binary --timing --assert --top-module tb_aes_top \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v aes_pkg) tb/tb_aes_top.sv
./obj_dir/Vtb_aes_top
```

Each run takes well under a second.
