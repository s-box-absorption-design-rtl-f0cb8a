# Key-specific AES-128 with S-Box absorption

An AES circuit normally spends most of its logic on two things: the key
expansion and the S-Boxes of SubBytes. If the key is fixed when the circuit is
built, for example on an FPGA that is reconfigured to change the key, every
round key is a constant. The key expansion then reduces to constants, and the
XOR of AddRoundKey for one byte becomes a table lookup:
`byte ^ RKey[round][i]` is a function of 12 input bits, the 4-bit round number
and the 8-bit byte. That lookup is a bytewise function, and so is the S-Box
that follows it in the next round's SubBytes. So the two can be merged into one
table. This is **S-Box absorption**: sixteen 2816 x 8 ROMs per direction stand
in for the key schedule, AddRoundKey and SubBytes. Only ShiftRows, MixColumns
and a multiplexer are left in logic.

This repository holds synthesizable SystemVerilog for the encryption loop, the
matching decryption loop, and a combined encryption/decryption circuit. The
key is a parameter, and the ROM contents are computed from it when the design
is elaborated.

## The absorbed ROMs

Each of the sixteen ROMs serves one byte position `i` of the state (byte 0 is
bits 127:120 of the block; byte `i` is row `i%4`, column `i/4`). The 12-bit
address is `{round[3:0], byte[7:0]}`. The round number runs from 0 to 10, so
the ROM is 11 x 256 = 2816 words of 8 bits.

Encryption ROM `E_i`:

| round r | word at `r*256 + b`        | meaning                                        |
|---------|----------------------------|------------------------------------------------|
| 0 .. 9  | `SBox(b ^ RKey[r][i])`     | AddRoundKey r, then SubBytes of round r+1       |
| 10      | `b ^ RKey[10][i]`          | last AddRoundKey alone (no SubBytes follows)    |

Decryption ROM `D_i`:

| round r | word at `r*256 + b`            | meaning                                     |
|---------|--------------------------------|---------------------------------------------|
| 0       | `b ^ RKey[10][i]`              | first AddRoundKey, applied to the ciphertext |
| 1 .. 10 | `InvSBox(b) ^ RKey[10-r][i]`   | InvSubBytes, then that round's AddRoundKey   |

SubBytes is thus moved *backwards* into the previous AddRoundKey when
encrypting. When decrypting, InvSubBytes is moved *forwards* into the
AddRoundKey that follows it. This is legal because ShiftRows and its inverse
only permute bytes, so they commute with any bytewise function.

`absorb_rom` computes the table with constant functions from `aes_pkg`:

* the S-Box as the GF(2^8) inverse (`a^254`, modulo x^8+x^4+x^3+x+1) followed
  by the affine map with constant 0x63;
* the inverse S-Box as the inverse affine map followed by the GF inverse;
* the standard AES-128 key expansion.

No table is typed in. Changing `KEY` changes the ROM contents, and nothing
else. The read is synchronous with an enable, as in a block RAM. The output
register of the ROM **is** the state register of the loop.

## Encryption loop (`aes_enc_core`)

```
 din ──►┌─────┐ addr byte i ┌────────┐  dout (state reg) ──────────────► result
        │ mux ├────────────►│ ROM E_i│──┐
   ┌───►└─────┘  {round,·}  └────────┘  │
   │                                    ▼
   │     ┌─────────── MixColumns ◄── ShiftRows
   └─────┤ bypass when round == 10 ─────┘
```

One ROM access per clock cycle; `P` = plaintext, `SB` = SubBytes,
`SR` = ShiftRows, `MC` = MixColumns:

| cycle | round on address | address byte       | register afterwards          |
|-------|------------------|--------------------|------------------------------|
| 0     | 0                | `P`                | `SB(P ^ K0)`                 |
| 1..9  | r                | `MC(SR(reg))`      | `SB(state after round r)`    |
| 10    | 10               | `SR(reg)`          | ciphertext                   |

## Decryption loop (`aes_dec_core`)

The decryption loop has the same shape. The logic between the register and
the addresses is InvMixColumns (`IMC`, bypassed in round 1) followed by
InvShiftRows (`ISR`); `C` = ciphertext:

| cycle | round | address byte        | register afterwards                 |
|-------|-------|---------------------|-------------------------------------|
| 0     | 0     | `C`                 | `C ^ K10`                           |
| 1     | 1     | `ISR(reg)`          | `InvSB(ISR(reg)) ^ K9`              |
| 2..10 | r     | `ISR(IMC(reg))`     | `InvSB(...) ^ K(10-r)`; r = 10 gives the plaintext |

## Combined circuit (`aes_encdec_top`, the top)

The encryption and decryption ROMs hold different contents, so the two
directions cannot share ROMs. The top therefore holds one complete core of
each kind, 32 ROMs in all, built for the same key. Both share one port. A
direction input picks the core that takes a block, and the direction of the
last block started picks the core that drives `dout`. Only one block is in
flight at a time.

### Interface and timing

| port      | dir | width | meaning                                          |
|-----------|-----|-------|--------------------------------------------------|
| `clk`     | in  | 1     | clock                                            |
| `rst_n`   | in  | 1     | synchronous reset, active low (control state only) |
| `start`   | in  | 1     | start a block; taken only while `busy` is low    |
| `decrypt` | in  | 1     | 0: `din` is plaintext; 1: `din` is ciphertext    |
| `din`     | in  | 128   | input block (FIPS-197 byte order, byte 0 = MSB)  |
| `busy`    | out | 1     | rounds 1..10 are running                         |
| `done`    | out | 1     | one-cycle pulse: the result is on `dout`         |
| `dout`    | out | 128   | result; held until the next block starts         |

Drive `start` and `din` before a rising edge while `busy` is low; that edge
performs the round-0 access. `done` is high in the 11th cycle after it, and
`busy` is already low then. A new block may start in the `done` cycle, so the
circuit finishes one block every 11 cycles. A `start` while busy is ignored.
`din` only needs to be valid in the start cycle.

The two cores (`aes_enc_core`, `aes_dec_core`) have the same interface,
without `decrypt`.

## Parameters

| parameter | where | default | note |
|-----------|-------|---------|------|
| `KEY` | top, cores, `absorb_rom` | `2b7e151628aed2a6abf7158809cf4f3c` (FIPS-197 App. B) | the fixed key; set it for your own use |
| `BYTE_IDX`, `DECRYPT` | `absorb_rom` | 0, 0 | set by the cores |
| `NR`, `ROM_DEPTH`, `ADDR_W` | `aes_pkg` | 10, 2816, 12 | AES-128 only |

## What follows the published design, and what is chosen here

These follow the published S-Box absorption design:

* the ROM formulas, the 12-bit `{round, byte}` address and the 2816-word depth;
* the 16 ROMs per direction;
* the loop of selector → ROM → register → ShiftRows → MixColumns, with a
  bypass for the last round;
* separate ROM sets for encryption and decryption in the combined circuit.

These are this implementation's own choices:

* **Register = ROM output register.** The published design reports its best
  results with the ROMs in block RAM, where reads are synchronous, and this
  RTL is written for that. The distributed-RAM variant of the same design,
  with an asynchronous ROM followed by a separate 128-bit register, is not
  provided.
* The structure of the decryption loop. No drawing of the absorbed decryption
  circuit was available. It is built from the decryption ROM formula and the
  standard loop order: register → InvMixColumns (bypassed in the first round)
  → InvShiftRows.
* The `start`/`busy`/`done` handshake, the synchronous active-low reset and
  the 11-cycle schedule. The state registers have no reset, like block-RAM
  outputs, so `dout` is undefined until the first block completes.
* How the combined circuit shares one port between the two cores.
* The default key.
* Computing the S-Box arithmetically at elaboration.

Round numbers 11..15 are never put on the ROM addresses, and their contents
are undefined. `round_ctrl` asserts that its counter stays in 1..10.

## Cost and what to expect from the tools

Per direction there are 16 x 2816 x 8 = 360,448 ROM bits. On a Virtex-5 class
FPGA each ROM fits one 36 Kb block RAM in its 4K x 9 shape. The logic left is
ShiftRows/MixColumns (or their inverses), a 128-bit 2:1 multiplexer and a
4-bit counter.

Elaboration evaluates the ROM functions for all 32 ROMs. Verilator needs about
a minute for the full top; a single core takes about half that.

## Files

`rtl/`:

* `aes_pkg.sv`: types (`state_t`, `rkeys_t`), constants, GF(2^8) helpers,
  S-Box, key expansion.
* `absorb_rom.sv`: one absorbed ROM.
* `enc_linear.sv`: ShiftRows + MixColumns with the last-round bypass.
* `dec_linear.sv`: InvMixColumns with the first-round bypass, then
  InvShiftRows.
* `round_ctrl.sv`: round counter, `load`, `first`/`last`, `busy`/`done`.
* `aes_enc_core.sv`, `aes_dec_core.sv`: the two loops.
* `aes_encdec_top.sv`: the combined circuit (top).

`tb/`:

* `aes_model_pkg.sv`: an independent AES-128 reference model, with the S-Box
  built from exp/log tables.
* `tb_<module>.sv`: one self-checking testbench per module.
* `tb_power_workload.sv`: 10 x 1000 blocks encrypted back to back.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run. For example, the end-to-end test at the default
parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_model_pkg.sv tb/tb_aes_encdec_top.sv \
    --top-module tb_aes_encdec_top
./obj_dir/Vtb_aes_encdec_top
```

Replace the testbench name to run another one. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/aes_pkg.sv rtl/<module>.sv`.

What the testbenches establish:

* `tb_absorb_rom` compares all 2816 words of one encryption ROM and one
  decryption ROM with the reference model. It also checks the model against
  FIPS-197 values.
* `tb_enc_linear` and `tb_dec_linear` check against the model and against the
  FIPS-197 MixColumns column `db 13 53 45 ↔ 8e 4d a1 bc`.
* `tb_round_ctrl` checks the 0..10 sequence, the flags, the 11-cycle `done`, an
  ignored start and a back-to-back start.
* `tb_aes_enc_core` and `tb_aes_dec_core` run the FIPS-197 Appendix B and C.1
  vectors with two keys, plus random blocks against the model. They check the
  latency, the hold of the result, an ignored start and back-to-back blocks.
* `tb_aes_encdec_top` runs at the default parameters. It encrypts, decrypts
  and round-trips random blocks through the shared port. It counts direction
  switches both ways, back-to-back starts, ignored starts and the two round
  bypasses, and fails if any of them never happened.
* `tb_power_workload` runs 10,000 encryptions at the default parameters. It
  checks every ciphertext and that the total is exactly 11 cycles per block.

Simulation covers function and cycle timing. Nothing here measures area,
frequency or power on an FPGA.
