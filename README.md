# Byte-serial, microprogrammed AES co-processor

This is a small AES engine that trades speed for area. It supports AES-128, AES-192 and AES-256,
in both directions. The datapath is 8 bits wide: one register file, one S-Box and one inverse
S-Box lookup table, one 8-bit XOR, a working register, a four-byte accumulator and a few muxes.
There is no round logic in hardware. The whole algorithm, including the key expansion, is
sequenced by a three-level microprogram, and each clock executes one byte operation. The
expanded key stays in the register file between blocks. With the key already expanded, an
AES-128 block takes about 2,300 cycles to load, encrypt and read out. Loading and expanding a
new key first adds about 840 cycles.

The top module is `aes_coprocessor` (`rtl/aes_coprocessor.sv`). All the RTL is synthesizable
SystemVerilog. The two lookup tables are computed at elaboration, so the design needs no data
files.

## Using it

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything is rising-edge |
| `reset` | in | 1 | synchronous reset; clears every register, including the 256-byte register file |
| `start` | in | 1 | one-cycle pulse while `busy` is low; starts the program that `bitmode` selects |
| `bitmode` | in | 3 | `{decrypt, keymode[1:0]}`; keymode 0 = 128-bit key, 1 = 192, 2 = 256 |
| `new_key` | in | 1 | sampled with `start`: 1 = take and expand a new key first; 0 = reuse the expanded key |
| `byte_req` | out | 1 | a load-byte operation runs this cycle; `byte_in` is written at the coming edge |
| `byte_in` | in | 8 | input byte; must be valid in every cycle where `byte_req` is high |
| `byte_out_valid` | out | 1 | a store-byte operation runs this cycle; `byte_out` holds a result byte |
| `byte_out` | out | 8 | output byte |
| `busy` | out | 1 | high while a program runs |
| `done` | out | 1 | pulses for one cycle when the program ends |

One `start` runs one complete operation, always in this order:

1. If `new_key` is 1, the program raises `byte_req` 16, 24 or 32 times and takes the key in
   FIPS-197 byte order. It then expands the key into the register file.
2. It raises `byte_req` 16 times and takes the input block (plaintext or ciphertext), in
   FIPS-197 byte order (`in[0]` first).
3. It runs the rounds.
4. It raises `byte_out_valid` 16 times with the result in FIPS-197 byte order, then pulses
   `done`.

The expanded key is the same for both directions. Once a key has been loaded, any number of
blocks can be encrypted or decrypted with `new_key` = 0, as long as `keymode` stays the same.
After a reset, the register file holds an all-zero expanded key. That is not the expansion of
any real key.

Two assertions in the top state the handshake rules: no cycle both takes and gives a byte,
and `done` ends `busy`. `byte_req` comes straight from the decoded microinstruction. A host can therefore answer it
combinationally from a FIFO or a byte counter. There are no wait states: the program cannot
stall. The load and store cycles are spread over several clocks with bookkeeping cycles in
between, so a simple host sees one request at a time.

## Datapath

```
            ByteIn      WR  MC  OutMux
               \        |   |   /
                +-- DataMux ---+------> RF WD
 controller --> ADDR   [ Register file 256 B ] --RD--+--> S-Box ------+
                                                     +--> S-Box^-1 ---+
                                                     +--> mux A --+   |
           WR, MC, ModFlag, Rcon ---> mux B ----------------------XOR |
                                                                  |   |
                     OutMux {XOR, S-Box, S-Box^-1, RD} <----------+---+
                        |
                        +--> WR (shift/load) --> ModFlag (WR[7] -> 1b/00)
                        +--> MC ACC (MC0..MC3, selected by MixCtl)
```

**Register file** (`aes_register_file`). This is one 256-byte address space. Byte (row r,
column c) of a 16-byte block sits at offset `4c + r`.

| bytes | contents |
|---|---|
| 0-15 | State |
| 16-47 | first 4, 6 or 8 words of the expanded key, which is the cipher key |
| 48-255 | rest of the expanded key (208 bytes) |

Expanded-key word *i* lives at bytes `16 + 4i … 19 + 4i`. Round key *k* is therefore the
16-byte block *k*+1. AES-256 needs 60 words and fills the file exactly.

The State is built as four rows of four byte registers wired as rotating shift registers. One
`SHROWn` operation rotates row *n* left by one byte. ShiftRows rotates row 1 once, row 2 twice
and row 3 three times. InvShiftRows rotates row 1 three times, row 2 twice and row 3 once. The
rows only rotate one way.

**S-Box and inverse S-Box** (`aes_sbox`, `aes_inv_sbox`). These are 256-entry tables on the
register file's read port. At elaboration the S-Box entries are computed from the GF(2^8)
inverse and the affine transform. The inverse table is built by inverting that permutation.

**Mux A, mux B, XOR, output mux, data mux** (`aes_byte_mux`).

| mux | code 0 | code 1 | code 2 | code 3 |
|---|---|---|---|---|
| A | RD | WR | MC | 00 |
| B | WR | MC | ModFlag | Rcon |
| Out | A ^ B | S-Box(RD) | S-Box⁻¹(RD) | RD |
| Data (RF write) | ByteIn | WR | MC | Out |

**Working register, ModFlag and multiplication by x**. The working register is
`aes_working_register`; ModFlag is `aes_modflag`. Multiplying by x in GF(2^8) takes two
operations:

- `MODSH` copies WR[7] into ModFlag and shifts WR one place toward the MSB.
- `XORMOD` XORs WR with ModFlag's output: 1b if the saved bit was 1, otherwise 00.

**MixColumns accumulator** (`aes_mc_acc`). It has four byte registers with no shifting. The
2-bit MixCtl field selects one register for both read and write.

**Rcon table** (`aes_rcon_lut`). It holds the ten round constants. An internal index restarts at
01 at the beginning of the key expansion. `XORRCONMC0` advances the index each time it uses a
constant.

## Microinstructions

`aes_output_rom` turns a 5-bit OutCode into 20 control bits (`ctrl_t` in `aes_pkg`):

- the write enables PCRW, RFRW, MCRW, ModRW and WRRW;
- SH and RCON;
- the four mux selects;
- MixCtl and ShiftCtl;
- StoreMux.

| code | name | effect |
|---|---|---|
| 0 | NoOp | — |
| 1 | LB | RF[a] ← ByteIn |
| 2 | SB | ByteOut ← RF[a] |
| 3 | LWR | WR ← RF[a] |
| 4-6 | SHROW1-3 | rotate State row 1-3 left by one byte |
| 7 | XORRCONMC0 | MC0 ← MC0 ^ Rcon; next Rcon |
| 8 | SBX | RF[a] ← S(RF[a]) |
| 9 | ISBX | RF[a] ← S⁻¹(RF[a]) |
| 10 | MODSH | ModFlag ← WR[7]; WR ← WR << 1 |
| 11 | XORMOD | WR ← WR ^ (ModFlag ? 1b : 00) |
| 12-15 | LMCn | MCn ← RF[a] |
| 16-19 | SMCn | RF[a] ← MCn |
| 20-23 | SBXMCn | MCn ← S(RF[a]) |
| 24-27 | XORWRMCn | MCn ← MCn ^ WR |
| 28 | Loop | end of program (resets the program counter) |
| 29 | XORWR | WR ← RF[a] ^ WR |
| 30 | XORST | RF[a] ← RF[a] ^ WR |
| 31 | — | NoOp |

Codes 0-28 follow the source instruction table, in its row order. Codes 29 and 30 are this
design's additions. Without an operation that XORs a register-file byte with WR, neither
AddRoundKey nor MixColumns can be written for these muxes.

## The three-level controller

This is the least obvious part of the design.

`aes_instruction_module` holds six program ROMs, one per key length and direction. A program
is a list of 6-bit *round codes*, which are start addresses in the round ROM. The module
steps through the list with a 5-bit program counter. Rounds are unrolled in the list, so the
sequencer never compares or jumps. For example, AES-128 encryption is:

```
R_LOAD4, R_KX4 x10, R_LOADST, R_ENC_INIT, R_ENC_RND x9, R_ENC_FIN, R_OUT
```

A start with `new_key` = 0 sets the program counter to the `R_LOADST` entry instead of 0.

`aes_controller` has three nested levels. Each level has an address register that either loads
the start address handed down from the level above or increments:

| level | ROM | word fields | what a word does |
|---|---|---|---|
| round | `aes_rnd_rom` (64 × 12) | ColCode 6, RndCtl 2, RndCntCtl, RndCntIncr, RndCntRN, RndDone | calls a column routine |
| column | `aes_col_rom` (64 × 13) | ByteAddress 8, ColCtl 2, ColCntIncr, ColCntRN, ColDone | calls a byte routine |
| byte | `aes_byte_rom` (256 × 10) | OutCode 5, ByteCtl 2, ByteCntIncr, ByteCntRN, ByteDone | issues one microinstruction |

Three counters form the register-file address. The 4-bit round counter gives `ADDR[7:4]`. The
2-bit column counter gives `ADDR[3:2]`. The 2-bit byte counter gives `ADDR[1:0]`. Together,
`W = {RndCnt, ColCnt}` is a 6-bit word pointer into the register file.

Each byte word picks its own address form with **ByteCtl**:

| ByteCtl | address | used for |
|---|---|---|
| 0 | `{0000, ColCnt, ByteCnt}` | the State |
| 1 | `{W, ByteCnt}` | the round key (AddRoundKey), w[i−Nk] (key expansion), key loading |
| 2 | `{W+Nk−1, ByteCnt}` | w[i−1] (key expansion) |
| 3 | `{W+Nk, ByteCnt}` | w[i] (key expansion) |

The counters change as follows:

- **Byte counter.** `ByteCntIncr` steps it after the word executes.
- **Column counter.** It steps when a column word's byte routine returns:
  - ColCtl[0] repeats the same column word until the column counter wraps to 0. This is how
    one column routine covers four columns.
  - ColCtl[1] lets the column counter carry into the round counter. This is how the key
    expansion walks W forward one word at a time.
- **Round counter.** Round-level `RndCntRN` reloads it. `RndCtl` = 0 loads 1, the block of
  round key 0. `RndCtl` = 1 loads Nr+1, the block of round key Nr, which is where decryption
  starts. The same reload clears the other two counters and the Rcon index.
- **Round counter direction.** `RndCntIncr` counts up when `RndCntCtl` = 0 (encryption) and
  down when it is 1 (decryption). With this, AddRoundKey always uses address form 1.

Timing: the controller spends one clock in each level change:

- RND_LOAD, COL_LOAD and BYTE_LOAD load the address registers;
- EXEC issues one microinstruction per clock;
- COL_END and RND_END apply the counter actions.

Only EXEC issues a datapath operation. The other states issue NoOp.

## How AES maps onto the microprogram

- **SubBytes / InvSubBytes**: `SBX`/`ISBX` on each State byte, in place.
- **ShiftRows / InvShiftRows**: six `SHROWn` rotations each.
- **AddRoundKey**: for each byte, `LWR` from the round-key block, then `XORST` on the State
  byte. This is 8 operations per column.
- **MixColumns**: 36 operations per column. It uses `s'ᵢ = sᵢ ⊕ t ⊕ xtime(sᵢ ⊕ sᵢ₊₁)` with
  `t = s₀⊕s₁⊕s₂⊕s₃`:
  1. `LMCn` copies the column into MC.
  2. WR accumulates t, which `XORWRMCn` adds to every MCn.
  3. For each i, WR ← sᵢ ⊕ sᵢ₊₁; `MODSH`/`XORMOD` multiplies it by x; `XORWRMCi` adds it.
  4. `SMCn` writes the column back.
- **InvMixColumns**: a 22-operation pre-step on each column, followed by the same MixColumns
  routine. The pre-step is `s₀,s₂ ^= 4(s₀⊕s₂)` and `s₁,s₃ ^= 4(s₁⊕s₃)`. This works because
  the inverse matrix equals the forward matrix times `[5 0 4 0; 0 5 0 4; 4 0 5 0; 0 4 0 5]`.
  It avoids separate ×9/×11/×13/×14 sequences.
- **Key expansion**: one word per step, with W pointing at w[i−Nk]. MC holds the previous
  word, because the step before just wrote it.
  1. For a word that needs transforming, the step reads w[i−1] through the S-Box into MC, in
     rotated order, and XORs in Rcon (`SBXMC3, SBXMC0, SBXMC1, SBXMC2, XORRCONMC0`).
     AES-256 words with i mod 8 = 4 take SubWord without the rotation.
  2. It adds w[i−Nk] to MC (`LWR` + `XORWRMCn`).
  3. It stores MC as w[i] (`SMCn`) and advances W with a carry.

  AES-128 runs ten 4-word groups. AES-192 runs seven 6-word groups and one 4-word group.
  AES-256 runs six 8-word groups and one 4-word group.

## Cycle counts

These are measured in simulation at the default configuration, from `start` to `done`:

| | kept key (`new_key` = 0) | new key: key load + expansion | new key: total |
|---|---|---|---|
| AES-128 encrypt / decrypt | 2287 / 3151 | 836 | 3124 / 3988 |
| AES-192 encrypt / decrypt | 2753 / 3809 | 940 | 3694 / 4750 |
| AES-256 encrypt / decrypt | 3219 / 4467 | 1088 | 4308 / 5556 |

The source's reported throughput and clock rate imply roughly 1,000 cycles per AES-128 block.
Its microprogram was not published, and this one is about 2.3 times slower. Two costs account
for most of the gap:

- The controller spends one clock on each level change.
- MixColumns takes 36 operations per column.

Decryption costs more than encryption because of the InvMixColumns pre-step.

## What follows the source design and what does not

These parts follow it:

- the block structure of the datapath and the register-file map;
- the State row shift registers;
- the ModFlag/working-register multiply by x;
- the accumulator;
- the 10-entry Rcon table;
- the six program ROMs;
- the three-level controller: its ROM word formats and its 4/2/2-bit address counters;
- the instruction table (codes 0-28).

These are this design's own choices:

- the contents of every program and microcode ROM;
- the meaning of the Ctl fields;
- the numeric OutCode values;
- the two added microinstructions;
- the `new_key`/`byte_req`/`byte_out_valid`/`busy`/`done` handshake;
- the `bitmode` encoding;
- resettable flip-flops for the whole register file.

These points depart from, or resolve, the source description:

- **Working-register shift direction.** One passage describes a right shift; the MixColumns
  description needs the shift toward the MSB. The shift here goes toward the MSB.
- **Mux A inputs.** One passage lists only RD and the accumulator for mux A. The instruction
  table needs WR on it as well, and the block diagram shows a constant 00. Mux A has all four.
- **ModFlag and the controller.** The source says the controller reads a flag from ModFlag.
  Here nothing branches on it. ModFlag's 1b/00 byte goes straight to mux B, so the conditional
  XOR needs no decision in the sequencer, and the microprogram has no conditional jumps.
- **Control-word width.** One passage speaks of 19 control bits. The instruction table has 20
  columns, and this design uses 20.
- **Instruction count.** The source counts 32 instructions but lists 29. Two of the unlisted
  codes are the additions above, and one is unused.

## Simulating

Each testbench in `tb/` checks itself. At the end it prints
`TB_RESULT checks=N failures=M`. With plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/aes_pkg.sv tb/tb_aes_coprocessor.sv \
          --top-module tb_aes_coprocessor -Mdir obj && obj/Vtb_aes_coprocessor
```

`tb_aes_coprocessor` runs all six programs at the default configuration and checks them on
three kinds of run:

- the FIPS-197 Appendix C vectors;
- random blocks, where decrypting the encryption must give the block back;
- kept-key runs, which must match runs that load the key.

It also counts how often each microinstruction ran, including the multiply-by-x with and
without the 1b reduction, and fails if any of them never ran. It takes well under a second.

`tb_aes_random_keys` runs the same six programs on random keys and random blocks. It compares
every result with a plain behavioural AES model, written in the bench from the FIPS-197
definitions. For each key length it uses three keys. Each key encrypts and decrypts three
blocks: the first run loads the key, and the later runs keep it.

Every other module has its own bench (`tb_aes_<module>.sv`), which compares against models
written independently in the bench. The controller bench checks the exact stream of
operations and register-file addresses for three cases:

- loading for each key length;
- the first two key-expansion words;
- the start of decryption.

## Changing the microprogram

The round, column and byte ROMs are plain `case` tables. Each routine is labelled with a
comment, and each word carries a comment naming the routine it calls. Callers refer to
routines by start address. If you insert words into a ROM, update the addresses in the level
above. Also update the round codes and the `data_entry` indices in `aes_instruction_module`.
`tb_aes_controller` hard-codes the start addresses of seven round routines (`R_LOAD4/6/8`,
`R_LOADST`, `R_KX4`, `R_DEC_INIT`, `R_OUT`).
