# AES coprocessor for a processor with custom instructions

A small processor running AES entirely in software spends most of its time
in SubBytes and MixColumns; a full hardware AES engine is fast but large.
This design sits between the two. It is an AES-128/192/256 unit that a
processor drives through a single custom instruction: software keeps the
control flow, and the hardware does as much of each round as the chosen
configuration provides. Parameters select how the S-box is built (stored
table or composite-field logic), how many S-boxes work in parallel (1, 4, 8
or 16) and whether MixColumns and ShiftRows+AddRoundKey exist in hardware at
all. Round keys are computed once per cipher key, with the same kind of S-box
as the datapath, and stored in a round-key memory.

## Block diagram

```
               ci_start, ci_n, ci_dataa, ci_datab          ci_done, ci_result
                              |                                   ^
                    +---------v-----------------------------------+------+
 aes_coprocessor    |  instruction decode, key / key-length registers   |
                    +----+-------------------------------+--------------+
                         |                               |
                 +-------v------+   words    +-----------v-------------------+
                 |  key_expand  |----------->|  roundkey_ram  60 x 32 bit    |
                 |  4 x aes_sbox|            |  read: round-key register     |
                 +--------------+            +-----------+-------------------+
                                                         | rk
                 +---------------------------------------v-------------------+
      aes_core   |  state register = byte shift register                     |
                 |   head NUM_SBOX bytes -> aes_sbox x NUM_SBOX -> tail        |
                 |  shift_rows_ark -> 4 x mix_columns -> XOR round key        |
                 +-----------------------------------------------------------+
```

`aes_sbox` is either `sbox_table` or `sbox_gf`, fixed by `SBOX_KIND`.

## The round datapath (`aes_core`)

The 128-bit state holds the 4x4 byte matrix column by column, in the order
of FIPS-197: byte `s[r][c]` is at bits `[127 - 8*(4c + r) -: 8]`.

The state register is also the shift register that feeds the S-boxes. Each
clock of SubBytes takes the `NUM_SBOX` leading bytes, passes them through the
S-boxes and appends the results at the tail. After `16/NUM_SBOX` clocks every
byte has been substituted once and the bytes are back in their places. The
number of S-boxes therefore trades area for SubBytes time without changing
anything else.

One further clock finishes the round, all in combinational logic:

| direction  | round step clock                                                        |
|------------|-------------------------------------------------------------------------|
| encryption | ShiftRows, MixColumns, XOR round key r (MixColumns skipped in round Nr) |
| decryption | InvShiftRows, XOR round key r, InvMixColumns (skipped for round key 0)  |

Decryption runs InvSubBytes before InvShiftRows. The two commute, since one
works on bytes and the other only moves them. A whole block starts with one
clock that fetches the first round key and one clock of AddRoundKey (key 0
for encryption, key Nr for decryption):

```
block latency = Nr * (16/NUM_SBOX + 1) + 3 clocks   (start high -> done high)
              = 53 for AES-128 with 4 S-boxes, 23 with 16 S-boxes, 173 with 1
```

Single steps are available too: SubBytes (`16/NUM_SBOX + 1` clocks), and
ShiftRows, ShiftRows+AddRoundKey, MixColumns and AddRoundKey (3 clocks
each, one of them fetching the round key), all with an inverse flag. With these, software can run any mix of
hardware and software round steps.

## The S-boxes

`sbox_table` (TSBOX) is a pair of 256-byte read-only tables, the forward and
the inverse S-box. Their contents are computed during elaboration by
functions in `aes_pkg` (inverse in GF(2^8) as a^254, then the affine
transform), so no data file is needed.

`sbox_gf` (GSBOX) builds no table. It maps the byte into the composite field
GF((2^4)^2), where an element is `a_h*x + a_l` with 4-bit halves, and
inverts it there:

```
(a_h x + a_l)^-1 = (a_h * d) x + (a_h ^ a_l) * d
d = (a_h^2 * {e}  ^  a_h * a_l  ^  a_l^2)^-1          n(x) = x^2 + x + {e}
```

- **Mapping `delta`:** this fixed XOR network gives the halves from the byte
  bits, with `aA = a1^a7`, `aB = a5^a7` and `aC = a4^a6`:
  - `a_l = {a2^a4, aA, a1^a2, aC^a0^a5}`
  - `a_h = {aB, aB^a2^a3, aA^aC, aC^a5}`
- **Square times `{e}`:** the square and the multiply by `{e}` are merged
  into four XORs (`sq_lambda4` in `aes_pkg`).
- **GF(2^4) inverse:** computed as a^14.
- **Ground field:** GF(2^4) is reduced by x^4 + x + 1. Under this polynomial,
  `delta` is a field isomorphism.
- **Mapping back:** `delta^-1` is the matrix inverse of `delta`. The forward
  affine transform comes after it.

The inverse S-box uses the same inverter: the inverse affine transform comes
first and no affine transform after.

## Key pre-computation (`key_expand`, `roundkey_ram`)

After the key length and the cipher key are loaded, `CI_KEY_EXPAND`
produces one 32-bit key word per clock:

- Words 0..Nk-1 are the cipher key itself.
- Every later word is `w[i-Nk] ^ f(w[i-1])`. Here f is
  `SubWord(RotWord()) ^ Rcon` when `i mod Nk = 0`. For AES-256 it is
  `SubWord()` when `i mod Nk = 4`. Otherwise it is the identity.
- A window of the last eight words supplies `w[i-1]` and `w[i-Nk]`.
- Four S-boxes of the configured kind form SubWord.
- Rcon is a register advanced by xtime.

The 44, 52 or 60 words go into a 60 x 32-bit memory. It is written one word
at a time and read as a whole 128-bit round key by round number. The read
is registered. Its output register is the datapath's round-key register,
so the memory can be a synchronous RAM. The datapath fetches the next
round's key while SubBytes is still running, so only the first key of a
block costs an extra clock.

Pre-computing costs 4*(Nr+1) clocks once per key. In exchange, decryption
can start at the last round key at once, and the datapath needs no key
logic of its own.

## Custom-instruction interface (`aes_coprocessor`)

All operations share one instruction. `ci_n` selects the operation;
`ci_dataa` and `ci_datab` are the processor's two register operands. Protocol:
`ci_start` high for one clock with the operands valid; `ci_done` high for one
clock with `ci_result` when finished; the next `ci_start` may follow in the
next clock. Issuing while an instruction is pending breaks an assertion.

| `ci_n` | name            | operands                                    | clocks (start -> done) |
|-------:|-----------------|---------------------------------------------|------------------------|
| 0      | `CI_SET_KEYLEN` | a[1:0]: 0 = 128, 1 = 192, 2 = 256 bit        | 1 |
| 1      | `CI_WR_KEY`     | a[2:0] key word (0 = most significant), b = word | 1 |
| 2      | `CI_KEY_EXPAND` | -                                           | 4*(Nr+1) + 2 |
| 3      | `CI_WR_STATE`   | a[1:0] word (0 = first column), b = word    | 1 |
| 4      | `CI_RD_STATE`   | a[1:0] word; result = word                  | 1 |
| 5      | `CI_ENCRYPT`    | -                                           | Nr*(16/NUM_SBOX+1) + 4 |
| 6      | `CI_DECRYPT`    | -                                           | Nr*(16/NUM_SBOX+1) + 4 |
| 7      | `CI_SUBBYTES`   | a[0] inverse                                | 16/NUM_SBOX + 2 |
| 8      | `CI_SR_ARK`     | a[0] inverse, b[3:0] round                  | 4 |
| 9      | `CI_MIXCOL`     | a[0] inverse                                | 4 |
| 10     | `CI_ARK`        | b[3:0] round                                | 4 |
| 11     | `CI_SHIFTROWS`  | a[0] inverse                                | 4 |

`ci_result` is 0 on success. It is `0xFFFFFFFF` for an unknown opcode, or for
an operation whose unit was left out by `HW_MIXCOL = 0` or `HW_SR_ARK = 0`.
Whole blocks need both units. AES-128 with a key loaded takes 46 clocks to
expand. After that, each block costs 4 writes, a 54-clock `CI_ENCRYPT` and 4
reads. If every instruction is issued in the clock after the previous one
finishes, that is 71 clocks per block. A run of 32 blocks then takes 2272
clocks; the end-to-end testbench measures this.

A typical split with MixColumns in software and the rest in hardware:

```
CI_ARK(0); for r = 1 .. Nr-1: CI_SUBBYTES; CI_SHIFTROWS;
    read 4 words, MixColumns in software, write 4 words; CI_ARK(r)
CI_SUBBYTES; CI_SR_ARK(Nr)
```

## Parameters

| parameter   | default | meaning |
|-------------|---------|---------|
| `SBOX_KIND` | `GSBOX` | `TSBOX` stored tables, `GSBOX` composite-field logic (all S-boxes, key schedule included) |
| `NUM_SBOX`  | 4       | S-boxes in the datapath: 1, 4, 8 or 16 |
| `HW_MIXCOL` | 1       | build the MixColumns unit |
| `HW_SR_ARK` | 1       | build the ShiftRows + AddRoundKey unit |

These four correspond to the design space of the original hardware/software
study. That study also has a pure software S-box option, which needs no
hardware and so has no parameter value here. The defaults are a mid-point
chosen for this RTL; the study names no preferred configuration.

## Where this RTL makes its own choices

The following are decisions of this implementation, not taken from the
design it follows:

- the opcode set, operand layout, handshake and all cycle counts;
- the byte-serial wiring of the shift register and S-boxes;
- the decryption datapath and the inverse modes of the units;
- the word-serial key schedule;
- the round-key memory ports;
- asynchronous active-low reset.

The composite-field mapping, the `{e}` extension polynomial, the merged
square-times-`{e}` logic, the parameter set and the pre-computation of round
keys follow the design as described. The alternatives it only discusses are
not built: on-the-fly key generation, and T-tables that merge SubBytes and
MixColumns. The processor, its memory and the board peripherals are outside
this RTL. The `ci_*` ports are where a processor attaches.

## Files

| file | content |
|------|---------|
| `rtl/aes_pkg.sv` | types, opcodes, GF(2^8)/GF(2^4) functions, S-box table generation |
| `rtl/aes_coprocessor.sv` | top: custom-instruction decode, key registers |
| `rtl/aes_core.sv` | round datapath and controller |
| `rtl/aes_sbox.sv` | selects `sbox_table` or `sbox_gf` |
| `rtl/sbox_table.sv`, `rtl/sbox_gf.sv` | the two S-box implementations |
| `rtl/mix_columns.sv` | (Inv)MixColumns of one column |
| `rtl/shift_rows_ark.sv` | (Inv)ShiftRows + AddRoundKey |
| `rtl/key_expand.sv`, `rtl/roundkey_ram.sv` | round-key pre-computation and memory |
| `tb/aes_ref_pkg.sv` | independent software AES model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_aes_configs` |

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if
something hangs. Reference values come from `tb/aes_ref_pkg.sv`, which builds
its S-box from exponent and logarithm tables and is written apart from the
RTL. The tests also use the published FIPS-197 vectors: the Appendix C
cipher text for each key length, the Appendix B example, and the last key
word of each Appendix A key expansion.

- **`tb_sbox_gf`, `tb_sbox_table`:** all 256 inputs, forward and inverse.
- **`tb_mix_columns`, `tb_shift_rows_ark`, `tb_roundkey_ram`:** known cases
  and random data.
- **`tb_key_expand`:** every word for all three key lengths, plus the
  clock count.
- **`tb_aes_core`:** whole blocks against a model key memory, every single
  step, and the cycle counts.
- **`tb_aes_coprocessor`:** end-to-end, with default parameters:
  - all three key lengths;
  - 32 AES-128 blocks encrypted back to back and decrypted again;
  - blocks run by single steps, once with MixColumns done by the testbench;
  - an unknown opcode.

  It counts each of these and fails if one never happened.
- **`tb_aes_configs`:** five instances in parallel: table and logic S-boxes;
  1, 8 and 16 S-boxes; each hardware unit left out.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_aes_coprocessor \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/tb_aes_coprocessor.sv
./obj_dir/Vtb_aes_coprocessor
```

All of them finish in well under a second of simulation time. The RTL uses
no vendor primitives: the S-box tables and the round-key memory are plain
arrays, which synthesis maps to ROM/LUTs and registers or RAM.
