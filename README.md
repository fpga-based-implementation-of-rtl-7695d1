# AES-256 encryption and decryption core

This core encrypts and decrypts 128-bit blocks with the Advanced Encryption
Standard (AES, FIPS-197) using a 256-bit key. It is written for an FPGA and is
iterative: one round per clock cycle, using one round datapath per direction
and a small memory of precomputed round keys. AES-256 runs 14 rounds. A block
therefore takes 15 clock cycles: one cycle for the initial key addition, then
14 cycles of rounds. A new key is expanded into its 15 round keys in 15 cycles.
One key then serves any number of blocks, in either direction.

The four AES transformations (SubBytes, ShiftRows, MixColumns, AddRoundKey)
and their inverses are separate modules. They are composed into a round, and
the round is iterated by a small controller. Each transformation can be
simulated and checked on its own.

## Structure

```
aes256_top
 ├─ aes_key_expansion      256-bit key  -> 15 round keys, one per cycle
 ├─ aes_round_key_ram      15 x 128-bit round key store (sync write, async read)
 └─ aes_cipher             state register + round counter + start/valid control
     ├─ aes_add_round_key  initial key addition
     ├─ aes_round          encryption round        (INVERSE = 0)
     └─ aes_round          decryption round        (INVERSE = 1)
         ├─ aes_sub_bytes  -> 16 x aes_sbox
         ├─ aes_shift_rows
         ├─ aes_mix_columns
         └─ aes_add_round_key
```

`aes_pkg` holds the shared types (`state_t`, `key256_t`, `mode_e`), the
AES-256 constants (Nr = 14, 15 round keys) and the GF(2^8) functions.

## How the state is laid out

All datapath signals are flat 128-bit vectors. Byte *n* of a block (n = 0 is
the first byte sent) sits in bits `[127-8n -: 8]`. In the AES state matrix it
is at row `n mod 4`, column `n div 4`, so the block fills the state column by
column. This order matches the byte strings in the AES standard, so its test
vectors can be written directly as 128-bit hex constants:
`128'h00112233...` has byte 0 = `00`.

Keys use the same convention. Byte 0 of the 256-bit key is in `key_i[255:248]`.
Round key 0 is `key_i[255:128]` and round key 1 is `key_i[127:0]`.

## The round

`aes_round` is purely combinational. The cipher registers its output every
cycle.

Encryption round (INVERSE = 0):

```
s' = AddRoundKey( MixColumns( ShiftRows( SubBytes(s) ) ), K_r )
```

In the final round (`last_i = 1`), MixColumns is bypassed by a multiplexer.

Decryption round (INVERSE = 1), in the plain inverse-cipher order of the
standard:

```
s' = InvMixColumns( AddRoundKey( InvSubBytes( InvShiftRows(s) ), K_r ) )
```

In the final round, InvMixColumns is bypassed. Because the order is the plain
inverse order, decryption reads the same round keys as encryption, in reverse.
No separately transformed "equivalent inverse cipher" keys are needed.

### S-box

The 256-entry S-box is not stored as a table. `aes_sbox` computes it:

- forward: `S(a) = affine(a^-1)`, with `a^-1 = a^254` in GF(2^8) modulo
  `x^8+x^4+x^3+x+1`. The affine map is
  `b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7) ^ c_i` with `c = 0x63`.
- inverse: `S^-1(a) = (affine^-1(a))^-1`. The inverse affine map is
  `b_i = a_(i+2) ^ a_(i+5) ^ a_(i+7) ^ d_i` with `d = 0x05`.

Synthesis folds these functions into an 8-input lookup per byte. This matches
what a ROM would give, but keeps the source free of number tables. Each
direction has 16 S-boxes, one per state byte.

### MixColumns

Each column is multiplied by the fixed matrix of the standard. The forward
matrix is the circulant of `02 03 01 01`. The inverse matrix is the circulant
of `0e 0b 0d 09`. The constant products are built from `xtime` (multiply by x)
and XOR only.

## Key schedule and round key memory

`aes_key_expansion` keeps a 256-bit window with the last eight schedule words
`w[i-8..i-1]`. Each cycle it writes one 128-bit round key into
`aes_round_key_ram`:

| cycle after load | address | written value |
|---|---|---|
| 1 | 0 | `key[255:128]` |
| 2 | 1 | `key[127:0]` |
| 3..15 | 2..14 | four new words `w[i..i+3]` |

For the new words, `temp` is
`SubWord(RotWord(w[i-1])) ^ Rcon` when the round key index is even, and
`SubWord(w[i-1])` when it is odd. This is the extra SubWord step that AES-256
has at `i mod 8 = 4`. Then `w[i] = w[i-8] ^ temp`, and each following word is
the XOR of the word eight positions back and the word just produced. The
window then slides by four words. Rcon starts at `01` and is doubled after
every even step. `busy_o` is high during the 15 writes. `key_valid_o` rises
after the last write and stays high until the next load.

The round key store is a 15 x 128-bit memory with a synchronous write and an
asynchronous read, like an FPGA distributed RAM. The cipher gives it the
address of the current round and gets that round's key in the same cycle. The
memory has no reset. The core does not report ready until the whole schedule
has been written.

## Controller and timing

`aes_cipher` has two states, IDLE and RUN.

- **IDLE**: `ready_o` is high. The round key address points at the initial
  key: key 0 to encrypt, key 14 to decrypt. A cycle with `start_i` high loads
  `data_i ^ K` into the state, latches `mode_i`, and sets the round counter
  to 1.
- **RUN**: each cycle applies one round with key `K_r` when encrypting, or
  `K_(14-r)` when decrypting. At round 14, `last` bypasses (Inv)MixColumns,
  the engine returns to IDLE, and `valid_o` pulses in the next cycle.

```
clk        : 0    1    2   ...  14   15
start_i    : 1
state      :      K0   R1  ...  R13  R14
valid_o    :                         1
ready_o    : 1    0    0   ...  0    1
```

The result stays on `data_o` until the next start. `ready_o` is already high
in the `valid_o` cycle, so blocks can follow each other every 15 cycles. A
text of *n* blocks takes `15n + 1` cycles, counting the cycle that sees the
last result. The direction may change from one block to the next.

## Top-level interface (`aes256_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key_load_i`, `key_i` | in | 1, 256 | load a cipher key; ignored while a block is in flight |
| `key_ready_o` | out | 1 | all 15 round keys are valid |
| `start_i`, `mode_i`, `data_i` | in | 1, 1, 128 | take a block; `mode_i` 0 = encrypt, 1 = decrypt; ignored unless `ready_o` |
| `ready_o` | out | 1 | key ready and engine idle |
| `valid_o`, `data_o` | out | 1, 128 | one-cycle result pulse; result block |

Typical use:

1. Pulse `key_load_i` and wait for `ready_o`. This takes 15 cycles.
2. Issue blocks with `start_i` whenever `ready_o` is high.
3. Collect the results on `valid_o`.

Padding and chaining modes (ECB, CBC, ...) are outside the core. The core
processes single blocks.

## Design choices and departures

The transformations, the key schedule and the round structure follow the AES
standard exactly. The following are choices of this implementation:

- **One round per cycle** with a shared state register. This trades
  throughput for area. A fully unrolled pipeline would take one block per
  cycle.
- **Round keys precomputed** into a single 15 x 128 memory. The alternative,
  expanding the key on the fly during each block, would need reverse
  expansion for decryption.
- **Computed S-boxes** instead of ROM tables. The function is the same.
- **Separate encryption and decryption rounds**, selected per block. Only
  one direction is active at a time.
- **Handshake**: start/ready/valid. The core ignores `key_load_i` while a
  block is in flight, and ignores `start_i` while the key schedule runs.
- **Reset**: synchronous and active-low. The round key memory is not reset.
- **Board I/O**: no board I/O or host interface is included. The top exposes
  plain signals.

Synthesis (generic, yosys coarse) gives roughly 15k word-level cells,
405 flip-flop bits and 1920 memory bits for the whole core. Most of the logic
is in the 32 datapath S-boxes and the 4 key-schedule S-boxes. No timing on a
particular FPGA has been measured.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `tb/aes_ref_pkg.sv`
is a reference model written in a different style from the RTL:

- S-box found by searching for the field inverse;
- matrix MixColumns;
- word-by-word key schedule.

The testbenches compare against this model and against published vectors of
the AES standard and of NIST SP 800-38A:

- AES-256 example: key `000102...1f`, plaintext `00112233...ff`, ciphertext
  `8ea2b7ca516745bfeafc49904b496089`;
- key expansion example key `603deb10...`: `w[8..11]` and `w[56..59]`;
- SP 800-38A ECB-AES256 block 1: `6bc1bee2...` -> `f3eed1bd...`;
- MixColumns column examples (`db 13 53 45 -> 8e 4d a1 bc`, ...).

| testbench | covers |
|---|---|
| `tb_aes_sub_bytes` | all 256 byte values in every lane, both directions, round trip |
| `tb_aes_shift_rows` | fixed permutation, random states, round trip |
| `tb_aes_mix_columns` | published columns, random states, round trip |
| `tb_aes_add_round_key` | XOR, zero key, self-cancelling |
| `tb_aes_round` | round 1 of the AES-256 example; normal and final rounds, both directions |
| `tb_aes_key_expansion` | published schedule words, random keys, 15-cycle timing, restart while busy |
| `tb_aes_round_key_ram` | fill, overwrite, write-enable low, write-edge timing |
| `tb_aes_cipher` | both examples, random blocks, 15-cycle latency, start ignored while busy |
| `tb_aes256_top` | end-to-end at default size: key loads, encrypt, decrypt, direction switches, ignored start/key load; every mechanism counted and required |
| `tb_aes256_text` | a 94-character ASCII message, padded to 6 blocks, encrypted and decrypted back to back at 15 cycles per block |

## Simulating

The package files must come first. For example, the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_aes256_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes256_top.sv
obj_dir/Vtb_aes256_top
```

Replace the testbench name to run another test. For lint, use
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/aes_pkg.sv rtl/aes256_top.sv`.
The RTL uses SystemVerilog packages, enums, generate loops and concurrent
assertions (round key address range, round counter range, write address
range). It contains no vendor primitives.
