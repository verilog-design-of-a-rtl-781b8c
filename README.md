# UTM-Crypto256: an AES-256 / AES-128 crypto processor core

This core encrypts and decrypts 128-bit blocks with the Advanced Encryption
Standard (FIPS-197). It is built for an FPGA inside a system-on-chip. Its main
key length is 256 bits (AES256, 14 rounds). It also runs 128-bit keys (AES128,
10 rounds).

The design rests on three ideas:

- **The key schedule is computed once and kept on chip.** A word-serial key
  expander writes all round keys into a small key RAM. After that, any number
  of blocks can be processed with that key. Encryption reads the RAM from row
  0 upward. Decryption reads it from row Nr downward. So decryption needs no
  separate "inverse key schedule" hardware.
- **One full round per clock.** A single round datapath sits around a 128-bit
  state register and is reused for every round. It does ShiftRows+SubBytes,
  MixColumns and AddRoundKey in one clock.
- **The S-box is arithmetic, not a table.** Each of the 20 S-box instances (16
  in the datapath, 4 in the key expander) computes the inverse in GF(2^8)
  through the composite field GF((2^4)^2). A small GF(2^4) inverter, squarer
  and multiplier do the work. The same unit does SubByte and InvSubByte.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). Lint is clean apart
from one style note (see "Known tool messages").

## Block hierarchy

```
utm_crypto256               top: ports, wiring
├── aes256_cu               control FSM, handshakes, counters, key RAM read row
├── key_gen_256             key expander, one key word per clock
│   ├── reg_32 x8           window of the last eight key words
│   └── key_module          w[i] = w[i-Nk] ^ f(w[i-1]), RotWord as rewiring
│       ├── sbox_word       SubWord = 4 x sub_byte
│       └── rcon            round constant
├── key_ram                 15 x 128-bit round keys, word write, row read
└── aes_transformer         state register + one round of logic
    ├── shift_sub_byte      (Inv)ShiftRows + (Inv)SubBytes, 16 x sub_byte
    ├── add_round_key x2    XOR with the round key
    └── mix_column_128      (Inv)MixColumns
        └── mix_column_word x4
            └── mix_column_byte x4
                └── xtime x12

sub_byte                    composite-field S-box
├── gf4_squarer, gf4_multiplier, gf4_inverter
```

`aes_pkg` holds the shared types: the `aes_spec_e` and `aes_mode_e` enums,
the two control-vector structs and the `num_rounds()` / `num_key_words()`
helpers.

## Using the core

### Ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `key_in` | in | 256 | cipher key. An AES128 key goes in `key_in[255:128]`. |
| `aes_spec` | in | 1 | 0 = AES256, 1 = AES128. It is sampled with the key. |
| `key_valid` / `key_ready` | in / out | 1 | key handshake |
| `key_loaded` | out | 1 | high when the round keys for the last accepted key are complete |
| `data_in` | in | 128 | plaintext or ciphertext |
| `mode` | in | 1 | 0 = encrypt, 1 = decrypt. It is sampled with the block. |
| `din_valid` / `din_ready` | in / out | 1 | block handshake |
| `data_out` | out | 128 | result; valid while `dout_valid` is high |
| `dout_valid` / `dout_ready` | out / in | 1 | result handshake |

Each channel is valid/ready. A transfer happens on a rising edge where both
signals are high. Once the source raises valid, it must hold valid until the
transfer happens. `aes256_cu` checks these rules with assertions.

- `key_ready` is high whenever the core is idle.
- `din_ready` is high when the core is idle, a key schedule is loaded, and no
  key is being offered. So a key offered in the same cycle as a block wins.
  The block waits until the new schedule is ready.
- A new key can be loaded between any two blocks.

### Byte order

Byte 0 of a block or key in FIPS-197 notation is the most significant byte of
the bus. For example, the FIPS-197 plaintext `00112233...eeff` is
`data_in = 128'h00112233445566778899aabbccddeeff`. Inside the state, column
`c` is `bits[127-32c -: 32]`. Row `r` of a column is the byte at
`[31-8r -: 8]` within that word.

### Timing

| event | AES256 | AES128 |
|---|---|---|
| key accepted → `key_loaded` | 1 + 60 clocks | 1 + 44 clocks |
| block accepted → `dout_valid` | 15 clocks (Nr+1) | 11 clocks |
| back-to-back rate, with `dout_ready` held high | 16 clocks/block | 12 clocks/block |

The block latency breaks down as one clock for the initial AddRoundKey (done
in the same clock the block is accepted) and Nr clocks for the rounds. The
result is then held until `dout_ready`. The FSM goes back to idle on the
clock that hands the result over, so the next block can be accepted on the
next clock. That gives Nr+2 clocks per block.

## Key expansion and the key RAM

`key_gen_256` makes key word `w[i]` for `i = 0 .. 4(Nr+1)-1`, one word per
clock. It writes each word straight into `key_ram` at row `i/4`, column
`i mod 4`. Words `0 .. Nk-1` are the cipher key itself, latched when the key
is accepted. Every later word comes from `key_module`:

```
w[i] = w[i-Nk] ^ SubWord(RotWord(w[i-1])) ^ Rcon[i/Nk]   if i mod Nk == 0
w[i] = w[i-Nk] ^ SubWord(w[i-1])                          if Nk == 8 and i mod 8 == 4
w[i] = w[i-Nk] ^ w[i-1]                                   otherwise
```

Eight `reg_32` registers form a shift window holding `w[i-1] .. w[i-8]`.
`w[i-Nk]` is tap 7 for AES256 and tap 3 for AES128. The control unit supplies
the word index `idx` and the key length. The expander decodes `i mod Nk` and
`i / Nk` from them with bit slices, since Nk is 4 or 8.

`key_ram` holds 15 rows of 128 bits, enough for AES256. AES128 uses rows 0 to
10. The write port takes one 32-bit word. The read port is asynchronous and
returns a whole round key. This lets the control unit pick the round key in
the same clock that the round uses it. On an FPGA this maps to distributed
(LUT) RAM or to registers. A block-RAM version would need one clock of read
latency, which means fetching the address one clock earlier.

## The round datapath (`aes_transformer`)

The state register is loaded by one of four operations. `ctrl.load` and
`ctrl.round` come from the control unit. `ctrl.last` marks round Nr.

| operation | next state |
|---|---|
| load (block accepted) | `data_in ^ rk` |
| encrypt round | `MixColumns(ShiftSub(state)) ^ rk` |
| decrypt round | `InvMixColumns(InvShiftSub(state) ^ rk)` |
| last round (both modes) | `(Inv)ShiftSub(state) ^ rk` |

Decryption is the plain FIPS-197 inverse cipher. In its rounds AddRoundKey
comes before InvMixColumns. That is why the unmodified round keys can be used
in reverse order. The "equivalent inverse cipher" would need InvMixColumns
applied to the stored keys.

To serve both orders without a combinational loop, there are two XOR banks:

- `u_ark1` acts before MixColumns. It is used for the load, for decryption
  rounds and for the last round.
- `u_ark2` acts after MixColumns. It is used for encryption rounds.

ShiftRows and SubBytes both act byte by byte, so `shift_sub_byte` merges
them. Output byte (r, c) is `S(in(r, c+r mod 4))` when encrypting, and
`S^-1(in(r, c-r mod 4))` when decrypting.

`mix_column_byte` computes one output byte of a column from the bytes of the
column's four rows, rotated so that `a` is its own row. Encryption computes
`{02}a ^ {03}b ^ c ^ d`. Decryption computes
`{0e}a ^ {0b}b ^ {0d}c ^ {09}d`. Each input passes through a chain of three
`xtime` units, which gives its {02}, {04} and {08} multiples. Every
coefficient is an XOR of those multiples and the input itself.

## The composite-field S-box (`sub_byte`)

The S-box is `affine(x^-1)` in GF(2^8) with the AES polynomial
x^8+x^4+x^3+x+1. InvSubByte is `(affine^-1(x))^-1`. The inverse is the
expensive part. Here it is done in a tower field.

1. **Sub-field.** GF(2^4) uses polynomial x^4+x+1.
   - `gf4_multiplier` forms the 7-bit carry-less product. It then folds bits
     6..4 back with x^4 = x+1.
   - `gf4_squarer` is linear: y3 = a3, y2 = a1^a3, y1 = a2, y0 = a0^a2.
   - `gf4_inverter` is a 16-entry table.
2. **Extension.** GF(2^8) ≅ GF(2^4)[y]/(y^2 + y + λ) with λ = {1110}. An
   element is a pair (ah, al), meaning ah·y + al. Its inverse is
   ```
   d  = λ·ah² ^ ah·al ^ al²          (in GF(2^4))
   ah' = ah · d^-1
   al' = (ah ^ al) · d^-1
   ```
   This needs two squarers, four multipliers (one by the constant λ) and one
   4-bit inverter.
3. **Change of basis.** An 8x8 bit matrix `ISO` maps an AES-field byte into
   the (ah, al) form. `INV_ISO` maps it back. Column i of `ISO` is g^i, where
   g is a root of the AES polynomial in the tower field. The matrices are
   written in `sub_byte.sv` as one row mask per output bit. To use a
   different λ or sub-field polynomial, recompute both matrices the same way.
4. **Modes.** In encryption mode the affine transform (constant 63) follows
   the mapping back. In decryption mode the inverse affine transform
   (constant 05) comes before the mapping in, and the result goes out
   directly. One inverter serves both directions.

## Control unit (`aes256_cu`)

| state | what happens | leaves when |
|---|---|---|
| `S_IDLE` | `key_ready`=1. `din_ready`=1 if a schedule is loaded and no key is offered. The key RAM row is set to 0 (encrypt) or Nr (decrypt) ahead of a block. | key accepted → `S_KEYEXP`; block accepted → `S_ROUND` |
| `S_KEYEXP` | `ke_ctrl.en`=1, `idx` = counter 0 .. 4(Nr+1)-1 | last word → `S_IDLE`, `key_loaded`=1 |
| `S_ROUND` | `tr_ctrl.round`=1, counter r = 1..Nr, RAM row r or Nr−r, `last` at r = Nr | r = Nr → `S_DONE` |
| `S_DONE` | `dout_valid`=1 | `dout_ready` → `S_IDLE` |

The key length and the mode are latched when their transfer happens. Changing
`aes_spec` or `mode` later has no effect on work already in progress.

## Verification

Every module has its own self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. The expected values come from
`tb/aes_ref_pkg.sv`, a behavioural AES model written straight from the
FIPS-197 definitions. Its S-box comes from an exhaustive inverse search and
the affine map, not from the composite field. Known answers from FIPS-197
Appendices A–C are also checked:

- key expansion: last words b6630ca6 (AES128) and 706c631e (AES256)
- the Appendix B round-1 intermediate values and ciphertext
- C.1 / C.3: `69c4e0d8...` and `8ea2b7ca...`

System-level tests:

- `tb_utm_crypto256` drives the core as a host would. It uses random keys and
  blocks of both lengths in both directions, with random result back-pressure.
  It checks key-expansion time and block latency. It counts the mechanisms it
  saw and fails if any never occurred: AES256 and AES128 expansion,
  encryption, decryption, key reuse, mode switch under one key, output stall,
  and a key and a block offered together.
- `tb_stream_workload` streams 32 blocks each way for each key length and
  checks the rate of 16 or 12 clocks per block.

Both run the top at its default parameters. Each finishes in well under a
second.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_utm_crypto256.sv --top-module tb_utm_crypto256
./obj_dir/Vtb_utm_crypto256
```

## Design choices and limits

What follows the original design:

- The 256-bit key with 128-bit blocks, and AES128 as a second mode selected
  by `aes_spec` (0 = AES256, 1 = AES128).
- Key expansion into a key RAM that is read forward for encryption and in
  reverse for decryption.
- The breakdown into the blocks above.
- The composite-field S-box built from inverter, squarer and multiplier
  circuits.

Choices made in this RTL, where no detail was available:

- the port list and valid/ready handshakes, and key priority over data
- asynchronous active-low reset
- the byte order on the buses, and the placement of a 128-bit key in the
  upper half of `key_in`
- word-serial expansion timing
- the key RAM organisation, with a word write port and an asynchronous read
  port
- one round per clock, with combinational AddRoundKey
- the FSM states
- the field constants (x^4+x+1, λ = {1110}) and the basis-change matrices

Limits:

- AES192 is not supported.
- There is no pipelining. One block is in flight at a time.
- There are no countermeasures against side channels.
- Key material stays in `key_ram` and in the expander until it is
  overwritten. There is no zeroisation.
- The RAM array has no reset. `key_loaded` guards reads of it.

## Known tool messages

Verilator reports `SYNCASYNCNET` on `rst_n`. The reset is asynchronous for
the flip-flops. The same signal is also used in `disable iff` of the handshake
assertions, which Verilator counts as a synchronous use. This is harmless and
has no effect on synthesis.
