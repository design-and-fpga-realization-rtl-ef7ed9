# Hybrid AES + ECC byte cipher with on-chip random keys

This is a small encryption core for an Artix-7 class FPGA board (Nexys A7:
100 MHz clock, slide switches, push buttons, 16 LEDs and an eight-digit
seven-segment display). It combines three things:

- a symmetric cipher: an 8-bit, ten-round AES-style block cipher;
- an asymmetric primitive: elliptic-curve point multiplication over the
  prime field GF(251);
- a hardware random number generator, so that session keys are made on the
  chip and never stored or loaded from outside.

One controller chooses between three modes:

| `algo_select` | mode   | what happens to the data byte |
|---|---|---|
| 0 | AES    | AES with the random 8-bit session key `k` |
| 1 | ECC    | XOR with the x coordinate of `Q = k·G` |
| 2, 3 | hybrid | ECC makes the key and AES encrypts: AES is keyed with `x(k·G)` |

Every width is one byte, so the whole design stays small. The design shows
how the pieces fit together and what they cost. It is **not** a secure
cipher: an 8-bit key, or a curve group of 271 points, can be searched
exhaustively in microseconds.

## Top level and data flow

```
          ring_osc (behavioural)          btn_step
               | taps (async)                |
          +----v---------------------+   button_debounce
          | hybrid_rng               |        | press
          |  sync -> rng_lfsr ->     |   display_view --> sevenseg_driver --> seg/an/dp
          |  vn_corrector ->         |        ^ pt / key / ct / decrypted
          |  chacha_mixer -> key_fifo|        |
          +----+---------------------+        |
               | key_out, key_avail           |
          key_strength (Hamming weight)       |
               |                              |
          +----v------------------------------+------+
          | crypto_controller                        |---> ciphertext_out, decrypted_out,
          +--+-------------+--------------------+----+     valid_out, generated_key, ...
             |             |                    |
     aes_key_expand    aes_enc / aes_dec     ecc_engine (fixed base point G)
                                                 |
                                              gf_arith (GF(251) add/sub/Montgomery mul/inverse)
```

`hybrid_crypto_top` wires all of this together. Its control and result
ports are named like the signals of the reference simulation:

- inputs: `plaintext_val[7:0]`, `algo_select[1:0]`, `enc_not_dec`,
  `start_crypto`, `rng_enable`;
- outputs: `ciphertext_out`, `decrypted_out`, `valid_out`,
  `generated_key`, `key_valid_out`, `key_strength_out[1:0]`, `busy_out`,
  `stored_ciphertext`.

The board side adds `btn_step`, `seg[6:0]`, `dp`, `an[7:0]` and `led[15:0]`.

Reset is synchronous and active high. All logic runs on the single clock
`clk`. The only asynchronous signals are the ring-oscillator taps, and each
one passes through a two-flop synchronizer.

## The 8-bit AES-style cipher

Standard AES works on a 4x4 matrix of bytes. Here the state is one byte, and
each AES step is reduced to its one-byte counterpart:

| step | encryption | decryption |
|---|---|---|
| SubBytes | FIPS-197 S-box `S` | inverse S-box |
| ShiftRows | the byte is viewed as a 2x2 array of 2-bit cells, and the second row is rotated: `{s[7:4], s[1:0], s[3:2]}` | the same swap (it is its own inverse) |
| MixColumns | multiply by {03} in GF(2^8) modulo x^8+x^4+x^3+x+1 | multiply by {f6}, the inverse of {03} |
| AddRoundKey | XOR with the round key `k[r]` | the same |

How the rounds run:

- Encryption is `k[0]` XOR, then rounds 1..9 (all four steps), then round 10
  without MixColumns, as in AES-128.
- Decryption runs the inverse steps in reverse order.
- The S-box is not a hand-typed table. A constant function in `crypto_pkg`
  computes it at elaboration: the inverse in GF(2^8) followed by the AES
  affine map. `aes_sbox` is therefore plain combinational logic.

**Key schedule** (`aes_key_expand`). This is the one-byte analogue of the
AES-128 word recurrence:

```
k[0] = key
k[r] = k[r-1] ^ S(rotl(k[r-1], 4)) ^ Rcon[r]      r = 1..10,  Rcon = 01 02 04 ... 36
```

It computes one round key per clock through its own S-box, so the ten round
keys are ready 10 clocks after `load`. The controller runs it only when the
AES key changes.

**Timing.**

- `aes_enc`/`aes_dec` run one round per clock.
- `done` is seen 11 clocks after the `start` pulse: 10 rounds plus the
  registered result.
- Through the controller, an AES operation with an unchanged key takes
  15 clocks from the start edge to `valid_out`.
- With a new key it takes 30 clocks, because the key fetch and the key
  expansion come first.

## The elliptic-curve engine

| item | value |
|---|---|
| field | GF(251) |
| curve | y² = x³ + x + 4 |
| base point | G = (0, 2) |
| group order | prime, 271 |

Because the order is prime and larger than 255, `k·G` is never the point at
infinity for any nonzero 8-bit scalar.

**Arithmetic unit** (`gf_arith`). One combinational unit does addition,
subtraction, inversion and Montgomery multiplication `a·b·R⁻¹ mod 251`:

- R = 256;
- P' = −251⁻¹ mod 256 = 205;
- R² mod 251 = 25, which is used to enter Montgomery form.

The multiply is an 8x8 product, an 8x8 reduction product, an add, a shift
and one conditional subtraction.

**Point multiplication** (`ecc_engine`):

- Left-to-right double-and-add, one scalar bit per iteration, in affine
  coordinates.
- A small microcode ROM drives the arithmetic unit, one field operation per
  clock:

  | routine | operations |
  |---|---|
  | IN | 3 |
  | DBL | 14 |
  | ADD | 11 |
  | OUT | 2 |

- The division inside DBL and ADD is one table look-up (`GF_INV` in
  `gf_arith`). The 256-entry table holds the inverse in Montgomery form,
  `v^249 · R² mod 251` (Fermat), and a constant function fills it at
  elaboration.
- Between routines, the control FSM handles the cases that affine formulas
  cannot: the running point at infinity, R = P, R = −P and y = 0.
- The result is `qx`, `qy`, `q_inf` and `q_ybit`, the parity of y. `qx`
  together with `q_ybit` is the compressed form of the point.
- Latency depends on the scalar: 31 clocks for k = 1, at most 206 clocks,
  and 167 clocks on average over the scalars 128..255.

## The random key generator

`hybrid_rng` runs continuously from reset, independent of the ciphers:

1. **`ring_osc`**: a 5-stage inverter ring, tapped at every second stage
   (3 taps).
   - This is a *behavioural model*. Each stage has a 310 ps delay plus up to
     60 ps of random jitter.
   - A real ring is a combinational loop that needs placement constraints
     on the FPGA.
2. **Synchronizers**: the taps go through two-flop synchronizers and are
   XORed into one entropy bit per clock.
3. **`rng_lfsr`**: a 16-bit Fibonacci LFSR with polynomial
   x^16+x^14+x^13+x^11+1.
   - It steps twice per clock, and the entropy bit is XORed into the first
     feedback.
   - It emits two raw bits per clock.
   - If the register ever becomes all zero, it reloads its seed 0xACE1.
4. **`vn_corrector`**: the Von Neumann rule, applied to one bit pair per
   clock. A pair 10 gives 1, 01 gives 0, and 00 or 11 gives no output.
5. **`chacha_mixer`**: four 8-bit words run the ChaCha quarter round, one of
   its four add-rotate-xor lines per clock.
   - The rotations are 4, 3, 2 and 1. These are ChaCha's 16, 12, 8 and 7
     scaled to bytes.
   - Every 4 clocks the Von Neumann bits gathered so far are XORed into
     word d, the LFSR byte into word c, and the byte `a ^ b` is emitted.
   - **Rate: one key byte every 4 clocks.**
6. **`key_fifo`**: 4 entries, first-word fall-through.
   - A byte that arrives while the FIFO is full is dropped, and `overflow`
     pulses. The generator never waits for a consumer, so this is normal.

**Key grading** (`key_strength`). This block grades the FIFO head by its
number of ones:

| grade | number of ones | meaning |
|---|---|---|
| 2 | 3..5 | inside the 35 %–65 % density window |
| 1 | 2 or 6 | marginal |
| 0 | other | weak |

The controller takes only grade-2 bytes. It skips weaker ones and pulses
`key_rejected` for each. About 71 % of random bytes pass.

## The controller and its key policy

`crypto_controller` starts an operation on a rising edge of `start_crypto`
while idle. It then walks through these states:

`IDLE → KEY → DISPATCH → (ECC_GO → ECC_WAIT) → (KLOAD → KWAIT) → AES_GO → AES_WAIT → DONE`

The key policy:

- **Encryption** uses `plaintext_val`.
- A fresh key is taken for an encryption when `rng_enable` is high, or when
  no key has been taken yet. With `rng_enable` low, the held key is reused.
  This is how a demonstration run keeps one key for many bytes.
- **Decryption** always uses the held key and the ciphertext kept in
  `stored_ciphertext`. It therefore undoes the last encryption.
- In hybrid mode, the AES key is `x(k·G)`. The round keys are expanded
  again only if that value differs from the key already expanded.

Only one engine is started at a time. Assertions in the controller check
that the AES cores and the ECC engine never run together.

Outputs:

- `valid_out` pulses for one clock when the result is registered.
- `key_valid_out` pulses when a new key is taken.
- `generated_key` and `key_strength_out` show the session key and its
  grade.

## Display and LEDs

**Display.** `btn_step`, debounced for 10 ms (1,000,000 clocks), moves
through four pages. Each page shows a two-letter label and one byte:

| page | label | byte shown |
|---|---|---|
| 0 | `Pt` | plaintext |
| 1 | `Ay` | key: the AES session key after AES, `x(k·G)` after ECC or hybrid |
| 2 | `Ct` | ciphertext |
| 3 | `dP` | decrypted byte |

- The label and byte fill the right-hand four digits, for example `Ct7F`.
- The left four digits are fully lit (`8888`).
- `sevenseg_driver` scans the 8 digits with active-low anodes and cathodes
  (`seg[0]` = segment a).
- Each digit is lit for 2^14 clocks, giving a refresh of about 763 Hz per
  frame.

**LEDs.** All 16 LEDs light once an AES encryption has finished. Otherwise
they show:

| LEDs | meaning |
|---|---|
| 15 | busy |
| 14 | AES busy |
| 13 | ECC busy |
| 12 | key bytes available |
| 11:10 | key grade |
| 9:8 | last mode |
| 7:0 | stored ciphertext |

## Where this design departs from its source description

The architecture follows a published description of this system. That
description leaves most of the internals open and in places contradicts
itself. Points to know:

- **Block and key size.** One passage speaks of a 128-bit block and key
  schedule. Elsewhere the core is called 8-bit, one 8-bit encryption takes
  ten clocks, and all simulated signals are 8 bits wide. This design is
  8-bit throughout.
- **Byte-level round functions** (ShiftRows, MixColumns, the key schedule)
  are not specified there. The ones above are this design's. As a result,
  ciphertext values published for the original (for example in its
  simulation with key 0x36) are not reproduced.
- **S-box storage.** The source mentions block RAM for the S-box, but also a
  purely combinational S-box path. A one-round-per-clock core needs the
  combinational read, so the S-box is built as logic.
- **ECC latency.** About 160 clocks per point multiplication is reported.
  This engine averages 167 clocks over full 8-bit scalars, with a maximum of
  206. It gets there with a one-clock inversion table; Fermat inversion
  through the multiplier would have cost 12 clocks per inversion, giving up
  to 360 clocks.
- **Curve, base point, field encoding and how an ECC result encrypts a
  byte** are not given. The curve and G above are this design's. So are the
  XOR mask (ECC mode) and the use of `x(k·G)` as the AES key (hybrid mode).
- **Key freshness.** The source says that no two encryptions reuse key
  material, but its own simulation keeps one key across many encryptions.
  The `rng_enable` input selects between the two behaviours.
- **Generator internals.** These are all this design's choices: the LFSR
  width and polynomial, the oscillator size, the synchronizers, the mixer
  structure and the FIFO depth. The source gives only the chain of blocks
  and the 4-clock byte rate.
- **Not built:**
  - The "shared bus" between engines is point-to-point start/done/data
    wiring.
  - The statistical evaluation runs 6 of the 15 NIST SP 800-22 tests (see
    `tb_hybrid_rng`), not the whole suite.
  - FPGA resource, timing and pin figures were not reproduced. The top
    brings out more pins than a 38-pin board build, because the simulation
    signals are ports too.
- **Display labels.** A results table there pairs the `Pt` photograph with
  random key generation and the `dP` photograph with the hybrid mode. Here
  each label names the value shown, following the described page order:
  plaintext, key, ciphertext, decrypted.
- **Display.** The source mentions both a four-digit and an eight-digit
  display. The board photographs show eight digits with `8888` on the left
  half, and that is what is built.

## Files

All modules are in `rtl/`:

| file | contents |
|---|---|
| `crypto_pkg.sv` | shared types (`algo_e`, `glyph_e`, `round_keys_t`), GF(2^8) functions, S-box generator, curve constants |
| `aes_sbox`, `aes_key_expand`, `aes_enc`, `aes_dec` | the cipher |
| `gf_arith`, `ecc_engine` | the curve arithmetic |
| `ring_osc`, `rng_lfsr`, `vn_corrector`, `chacha_mixer`, `key_fifo`, `key_strength`, `hybrid_rng` | the key generator |
| `crypto_controller` | mode control |
| `button_debounce`, `display_view`, `sevenseg_driver` | board I/O |
| `hybrid_crypto_top` | the top level |

Top-level parameters:

| parameter | default | purpose |
|---|---|---|
| `DEBOUNCE_CYCLES` | 1,000,000 | button debounce time |
| `REFRESH_BITS` | 17 | display scan counter width |
| `FIFO_DEPTH` | 4 | key FIFO entries |
| `RO_STAGES` | 5 | ring-oscillator stages |

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one
compares the block against independent reference models in
`tb/tb_ref_pkg.sv`:

- bit-serial GF(2^8) arithmetic and a brute-force inverse S-box;
- point multiplication by repeated addition;
- bit-level LFSR, Von Neumann and quarter-round models.

Each testbench prints `TB_RESULT checks=N failures=M`. Build and run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/crypto_pkg.sv tb/tb_ref_pkg.sv tb/tb_aes_enc.sv --top-module tb_aes_enc
./obj_dir/Vtb_aes_enc
```

Notable testbenches:

- **`tb_hybrid_crypto_top`** runs the complete design at its default
  parameters, in about 10 s of simulation.
  - It performs 48 encrypt/decrypt pairs over all modes, with fresh and
    held keys.
  - It counts every mechanism and fails if one never occurred: weak-key
    skips, FIFO overflow, key expansion run and skipped, the all-LED
    state, and display paging.
- **`tb_fig1_sequence`** replays a demonstration run: key 0x36 (grade 2),
  with the bytes a6 5a ff 00 a6 a7 a4 a2 ae 0f f0 aa encrypted and
  decrypted in AES and then ECC mode.
- **`tb_hybrid_rng`** collects 20,000 generator bits and applies six
  NIST SP 800-22 tests at the 0.01 level: frequency, block frequency,
  runs, serial, approximate entropy and cumulative sums. It also checks the 4-clock byte
  rate.
- **`tb_ecc_engine`** checks every nonzero scalar and reports the latency
  range.

The ring-oscillator delays are written in the default 1 ps time unit.
Testbenches that include the oscillator therefore toggle the clock every
`#5000` (100 MHz). Purely synchronous testbenches use a shorter period,
which does not change their cycle-level results.
