# Secure speech link: G.711 mu-law coding with AES-128

This design carries telephone speech over an untrusted link. Each 14-bit PCM
sample is compressed to an 8-bit G.711 mu-law code; sixteen codes make one
128-bit block, which is encrypted with AES-128. At the far end the block is
decrypted, split back into codes and expanded to 14-bit PCM. Both ends are in
one top module, `speech_crypto_top`, with the ciphertext brought out on a port
so the link can be observed (or cut and routed elsewhere).

```
sample ──► mulaw_encoder ──► packer (16 codes) ──► aes_encrypt ──► link ──► aes_decrypt ──► unpacker ──► mulaw_decoder ──► out_sample
                                                       ▲                        ▲
                                             aes_key_expansion (tx)   aes_key_expansion (rx)
                                                       └──────── key ───────────┘
```

The codec and cipher algorithms are the standard ones (G.711 mu-law, FIPS-197
AES-128). The surrounding choices — block packing, handshakes, one round per
clock, two key schedules — belong to this implementation and are listed in
"Design choices" below.

## Mu-law coding (mulaw_encoder, mulaw_decoder)

A linear sample has 14 bits (two's complement, -8192..8191). Mu-law keeps
about 5 bits of precision at every level by using steps that double in width
from one chord (segment) to the next:

1. Split into sign and magnitude. Limit the magnitude to 8158.
2. Add a bias of 33. The biased magnitude is 33..8191, a 13-bit value whose
   leading one is at bit 5 or higher.
3. The chord `s` (0..7) is the position of that leading one minus 5. The encoder
   finds it with a priority search from bit 12 down.
4. The step is the 4 bits just below the leading one. The bits below those are
   dropped.
5. Send `~{sign, chord, step}`. Silence becomes `8'hFF`, and positive samples
   have bit 7 set.

The decoder inverts the code. It then rebuilds the biased magnitude as the bit
pattern `1 step 1` shifted left by the chord:

| chord | biased magnitude (bits 12..0) |
|-------|-------------------------------|
| 0 | `0000000 1 abcd 1` |
| 1 | `000000 1 abcd 1 0` |
| ... | ... |
| 7 | `1 abcd 1 0000000` |

The trailing `1` puts the result in the middle of the interval the encoder
collapsed. Removing the bias and applying the sign gives the sample. As a
result, encode-then-decode is exact for small samples and off by at most half
a step (1 to 128 LSB, depending on the chord). The largest value that can be
rebuilt is ±8031.

Both blocks are one register stage. The encoder has valid/ready and holds its
code while `out_ready` is low. The decoder has no back-pressure.

## AES-128 cipher (aes_encrypt, aes_decrypt)

The state is 128 bits in FIPS-197 byte order. Byte `n` of a block is in bits
`[127-8n -: 8]`. It is row `n % 4`, column `n / 4` of the 4x4 state matrix.
This order matters to anyone who feeds in vectors or reads out results.

Each core is iterative and does one round per clock:

- **Encrypt.** On `start`, the core registers `plaintext ^ rk0`. Then, for
  rounds 1..10: SubBytes → ShiftRows → MixColumns → AddRoundKey(rk_r). Round 10
  skips MixColumns.
- **Decrypt.** On `start`, the core registers `ciphertext ^ rk10`. Then, for
  r = 9 down to 0: InvShiftRows → InvSubBytes → AddRoundKey(rk_r) →
  InvMixColumns. The r = 0 round skips InvMixColumns.

Timing for both cores: with `start` in cycle t, `done` pulses in cycle t+11.
The result then stays on the output port until the next `start`. A `start`
while `busy` is ignored. Each core puts the round-key number it needs on
`rk_idx` and expects that key on `rk` in the same cycle.

The round steps are separate modules:

| module | step |
|--------|------|
| `aes_sub_bytes` / `aes_inv_sub_bytes` | 16 parallel S-box / inverse S-box ROMs |
| `aes_shift_rows` / `aes_inv_shift_rows` | row r rotated left / right by r bytes (wiring only) |
| `aes_mix_columns` | column × {02,03,01,01} circulant over GF(2^8) |
| `aes_inv_mix_columns` | column × {0e,0b,0d,09} circulant |
| `aes_add_round_key` | 128-bit XOR |

**Tables.** The byte substitutions and the constant multiplications are
256 × 8 read-only tables. `aes_sbox` and `aes_inv_sbox` hold the substitutions.
MixColumns holds ×2 and ×3. InvMixColumns holds ×9, ×11, ×13 and ×14. None of
the contents are typed in. Each entry is a `localparam` computed while
elaborating by the functions in `aes_pkg`:

- `gf_mul` multiplies by shift-and-add modulo x^8+x^4+x^3+x+1.
- `gf_inv` computes a^254 by repeated squaring.
- The S-box is `affine(gf_inv(a))`, where `affine(b) = b ^ rotl(b,1) ^
  rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`.
- The inverse S-box is `gf_inv(inv_affine(a))`, where `inv_affine(b) =
  rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^ 0x05`.

Synthesis maps these arrays to LUT ROMs.

## Key schedule (aes_key_expansion)

A `key_load` pulse stores the key as round key 0. After that, the module
derives one round key per clock:

`t = SubWord(RotWord(w3)) ^ {Rcon,24'h0}`, `w0' = w0^t`, `w1' = w1^w0'`, …

Rcon starts at 01 and is multiplied by {02} at each step. SubWord uses four
S-box ROMs. All 11 round keys are kept in a register file and read
combinationally by number. `ready` rises 11 clocks after `key_load` and stays
high until the next load. Keeping every round key lets the decryptor start
with round key 10 instead of unwinding the schedule.

## The link top (speech_crypto_top)

Ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key_valid`, `key` | in | 1, 128 | load a key into both schedules |
| `key_ready` | out | 1 | both schedules are expanded |
| `sample_valid`, `sample_ready`, `sample` | in/out/in | 1, 1, 14 | PCM input, valid/ready |
| `cipher_valid`, `cipher` | out | 1, 128 | one-cycle pulse per ciphertext block on the link |
| `out_valid`, `out_sample` | out | 1, 14 | reconstructed PCM |
| `idle` | out | 1 | nothing in flight |

Behaviour:

- **Packing.** The first code of a block goes to bits 127:120, the last to 7:0.
  The unpacker returns the codes in the same order.
- **Starting encryption.** A full block starts the encryptor when the
  encryptor is idle, the transmit key is ready and the previous ciphertext has
  been taken by the decryptor.
- **Stalls.** Until then, the packer stays full, the encoder stalls, and
  `sample_ready` drops. This is the stall you see right after a key load.
- **Receive side.** The decrypted block waits in the decryptor until the
  unpacker is empty. The unpacker then sends one code per clock to the
  decoder.
- **Throughput.** One 16-sample block per 17 clocks. A G.711 stream of 8000
  samples/s therefore needs only a clock above about 8.5 kHz.
- **Latency.** 28 clocks from a block's last sample entering to its first
  output sample, when the receive side is free: encoder 1, packer 1,
  encryption 11, link 1, decryption 11, hand-off to the unpacker 2, decoder 1.
- **Limits.** Load keys only while `idle` is high; a key load mid-stream is
  not guarded. Samples travel in whole blocks: a partial block waits in the
  packer until it is complete. There is no flush.

Two assertions in the top guard the internal hand-offs. One checks that a new
ciphertext never overwrites an untaken one. The other checks that a decrypted
block is never overwritten before the unpacker takes it.

## Design choices

These choices belong to this implementation, not to the algorithms:

- One round per clock, with 16 S-boxes per core (32 ROMs for the two cores,
  plus 4 per key schedule).
- One key schedule per end of the link, loaded together from one key port.
- Sixteen codes per block, packed first-code-high.
- Valid/ready only on the input. The output has no back-pressure.
- Magnitudes are clipped at 8158, as in G.711. Bias removal in the decoder
  mirrors the encoder.
- The round order inside a decryption round is the FIPS-197 inverse cipher:
  InvShiftRows before InvSubBytes, AddRoundKey before InvMixColumns. The two
  byte-wise steps commute, so other orderings in the literature give the same
  result.
- The last encryption round omits MixColumns, as AES requires. A
  description where every round mixes columns would not produce AES
  ciphertext.

Not in the RTL:

- The analog front end: the 8 kHz sampler/ADC and the DAC. Samples arrive
  and leave as 14-bit words at whatever rate the user drives.
- The FPGA board. At 293 port bits the top needs a device with that many
  user I/O. A Virtex-7 has enough; a Spartan-3E starter board does not.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block against reference models in `tb/ref_pkg.sv`, written separately from the
RTL:

- AES on byte arrays, with the S-box found by searching for the inverse.
- Mu-law as a search over chord thresholds.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_aes_sub_bytes`, `tb_aes_inv_sub_bytes` | FIPS-197 Appendix B values, every byte value in every position, random states |
| `tb_aes_shift_rows`, `tb_aes_inv_shift_rows`, `tb_aes_mix_columns`, `tb_aes_inv_mix_columns`, `tb_aes_add_round_key` | FIPS-197 Appendix B round-1 values and random states |
| `tb_aes_key_expansion` | FIPS round key 10 (`d014f9a8…`), random keys, ready after exactly 11 clocks, restart mid-expansion |
| `tb_aes_encrypt`, `tb_aes_decrypt` | FIPS-197 Appendix B and C.1 vectors, 40 random key/block pairs, done after exactly 11 clocks, start-while-busy ignored |
| `tb_mulaw_encoder` | all 16384 inputs under random output stalls, code held during stalls, 1-clock latency, every chord and clipping exercised |
| `tb_mulaw_decoder` | all 256 codes, end points (0, ±8031), encode/decode error within half a step |
| `tb_aes_roundtrip` | 100 random keys and blocks through key schedule → encrypt → decrypt; 33 clocks key-to-plaintext |
| `tb_speech_crypto_top` | end to end at default parameters: 48 blocks under two keys plus one timed block (28-clock latency), every ciphertext checked against reference AES, every output sample against decode(encode(x)), counts of stalls, blocks, key loads, chords, negative and clipped samples |

To simulate a testbench with Verilator, list the packages first:

```
verilator --binary --timing --assert -Irtl -yrtl rtl/aes_pkg.sv tb/ref_pkg.sv \
    tb/tb_speech_crypto_top.sv --top-module tb_speech_crypto_top
./obj_dir/Vtb_speech_crypto_top
```

Every testbench finishes in well under a second of simulation.

## Changing the design

- **Sample width.** `SAMPLE_W` on the top and the codec sets the PCM width.
  The chord search assumes the G.711 layout: 14 bits, bias 33, clip 8158.
  Other widths need a matching `CLIP` and chord range.
- **Round count.** `NR` on the cores and the key schedule is the round count.
  Only 10 (AES-128) is meaningful with this key schedule.
- **Faster or smaller cipher.** To unroll or pipeline the cipher, replace the
  state register loop in `aes_encrypt`/`aes_decrypt`. The step modules are
  purely combinational and can be reused per stage.
