# Compact 32-bit AES-128 cipher/decipher core

This design enciphers and deciphers 128-bit blocks with a 128-bit key (AES-128,
FIPS-197). It is built for small area, not peak speed. The round datapath is
one 32-bit state column wide, so a round takes four clocks. The S-box is
computed, not looked up: each S-box unit inverts its byte in the composite
field GF((2^4)^2). The S-box units, AddRoundKey and the key schedule all serve
both directions. Round keys are expanded on the fly, forward when enciphering
and backward when deciphering, so no key memory is needed.

A block takes 44 clocks: 4 clocks of initial AddRoundKey while the block is
read in, then 10 rounds of 4 clocks. That is 128/44 ≈ 2.9 bits per clock. At
264 MHz it gives 768 Mbit/s, and three back-to-back blocks take 132 clocks.

## Pins and how to drive them

| pin | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `key_load` | in | 1 | `key_data` holds a key word in this clock |
| `key_data` | in | 32 | key word |
| `aes_start` | in | 1 | the first word of a block is on `data_in` in this clock |
| `enc_dec` | in | 1 | sampled with `aes_start`: 0 enciphers, 1 deciphers |
| `data_in` | in | 32 | block word |
| `load_ready` | out | 1 | the input buffer can take a block |
| `data_out` | out | 32 | result word |
| `data_ready` | out | 1 | `data_out` is valid; high for exactly 4 consecutive clocks per block |
| `key_ready` | out | 1 | the current key is prepared |

Words are big-endian in the FIPS-197 sense. The first word of a block or key
holds bytes 0..3, with byte 0 in bits [31:24]. For example, key
`000102030405060708090a0b0c0d0e0f` is sent as `00010203`, `04050607`, and so on.

- **Key.** Raise `key_load` in four clocks, not necessarily consecutive, with
  the four key words in order. Always load the cipher key, for deciphering
  too. The chip then runs the forward expansion once and stores the last round
  key, which is where deciphering starts. This takes 22 clocks, and
  `key_ready` is low meanwhile. If a block is running when the key arrives,
  the preparation waits until that block ends. The running block finishes
  with its old key, and later blocks use the new one.
- **Block.** When `load_ready` is high, raise `aes_start` for one clock with
  word 0 on `data_in` and the direction on `enc_dec`. Words 1..3 follow in the
  next three clocks. An `aes_start` while `load_ready` is low is ignored. The
  input buffer is separate from the state, so the next block can be loaded
  while the current one runs. That is how blocks stream at one per 44 clocks.
- **Result.** `data_ready` is high for four clocks, and `data_out` carries
  words 0..3 in those clocks. There is no back-pressure. For a single block
  with the key ready and the core idle, the first result word comes 50 clocks
  after the `aes_start` clock.

Every block is independent, so this is ECB operation. Chaining modes (CBC,
CFB, OFB) would be built by the host around the core. The core has no mode
logic for them.

## Organisation

```
aes_top
├── key_reader          assembles the key, holds cipher key and last round key
├── key_schedule        Roundkeys register c, next-key register c', Rcon register
│   └── sbox_word ×1    (forward only, for SubWord)
├── aes_ctrl            sequencer: key preparation, FRD, rounds, LRD
├── data_input_buffer   one block, Load Ready
├── aes_core            round datapath
│   ├── shiftrow_unit   16x8-bit state register + ShiftRow switch matrix
│   ├── sbox_word ×1    4 × sbox_unit → gf_inverter
│   ├── mixcolumn ×2    forward (before AddRoundKey), inverse (after)
│   └── add_round_key
└── data_output_buffer  gathers 4 result words, Data Ready
```

`aes_pkg` holds the types (`byte_t`, `word_t`, `block_t`, `mode_e`), the
field-mapping matrices and the GF helper functions.

## The round loop

The state lives in the 16x8-bit register inside `shiftrow_unit`. Byte `k` is
row `k mod 4` of column `k div 4`. In each clock one column leaves the
register through the switch matrix, passes the units of its direction, and its
result goes back towards the register:

```
enciphering:  state ─► ShiftRow ─► BytesSub ─► MixColumn* ─► AddRoundKey ──────────────► state
deciphering:  state ─► InvShiftRow ─► InvBytesSub ─────────► AddRoundKey ─► InvMixColumn* ─► state
                                                       ▲
                                 input buffer word (FRD)
```

There are three multiplexer selects:

- **FRD**, the first round (4 clocks). AddRoundKey takes the input-buffer word
  instead of the round result. Inverse MixColumn is bypassed.
- **LRD**, the last round (4 clocks). The units marked `*` are bypassed. The
  AddRoundKey result is sent to the output buffer.
- **Enc/Dec** chooses the direction of every unit.

Two points make this loop work at four clocks per round.

- **Why columns are held back.** ShiftRow column `c` takes row `r` from column
  `c+r`. Reading column 0 of a round therefore needs all four columns of the
  previous round, and writing a result column straight back would corrupt
  columns still to be read. Result columns 0..2 wait in a 3-word holding
  buffer. When column 3 arrives, the whole 16-byte register loads at once. So
  the path from register to register is combinational and one clock long. A
  pipeline register at the switch output would cost a bubble at every round
  boundary, making a round 5 clocks long.
- **Why BytesSub follows ShiftRow when enciphering.** BytesSub works on single
  bytes and ShiftRow only moves bytes, so the two commute. Putting the S-box
  units after the switch in both directions means one S-box set serves both,
  without a multiplexer in front of it. Deciphering keeps the textbook order:
  Inverse ShiftRow, Inverse BytesSub, AddRoundKey, Inverse MixColumn. The
  forward and inverse MixColumn are separate instances. Sharing one instance
  would put it before AddRoundKey in one direction and after it in the other,
  which closes a (false) combinational loop through the multiplexers.

## The S-box: inversion in GF((2^4)^2)

`gf_inverter` maps a byte `D` (AES polynomial basis, modulus
x^8+x^4+x^3+x+1) into the composite field with an 8x8 bit matrix `T`. The
result is `A = p·x + q`, where the nibbles `p` and `q` are elements of GF(16)
under x^4+x+1, and the field is built over them with w(x) = x^2 + x + β^14
(β = {2}, so β^14 = {9}). The inverse there is

```
Δ = p·q ⊕ q² ⊕ p²·β^14      s = p·Δ⁻¹      t = (p ⊕ q)·Δ⁻¹      A⁻¹ = s·x + t
```

This takes three GF(16) multipliers, two squarers, one constant multiplier and
a GF(16) inverse, which is a 16-entry table. The result is mapped back with
`T⁻¹`. In `aes_pkg`, row `i` of `T_MAT`/`T_INV_MAT` gives output bit `i`, and
bit `j` of the row selects input bit `j`:

```
T   rows (bit7..bit0): dd 0a 52 c6 70 d2 ac a0
T⁻¹ rows (bit7..bit0): 51 b0 72 b2 5a a4 ee 24
```

`T⁻¹·T = I`, and `T` maps products to products for all 65,536 pairs.
`tb_gf_inverter` checks the inverse exhaustively.

`sbox_unit` adds the affine steps:

- forward: `S(a) = {1F}·a⁻¹ mod (x^8+1) ⊕ {63}`
- inverse: `S⁻¹(b) = ({4A}·b mod (x^8+1) ⊕ {05})⁻¹`

In the inverse the affine step comes before the inversion. That is why there
is an input multiplexer as well as the output one.

## On-the-fly key schedule

`key_schedule` has two 128-bit registers. `c` holds the round key in use, and
AddRoundKey takes word `col` of it. `c'` receives the next round key, which is
computed from `c` by one chain of XORs:

```
forward:  c'0 = c0 ⊕ g(c3)        c'1 = c1 ⊕ c'0   c'2 = c2 ⊕ c'1   c'3 = c3 ⊕ c'2
inverse:  c'0 = c0 ⊕ g(c3 ⊕ c2)   c'1 = c1 ⊕ c0    c'2 = c2 ⊕ c1    c'3 = c3 ⊕ c2
g(w) = SubWord(RotWord(w)) ⊕ {Rcon,00,00,00}
```

Rcon comes from an 8-bit register. It starts at {01} and is multiplied by x
at each step forward. In reverse it starts at {36} and is multiplied by x⁻¹.

The controller computes `c'` in the first clock of each round and copies it
to `c` in the last clock. A block starts by loading `c`:

- enciphering loads the cipher key;
- deciphering loads the last round key stored by the key preparation.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference is
`tb/aes_ref_pkg.sv`, a plain software AES. It computes the S-box from a^254
and the bitwise FIPS affine form, and it shares no code with the RTL.

- `tb_gf_inverter`, `tb_sbox_unit`: exhaustive over all 256 bytes.
- `tb_mixcolumn`: FIPS-197 / known columns, random columns, and inverse∘forward = identity.
- `tb_key_schedule`: every round key, forward and backward, for the FIPS key and random keys.
- `tb_aes_core`: the datapath with reference round keys, FIPS-197 C.1 and B vectors, random blocks in both directions.
- `tb_aes_ctrl`: key preparation is 22 clocks; a block has 44 state writes, LRD in clocks 40..43, and 11 compute / 10 advance steps; streamed blocks start every 44 clocks; a new key is handled during a block.
- `tb_aes_top`: end to end through the pins, with the parameters at their defaults (the design has no size parameters). It checks the FIPS vectors, 57 blocks with 16 keys and mixed directions, a latency of 50 clocks, a period of 44 clocks, and three blocks in 132 clocks. It also counts that each mechanism occurred: FRD, LRD, key preparation, back-to-back start, Enc/Dec switch between blocks, a block waiting for its key, and a key load during a block. It runs in a few seconds.

To simulate, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
          tb/tb_aes_top.sv --top-module tb_aes_top -Mdir obj && obj/Vtb_aes_top
```

The same command works for any block testbench with `tb_<block>` in place of
`tb_aes_top`.

## Where this design makes its own choices

The published architecture fixes the units, their order, the multiplexers
(FRD, LRD, Enc/Dec), the composite-field S-box, the two-register key schedule
and the 44-clock block. The following are this design's own:

- **Pins and protocols.** The reset, the `key_ready` pin, the
  start-then-three-words input protocol, the 4-clock output burst, and
  `enc_dec` polarity 0 = encipher.
- **Deciphering key.** The chip derives the deciphering start key itself from
  the cipher key, in a 22-clock preparation.
- **No pipeline register at the switch output.** The column registers drawn at
  the ShiftRow switch output and at the MixColumn output are not pipeline
  stages here. The datapath is combinational from state register to state
  register, which is what keeps a round at four clocks.
- **RotWord** is wiring rather than a shifting register.
- **Rcon** is an 8-bit register stepped by xtime (and by its inverse when
  deciphering).
- **Latency.** This design's latency is 50 clocks from `aes_start` to the
  first result word, and 47 from the last input word. The reported figure of
  "128 clock cycles latency" for the three-block run is not reproduced; the
  throughput figures (44 clocks per block, 132 clocks for three blocks) are.
- **Not built.**
  - The 128-bit-wide variant, which was only estimated.
  - Cipher modes other than ECB.
  - The FPGA IO count of 228, which does not follow from the pins above.
- **Timing.** The critical path runs from the state register through the
  switch, an S-box unit, MixColumn, AddRoundKey and (when deciphering) inverse
  MixColumn, back to the register. No clock frequency is claimed for this RTL.
