# Reversible-logic image cipher (RLGCD)

This is a small stream cipher for 8-bit image pixels. Each pixel passes
through a network of *reversible* logic gates and is then XORed with a key
nibble from a 4-bit LFSR. A reversible gate has as many outputs as inputs and
maps inputs to outputs one to one. The network is therefore a permutation of
the 256 pixel values, and so is the XOR with the key. Decryption removes the
key and runs the same gates in the reverse order. Every gate used here is its
own inverse, so the decryption block needs no new gates.

The design also carries an LSB watermark through the cipher. A short text is
written into bits 2 and 3 of every fifth pixel before encryption. It is read
back from the decrypted image.

The RTL covers the whole chain for one 128 × 128 grey-scale image:

```
 raw pixels ─► wm_embed ─► image_rom ─► rlgcd_encrypt ─► rlgcd_decrypt ─► wm_extract ─► text
                            (16 K × 8)   inn    │ en, x1        │ de
                                         lfsr_key          lfsr_key
```

Throughput is one pixel per clock. A full image takes 16,384 clocks plus two
clocks of latency.

## The four reversible gates

| gate | inputs | outputs | module |
|---|---|---|---|
| SCL | A B C D | P=A, Q=B, R=C, S = A·(B+C) ⊕ D | `scl_gate` |
| Toffoli | A B C | P=A, Q=B, R = A·B ⊕ C | `toffoli_gate` |
| Fredkin | A B C | P=A, Q = A'B ⊕ AC, R = A'C ⊕ AB (swap B and C when A=1) | `fredkin_gate` |
| Feynman | A B | P=A, Q = A ⊕ B | `feynman_gate` |

Each gate either passes its lines through, XORs one line with a function of
the others, or swaps two lines under a control. Each is therefore its own
inverse. The testbenches check this directly: two copies of each gate are
chained, and the output must equal the input.

## The pixel network (the part to read carefully)

The pixel `i[7:0]` is split into two nibbles. Each nibble goes through
SCL → Toffoli → Fredkin. A Feynman gate couples the two halves. The result is
then XORed with the key:

```
 i7 i6 i5 i4                 i3 i2 i1 i0
  │  │  │  │                  │  │  │  │
 ┌A──B──C──D┐                ┌A──B──C──D┐
 │ SCL (hi) │                │ SCL (lo) │
 └P──Q──R──S┘                └P──Q──R──S┘
  │  │  │  └──── Feynman A    │  │  │  │
  │  │  │        Feynman B ───┘  │  │  │
 Toffoli A,B,C                 Toffoli A,B,C
 Fredkin A,B,C                 Fredkin A,B,C
  │  │  │     P      Q          │  │  │
  m7 m6 m5    m4     m3         m2 m1 m0

 e[7:4] = m[7:4] ^ key        e[3:0] = m[3:0] ^ key
```

In words:

- The upper SCL gets i7, i6, i5, i4 on A, B, C, D. Its outputs P, Q and R
  (i7, i6, i5) feed the upper Toffoli. S feeds the Feynman gate.
- The lower SCL gets i3, i2, i1, i0 on A, B, C, D. Its output P (i3) feeds
  the Feynman gate. Q, R and S feed the lower Toffoli.
- Toffoli P, Q, R go to Fredkin A, B, C on each side.
- The Feynman gate takes A from the upper SCL and B from the lower SCL. P
  becomes bit 4 and Q becomes bit 3.
- The same 4-bit key is XORed onto both nibbles.

Decryption (`rlgcd_decrypt`) goes through this in reverse:

1. XOR both nibbles with the key.
2. Bits 7..5 go through Fredkin, then Toffoli, into the upper SCL's A, B, C.
3. Bits 4 and 3 go through the Feynman gate. P goes to the upper SCL's D
   and Q to the lower SCL's A.
4. Bits 2..0 go through Fredkin, then Toffoli, into the lower SCL's B, C, D.

The two SCL gates output the plain pixel.

Some wiring comes from the block diagram of the design's source. Other
wiring is this design's own reading:

- **From the source:** the gate inventory; the stage order; which nibble
  goes where; that three lines of each SCL go to the Toffoli and one to the
  Feynman gate; that the key is XORed at the end.
- **This design's choice:** which pin of each gate is A, B or C (taken in
  drawing order); which Feynman output feeds which nibble; using the single
  4-bit key on both nibbles.

Any other pin order also gives a valid cipher, as long as the encryption and
decryption blocks agree. But it gives *different ciphertext*. Do not expect
bit-exact agreement with another implementation of the same diagram.

## Key stream

`lfsr_key` is a 4-bit Fibonacci LFSR. Bit 1 → Bit 2 → Bit 3 → Bit 4, and the
XNOR of the tapped bits is shifted into Bit 1. `key[0]` is Bit 1.

- **Taps:** by default the XNOR takes Bit 2 and Bit 4 (`TAPS = 4'b1010`), as
  in the source's LFSR drawing. These taps are **not** maximal-length. From
  the default zero seed the key runs 0, 1, 3, 6, C, 8 and then repeats, a
  period of 6. `TAPS = 4'b1100` (Bit 3 and Bit 4) gives the 15-state
  sequence. Set `LFSR_TAPS` on `rlgcd_top` to change the taps of both
  blocks.
- **Seed:** `SEED` is 0. All ones is the lock-up state of an XNOR LFSR, so
  the seed must not be all ones.
- **Stepping:** the register shifts once per *accepted pixel*, not once per
  clock.

The encryption and decryption blocks each hold their own LFSR, with the same
taps and seed. Because each LFSR steps once per accepted pixel, the n-th
pixel into the decryption block meets the same key as the n-th pixel into the
encryption block. This holds whatever the delay between the blocks, and
through idle cycles.

Both blocks must be reset together. After that the key streams continue
across images without a new reset.

As a cipher this is weak. A 4-bit key with a period of 6, or at most 15, can
be recovered from a few known pixels. The design shows reversible-gate
datapaths; it is not a secure cipher.

## Watermark layout

Pixel indices 0, 5, 10, … are *carriers*. Each carrier holds two watermark
bits: the first in pixel bit 2 (the third LSB) and the next in bit 3 (the
fourth LSB). No other bits change. The watermark bit string is:

1. The character count, 16 bits, most significant bit first. This takes
   carriers 0–7, i.e. pixels 0, 5, …, 35.
2. The characters, 8 bits each, most significant bit first. Each character
   takes four carriers.

A 128 × 128 image has 3,276 carriers. That leaves room for
(3276 − 8) × 2 / 8 = **817 characters**. If `msg_len` is above 817, `wm_embed`
raises `len_error` and passes every pixel through unchanged.

`wm_embed` is combinational on the pixel path and indexed by the pixel's
address. The message is held in an 817 × 8 array. `wm_extract` works on the
decrypted stream in index order. A pixel with index 0 restarts it. It emits
a character (`char_valid`) on the clock after each character's fourth
carrier.

## Top level: `rlgcd_top`

| group | ports |
|---|---|
| control | `clk`, `rst_n` (synchronous, active low), `start`, `busy` |
| watermark in | `msg_we`, `msg_addr[9:0]`, `msg_char[7:0]`, `msg_len[15:0]`, `len_error` |
| image load | `wr_en`, `wr_addr[13:0]`, `wr_data[7:0]` (raw pixels; stored watermarked) |
| streams | `inn_valid`/`inn` (watermarked plain), `en_valid`/`en`/`x1` (cipher and its key), `de_valid`/`de_index`/`de` (decrypted) |
| watermark out | `wm_char_valid`, `wm_char`, `wm_len`, `wm_len_valid` |

To use it:

1. Reset.
2. Write the message characters and set `msg_len`.
3. Write the 16,384 raw pixels.
4. Pulse `start`.

The edge that samples `start` sets `busy`. The next edge reads address 0 and
raises `inn_valid`. `en_valid` follows one clock later and `de_valid` one
clock after that. The last decrypted pixel is registered 16,386 clocks after
the start edge.

Parameters:

- `DEPTH`: pixels per image, default 16,384. The watermark capacity follows
  it: ((DEPTH / 5) − 8) × 2 / 8 characters.
- `LFSR_TAPS` and `LFSR_SEED`: taps and seed of both LFSRs.

Sizes are collected in `rlgcd_pkg`.

Coarse synthesis of the top gives:

- 120 flip-flop bits;
- 137,608 memory bits: the 131,072-bit image store plus the 6,536-bit
  message store;
- about 130 word-level cells.

The cipher path itself holds 46 flip-flops: the 14-bit address counter, the
busy and valid bits, the two LFSRs, and the `en`, `x1` and `de` registers.
The rest belong to the watermark logic and to the pixel index that travels
along the stream. The image store fills eight 16-kbit block RAMs.
No FPGA timing has been run on this RTL.

## Where this departs from the source design, and how far to trust it

- **Image loading.** The source fills its image memory from a text file in
  simulation. Here the image store has a write port, and the embedder sits
  on that port.
- **Watermarking in hardware.** In the source, embedding and extraction are
  software steps done before and after the hardware. Here they are RTL, so
  that the whole chain runs in one simulation. Their bit layout follows the
  source. The bit order inside the length and character fields
  (most significant bit first) is this design's choice. So is the 8-bit
  character width, the only width that gives the 817-character limit.
- **Colour images** are not handled as such. The source watermarks the blue
  plane; each 8-bit plane can be streamed as a separate image.
- **Timing details are this design's own:** the registered outputs of the
  cipher blocks, the valid signals and the `start`/`busy` handshake.
- **Verification.** Every module has a self-checking testbench.
  - The gates are checked exhaustively.
  - The cipher blocks are checked against a reference model written
    separately from the gate modules, over all 256 pixel values and all keys
    of the sequence.
  - Each watermark block is checked over full 16,384-pixel images.
  - `tb_rlgcd_top` runs two full images end to end with all parameters at
    their defaults: one carries "OUTPUT" and one carries 817 random
    characters. It checks every pixel on `inn`, `en`, `x1` and `de`, the
    latency and rate, the recovered text, and the 818-character refusal.
  - `tb_rlgcd_top_maxlen` runs a 2,048-pixel image with the maximal-length
    taps and seed 5. It checks the 100-character capacity, all 15 keys, and
    every pixel.
  - Concurrent assertions in `image_rom`, `lfsr_key` and `rlgcd_top` watch
    the stream order, the LFSR lock-up state and the stage-to-stage
    handshake.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/rlgcd_pkg.sv tb/rlgcd_ref_pkg.sv tb/wm_ref_pkg.sv tb/tb_rlgcd_top.sv \
  --top-module tb_rlgcd_top -o sim
./obj_dir/sim
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Replace
`tb_rlgcd_top` with any other `tb_*` module to run that unit's test. The
full-size end-to-end test runs in well under a second.

## Files

- `rtl/rlgcd_pkg.sv`: shared sizes and types.
- `rtl/scl_gate.sv`, `toffoli_gate.sv`, `fredkin_gate.sv`, `feynman_gate.sv`:
  the reversible gates.
- `rtl/lfsr_key.sv`: the key LFSR.
- `rtl/rlgcd_encrypt.sv`, `rlgcd_decrypt.sv`: the cipher blocks.
- `rtl/image_rom.sv`: the image store and streamer.
- `rtl/wm_embed.sv`, `wm_extract.sv`: the watermark.
- `rtl/rlgcd_top.sv`: the top level.
- `tb/`: one `tb_<module>.sv` per module, plus two reference-model packages,
  `rlgcd_ref_pkg` and `wm_ref_pkg`.
