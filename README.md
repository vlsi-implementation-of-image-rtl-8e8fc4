# Reversible-logic image cipher (RLGCD)

This is a small pixel cipher built from reversible logic gates. Reversible gates are the SCL, Toffoli, Fredkin and Feynman gates. Each one maps its inputs one-to-one onto the same number of outputs, so no information is lost in the gate. Each of these four gates is also its own inverse. That gives the cipher its structure:

- Encryption pushes each 8-bit pixel through a fixed network of these gates. It then XORs the result with a 4-bit key from a linear feedback shift register (LFSR).
- Decryption removes the key and then runs the same gates in reverse order.

The key changes on every clock, so neighbouring pixels with equal values encrypt differently. The design reads one pixel per clock, and encrypts and decrypts it in the same cycle. A 128x128 image therefore takes 16,384 cycles.

The cipher is a teaching-scale design, not a secure one. The key stream has a period of 15 and is fully fixed by a 4-bit seed.

## The gate network

Notation: `i[7:0]` is the plain pixel, `e[7:0]` the cipher pixel, `k[3:0]` the key.

```
 i[7] i[6] i[5] i[4]                         i[3] i[2] i[1] i[0]
   |    |    |    |                            |    |    |    |
 +-------SCL--------+                        +-------SCL--------+
 | P=A Q=B R=C      |                        | P=A Q=B R=C      |
 | S=A(B+C)^D       |                        | S=A(B+C)^D       |
 +--P---Q---R---S---+                        +--P---Q---R---S---+
    |   |   |   |                               |   |   |   |
    |   |   |   +--> Feynman A   Feynman B <----+   |   |   |
 +--Toffoli--+       P=A, Q=A^B                 +--Toffoli--+
 +--Fredkin--+        |      |                  +--Fredkin--+
    |   |   |         |      |                     |   |   |
   ^k3 ^k2 ^k1       ^k0    ^k3                   ^k2 ^k1 ^k0
   e7  e6  e5        e4      e3                   e2  e1  e0
```

- Each nibble enters its own 4-line SCL gate.
- Three lines of each SCL gate pass through a Toffoli gate (`R = AB ^ C`) and then a Fredkin gate. The Fredkin gate swaps B and C when A is 1.
  - In the upper half these are P, Q and R.
  - In the lower half they are Q, R and S.
- The remaining line of each half goes to one Feynman gate. The upper S is its input A and the lower P is its input B. The Feynman gate is the only place where the two halves mix.
- The key is XORed onto both nibbles. Key bit `k` meets bit `k` of each nibble.

Written out as equations, with `su = i4 ^ i7(i6|i5)` and `sl = i0 ^ i3(i2|i1)`:

```
e[7:4] = (i7 ? {1, i6^i5, i6, su} : {0, i6, i5, su})        ^ k
e[3:0] = {su^i3, (i2 ? {1, sl^i1, i1} : {0, i1, sl})}        ^ k
```

For a fixed key, this maps the 256 pixel values one-to-one onto the 256 cipher values. The testbenches use these equations as their reference model.

Decryption (`decryption.sv`) undoes the steps in reverse order:

1. It XORs the key off both nibbles.
2. It sends `e[7:5]` and `e[2:0]` through Fredkin and then Toffoli.
3. It runs the Feynman gate on (`e[4]`, `e[3]`). This restores `su` and `i3`.
4. The two SCL gates then give back `i[7:4]` and `i[3:0]`. Each SCL gate recomputes `A(B+C)` from the restored lines and XORs it off again.

## Keys: two LFSRs in lock-step

`lfsr_key` is a 4-bit Fibonacci LFSR with XNOR feedback:

```
key <= {key[2:0], ~(key[3] ^ key[2])}       // x^4 + x^3 + 1
```

From the seed `0001` it runs `0001 0011 0111 1110 1101 1011 0110 1100 1001 0010 0101 1010 0100 1000 0000` and then repeats. That is all 15 states other than `1111`. The state `1111` maps onto itself under XNOR feedback, so it is the lock-up state. An assertion rejects it as a seed, and another checks that it is never reached.

No key crosses between the two halves of the design. The encryption and decryption blocks each hold their own LFSR with the same seed. The two LFSRs share the clock and reset, so they always hold the same key. `rlgcd` asserts this on every clock, and brings both keys out as `key_en` and `key_de`. In a real link, the two ends would need the seed and a common start point.

## Timing

There is one pixel per clock, with zero latency inside a cycle:

- `image_rom`'s address counter and both key registers update on the same rising edge.
- `inn`, `en` and `de` are combinational from those registers.
- So in cycle `n` after reset, `inn` is pixel `n`, the key is the `n`-th LFSR state, and `en` and `de` belong to that pair.

There are no handshakes or stalls. After the last pixel the address wraps to 0. Because 16,384 = 15 × 1092 + 4, the second pass over the image uses different keys. Reset is synchronous and active high. It returns the design to pixel 0 and loads the seed into both LFSRs.

## Image store

`image_rom` holds `DEPTH` 8-bit pixels. The default is 16,384 (one 128x128 image), and pixels are played out in raster order.

- **Loading a real image:** set `INIT_FILE` to a text file with one binary pixel per line. The file is read with `$readmemb`, which fits an image-to-text conversion step upstream.
- **Default contents:** when `INIT_FILE` is empty, the ROM holds a computed test picture, `pixel(r,c) = (2r + 3c) xor (r*c) mod 256`.
- **Colour images:** these can be encrypted one 8-bit plane at a time, or with `DEPTH` set to three planes.

## What is outside the RTL

The surrounding flow prepares the image and post-processes the results in software:

- **Watermarking.** A binary watermark is hidden in bits 2 and 3 of every fifth pixel (in the blue plane for colour images). The watermark's length comes first, then its data.
- **Image conversion.** The image is converted to and from binary text.
- **Extraction.** The watermark is taken back out of the decrypted image.

None of this is hardware. The cipher is transparent to it: `de == inn` bit for bit, so the watermark survives. The watermark's length-field format is not fully specified, so the RTL has no model of it.

`tb_rlgcd_watermark` demonstrates this round trip with one possible layout:

- a 16-bit length in bits 3:2 of pixels 0, 5, …, 35;
- then the 42-bit mark `OUTPUT`, two bits per pixel, continuing every fifth pixel.

It writes the mark into the ROM before reset and reads the text back from the decrypted pixels.

## Where this RTL makes its own choices

The gate equations, the network, the 4-bit XNOR LFSR and the 16,384-word image come from the original description. The following points are interpretations:

- **LFSR taps.** The block diagram of the register seems to tap bits 4 and 2 (numbering from 1). The published simulation key sequence, and the requirement of a maximal-length sequence, both need taps on bits 4 and 3. The taps here follow the simulation values.
- **Bit-level wiring.** This covers the Feynman gate's input order and the key-bit-to-data-bit mapping. The reading used here reproduces all six encrypted values of the published simulation (`tb_rlgcd_sample`).
- **Seed, reset and extra ports.** The seed `0001`, the synchronous reset, the `pix_addr` output and the synthetic default image are additions. So are the wrap-around and the combinational ROM read.
- **Flip-flop count.** The published FPGA result lists 40 flip-flops and 37 LUTs. This RTL has 22 flip-flop bits: a 14-bit address and two 4-bit keys. The difference was not investigated and no FPGA timing was attempted.

## Files

| file | content |
|---|---|
| `rtl/rlgcd_pkg.sv` | pixel/key types and image size |
| `rtl/scl_gate.sv`, `toffoli_gate.sv`, `fredkin_gate.sv`, `feynman_gate.sv` | the four reversible gates |
| `rtl/key_xor.sv` | nibble-wide key XOR |
| `rtl/lfsr_key.sv` | 4-bit XNOR LFSR |
| `rtl/encryption.sv`, `rtl/decryption.sv` | the cipher and its inverse, each with its LFSR |
| `rtl/image_rom.sv` | image store with raster address counter |
| `rtl/rlgcd.sv` | top: ROM → encryption → decryption |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_rlgcd_sample.sv`, `tb/sample_pixels.mem` | whole design on 16 sample pixels, checked against published values |
| `tb/tb_rlgcd_watermark.sv` | watermarked image through the whole design, watermark read back from `de` |

The testbenches check the following:

- **Gate testbenches:** exhaustive over all inputs, including reversibility.
- **Cipher-block testbenches:** every (pixel, key) pair.
- **`tb_rlgcd`:** runs the top at its default size over one full image and part of a second. It checks address, pixel, keys, cipher and recovery in every cycle. It also counts key changes, LFSR periods, the image wrap, pixels changed by the cipher, and a mid-image reset.

## Simulating

Verilator 5 is needed. Run from the repository root, because the `.mem` file is opened by a relative path:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rlgcd_pkg.sv tb/tb_rlgcd.sv --top-module tb_rlgcd
./obj_dir/Vtb_rlgcd
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The full-image run takes well under a second.

To encrypt your own image, write it as binary text, one pixel per line, and pass its path as `INIT_FILE`. Then record `en` and `de` in a testbench, for example with `$fdisplay`.
