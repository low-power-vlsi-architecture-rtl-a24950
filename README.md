# Hyperanalytic wavelet image compressor

This design compresses 8-bit grey images block by block. Each 8x8 block goes
through three steps:

1. A **hyperanalytic wavelet transform (HWT)**.
2. A table-driven **quantizer**.
3. A **variable length encoder (VLE)** made of zigzag scan, run-length coding and Huffman coding.

An ordinary discrete wavelet transform (DWT) is real and has no phase: shift an edge by one pixel and the coefficients change a lot. The HWT is built for this problem.

- It transforms the block and three Hilbert-transformed copies of it:
  - Hx f: the Hilbert transform along rows.
  - Hy f: the Hilbert transform along columns.
  - Hy Hx f: both.
- It combines the four results into the real and imaginary parts of two complex sub-band sets.
- Because of this, the coefficients behave like the magnitude and phase of an analytic signal.

The whole datapath works in IEEE-754 single precision. Floating-point multipliers and *fused add-subtract units* (FFASU) are the building blocks throughout. An FFASU computes A+B and A−B together and shares one exponent compare and one alignment shifter.

```
pixels ─► hwt ─────────────────────────► quantizer ─► vle ─────────────────────────────► bits
          ├ dht16 (Hilbert, shared)                   ├ zigzag_scanner (128x8 ping-pong)
          ├ 4 x dwt2d (5/3 lifting)                   ├ rle_encoder
          └ FFASU combination                         └ huffman_encoder
```

The top module is `image_compressor`:

| Port | Width | Meaning |
|---|---|---|
| `level` | 2 | Number of DWT levels (1–3). |
| `pix_valid`, `pix_ready`, `pix` | 1, 1, 8 | Pixels in, 64 per block, raster order inside the block. |
| `bit_valid`, `bit_ready`, `bit_out`, `bit_last` | 1 each | One compressed bit per clock. `bit_last` marks the last bit of each coefficient block. |

Every stream uses valid/ready handshakes. Either side may stall at any time.

## The transform and its four components

For one block f, `hwt` computes the following:

| Step | Computed as |
|---|---|
| Row Hilbert transform, `Hx f` | 8 rows through `dht16` |
| Column Hilbert transform, `Hy f` | 8 columns of f through `dht16` |
| `Hy(Hx f)` | 8 columns of `Hx f` through `dht16` |
| D0 … D3 | 2-D DWT of f, `Hx f`, `Hy f` and `Hy Hx f`, in four parallel `dwt2d` instances |
| Output | comp 0 `hR+` = D0 − D3, comp 1 `hR−` = D0 + D3, comp 2 `hI+` = D1 + D2, comp 3 `hI−` = D1 − D2 (FFASUs) |

The output is 4 × 64 coefficients per block:
- Component-major order.
- Each component in the usual Mallat layout: the lowest band in the top-left corner, then the detail bands of each level.

## The Hilbert processor (`dht16`)

This is the least obvious part of the design.

### How it computes the transform

The Hilbert transform is computed in the frequency domain:

    y = IFFT( -j·sgn(k) · FFT(x) )

- `sgn(k)` is +1 for bins 1..7, −1 for bins 9..15, and 0 for DC and Nyquist.
- The inverse FFT is a forward FFT with the real and imaginary parts swapped before and after it.
- The final ÷16 is an exponent decrement, so no divider is needed.

The 16-point FFT is a radix-2 decimation-in-frequency pipeline of *single-delay-feedback* elements. Each element holds a delay line of L complex words and one FFASU:

| Element | Span L | Twiddle after the butterfly |
|---|---|---|
| `dht_p3` | 8 | General W16^k from a small constant ROM: 4 multipliers and 2 FFASUs |
| `dht_p2` | 4 | 1, W^(N/8), −j, or W^(3N/8) = −j·W^(N/8), selected by two bits |
| `dht_p1` | 2 | 1 or −j. A −j is only a swap and one sign change. |
| `dht_p0` | 1 | None |
| `dht_p4` | – | −j·sgn(k) and the real/imag swap; no arithmetic |

The chain is:

    P3 P2 P1 P0 → bit-reverse → P4 → P3 P2 P1 P0 → bit-reverse → swap, ÷16

`bitrev_buffer` is a 2 × 16-word ping-pong reorder buffer.

### Live tags and frame alignment

Three rules keep frames lined up across the pipeline:

- **Elements move only on valid.** A pipelined FFT of this kind only empties when more samples are pushed in. Each element therefore advances only on a valid input.
- **Each sample carries a `live` bit.** The `live` bit separates real samples from the zeros that `hwt` pushes in to flush the last frame. Only live outputs are taken.
- **OFS parameters set each counter's starting phase.** Each element counts samples to know where a frame starts. Elements behind earlier delay lines see the first sample of a frame later. Their `OFS` parameter sets the counter's phase at reset, so every element agrees on the frame boundaries.

If you change the pipeline, recompute the `OFS` values from the delays listed at the top of `rtl/dht16.sv`.

### Latency, and 8-sample lines

- Sample n of the input leaves as sample n + 62, plus 18 clocks of register stages.
- The block has 8-sample lines. Each line is zero-padded to 16 samples, and the first 8 outputs are kept.
- The Hilbert transform of an 8-point line is therefore the 16-point transform of the padded line, cut to 8 samples.

## The 2-D DWT (`dwt2d`)

The DWT is the 5/3 lifting wavelet with symmetric extension at both ends of a line:

    d(n) = x(2n+1) − ½·(x(2n) + x(2n+2))          (predict)
    s(n) = x(2n)   + ¼·(d(n−1) + d(n))            (update)

| Part | What it does |
|---|---|
| `dwt_mem_unit1` | A dual-port RAM. Port A reads even samples and port B reads odd ones. A register keeps the previous even sample, so each request completes one triple (x(2n), x(2n+1), x(2n+2)) per clock. A *mirror* request reads nothing and repeats the last even sample, which gives the right-hand symmetric extension. |
| `dwt_processor` | A 7-stage floating-point pipeline. It has a coefficient ROM {−½, ¼} and holds d(n−1) for the update step. A `first` flag replaces d(−1) by d(0), which is the left-hand extension. |
| `dwt_mem_unit2` | Has two write ports, so the low and high coefficients are stored in the same clock, in Mallat positions. It has one registered read port. |
| `dwt_control` | The FSM. For each level it runs ROW → XFER → COL → XFER_LL. XFER copies the row result back into memory unit 1 for the column pass. XFER_LL copies only the LL quarter back for the next level. |

Levels are 1 to 3 on an 8x8 block:
- Level 1 works on 8x8.
- Level 2 works on 4x4.
- Level 3 works on 2x2.

## Quantizer

Each coefficient is divided by the entry of the 8x8 JPEG luminance table at its position, then rounded. The same table is used for all four components.

The computation runs in this order:

1. The fp32 magnitude is turned into fixed point with 4 fraction bits (`FRAC`).
2. Half the divisor is added so the result rounds to nearest.
3. An 18-stage pipelined restoring divider (`pipe_divider`, `NW = 18`) produces one quotient per clock.
4. The sign is restored.
5. The result is clipped to signed 8 bits.

Timing:
- Latency is NW + 2 = 20 clocks.
- A downstream stall freezes the whole pipeline (`in_ready = out_ready`).

## Stream formats of the encoder

**Zigzag scanner.** A 128 × 8-bit dual-port memory split into two 64-byte halves:
- One half is written in raster order while the other is read in zigzag order.
- The halves swap roles after each block.
- The zigzag look-up table is computed by a constant function, using the usual JPEG anti-diagonal rule.

**Run-length coder.** It writes these bytes:
- A non-zero value is passed unchanged, as its 8-bit two's complement.
- A run of k zeros inside the block becomes the pair `0, k−1`.
- Zeros that run to the end of the block become the end-of-block pair `0, 0xFF`.

For example, `5 0 0 0 −2 0 … 0` becomes `05 00 02 FE 00 FF`.

**Huffman coder.** It builds a fresh code for every block, in five steps:

1. A histogram CAM (at most `MAXSYM = 128` distinct bytes) counts the symbols while the block is buffered.
2. The symbols are sorted by count with an odd-even transposition sort.
3. The tree is built with the two-queue method.
4. The code lengths and codes are assigned walking down from the root.
5. The bits are emitted MSB first:

       count(8) { symbol(8) length(5) code(length) } × count   code(sym) for each byte of the block

A block with one distinct symbol gets a one-bit code. Codes are at most `CLW = 16` bits long. `bit_last` is raised on the last bit of each block's stream.

## How far it can be trusted

The testbenches compare against models written independently in the testbench packages:
- A real-arithmetic Hilbert transform, 5/3 DWT, HWT and quantizer.
- A software RLE and a Huffman decoder.

Every testbench has a watchdog.

| Testbench | What it checks |
|---|---|
| `fp_mul_tb`, `ffasu_tb` | Random and corner operands against a bit-exact IEEE model with the same rounding and flush rules. |
| `dht_p0_tb` … `dht_p3_tb`, `dht_p4_tb` | Each FFT element against its mathematical output, frame by frame. |
| `dht16_tb` | The Hilbert transform of random 16-sample frames, and its fixed latency. |
| `dwt2d_tb` | 1, 2 and 3 levels against a reference lifting DWT. It checks all the memory units and the controller. |
| `hwt_tb` | All four components of random blocks. |
| `quantizer_tb` | Rounding, clipping, stalls and the 20-clock latency. |
| `zigzag_scanner_tb`, `rle_encoder_tb`, `huffman_encoder_tb`, `vle_tb` | Decoded streams equal the inputs. Huffman code lengths are optimal. |
| `image_compressor_tb` | Several blocks at levels 1, 2 and 3 with random stalls on both sides. It decodes the bit stream and compares the coefficients with the reference. It also counts each mechanism: input and output stalls, zero runs, end-of-block pairs, level switches and flushing samples. A mechanism that never occurs is a failure. |
| `image256_tb` | A 256x256 synthetic image (1024 blocks, 3 levels) at the default parameters, checked the same way. |

Floating-point results are compared with a small tolerance in ULPs, because the order of operations differs from the reference. The quantized values must match exactly, except for rare ±1 differences at rounding ties. The full-image test bounds those at 2 %.

### Compression ratio

This design does **not** reach a 6:1 compression ratio. The 256x256 synthetic image gives 524,288 input bits and 1,163,487 output bits: the output is larger than the input.

There are two reasons:
- All four HWT components (4 × 64 coefficients) are encoded for each 64-pixel block.
- Each block carries its own Huffman table.

A table shared by many blocks would change the picture a great deal. So would dropping components, or a coarser quantizer. Those are format choices, left open here.

## Departures and own choices

**Additions to the element chain:**
- Full 16-word bit-reversal buffers are placed around P4. A swap of neighbouring pairs alone would not reorder a 16-point FFT output correctly.
- The inverse FFT is a second P3–P0 chain rather than a reuse of the first.

**Sizes:**
- Each 8-sample line is zero-padded to 16 samples to match the 16-point Hilbert processor.

**Quantization table:**
- The table is the standard JPEG luminance table. Its fourth row is `14 17 22 29 51 87 80 62`.

**Format and handshake choices, all this design's own:**
- 8-bit clipping after quantization.
- The RLE end-of-block marker.
- The per-block Huffman header.
- The handshake protocol.
- Pixels enter as 0..255 with no level shift.

**Not included:**
- The external image memory. The image enters and leaves as streams instead.

## Simulating

Any testbench runs with plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/hwt_pkg.sv tb/tb_fp_pkg.sv tb/tb_vle_pkg.sv tb/tb_hwt_ref_pkg.sv \
  tb/image_compressor_tb.sv --top-module image_compressor_tb
./obj_dir/Vimage_compressor_tb
```

Replace the file and top name for another testbench.

- Each testbench prints `TB_RESULT checks=N failures=M`.
- `image_compressor_tb` also prints the mechanism counts and the bit count.
- `image256_tb` runs the whole 256x256 image in well under a minute.

Parameters worth changing:

| Module | Parameter | Default | Effect |
|---|---|---|---|
| `quantizer` | `FRAC` | 4 | Fixed-point fraction bits, i.e. rounding precision. |
| `quantizer` | `NW` | 18 | Divider width and latency. |
| `huffman_encoder` | `MAXSYM` | 128 | Distinct symbols per block. This sets the CAM and sorter size. |
| `huffman_encoder` | `CLW` | 16 | Longest code. |
