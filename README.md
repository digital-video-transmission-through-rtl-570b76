# Power-line video link: the FPGA and glue logic of an H.263 QCIF codec

This RTL is the digital core of a video link that uses the building's mains
wiring as its channel. A camera picture is digitised and coded to H.263 by two
DSPs working in parallel. Each DSP codes one half of the picture. The bit
stream is protected by a convolutional code, GMSK-modulated onto a carrier
near 100 kHz and coupled onto the 230 V line. At the far end a third DSP decodes
the stream and a video encoder drives a monitor.

The DSPs (TMS320C50 class) do the coding in software. The logic around them
has one job: to keep the DSPs away from slow, scattered memory accesses. It
does this in four places:

* **Acquisition (FPGA1).** The A/D delivers samples in raster order. FPGA1
  stores them in macroblock order, so a DSP reads each 8x8 block as 64
  consecutive words.
* **Difference transfer (FPGA2).** FPGA2 subtracts the previous reconstructed
  picture (the prediction) from the new one, inside each DSP's memory. It does
  this while the DSP is held off its bus, once per picture. The DSP then finds
  its INTER-mode input ready in place.
* **Microcontroller functions.** The coder side turns the DSPs' 16-bit words
  into one serial stream. The decoder side re-aligns the received bits into
  16-bit words that start at each picture start code.
* **Display (FPGA3).** DSP3 writes the decoded picture in macroblock order.
  FPGA3 splits it into Y, Cr and Cb RAMs, and a counter with EPROM tables reads
  it back out in raster order for the D/A.

An 8x8 DCT/quantizer and dequantizer/IDCT engine is also included. It follows
the fixed-point algorithm of the DSP coding loop (two matrix passes with one
multiply-accumulate, power-of-two quantizer, block qualification). So are the
link's error-correcting code, a rate 1/2 convolutional encoder and its Viterbi
decoder, which sit between the microcontroller functions and the modem.

All the RTL is synthesizable SystemVerilog-2017 with one clock. The dual-port
RAMs have two clocks, but in the top both are tied to the one clock. Every
module has a self-checking testbench. The exception is the shared matrix pass
`mat8_xform`, which is tested through `dct_q` and `idct_dq`.

## Data flow

```
 A/D ──Y,Cr,Cb──► acq_formatter ──► frame_sram ──► diff_dma ──┬─► dsp_mem (DSP1) ─┐
   (FPGA1)        ▲ acq_eprom       (64K x 8)     (FPGA2)     └─► dsp_mem (DSP2) ─┤ DSPs code
                  └─ ctrl_regs (FPGA2 control section) ◄── DSP I/O               │ (outside)
                                                                                  ▼
 modem TX ◄── conv_enc ◄── tx_merge ◄── video_fifo x2 (FIFO1, FIFO2) ◄── words ───┘
 (outside)   (K=7, r=1/2)  (coder µC)

 modem RX ──► viterbi_dec ──► rx_align ──► video_fifo (FIFO3) ──► DSP3 (outside) ──┐
                              (decoder µC)                        samples          ▼
 D/A ◄── disp_scan ◄── dp_ram x3 (Y, Cr, Cb) ◄── ycc_demux (FPGA3) ◄─────────────────┘
         ▲ counter ──► disp_eprom x3 ──► RAM read addresses

 dct_q ──levels──► idct_dq        (block engine, ports brought out on the top)
```

`pltv_top` wires all of this. The GMSK modem, the DSPs, the A/D and the D/A are
outside it, and their buses are its ports. The testbench plays their parts.

## Picture layout and the address tables

This is the part that needs the most care. Four tables and counters must agree
on it.

A QCIF picture is 176x144 luminance samples, with one Cr and one Cb sample for
each 2x2 pixel group (88x72 each). That is 38016 samples. They form 9 rows
(GOBs) of 11 macroblocks. A macroblock covers 16x16 pixels and holds 384 samples
in this order: the four Y blocks (top-left, top-right, bottom-left,
bottom-right), then Cb, then Cr. Each block is stored row by row.

**Acquisition index.** FPGA1 numbers the samples as it receives them:

* the Y sample of pixel (x,y) is `y*176 + x`;
* the Cb sample of chroma position (cx,cy) is `25344 + cy*88 + cx`;
* the Cr sample is `31680 + cy*88 + cx`.

**Acquisition EPROM** (`acq_eprom`, 38016 x 16 bits) maps that index to the
frame-buffer address `mb*384 + blk*64 + r*8 + c`, where:

* for Y: `mb = (y/16)*11 + x/16`, `blk = 2*((y%16)/8) + (x%16)/8`, `r = y%8`,
  `c = x%8`;
* for chroma: `mb = (cy/8)*11 + cx/8`, `blk` = 4 for Cb and 5 for Cr,
  `r = cy%8`, `c = cx%8`.

**Sub-images.** The picture is split between the coder DSPs on whole GOBs.
DSP1 gets GOBs 0–4 (frame-buffer words 0..21119). DSP2 gets GOBs 5–8 (words
21120..38015). Each DSP receives its part starting at offset 0.

**Decoder RAMs.** DSP3 writes its decoded picture in the same macroblock order,
one sample per write. `ycc_demux` counts the samples:

* the first 256 of each macroblock go to the Y RAM, at address `mb*256 + pos`;
* the next 64 go to the Cb RAM, and the last 64 to the Cr RAM, at
  `mb*64 + pos'`.

**Display EPROMs** (`disp_eprom`, 25344 entries each) map the raster pixel
counter `p = y*176 + x` to a RAM address:

* Y: `((y/16)*11 + x/16)*256 + blk*64 + (y%8)*8 + x%8`;
* Cr and Cb: `((y/16)*11 + x/16)*64 + ((y/2)%8)*8 + (x/2)%8`.

The EPROM contents are computed at elaboration from the functions in
`pltv_pkg` (`mb_order_addr`, `y_ram_addr`, `c_ram_addr`). If you change the
layout, change it there. The testbenches compute the same mappings
independently, by walking the picture in macroblock order.

## Coder: acquisition and difference transfer

**FPGA1 (`acq_formatter`).** A `start` pulse arms it. It then takes one pixel
per `pix_valid`/`pix_ready` handshake, with 8-bit Y, Cr and Cb, in raster
order. It keeps chrominance only on even rows and even columns (4:2:0). For each
kept sample it reads the EPROM and writes the SRAM at the address read. A pixel
takes 2 cycles, or 4 when it carries chrominance, so a picture takes 63360
cycles. `done` pulses after the last write. The testbench checks this timing.

**FPGA2 processing (`diff_dma`).** For DSP1 and then DSP2 it does the
following:

1. Raise `hold_req` and wait for `hold_ack`. The DSP has now floated its bus,
   and `dsp_mem` switches the memory to the DMA port.
2. For every sample `i` of the sub-image, spend two cycles: read the new sample
   from the SRAM and the prediction at `2C00H + i`, then write
   `new - prediction` (16-bit two's complement) at `8000H + i`.
3. Drop `hold_req`.

A picture costs 2 x 38016 cycles plus the handshakes.

There is no separate INTRA path. To code a macroblock (or the whole picture)
INTRA, the DSP writes zeros over that part of its prediction area. The
"difference" is then the picture itself.

DSP data memory map (16-bit words):

| region | addresses | contents |
|---|---|---|
| prediction | 2C00H .. 2C00H+N-1 | previous reconstruction, written by the DSP |
| difference | 8000H .. 8000H+N-1 | new minus prediction, written by FPGA2; the DSP then transforms it in place |

N is 21120 for DSP1 and 16896 for DSP2.

**FPGA2 control section (`ctrl_regs`).** Each coder DSP has an I/O port onto
four registers:

| # | write | read |
|---|---|---|
| 0 CTRL | bit0: start acquisition, bit1: start difference transfer (pulses) | 0 |
| 1 STATUS | – | bit0 acq busy, bit1 acq done (sticky), bit2 transfer busy, bit3 transfer done (sticky), bit4 mailbox DSP1→DSP2 full, bit5 mailbox DSP2→DSP1 full |
| 2 MBOX | post a word to the other DSP | 0 |
| 3 MBOX | – | take the other DSP's word (clears its full flag) |

Writing a start bit clears the matching sticky done bit.

## The bit-stream path

**Video FIFOs (`video_fifo`).** 16-bit words, 1024 deep, one clock,
first-word fall-through. A write into a full FIFO is dropped and sets a sticky
`overflow` flag. The writer must watch `full`. In the top-level test, DSP1
fills its FIFO and is stalled by `full` many times.

**Coder microcontroller (`tx_merge`).** It drains FIFO1 word by word and sends
each word MSB first, one bit per `bit_en` strobe from the modem. When FIFO1 is
empty and DSP1 holds `sub_done`, it answers with a one-cycle `sub_ack` and moves
on to FIFO2. After DSP2's `sub_ack` it returns to FIFO1 for the next picture.
So a picture goes out as DSP1's stream followed by DSP2's. Each DSP must write
its stream so that the two halves join into one valid H.263 picture. DSP2's
half starts with a GOB header.

**Decoder microcontroller (`rx_align`).** Received bits pass through a 22-bit
delay line. When the delay line holds the picture start code
`0000 0000 0000 0000 1000 00`, these steps follow:

* any partly filled word is completed with zeros and written;
* packing restarts, so the start code begins a new 16-bit word;
* the bits leaving the delay line from then on are packed MSB first into
  words for FIFO3.

Bits before the first start code are discarded. H.263 aligns start codes only
to bytes, so a start code can arrive in the middle of a 16-bit word. The
top-level test sends one such case.

## Link protection: convolutional code and Viterbi decoder

The mains wiring is a noisy channel, so the serial stream is coded before the
modem and corrected after it. The code is the common K=7, rate 1/2
convolutional code with generators 171 and 133 (octal). The source names only a
Viterbi codec chip, so the code itself is this design's choice.

**`conv_enc`.** Each data bit from `tx_merge` becomes a code pair, the parities
of the bit and the previous six under the two generators. The pair is a
combinational function of the 6-bit history and the current bit. The history
shifts on the modem strobe, so a bit and its pair cross in the same cycle.

**`viterbi_dec`.** It tracks all 64 states of the encoder (its last six bits).
For each received pair, 64 add-compare-select units work in parallel:

* the branch metric is the Hamming distance from the pair the branch would
  have sent;
* each state keeps the better of its two predecessors.

Path metrics are 8 bits and wrap around. They are compared by the sign of
their difference, which is exact while they stay within 127 of each other.
They start at most 32 apart, and settle within 12: every state can be reached
from the best one in six steps, each adding at most 2. Each state keeps the last 32 decided
bits of its path (register exchange), so no traceback memory is needed. After
32 pairs, every pair gives one decoded bit: the oldest bit of the best state's
path.

Decoding therefore lags 32 bits behind the line. A start code reaches
`rx_align` only once 32 more bits have arrived, and the 22-bit start-code
window adds its own delay. A sender must keep the line busy (padding,
the next picture) for the end of a picture to come out. The top-level test
flips one code bit in every 25 pairs; the decoder corrects all of them.

## Decoder display path

`ycc_demux` generates only write enables and addresses. The 8-bit data bus from
DSP3 goes straight to all three RAMs. `frame_start` restarts its counters, and
`frame_done` pulses after the 38016th sample.

After the first `frame_done`, `disp_scan` scans the 176x144 raster over and
over, one pixel per `pix_en` strobe. The EPROM read and the RAM read each take
one strobe, so `out_valid`, `out_first` (pixel 0) and `out_line` (column 0)
come two strobes after the count. Cr and Cb are repeated on the four pixels
they cover. Turning this into a PAL/NTSC signal, including any interpolation or
4:2:2 multiplexing, is left to the video encoder.

## Block transform engine

`mat8_xform` computes one pass `Y = (MD · MPᵀ)ᵀ`, that is
`Y[j][i] = Σk MD[i][k]·MP[j][k]`, and then applies it twice. The second pass
reads the first pass's result, so no transposed copy is ever made:

* with `MP = B`, two passes give the DCT, `B·A·Bᵀ`;
* with `MP = Bᵀ` (`INVERSE=1`), they give the IDCT, `Bᵀ·F·B`.

Here `B[u][x] = C(u)/2 · cos((2x+1)uπ/16)`, with `C(0) = 1/√2` and
`C(u>0) = 1`. B is stored as 13-bit signed numbers with 12 fraction bits:
1448, 2009, 1892, 1703, 1448, 1138, 784, 400 for k = 0..7. After each pass the
result is rounded to an integer and saturated to 16 bits.

There is one multiplier, with one product per cycle and eight per output. A
block therefore takes 64 cycles in, 1024 cycles of arithmetic and 64 cycles
out.

**`dct_q`.** It quantizes each coefficient as it leaves: the level is
`coef / 2^qshift`, truncated towards zero. It also qualifies the block as one
of:

* `QUAL_ZERO`: every level is zero;
* `QUAL_DC`: only the DC level is non-zero;
* `QUAL_FULL`: anything else.

`qual` is valid with `out_last`.

**`idct_dq`.** It dequantizes each level by a left shift of `qshift` and takes
the qualification with the 64th level. Then:

* `QUAL_ZERO` outputs 64 zeros at once;
* `QUAL_DC` outputs `F(0,0)/8`, rounded to nearest, 64 times at once. For a
  DC-only block the IDCT reduces exactly to that;
* `QUAL_FULL` runs the full transform, 1024 cycles later.

In `pltv_top` the engine is wired as in a coder's prediction loop: the levels
(toward the entropy coder) also feed the dequantizer/IDCT. Its inputs and
outputs are top-level ports. In the system it models, this work is done by
the DSPs.

## What is outside this RTL

These parts are not in the RTL:

* **The DSPs.** Their software is outside, including entropy coding and
  decoding with the H.263 VLC tables, and the INTER/INTRA decision.
* **The modem.** This covers the GMSK modulator and demodulator and the analog
  line interfaces (filters, class AB amplifier, isolation transformers, gain
  control). The codec chip's soft-decision input and its other modes are not
  modelled; only the hard-decision K=7 code is.
* **The Bt812 video decoder and Bt858 video encoder.**

The top brings out every signal at which these parts would connect.

## Design decisions

These points are choices made in this RTL. The source description of the system
leaves them open, or they read one of its figures a particular way.

* Difference area at 8000H. The 2C00H prediction base is given.
* Sub-image split on GOB boundaries, 5 and 4.
* HOLD handshake, with DSP1 served first.
* Register map of the control section. The mailboxes are one reading of "data
  exchange between the DSPs".
* FIFO depth 1024 and first-word fall-through.
* The `sub_done`/`sub_ack` handshake and the DSP1-then-DSP2 order in
  `tx_merge`.
* The delay-line start-code search, zero completion and discard before lock in
  `rx_align`.
* A/D pixel handshake, 4:2:0 by decimation, and acquisition order.
* DSP3's macroblock write order and the `frame_start` strobe.
* Continuous display refresh, and chroma repeated per pixel.
* Block qualification per 8x8 block. The system description speaks of
  qualifying macroblocks, but then uses per-block cases.
* The DC-only shortcut divides by 8. A 3-bit left shift, which the source text
  also mentions, would be wrong by a factor of 64.
* All fixed-point widths, rounding and truncation.
* The DCT/IDCT as a hardware engine. In the source system this is DSP software;
  the engine follows that software's algorithm.
* The convolutional code (K=7, 171/133), hard decisions and a survivor depth of
  32 for the link.
* One clock, and the frame SRAM handed from FPGA1 to FPGA2 by the
  acquisition's `busy`. Acquisition and transfer therefore do not overlap.

In the source figures the two coder FIFOs are numbered inconsistently. Here
DSP1 feeds FIFO1.

The source suggests more than two coder DSPs for a higher picture rate, with
small changes to FPGA1 and FPGA2. This RTL is built for two: `diff_dma`,
`tx_merge` and `ctrl_regs` serve exactly two DSPs.

## Simulating

Every module but `mat8_xform` has a testbench `tb/tb_<module>.sv`. It checks
against values it works out itself. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/pltv_pkg.sv tb/tb_pltv_top.sv --top-module tb_pltv_top -Mdir obj -o sim
./obj/sim
```

`tb_pltv_top` runs the whole design at its default (full QCIF) sizes in a few
seconds. It covers these steps:

* predictions loaded;
* a picture acquired;
* differences transferred and checked, INTER for DSP1 and INTRA for DSP2;
* three blocks through the transform engine, one of each qualification;
* two pictures' bit streams looped from the transmitter to the receiver through
  the encoder, a channel that flips code bits, and the Viterbi decoder, with
  FIFO stalls and a start code that is not word-aligned;
* a decoded picture displayed and checked pixel by pixel.

It counts each of these mechanisms and fails if one never happens.

The simulator used has only two logic states and random initial values. Every
register that is read is reset (`rst_n`, asynchronous, active low) or written
before use. The memories are not reset.

## Changing it

* Picture size and macroblock geometry live in `pltv_pkg`. The EPROM tables,
  counters and sub-image sizes follow from them. The fixed counter widths in
  `acq_formatter`, `ycc_demux` and `disp_scan` are sized for QCIF.
* `diff_dma` takes the sub-image sizes and both memory bases as parameters.
* `video_fifo` takes `WIDTH` and `DEPTH`.
* `conv_enc` and `viterbi_dec` take the generators. `viterbi_dec` also takes
  the survivor depth `DEPTH`. The state count is fixed at 64 (K=7).
* To make the transform engine faster, give `mat8_xform` more multipliers. Its
  interface and the pass structure can stay as they are.
