# PAMP3: a pipelined MP3 (MPEG-1 Layer III) decoder in SystemVerilog

This is a hardware MP3 decoder built as eight pipeline stages. It reads a
compressed MPEG-1 Layer III stream from a 64-bit main memory and produces
16-bit PCM samples. Each stage does one step of the standard decoding flow
and passes its results on as soon as it has them. The stages are:
bitstream decoding, requantization, reordering, alias reduction, IMDCT, a
transposition buffer, the synthesis filterbank and PCM output. Each stage
runs at its own pace. It hands data to the next stage through a handshake
channel, so a slow stage only stalls its neighbours. No global schedule is
needed.

The architecture comes from an asynchronous design: a Balsa description in
which every channel is a four-phase bundled-data handshake. This version is
synchronous, with one clock. Every channel is a valid/ready pair, and a beat
moves on a clock edge where both are high. The stage boundaries, buffers
and channel contents are kept, so the pipeline behaves the same way: data
flow through it as it is produced.

```
 main memory ──► Synchronizer & Huffman ──► Requantizer ──► Reorder ──► Anti-alias
 (64-bit words)   (sync, side info,          |is|^(4/3)     short-block   butterflies
                   bit reservoir, Huffman)   · 2^(C/4)      reordering
                                                                            │
 PCM ◄── PCM_out ◄── Filterbank ◄── BUFF ◄── IMDCT ◄───────────────────────┘
 16 bit  L/R order   matrixing,     18→32    IMDCT, window,
                     window, sum    transpose overlap-add
```

## Data on the channels

- A **quantized value** is a signed 14-bit integer. It travels with its
  frequency line index (0–575) and a `gr_info_t` record. That record holds
  the granule's global gain, scalefactors, subblock gains, preflag,
  scalefac_scale and block type.
- A **spectral or time sample** between the requantizer and the filterbank
  is a signed 32-bit number in Q4.28: 4 integer bits and 28 fraction bits.
  It travels with a 10-bit index and a `meta_t` record:
  - header mode (stereo, joint, dual, mono)
  - channel
  - granule
  - block type (0 long, 1 start, 2 short, 3 stop)
  - mixed flag
- Constant coefficients (cosines, windows, butterfly constants) are Q2.30.
  `q_mul` multiplies a Q4.28 sample by a Q2.30 constant and rounds the
  result.
- **PCM** is signed 16-bit. `data_ch` tells which channel a sample belongs
  to.

The types and shared functions are in `pamp3_pkg`. That package holds:
- the 44.1 kHz scalefactor band tables;
- the frame length table;
- the side-information parser;
- the fixed-point helpers.

## The bitstream front end (Synchronizer & Huffman stage)

This stage is the most involved part of the design. It is built from three
modules and three buffers.

**synchronizer** fetches 64-bit words from main memory with a request and
acknowledge pair (`mem_req`/`mem_addr`, then `mem_ack`/`mem_out`). It reads
each word's bytes in stream order, most significant byte first. It hunts
for a frame header:
- the sync word;
- MPEG-1, Layer III, 44.1 kHz;
- a valid bit rate index.

Anything else is skipped one byte at a time, so the decoder resynchronizes
after junk.

The four header bytes go into the header buffer. An optional CRC word is
skipped. The 17 bytes (mono) or 32 bytes (two channels) of side information
go into the side-information buffer. The parsed side information is then
offered to the Huffman decoder as one `frame_info_t`, which holds:
- main_data_begin;
- scfsi;
- per granule and channel: part2_3_length, big_values, gains, tables,
  regions and block type.

Finally the frame's main data bytes are written into the main data buffer.
Their count is the frame length minus the header, CRC and side information.
The stream ends when the fetch address reaches `mem_boundary`, which is the
number of words the stream fills. At that point `mem_reset` pulses and
`eos` rises.

**main_data_buffer** is a 2048-byte circular memory with one write port and
one read port. 2048 bytes hold the largest bit reservoir (511 bytes) plus
the main data of the longest 44.1 kHz frame.

**buff_rw_arbitor** lets the writer and the reader use the buffer at the
same time. Both sides count bytes as absolute 32-bit positions.
- A write waits while the buffer already holds 2048 bytes the reader may
  still need. The reader tells the arbiter the lowest byte it may still
  need (`rd_floor`).
- A read of byte *n* waits until byte *n* has been written.
- A granted read returns its data one clock later.

An assertion checks that the reader never asks for a byte below its own
floor.

**scale_huffman** decodes the main data of one granule and channel at a
time.
- **Bit reservoir.** A frame's main data start `main_data_begin` bytes
  before the point where the synchronizer began writing that frame's own
  main data. The synchronizer reports that point with each frame as
  `md_start`, so the reader jumps to `md_start − main_data_begin`. Data of
  earlier frames that lie before this point, such as ancillary bytes, are
  skipped.
- **Bit window.** The decoder keeps a 64-bit window of upcoming bits, which
  it refills byte by byte through the arbiter. It also keeps the absolute
  bit position.
- **Scalefactors.** Scalefactors are read with the slen1/slen2 lengths that
  `scalefac_compress` selects, for long, short and mixed blocks. With scfsi,
  granule 1 reuses the scalefactor groups that granule 0 sent.
- **Big values.** Pairs are looked up in `huffman_rom`: the next six bits
  address the table directly and return the code length. Linbits and sign
  bits follow each pair. Three regions, each with its own table, are split
  at the `region0_count`/`region1_count` boundaries for long blocks. For
  window-switching blocks the split is at line 36.
- **count1 region.** Quadruples are decoded with table A or B until
  `part2_3_length` is used up or line 576 is reached. The remaining lines
  are zero.

Each decoded value goes to the requantizer as soon as it exists. The
decoder does not wait for the whole granule. The granule's parameters
(`gr_info_t`) stay valid alongside the values.

The Huffman ROM holds big-value tables 0–3 and both count1 tables, which
covers low-complexity streams. If a granule selects any other table, the
decoder counts it on `unsupported`, skips the rest of that granule's bits
(using `part2_3_length`) and outputs zeros for it. The stream stays in sync.

## Requantizer

Each value becomes

    xr = sign(is) · |is|^(4/3) · 2^(C/4)

- **Long blocks:** C = global_gain − 210 − (sf_l[sfb] + preflag·pretab[sfb]) · 2^(1+scalefac_scale).
- **Short blocks:** C = global_gain − 210 − 8·subblock_gain[w] − sf_s[sfb][w] · 2^(1+scalefac_scale).
- **Mixed blocks:** the first 36 lines are treated as long-block lines.

The scalefactor band and the window come from the line index and the
44.1 kHz band tables.

`pow43_rom` holds i^(4/3) for i < 8192 in Q18.14. Its contents are computed
from that formula when the memory is initialised. `fras` takes 2^(C/4)
apart into a shift, 2^⌊C/4⌋, and one of four Q2.30 constants,
2^((C mod 4)/4). Results saturate to the Q4.28 range. The stage handles one
value every three clocks: accept, ROM read, output.

## Reorder and alias reduction

**reorder.**
- **Long blocks** pass straight through with no extra latency.
- **Short blocks** arrive in band, window, frequency order. Line *i* of a
  short band that starts at *b* and is *w* wide goes to position
  3·(b + f) + window, where window = (i − 3b) / w and f = (i − 3b) mod w.
  The three windows of every frequency end up side by side, which is the
  order the IMDCT wants.
- **Short and mixed granules** are written into a 576-word buffer at their
  new positions. The buffer is read out once the granule is complete.
- **Mixed blocks:** the first 36 lines keep their place.

**anti_alias** holds two 18-sample register banks: the previous subband (A)
and the one being received (B). When B is full, eight butterflies cross the
boundary between them, with the standard cs/ca constants:
- long blocks: at all 31 boundaries;
- mixed blocks: only between subbands 0 and 1;
- short blocks: none.

Bank A, now final, is sent on, and B moves into A.

## IMDCT

For each subband:
- **Long subbands:** x[i] = Σ X[k]·cos(π/72·(2i+19)(2k+1)) for 36 outputs
  from 18 inputs. The result is multiplied by the window of the block type:
  normal, start or stop.
- **Short subbands:** three 12-point transforms of the interleaved windows
  are each windowed by sin(π/12·(i+½)) and overlapped at offsets 6, 12 and
  18.

The first 18 results are added to the values saved from the previous
granule of the same channel and subband. The last 18 results are saved for
the next one. The overlap memory holds 2 × 32 × 18 words. It is not reset;
a flag per channel and subband makes it read as zero until it has been
written. The odd samples of odd subbands are then negated (frequency
inversion), so the filterbank can use them directly.

The sums are computed with one multiplier, one product per clock:
- a long subband takes 648 clocks;
- a short subband takes 216 clocks.

The original architecture uses a fast algorithm instead (DCT-IV turned into
3- and 9-point SDCT-II modules in five sub-stages). Its results are
mathematically the same, but it needs far fewer multiplications.

## BUFF and the synthesis filterbank

**buff** is a ping-pong pair of 576-word banks. The IMDCT writes one bank
subband by subband, at address 18·sb + t. The filterbank reads the other
bank time slot by time slot: output 32·t + sb comes from address 18·sb + t.
The banks swap when a granule has been written and the other has been read.

**filterbank** runs the standard polyphase synthesis for each time slot of
32 subband samples:
1. **Matrixing.** V[i] = Σ cos((16+i)(2k+1)·π/64)·S[k] for i < 64. Each
   result is pushed into the channel's 1024-entry V FIFO, which is a
   circular region whose start moves back by 64 for every slot. The cosine
   comes from a 128-entry table cos(nπ/64), addressed by (16+i)(2k+1)
   mod 128.
2. **Windowing and sum.** pcm[j] = Σ_{i<16} D[32i+j]·V[64i + j + 32·(i odd)].
   The U vector is formed by addressing V; it is never copied.
3. **Scaling.** The Q4.28 result times 32768 is rounded and saturated to
   16 bits. Saturations are counted on `clips`.

The V FIFOs of both channels share one 2048-word memory, which is cleared
for 2048 clocks after reset.

**About the window D.** The standard's 512 synthesis window coefficients
are a published table, not a formula, and this design does not reproduce
them. D is generated instead, from a prototype low-pass filter of the same
length and cut-off: a Blackman-windowed sinc, cut-off π/64, centred at
255.5, with every odd block of 64 coefficients negated as in the standard
window. The filterbank's structure is the standard one. PCM output is
therefore close to that of a reference decoder, but not bit-exact. To get
reference output, replace the `dwin` initialisation in `filterbank.sv`
with the standard table.

The original uses B.G. Lee's fast 32-point DCT with Konstantinides'
symmetry in six sub-stages. Here the 64 × 32 matrix is applied directly:
2048 + 512 multiply-accumulates per time slot.

## PCM output

- **Mono (mode 3):** samples pass straight through.
- **Stereo and dual channel (modes 0 and 2):** the 576 channel-0 samples of
  a granule are stored. When channel 1 arrives, the output alternates
  L, R, L, R.
- **Joint stereo (mode 1):** interleaved the same way, but without
  mid/side or intensity-stereo processing.

## Timing

Almost everything is one operation per clock, with the stages overlapping.
The slowest stage is the filterbank: about 2,600 clocks per time slot, or
about 47,000 clocks per granule and channel. The IMDCT needs up to about
23,000 clocks per granule. A stereo frame (4 granule-channels, 26 ms of
audio) therefore takes about 190,000 clocks, and real-time playback needs
a clock of about 7.5 MHz. For a mono frame it is half that.

## Departures from the original architecture, and limits

| Area | This design |
|------|-------------|
| Handshakes | Synchronous valid/ready with one clock instead of asynchronous four-phase channels; no C-elements or S-elements. |
| Sample rates | 44.1 kHz MPEG-1 Layer III only (band tables and frame lengths). |
| Huffman | Tables 0–3 and count1 A/B only; granules using other tables decode as silence and are counted. |
| CRC | Skipped, not checked. |
| Joint stereo | No mid/side or intensity decoding. |
| IMDCT | Direct evaluation with one multiplier instead of the fast five-sub-stage algorithm. |
| Filterbank | Direct matrixing instead of the fast DCT; generated window D instead of the standard table. |
| Reorder | Waits for the whole short granule instead of sending as soon as a subband is complete (same output order). |
| Main memory | Not part of the design; a behavioural model is in `tb/main_memory.sv`. |

## Verification

Every module has a self-checking testbench in `tb/` that compares its
outputs with values worked out independently, usually a real-number model
of the formula. Each testbench prints `TB_RESULT checks=N failures=M`. All
of them drive the handshakes with random stalls.

| Testbench | What it checks |
|-----------|----------------|
| `tb_main_data_buffer` | random reads and writes against a model memory |
| `tb_buff_rw_arbitor` | read-after-write ordering, full and empty stalls, reservoir-style backward reads |
| `tb_synchronizer` | resynchronization after junk bytes, side information of mono/stereo/CRC frames, main data bytes and `md_start`, end of stream |
| `tb_scale_huffman` | every decoded value and the granule parameters of generated frames (long, short, mixed, scfsi, count1 A/B, reservoir) |
| `tb_requantizer` | eq. xr = sign·\|is\|^(4/3)·2^(C/4) for every block type, including saturation |
| `tb_reorder` | short/mixed reordering and long pass-through |
| `tb_anti_alias` | butterflies per block type against a real model |
| `tb_imdct` | IMDCT, all windows, overlap across block-type changes, frequency inversion |
| `tb_buff` | transposition and bank swapping |
| `tb_filterbank` | V FIFO, windowing, scaling and clipping against a real model |
| `tb_pcm_out` | mono pass-through and L/R interleave for modes 0, 1, 2 |
| `tb_pamp3_decoder` | the whole decoder at default parameters on a five-frame stream; see below |
| `tb_pamp3_stream` | 24 random frames (mono and stereo, every block type, CRC, ancillary data): frame and sample counts, channel order, clocks per frame |

`tb_pamp3_decoder` builds its stream with an encoder written in
SystemVerilog (`tb/tb_mp3_gen_pkg.sv`). The stream has frames with:
- silence;
- a CRC word;
- long, start, short, stop and mixed blocks;
- scfsi reuse and ancillary data;
- mono and stereo granules;
- one granule with an unsupported Huffman table.

Main data are packed back to back, so the bit reservoir is used. The
testbench checks the number of frames and samples, silence where expected,
channel order and the end of stream. It also counts how often each
mechanism occurred and fails if any of these never occurred:
- bit reservoir, CRC and scfsi;
- count1 tables A and B;
- each block type;
- the butterflies;
- BUFF swaps;
- mono and interleaved output;
- input and output stalls.

It does not compare PCM values with a reference decoder, because of the
generated window D. The longest stream simulated end to end is the 24 frames
of `tb_pamp3_stream`, which takes about 3.4 million clocks.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pamp3_pkg.sv tb/tb_mp3_gen_pkg.sv tb/main_memory.sv rtl/*.sv tb/tb_pamp3_decoder.sv \
    --top-module tb_pamp3_decoder -o sim && ./obj_dir/sim
```

Replace the testbench file and the top-module name for the others.
`tb_mp3_gen_pkg.sv` and `main_memory.sv` are needed only by
`tb_pamp3_decoder`, `tb_pamp3_stream`, `tb_scale_huffman` and
`tb_synchronizer`.

## Files

- `rtl/pamp3_pkg.sv`: types, band tables, side-information parser, fixed-point helpers
- `rtl/pamp3_decoder.sv`: top level
- `rtl/synchronizer.sv`, `main_data_buffer.sv`, `buff_rw_arbitor.sv`,
  `scale_huffman.sv`, `huffman_rom.sv`: bitstream front end
- `rtl/requantizer.sv`, `pow43_rom.sv`, `fras.sv`: requantizer
- `rtl/reorder.sv`, `anti_alias.sv`, `imdct.sv`, `buff.sv`, `filterbank.sv`,
  `pcm_out.sv`: the remaining stages
- `tb/`: testbenches, the stream generator package and the memory model
