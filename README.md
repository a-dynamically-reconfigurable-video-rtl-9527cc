# Dynamically reconfigurable video encoder

SystemVerilog model of a video encoder for JPEG, MPEG-1, MPEG-2 and H.263. The
variable length coder (VLC) sits in a dynamically reconfigurable gate array (DPGA).
The host switches the encoder from one standard to another by rewriting a small
window of that array's cells while the encoder keeps running. The other blocks are
fixed logic: the DCT and quantiser (DCTQ), the inverse quantiser and IDCT
(IQ+IDCT), motion estimation and compensation (ME/MC), and the frame memories.

Top module: `video_encoder` (`rtl/video_encoder.sv`). It has one clock, `clk`,
meant to run at 50 MHz, and an active-low reset, `rst_n`.

## Data path

```
px stream ──► encoder_ctrl ──► dctq ──┬──► vlc_dpga (dual RAM ► VLC ► FIFO ► serializer) ──► bit_out
cur RAM ───► me_mc ── residual ──┘    └──► iq_idct ──► me_mc reconstruction ──► frame_ram 0/1
```

- **I macroblocks.** Pixels arrive on `px_valid/px_ready/px_data`, one block of
  64 samples after another.
- **P macroblocks.** The host first loads the 384-sample current RAM through
  `cur_we/cur_addr/cur_data`. `me_mc` then searches the reference frame, reports
  the vector on `mv_valid/mv_x/mv_y`, and streams prediction errors into DCTQ.
- **Block order.** Y0–Y3, Cb, Cr. Only the four Y blocks are coded when the
  colour register is 0 (monochrome).
- **Fork after DCTQ.** The quantised levels, in zigzag order, go both to the VLC
  and to IQ+IDCT, under one joint handshake. The reconstructed samples are
  prediction plus decoded error, clipped to 0..255. They are written to the frame
  memory that is not the current reference.
- **Frame swap.** A host command swaps the two frame memories. `ref_sel` shows
  which one is the reference.
- **JPEG.** IQ+IDCT and ME/MC are bypassed. A P request is coded as intra, and no
  frame memory is written.

## Transform: `xform8x8`, `dctq`, `iq_idct`

`xform8x8` is a separable 8×8 DCT or IDCT with three stages: load, row pass and
column pass. Ping-pong buffers sit between the stages, so a new block can enter
while the previous one is still in the transform. Throughput is one sample per
clock, which is 64 clocks per block. The cosines are a 14-bit table, and the row
result keeps 3 guard bits.

`dctq` adds the quantiser, with a 9-bit tag {qscale, intra, block}:

- the intra DC coefficient uses a step of 8;
- every other coefficient uses a step of 2·qscale;
- intra blocks round to nearest, inter blocks truncate.

`iq_idct` multiplies each level by the same step, saturates the result to 12 bits,
puts the coefficient back at its raster position, and runs the inverse transform.

## Motion estimation and compensation: `me_mc`, `frame_ram`

- **Search.** Full search over ±`RANGE` (7) on luma, one pixel per clock, with a
  pipelined sum of absolute differences (SAD). When two candidates have equal SAD,
  the first one found is kept. Candidates outside the picture are skipped; the
  picture size comes from the width and height registers.
- **Prediction.** Fetched once per macroblock. The chroma vector is the luma
  vector halved toward zero.
- **Frame memory.** `frame_ram` holds one 1024×768 picture in 4:2:0 format: a Y
  plane, then a Cb plane, then a Cr plane. It has one write port and one read
  port with registered output.

## Macroblock controller: `encoder_ctrl`

`encoder_ctrl` starts on a macroblock command. For each block it chooses the pixel
stream (I) or the ME residual (P), and it feeds DCTQ with the block's tag. It
raises `mb_done` when the last block has gone through the quantiser. It also keeps
counts of I and P macroblocks.

## Host interface: `host_decoder`

The host writes bytes over `host_addr` (16 bits), `host_data` (8 bits) and
`host_wr`. WR is synchronised, and a register loads on WR's rising edge.

| Address | Register |
|---|---|
| FF00 | configuration data byte (this address asserts CS*) |
| FF01 | bit 0 = CON* |
| FF02 | standard: 0 JPEG, 1 MPEG-1, 2 MPEG-2, 3 H.263 |
| FF03 | colour (1) or monochrome (0) |
| FF04 / FF05 | picture width / height in macroblocks |
| FF06 | serial speed: one bit every speed+1 clocks |
| FF07 | quantiser scale |
| FF08 / FF09 / FF0A | header code high, header code low, header length |
| FF0C / FF0D | macroblock x / y |
| FF0E | command: bit 0 start, bit 1 P macroblock, bit 2 swap frames |

Reset state:

- MPEG-2, colour, 64×48 macroblocks;
- speed 0;
- quantiser scale 8;
- CON* high.

## DPGA configuration port: `dpga_config_port`

This block follows the reconfiguration scheme of the array:

- **Mode and clock.** Mode pins M0–M2 must read 6, the 8-bit parallel mode. CCLK
  is the synchronised rising edge of WR.
- **Start and end.** Configuration starts on the first CCLK with CS* and CON*
  low. It ends on the first CCLK with CON* high.
- **Stream format.** A segment count (1 byte). Then, for each segment: the start
  cell (2 bytes), the end cell (2 bytes), and one data byte per cell.
- **Cell numbering.** Cells 1–6400 are logic cells and 6401–6600 are I/O cells.
  Only the cell written on a given CCLK changes.
- **Errors.** An out-of-range cell, an end cell below the start cell, or CON*
  raised before the last segment is complete sets `cfg_error`. Bytes after the
  last segment are ignored.
- **Power-up.** All cells are cleared to zero, one per clock (`init_busy`).

With CCLK at one byte per 10 clocks (0.2 µs per cell at 50 MHz), the published
reconfiguration figures work out:

- MPEG-2 windows 2482–2799, 3122–3601 and 3921–4319 = 1197 cells, about 240 µs;
- the 1600-cell JPEG table = 320 µs.

## Variable length coder: `vlc_dual_ram`, `vlc_coder`, `sync_fifo`, `bit_serializer`, `vlc_dpga`

- **`vlc_dual_ram`.** Two 64-entry banks that take turns between DCTQ and the
  coder. Each bank also holds its block's tag, its last non-zero index, and an
  any-non-zero flag.
- **Handshakes.**
  - `vrdy`: a block is ready and no configuration is in progress.
  - `vstrt`: the host starts coding the block.
  - `eocv`: a one-clock pulse when the block has been coded.
  - `hrdy` / `sendh`: the host puts the header code from registers FF08–FF0A into
    the FIFO. This also resets the DC predictors.
- **Coding.**
  - Intra DC: the difference from the component's predictor, sent as a size
    category code plus the difference bits.
  - AC, JPEG: (run, size) code plus magnitude bits.
  - AC, other standards: (run, |level|) code plus a sign bit.
  - H.263 has a separate table for the last coefficient and sends no EOB.
  - Events with no code become ESC + run (6 bits) + level (12 bits). In H.263 the
    LAST bit comes first.
- **Code table.** Read from configuration cells `TABLE_BASE`.., 3 cells per entry
  ({length, code high, code low}), 271 entries:
  - EOB;
  - ESC;
  - 13 DC categories;
  - 128 (run, level) entries;
  - 128 last-coefficient entries.
  A table read waits while a configuration is in progress.
- **`sync_fifo`.** 256 entries of {code 32 bits, length 6 bits}.
- **`bit_serializer`.** Sends each code MSB first on `bit_out`, with `bit_strobe`
  marking each bit. It keeps sending while the array is being reconfigured.
- **`vlc_dpga`.** Wraps the configuration port, the cell memory, the dual RAM, the
  coder, the FIFO and the serializer.

The real JPEG, MPEG and H.263 code tables are not part of the design: any table in
this layout can be downloaded. The host must reconfigure only between blocks,
after `eocv`.

## Timing

At 50 MHz the target of 2170 ns per 8×8 block is 108 clocks. The transform takes
64 clocks per block and the motion search 225×256 clocks per macroblock at
RANGE 7. So with full search standing in for the fast one-step search, P
macroblocks are limited by the search, not by the transform.

## Not modelled

- The fast one-step search (FOSS) algorithm. A full search replaces it.
- Automatic quality control. The quantiser scale is a host register.
- Half-pel motion vectors.
- H.263 fixed-length intra DC.
- The standards' real code tables.
- The split of the design across four FPGAs and the configuration EPROMs.
- The host processor. The testbenches act as the host.

## Verification

Every module has a self-checking testbench in `tb/`. `video_encoder_tb` runs the
top at its default size, 1024×768 with RANGE 7. It covers:

- MPEG-2 I and P macroblocks;
- a frame swap;
- a switch to JPEG made while the serial line is still sending, with a monochrome
  macroblock and a P request;
- a switch to H.263.

It checks:

- levels against a real-valued DCT model;
- reconstruction against a real-valued IDCT;
- motion vectors against a brute-force search;
- the whole bit stream against a reference coder.

## Simulating

All testbenches are self-checking and end with a `TB_RESULT checks=N failures=M`
line. The top-level run takes a few seconds. To build one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/vre_pkg.sv tb/ref_pkg.sv tb/vlc_ref_pkg.sv tb/video_encoder_tb.sv --top-module video_encoder_tb
./obj_dir/Vvideo_encoder_tb
```

Replace `video_encoder_tb` with `<module>_tb` to run a single block.
`tb/ref_pkg.sv` holds the real-valued DCT/IDCT and quantiser models.
`tb/vlc_ref_pkg.sv` holds the reference coder, a test code table and the
configuration-stream builder that the host side of the testbenches uses.
