// video_encoder: dynamically reconfigurable JPEG / MPEG-1 / MPEG-2 / H.263
// video encoder.
//
// Datapath (one sample per clock): pixels of an I macroblock, or the
// prediction errors of a P macroblock from the motion estimator/compensator,
// enter DCTQ; its quantised levels go both to the VLC in the reconfigurable
// device and to IQ/IDCT, which reconstructs the macroblock into the frame
// memory that the next frame's motion search reads.  The VLC codes each block
// when the host starts it (VRDY/VSTRT/EOCV), the host inserts headers
// (HRDY/SENDH), and the codes leave through a FIFO as a serial bit stream.
// Switching standard = a partial reconfiguration of the VLC code cells of the
// DPGA through its mode-6 port (WR as CCLK, CS* and CON* decoded from the host
// address bus, D0-D7) plus a write of the standard register.  The rest keeps
// running meanwhile.  In JPEG mode IQ/IDCT and ME/MC stay idle.
// Two frame memories alternate: ref_sel selects the one searched; the other
// receives the reconstruction; a swap command flips them.
// Host interface: A0-A15, D0-D7, WR (asynchronous, each level held at least
// two clocks), M0-M2 mode pins, VSTRT, SENDH; the current-macroblock RAM write
// port; the input image block stream (valid/ready).
// Defaults: 1024 x 768 frames (the document's picture size), search range +-7,
// 256-entry FIFO, code table from cell 2401 (the last three are this design's).
module video_encoder
  import vre_pkg::*;
#(
  parameter int unsigned FRAME_W    = 1024,
  parameter int unsigned FRAME_H    = 768,
  parameter int unsigned RANGE      = 7,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned TABLE_BASE = 2401
) (
  input  logic              clk,
  input  logic              rst_n,
  // host system bus
  input  logic [15:0]       host_addr,
  input  logic [7:0]        host_data,
  input  logic              host_wr,
  input  logic [2:0]        mode_m,
  // host handshakes
  input  logic              vstrt,
  output logic              vrdy,
  output logic              eocv,
  input  logic              sendh,
  output logic              hrdy,
  // input image block (I macroblocks)
  input  logic              px_valid,
  output logic              px_ready,
  input  logic [7:0]        px_data,
  // input image macroblock (current RAM, P macroblocks)
  input  logic              cur_we,
  input  logic [8:0]        cur_addr,
  input  logic [7:0]        cur_data,
  // outputs
  output logic              bit_out,
  output logic              bit_strobe,
  output logic              mv_valid,
  output logic signed [7:0] mv_x,
  output logic signed [7:0] mv_y,
  output logic              mb_busy,
  output logic              mb_done,
  output logic              cfg_active,
  output logic              cfg_error,
  output logic              ref_sel
);
  localparam int unsigned FDEPTH = FRAME_W * FRAME_H * 3 / 2;
  localparam int unsigned AW     = $clog2(FDEPTH);

  // ---------------- host decoders and registers
  logic        cs_n, con_n, color, mb_start, mb_inter, swap_frames;
  std_e        standard;
  logic [7:0]  width_mb, height_mb, speed, mb_x, mb_y;
  logic [4:0]  qscale, hdr_len;
  logic [15:0] hdr_code;

  host_decoder u_dec (
    .clk, .rst_n, .addr(host_addr), .data(host_data), .wr(host_wr),
    .cs_n, .con_n, .standard, .color, .width_mb, .height_mb, .speed, .qscale,
    .hdr_code, .hdr_len, .mb_x, .mb_y, .mb_start, .mb_inter, .swap_frames
  );

  // ---------------- macroblock controller
  logic               me_start, me_inter, cur_inter, res_valid, res_ready, rec_fire;
  logic signed [11:0] res_data;
  logic [5:0]         res_pos;
  logic [2:0]         res_blk;
  logic               dq_valid, dq_ready, dq_intra;
  logic signed [11:0] dq_data;
  logic [5:0]         dq_pos;
  logic [4:0]         dq_qscale;
  logic [2:0]         dq_blk;
  logic [15:0]        n_intra_mb, n_inter_mb;

  encoder_ctrl u_ctrl (
    .clk, .rst_n, .mb_start, .mb_inter, .standard, .color, .qscale,
    .busy(mb_busy), .done(mb_done), .cur_inter,
    .px_valid, .px_ready, .px_data,
    .me_start, .me_inter, .res_valid, .res_ready, .res_data, .res_pos, .res_blk,
    .dq_valid, .dq_ready, .dq_data, .dq_pos, .dq_qscale, .dq_intra, .dq_blk,
    .rec_fire, .n_intra_mb, .n_inter_mb
  );

  // ---------------- DCTQ
  logic               q_valid, q_ready, q_intra;
  logic signed [11:0] q_level;
  logic [5:0]         q_idx;
  logic [4:0]         q_qs;
  logic [2:0]         q_blk;

  dctq u_dctq (
    .clk, .rst_n,
    .in_valid(dq_valid), .in_ready(dq_ready), .in_data(dq_data), .in_pos(dq_pos),
    .in_qscale(dq_qscale), .in_intra(dq_intra), .in_blk(dq_blk),
    .out_valid(q_valid), .out_ready(q_ready), .out_level(q_level), .out_idx(q_idx),
    .out_qscale(q_qs), .out_intra(q_intra), .out_blk(q_blk)
  );

  // fork of the DCTQ bus to the VLC and (except in JPEG) to IQ/IDCT
  wire  jpeg = (standard == STD_JPEG);
  logic c_ready, iq_ready;
  assign q_ready = c_ready && (jpeg || iq_ready);

  // ---------------- IQ + IDCT
  logic               r_valid, r_intra;
  logic signed [11:0] r_data;
  logic [5:0]         r_pos;
  logic [2:0]         r_blk;

  iq_idct u_iqidct (
    .clk, .rst_n,
    .in_valid(q_valid && c_ready && !jpeg), .in_ready(iq_ready), .in_level(q_level),
    .in_idx(q_idx), .in_qscale(q_qs), .in_intra(q_intra), .in_blk(q_blk),
    .out_valid(r_valid), .out_ready(1'b1), .out_data(r_data), .out_pos(r_pos),
    .out_intra(r_intra), .out_blk(r_blk)
  );
  assign rec_fire = r_valid;

  // ---------------- ME/MC and the two frame memories
  logic [AW-1:0] ref_addr, rec_addr;
  logic [7:0]    ref_data, rec_wdata, rd0, rd1;
  logic          rec_we, me_busy;
  logic [15:0]   mv_sad;

  me_mc #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .RANGE(RANGE), .AW(AW)) u_memc (
    .clk, .rst_n, .cur_we, .cur_addr, .cur_data,
    .start(me_start), .inter(me_inter), .color, .mb_x, .mb_y, .width_mb, .height_mb,
    .busy(me_busy), .ref_addr, .ref_data, .mv_valid, .mv_x, .mv_y, .mv_sad,
    .res_valid, .res_ready, .res_data, .res_pos, .res_blk,
    .rec_valid(r_valid), .rec_data(r_data), .rec_pos(r_pos), .rec_blk(r_blk), .rec_intra(r_intra),
    .rec_we, .rec_addr, .rec_wdata
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ref_sel <= 1'b0;
    else if (swap_frames) ref_sel <= ~ref_sel;

  frame_ram #(.DEPTH(FDEPTH), .AW(AW)) u_frame0 (
    .clk, .we(rec_we && ref_sel), .waddr(rec_addr), .wdata(rec_wdata), .raddr(ref_addr), .rdata(rd0)
  );
  frame_ram #(.DEPTH(FDEPTH), .AW(AW)) u_frame1 (
    .clk, .we(rec_we && !ref_sel), .waddr(rec_addr), .wdata(rec_wdata), .raddr(ref_addr), .rdata(rd1)
  );
  assign ref_data = ref_sel ? rd1 : rd0;

  // ---------------- VLC and FIFO in the DPGA
  logic        init_busy, fifo_full;
  logic [12:0] cells_written;
  logic [15:0] n_escapes, n_cfg_stalls;

  vlc_dpga #(.FIFO_DEPTH(FIFO_DEPTH), .TABLE_BASE(TABLE_BASE)) u_vlc (
    .clk, .rst_n, .wr(host_wr), .cs_n, .con_n, .m(mode_m), .d(host_data),
    .standard, .speed, .hdr_code, .hdr_len,
    .c_valid(q_valid && (jpeg || iq_ready)), .c_ready, .c_level(q_level), .c_idx(q_idx),
    .c_intra(q_intra), .c_blk(q_blk),
    .vstrt, .vrdy, .eocv, .sendh, .hrdy, .bit_out, .bit_strobe,
    .cfg_active, .init_busy, .cells_written, .cfg_error, .n_escapes, .n_cfg_stalls, .fifo_full
  );

  wire unused_ok = ^{cur_inter, me_busy, mv_sad, n_intra_mb, n_inter_mb, init_busy,
                     cells_written, n_escapes, n_cfg_stalls, fifo_full};
endmodule
