// encoder_ctrl: macroblock sequencer of the encoder (the controller that sits
// with DCTQ).
//
// On mb_start it codes one macroblock: 6 blocks (Y0..Y3, Cb, Cr) for colour,
// 4 luminance blocks for monochrome.  Intra (I) macroblocks take their pixels
// block by block, raster order, from the input image block stream; P
// macroblocks start the motion estimator and take its prediction-error stream.
// Either way the samples go to DCTQ with the block number, intra flag and
// quantiser scale.  JPEG has no P macroblocks and no reconstruction: a P
// request in JPEG mode is coded intra and the macroblock ends when its last
// sample enters DCTQ; otherwise it ends when the IDCT has returned every
// reconstructed sample.  busy is high meanwhile; done pulses at the end.
// The document gives the block order, the colour/monochrome block counts, that
// IQ/IDCT and ME/MC idle in JPEG, and that the controller lives in the DCTQ
// device; the sequencing itself is this design's.
module encoder_ctrl
  import vre_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mb_start,
  input  logic               mb_inter,
  input  std_e               standard,
  input  logic               color,
  input  logic [4:0]         qscale,
  output logic               busy,
  output logic               done,
  output logic               cur_inter,
  // input image block stream (I macroblocks)
  input  logic               px_valid,
  output logic               px_ready,
  input  logic [7:0]         px_data,
  // motion estimator
  output logic               me_start,
  output logic               me_inter,
  input  logic               res_valid,
  output logic               res_ready,
  input  logic signed [11:0] res_data,
  input  logic [5:0]         res_pos,
  input  logic [2:0]         res_blk,
  // DCTQ input
  output logic               dq_valid,
  input  logic               dq_ready,
  output logic signed [11:0] dq_data,
  output logic [5:0]         dq_pos,
  output logic [4:0]         dq_qscale,
  output logic               dq_intra,
  output logic [2:0]         dq_blk,
  // reconstruction returned by IQ/IDCT
  input  logic               rec_fire,
  // statistics
  output logic [15:0]        n_intra_mb,
  output logic [15:0]        n_inter_mb
);
  typedef enum logic [1:0] {C_IDLE, C_FEED, C_WAIT} cstate_e;
  cstate_e st;
  logic [8:0] fcnt, rcnt;
  logic       jpeg_mb, col;
  logic [4:0] qs;
  wire  [8:0] nsamp = col ? 9'd384 : 9'd256;

  assign busy      = (st != C_IDLE);
  assign me_start  = (st == C_IDLE) && mb_start;
  assign me_inter  = mb_inter && (standard != STD_JPEG);
  assign px_ready  = (st == C_FEED) && !cur_inter && dq_ready;
  assign res_ready = (st == C_FEED) && cur_inter && dq_ready;
  assign dq_valid  = (st == C_FEED) && (cur_inter ? res_valid : px_valid);
  assign dq_data   = cur_inter ? res_data : 12'(px_data);
  assign dq_pos    = cur_inter ? res_pos : fcnt[5:0];
  assign dq_blk    = cur_inter ? res_blk : fcnt[8:6];
  assign dq_intra  = !cur_inter;
  assign dq_qscale = qs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; fcnt <= '0; rcnt <= '0; cur_inter <= 1'b0; jpeg_mb <= 1'b0; col <= 1'b1;
      qs <= 5'd8; done <= 1'b0; n_intra_mb <= '0; n_inter_mb <= '0;
    end else begin
      done <= 1'b0;
      if (rec_fire && st != C_IDLE) rcnt <= rcnt + 9'd1;
      unique case (st)
        C_IDLE: if (mb_start) begin
          cur_inter <= me_inter;
          jpeg_mb   <= (standard == STD_JPEG);
          col       <= color;
          qs        <= qscale;
          fcnt      <= '0;
          rcnt      <= '0;
          if (me_inter) n_inter_mb <= n_inter_mb + 16'd1;
          else          n_intra_mb <= n_intra_mb + 16'd1;
          st <= C_FEED;
        end
        C_FEED: if (dq_valid && dq_ready) begin
          fcnt <= fcnt + 9'd1;
          if (fcnt == nsamp - 9'd1) st <= C_WAIT;
        end
        C_WAIT: if (jpeg_mb || rcnt == nsamp) begin
          done <= 1'b1;
          st <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
