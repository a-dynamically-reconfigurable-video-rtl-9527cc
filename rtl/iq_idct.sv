// iq_idct: inverse quantiser and 8x8 IDCT, the exact inverses of dctq.
//
// Quantised levels enter in zigzag order (index 0..63) with the same
// {qscale, intra, block} tag dctq produced; each is multiplied back by its step
// (8 for intra DC, 2*qscale otherwise), saturated to 12 bits and written to its
// raster position in xform8x8 running in inverse mode.  Reconstructed samples
// (pixels for intra blocks, prediction errors for inter blocks) leave in raster
// order, one per clock, with their raster position and the tag.
// Rate 64 clocks per block, the same as dctq, so it runs concurrently with the
// VLC.  The document says IQ and IDCT are exact inverses of DCT and Q; the
// reconstruction rule level*Q is this design's reading of that.
module iq_idct
  import vre_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [11:0] in_level,
  input  logic [5:0]         in_idx,
  input  logic [4:0]         in_qscale,
  input  logic               in_intra,
  input  logic [2:0]         in_blk,
  output logic               out_valid,
  input  logic               out_ready,
  output logic signed [11:0] out_data,
  output logic [5:0]         out_pos,
  output logic               out_intra,
  output logic [2:0]         out_blk
);
  logic [7:0]          q;
  logic signed [20:0]  prod;
  logic signed [11:0]  coef;
  always_comb begin
    q = (in_intra && in_idx == 6'd0) ? 8'd8 : {2'b0, in_qscale, 1'b0};
    if (q == 8'd0) q = 8'd2;
    prod = 21'(in_level) * $signed({1'b0, q});
    coef = (prod > 21'sd2047) ? 12'sd2047 : (prod < -21'sd2048) ? -12'sd2048 : 12'(prod);
  end

  logic [8:0] tag;
  logic [5:0] oidx;
  xform8x8 #(.INVERSE(1'b1), .ZIGZAG_OUT(1'b0), .IN_W(12), .OUT_W(12), .TAG_W(9)) u_idct (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(coef), .in_pos(ZIGZAG[in_idx]),
    .in_tag({in_qscale, in_intra, in_blk}),
    .out_valid, .out_ready, .out_data, .out_idx(oidx), .out_pos, .out_tag(tag)
  );
  assign out_intra = tag[3];
  assign out_blk   = tag[2:0];
  wire unused_ok = ^{oidx, tag[8:4]};
endmodule
