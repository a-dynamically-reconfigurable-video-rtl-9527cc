// dctq: integrated 8x8 DCT and quantiser.
//
// Samples of one block (pixels for intra blocks, prediction errors for inter
// blocks) enter in any order with their raster position; the quantised
// coefficients leave in zigzag order, one per clock, through a one-entry
// output register.  The transform is xform8x8 in forward mode.
// Quantiser: step Q = 8 for the DC coefficient of an intra block, otherwise
// Q = 2*qscale.  Intra coefficients round to nearest, inter coefficients
// truncate toward zero (a dead zone).  The tag carries {qscale, intra, block}
// and travels with the block.
// Rate: 64 clocks per block in steady state, inside the 2170 ns (108 clocks at
// 50 MHz) the document gives per 8x8 block.  The document gives DCT plus
// quantisation as one unit and the per-block time; the quantiser rule, the
// word lengths and the zigzag output are this design's choices.
module dctq
  import vre_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [11:0] in_data,
  input  logic [5:0]         in_pos,
  input  logic [4:0]         in_qscale,
  input  logic               in_intra,
  input  logic [2:0]         in_blk,
  output logic               out_valid,
  input  logic               out_ready,
  output logic signed [11:0] out_level,
  output logic [5:0]         out_idx,     // zigzag index
  output logic [4:0]         out_qscale,
  output logic               out_intra,
  output logic [2:0]         out_blk
);
  logic               x_valid, x_ready;
  logic signed [11:0] x_data;
  logic [5:0]         x_idx, x_pos;
  logic [8:0]         x_tag;

  xform8x8 #(.INVERSE(1'b0), .ZIGZAG_OUT(1'b1), .IN_W(12), .OUT_W(12), .TAG_W(9)) u_fdct (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_pos, .in_tag({in_qscale, in_intra, in_blk}),
    .out_valid(x_valid), .out_ready(x_ready), .out_data(x_data),
    .out_idx(x_idx), .out_pos(x_pos), .out_tag(x_tag)
  );

  wire [4:0] qs    = x_tag[8:4];
  wire       intra = x_tag[3];
  logic [7:0]  q;
  logic [11:0] mag, lev;
  always_comb begin
    q   = (intra && x_idx == 6'd0) ? 8'd8 : {2'b0, qs, 1'b0};
    if (q == 8'd0) q = 8'd2;                       // qscale 0 treated as 1
    mag = x_data[11] ? 12'(-x_data) : 12'(x_data);
    lev = intra ? 12'((13'(mag) + 13'(q >> 1)) / 13'(q)) : 12'(mag / 12'(q));
  end

  assign x_ready = !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_level <= '0; out_idx <= '0; out_qscale <= '0; out_intra <= 1'b0; out_blk <= '0;
    end else if (x_ready) begin
      out_valid  <= x_valid;
      out_level  <= x_data[11] ? -$signed(lev) : $signed(lev);
      out_idx    <= x_idx;
      out_qscale <= qs;
      out_intra  <= intra;
      out_blk    <= x_tag[2:0];
    end
  end
  wire unused_ok = ^x_pos;
endmodule
