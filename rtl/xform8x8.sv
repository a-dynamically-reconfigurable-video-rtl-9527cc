// xform8x8: pipelined separable 8x8 forward or inverse DCT.
//
// Three stages, each on its own ping-pong buffer, so three blocks can be in
// flight and the steady-state rate is one sample per clock (64 clocks/block):
//   load   - 64 input samples are written at the raster position in_pos gives;
//   row    - one 8-tap dot product per clock over a row of the loaded block;
//   column - one 8-tap dot product per clock over a column of the row result,
//            produced straight at the output in raster or zigzag order.
// Forward (INVERSE=0): R[y][u] = sum_x T[u][x] X[y][x], F[v][u] = sum_y T[v][y] R[y][u].
// Inverse (INVERSE=1): the transpose basis, so the pair is an exact inverse up
// to rounding.  The row result keeps FRAC extra fraction bits; both passes round
// half up, and the output saturates to OUT_W bits.
// Interface: valid/ready on both sides.  in_tag is taken with the 64th input
// sample and returned with every output sample of that block (out_idx is the
// output sequence number, out_pos the raster position).  Latency from the 64th
// input to the first output is 65 clocks when nothing stalls.
// The document says only that DCT and IDCT are exact inverses and highly
// pipelined; this structure, the word lengths and the rounding are this
// design's choices.
module xform8x8
  import vre_pkg::*;
#(
  parameter bit          INVERSE = 1'b0,
  parameter bit          ZIGZAG_OUT = 1'b0,
  parameter int unsigned IN_W    = 12,
  parameter int unsigned OUT_W   = 12,
  parameter int unsigned TAG_W   = 8,
  parameter int unsigned FRAC    = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  input  logic [5:0]              in_pos,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_data,
  output logic [5:0]              out_idx,
  output logic [5:0]              out_pos,
  output logic [TAG_W-1:0]        out_tag
);
  localparam int unsigned RW  = 20;            // row-pass word
  localparam int unsigned ACC = 44;

  logic signed [IN_W-1:0] abuf [2][64];
  logic signed [RW-1:0]   bbuf [2][64];
  logic [TAG_W-1:0]       atag [2];
  logic [TAG_W-1:0]       btag [2];
  logic [1:0]             a_full, b_full;
  logic                   la, ra, rw, cb;
  logic [5:0]             lcnt, rcnt, ccnt;

  // basis element M(b,k): T[b][k] forward, T[k][b] inverse
  function automatic logic signed [13:0] basis(input int b, input int k);
    return INVERSE ? $signed(DCT_T[k * 8 + b]) : $signed(DCT_T[b * 8 + k]);
  endfunction

  // ---------------- load stage
  assign in_ready = !a_full[la];
  wire load_fire = in_valid && in_ready;

  // ---------------- row stage
  wire row_act = a_full[ra] && !b_full[rw];
  logic signed [ACC-1:0] row_sum;
  always_comb begin
    int ar, bc;
    ar = int'(rcnt[5:3]);
    bc = int'(rcnt[2:0]);
    row_sum = '0;
    for (int k = 0; k < 8; k++)
      row_sum += ACC'(basis(bc, k)) * ACC'(abuf[ra][ar * 8 + k]);
  end
  wire signed [ACC-1:0] row_rnd = (row_sum + ACC'(1 << (11 - FRAC))) >>> (12 - FRAC);

  // ---------------- column stage
  logic [5:0] cpos;
  assign cpos = ZIGZAG_OUT ? ZIGZAG[ccnt] : ccnt;
  logic signed [ACC-1:0] col_sum;
  always_comb begin
    int v, u;
    v = int'(cpos[5:3]);
    u = int'(cpos[2:0]);
    col_sum = '0;
    for (int k = 0; k < 8; k++)
      col_sum += ACC'(basis(v, k)) * ACC'(bbuf[cb][k * 8 + u]);
  end
  wire signed [ACC-1:0] col_rnd = (col_sum + ACC'(1 << (11 + FRAC))) >>> (12 + FRAC);
  localparam logic signed [ACC-1:0] OMAX = ACC'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC-1:0] OMIN = -ACC'(1 << (OUT_W - 1));

  assign out_valid = b_full[cb];
  assign out_idx   = ccnt;
  assign out_pos   = cpos;
  assign out_tag   = btag[cb];
  assign out_data  = (col_rnd > OMAX) ? OUT_W'(OMAX) :
                     (col_rnd < OMIN) ? OUT_W'(OMIN) : OUT_W'(col_rnd);
  wire col_fire = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_full <= '0; b_full <= '0;
      la <= 1'b0; ra <= 1'b0; rw <= 1'b0; cb <= 1'b0;
      lcnt <= '0; rcnt <= '0; ccnt <= '0;
      atag <= '{default: '0};
      btag <= '{default: '0};
    end else begin
      if (load_fire) begin
        abuf[la][in_pos] <= in_data;
        lcnt <= lcnt + 6'd1;
        if (lcnt == 6'd63) begin
          a_full[la] <= 1'b1;
          atag[la]   <= in_tag;
          la         <= ~la;
        end
      end
      if (row_act) begin
        bbuf[rw][rcnt] <= RW'(row_rnd);
        rcnt <= rcnt + 6'd1;
        if (rcnt == 6'd63) begin
          a_full[ra] <= 1'b0;
          ra         <= ~ra;
          b_full[rw] <= 1'b1;
          btag[rw]   <= atag[ra];
          rw         <= ~rw;
        end
      end
      if (col_fire) begin
        ccnt <= ccnt + 6'd1;
        if (ccnt == 6'd63) begin
          b_full[cb] <= 1'b0;
          cb         <= ~cb;
        end
      end
    end
  end

  // the same bank is never filled by one stage while another drains it
  a_bank_clash: assert property (@(posedge clk) disable iff (!rst_n) !(row_act && load_fire && la == ra))
    else $error("xform8x8: load/row bank clash");
endmodule
