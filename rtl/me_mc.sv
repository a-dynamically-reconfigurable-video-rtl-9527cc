// me_mc: block-matching motion estimator and compensator.
//
// Holds the current macroblock RAM (384 samples: 16x16 Y, 8x8 Cb, 8x8 Cr,
// written by the host).  For a P macroblock, start runs an exhaustive search
// over every integer displacement within +-RANGE whose 16x16 reference block
// lies inside the picture, reading one reference sample per clock and
// accumulating the sum of absolute differences; the smallest SAD wins (the
// first in raster order on a tie).  The motion vector is then presented on
// mv_x/mv_y with a one-clock mv_valid.  The compensator reads the prediction
// for all blocks (luma at the vector, chroma at the vector halved toward zero)
// into a 384-entry prediction buffer and streams the prediction errors
// current - prediction, block by block in raster order, to DCTQ.
// Reconstruction: samples from the IDCT are added to the prediction (zero for
// intra macroblocks), clipped to 0..255 and written to the frame memory at the
// macroblock's own position; an intra start only latches the position.
// Timing: search takes (number of candidates)*(256+1) clocks at most, the
// prediction fill NBLK*64+1 clocks, the error stream one sample per clock.
// The document uses its own fast one-step search (FOSS), whose steps it does
// not describe here; the exhaustive search, the search range and the
// integer-pel chroma vector are this design's stand-ins.
module me_mc #(
  parameter int unsigned FRAME_W = 1024,
  parameter int unsigned FRAME_H = 768,
  parameter int unsigned RANGE   = 7,
  parameter int unsigned AW      = $clog2(FRAME_W * FRAME_H * 3 / 2)
) (
  input  logic               clk,
  input  logic               rst_n,
  // current macroblock RAM (host)
  input  logic               cur_we,
  input  logic [8:0]         cur_addr,
  input  logic [7:0]         cur_data,
  // control
  input  logic               start,
  input  logic               inter,
  input  logic               color,
  input  logic [7:0]         mb_x,
  input  logic [7:0]         mb_y,
  input  logic [7:0]         width_mb,
  input  logic [7:0]         height_mb,
  output logic               busy,
  // reference frame read port (one clock latency)
  output logic [AW-1:0]      ref_addr,
  input  logic [7:0]         ref_data,
  // motion vector
  output logic               mv_valid,
  output logic signed [7:0]  mv_x,
  output logic signed [7:0]  mv_y,
  output logic [15:0]        mv_sad,
  // prediction-error stream to DCTQ
  output logic               res_valid,
  input  logic               res_ready,
  output logic signed [11:0] res_data,
  output logic [5:0]         res_pos,
  output logic [2:0]         res_blk,
  // reconstruction from IDCT
  input  logic               rec_valid,
  input  logic signed [11:0] rec_data,
  input  logic [5:0]         rec_pos,
  input  logic [2:0]         rec_blk,
  input  logic               rec_intra,
  output logic               rec_we,
  output logic [AW-1:0]      rec_addr,
  output logic [7:0]         rec_wdata
);
  typedef enum logic [2:0] {M_IDLE, M_SEARCH, M_DRAIN, M_PRED, M_RES} mstate_e;
  mstate_e st;

  localparam int signed R = RANGE;
  localparam int unsigned YSZ = FRAME_W * FRAME_H;

  logic [7:0]  cur  [384];
  logic [7:0]  pred [384];
  logic [7:0]  mbx, mby;
  logic signed [7:0] dx, dy;
  logic [7:0]  pix;
  logic        p1_v, p1_last;
  logic [7:0]  p1_pix;
  logic signed [7:0] p1_dx, p1_dy;
  logic [15:0] sad;
  logic [8:0]  pcnt, pcnt_d;
  logic        pfill_v;
  logic [8:0]  rcnt;
  wire  [8:0]  nsamp = color ? 9'd384 : 9'd256;

  // sample address in a plane: plane 0 = Y, 1 = Cb, 2 = Cr
  function automatic logic [AW-1:0] paddr(input int plane, input int x, input int y);
    if (plane == 0) return AW'(y * FRAME_W + x);
    if (plane == 1) return AW'(YSZ + y * (FRAME_W / 2) + x);
    return AW'(YSZ + YSZ / 4 + y * (FRAME_W / 2) + x);
  endfunction
  // index in the 384-sample macroblock of block b, raster position p
  function automatic int mbidx(input int b, input int p);
    if (b < 4) return ((b / 2) * 8 + p / 8) * 16 + (b % 2) * 8 + p % 8;
    return 256 + (b - 4) * 64 + p;
  endfunction
  // frame address of block b, raster position p, of the macroblock displaced by (vx, vy)
  function automatic logic [AW-1:0] baddr(input int b, input int p, input int vx, input int vy);
    int cx, cy;
    cx = (vx < 0) ? -((-vx) / 2) : vx / 2;
    cy = (vy < 0) ? -((-vy) / 2) : vy / 2;
    if (b < 4) return paddr(0, 16 * int'(mbx) + vx + (b % 2) * 8 + p % 8,
                            16 * int'(mby) + vy + (b / 2) * 8 + p / 8);
    return paddr(b - 3, 8 * int'(mbx) + cx + p % 8, 8 * int'(mby) + cy + p / 8);
  endfunction

  // candidate lies inside the picture
  wire signed [15:0] cx0 = 16'(16 * int'(mbx)) + 16'(dx);
  wire signed [15:0] cy0 = 16'(16 * int'(mby)) + 16'(dy);
  wire signed [15:0] xmax = 16'(16 * ((int'(width_mb)  * 16 > FRAME_W) ? FRAME_W / 16 : int'(width_mb))  - 16);
  wire signed [15:0] ymax = 16'(16 * ((int'(height_mb) * 16 > FRAME_H) ? FRAME_H / 16 : int'(height_mb)) - 16);
  wire cand_ok   = (cx0 >= 0) && (cy0 >= 0) && (cx0 <= xmax) && (cy0 <= ymax);
  wire cand_last = (dx == 8'(R)) && (dy == 8'(R));

  always_comb begin
    ref_addr = '0;
    if (st == M_SEARCH)
      ref_addr = AW'(int'(cy0 + 16'(pix[7:4])) * FRAME_W + int'(cx0 + 16'(pix[3:0])));
    else if (st == M_PRED)
      ref_addr = baddr(int'(pcnt[8:6]), int'(pcnt[5:0]), int'(mv_x), int'(mv_y));
  end

  assign busy      = (st != M_IDLE);
  assign res_valid = (st == M_RES);
  assign res_blk   = rcnt[8:6];
  assign res_pos   = rcnt[5:0];
  assign res_data  = 12'(signed'({1'b0, cur[mbidx(int'(rcnt[8:6]), int'(rcnt[5:0]))]})) -
                     12'(signed'({1'b0, pred[rcnt]}));

  wire [8:0] abs_d = (cur[p1_pix] >= ref_data) ? 9'(cur[p1_pix] - ref_data) : 9'(ref_data - cur[p1_pix]);

  always_ff @(posedge clk) begin
    if (cur_we && cur_addr < 9'd384) cur[cur_addr] <= cur_data;
    if (pfill_v) pred[pcnt_d] <= ref_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; mbx <= '0; mby <= '0; dx <= '0; dy <= '0; pix <= '0;
      p1_v <= 1'b0; p1_last <= 1'b0; p1_pix <= '0; p1_dx <= '0; p1_dy <= '0; sad <= '0;
      pcnt <= '0; pcnt_d <= '0; pfill_v <= 1'b0; rcnt <= '0;
      mv_valid <= 1'b0; mv_x <= '0; mv_y <= '0; mv_sad <= '1;
    end else begin
      mv_valid <= 1'b0;
      pfill_v  <= 1'b0;
      p1_v     <= 1'b0;
      // SAD accumulation, one clock behind the address
      if (p1_v) begin
        if (p1_pix == 8'd0) sad <= 16'(abs_d);
        else                sad <= sad + 16'(abs_d);
        if (p1_last) begin
          if (((p1_pix == 8'd0) ? 16'(abs_d) : sad + 16'(abs_d)) < mv_sad) begin
            mv_sad <= (p1_pix == 8'd0) ? 16'(abs_d) : sad + 16'(abs_d);
            mv_x   <= p1_dx;
            mv_y   <= p1_dy;
          end
        end
      end
      unique case (st)
        M_IDLE: if (start) begin
          mbx <= mb_x; mby <= mb_y;
          if (inter) begin
            dx <= -8'(R); dy <= -8'(R); pix <= '0;
            mv_sad <= '1; mv_x <= '0; mv_y <= '0;
            st <= M_SEARCH;
          end
        end
        M_SEARCH: begin
          if (cand_ok) begin
            p1_v <= 1'b1; p1_pix <= pix; p1_last <= (pix == 8'd255); p1_dx <= dx; p1_dy <= dy;
            pix <= pix + 8'd1;
          end
          if (!cand_ok || pix == 8'd255) begin
            pix <= '0;
            if (cand_last) st <= M_DRAIN;
            else if (dx == 8'(R)) begin dx <= -8'(R); dy <= dy + 8'sd1; end
            else dx <= dx + 8'sd1;
          end
        end
        M_DRAIN: if (!p1_v) begin
          mv_valid <= 1'b1;
          pcnt <= '0;
          st <= M_PRED;
        end
        M_PRED: begin
          pfill_v <= 1'b1;
          pcnt_d  <= pcnt;
          pcnt    <= pcnt + 9'd1;
          if (pcnt == nsamp - 9'd1) begin rcnt <= '0; st <= M_RES; end
        end
        M_RES: if (res_ready) begin
          rcnt <= rcnt + 9'd1;
          if (rcnt == nsamp - 9'd1) st <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

  // reconstruction: prediction + decoded error, clipped, one clock
  logic signed [12:0] rsum;
  always_comb begin
    rsum = 13'(rec_data) + (rec_intra ? 13'sd0 : 13'(signed'({1'b0, pred[{rec_blk, rec_pos}]})));
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_we <= 1'b0; rec_addr <= '0; rec_wdata <= '0;
    end else begin
      rec_we    <= rec_valid;
      rec_addr  <= baddr(int'(rec_blk), int'(rec_pos), 0, 0);
      rec_wdata <= (rsum < 0) ? 8'd0 : (rsum > 13'sd255) ? 8'd255 : 8'(rsum);
    end
  end
endmodule
