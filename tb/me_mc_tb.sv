// me_mc_tb: motion estimator/compensator on a 64 x 48 colour frame with a
// +-3 search.  The reference frame is a random smooth picture in a frame_ram;
// the current macroblock is the reference displaced by a known vector plus
// noise.  Checks the vector and SAD against a brute-force search done here
// (first minimum in raster order), the bound to the picture at a corner
// macroblock, every prediction error (luma at the vector, chroma at the vector
// halved toward zero), the reconstruction writes (prediction + error, clipped;
// intra: error alone) and the search time of at most 257 clocks per candidate.
module me_mc_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  localparam int W = 64, H = 48, R = 3, D = W * H * 3 / 2, AW = $clog2(D);

  logic cur_we = 0, start = 0, inter = 0, color = 1, busy, mvv, resv, resr = 1;
  logic [8:0] cur_addr = '0;
  logic [7:0] cur_data = '0, mbx = '0, mby = '0, refd, wd;
  logic [AW-1:0] ra, wa;
  logic signed [7:0] mvx, mvy;
  logic [15:0] sad;
  logic signed [11:0] resd, recd = '0;
  logic [5:0] resp, recp = '0;
  logic [2:0] resb, recb = '0;
  logic recv = 0, reci = 0, we;
  logic twe = 0;
  logic [AW-1:0] twa = '0;
  logic [7:0] twd = '0;
  me_mc #(.FRAME_W(W), .FRAME_H(H), .RANGE(R), .AW(AW)) dut (.clk, .rst_n, .cur_we, .cur_addr,
    .cur_data, .start, .inter, .color, .mb_x(mbx), .mb_y(mby), .width_mb(8'(W/16)), .height_mb(8'(H/16)),
    .busy, .ref_addr(ra), .ref_data(refd), .mv_valid(mvv), .mv_x(mvx), .mv_y(mvy), .mv_sad(sad),
    .res_valid(resv), .res_ready(resr), .res_data(resd), .res_pos(resp), .res_blk(resb),
    .rec_valid(recv), .rec_data(recd), .rec_pos(recp), .rec_blk(recb), .rec_intra(reci),
    .rec_we(we), .rec_addr(wa), .rec_wdata(wd));
  frame_ram #(.DEPTH(D), .AW(AW)) u_ref (.clk, .we(twe), .waddr(twa), .wdata(twd), .raddr(ra), .rdata(refd));

  int fr [D];
  int cur [384];
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  function automatic int yaddr(int x, int y); return y * W + x; endfunction
  function automatic int caddr(int c, int x, int y); return W * H + (c - 1) * (W * H / 4) + y * (W / 2) + x; endfunction
  function automatic int half(int v); return (v < 0) ? -((-v) / 2) : v / 2; endfunction
  function automatic int bidx(int b, int p);
    if (b < 4) return ((b / 2) * 8 + p / 8) * 16 + (b % 2) * 8 + p % 8;
    return 256 + (b - 4) * 64 + p;
  endfunction
  function automatic int baddr(int b, int p, int mx, int my, int vx, int vy);
    if (b < 4) return yaddr(16 * mx + vx + (b % 2) * 8 + p % 8, 16 * my + vy + (b / 2) * 8 + p / 8);
    return caddr(b - 3, 8 * mx + half(vx) + p % 8, 8 * my + half(vy) + p / 8);
  endfunction

  task automatic run_mb(input int mx, input int my, input int sx, input int sy);
    int best = 1 << 30, bx = 0, by = 0, t0, ncand = 0;
    // current MB = reference displaced by (sx, sy) where inside, plus noise
    for (int b = 0; b < 6; b++)
      for (int p = 0; p < 64; p++) begin
        int a = baddr(b, p, mx, my, sx, sy);
        int v = (a >= 0 && a < D) ? fr[a] : 128;
        v += int'($urandom_range(0, 4)) - 2;
        cur[bidx(b, p)] = v < 0 ? 0 : (v > 255 ? 255 : v);
      end
    for (int i = 0; i < 384; i++) begin
      @(negedge clk); cur_we = 1; cur_addr = 9'(i); cur_data = 8'(cur[i]);
    end
    @(negedge clk); cur_we = 0;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++) begin
        int x0 = 16 * mx + dx, y0 = 16 * my + dy, s = 0;
        if (x0 < 0 || y0 < 0 || x0 > W - 16 || y0 > H - 16) continue;
        ncand++;
        for (int j = 0; j < 16; j++)
          for (int i = 0; i < 16; i++) begin
            int df = cur[j * 16 + i] - fr[yaddr(x0 + i, y0 + j)];
            s += (df < 0) ? -df : df;
          end
        if (s < best) begin best = s; bx = dx; by = dy; end
      end
    mbx = 8'(mx); mby = 8'(my); inter = 1;
    @(negedge clk); start = 1; t0 = cyc; @(negedge clk); start = 0;
    wait (mvv); @(negedge clk);
    chk(int'(mvx) == bx && int'(mvy) == by && int'(sad) == best, "motion vector and SAD");
    chk(cyc - t0 <= 49 * 257 + 4, "search time");
    if (int'(mvx) != bx || int'(mvy) != by) $display("mv (%0d,%0d) exp (%0d,%0d) sad %0d exp %0d", mvx, mvy, bx, by, sad, best);
    // prediction errors
    for (int n = 0; n < 384; ) begin
      automatic int b = n / 64, p = n % 64;
      @(negedge clk);
      if (resv) begin
        chk(resb == 3'(b) && resp == 6'(p) && int'(resd) == cur[bidx(b, p)] - fr[baddr(b, p, mx, my, bx, by)],
            "prediction error");
        n++;
      end
    end
    // reconstruction: inter, then intra
    for (int k = 0; k < 2; k++)
      for (int n = 0; n < 384; n += 7) begin
        automatic int b = n / 64, p = n % 64, e = int'($urandom_range(0, 600)) - 300;
        automatic int pv = (k == 0) ? fr[baddr(b, p, mx, my, bx, by)] : 0;
        automatic int exp = pv + e;
        exp = exp < 0 ? 0 : (exp > 255 ? 255 : exp);
        @(negedge clk); recv = 1; recb = 3'(b); recp = 6'(p); recd = 12'(e); reci = (k == 1);
        @(posedge clk); #1;
        chk(we && wa == AW'(baddr(b, p, mx, my, 0, 0)) && wd == 8'(exp), "reconstruction write");
        @(negedge clk); recv = 0;
      end
  endtask

  initial begin
    // smooth random reference picture
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) fr[yaddr(x, y)] = (x * 3 + y * 5 + int'($urandom_range(0, 40))) % 256;
    for (int c = 1; c < 3; c++)
      for (int y = 0; y < H / 2; y++)
        for (int x = 0; x < W / 2; x++) fr[caddr(c, x, y)] = (x * 7 + y * 2 + c * 50) % 256;
    for (int a = 0; a < D; a++) begin
      @(negedge clk); twe = 1; twa = AW'(a); twd = 8'(fr[a]);
    end
    @(negedge clk); twe = 0;
    rst_n = 1;
    run_mb(1, 1, 2, -1);
    run_mb(0, 0, -2, 3);     // corner: candidates outside the picture are skipped
    run_mb(3, 2, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
