// video_encoder_tb: the whole encoder at its default size (1024 x 768 frames,
// +-7 search), driven as the host drives it.
//   1. power-up, MPEG-2 code table loaded through the DPGA configuration port
//      over the host bus, registers written, picture header sent;
//   2. nine I macroblocks (a 3 x 3 area), frame swap, two P macroblocks
//      (one at the picture corner);
//   3. partial reconfiguration to JPEG while the serial line is still busy,
//      a colour and a monochrome JPEG macroblock (one requested as P);
//   4. partial reconfiguration to H.263, an I and a P macroblock.
// The host side of the VLC answers VRDY with VSTRT after a random delay, which
// fills both coefficient banks and stalls DCTQ.  Checks: every quantised level
// against a double-precision DCT + quantiser (+-1); the serial bit stream bit
// for bit against the reference coder fed with those levels; every
// reconstructed sample in the frame memory against level*Q + double-precision
// IDCT + prediction (+-1); each motion vector against a brute-force search of
// the reference frame memory; no frame memory writes in JPEG mode.  Counts how
// often each mechanism occurred and fails any that never did.
module video_encoder_tb;
  import vre_pkg::*;
  import ref_pkg::*;
  import vlc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  localparam int W = 1024, H = 768, R = 7, BASE = 2401;

  logic [15:0] addr = '0;
  logic [7:0] hdata = '0;
  logic hwr = 0, vstrt = 0, vrdy, eocv, sendh = 0, hrdy, pxv = 0, pxr, cwe = 0, bo, bs, mvv;
  logic [2:0] mode_m = 3'd6;
  logic [7:0] pxd = '0, cd = '0;
  logic [8:0] ca = '0;
  logic signed [7:0] mvx, mvy;
  logic busy, mbdone, cfga, cfge, rsel;
  video_encoder dut (.clk, .rst_n, .host_addr(addr), .host_data(hdata), .host_wr(hwr), .mode_m,
    .vstrt, .vrdy, .eocv, .sendh, .hrdy, .px_valid(pxv), .px_ready(pxr), .px_data(pxd),
    .cur_we(cwe), .cur_addr(ca), .cur_data(cd), .bit_out(bo), .bit_strobe(bs),
    .mv_valid(mvv), .mv_x(mvx), .mv_y(mvy), .mb_busy(busy), .mb_done(mbdone),
    .cfg_active(cfga), .cfg_error(cfge), .ref_sel(rsel));

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s (t=%0d)", what, cyc); end
  endtask

  // ---------------- picture model
  function automatic int img(int plane, int x, int y);
    x = x + 64; y = y + 64;         // keeps samples of the shifted picture positive at the edges
    if (plane == 0) return (x * 3 + y * 2 + ((x * y) % 23) * 4) % 256;
    return (x * 5 + y * 7 + plane * 60) % 256;
  endfunction
  function automatic int yaddr(int x, int y); return y * W + x; endfunction
  function automatic int caddr(int c, int x, int y); return W * H + (c - 1) * (W * H / 4) + y * (W / 2) + x; endfunction
  function automatic int half(int v); return (v < 0) ? -((-v) / 2) : v / 2; endfunction
  function automatic int baddr(int b, int p, int mx, int my, int vx, int vy);
    if (b < 4) return yaddr(16 * mx + vx + (b % 2) * 8 + p % 8, 16 * my + vy + (b / 2) * 8 + p / 8);
    return caddr(b - 3, 8 * mx + half(vx) + p % 8, 8 * my + half(vy) + p / 8);
  endfunction
  function automatic int bplane(int b); return (b < 4) ? 0 : b - 3; endfunction
  function automatic int bx(int b, int p, int mx); return (b < 4) ? 16 * mx + (b % 2) * 8 + p % 8 : 8 * mx + p % 8; endfunction
  function automatic int by(int b, int p, int my); return (b < 4) ? 16 * my + (b / 2) * 8 + p / 8 : 8 * my + p / 8; endfunction
  function automatic int refpix(int a);
    return rsel ? int'(dut.u_frame1.mem[a]) : int'(dut.u_frame0.mem[a]);
  endfunction
  function automatic int recpix(int a);
    return rsel ? int'(dut.u_frame0.mem[a]) : int'(dut.u_frame1.mem[a]);
  endfunction

  // ---------------- host bus
  task automatic hw(input logic [15:0] a, input logic [7:0] v);
    addr = a; hdata = v;
    repeat (5) @(negedge clk); hwr = 1;
    repeat (5) @(negedge clk); hwr = 0;
  endtask
  tab_t tab;
  int cur_std = 2, n_cfg = 0;
  task automatic configure(input int s);
    bytes_t b;
    tab_t t = make_table(s);
    b = cfg_stream(t, s, BASE);
    hw(A_CFG_CTRL, 8'h00);
    foreach (b[i]) hw(A_CFG_DATA, b[i]);
    hw(A_CFG_CTRL, 8'h01);
    hw(A_STD, 8'(s));               // first CCLK with CON* high ends configuration
    repeat (6) @(negedge clk);
    chk(!cfga && !cfge, "configuration finished");
    tab = t; cur_std = s; n_cfg++;
  endtask

  // ---------------- capture of DCTQ output blocks (as the VLC receives them)
  typedef struct { int lev [64]; bit intra; int blk; } cblk_t;
  cblk_t capq [$];
  cblk_t cb_cur;
  always @(posedge clk) if (rst_n && dut.u_vlc.c_valid && dut.u_vlc.c_ready) begin
    cb_cur.lev[int'(dut.q_idx)] = int'(dut.q_level);
    cb_cur.intra = dut.q_intra; cb_cur.blk = int'(dut.q_blk);
    if (dut.q_idx == 6'd63) capq.push_back(cb_cur);
  end

  // ---------------- VLC host side: headers and VSTRT, expected bit stream
  bit exp_q [$], got_q [$];
  int hdr_q [$];
  int dcp [3], n_esc_ref = 0, n_hdr = 0, n_blocks = 0;
  bit vlc_run = 1;
  cblk_t coded [$];
  always @(posedge clk) if (rst_n && bs) got_q.push_back(bo);
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (hdr_q.size() > 0 && hrdy) begin
        automatic int h = hdr_q.pop_front();
        sendh = 1; put(exp_q, h & 16'hFFFF, h >> 16); dcp = '{0, 0, 0}; n_hdr++;
        @(negedge clk); sendh = 0;
      end else if (vrdy && hdr_q.size() == 0) begin
        automatic cblk_t c;
        automatic bits_t q;
        repeat ($urandom_range(0, 3) == 0 ? $urandom_range(50, 250) : 0) @(negedge clk);
        chk(capq.size() > 0, "block captured before VRDY");
        c = capq.pop_front();
        coded.push_back(c);
        q = encode_block(c.lev, c.intra, c.blk, cur_std, tab, dcp, n_esc_ref);
        foreach (q[i]) exp_q.push_back(q[i]);
        vstrt = 1; @(negedge clk); vstrt = 0;
        wait (eocv); n_blocks++;
      end
    end
  end
  task automatic header(input int code, input int len);
    wait (hdr_q.size() == 0);
    hw(A_HDR_HI, 8'(code >> 8)); hw(A_HDR_LO, 8'(code)); hw(A_HDR_LEN, 8'(len));
    hdr_q.push_back((len << 16) | code);
  endtask

  // ---------------- mechanism counters
  int n_stall = 0, n_ser_cfg = 0, n_jpeg_wr = 0, n_mv = 0, n_swap = 0, n_mono = 0;
  bit in_jpeg = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.dq_valid && !dut.dq_ready) n_stall++;
    if (cfga && bs) n_ser_cfg++;
    if (in_jpeg && dut.rec_we) n_jpeg_wr++;
    if (mvv) n_mv++;
  end

  // ---------------- one macroblock
  int shx = 0, shy = 0;
  function automatic int cur_pix(int b, int p, int mx, int my);
    return img(bplane(b), bx(b, p, mx) - ((b < 4) ? shx : half(shx)), by(b, p, my) - ((b < 4) ? shy : half(shy)));
  endfunction
  task automatic macroblock(input int mx, input int my, input bit p, input bit col, input int qs);
    int nb = col ? 6 : 4;
    int first = coded.size() + capq.size();
    int emx = 0, emy = 0;
    bit intra = !(p && cur_std != 0);
    hw(A_MB_X, 8'(mx)); hw(A_MB_Y, 8'(my)); hw(A_QSCALE, 8'(qs)); hw(A_COLOR, 8'(col));
    if (intra) begin
      hw(A_MB_CMD, {6'd0, p, 1'b1});
      for (int b = 0; b < nb; b++)
        for (int i = 0; i < 64; i++) begin
          @(negedge clk); pxv = 1; pxd = 8'(cur_pix(b, i, mx, my));
          while (!pxr) @(negedge clk);
        end
      @(negedge clk); pxv = 0;
    end else begin
      // current RAM, then brute-force search of the reference memory
      int best = 1 << 30;
      for (int b = 0; b < 6; b++)
        for (int i = 0; i < 64; i++) begin
          automatic int k = (b < 4) ? ((b / 2) * 8 + i / 8) * 16 + (b % 2) * 8 + i % 8 : 256 + (b - 4) * 64 + i;
          @(negedge clk); cwe = 1; ca = 9'(k); cd = 8'(cur_pix(b, i, mx, my));
        end
      @(negedge clk); cwe = 0;
      for (int dy = -R; dy <= R; dy++)
        for (int dx = -R; dx <= R; dx++) begin
          int x0 = 16 * mx + dx, y0 = 16 * my + dy, s = 0;
          if (x0 < 0 || y0 < 0 || x0 > W - 16 || y0 > H - 16) continue;
          for (int j = 0; j < 16; j++)
            for (int i = 0; i < 16; i++) begin
              automatic int df = img(0, 16 * mx + i - shx, 16 * my + j - shy) - refpix(yaddr(x0 + i, y0 + j));
              s += (df < 0) ? -df : df;
            end
          if (s < best) begin best = s; emx = dx; emy = dy; end
        end
      hw(A_MB_CMD, 8'h03);
      wait (mvv); @(negedge clk);
      chk(int'(mvx) == emx && int'(mvy) == emy, "motion vector");
      if (int'(mvx) != emx || int'(mvy) != emy) $display("  mv dut %0d,%0d ref %0d,%0d best %0d", mvx, mvy, emx, emy, best);
    end
    wait (!busy && coded.size() + capq.size() >= first + nb);
    repeat (4) @(negedge clk);
    // check levels and reconstruction of the nb blocks of this macroblock
    for (int b = 0; b < nb; b++) begin
      automatic cblk_t c = (first + b < coded.size()) ? coded[first + b] : capq[first + b - coded.size()];
      automatic blk_t src, fq;
      automatic rblk_t f, rr;
      for (int i = 0; i < 64; i++) begin
        automatic int pv = intra ? 0 : refpix(baddr(b, i, mx, my, emx, emy));
        src[i] = cur_pix(b, i, mx, my) - pv;
      end
      f = fdct(src);
      for (int k = 0; k < 64; k++) begin
        automatic int q = qstep(k, intra, qs);
        automatic int e = quant(rnd(f[zz(k)]), q, intra);
        chk(iabs(c.lev[k] - e) <= 1 && c.intra == intra && c.blk == b, "quantised level");
        fq[zz(k)] = c.lev[k] * q;
        if (fq[zz(k)] > 2047) fq[zz(k)] = 2047;
        if (fq[zz(k)] < -2048) fq[zz(k)] = -2048;
      end
      if (cur_std != 0) begin
        rr = idct(fq);
        for (int i = 0; i < 64; i++) begin
          automatic int pv = intra ? 0 : refpix(baddr(b, i, mx, my, emx, emy));
          automatic int e = pv + rnd(rr[i]);
          e = e < 0 ? 0 : (e > 255 ? 255 : e);
          chk(iabs(recpix(baddr(b, i, mx, my, 0, 0)) - e) <= 1, "reconstructed sample");
        end
      end
    end
    if (!col) n_mono++;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (!dut.u_vlc.init_busy);
    configure(2);
    hw(A_SPEED, 8'd0);
    header(16'h01B3, 16);
    for (int my = 0; my < 3; my++)
      for (int mx = 0; mx < 3; mx++) macroblock(mx, my, 1'b0, 1'b1, 6);
    hw(A_MB_CMD, 8'h04); n_swap++;
    header(16'h0100, 16);
    shx = 2; shy = -1;
    macroblock(1, 1, 1'b1, 1'b1, 8);
    macroblock(0, 0, 1'b1, 1'b1, 8);
    // switch to JPEG while the serial line still carries MPEG-2 codes
    wait (capq.size() == 0 && !busy && n_blocks == coded.size());   // the host reconfigures between blocks
    hw(A_SPEED, 8'd3);
    repeat (10) @(negedge clk);
    in_jpeg = 1;
    configure(0);
    header(16'hFFD8, 16);
    shx = 0; shy = 0;
    macroblock(3, 0, 1'b0, 1'b1, 4);
    macroblock(4, 0, 1'b1, 1'b0, 4);     // P request and monochrome in JPEG
    wait (capq.size() == 0 && !busy && n_blocks == coded.size());   // the host reconfigures between blocks
    in_jpeg = 0;
    hw(A_SPEED, 8'd0);
    configure(3);
    header(16'h0080, 9);
    macroblock(3, 1, 1'b0, 1'b1, 10);
    shx = -3; shy = 2;
    macroblock(1, 2, 1'b1, 1'b1, 10);
    wait (capq.size() == 0 && !busy && hrdy);
    for (int i = 0; i < 400000 && got_q.size() < exp_q.size(); i++) @(negedge clk);
    repeat (50) @(negedge clk);
    chk(got_q.size() == exp_q.size(), "bit count");
    if (got_q.size() != exp_q.size()) $display("  got %0d bits, expected %0d", got_q.size(), exp_q.size());
    begin
      int bad = 0;
      for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
        checks++;
        if (got_q[i] != exp_q[i]) begin bad++; failures++; if (bad < 5) $display("bit %0d differs", i); end
      end
    end
    chk(int'(dut.u_vlc.n_escapes) == n_esc_ref, "escape count");
    $display("mechanisms: I-MB %0d P-MB %0d MV %0d mono %0d DCTQ-stall-clk %0d escapes %0d reconfig %0d serial-during-cfg %0d headers %0d swaps %0d JPEG-frame-writes %0d blocks %0d bits %0d",
      dut.u_ctrl.n_intra_mb, dut.u_ctrl.n_inter_mb, n_mv, n_mono, n_stall, n_esc_ref, n_cfg, n_ser_cfg, n_hdr, n_swap, n_jpeg_wr, n_blocks, exp_q.size());
    chk(dut.u_ctrl.n_intra_mb > 0, "I macroblocks happened");
    chk(dut.u_ctrl.n_inter_mb > 0 && n_mv > 0, "P macroblocks happened");
    chk(n_mono > 0, "monochrome macroblock happened");
    chk(n_stall > 0, "DCTQ stall happened");
    chk(n_esc_ref > 0, "escape happened");
    chk(n_cfg >= 3, "reconfigurations happened");
    chk(n_ser_cfg > 0, "serial output during reconfiguration happened");
    chk(n_hdr > 0 && n_swap > 0, "headers and frame swap happened");
    chk(n_jpeg_wr == 0, "no reconstruction in JPEG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired: blocks %0d capq %0d coded %0d busy %0d vrdy %0d hrdy %0d hdrq %0d cfg %0d ctrl %0d me %0d", n_blocks, capq.size(), coded.size(), busy, vrdy, hrdy, hdr_q.size(), n_cfg, dut.u_ctrl.st, dut.u_memc.st);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
