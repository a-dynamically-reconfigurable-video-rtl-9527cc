// vlc_dpga_tb: the reconfigurable VLC device end to end.  Loads an MPEG-2 code
// table through the mode-6 port, codes a header and intra/inter blocks, then
// partially reconfigures to JPEG and to H.263 while earlier codes are still
// leaving on the serial line, and codes more blocks.  The serial bit stream is
// compared bit for bit with the reference coder.  Also checks: VRDY stays low
// while the array is being configured, the serial output keeps running during
// configuration, a block started just before a configuration stalls and then
// completes, and the escape count.
module vlc_dpga_tb;
  import vre_pkg::*;
  import vlc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int BASE = 2401;

  logic wr = 0, cs_n = 1, con_n = 1;
  logic [2:0] m = 3'd6;
  logic [7:0] d = '0, speed = 8'd1;
  std_e standard = STD_MPEG2;
  logic [15:0] hdr_code = '0;
  logic [4:0] hdr_len = '0;
  logic cv = 0, cr, ci = 0, vstrt = 0, vrdy, eocv, sendh = 0, hrdy, bo, bs;
  logic signed [11:0] cl = '0;
  logic [5:0] cidx = '0;
  logic [2:0] cb = '0;
  logic act, ib, err, ff;
  logic [12:0] nw;
  logic [15:0] nesc, nstall;
  vlc_dpga #(.FIFO_DEPTH(256), .TABLE_BASE(BASE)) dut (.clk, .rst_n, .wr, .cs_n, .con_n, .m, .d,
    .standard, .speed, .hdr_code, .hdr_len, .c_valid(cv), .c_ready(cr), .c_level(cl), .c_idx(cidx),
    .c_intra(ci), .c_blk(cb), .vstrt, .vrdy, .eocv, .sendh, .hrdy, .bit_out(bo), .bit_strobe(bs),
    .cfg_active(act), .init_busy(ib), .cells_written(nw), .cfg_error(err), .n_escapes(nesc),
    .n_cfg_stalls(nstall), .fifo_full(ff));

  bit exp_q [$];
  bit got_q [$];
  int dcp [3];
  int n_esc_ref = 0, strobes_in_cfg = 0, vrdy_in_cfg = 0;
  tab_t tab;
  always @(posedge clk) if (rst_n) begin
    if (bs) begin got_q.push_back(bo); if (act) strobes_in_cfg++; end
    if (act && vrdy) vrdy_in_cfg++;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  task automatic cclk(input logic [7:0] v);
    d = v; repeat (5) @(negedge clk); wr = 1; repeat (5) @(negedge clk); wr = 0;
  endtask
  task automatic configure(input int s);
    bytes_t b;
    tab = make_table(s);
    b = cfg_stream(tab, s, BASE);
    con_n = 0; cs_n = 0;
    foreach (b[i]) cclk(b[i]);
    cs_n = 1; con_n = 1; cclk(8'h00); repeat (4) @(negedge clk);
    chk(!err, "configuration accepted");
  endtask
  task automatic header(input int code, input int len);
    wait (hrdy); @(negedge clk);
    hdr_code = 16'(code); hdr_len = 5'(len); sendh = 1;
    @(negedge clk); sendh = 0;
    put(exp_q, code, len);
    dcp = '{0, 0, 0};
  endtask
  task automatic load_block(input int lev [64], input bit intra, input int blk);
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      cv = 1; cl = 12'(lev[k]); cidx = 6'(k); ci = intra; cb = 3'(blk);
      while (!cr) @(negedge clk);
    end
    @(negedge clk); cv = 0;
  endtask
  task automatic gen(output int lev [64], input bit intra, input int flavour);
    for (int k = 0; k < 64; k++) begin
      lev[k] = 0;
      if (k < 24 && $urandom_range(0, 2) == 0) lev[k] = int'($urandom_range(0, 12)) - 6;
    end
    if (flavour == 1) begin lev[40] = 300; lev[63] = -2; end          // escape, run > 15
    if (flavour == 2) for (int k = 1; k < 64; k++) lev[k] = 0;        // DC only
    if (intra) lev[0] = int'($urandom_range(0, 255));
  endtask
  task automatic code_block(input int s, input bit intra, input int blk, input int flavour);
    int lev [64];
    bits_t q;
    gen(lev, intra, flavour);
    load_block(lev, intra, blk);
    q = encode_block(lev, intra, blk, s, tab, dcp, n_esc_ref);
    foreach (q[i]) exp_q.push_back(q[i]);
    wait (vrdy); @(negedge clk); vstrt = 1; @(negedge clk); vstrt = 0;
    wait (eocv); @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (!ib);
    // power-up: MPEG-2
    configure(2); standard = STD_MPEG2;
    header(16'h01B3, 16);
    for (int b = 0; b < 6; b++) code_block(2, 1'b1, b, b % 3);
    for (int b = 0; b < 6; b++) code_block(2, 1'b0, b, (b == 2) ? 1 : 0);
    // a block waits while the array is reconfigured to JPEG
    speed = 8'd7;
    begin
      int lev [64];
      bits_t q;
      gen(lev, 1'b1, 0);
      load_block(lev, 1'b1, 0);
      fork configure(0); join_none
      repeat (30) @(negedge clk);
      wait (!act);
      standard = STD_JPEG;
      header(16'hFFD8, 16);
      q = encode_block(lev, 1'b1, 0, 0, tab, dcp, n_esc_ref);
      foreach (q[i]) exp_q.push_back(q[i]);
      wait (vrdy); @(negedge clk); vstrt = 1; @(negedge clk); vstrt = 0;
      wait (eocv); @(negedge clk);
    end
    chk(strobes_in_cfg > 0, "serial output runs during configuration");
    chk(vrdy_in_cfg == 0, "VRDY low during configuration");
    for (int b = 1; b < 6; b++) code_block(0, 1'b1, b, b % 3);
    // a block started just before configuration stalls in its table reads
    begin
      int lev [64];
      bits_t q;
      gen(lev, 1'b1, 1);
      load_block(lev, 1'b1, 4);
      q = encode_block(lev, 1'b1, 4, 0, tab, dcp, n_esc_ref);
      foreach (q[i]) exp_q.push_back(q[i]);
      wait (vrdy); @(negedge clk); vstrt = 1; @(negedge clk); vstrt = 0;
      configure(0);                      // same JPEG table again
      wait (eocv); @(negedge clk);
    end
    chk(nstall > 0, "table read stalled by configuration");
    // H.263
    configure(3); standard = STD_H263;
    header(16'h0080, 9);
    for (int b = 0; b < 6; b++) code_block(3, b < 3, b, (b == 1) ? 1 : 0);
    wait (got_q.size() >= exp_q.size());
    repeat (20) @(negedge clk);
    chk(got_q.size() == exp_q.size(), "bit count");
    begin
      int bad = 0;
      for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
        checks++;
        if (got_q[i] != exp_q[i]) begin bad++; failures++; if (bad < 5) $display("bit %0d differs", i); end
      end
    end
    chk(int'(nesc) == n_esc_ref && n_esc_ref > 0, "escape count");
    $display("bits %0d escapes %0d cfg-stall clocks %0d", exp_q.size(), nesc, nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
