// vlc_coder_tb: the coder alone, with the code table as a cell array and the
// dual RAM as a testbench array.  Codes blocks in MPEG-2, JPEG and H.263 mode
// with random FIFO back-pressure and a stretch of configuration stall, and
// compares the concatenated FIFO codes with the reference coder bit for bit.
// Also checks VRDY/EOCV/HRDY behaviour and that no code is pushed into a full
// FIFO.
module vlc_coder_tb;
  import vre_pkg::*;
  import vlc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int BASE = 2401;

  std_e standard = STD_MPEG2;
  logic cfg = 0, avail = 0, intra = 0, anynz, rel, vstrt = 0, vrdy, eocv, sendh = 0, hrdy, push;
  logic fifo_full = 0;
  logic [12:0] taddr;
  logic [7:0] tdata;
  logic [5:0] ridx, lastnz;
  logic signed [11:0] rlev;
  logic [2:0] blk = '0;
  logic [15:0] hcode = '0, nesc, nstall;
  logic [4:0] hlen = '0;
  logic [37:0] pd;
  vlc_coder #(.TABLE_BASE(BASE)) dut (.clk, .rst_n, .standard, .cfg_active(cfg), .tab_addr(taddr),
    .tab_data(tdata), .rd_avail(avail), .rd_idx(ridx), .rd_level(rlev), .rd_intra(intra), .rd_blk(blk),
    .rd_last_nz(lastnz), .rd_any_nz(anynz), .release_bank(rel), .vstrt, .vrdy, .eocv, .sendh, .hrdy,
    .hdr_code(hcode), .hdr_len(hlen), .push, .push_data(pd), .fifo_full, .n_escapes(nesc),
    .n_cfg_stalls(nstall));

  logic [7:0] cells [6601];
  int lev [64];
  int lnz;
  assign tdata = cells[taddr];
  assign rlev = 12'(lev[ridx]);
  assign lastnz = 6'(lnz < 0 ? 0 : lnz);
  assign anynz = (lnz >= 0);

  bit exp_q [$], got_q [$];
  int dcp [3], n_esc_ref = 0, n_eocv = 0, full_push = 0;
  tab_t tab;
  always @(posedge clk) if (rst_n) begin
    if (push) begin
      if (fifo_full) full_push++;
      for (int i = int'(pd[5:0]) - 1; i >= 0; i--) got_q.push_back(pd[6 + i]);
    end
    if (eocv) n_eocv++;
  end
  bit hold_ff = 0;
  always @(negedge clk) fifo_full = hold_ff ? 1'b0 : ($urandom_range(0, 4) == 0);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  task automatic load_table(input int s);
    tab = make_table(s);
    for (int e = 0; e < NENT; e++) begin
      cells[BASE + 3*e] = 8'(tab[e].len); cells[BASE + 3*e + 1] = 8'(tab[e].code >> 8);
      cells[BASE + 3*e + 2] = 8'(tab[e].code);
    end
  endtask
  task automatic one_block(input int s, input bit in_, input int b, input int fl);
    bits_t q;
    for (int k = 0; k < 64; k++) lev[k] = (k < 30 && $urandom_range(0, 2) == 0) ? int'($urandom_range(0, 20)) - 10 : 0;
    if (fl == 1) begin lev[50] = -700; lev[63] = 1; end
    if (fl == 2) lev = '{default: 0};
    if (in_) lev[0] = int'($urandom_range(0, 255));
    lnz = -1;
    for (int k = 0; k < 64; k++) if (lev[k] != 0) lnz = k;
    intra = in_; blk = 3'(b);
    q = encode_block(lev, in_, b, s, tab, dcp, n_esc_ref);
    foreach (q[i]) exp_q.push_back(q[i]);
    @(negedge clk); avail = 1;
    #1 chk(vrdy == !cfg, "VRDY with a block waiting");
    wait (vrdy); @(negedge clk); vstrt = 1; @(negedge clk); vstrt = 0;
    #1 chk(!vrdy && !hrdy, "busy while coding");
    if (fl == 1) begin cfg = 1; repeat (40) @(negedge clk); cfg = 0; end
    wait (rel); @(negedge clk); avail = 0;
  endtask
  task automatic header(input int code, input int len);
    hold_ff = 1;
    @(negedge clk); #1;
    while (!hrdy) begin @(negedge clk); #1; end
    hcode = 16'(code); hlen = 5'(len); sendh = 1;
    put(exp_q, code, len);
    @(negedge clk); sendh = 0; hold_ff = 0;
    dcp = '{0, 0, 0};
  endtask

  initial begin
    for (int i = 0; i <= 6600; i++) cells[i] = 8'h00;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); chk(!vrdy && hrdy, "idle handshakes");
    load_table(2); standard = STD_MPEG2;
    header(16'h00B5, 12);
    for (int b = 0; b < 8; b++) one_block(2, b < 4, b % 6, b % 3);
    load_table(0); standard = STD_JPEG;
    header(16'hFFDA, 16);
    for (int b = 0; b < 8; b++) one_block(0, 1'b1, b % 6, b % 3);
    load_table(3); standard = STD_H263;
    header(16'h0021, 6);
    for (int b = 0; b < 8; b++) one_block(3, b % 2, b % 6, b % 3);
    repeat (5) @(negedge clk);
    chk(got_q.size() == exp_q.size(), "bit count");
    begin
      int bad = 0;
      for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
        checks++;
        if (got_q[i] != exp_q[i]) begin bad++; failures++; if (bad < 5) $display("bit %0d differs", i); end
      end
    end
    chk(n_eocv == 24, "one EOCV per block");
    chk(full_push == 0, "no push into a full FIFO");
    chk(int'(nesc) == n_esc_ref && nstall > 0, "escapes and stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
