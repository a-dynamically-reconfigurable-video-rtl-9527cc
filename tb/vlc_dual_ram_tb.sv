// vlc_dual_ram_tb: writes blocks into the ping-pong RAM while reading released
// banks; checks contents, tags, last non-zero index, any-non-zero flag, and
// that a third block is held off while both banks are full.
module vlc_dual_ram_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wv = 0, wrdy, wi = 0, ra, ri, rany, rel = 0;
  logic signed [11:0] wl = '0, rl;
  logic [5:0] widx = '0, ridx = '0, rlast;
  logic [2:0] wb = '0, rb;
  vlc_dual_ram dut (.clk, .rst_n, .wr_valid(wv), .wr_ready(wrdy), .wr_level(wl), .wr_idx(widx),
    .wr_intra(wi), .wr_blk(wb), .rd_avail(ra), .rd_idx(ridx), .rd_level(rl), .rd_intra(ri),
    .rd_blk(rb), .rd_last_nz(rlast), .rd_any_nz(rany), .release_bank(rel));
  int lev [6][64];
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  task automatic write_blk(input int b);
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      wv = 1; wl = 12'(lev[b][k]); widx = 6'(k); wi = b[0]; wb = 3'(b);
      while (!wrdy) @(negedge clk);
    end
    @(negedge clk); wv = 0;
  endtask
  task automatic read_blk(input int b);
    int last = -1;
    for (int k = 0; k < 64; k++) if (lev[b][k] != 0) last = k;
    wait (ra); @(negedge clk);
    chk(ri == b[0] && rb == 3'(b), "tag");
    chk(rany == (last >= 0), "any_nz");
    if (last > 0) chk(rlast == 6'(last), "last_nz");
    for (int k = 0; k < 64; k++) begin ridx = 6'(k); #1; chk(rl == 12'(lev[b][k]), "level"); end
    @(negedge clk); rel = 1; @(negedge clk); rel = 0;
  endtask
  initial begin
    for (int b = 0; b < 6; b++)
      for (int k = 0; k < 64; k++)
        lev[b][k] = (b == 3) ? 0 : ((k < 20 && $urandom_range(0, 2) == 0) ? int'($urandom_range(0, 200)) - 100 : 0);
    repeat (2) @(posedge clk); rst_n = 1;
    write_blk(0); write_blk(1);
    // both banks full: a third block must wait
    @(negedge clk); wv = 1; wl = 0; widx = 0;
    repeat (3) @(negedge clk);
    chk(!wrdy, "held off while both banks full");
    wv = 0;
    read_blk(0);
    fork write_blk(2); read_blk(1); join
    fork write_blk(3); read_blk(2); join
    fork write_blk(4); read_blk(3); join
    read_blk(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
