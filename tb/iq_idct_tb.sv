// iq_idct_tb: random quantised blocks (zigzag order) through iq_idct; every
// reconstructed sample is checked against level*Q followed by a
// double-precision IDCT (within +-1), in raster order with its tag, and the
// steady-state rate of 64 clocks per block is checked.
module iq_idct_tb;
  import ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NBLK = 8;
  logic iv, ir, ov, intra, o_intra;
  logic signed [11:0] il, od;
  logic [5:0] ii, op;
  logic [4:0] qs;
  logic [2:0] blk, o_blk;
  logic or_ = 1;
  iq_idct dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_level(il), .in_idx(ii),
    .in_qscale(qs), .in_intra(intra), .in_blk(blk), .out_valid(ov), .out_ready(or_),
    .out_data(od), .out_pos(op), .out_intra(o_intra), .out_blk(o_blk));

  blk_t lev [NBLK];
  rblk_t r [NBLK];
  int bqs [NBLK];
  int first [NBLK];
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      automatic blk_t fc;
      bqs[b] = 1 + (b * 5) % 31;
      for (int k = 0; k < 64; k++) begin
        lev[b][k] = (k == 0 && b < 4) ? int'($urandom_range(0, 255)) :
                    (k < 12 ? int'($urandom_range(0, 16)) - 8 : 0);
        fc[zz(k)] = lev[b][k] * qstep(k, b < 4, bqs[b]);
        if (fc[zz(k)] > 2047) fc[zz(k)] = 2047;
        if (fc[zz(k)] < -2048) fc[zz(k)] = -2048;
      end
      r[b] = idct(fc);
    end
    iv = 0; il = 0; ii = 0; qs = 0; intra = 0; blk = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        iv = 1; il = 12'(lev[b][k]); ii = 6'(k); qs = 5'(bqs[b]); intra = (b < 4); blk = 3'(b % 6);
        while (!ir) @(negedge clk);
      end
    @(negedge clk); iv = 0;
    wait (n == NBLK * 64);
    for (int b = 2; b < NBLK; b++) begin
      checks++;
      if (first[b] - first[b-1] != 64) begin failures++; $display("rate gap %0d", first[b] - first[b-1]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0;
  always @(posedge clk) if (rst_n && ov && or_) begin
    automatic int b = n / 64;
    automatic int p = n % 64;
    if (p == 0) first[b] = cyc;
    checks++;
    if (op != 6'(p) || o_intra != (b < 4) || o_blk != 3'(b % 6) || iabs(int'(od) - rnd(r[b][p])) > 1) begin
      failures++;
      if (failures < 10) $display("blk %0d pos %0d: got %0d exp %f", b, p, od, r[b][p]);
    end
    n++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
