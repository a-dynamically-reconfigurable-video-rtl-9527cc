// dctq_tb: random intra pixel blocks and inter error blocks through dctq; every
// quantised level is checked against a double-precision DCT followed by the
// quantiser rule (within +-1 for rounding), in zigzag order with its tag.  Also
// checks the steady-state rate of 64 clocks per block against the 108-clock
// (2170 ns at 50 MHz) per-block budget.
module dctq_tb;
  import ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NBLK = 8;
  logic iv, ir, ov, intra, o_intra;
  logic signed [11:0] id, ol;
  logic [5:0] ip, oi;
  logic [4:0] qs, o_qs;
  logic [2:0] blk, o_blk;
  logic or_ = 1;
  dctq dut (.clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id), .in_pos(ip),
    .in_qscale(qs), .in_intra(intra), .in_blk(blk), .out_valid(ov), .out_ready(or_),
    .out_level(ol), .out_idx(oi), .out_qscale(o_qs), .out_intra(o_intra), .out_blk(o_blk));

  blk_t x [NBLK];
  rblk_t f [NBLK];
  int bqs [NBLK];
  int first [NBLK];
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++)
        x[b][i] = (b < 4) ? int'($urandom_range(0, 255)) : int'($urandom_range(0, 120)) - 60;
      bqs[b] = 1 + (b * 7) % 31;
      f[b] = fdct(x[b]);
    end
    iv = 0; id = 0; ip = 0; qs = 0; intra = 0; blk = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        iv = 1; id = 12'(x[b][i]); ip = 6'(i); qs = 5'(bqs[b]); intra = (b < 4); blk = 3'(b % 6);
        while (!ir) @(negedge clk);
      end
    @(negedge clk); iv = 0;
    wait (n == NBLK * 64);
    for (int b = 2; b < NBLK; b++) begin
      checks++;
      if (first[b] - first[b-1] != 64 || first[b] - first[b-1] > 108) begin
        failures++; $display("rate gap %0d", first[b] - first[b-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0;
  always @(posedge clk) if (rst_n && ov && or_) begin
    automatic int b = n / 64;
    automatic int k = n % 64;
    automatic bit in_ = (b < 4);
    automatic int q = qstep(k, in_, bqs[b]);
    automatic int e = quant(rnd(f[b][zz(k)]), q, in_);
    if (k == 0) first[b] = cyc;
    checks++;
    if (oi != 6'(k) || o_intra != in_ || o_qs != 5'(bqs[b]) || o_blk != 3'(b % 6) ||
        iabs(int'(ol) - e) > 1) begin
      failures++;
      if (failures < 10) $display("blk %0d k %0d: got %0d exp %0d (F=%f)", b, k, ol, e, f[b][zz(k)]);
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
