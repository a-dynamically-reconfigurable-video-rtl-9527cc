// xform8x8_tb: checks the forward transform (zigzag output) and the inverse
// transform (raster output) against double-precision DCT/IDCT, within +-1,
// with random output stalls, and checks the 64-clock steady-state block rate.
module xform8x8_tb;
  import ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NBLK = 6;
  // forward instance
  logic fi_v, fi_r, fo_v, fo_r;
  logic signed [11:0] fi_d, fo_d;
  logic [5:0] fi_p, fo_i, fo_p;
  logic [7:0] fi_t, fo_t;
  xform8x8 #(.INVERSE(0), .ZIGZAG_OUT(1)) u_f (.clk, .rst_n, .in_valid(fi_v), .in_ready(fi_r),
    .in_data(fi_d), .in_pos(fi_p), .in_tag(fi_t), .out_valid(fo_v), .out_ready(fo_r),
    .out_data(fo_d), .out_idx(fo_i), .out_pos(fo_p), .out_tag(fo_t));
  // inverse instance
  logic ii_v, ii_r, io_v, io_r;
  logic signed [11:0] ii_d, io_d;
  logic [5:0] ii_p, io_i, io_p;
  logic [7:0] ii_t, io_t;
  xform8x8 #(.INVERSE(1), .ZIGZAG_OUT(0)) u_i (.clk, .rst_n, .in_valid(ii_v), .in_ready(ii_r),
    .in_data(ii_d), .in_pos(ii_p), .in_tag(ii_t), .out_valid(io_v), .out_ready(io_r),
    .out_data(io_d), .out_idx(io_i), .out_pos(io_p), .out_tag(io_t));

  blk_t  xin [NBLK];
  blk_t  fin [NBLK];
  rblk_t fref [NBLK];
  rblk_t iref [NBLK];
  bit    stall_mode = 1;
  int    first_out_cyc [NBLK];
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) begin
        xin[b][i] = (b % 2) ? int'($urandom_range(0, 255)) : int'($urandom_range(0, 510)) - 255;
        fin[b][i] = (i < 10 || $urandom_range(0, 3) == 0) ? int'($urandom_range(0, 400)) - 200 : 0;
      end
      if (b == 0) for (int i = 0; i < 64; i++) xin[b][i] = 255;   // DC extreme
      fref[b] = fdct(xin[b]);
      iref[b] = idct(fin[b]);
    end
  end

  // drivers
  initial begin
    fi_v = 0; ii_v = 0; fi_d = 0; ii_d = 0; fi_p = 0; ii_p = 0; fi_t = 0; ii_t = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      stall_mode = (pass == 0);
      fork
        for (int b = 0; b < NBLK; b++)
          for (int i = 0; i < 64; i++) begin
            @(negedge clk);
            fi_v = 1; fi_d = 12'(xin[b][i]); fi_p = 6'(i); fi_t = 8'(b);
            while (!fi_r) @(negedge clk);
            if (b == NBLK - 1 && i == 63) begin @(negedge clk); fi_v = 0; end
          end
        for (int b = 0; b < NBLK; b++)
          for (int i = 0; i < 64; i++) begin
            automatic int p = 63 - i;                       // any order: reverse raster
            @(negedge clk);
            ii_v = 1; ii_d = 12'(fin[b][p]); ii_p = 6'(p); ii_t = 8'(b);
            while (!ii_r) @(negedge clk);
            if (b == NBLK - 1 && i == 63) begin @(negedge clk); ii_v = 0; end
          end
      join
      wait (nf == NBLK * 64 * (pass + 1) && ni == NBLK * 64 * (pass + 1));
    end
    repeat (5) @(posedge clk);
    // rate: without stalls consecutive blocks leave 64 clocks apart
    for (int b = 2; b < NBLK; b++) begin
      checks++;
      if (first_out_cyc[b] - first_out_cyc[b-1] != 64) begin
        failures++; $display("rate: block %0d gap %0d", b, first_out_cyc[b] - first_out_cyc[b-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    fo_r = stall_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
    io_r = stall_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  int nf = 0, ni = 0;
  always @(posedge clk) if (rst_n) begin
    if (fo_v && fo_r) begin
      automatic int b = int'(fo_t);
      automatic int k = nf % 64;
      automatic int p = zz(k);
      checks++;
      if (k == 0) first_out_cyc[b] = cyc;
      if (fo_i != 6'(k) || fo_p != 6'(p) || iabs(int'(fo_d) - rnd(fref[b][p])) > 1) begin
        failures++;
        if (failures < 10) $display("fdct blk %0d k %0d pos %0d: got %0d exp %f", b, k, fo_p, fo_d, fref[b][p]);
      end
      nf++;
    end
    if (io_v && io_r) begin
      automatic int b = int'(io_t);
      automatic int k = ni % 64;
      checks++;
      if (io_p != 6'(k) || iabs(int'(io_d) - rnd(iref[b][k])) > 1) begin
        failures++;
        if (failures < 10) $display("idct blk %0d pos %0d: got %0d exp %f", b, k, io_d, iref[b][k]);
      end
      ni++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
