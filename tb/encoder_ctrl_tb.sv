// encoder_ctrl_tb: macroblock sequencing.  A colour I macroblock (pixels from
// the input stream), a monochrome P macroblock (errors from the motion
// estimator) and a JPEG macroblock with a P request.  Checks every sample
// handed to DCTQ (value, position, block, intra flag, qscale) under random
// DCTQ back-pressure, the motion-estimator start, and that the macroblock ends
// only after all reconstructed samples return (immediately after feeding in
// JPEG).
module encoder_ctrl_tb;
  import vre_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, inter = 0, color = 1, busy, done, cinter, pxv = 0, pxr, mes, mei;
  logic resv = 0, resr, dqv, dqr = 1, dqi, recf = 0;
  std_e standard = STD_MPEG2;
  logic [4:0] qs = 5'd9, dqq;
  logic [7:0] pxd = '0;
  logic signed [11:0] resd = '0, dqd;
  logic [5:0] resp = '0, dqp;
  logic [2:0] resb = '0, dqb;
  logic [15:0] ni, np;
  encoder_ctrl dut (.clk, .rst_n, .mb_start(start), .mb_inter(inter), .standard, .color, .qscale(qs),
    .busy, .done, .cur_inter(cinter), .px_valid(pxv), .px_ready(pxr), .px_data(pxd),
    .me_start(mes), .me_inter(mei), .res_valid(resv), .res_ready(resr), .res_data(resd),
    .res_pos(resp), .res_blk(resb), .dq_valid(dqv), .dq_ready(dqr), .dq_data(dqd), .dq_pos(dqp),
    .dq_qscale(dqq), .dq_intra(dqi), .dq_blk(dqb), .rec_fire(recf), .n_intra_mb(ni), .n_inter_mb(np));
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  int got = 0, n_me = 0, n_done = 0;
  always @(negedge clk) dqr = ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin if (mes) n_me++; if (done) n_done++; end

  // one macroblock: p = use residual stream; n samples; expect intra flag
  task automatic mb(input bit p, input int n, input bit exp_intra, input bit wait_rec);
    @(negedge clk); start = 1; inter = p; @(negedge clk); start = 0;
    chk(busy, "busy after start");
    fork
      for (int i = 0; i < n; ) begin
        // source side
        if (exp_intra) begin pxv = 1; pxd = 8'((i * 5) & 255); end
        else begin resv = 1; resd = 12'(i - 200); resp = 6'(i % 64); resb = 3'(i / 64); end
        @(negedge clk);
        if (dqv && dqr) ;   // checked below at posedge
        if ((exp_intra && pxr_s) || (!exp_intra && resr_s)) i++;
      end
      begin
        for (int i = 0; i < n; ) begin
          @(posedge clk);
          if (dqv && dqr) begin
            chk(dqi == exp_intra && dqq == qs && dqp == 6'(i % 64) && dqb == 3'(i / 64) &&
                int'(dqd) == (exp_intra ? (i * 5) & 255 : i - 200), "sample to DCTQ");
            i++;
          end
        end
      end
    join
    pxv = 0; resv = 0;
    repeat (3) @(negedge clk);
    if (wait_rec) begin
      chk(busy, "waits for reconstruction");
      for (int i = 0; i < n; i++) begin @(negedge clk); recf = 1; end
      @(negedge clk); recf = 0;
    end
    repeat (2) @(negedge clk);
    chk(!busy, "done");
  endtask
  logic pxr_s, resr_s;
  always @(posedge clk) begin pxr_s <= pxr && pxv; resr_s <= resr && resv; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    mb(1'b0, 384, 1'b1, 1'b1);
    chk(n_me == 1 && !mei, "ME start (intra) latches position");
    color = 0;
    mb(1'b1, 256, 1'b0, 1'b1);
    chk(n_me == 2, "ME start (P)");
    standard = STD_JPEG; color = 1;
    mb(1'b1, 384, 1'b1, 1'b0);
    chk(n_done == 3 && ni == 16'd2 && np == 16'd1, "macroblock counts");
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
