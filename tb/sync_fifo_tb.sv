// sync_fifo_tb: random push/pop traffic against a queue model; checks data
// order, full/empty/count, and that the FIFO fills to exactly DEPTH entries.
module sync_fifo_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int W = 38, D = 16;
  logic push = 0, pop = 0, full, empty;
  logic [W-1:0] wd = '0, rd;
  logic [$clog2(D+1)-1:0] count;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .wr_data(wd), .pop, .rd_data(rd),
    .full, .empty, .count);
  logic [W-1:0] q [$];
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(count == ($clog2(D+1))'(q.size()), "count");
      chk(full == (q.size() == D) && empty == (q.size() == 0), "flags");
      if (q.size() > 0) chk(rd == q[0], "data");
      // phase 1 fills, phase 2 random, phase 3 drains
      push = (i < 40) ? !full : (i < 2900) ? ($urandom_range(0, 1) && !full) : 1'b0;
      pop  = (i < 40) ? 1'b0  : (i < 2900) ? ($urandom_range(0, 1) && !empty) : !empty;
      wd   = {$urandom, 6'($urandom)};
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wd);
      if (i == 39) chk(q.size() == D && full, "fills to DEPTH");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
