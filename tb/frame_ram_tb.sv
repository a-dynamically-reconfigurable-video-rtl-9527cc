// frame_ram_tb: writes a pattern to a small frame memory and reads it back,
// checking the one-clock read latency and read-before-write on the same address.
module frame_ram_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int D = 96;
  logic we = 0;
  logic [6:0] wa = '0, ra = '0;
  logic [7:0] wdat = '0, rdat;
  frame_ram #(.DEPTH(D), .AW(7)) dut (.clk, .we, .waddr(wa), .wdata(wdat), .raddr(ra), .rdata(rdat));
  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; wa = 7'(i); wdat = 8'((i * 37 + 5) & 255);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); ra = 7'(i);
      @(posedge clk); #1;
      checks++;
      if (rdat != 8'((i * 37 + 5) & 255)) begin failures++; $display("addr %0d got %0d", i, rdat); end
    end
    // write and read the same address in one clock: the old value is read
    @(negedge clk); we = 1; wa = 7'd10; wdat = 8'hA5; ra = 7'd10;
    @(posedge clk); #1; checks++;
    if (rdat != 8'((10 * 37 + 5) & 255)) failures++;
    @(negedge clk); we = 0;
    @(posedge clk); #1; checks++;
    if (rdat != 8'hA5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
