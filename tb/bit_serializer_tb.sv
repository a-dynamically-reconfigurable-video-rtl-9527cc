// bit_serializer_tb: random codes of 1..32 bits through a queue-modelled FIFO;
// checks every serial bit (MSB first) and the bit period of speed+1 clocks.
module bit_serializer_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic [7:0] speed = 8'd3;
  logic [37:0] fd;
  logic fe, pop, bo, bs, busy;
  bit_serializer dut (.clk, .rst_n, .speed, .fifo_data(fd), .fifo_empty(fe), .fifo_pop(pop),
    .bit_out(bo), .bit_strobe(bs), .busy);
  logic [37:0] q [$];
  bit exp_bits [$];
  int last_strobe = -1, nbits = 0;
  assign fe = (q.size() == 0);
  assign fd = fe ? '0 : q[0];
  always @(posedge clk) if (rst_n && pop) void'(q.pop_front());
  always @(posedge clk) if (rst_n && bs) begin
    checks++;
    if (exp_bits.size() == 0 || bo != exp_bits[0]) begin failures++; $display("bit %0d wrong", nbits); end
    if (exp_bits.size() > 0) void'(exp_bits.pop_front());
    if (last_strobe >= 0 && nbits > 0) begin
      checks++;
      if (cyc - last_strobe < int'(speed) + 1) begin failures++; $display("bit period %0d", cyc - last_strobe); end
    end
    last_strobe = cyc; nbits++;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      automatic int n = $urandom_range(1, 32);
      automatic logic [31:0] c = $urandom;
      @(negedge clk);
      q.push_back({c, 6'(n)});
      for (int b = n - 1; b >= 0; b--) exp_bits.push_back(c[b]);
      if (i == 30) speed = 8'd0;
    end
    wait (exp_bits.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (busy) failures++;
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
