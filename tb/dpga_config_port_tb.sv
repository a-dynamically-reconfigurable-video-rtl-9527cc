// dpga_config_port_tb: power-up clear, a full configuration of all 6600 cells,
// then the three-window partial configuration 2482-2799, 3122-3601, 3921-4319
// (1197 cells).  Checks every cell (inside the windows: new data; outside:
// untouched), the cell count, that bytes with CS* high or a mode other than 6
// are ignored, the error flag for a reversed window, and the configuration
// time: one cell per CCLK, with CCLK at 10 clocks (0.2 us per cell at 50 MHz),
// so 1197 cells take 239.4 us, within the 240 us the MPEG-1/2 switch allows.
module dpga_config_port_tb;
  import vre_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic wr = 0, cs_n = 1, con_n = 1;
  logic [2:0] m = 3'd6;
  logic [7:0] d = '0, rd;
  logic [12:0] ra = 13'd1, nw;
  logic act, ib, err;
  logic [7:0] segs;
  dpga_config_port dut (.clk, .rst_n, .wr, .cs_n, .con_n, .m, .d, .rd_addr(ra), .rd_data(rd),
    .cfg_active(act), .init_busy(ib), .cells_written(nw), .segs_done(segs), .cfg_error(err));

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  // one CCLK: WR low 5 clocks, high 5 clocks
  task automatic cclk(input logic [7:0] v);
    d = v;
    repeat (5) @(negedge clk);
    wr = 1;
    repeat (5) @(negedge clk);
    wr = 0;
  endtask
  task automatic begin_cfg(); con_n = 0; cs_n = 0; endtask
  task automatic end_cfg(); cs_n = 1; con_n = 1; cclk(8'h00); repeat (4) @(negedge clk); endtask
  task automatic window(input int sa, input int ea, input int pat);
    cclk(8'(sa >> 8)); cclk(8'(sa)); cclk(8'(ea >> 8)); cclk(8'(ea));
    for (int c = sa; c <= ea; c++) cclk(8'((c * pat + 1) & 255));
  endtask
  function automatic logic [7:0] f_full(input int c); return 8'((c * 7 + 1) & 255); endfunction
  function automatic logic [7:0] f_part(input int c); return 8'((c * 13 + 1) & 255); endfunction
  function automatic bit in_win(input int c);
    return (c >= 2482 && c <= 2799) || (c >= 3122 && c <= 3601) || (c >= 3921 && c <= 4319);
  endfunction

  int t0, t1;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (!ib); @(negedge clk);
    for (int c = 1; c <= 6600; c += 97) begin ra = 13'(c); #1; chk(rd == 8'h00, "power-up zero"); end
    // full configuration
    begin_cfg(); cclk(8'd1); window(1, 6600, 7); end_cfg();
    chk(nw == 13'd6600 && !err, "full config count");
    for (int c = 1; c <= 6600; c++) begin ra = 13'(c); #1; chk(rd == f_full(c), "full config data"); end
    // partial configuration, windows of the document's MPEG-2 example
    begin_cfg();
    t0 = cyc;
    cclk(8'd3);
    window(2482, 2799, 13);
    window(3122, 3601, 13);
    t1 = cyc;
    window(3921, 4319, 13);
    chk(act, "active until CON* high");
    end_cfg();
    chk(!act, "back to operation");
    chk(nw == 13'd1197 && segs == 8'd3 && !err, "partial count");
    for (int c = 1; c <= 6600; c++) begin
      ra = 13'(c); #1;
      chk(rd == (in_win(c) ? f_part(c) : f_full(c)), "partial data");
    end
    // time: 10 clocks per cell; 1197 cells at 20 ns per clock
    chk((t1 - t0) == 10 * (1 + 4 + 318 + 4 + 480), "CCLK per byte");
    chk(1197 * 10 * 20 <= 240000, "1197 cells within 240 us");
    // CS* high and a wrong mode: bytes ignored
    con_n = 0; cs_n = 1; cclk(8'd1); cclk(8'h00); cclk(8'h05); cclk(8'h00); cclk(8'h05); cclk(8'hEE);
    cs_n = 0; m = 3'd0; cclk(8'hEE); m = 3'd6;
    end_cfg();
    ra = 13'd5; #1; chk(rd == f_full(5), "CS* high / mode 0 ignored");
    // reversed window sets the error flag
    begin_cfg(); cclk(8'd1); cclk(8'h00); cclk(8'h09); cclk(8'h00); cclk(8'h05); end_cfg();
    chk(err, "reversed window flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
