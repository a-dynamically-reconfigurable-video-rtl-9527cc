// host_decoder_tb: checks reset values, every register write through the
// asynchronous WR strobe, the combinational CS* decode, the CON* bit and the
// one-clock command pulses.
module host_decoder_tb;
  import vre_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] addr = '0, hc;
  logic [7:0] data = '0, wmb, hmb, spd, mx, my;
  logic wr = 0, cs_n, con_n, color, start, inter, swap;
  std_e st;
  logic [4:0] qs, hl;
  int n_start = 0, n_swap = 0;
  host_decoder dut (.clk, .rst_n, .addr, .data, .wr, .cs_n, .con_n, .standard(st), .color,
    .width_mb(wmb), .height_mb(hmb), .speed(spd), .qscale(qs), .hdr_code(hc), .hdr_len(hl),
    .mb_x(mx), .mb_y(my), .mb_start(start), .mb_inter(inter), .swap_frames(swap));
  always @(posedge clk) if (rst_n) begin if (start) n_start++; if (swap) n_swap++; end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  task automatic hw(input logic [15:0] a, input logic [7:0] v);
    addr = a; data = v;
    repeat (3) @(negedge clk); wr = 1;
    repeat (3) @(negedge clk); wr = 0;
    repeat (3) @(negedge clk);
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    chk(st == STD_MPEG2 && color && con_n && wmb == 8'd64 && hmb == 8'd48, "reset values");
    addr = A_CFG_DATA; #1; chk(!cs_n, "CS* decoded");
    addr = A_CFG_CTRL; #1; chk(cs_n, "CS* other address");
    hw(A_CFG_CTRL, 8'h00); chk(!con_n, "CON* low");
    hw(A_CFG_CTRL, 8'h01); chk(con_n, "CON* high");
    hw(A_STD, 8'h03);      chk(st == STD_H263, "standard");
    hw(A_COLOR, 8'h00);    chk(!color, "colour");
    hw(A_WIDTH, 8'd22);    chk(wmb == 8'd22, "width");
    hw(A_HEIGHT, 8'd18);   chk(hmb == 8'd18, "height");
    hw(A_SPEED, 8'd9);     chk(spd == 8'd9, "speed");
    hw(A_QSCALE, 8'd17);   chk(qs == 5'd17, "qscale");
    hw(A_HDR_HI, 8'hAB); hw(A_HDR_LO, 8'hCD); hw(A_HDR_LEN, 8'd16);
    chk(hc == 16'hABCD && hl == 5'd16, "header");
    hw(A_MB_X, 8'd5); hw(A_MB_Y, 8'd7); chk(mx == 8'd5 && my == 8'd7, "mb position");
    hw(16'h1234, 8'hFF);   chk(st == STD_H263 && qs == 5'd17, "unmapped address ignored");
    hw(A_MB_CMD, 8'h03);   chk(n_start == 1 && inter, "start pulse, inter");
    hw(A_MB_CMD, 8'h04);   chk(n_swap == 1 && n_start == 1, "swap pulse");
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
