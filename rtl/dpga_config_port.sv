// dpga_config_port: the DPGA's parallel (mode 6) configuration port and its
// configuration cell memory.
//
// The array has 6400 logic cells (1..6400, bottom-left to top-right, 80 x 80)
// followed by 200 I/O cells (6401..6600).  Each cell is modelled by one
// configuration byte; after power-up every cell is cleared to zero, one cell
// per clock.  Configuration bytes arrive on D0-D7 and are taken on each rising
// edge of CCLK, which is the host's WR strobe, while CS* is low and M0-M2 select
// mode 6.  Configuration starts on the first CCLK edge that sees CON* low and
// ends on the first CCLK edge that sees CON* high; cfg_active is high in
// between.  The byte stream is the windowed partial-configuration file:
//   segment count (1 byte), then per segment: start cell (2 bytes, high first),
//   end cell (2 bytes), and end-start+1 data bytes, one per cell in order.
// Only the cells inside the windows are written, one per CCLK; all others keep
// their contents, so the logic using the rest of the array runs on.
// WR, CS*, CON*, M and D are asynchronous to clk: they pass a two-stage
// synchroniser together, so WR must stay high and low for at least two clk
// periods each.  rd_addr/rd_data is an asynchronous read port used by the
// logic configured in the array (the VLC code table).
// From the document: cell numbering and count, mode 6, CCLK from WR, CON*/CS*
// behaviour, 8-bit loading, window segments (count, start/end, data).  The byte
// encoding of counts and addresses and one byte per cell are this design's
// choices.  At 0.2 us per cell (the document's rate) CCLK runs at 5 MHz.
module dpga_config_port
  import vre_pkg::*;
#(
  parameter int unsigned N_CELLS = DPGA_CELLS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,          // CCLK
  input  logic        cs_n,
  input  logic        con_n,
  input  logic [2:0]  m,
  input  logic [7:0]  d,
  input  logic [12:0] rd_addr,     // cell number 1..N_CELLS
  output logic [7:0]  rd_data,
  output logic        cfg_active,
  output logic        init_busy,   // power-up clear in progress
  output logic [12:0] cells_written,
  output logic [7:0]  segs_done,
  output logic        cfg_error
);
  typedef enum logic [2:0] {P_COUNT, P_SA_H, P_SA_L, P_EA_H, P_EA_L, P_DATA, P_END} pstate_e;

  logic [7:0]  cfg_mem [N_CELLS];
  logic [13:0] sync1, sync2;        // {wr, cs_n, con_n, m, d}
  logic        wr_d;
  logic [12:0] clr;
  pstate_e     ps;
  logic [7:0]  nseg;
  logic [15:0] cur, last;

  wire        s_wr   = sync2[13];
  wire        s_cs_n = sync2[12];
  wire        s_con  = sync2[11];
  wire [2:0]  s_m    = sync2[10:8];
  wire [7:0]  s_d    = sync2[7:0];
  wire        cclk   = s_wr && !wr_d;
  wire        take   = cclk && !init_busy && !s_con && !s_cs_n && (s_m == CFG_MODE_PARALLEL);
  // the first CCLK with CON* low both starts configuration and carries a byte
  wire pstate_e ps_eff = cfg_active ? ps : P_COUNT;
  wire        in_rng = (cur >= 16'd1) && (cur <= 16'(N_CELLS));

  assign rd_data = (rd_addr >= 13'd1 && rd_addr <= 13'(N_CELLS)) ? cfg_mem[rd_addr - 13'd1] : 8'h00;

  // cell array: power-up clear, then configuration writes
  always_ff @(posedge clk) begin
    if (init_busy)                        cfg_mem[clr] <= 8'h00;
    else if (take && ps_eff == P_DATA && in_rng) cfg_mem[cur[12:0] - 13'd1] <= s_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= {1'b0, 1'b1, 1'b1, 11'd0}; sync2 <= {1'b0, 1'b1, 1'b1, 11'd0}; wr_d <= 1'b0;
      clr <= '0; init_busy <= 1'b1;
      cfg_active <= 1'b0; ps <= P_END; nseg <= '0; cur <= '0; last <= '0;
      cells_written <= '0; segs_done <= '0; cfg_error <= 1'b0;
    end else begin
      sync1 <= {wr, cs_n, con_n, m, d};
      sync2 <= sync1;
      wr_d  <= s_wr;
      if (init_busy) begin
        clr <= clr + 13'd1;
        if (clr == 13'(N_CELLS - 1)) init_busy <= 1'b0;
      end else if (cclk) begin
        if (!cfg_active && !s_con) begin
          cfg_active    <= 1'b1;           // first CCLK with CON* low
          ps            <= P_COUNT;        // overridden below when this edge carries a byte
          cells_written <= '0;
          segs_done     <= '0;
          cfg_error     <= 1'b0;
        end else if (cfg_active && s_con) begin
          cfg_active <= 1'b0;              // first CCLK with CON* high
          if (ps != P_END) cfg_error <= 1'b1;
        end
        if (take) begin
          unique case (ps_eff)
            P_COUNT: begin nseg <= s_d; ps <= (s_d == 8'd0) ? P_END : P_SA_H; end
            P_SA_H:  begin cur[15:8]  <= s_d; ps <= P_SA_L; end
            P_SA_L:  begin cur[7:0]   <= s_d; ps <= P_EA_H; end
            P_EA_H:  begin last[15:8] <= s_d; ps <= P_EA_L; end
            P_EA_L: begin
              last[7:0] <= s_d;
              if ({last[15:8], s_d} < cur) begin cfg_error <= 1'b1; ps <= P_END; end
              else ps <= P_DATA;
            end
            P_DATA: begin
              if (in_rng) cells_written <= cells_written + 13'd1;
              else        cfg_error     <= 1'b1;
              cur <= cur + 16'd1;
              if (cur == last) begin
                segs_done <= segs_done + 8'd1;
                ps <= (segs_done + 8'd1 == nseg) ? P_END : P_SA_H;
              end
            end
            P_END: ;                        // bytes after the last segment are ignored
            default: ps <= P_END;
          endcase
        end
      end
    end
  end
endmodule
