// vlc_dpga: everything housed in the dynamically reconfigurable device.
//
// The fixed part (configured once at power-up): the dual coefficient RAM that
// accepts DCTQ output, header handling, the code FIFO and the serial output.
// The reconfigurable part: the VLC code table, which lives in the cells of the
// configuration memory and is rewritten through the mode-6 configuration port
// (dpga_config_port) while the fixed part keeps running.  The coding rules
// that differ between standards are selected by the standard input.
// Interface: configuration pins (WR as CCLK, CS*, CON*, M0-M2, D0-D7); the
// DCTQ bus (valid/ready, level, zigzag index, intra, block); host handshakes
// VRDY/VSTRT/EOCV and HRDY/SENDH; the serial bit stream with a strobe per bit.
// The split into fixed and reconfigurable parts follows the document; FIFO
// depth and table base are this design's choices.
module vlc_dpga
  import vre_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned TABLE_BASE = 2401
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration port
  input  logic               wr,
  input  logic               cs_n,
  input  logic               con_n,
  input  logic [2:0]         m,
  input  logic [7:0]         d,
  // host registers
  input  std_e               standard,
  input  logic [7:0]         speed,
  input  logic [15:0]        hdr_code,
  input  logic [4:0]         hdr_len,
  // DCTQ bus
  input  logic               c_valid,
  output logic               c_ready,
  input  logic signed [11:0] c_level,
  input  logic [5:0]         c_idx,
  input  logic               c_intra,
  input  logic [2:0]         c_blk,
  // handshakes
  input  logic               vstrt,
  output logic               vrdy,
  output logic               eocv,
  input  logic               sendh,
  output logic               hrdy,
  // serial channel
  output logic               bit_out,
  output logic               bit_strobe,
  // status
  output logic               cfg_active,
  output logic               init_busy,
  output logic [12:0]        cells_written,
  output logic               cfg_error,
  output logic [15:0]        n_escapes,
  output logic [15:0]        n_cfg_stalls,
  output logic               fifo_full
);
  logic [12:0] tab_addr;
  logic [7:0]  tab_data, segs_done;
  logic        rd_avail, rd_intra, rd_any_nz, release_bank;
  logic [5:0]  rd_idx, rd_last_nz;
  logic signed [11:0] rd_level;
  logic [2:0]  rd_blk;
  logic        push, pop, fifo_empty, ser_busy;
  logic [37:0] push_data, fifo_data;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  dpga_config_port u_cfg (
    .clk, .rst_n, .wr, .cs_n, .con_n, .m, .d,
    .rd_addr(tab_addr), .rd_data(tab_data),
    .cfg_active, .init_busy, .cells_written, .segs_done, .cfg_error
  );

  vlc_dual_ram u_ram (
    .clk, .rst_n,
    .wr_valid(c_valid), .wr_ready(c_ready), .wr_level(c_level), .wr_idx(c_idx),
    .wr_intra(c_intra), .wr_blk(c_blk),
    .rd_avail, .rd_idx, .rd_level, .rd_intra, .rd_blk, .rd_last_nz, .rd_any_nz,
    .release_bank
  );

  vlc_coder #(.TABLE_BASE(TABLE_BASE)) u_coder (
    .clk, .rst_n, .standard, .cfg_active(cfg_active || init_busy), .tab_addr, .tab_data,
    .rd_avail, .rd_idx, .rd_level, .rd_intra, .rd_blk, .rd_last_nz, .rd_any_nz, .release_bank,
    .vstrt, .vrdy, .eocv, .sendh, .hrdy, .hdr_code, .hdr_len,
    .push, .push_data, .fifo_full, .n_escapes, .n_cfg_stalls
  );

  sync_fifo #(.WIDTH(38), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push, .wr_data(push_data), .pop, .rd_data(fifo_data),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count)
  );

  bit_serializer u_ser (
    .clk, .rst_n, .speed, .fifo_data, .fifo_empty, .fifo_pop(pop),
    .bit_out, .bit_strobe, .busy(ser_busy)
  );

  wire unused_ok = ^{segs_done, fifo_count, ser_busy};
endmodule
