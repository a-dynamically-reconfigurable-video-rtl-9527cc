// vlc_coder: variable length coder of the DPGA, driven by a code table held in
// the reconfigurable cells.
//
// For each block in the dual RAM the coder emits, into the FIFO:
//   intra blocks - the DC difference from the previous DC of the same colour
//     component as a size-category code (table) plus "size" raw bits;
//   all blocks - one code per (run of zeros, non-zero level) event in zigzag
//     order.  JPEG mode codes (run, size category) plus the raw magnitude bits;
//     MPEG-1/2 and H.263 code (run, |level|) plus a sign bit.  H.263 takes its
//     codes for the last coefficient from a second table section (the LAST
//     flag) and sends no end-of-block code; the other standards end the block
//     with EOB.  An event with no table entry (empty entry, run > 15, level or
//     size > 8) is sent as ESC followed by run (6 bits) and level (12 bits), with
//     the LAST flag in front for H.263.
// The code table starts at cell TABLE_BASE: entry e occupies cells
// TABLE_BASE+3e .. +3e+2 holding {length, code[15:8], code[7:0]}; entry numbers
// are in vre_pkg.  Reading one entry takes three clocks.  Changing standard is
// therefore a partial reconfiguration of those cells plus the std input.
// Handshakes (document names): VRDY is high when a full block waits and the
// coder is idle and the array is not being configured; a VSTRT pulse starts
// coding; EOCV pulses when the block's last code is in the FIFO.  HRDY is high
// when the coder is idle and the FIFO has room; a SENDH pulse pushes the host's
// header code (1..16 bits) and resets the DC predictors.  Table reads wait
// while cfg_active is high.
// The document gives the handshake names, that the VLC codes are what is
// reconfigured, and the FIFO; the event model, the table layout and the escape
// format are this design's choices.
module vlc_coder
  import vre_pkg::*;
#(
  parameter int unsigned TABLE_BASE = 2401
) (
  input  logic               clk,
  input  logic               rst_n,
  input  std_e               standard,
  input  logic               cfg_active,
  output logic [12:0]        tab_addr,
  input  logic [7:0]         tab_data,
  // dual RAM
  input  logic               rd_avail,
  output logic [5:0]         rd_idx,
  input  logic signed [11:0] rd_level,
  input  logic               rd_intra,
  input  logic [2:0]         rd_blk,
  input  logic [5:0]         rd_last_nz,
  input  logic               rd_any_nz,
  output logic               release_bank,
  // host handshakes
  input  logic               vstrt,
  output logic               vrdy,
  output logic               eocv,
  input  logic               sendh,
  output logic               hrdy,
  input  logic [15:0]        hdr_code,
  input  logic [4:0]         hdr_len,
  // FIFO
  output logic               push,
  output logic [37:0]        push_data,   // {code[31:0], len[5:0]}
  input  logic               fifo_full,
  // event counters
  output logic [15:0]        n_escapes,
  output logic [15:0]        n_cfg_stalls
);
  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_LK0, S_LK1, S_LK2, S_EMIT, S_ESC_PAY, S_FIN} state_e;
  state_e st;

  logic [8:0]  lk_entry;
  logic [11:0] ext;
  logic [3:0]  ext_len;
  logic        is_ac, in_esc, is_eob;
  logic [18:0] esc_pay;
  logic [4:0]  esc_len;
  logic [4:0]  t_len;
  logic [15:0] t_code;
  logic [6:0]  idx;
  logic [5:0]  run;
  logic signed [11:0] dc_pred [3];

  // ---- combinational event classification for the level at idx
  wire               h263 = (standard == STD_H263);
  wire               jpeg = (standard == STD_JPEG);
  wire               last = (idx == {1'b0, rd_last_nz});
  logic [11:0]       mag;
  logic [3:0]        scat;
  logic              in_tab;
  logic [8:0]        ev_entry;
  logic [11:0]       ev_ext;
  logic [3:0]        ev_ext_len;
  always_comb begin
    mag  = rd_level[11] ? 12'(-rd_level) : 12'(rd_level);
    scat = size_cat(13'(rd_level));
    if (jpeg) begin
      in_tab     = (run <= 6'(VT_MAX_RUN)) && (scat <= 4'(VT_MAX_LEV));
      ev_entry   = 9'(VT_AC0) + 9'({run[3:0], 3'b000}) + 9'(scat) - 9'd1;
      ev_ext     = rd_level[11] ? 12'(rd_level - 12'sd1) : 12'(rd_level);
      ev_ext     = ev_ext & 12'((13'd1 << scat) - 13'd1);
      ev_ext_len = scat;
    end else begin
      in_tab     = (run <= 6'(VT_MAX_RUN)) && (mag <= 12'(VT_MAX_LEV));
      ev_entry   = ((h263 && last) ? 9'(VT_AC1) : 9'(VT_AC0)) + 9'({run[3:0], 3'b000}) + 9'(mag[3:0]) - 9'd1;
      ev_ext     = {11'd0, rd_level[11]};
      ev_ext_len = 4'd1;
    end
  end

  // ---- DC difference of an intra block
  wire [1:0]          comp = (rd_blk < 3'd4) ? 2'd0 : (rd_blk == 3'd4) ? 2'd1 : 2'd2;
  wire signed [12:0]  dc_diff = 13'(rd_level) - 13'(dc_pred[comp]);
  wire [3:0]          dc_cat  = size_cat(dc_diff);
  wire [11:0]         dc_bits = dc_diff[12] ? 12'(dc_diff - 13'sd1) : 12'(dc_diff);

  assign vrdy     = (st == S_IDLE) && rd_avail && !cfg_active;
  assign release_bank = (st == S_FIN);   // bank is free by the time EOCV shows
  assign hrdy     = (st == S_IDLE) && !fifo_full;
  assign rd_idx   = (st == S_IDLE) ? 6'd0 : idx[5:0];   // DC is read at VSTRT
  assign tab_addr = 13'(TABLE_BASE) + 13'({lk_entry, 1'b0}) + 13'(lk_entry) +
                    ((st == S_LK1) ? 13'd1 : (st == S_LK2) ? 13'd2 : 13'd0);

  wire blk_done = !rd_any_nz || (idx > {1'b0, rd_last_nz});

  always_comb begin
    push = 1'b0;
    push_data = '0;
    if (st == S_IDLE && sendh && hrdy) begin
      push = 1'b1;
      push_data = {16'd0, hdr_code, 1'b0, hdr_len};
    end else if (st == S_EMIT && !fifo_full) begin
      if (in_esc) begin
        push = 1'b1;
        push_data = {16'd0, t_code, 1'b0, t_len};
      end else if (t_len != 5'd0) begin
        push = 1'b1;
        push_data = {(32'(t_code) << ext_len) | 32'(ext), 6'(t_len) + 6'(ext_len)};
      end
    end else if (st == S_ESC_PAY && !fifo_full) begin
      push = 1'b1;
      push_data = {13'd0, esc_pay, 1'b0, esc_len};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; lk_entry <= '0; ext <= '0; ext_len <= '0; is_ac <= 1'b0; in_esc <= 1'b0;
      is_eob <= 1'b0; esc_pay <= '0; esc_len <= '0; t_len <= '0; t_code <= '0; idx <= '0; run <= '0;
      dc_pred <= '{default: '0}; eocv <= 1'b0;
      n_escapes <= '0; n_cfg_stalls <= '0;
    end else begin
      eocv <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (sendh && hrdy) begin
            dc_pred <= '{default: '0};
          end else if (vstrt && vrdy) begin
            run <= '0;
            is_eob <= 1'b0;
            in_esc <= 1'b0;
            if (rd_intra) begin
              dc_pred[comp] <= rd_level;
              lk_entry <= 9'(VT_DC) + 9'(dc_cat);
              ext      <= dc_bits & 12'((13'd1 << dc_cat) - 13'd1);
              ext_len  <= dc_cat;
              is_ac    <= 1'b0;
              idx      <= 7'd1;
              st       <= S_LK0;
            end else begin
              idx <= 7'd0;
              st  <= S_SCAN;
            end
          end
        end
        S_SCAN: begin
          if (blk_done) begin
            if (h263) st <= S_FIN;
            else begin
              lk_entry <= 9'(VT_EOB); ext <= '0; ext_len <= '0; is_ac <= 1'b0; is_eob <= 1'b1;
              st <= S_LK0;
            end
          end else if (rd_level == 12'sd0) begin
            run <= run + 6'd1;
            idx <= idx + 7'd1;
          end else begin
            esc_pay  <= h263 ? {last, run, rd_level} : {1'b0, run, rd_level};
            esc_len  <= h263 ? 5'd19 : 5'd18;
            is_ac    <= 1'b1;
            lk_entry <= in_tab ? ev_entry : 9'(VT_ESC);
            in_esc   <= !in_tab;
            ext      <= ev_ext;
            ext_len  <= ev_ext_len;
            run      <= '0;
            idx      <= idx + 6'd1;   // wraps to 0 after index 63; blk_done sees it
            st       <= S_LK0;
          end
        end
        S_LK0: begin
          if (cfg_active) n_cfg_stalls <= n_cfg_stalls + 16'd1;
          else begin t_len <= tab_data[4:0]; st <= S_LK1; end
        end
        S_LK1: begin t_code[15:8] <= tab_data; st <= S_LK2; end
        S_LK2: begin t_code[7:0]  <= tab_data; st <= S_EMIT; end
        S_EMIT: begin
          if (!in_esc && is_ac && t_len == 5'd0) begin
            in_esc   <= 1'b1;                 // no code for this event: escape
            lk_entry <= 9'(VT_ESC);
            st       <= S_LK0;
          end else if (!fifo_full) begin
            if (in_esc) begin
              n_escapes <= n_escapes + 16'd1;
              st <= S_ESC_PAY;
            end else st <= is_eob ? S_FIN : S_SCAN;
          end
        end
        S_ESC_PAY: if (!fifo_full) begin in_esc <= 1'b0; st <= S_SCAN; end
        S_FIN: begin
          eocv <= 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_push_not_full: assert property (@(posedge clk) disable iff (!rst_n) !(push && fifo_full))
    else $error("vlc_coder: push into a full FIFO");
endmodule
