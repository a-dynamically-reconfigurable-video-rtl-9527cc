// host_decoder: host bus address decoders and the encoder's host registers.
//
// The host drives A0-A15, D0-D7 and a WR strobe.  CS* for the DPGA
// configuration port is decoded combinationally from the address (low while
// the configuration data address is on the bus); CON* is a register bit the
// host writes.  The other registers hold what the host programs: standard,
// colour or monochrome, picture size in macroblocks, serial speed, quantiser
// scale, the header code, the macroblock position and the macroblock command.
// WR is asynchronous: it is synchronised (two stages) and a register is
// written on its rising edge.  Writing the command register with bit0 set
// gives a one-clock mb_start pulse (bit1 = P macroblock), bit2 a one-clock
// swap_frames pulse.
// Reset state: MPEG-2 (the document's default standard), colour, 64 x 48
// macroblocks (1024 x 768, the document's picture size), speed 0, qscale 8,
// CON* high.  The address map and the register encodings are this design's.
module host_decoder
  import vre_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic [7:0]  data,
  input  logic        wr,
  output logic        cs_n,
  output logic        con_n,
  output std_e        standard,
  output logic        color,
  output logic [7:0]  width_mb,
  output logic [7:0]  height_mb,
  output logic [7:0]  speed,
  output logic [4:0]  qscale,
  output logic [15:0] hdr_code,
  output logic [4:0]  hdr_len,
  output logic [7:0]  mb_x,
  output logic [7:0]  mb_y,
  output logic        mb_start,
  output logic        mb_inter,
  output logic        swap_frames
);
  logic [24:0] s1, s2;    // {wr, addr, data}
  logic        wr_d;
  wire         s_wr   = s2[24];
  wire  [15:0] s_addr = s2[23:8];
  wire  [7:0]  s_data = s2[7:0];
  wire         we     = s_wr && !wr_d;

  assign cs_n = (addr != A_CFG_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; wr_d <= 1'b0;
      con_n <= 1'b1; standard <= STD_MPEG2; color <= 1'b1;
      width_mb <= 8'd64; height_mb <= 8'd48; speed <= 8'd0; qscale <= 5'd8;
      hdr_code <= '0; hdr_len <= '0;
      mb_x <= '0; mb_y <= '0; mb_start <= 1'b0; mb_inter <= 1'b0; swap_frames <= 1'b0;
    end else begin
      s1 <= {wr, addr, data};
      s2 <= s1;
      wr_d <= s_wr;
      mb_start <= 1'b0;
      swap_frames <= 1'b0;
      if (we) begin
        unique case (s_addr)
          A_CFG_CTRL: con_n     <= s_data[0];
          A_STD:      standard  <= std_e'(s_data[1:0]);
          A_COLOR:    color     <= s_data[0];
          A_WIDTH:    width_mb  <= s_data;
          A_HEIGHT:   height_mb <= s_data;
          A_SPEED:    speed     <= s_data;
          A_QSCALE:   qscale    <= s_data[4:0];
          A_HDR_HI:   hdr_code[15:8] <= s_data;
          A_HDR_LO:   hdr_code[7:0]  <= s_data;
          A_HDR_LEN:  hdr_len <= s_data[4:0];
          A_MB_X:     mb_x <= s_data;
          A_MB_Y:     mb_y <= s_data;
          A_MB_CMD:   begin
            mb_start    <= s_data[0];
            mb_inter    <= s_data[1];
            swap_frames <= s_data[2];
          end
          default: ;
        endcase
      end
    end
  end
endmodule
