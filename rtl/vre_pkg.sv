// vre_pkg: types and constants shared by the reconfigurable video encoder.
//
// Holds the coding-standard encoding, the host register map, the layout of the
// VLC code table inside the reconfigurable cells of the DPGA, and two constant
// tables that the datapath computes rather than stores: the zigzag scan order
// and the fixed-point 8-point DCT basis.
//
// DCT basis: T[u][x] = round(4096 * c(u)/2 * cos((2x+1)*u*pi/16)), c(0)=1/sqrt(2),
// c(u>0)=1.  Only the eight distinct magnitudes cos(k*pi/16)*2048, k=0..7, are
// written down; sign and index folding are computed.  The standards, the cell
// count (6400 logic + 200 I/O cells), the configuration mode (6) and the
// one-byte-per-CCLK parallel load follow the document.  The register addresses,
// the table layout and the DCT word lengths are this design's own choices.
package vre_pkg;

  typedef enum logic [1:0] {
    STD_JPEG  = 2'd0,
    STD_MPEG1 = 2'd1,
    STD_MPEG2 = 2'd2,
    STD_H263  = 2'd3
  } std_e;

  // DPGA array: 80 x 80 logic cells, numbered 1..6400, then I/O cells 6401..6600.
  localparam int unsigned DPGA_LOGIC_CELLS = 6400;
  localparam int unsigned DPGA_CELLS       = 6600;
  localparam logic [2:0]  CFG_MODE_PARALLEL = 3'd6;

  // Host register map (A15..A0).
  localparam logic [15:0] A_CFG_DATA = 16'hFF00;  // DPGA configuration byte (CS* low)
  localparam logic [15:0] A_CFG_CTRL = 16'hFF01;  // bit0: CON* level
  localparam logic [15:0] A_STD      = 16'hFF02;  // coding standard
  localparam logic [15:0] A_COLOR    = 16'hFF03;  // bit0: 1 = colour (6 blocks/MB)
  localparam logic [15:0] A_WIDTH    = 16'hFF04;  // picture width in macroblocks
  localparam logic [15:0] A_HEIGHT   = 16'hFF05;  // picture height in macroblocks
  localparam logic [15:0] A_SPEED    = 16'hFF06;  // serial bit period - 1, in clocks
  localparam logic [15:0] A_QSCALE   = 16'hFF07;  // quantiser scale 1..31
  localparam logic [15:0] A_HDR_HI   = 16'hFF08;  // header code bits 15..8
  localparam logic [15:0] A_HDR_LO   = 16'hFF09;  // header code bits 7..0
  localparam logic [15:0] A_HDR_LEN  = 16'hFF0A;  // header code length 1..16
  localparam logic [15:0] A_MB_X     = 16'hFF0C;  // macroblock column
  localparam logic [15:0] A_MB_Y     = 16'hFF0D;  // macroblock row
  localparam logic [15:0] A_MB_CMD   = 16'hFF0E;  // bit0 start, bit1 P (inter), bit2 swap frames

  // VLC code table inside the reconfigurable cells: 3 cells per entry
  // (length, code[15:8], code[7:0]).  Entry numbers:
  localparam int unsigned VT_EOB  = 0;
  localparam int unsigned VT_ESC  = 1;
  localparam int unsigned VT_DC   = 2;    // 13 DC size categories 0..12
  localparam int unsigned VT_AC0  = 15;   // run 0..15 x level/size 1..8, not last
  localparam int unsigned VT_AC1  = 143;  // same, last coefficient (H.263 only)
  localparam int unsigned VT_ENTRIES = 271;
  localparam int unsigned VT_MAX_RUN = 15;
  localparam int unsigned VT_MAX_LEV = 8;

  typedef logic [63:0][5:0]  zz_tab_t;
  typedef logic [63:0][13:0] dct_tab_t;

  // Zigzag scan: entry k is the raster position (row*8+col) of scan index k.
  function automatic zz_tab_t zigzag_table();
    zz_tab_t t;
    int r, c;
    r = 0; c = 0;
    for (int k = 0; k < 64; k++) begin
      t[k] = 6'(r * 8 + c);
      if (((r + c) % 2) == 0) begin
        if (c == 7)      r++;
        else if (r == 0) c++;
        else begin r--; c++; end
      end else begin
        if (r == 7)      c++;
        else if (c == 0) r++;
        else begin r++; c--; end
      end
    end
    return t;
  endfunction

  // Basis T[u][x], stored at index u*8+x, 14-bit two's complement.
  function automatic dct_tab_t dct_table();
    dct_tab_t t;
    int k[9];
    int m, v;
    k = '{2048, 2009, 1892, 1703, 1448, 1138, 784, 400, 0};
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++) begin
        m = ((2 * x + 1) * u) % 32;
        if (u == 0)       v = 1448;
        else if (m <= 8)  v = k[m];
        else if (m <= 16) v = -k[16 - m];
        else if (m <= 24) v = -k[m - 16];
        else              v = k[32 - m];
        t[u * 8 + x] = 14'(v);
      end
    return t;
  endfunction

  localparam zz_tab_t  ZIGZAG = zigzag_table();
  localparam dct_tab_t DCT_T  = dct_table();

  // Number of bits needed for the magnitude of v (JPEG/MPEG size category).
  function automatic logic [3:0] size_cat(input logic signed [12:0] v);
    logic [12:0] a;
    logic [3:0]  n;
    a = v[12] ? 13'(-v) : 13'(v);
    n = 4'd0;
    for (int i = 0; i < 13; i++)
      if (a[i]) n = 4'(i + 1);
    return n;
  endfunction

endpackage
