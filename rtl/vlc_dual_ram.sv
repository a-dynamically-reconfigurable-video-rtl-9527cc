// vlc_dual_ram: the dual (ping-pong) coefficient RAM at the input of the VLC.
//
// DCTQ writes one block of 64 quantised levels, zigzag index by index, into
// one bank while the VLC coder reads the other.  A bank becomes full with its
// 64th level; the coder reads it at any index through rd_idx and frees it with
// release.  With each bank the RAM keeps the block's tag (intra, block number)
// and the zigzag index of its last non-zero level, which the H.263 mode needs
// for its LAST flag.  wr_ready is low while the bank being written is still
// full.  The document names a "dual redundant RAM for accepting DCTQ inputs";
// its organisation here is this design's own.
module vlc_dual_ram (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_valid,
  output logic               wr_ready,
  input  logic signed [11:0] wr_level,
  input  logic [5:0]         wr_idx,
  input  logic               wr_intra,
  input  logic [2:0]         wr_blk,
  output logic               rd_avail,
  input  logic [5:0]         rd_idx,
  output logic signed [11:0] rd_level,
  output logic               rd_intra,
  output logic [2:0]         rd_blk,
  output logic [5:0]         rd_last_nz,
  output logic               rd_any_nz,
  input  logic               release_bank
);
  logic signed [11:0] mem [2][64];
  logic [1:0] full, anynz;
  logic [1:0] intra;
  logic [2:0] blk [2];
  logic [5:0] lastnz [2];
  logic       wb, rb;

  assign wr_ready   = !full[wb];
  assign rd_avail   = full[rb];
  assign rd_level   = mem[rb][rd_idx];
  assign rd_intra   = intra[rb];
  assign rd_blk     = blk[rb];
  assign rd_last_nz = lastnz[rb];
  assign rd_any_nz  = anynz[rb];

  always_ff @(posedge clk) if (wr_valid && wr_ready) mem[wb][wr_idx] <= wr_level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; anynz <= '0; intra <= '0; wb <= 1'b0; rb <= 1'b0;
      blk <= '{default: '0}; lastnz <= '{default: '0};
    end else begin
      if (wr_valid && wr_ready) begin
        if (wr_idx == 6'd0) begin
          anynz[wb]  <= (wr_level != 12'sd0);
          lastnz[wb] <= 6'd0;
          intra[wb]  <= wr_intra;
          blk[wb]    <= wr_blk;
        end else if (wr_level != 12'sd0) begin
          anynz[wb]  <= 1'b1;
          lastnz[wb] <= wr_idx;
        end
        if (wr_idx == 6'd63) begin
          full[wb] <= 1'b1;
          wb       <= ~wb;
        end
      end
      if (release_bank && full[rb]) begin
        full[rb] <= 1'b0;
        rb       <= ~rb;
      end
    end
  end
endmodule
