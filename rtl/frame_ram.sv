// frame_ram: one frame memory (4:2:0, planar Y then Cb then Cr, 8 bits per
// sample) for reconstructed frames.
//
// One write port and one read port with a registered (one clock) read.  The
// encoder uses two of them in turn: one holds the previous reconstructed frame
// that motion estimation searches, the other receives the frame being
// reconstructed.  The document places the I and previous frame memories with
// the motion estimator and notes they are outside the ME/MC chip; its size
// comes from the picture size.  Depth = 1.5 * width * height.
module frame_ram #(
  parameter int unsigned DEPTH = 1024 * 768 * 3 / 2,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
