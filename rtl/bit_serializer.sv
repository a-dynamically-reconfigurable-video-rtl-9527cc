// bit_serializer: sends FIFO codes out as the serial bit stream.
//
// Each FIFO entry is {code[31:0], len[5:0]}: the low len bits of code, sent
// most significant first.  One bit leaves every (speed+1) clocks: bit_out
// holds the bit and bit_strobe pulses for one clock when it is valid, so the
// channel rate is f_clk/(speed+1).  The host writes speed ("SPEED" in the
// document's host register list); the document gives no encoding for it, so
// the divider form is this design's choice.  An entry of length 0 is dropped.
module bit_serializer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  speed,
  input  logic [37:0] fifo_data,
  input  logic        fifo_empty,
  output logic        fifo_pop,
  output logic        bit_out,
  output logic        bit_strobe,
  output logic        busy
);
  logic [31:0] sh;
  logic [5:0]  left;
  logic [7:0]  div;

  assign busy     = (left != '0);
  assign fifo_pop = !busy && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; left <= '0; div <= '0; bit_out <= 1'b0; bit_strobe <= 1'b0;
    end else begin
      bit_strobe <= 1'b0;
      if (fifo_pop) begin
        // left-align the code so the next bit is always sh[31]
        sh   <= (fifo_data[5:0] == 6'd0) ? 32'd0 : fifo_data[37:6] << (6'd32 - fifo_data[5:0]);
        left <= (fifo_data[5:0] > 6'd32) ? 6'd32 : fifo_data[5:0];
        div  <= '0;
      end else if (busy) begin
        if (div == speed) begin
          div        <= '0;
          bit_out    <= sh[31];
          bit_strobe <= 1'b1;
          sh         <= sh << 1;
          left       <= left - 6'd1;
        end else begin
          div <= div + 8'd1;
        end
      end
    end
  end
endmodule
