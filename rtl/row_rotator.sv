// row_rotator: the pre-processing register file holds three rows and the
// fourth row overwrites the physical slot of the first. This block re-orders
// the three physical rows into logical top / middle / bottom order so the
// PPU_PE row always sees them in image order. wr_ptr is the physical slot that
// received the most recent row (the bottom row). Combinational 3:1 selection.
// The function follows the document; the mux implementation is this design's.
module row_rotator #(
  parameter int W = 16
) (
  input  logic [1:0]   wr_ptr,
  input  logic [W-1:0] rows_in [3],
  output logic [W-1:0] top,
  output logic [W-1:0] mid,
  output logic [W-1:0] bot
);
  always_comb begin
    unique case (wr_ptr)
      2'd0:    begin bot = rows_in[0]; mid = rows_in[2]; top = rows_in[1]; end
      2'd1:    begin bot = rows_in[1]; mid = rows_in[0]; top = rows_in[2]; end
      default: begin bot = rows_in[2]; mid = rows_in[1]; top = rows_in[0]; end
    endcase
  end
endmodule
