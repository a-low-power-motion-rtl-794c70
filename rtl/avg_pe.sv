// avg_pe: average PE of the intra cost engine. Returns the mean of one
// 16-pixel row, the reference value of the line-based intra cost
// sum_j sum_i |c(i,j) - mean_j|. Combinational; the division by 16 truncates
// (the rounding is this design's choice).
module avg_pe (
  input  logic [15:0][7:0] row,
  output logic [7:0]       mean
);
  logic [11:0] sum;
  always_comb begin
    sum = '0;
    for (int i = 0; i < 16; i++) sum = sum + 12'(row[i]);
    mean = sum[11:4];
  end
endmodule
