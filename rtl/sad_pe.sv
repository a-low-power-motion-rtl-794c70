// sad_pe: sum-of-absolute-difference PE of the sub-pel stage. Sixteen
// absolute-difference PEs work on sixteen pixel pairs per cycle (one row of a
// 16x16 block or two rows of an 8x8 block) and an accumulator sums them.
// Timing: with en high, acc takes clr ? row SAD : acc + row SAD at the clock
// edge; acc is therefore complete the cycle after the last row. The 16 AD PEs
// plus accumulator follow the document; the 16-bit accumulator is sized for
// 256 pixels of 8 bits.
module sad_pe (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [15:0][7:0] a,
  input  logic [15:0][7:0] b,
  output logic [15:0]      acc
);
  logic [15:0] row_sad;
  always_comb begin
    row_sad = '0;
    for (int i = 0; i < 16; i++)
      row_sad = row_sad + 16'((a[i] > b[i]) ? 8'(a[i] - b[i]) : 8'(b[i] - a[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= (clr ? 16'd0 : acc) + row_sad;
  end
endmodule
