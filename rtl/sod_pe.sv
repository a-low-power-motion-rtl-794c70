// sod_pe: shared sum-of-difference processing element of the integer-pel
// search. 256 XORs compare a 16x16 binary current block with a 16x16 binary
// reference block (raster order, bit r*16+c); an adder tree then gives the
// sixteen 4x4 SODs (block i covers rows 4*(i/4).., columns 4*(i%4)..), their
// sums into four 8x8 SODs (quadrant q covers rows 8*(q/2).., columns 8*(q%2)..)
// and the 16x16 SOD. The LV1 search uses the sixteen 4x4 results as sixteen
// independent candidates, LV2 the four 8x8 results, LV3 all of them.
// Combinational, as in the document's XOR array plus adder tree.
module sod_pe (
  input  logic [255:0]      cur,
  input  logic [255:0]      ref_blk,
  output logic [15:0][4:0]  sod4,
  output logic [3:0][6:0]   sod8,
  output logic [8:0]        sod16
);
  logic [255:0] diff;
  assign diff = cur ^ ref_blk;

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      sod4[i] = '0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          sod4[i] = sod4[i] + 5'(diff[(4*(i/4)+r)*16 + 4*(i%4)+c]);
    end
    for (int q = 0; q < 4; q++)
      sod8[q] = 7'(sod4[8*(q/2) + 2*(q%2)]) + 7'(sod4[8*(q/2) + 2*(q%2) + 1])
              + 7'(sod4[8*(q/2) + 2*(q%2) + 4]) + 7'(sod4[8*(q/2) + 2*(q%2) + 5]);
    sod16 = 9'(sod8[0]) + 9'(sod8[1]) + 9'(sod8[2]) + 9'(sod8[3]);
  end
endmodule
