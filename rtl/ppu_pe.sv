// ppu_pe: pre-processing element. Computes the threshold of one pixel as the
// mean of its four neighbours, TH = (B+C+D+E)/4, and outputs the binary value
// A >= TH. The threshold doubles as the low-pass value that the next, coarser
// pyramid level is down-sampled from. Purely combinational.
// Follows the document's binarization rule; the truncating divide is this
// design's choice.
module ppu_pe (
  input  logic [7:0] a,          // centre pixel
  input  logic [7:0] b, c, d, e, // up, left, right, down neighbours
  output logic       bin,
  output logic [7:0] avg
);
  logic [9:0] sum;
  always_comb begin
    sum = 10'(b) + 10'(c) + 10'(d) + 10'(e);
    avg = 8'(sum >> 2);
    bin = (a >= avg);
  end
endmodule
