// mode_determiner: mode decision of the merged MD/SME stage. Inter coding is
// chosen when either inter cost is below the intra cost, otherwise intra.
// In a P frame the two inter costs are the 16x16 SAD and the sum of the four
// 8x8 SADs; in a B frame the forward and backward 16x16 SADs.
// Combinational. The rule follows the document.
module mode_determiner (
  input  logic [15:0] intra_cost,
  input  logic [15:0] inter_a,
  input  logic [15:0] inter_b,
  output logic        inter
);
  assign inter = (inter_a < intra_cost) || (inter_b < intra_cost);
endmodule
