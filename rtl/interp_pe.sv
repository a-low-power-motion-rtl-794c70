// interp_pe: bilinear half-pel interpolation on the fly. Given three integer
// reference rows (y-1, y, y+1), each 18 pixels starting one column left of
// the block, it returns the 16 pixels of row y displaced by (hx, hy) half
// pels, hx, hy in {-1, 0, +1}:
//   integer position:        p
//   horizontal or vertical:  (a + b + 1) >> 1
//   diagonal:                (a + b + c + d + 2) >> 2
// (the MPEG-4 rounding with rounding control 0). Combinational; all cases
// use the four-sample form, which reduces exactly to the other two.
module interp_pe (
  input  logic [2:0][17:0][7:0] rows,
  input  logic signed [1:0]     hx,
  input  logic signed [1:0]     hy,
  output logic [15:0][7:0]      pix
);
  always_comb begin
    int ra, rb;
    ra = (hy < 0) ? 0 : 1;
    rb = (hy > 0) ? 2 : 1;
    for (int i = 0; i < 16; i++) begin
      int ca, cb;
      logic [9:0] s;
      ca = (hx < 0) ? i : i + 1;
      cb = (hx > 0) ? i + 2 : i + 1;
      s = 10'(rows[ra][ca]) + 10'(rows[ra][cb]) + 10'(rows[rb][ca]) + 10'(rows[rb][cb]) + 10'd2;
      pix[i] = 8'(s >> 2);
    end
  end
endmodule
