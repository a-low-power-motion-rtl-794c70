// tb_interp_pe: every (hx, hy) half-pel offset on random rows against the
// MPEG-4 bilinear formulas written out case by case.
module tb_interp_pe;
  logic [2:0][17:0][7:0] rows;
  logic signed [1:0]     hx, hy;
  logic [15:0][7:0]      pix;
  int checks = 0, failures = 0;
  interp_pe dut (.rows, .hx, .hy, .pix);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 18; c++) rows[r][c] = 8'($urandom);
      for (int y = -1; y <= 1; y++)
        for (int x = -1; x <= 1; x++) begin
          hx = 2'(x); hy = 2'(y);
          #1;
          for (int i = 0; i < 16; i++) begin
            int e, ry, cx;
            ry = 1 + y; cx = i + 1 + x;   // integer sample at the displaced spot when whole
            if (x == 0 && y == 0) e = rows[1][i+1];
            else if (y == 0) e = (int'(rows[1][i+1]) + int'(rows[1][cx]) + 1) / 2;
            else if (x == 0) e = (int'(rows[1][i+1]) + int'(rows[ry][i+1]) + 1) / 2;
            else e = (int'(rows[1][i+1]) + int'(rows[1][cx]) + int'(rows[ry][i+1]) + int'(rows[ry][cx]) + 2) / 4;
            checks++;
            if (int'(pix[i]) != e) begin failures++; $display("hx=%0d hy=%0d i=%0d got %0d exp %0d", x, y, i, pix[i], e); end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
