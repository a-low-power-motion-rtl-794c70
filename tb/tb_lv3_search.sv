// tb_lv3_search: LV3 +-2 search with the shift-register windows (+-16 range,
// 52x52 windows). Random windows and centres (some beyond +-16 to exercise
// the clamp), some with the block planted. For each direction the 16x16 SOD
// and each 8x8 quadrant SOD must equal the minimum over the 25 positions and
// each reported MV must reach it. Latency 1+10+25+1 cycles (B), 1+10+13+1 (P).
module tb_lv3_search;
  import bbme_pkg::*;
  import bbme_ref_pkg::*;
  localparam int SR = 16, C = SR + 2, W = 16 + 2*C;
  logic clk = 0, rst_n = 0, start = 0, bframe = 0;
  mv_t center0, center1, mv16_0, mv16_1, cen0, cen1;
  mv_t mv8_0 [4];
  mv_t mv8_1 [4];
  logic [255:0] cur;
  logic [W*W-1:0] sw0, sw1;
  logic [255:0] pe_cur, pe_ref0, pe_ref1;
  logic [15:0][4:0] s4_0, s4_1;
  logic [3:0][6:0] s8_0, s8_1, sod8_0, sod8_1;
  logic [8:0] s16_0, s16_1, sod16_0, sod16_1;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  lv3_search #(.SR(SR)) dut (.clk, .rst_n, .start, .bframe, .center0, .center1, .cur, .sw0, .sw1,
    .pe_cur, .pe_ref0, .pe_ref1, .pe_sod8_0(s8_0), .pe_sod8_1(s8_1), .pe_sod16_0(s16_0), .pe_sod16_1(s16_1),
    .busy, .done, .mv16_0, .mv16_1, .mv8_0, .mv8_1, .sod16_0, .sod16_1, .sod8_0, .sod8_1, .cen0, .cen1);
  sod_pe u_pe0 (.cur(pe_cur), .ref_blk(pe_ref0), .sod4(s4_0), .sod8(s8_0), .sod16(s16_0));
  sod_pe u_pe1 (.cur(pe_cur), .ref_blk(pe_ref1), .sod4(s4_1), .sod8(s8_1), .sod16(s16_1));
  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int clampi(input int v);
    return (v > SR) ? SR : (v < -SR) ? -SR : v;
  endfunction
  function automatic void check_dir(input logic [W*W-1:0] w, input mv_t cen, input mv_t m16,
      input logic [8:0] s16, input mv_t m8 [4], input logic [3:0][6:0] s8, input string tag);
    bit cb [], wb [];
    int b16, b8 [4], cx, cy;
    cb = new[256]; wb = new[W*W];
    for (int i = 0; i < 256; i++) cb[i] = cur[i];
    for (int i = 0; i < W*W; i++) wb[i] = w[i];
    cx = clampi(cen.x); cy = clampi(cen.y);
    b16 = 999; for (int q = 0; q < 4; q++) b8[q] = 999;
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -2; dx <= 2; dx++) begin
        int v;
        v = sod(16, cb, wb, W, C + cy + dy, C + cx + dx);
        if (v < b16) b16 = v;
        for (int q = 0; q < 4; q++) begin
          v = sod_q(q, cb, wb, W, C + cy + dy, C + cx + dx);
          if (v < b8[q]) b8[q] = v;
        end
      end
    checks++;
    if (int'(s16) != b16) begin failures++; $display("%s sod16 %0d exp %0d", tag, s16, b16); end
    checks++;
    if (m16.x < cx-2 || m16.x > cx+2 || m16.y < cy-2 || m16.y > cy+2 ||
        sod(16, cb, wb, W, C + int'(m16.y), C + int'(m16.x)) != b16) begin
      failures++; $display("%s mv16 (%0d,%0d) bad", tag, m16.x, m16.y);
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (int'(s8[q]) != b8[q]) begin failures++; $display("%s sod8[%0d] %0d exp %0d", tag, q, s8[q], b8[q]); end
      checks++;
      if (m8[q].x < cx-2 || m8[q].x > cx+2 || m8[q].y < cy-2 || m8[q].y > cy+2 ||
          sod_q(q, cb, wb, W, C + int'(m8[q].y), C + int'(m8[q].x)) != b8[q]) begin
        failures++; $display("%s mv8[%0d] bad", tag, q);
      end
    end
  endfunction
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 60; n++) begin
      int cyc;
      bframe = (n % 2 == 0);
      for (int i = 0; i < 8; i++) cur[i*32 +: 32] = $urandom;
      for (int i = 0; i < W*W; i++) begin sw0[i] = 1'($urandom); sw1[i] = 1'($urandom); end
      center0.x = 8'($urandom_range(0, 40)) - 8'sd20; center0.y = 8'($urandom_range(0, 40)) - 8'sd20;
      center1.x = 8'($urandom_range(0, 40)) - 8'sd20; center1.y = 8'($urandom_range(0, 40)) - 8'sd20;
      if (n % 3 == 0) begin   // plant at a known spot
        int py, px;
        py = C + clampi(center0.y) + $urandom_range(0, 4) - 2; px = C + clampi(center0.x) + $urandom_range(0, 4) - 2;
        for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) sw0[(py+r)*W + px + c] = cur[r*16+c];
      end
      if (!bframe) sw1 = sw0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != (bframe ? 37 : 25)) begin failures++; $display("latency %0d (b=%0d)", cyc, bframe); end
      check_dir(sw0, center0, mv16_0, sod16_0, mv8_0, sod8_0, "dir0");
      if (bframe) check_dir(sw1, center1, mv16_1, sod16_1, mv8_1, sod8_1, "dir1");
      else check_dir(sw0, center0, mv16_1, sod16_1, mv8_1, sod8_1, "dir1p");
      if (n % 3 == 0) begin checks++; if (sod16_0 != 0) begin failures++; $display("planted missed"); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
