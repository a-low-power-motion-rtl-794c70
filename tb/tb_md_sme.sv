// tb_md_sme: merged mode decision and half-pel search against a software
// model: line-based intra cost, inter costs at the integer MVs, the mode
// rule, and for inter MBs the minimum bilinear half-pel SAD over the 3x3
// offsets of each block (16x16 forward, then four 8x8 blocks for P frames or
// 16x16 backward for B frames). Reported half-pel MVs must reach those
// minima; for P frames the 8x8/16x16 choice must follow the SAD sums. Windows
// are written into the ping-pong memory while the previous MB is processed.
// The residue rows streamed after the decision are checked pixel by pixel:
// pixel minus the half-pel prediction of the decided partition (B: the
// direction with the lower half-pel SAD), or the pixel itself for intra.
// Cycle counts: intra 34, inter 132 (P and B) (start to done: MD pass 18,
// half-pel passes, residue 16).
module tb_md_sme;
  import bbme_pkg::*;
  localparam int S = 22;
  logic clk = 0, rst_n = 0, sw_we = 0, sw_dir = 0, sw_swap = 0, start = 0, bframe = 0;
  logic [6:0] sw_addr = 0;
  logic [3:0][7:0] sw_data = '0;
  logic [15:0][15:0][7:0] cur_mb;
  mv_t mv16 [2];
  mv_t mv8 [4];
  mv_t center [2];
  logic busy, done, inter, mode8;
  mv_t hmv16 [2];
  mv_t hmv8 [4];
  logic [15:0] intra_cost, inter_cost_a, inter_cost_b;
  logic res_valid;
  logic [3:0] res_row;
  logic signed [15:0][8:0] res_data;
  int res_got [16][16];
  int n_res = 0;
  int checks = 0, failures = 0;
  int n_inter = 0, n_intra = 0, n_mode8 = 0;
  int win [2][S][S];
  always #5 clk = ~clk;
  md_sme dut (.clk, .rst_n, .sw_we, .sw_dir, .sw_addr, .sw_data, .sw_swap, .start, .bframe, .cur_mb,
    .mv16, .mv8, .center, .busy, .done, .inter, .mode8, .hmv16, .hmv8, .intra_cost, .inter_cost_a, .inter_cost_b,
    .res_valid, .res_row, .res_data);
  initial begin
    #20000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int wp(input int d, input int y, input int x);
    if (y < 0 || y >= S || x < 0 || x >= S) return 0;
    return win[d][y][x];
  endfunction
  // bilinear sample at half-pel window coordinate (yh, xh)
  function automatic int hp(input int d, input int yh, input int xh);
    int y0, y1, x0, x1;
    y0 = yh >>> 1; y1 = (yh + 1) >>> 1; x0 = xh >>> 1; x1 = (xh + 1) >>> 1;
    return (wp(d, y0, x0) + wp(d, y0, x1) + wp(d, y1, x0) + wp(d, y1, x1) + 2) / 4;
  endfunction
  // SAD of block (by,bx,n) at window integer offset (oy,ox) plus half offset (hy,hx)
  function automatic int hsad(input int d, input int by, input int bx, input int n, input int oy,
                              input int ox, input int hy, input int hx);
    int s;
    s = 0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        int v, p;
        p = cur_mb[by + r][bx + c];
        v = hp(d, 2*(oy + by + r) + hy, 2*(ox + bx + c) + hx);
        s += (p > v) ? p - v : v - p;
      end
    return s;
  endfunction
  function automatic int best_h(input int d, input int by, input int bx, input int n, input int oy, input int ox);
    int b;
    b = 1 << 30;
    for (int hy = -1; hy <= 1; hy++) for (int hx = -1; hx <= 1; hx++)
      if (hsad(d, by, bx, n, oy, ox, hy, hx) < b) b = hsad(d, by, bx, n, oy, ox, hy, hx);
    return b;
  endfunction
  task automatic write_win(input int d);
    for (int a = 0; a < 121; a++) begin
      @(negedge clk);
      sw_we = 1; sw_dir = d[0]; sw_addr = 7'(a);
      for (int k = 0; k < 4; k++) sw_data[k] = 8'(win[d][(4*a + k) / S][(4*a + k) % S]);
    end
    @(negedge clk); sw_we = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 24; n++) begin
      int kind, cyc, e_intra, e_a, e_b, o16x [2], o16y [2], o8x [4], o8y [4];
      bit e_inter;
      kind = n % 4;            // 0: P inter, 1: B inter, 2: P intra (flat rows), 3: B with noise
      bframe = (kind == 1 || kind == 3);
      for (int d = 0; d < 2; d++) begin
        center[d].x = 8'($urandom_range(0, 20)) - 8'sd10; center[d].y = 8'($urandom_range(0, 20)) - 8'sd10;
        mv16[d].x = center[d].x + 8'($urandom_range(0, 4)) - 8'sd2;
        mv16[d].y = center[d].y + 8'($urandom_range(0, 4)) - 8'sd2;
      end
      for (int b = 0; b < 4; b++) begin
        mv8[b].x = center[0].x + 8'($urandom_range(0, 4)) - 8'sd2;
        mv8[b].y = center[0].y + 8'($urandom_range(0, 4)) - 8'sd2;
      end
      // smooth reference windows
      for (int d = 0; d < 2; d++) for (int y = 0; y < S; y++) for (int x = 0; x < S; x++)
        win[d][y][x] = (kind == 3) ? $urandom_range(0, 255) : 40 + 3*x + 2*y + ((x*y + d*7) % 5) * 6;
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        int yy, xx;
        yy = 3 + int'(mv16[0].y) - int'(center[0].y) + r; xx = 3 + int'(mv16[0].x) - int'(center[0].x) + c;
        if (kind == 0 && n % 8 == 0) begin   // each 8x8 quadrant follows its own MV
          yy = 3 + int'(mv8[(r/8)*2 + c/8].y) - int'(center[0].y) + r;
          xx = 3 + int'(mv8[(r/8)*2 + c/8].x) - int'(center[0].x) + c;
        end
        if (kind == 2) cur_mb[r][c] = 8'(100 + r);
        else cur_mb[r][c] = 8'(win[0][yy][xx] + $urandom_range(0, 6) - 3);
      end
      write_win(0);
      write_win(1);
      for (int d = 0; d < 2; d++) begin
        o16x[d] = 3 + int'(mv16[d].x) - int'(center[d].x); o16y[d] = 3 + int'(mv16[d].y) - int'(center[d].y);
      end
      for (int b = 0; b < 4; b++) begin
        o8x[b] = 3 + int'(mv8[b].x) - int'(center[0].x); o8y[b] = 3 + int'(mv8[b].y) - int'(center[0].y);
      end
      // expected costs
      e_intra = 0;
      for (int r = 0; r < 16; r++) begin
        int s, m;
        s = 0; for (int c = 0; c < 16; c++) s += cur_mb[r][c];
        m = s / 16;
        for (int c = 0; c < 16; c++) e_intra += (cur_mb[r][c] > m) ? cur_mb[r][c] - m : m - cur_mb[r][c];
      end
      e_a = hsad(0, 0, 0, 16, o16y[0], o16x[0], 0, 0);
      if (bframe) e_b = hsad(1, 0, 0, 16, o16y[1], o16x[1], 0, 0);
      else begin
        e_b = 0;
        for (int b = 0; b < 4; b++) e_b += hsad(0, 8*(b/2), 8*(b%2), 8, o8y[b], o8x[b], 0, 0);
      end
      e_inter = (e_a < e_intra) || (e_b < e_intra);
      @(negedge clk); sw_swap = 1; @(negedge clk); sw_swap = 0; start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      n_res = 0;
      while (!done) begin
        @(posedge clk);
        if (res_valid) begin
          for (int i = 0; i < 16; i++) res_got[res_row][i] = int'($signed(res_data[i]));
          n_res++;
        end
        @(negedge clk); cyc++;
      end
      checks++;
      if (n_res != 16) begin failures++; $display("n%0d residue rows %0d", n, n_res); end
      checks++;
      if (int'(intra_cost) != e_intra || int'(inter_cost_a) != e_a || int'(inter_cost_b) != e_b) begin
        failures++; $display("n%0d costs %0d %0d %0d exp %0d %0d %0d", n, intra_cost, inter_cost_a, inter_cost_b, e_intra, e_a, e_b);
      end
      checks++;
      if (inter != e_inter) begin failures++; $display("n%0d mode %0d exp %0d", n, inter, e_inter); end
      checks++;
      if (cyc != (!e_inter ? 34 : 132)) begin failures++; $display("n%0d cycles %0d", n, cyc); end
      if (e_inter) begin
        int b16, hx, hy, got, b8s;
        n_inter++;
        for (int d = 0; d < (bframe ? 2 : 1); d++) begin
          b16 = best_h(d, 0, 0, 16, o16y[d], o16x[d]);
          hx = int'(hmv16[d].x) - 2*int'(mv16[d].x); hy = int'(hmv16[d].y) - 2*int'(mv16[d].y);
          got = (hx < -1 || hx > 1 || hy < -1 || hy > 1) ? -1 : hsad(d, 0, 0, 16, o16y[d], o16x[d], hy, hx);
          checks++;
          if (got != b16) begin failures++; $display("n%0d dir%0d hmv16 sad %0d exp %0d", n, d, got, b16); end
        end
        if (!bframe) begin
          b8s = 0;
          for (int b = 0; b < 4; b++) begin
            int e8;
            e8 = best_h(0, 8*(b/2), 8*(b%2), 8, o8y[b], o8x[b]);
            b8s += e8;
            hx = int'(hmv8[b].x) - 2*int'(mv8[b].x); hy = int'(hmv8[b].y) - 2*int'(mv8[b].y);
            got = (hx < -1 || hx > 1 || hy < -1 || hy > 1) ? -1 : hsad(0, 8*(b/2), 8*(b%2), 8, o8y[b], o8x[b], hy, hx);
            checks++;
            if (got != e8) begin failures++; $display("n%0d hmv8[%0d] sad %0d exp %0d", n, b, got, e8); end
          end
          checks++;
          if (mode8 != (b8s < best_h(0, 0, 0, 16, o16y[0], o16x[0]))) begin failures++; $display("mode8"); end
          if (mode8) n_mode8++;
        end
      end else n_intra++;
      // residue of the decided mode
      begin
        int rd, pred;
        rd = (bframe && best_h(1, 0, 0, 16, o16y[1], o16x[1]) < best_h(0, 0, 0, 16, o16y[0], o16x[0])) ? 1 : 0;
        for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
          int b, hx, hy, oy, ox;
          if (!e_inter) pred = 0;
          else if (mode8) begin
            b = (r / 8) * 2 + c / 8;
            hx = int'(hmv8[b].x) - 2*int'(mv8[b].x); hy = int'(hmv8[b].y) - 2*int'(mv8[b].y);
            pred = hp(0, 2*(o8y[b] + r) + hy, 2*(o8x[b] + c) + hx);
          end else begin
            hx = int'(hmv16[rd].x) - 2*int'(mv16[rd].x); hy = int'(hmv16[rd].y) - 2*int'(mv16[rd].y);
            pred = hp(rd, 2*(o16y[rd] + r) + hy, 2*(o16x[rd] + c) + hx);
          end
          checks++;
          if (res_got[r][c] != int'(cur_mb[r][c]) - pred) begin
            failures++;
            if (failures < 10) $display("n%0d residue (%0d,%0d) %0d exp %0d", n, r, c, res_got[r][c], int'(cur_mb[r][c]) - pred);
          end
        end
      end
    end
    checks++;
    if (n_inter == 0 || n_intra == 0 || n_mode8 == 0) begin failures++; $display("mode coverage inter=%0d intra=%0d", n_inter, n_intra); end
    $display("inter %0d intra %0d mode8 %0d", n_inter, n_intra, n_mode8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
