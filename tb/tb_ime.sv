// tb_ime: the whole integer-pel search on planted motion. A random 18x18
// block is pre-processed by the reference pyramid model; its LV1, LV2 and LV3
// binary blocks are planted in random binary windows at the true motion
// (a multiple of 4 so all three levels agree). B frames get a different true
// motion per direction; P frames write one window with mirroring. The IME
// must return the true 16x16 and 8x8 MVs with zero SOD, the search centre,
// and the 8-bit inner MB. The next block is loaded into the ping-pong memory
// during each search. Cycle counts are reported and checked against the
// design's schedule (B 110, P 94 cycles start to done: PPU 56, LV1 6 or 4,
// LV2 7 or 5, LV3 37 or 25, plus one hand-over cycle per level).
module tb_ime;
  import bbme_pkg::*;
  import bbme_ref_pkg::*;
  localparam int SR = 16, W1 = 10, W2 = 24, W3 = 52, C3 = 18;
  logic clk = 0, rst_n = 0;
  logic cur_we = 0, cur_swap = 0, sw_we = 0, sw_dir = 0, sw_mirror = 0, start = 0, bframe = 0;
  logic [5:0] cur_addr = 0, sw_row = 0;
  logic [8:0][7:0] cur_data = '0;
  logic [1:0] sw_level = 0;
  logic [W3-1:0] sw_data = '0;
  mv_t pred_ur [2];
  mv_t pred_u [2];
  mv_t pred_l [2];
  logic busy, done;
  mv_t mv16 [2];
  mv_t mv8 [2][4];
  mv_t center [2];
  logic [8:0] sod16 [2];
  logic [15:0][15:0][7:0] cur_mb;
  int checks = 0, failures = 0;
  localparam int NMB = 8;
  pix_t blk [NMB][][];
  always #5 clk = ~clk;
  ime #(.SR(SR)) dut (.clk, .rst_n, .cur_we, .cur_addr, .cur_data, .cur_swap, .sw_we, .sw_level, .sw_dir,
    .sw_mirror, .sw_row, .sw_data, .start, .bframe, .pred_ur, .pred_u, .pred_l, .busy, .done,
    .mv16, .mv8, .center, .sod16, .cur_mb);
  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic load_cur(input int m);
    for (int w = 0; w < 36; w++) begin
      @(negedge clk); cur_we = 1; cur_addr = 6'(w);
      for (int k = 0; k < 9; k++) cur_data[k] = blk[m][w/2][(w%2)*9 + k];
    end
    @(negedge clk); cur_we = 0;
  endtask
  // write one level's window with a planted block
  task automatic load_win(input int lvl, input int dir, input bit mirror, input int n, input int ws,
                          input bit b [], input int py, input int px);
    bit w [];
    w = new[ws*ws];
    foreach (w[i]) w[i] = 1'($urandom);
    for (int r = 0; r < n; r++) for (int c = 0; c < n; c++) w[(py+r)*ws + px + c] = b[r*n+c];
    for (int r = 0; r < ws; r++) begin
      @(negedge clk);
      sw_we = 1; sw_level = 2'(lvl); sw_dir = dir[0]; sw_mirror = mirror; sw_row = 6'(r);
      sw_data = '0;
      for (int c = 0; c < ws; c++) sw_data[c] = w[r*ws + c];
    end
    @(negedge clk); sw_we = 0; sw_mirror = 0;
  endtask
  initial begin
    for (int m = 0; m < NMB; m++) begin
      blk[m] = new[18];
      for (int r = 0; r < 18; r++) begin
        blk[m][r] = new[18];
        for (int c = 0; c < 18; c++) blk[m][r][c] = pix_t'($urandom);
      end
    end
    for (int d = 0; d < 2; d++) begin
      pred_ur[d] = '0; pred_u[d] = '0; pred_l[d] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    load_cur(0);
    for (int m = 0; m < NMB; m++) begin
      int mx [2], my [2], cyc;
      bit b3 [], b2 [], b1 [];
      bframe = (m % 2 == 0);
      pyramid(blk[m], b3, b2, b1);
      for (int d = 0; d < 2; d++) begin
        mx[d] = 4 * ($urandom_range(0, 6) - 3);
        my[d] = 4 * ($urandom_range(0, 6) - 3);
        pred_ur[d].x = 8'($urandom_range(0, 8)) - 8'sd4; pred_ur[d].y = 8'($urandom_range(0, 8)) - 8'sd4;
        pred_u[d].x  = 8'($urandom_range(0, 8)) - 8'sd4; pred_u[d].y  = 8'($urandom_range(0, 8)) - 8'sd4;
        pred_l[d].x  = 8'($urandom_range(0, 8)) - 8'sd4; pred_l[d].y  = 8'($urandom_range(0, 8)) - 8'sd4;
      end
      for (int d = 0; d < (bframe ? 2 : 1); d++) begin
        load_win(1, d, !bframe, 4, W1, b1, 3 + my[d]/4, 3 + mx[d]/4);
        load_win(2, d, !bframe, 8, W2, b2, 8 + my[d]/2, 8 + mx[d]/2);
        load_win(3, d, !bframe, 16, W3, b3, C3 + my[d], C3 + mx[d]);
      end
      if (!bframe) begin mx[1] = mx[0]; my[1] = my[0]; end
      @(negedge clk); cur_swap = 1; @(negedge clk); cur_swap = 0; start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      fork
        if (m + 1 < NMB) load_cur(m + 1);
        while (!done) begin @(negedge clk); cyc++; end
      join
      $display("MB %0d %s frame: IME %0d cycles", m, bframe ? "B" : "P", cyc);
      checks++;
      if (cyc != (bframe ? 110 : 94)) begin failures++; $display("latency %0d", cyc); end
      for (int d = 0; d < 2; d++) begin
        checks++;
        if (int'(mv16[d].x) != mx[d] || int'(mv16[d].y) != my[d] || sod16[d] != 0) begin
          failures++; $display("MB%0d dir%0d mv16 (%0d,%0d) sod %0d exp (%0d,%0d)", m, d, mv16[d].x, mv16[d].y, sod16[d], mx[d], my[d]);
        end
        checks++;
        if (int'(center[d].x) != mx[d] || int'(center[d].y) != my[d]) begin failures++; $display("centre"); end
        for (int q = 0; q < 4; q++) begin
          checks++;
          if (int'(mv8[d][q].x) != mx[d] || int'(mv8[d][q].y) != my[d]) begin failures++; $display("mv8"); end
        end
      end
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        checks++; if (cur_mb[r][c] != blk[m][r+1][c+1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
