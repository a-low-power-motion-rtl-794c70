// tb_me_top: end-to-end run of the three-stage motion estimator with default
// parameters (search range +-16). The testbench plays host and external
// memory:
//   * reference frames are functions f_d(y, x) (d = 0 forward, 1 backward,
//     f_1(y, x) = f_0(y + 4, x - 4)), streamed over the 32-bit port without
//     gaps;
//   * each MB's 18x18 block is f_0 at the planted motion plus +-3 noise (or
//     flat rows for MBs meant to go intra); its binary pyramid is planted in
//     random binary windows at the true motion of each direction, which the
//     host writes while the IME is idle.
// Every result is checked against a model: MB order, integer MV, costs,
// intra/inter decision, half-pel MVs reaching the minimum bilinear SAD, and
// the 8x8/16x16 choice. Stage latencies are checked inside the top (IME B 110
// / P 94, transmission 121 words per window, MD-SME MD pass 18 cycles,
// each counted from start; the probes below count from the cycle before).
// MD-SME ends with 16 residue rows (34 intra / 132 inter in all); rows are
// counted per MB and intra rows must equal the pixels.
// Mechanism counters must all be non-zero: B MBs, P MBs (mirrored windows),
// inter and intra decisions, 8x8 mode, cycles with all three stages busy,
// backward-window fetches, ping-pong swaps and residue streams.
module tb_me_top;
  import bbme_pkg::*;
  import bbme_ref_pkg::*;
  localparam int W1 = 10, W2 = 24, W3 = 52, C3 = 18, NMB = 16;
  logic clk = 0, rst_n = 0;
  logic cur_we = 0, sw_we = 0, sw_dir = 0, sw_mirror = 0;
  logic [5:0] cur_addr = 0, sw_row = 0;
  logic [8:0][7:0] cur_data = '0;
  logic [1:0] sw_level = 0;
  logic [W3-1:0] sw_data = '0;
  logic ime_idle, flush = 0, mb_valid = 0, mb_ready, mb_bframe = 0;
  logic [11:0] mb_x = 0, mb_y = 0;
  mv_t pred_ur [2];
  mv_t pred_u [2];
  mv_t pred_l [2];
  logic req_valid, req_ready = 0, req_dir, bus_valid = 0;
  logic signed [13:0] req_x, req_y;
  logic [31:0] bus_data = 0;
  logic res_valid, res_bframe, res_inter, res_mode8;
  logic [11:0] res_x, res_y;
  mv_t res_hmv16 [2];
  mv_t res_hmv8 [4];
  mv_t res_imv16 [2];
  logic [15:0] res_intra_cost, res_inter_cost_a, res_inter_cost_b;
  logic rsd_valid;
  logic [3:0] rsd_row;
  logic signed [15:0][8:0] rsd_data;
  int rsd_n = 0, rsd_bad = 0, n_rsd = 0;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_b = 0, n_p = 0, n_inter = 0, n_intra = 0, n_mode8 = 0, n_overlap = 0, n_bwd = 0, n_swap = 0;
  // per-MB data
  int mbx [NMB], mby [NMB], mvx [NMB][2], mvy [NMB][2], kindv [NMB];
  int cur [NMB][16][16];
  int nres = 0;
  always #5 clk = ~clk;
  me_top dut (.clk, .rst_n, .cur_we, .cur_addr, .cur_data, .sw_we, .sw_level, .sw_dir, .sw_mirror,
    .sw_row, .sw_data, .ime_idle, .mb_valid, .flush, .mb_ready, .mb_bframe, .mb_x, .mb_y, .pred_ur, .pred_u,
    .pred_l, .req_valid, .req_ready, .req_dir, .req_x, .req_y, .bus_valid, .bus_data, .res_valid,
    .res_x, .res_y, .res_bframe, .res_inter, .res_mode8, .res_hmv16, .res_hmv8, .res_imv16,
    .res_intra_cost, .res_inter_cost_a, .res_inter_cost_b,
    .rsd_valid, .rsd_row, .rsd_data);
  initial begin
    #50000000 failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // textured reference frames
  function automatic int f(input int d, input int y, input int x);
    if (d == 1) begin y += 4; x -= 4; end
    return 20 + ((x * 7 + y * 13) & 63) * 2 + ((x * x + 3 * y * y + x * y) % 37) + ((y * 5) & 15);
  endfunction
  function automatic int hp(input int d, input int yh, input int xh);
    int y0, y1, x0, x1;
    y0 = yh >>> 1; y1 = (yh + 1) >>> 1; x0 = xh >>> 1; x1 = (xh + 1) >>> 1;
    return (f(d, y0, x0) + f(d, y0, x1) + f(d, y1, x0) + f(d, y1, x1) + 2) / 4;
  endfunction
  // SAD of block (by, bx, n) of MB m against direction d at integer MV (my, mx) + half (hy, hx)
  function automatic int hsad(input int m, input int d, input int by, input int bx, input int n,
                              input int hy, input int hx);
    int s;
    s = 0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        int p, v;
        p = cur[m][by + r][bx + c];
        v = hp(d, 2 * (mby[m] + mvy[m][d] + by + r) + hy, 2 * (mbx[m] + mvx[m][d] + bx + c) + hx);
        s += (p > v) ? p - v : v - p;
      end
    return s;
  endfunction
  function automatic int hsad8(input int m, input int b, input int my, input int mx);
    int s;
    s = 0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        int p, v;
        p = cur[m][8*(b/2) + r][8*(b%2) + c];
        v = f(0, mby[m] + my + 8*(b/2) + r, mbx[m] + mx + 8*(b%2) + c);
        s += (p > v) ? p - v : v - p;
      end
    return s;
  endfunction
  function automatic int best_h(input int m, input int d, input int by, input int bx, input int n);
    int b;
    b = 1 << 30;
    for (int hy = -1; hy <= 1; hy++) for (int hx = -1; hx <= 1; hx++)
      if (hsad(m, d, by, bx, n, hy, hx) < b) b = hsad(m, d, by, bx, n, hy, hx);
    return b;
  endfunction
  // ---------------- external memory: 22x22 window, 4 pixels per word ----
  initial begin
    forever begin
      @(negedge clk);
      if (req_valid) begin
        int d, x0, y0;
        req_ready = 1; d = int'(req_dir); x0 = int'(req_x); y0 = int'(req_y);
        if (d == 1) n_bwd++;
        @(negedge clk); req_ready = 0;
        for (int k = 0; k < 121; k++) begin
          bus_valid = 1;
          for (int b = 0; b < 4; b++) bus_data[8*b +: 8] = 8'(f(d, y0 + (4*k + b) / 22, x0 + (4*k + b) % 22));
          @(negedge clk);
        end
        bus_valid = 0;
      end
    end
  end
  // ---------------- host -------------------------------------------------
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
    for (int d = 0; d < 2; d++) begin pred_ur[d] = '0; pred_u[d] = '0; pred_l[d] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < NMB; m++) begin
      pix_t blk [][];
      bit b3 [], b2 [], b1 [];
      bit bf;
      kindv[m] = m % 4;          // 0 P textured, 1 B textured, 2 P flat (intra), 3 B textured
      bf = (kindv[m] == 1 || kindv[m] == 3);
      mbx[m] = 16 * (2 + m % 5); mby[m] = 16 * (2 + m / 5);
      mvx[m][0] = 4 * ($urandom_range(0, 2) - 1); mvy[m][0] = 4 * ($urandom_range(0, 2) - 1);
      mvx[m][1] = mvx[m][0] + 4; mvy[m][1] = mvy[m][0] - 4;   // same content in f_1
      if (!bf) begin mvx[m][1] = mvx[m][0]; mvy[m][1] = mvy[m][0]; end
      blk = new[18];
      for (int r = 0; r < 18; r++) begin
        blk[r] = new[18];
        for (int c = 0; c < 18; c++) begin
          int v;
          v = f(0, mby[m] + mvy[m][0] + r - 1, mbx[m] + mvx[m][0] + c - 1) + int'($urandom_range(0, 6)) - 3;
          if (kindv[m] == 2) v = 100 + r;
          if (kindv[m] == 0) begin   // each quadrant shifted by its own half pel
            int q, hy, hx;
            q = ((r < 9) ? 0 : 2) + ((c < 9) ? 0 : 1);
            hy = (q == 0) ? -1 : (q == 3) ? 1 : 0;
            hx = (q == 1) ? 1 : (q == 2) ? -1 : 0;
            v = hp(0, 2 * (mby[m] + mvy[m][0] + r - 1) + hy, 2 * (mbx[m] + mvx[m][0] + c - 1) + hx)
                + int'($urandom_range(0, 2)) - 1;
          end
          blk[r][c] = pix_t'(v);
        end
      end
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) cur[m][r][c] = int'(blk[r+1][c+1]);
      pyramid(blk, b3, b2, b1);
      // host writes while the IME is idle
      @(negedge clk);
      while (!ime_idle) @(negedge clk);
      for (int w = 0; w < 36; w++) begin
        @(negedge clk); cur_we = 1; cur_addr = 6'(w);
        for (int k = 0; k < 9; k++) cur_data[k] = blk[w/2][(w%2)*9 + k];
      end
      @(negedge clk); cur_we = 0;
      for (int d = 0; d < (bf ? 2 : 1); d++) begin
        load_win(1, d, !bf, 4, W1, b1, 3 + mvy[m][d]/4, 3 + mvx[m][d]/4);
        load_win(2, d, !bf, 8, W2, b2, 8 + mvy[m][d]/2, 8 + mvx[m][d]/2);
        load_win(3, d, !bf, 16, W3, b3, C3 + mvy[m][d], C3 + mvx[m][d]);
      end
      mb_valid = 1; mb_bframe = bf; mb_x = 12'(mbx[m]); mb_y = 12'(mby[m]);
      @(posedge clk);
      while (!mb_ready) @(posedge clk);
      @(negedge clk); mb_valid = 0;
      if (bf) n_b++; else n_p++;
    end
    flush = 1;
  end
  // ---------------- stage latencies and overlap -------------------------
  int ime_c = 0, sf_c = 0, md_c = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ime.busy && dut.u_fetch.busy && dut.u_md.busy) n_overlap++;
    if (dut.step) n_swap++;
    if (dut.go && dut.v1) ime_c = 1; else if (ime_c > 0) ime_c++;
    if (dut.go && dut.v2) sf_c = 1; else if (sf_c > 0) sf_c++;
    if (dut.go && dut.v3) md_c = 1; else if (md_c > 0) md_c++;
    if (dut.ime_done) begin
      checks++;
      if (ime_c != (dut.bf1 ? 111 : 95)) begin failures++; $display("IME latency %0d", ime_c); end
      ime_c = 0;
    end
    if (dut.sf_done) begin
      checks++;
      // request handshake 2 cycles, then one word per cycle
      if (sf_c != (dut.bf2 ? 2 * (121 + 2) : 121 + 2) + 1) begin failures++; $display("transmission %0d", sf_c); end
      sf_c = 0;
    end
    if (dut.md_done) begin
      checks++;
      if (md_c != (dut.res_inter ? 133 : 35)) begin failures++; $display("MD-SME latency %0d", md_c); end
      md_c = 0;
    end
  end
  // residue rows: count, and intra rows carry the pixels unchanged
  always @(posedge clk) if (rst_n && rsd_valid) begin
    if (int'(rsd_row) != rsd_n) rsd_bad++;
    if (!dut.u_md.inter)
      for (int i = 0; i < 16; i++) if (int'($signed(rsd_data[i])) != cur[nres][rsd_row][i]) rsd_bad++;
    rsd_n++;
  end
  // ---------------- result checker --------------------------------------
  int last_res = 0;
  always @(posedge clk) if (rst_n && res_valid) begin
    automatic int m = nres;
    automatic int e_intra, e_a, e_b, hx, hy, got;
    automatic bit bf, e_inter;
    $display("MB %0d (%0d,%0d) %s: %s%s  res after %0d cycles", m, res_x, res_y, res_bframe ? "B" : "P",
      res_inter ? "inter" : "intra", res_mode8 ? " 8x8" : "", int'($time / 10) - last_res);
    last_res = int'($time / 10);
    checks++;
    if (rsd_n != 16 || rsd_bad != 0) begin failures++; $display("MB%0d residue rows %0d bad %0d", m, rsd_n, rsd_bad); end
    if (rsd_n == 16) n_rsd++;
    rsd_n = 0; rsd_bad = 0;
    nres++;
    bf = (kindv[m] == 1 || kindv[m] == 3);
    checks++;
    if (int'(res_x) != mbx[m] || int'(res_y) != mby[m] || res_bframe != bf) begin failures++; $display("order"); end
    for (int d = 0; d < (bf ? 2 : 1); d++) begin
      checks++;
      if (int'(res_imv16[d].x) != mvx[m][d] || int'(res_imv16[d].y) != mvy[m][d]) begin
        failures++; $display("MB%0d dir%0d imv (%0d,%0d)", m, d, res_imv16[d].x, res_imv16[d].y);
      end
    end
    e_intra = 0;
    for (int r = 0; r < 16; r++) begin
      int s, mm;
      s = 0; for (int c = 0; c < 16; c++) s += cur[m][r][c];
      mm = s / 16;
      for (int c = 0; c < 16; c++) e_intra += (cur[m][r][c] > mm) ? cur[m][r][c] - mm : mm - cur[m][r][c];
    end
    e_a = hsad(m, 0, 0, 0, 16, 0, 0);
    if (bf) e_b = hsad(m, 1, 0, 0, 16, 0, 0);
    else begin
      e_b = 0;
      for (int b = 0; b < 4; b++) begin
        e_b += hsad8(m, b, int'(dut.mv8_3[b].y), int'(dut.mv8_3[b].x));
        if (kindv[m] != 2) begin
          checks++;
          if (int'(dut.mv8_3[b].x) != mvx[m][0] || int'(dut.mv8_3[b].y) != mvy[m][0]) begin
            failures++; $display("MB%0d mv8[%0d]", m, b);
          end
        end
      end
    end
    e_inter = (e_a < e_intra) || (e_b < e_intra);
    checks++;
    if (int'(res_intra_cost) != e_intra || int'(res_inter_cost_a) != e_a || int'(res_inter_cost_b) != e_b) begin
      failures++; $display("MB%0d costs %0d %0d %0d exp %0d %0d %0d", m, res_intra_cost, res_inter_cost_a,
        res_inter_cost_b, e_intra, e_a, e_b);
    end
    checks++;
    if (res_inter != e_inter) begin failures++; $display("MB%0d mode", m); end
    if (e_inter) begin
      n_inter++;
      for (int d = 0; d < (bf ? 2 : 1); d++) begin
        hx = int'(res_hmv16[d].x) - 2 * mvx[m][d]; hy = int'(res_hmv16[d].y) - 2 * mvy[m][d];
        got = (hx < -1 || hx > 1 || hy < -1 || hy > 1) ? -1 : hsad(m, d, 0, 0, 16, hy, hx);
        checks++;
        if (got != best_h(m, d, 0, 0, 16)) begin failures++; $display("MB%0d hmv16[%0d]", m, d); end
      end
      if (!bf) begin
        int b8s;
        b8s = 0;
        for (int b = 0; b < 4; b++) begin
          int e8;
          e8 = best_h(m, 0, 8*(b/2), 8*(b%2), 8);
          b8s += e8;
          hx = int'(res_hmv8[b].x) - 2 * mvx[m][0]; hy = int'(res_hmv8[b].y) - 2 * mvy[m][0];
          got = (hx < -1 || hx > 1 || hy < -1 || hy > 1) ? -1 : hsad(m, 0, 8*(b/2), 8*(b%2), 8, hy, hx);
          checks++;
          if (got != e8) begin failures++; $display("MB%0d hmv8[%0d]", m, b); end
        end
        checks++;
        if (res_mode8 != (b8s < best_h(m, 0, 0, 0, 16))) begin failures++; $display("MB%0d mode8", m); end
        if (res_mode8) n_mode8++;
      end
    end else n_intra++;
  end
  initial begin
    wait (nres == NMB);
    repeat (20) @(posedge clk);
    $display("mechanisms: B %0d P %0d inter %0d intra %0d mode8 %0d overlap-cycles %0d bwd-fetch %0d swaps %0d residue-MBs %0d",
      n_b, n_p, n_inter, n_intra, n_mode8, n_overlap, n_bwd, n_swap, n_rsd);
    checks += 9;
    if (n_rsd == 0) failures++;
    if (n_b == 0) failures++;
    if (n_p == 0) failures++;
    if (n_inter == 0) failures++;
    if (n_intra == 0) failures++;
    if (n_mode8 == 0) failures++;
    if (n_overlap == 0) failures++;
    if (n_bwd == 0) failures++;
    if (n_swap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
