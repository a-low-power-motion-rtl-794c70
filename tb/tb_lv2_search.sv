// tb_lv2_search: LV2 candidate search (+-16 range, 24x24 windows). Random
// windows and candidates, some outside the window to exercise clamping, some
// with the block planted next to a candidate. Expected: the minimum SOD over
// the clamped candidates' three-arm crosses (centre, up, down, right); the
// reported MV must be one of those points with that SOD. Latency 5+2 cycles
// for B frames, 3+2 for P frames.
module tb_lv2_search;
  import bbme_pkg::*;
  import bbme_ref_pkg::*;
  localparam int H = 8, W = 24;
  logic clk = 0, rst_n = 0, start = 0, bframe = 0;
  mv_t cand0 [5];
  mv_t cand1 [5];
  logic [63:0] cur;
  logic [W*W-1:0] sw0, sw1;
  logic [255:0] pe_cur, pe_ref0, pe_ref1;
  logic [15:0][4:0] s4_0, s4_1;
  logic [3:0][6:0] s8_0, s8_1;
  logic [8:0] s16_0, s16_1;
  logic busy, done;
  mv_t mv0, mv1;
  logic [6:0] sod0, sod1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  lv2_search #(.SR(16)) dut (.clk, .rst_n, .start, .bframe, .cand0, .cand1, .cur, .sw0, .sw1,
    .pe_cur, .pe_ref0, .pe_ref1, .pe_sod0(s8_0), .pe_sod1(s8_1), .busy, .done, .mv0, .mv1, .sod0, .sod1);
  sod_pe u_pe0 (.cur(pe_cur), .ref_blk(pe_ref0), .sod4(s4_0), .sod8(s8_0), .sod16(s16_0));
  sod_pe u_pe1 (.cur(pe_cur), .ref_blk(pe_ref1), .sod4(s4_1), .sod8(s8_1), .sod16(s16_1));
  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int clampi(input int v);
    return (v > H-1) ? H-1 : (v < -(H-1)) ? -(H-1) : v;
  endfunction
  function automatic void check_dir(input logic [W*W-1:0] w, input mv_t cs [5], input mv_t mv,
                                    input logic [6:0] s, input string tag);
    bit cb [], wb [];
    int best, got;
    bit member;
    cb = new[64]; wb = new[W*W];
    for (int i = 0; i < 64; i++) cb[i] = cur[i];
    for (int i = 0; i < W*W; i++) wb[i] = w[i];
    best = 999; member = 0;
    for (int k = 0; k < 5; k++) begin
      int cx, cy;
      cx = clampi(cs[k].x); cy = clampi(cs[k].y);
      for (int q = 0; q < 4; q++) begin
        int x, y, v;
        x = cx + ((q == 3) ? 1 : 0);
        y = cy + ((q == 1) ? -1 : (q == 2) ? 1 : 0);
        v = sod(8, cb, wb, W, y + H, x + H);
        if (v < best) best = v;
      end
    end
    for (int k = 0; k < 5; k++) begin
      int cx, cy;
      cx = clampi(cs[k].x); cy = clampi(cs[k].y);
      if ((mv.x == cx && mv.y == cy) || (mv.x == cx && mv.y == cy - 1) ||
          (mv.x == cx && mv.y == cy + 1) || (mv.x == cx + 1 && mv.y == cy)) member = 1;
    end
    checks++;
    if (int'(s) != best) begin failures++; $display("%s sod %0d exp %0d", tag, s, best); end
    got = sod(8, cb, wb, W, int'(mv.y) + H, int'(mv.x) + H);
    checks++;
    if (!member || got != best) begin failures++; $display("%s mv (%0d,%0d) bad", tag, mv.x, mv.y); end
  endfunction
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      int cyc;
      bframe = (n % 2 == 0);
      cur = {$urandom, $urandom};
      for (int i = 0; i < W*W; i++) begin sw0[i] = 1'($urandom); sw1[i] = 1'($urandom); end
      for (int k = 0; k < 4; k++) begin
        cand0[k].x = 8'($urandom_range(0, 20)) - 8'sd10; cand0[k].y = 8'($urandom_range(0, 20)) - 8'sd10;
        cand1[k].x = 8'($urandom_range(0, 20)) - 8'sd10; cand1[k].y = 8'($urandom_range(0, 20)) - 8'sd10;
      end
      cand0[4] = '0; cand1[4] = '0;
      if (n % 4 < 2) begin   // plant the block one step below candidate 2
        int py, px;
        py = clampi(cand0[2].y) + 1 + H; px = clampi(cand0[2].x) + H;
        for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) sw0[(py+r)*W + px + c] = cur[r*8+c];
        py = clampi(cand1[3].y) + H; px = clampi(cand1[3].x) + 1 + H;
        for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) sw1[(py+r)*W + px + c] = cur[r*8+c];
      end
      if (!bframe) sw1 = sw0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != (bframe ? 7 : 5)) begin failures++; $display("latency %0d (b=%0d)", cyc, bframe); end
      check_dir(sw0, cand0, mv0, sod0, "dir0");
      if (bframe) check_dir(sw1, cand1, mv1, sod1, "dir1");
      else begin check_dir(sw0, cand0, mv1, sod1, "dir1p"); checks++; if (mv0 != mv1) failures++; end
      if (n % 4 < 2) begin checks++; if (sod0 != 0) begin failures++; $display("planted block missed"); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
