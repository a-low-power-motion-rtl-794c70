// tb_lv1_search: LV1 search (+-3, 10x10 windows) with two SOD PEs. Random
// windows, some with the current block planted at a known offset. B frames
// search both windows independently, P frames search one mirrored window.
// The reported SOD must be the true minimum over all 49 positions, the
// reported MV must have that SOD, and the latency must be 4+2 cycles (B) or
// 2+2 cycles (P).
module tb_lv1_search;
  import bbme_pkg::*;
  import bbme_ref_pkg::*;
  localparam int D = 3, W = 10;
  logic clk = 0, rst_n = 0, start = 0, bframe = 0;
  logic [15:0] cur;
  logic [W*W-1:0] sw0, sw1;
  logic [255:0] pe_cur, pe_ref0, pe_ref1;
  logic [15:0][4:0] s4_0, s4_1;
  logic [3:0][6:0] s8_0, s8_1;
  logic [8:0] s16_0, s16_1;
  logic busy, done;
  mv_t mv0, mv1;
  logic [4:0] sod0, sod1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  lv1_search #(.SR(16)) dut (.clk, .rst_n, .start, .bframe, .cur, .sw0, .sw1, .pe_cur, .pe_ref0, .pe_ref1,
    .pe_sod0(s4_0), .pe_sod1(s4_1), .busy, .done, .mv0, .mv1, .sod0, .sod1);
  sod_pe u_pe0 (.cur(pe_cur), .ref_blk(pe_ref0), .sod4(s4_0), .sod8(s8_0), .sod16(s16_0));
  sod_pe u_pe1 (.cur(pe_cur), .ref_blk(pe_ref1), .sod4(s4_1), .sod8(s8_1), .sod16(s16_1));
  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic void check_dir(input logic [W*W-1:0] w, input mv_t mv, input logic [4:0] s, input string tag);
    bit cb [], wb [];
    int best;
    cb = new[16]; wb = new[W*W];
    for (int i = 0; i < 16; i++) cb[i] = cur[i];
    for (int i = 0; i < W*W; i++) wb[i] = w[i];
    best = 99;
    for (int y = 0; y <= 2*D; y++)
      for (int x = 0; x <= 2*D; x++)
        if (sod(4, cb, wb, W, y, x) < best) best = sod(4, cb, wb, W, y, x);
    checks++;
    if (int'(s) != best) begin failures++; $display("%s sod %0d exp %0d", tag, s, best); end
    checks++;
    if (mv.x < -D || mv.x > D || mv.y < -D || mv.y > D ||
        sod(4, cb, wb, W, mv.y + D, mv.x + D) != best) begin
      failures++; $display("%s mv (%0d,%0d) not a minimum", tag, mv.x, mv.y);
    end
  endfunction
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      int cyc;
      bframe = (n % 2 == 0);
      cur = 16'($urandom);
      for (int i = 0; i < W*W; i++) begin sw0[i] = 1'($urandom); sw1[i] = 1'($urandom); end
      if (n % 4 < 2) begin   // plant the block
        int py, px;
        py = $urandom_range(0, 2*D); px = $urandom_range(0, 2*D);
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) sw0[(py+r)*W + px + c] = cur[r*4+c];
        py = $urandom_range(0, 2*D); px = $urandom_range(0, 2*D);
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) sw1[(py+r)*W + px + c] = cur[r*4+c];
      end
      if (!bframe) sw1 = sw0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != (bframe ? 6 : 4)) begin failures++; $display("latency %0d (b=%0d)", cyc, bframe); end
      check_dir(sw0, mv0, sod0, "dir0");
      check_dir(sw1, mv1, sod1, "dir1");
      if (!bframe) begin checks++; if (mv0 != mv1) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
