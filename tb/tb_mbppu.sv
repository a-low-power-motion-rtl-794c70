// tb_mbppu: random 18x18 blocks through the pre-processing unit. The next
// block is written into the ping-pong memory while the current one is being
// processed. LV3/LV2/LV1 binary blocks and the inner 8-bit MB are compared
// with the reference pyramid; start-to-done latency must be 56 cycles.
module tb_mbppu;
  import bbme_ref_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, swap = 0, start = 0;
  logic [5:0] wr_addr = 0;
  logic [8:0][7:0] wr_data = '0;
  logic busy, done;
  logic [255:0] bin3;
  logic [63:0] bin2;
  logic [15:0] bin1;
  logic [15:0][15:0][7:0] cur_mb;
  int checks = 0, failures = 0;
  localparam int NMB = 6;
  localparam int LAT = 56;
  pix_t blk [NMB][][];
  always #5 clk = ~clk;
  mbppu dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .swap, .start, .busy, .done,
             .bin3, .bin2, .bin1, .cur_mb);
  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic load(input int m);
    for (int w = 0; w < 36; w++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(w);
      for (int k = 0; k < 9; k++) wr_data[k] = blk[m][w/2][(w%2)*9 + k];
    end
    @(negedge clk); wr_en = 0;
  endtask
  initial begin
    for (int m = 0; m < NMB; m++) begin
      blk[m] = new[18];
      for (int r = 0; r < 18; r++) begin
        blk[m][r] = new[18];
        for (int c = 0; c < 18; c++)
          blk[m][r][c] = (m == 0) ? pix_t'(r * 8 + c) : pix_t'($urandom);
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    load(0);
    for (int m = 0; m < NMB; m++) begin
      int cyc;
      bit b3 [], b2 [], b1 [];
      @(negedge clk); swap = 1; @(negedge clk); swap = 0; start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      fork
        if (m + 1 < NMB) load(m + 1);
        begin
          while (!done) begin @(negedge clk); cyc++; end
        end
      join
      checks++;
      if (cyc != LAT) begin failures++; $display("MB %0d latency %0d", m, cyc); end
      pyramid(blk[m], b3, b2, b1);
      for (int i = 0; i < 256; i++) begin checks++; if (bin3[i] != b3[i]) begin failures++; $display("MB%0d bin3[%0d]", m, i); end end
      for (int i = 0; i < 64; i++)  begin checks++; if (bin2[i] != b2[i]) begin failures++; $display("MB%0d bin2[%0d]", m, i); end end
      for (int i = 0; i < 16; i++)  begin checks++; if (bin1[i] != b1[i]) begin failures++; $display("MB%0d bin1[%0d]", m, i); end end
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          checks++;
          if (cur_mb[r][c] != blk[m][r+1][c+1]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
