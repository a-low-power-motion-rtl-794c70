// tb_sod_pe: random 16x16 bit blocks; each 4x4, 8x8 and 16x16 SOD is counted
// bit by bit in the testbench.
module tb_sod_pe;
  logic [255:0]     cur, ref_blk;
  logic [15:0][4:0] sod4;
  logic [3:0][6:0]  sod8;
  logic [8:0]       sod16;
  int checks = 0, failures = 0;
  sod_pe dut (.cur, .ref_blk, .sod4, .sod8, .sod16);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 300; n++) begin
      int e4 [16];
      int e8 [4];
      int e16;
      for (int w = 0; w < 8; w++) begin cur[w*32 +: 32] = $urandom; ref_blk[w*32 +: 32] = $urandom; end
      if (n == 0) begin cur = '0; ref_blk = '1; end
      if (n == 1) begin cur = '0; ref_blk = '0; end
      #1;
      e16 = 0;
      for (int i = 0; i < 16; i++) e4[i] = 0;
      for (int i = 0; i < 4; i++) e8[i] = 0;
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++)
          if (cur[r*16+c] != ref_blk[r*16+c]) begin
            e4[(r/4)*4 + c/4]++;
            e8[(r/8)*2 + c/8]++;
            e16++;
          end
      for (int i = 0; i < 16; i++) begin checks++; if (int'(sod4[i]) != e4[i]) failures++; end
      for (int i = 0; i < 4; i++)  begin checks++; if (int'(sod8[i]) != e8[i]) failures++; end
      checks++;
      if (int'(sod16) != e16) begin failures++; $display("sod16 %0d exp %0d", sod16, e16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
