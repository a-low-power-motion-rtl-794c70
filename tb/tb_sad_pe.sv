// tb_sad_pe: accumulates random rows, clearing every 16 rows, and compares
// with a software SAD; also checks that en low holds the sum.
module tb_sad_pe;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [15:0][7:0] a, b;
  logic [15:0] acc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sad_pe dut (.clk, .rst_n, .clr, .en, .a, .b, .acc);
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int exp;
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int blk = 0; blk < 50; blk++) begin
      exp = 0;
      for (int r = 0; r < 16; r++) begin
        @(negedge clk);
        en = 1; clr = (r == 0);
        for (int i = 0; i < 16; i++) begin
          a[i] = (blk == 0) ? 8'd255 : 8'($urandom);
          b[i] = (blk == 0) ? 8'd0 : 8'($urandom);
          exp += (a[i] > b[i]) ? int'(a[i]) - int'(b[i]) : int'(b[i]) - int'(a[i]);
        end
      end
      @(negedge clk); en = 0; a = '1;
      checks++;
      if (int'(acc) != exp) begin failures++; $display("blk %0d acc %0d exp %0d", blk, acc, exp); end
      @(negedge clk); checks++;
      if (int'(acc) != exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
