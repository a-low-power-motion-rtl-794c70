// tb_mv_determiner: three passes of three SADs; the kept minimum and its
// offset must match a software scan (first minimum wins).
module tb_mv_determiner;
  logic clk = 0, rst_n = 0, clr = 0, upd = 0;
  logic [2:0][15:0] sad;
  logic signed [1:0] hy, best_hx, best_hy;
  logic [15:0] best_sad;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mv_determiner dut (.clk, .rst_n, .clr, .upd, .sad, .hy, .best_sad, .best_hx, .best_hy);
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    sad = '0; hy = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      int eb, ex, ey;
      @(negedge clk); clr = 1; upd = 0;
      eb = 65535; ex = 0; ey = 0;
      for (int p = 0; p < 3; p++) begin
        @(negedge clk); clr = 0; upd = 1; hy = 2'(p - 1);
        for (int k = 0; k < 3; k++) begin
          sad[k] = 16'($urandom_range(0, (n % 2) ? 20 : 5000));
          if (int'(sad[k]) < eb) begin eb = sad[k]; ex = k - 1; ey = p - 1; end
        end
      end
      @(negedge clk); upd = 0;
      checks++;
      if (int'(best_sad) != eb || int'(best_hx) != ex || int'(best_hy) != ey) begin
        failures++; $display("got %0d (%0d,%0d) exp %0d (%0d,%0d)", best_sad, best_hx, best_hy, eb, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
