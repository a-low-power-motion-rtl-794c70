// tb_ppu_pe: random pixels and corner cases against the threshold rule
// TH = floor((B+C+D+E)/4), bin = A >= TH.
module tb_ppu_pe;
  logic [7:0] a, b, c, d, e, avg;
  logic       bin;
  int checks = 0, failures = 0;
  ppu_pe dut (.a, .b, .c, .d, .e, .bin, .avg);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      int th;
      {a, b, c, d, e} = {$urandom, $urandom} ;
      if (n == 0) {a, b, c, d, e} = {8'd4, 8'd4, 8'd4, 8'd4, 8'd4};
      if (n == 1) {a, b, c, d, e} = {8'd3, 8'd4, 8'd4, 8'd4, 8'd4};
      if (n == 2) {a, b, c, d, e} = {8'd255, 8'd255, 8'd255, 8'd255, 8'd255};
      #1;
      th = (int'(b) + int'(c) + int'(d) + int'(e)) / 4;
      checks++;
      if (avg != 8'(th) || bin != (int'(a) >= th)) begin
        failures++;
        $display("mismatch a=%0d th=%0d avg=%0d bin=%0d", a, th, avg, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
