// tb_pingpong_mem: fill one bank, swap, read it back while the other bank is
// being filled with different data, then swap again.
module tb_pingpong_mem;
  logic clk = 0, rst_n = 0, swap = 0, we = 0;
  logic [5:0]  waddr = 0, raddr = 0;
  logic [71:0] wdata = 0, rdata;
  logic [71:0] ref0 [36];
  logic [71:0] ref1 [36];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pingpong_mem #(.DW(72), .DEPTH(36)) dut (.clk, .rst_n, .swap, .we, .waddr, .wdata, .raddr, .rdata);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 36; i++) begin
      ref0[i] = {$urandom, $urandom, $urandom};
      ref1[i] = {$urandom, $urandom, $urandom};
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 36; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = ref0[i];
    end
    @(negedge clk); we = 0; swap = 1;
    @(negedge clk); swap = 0;
    for (int i = 0; i < 36; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = ref1[i]; raddr = 6'(35 - i);
      #1; checks++;
      if (rdata != ref0[35 - i]) begin failures++; $display("bank A word %0d", 35 - i); end
    end
    @(negedge clk); we = 0; swap = 1;
    @(negedge clk); swap = 0;
    for (int i = 0; i < 36; i++) begin
      @(negedge clk); raddr = 6'(i); #1; checks++;
      if (rdata != ref1[i]) begin failures++; $display("bank B word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
