// tb_row_rotator: for each write pointer the most recent slot must come out as
// the bottom row, the one before as middle and the oldest as top.
module tb_row_rotator;
  logic [1:0]  wr_ptr;
  logic [7:0]  rows_in [3];
  logic [7:0]  top, mid, bot;
  int checks = 0, failures = 0;
  row_rotator #(.W(8)) dut (.wr_ptr, .rows_in, .top, .mid, .bot);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 300; n++) begin
      int p;
      for (int i = 0; i < 3; i++) rows_in[i] = 8'($urandom);
      p = n % 3;
      wr_ptr = 2'(p);
      #1;
      checks++;
      if (bot != rows_in[p] || mid != rows_in[(p+2)%3] || top != rows_in[(p+1)%3]) begin
        failures++;
        $display("ptr=%0d wrong order", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
