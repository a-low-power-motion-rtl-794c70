// tb_avg_pe: row mean = floor(sum / 16) for random and extreme rows.
module tb_avg_pe;
  logic [15:0][7:0] row;
  logic [7:0]       mean;
  int checks = 0, failures = 0;
  avg_pe dut (.row, .mean);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 1000; n++) begin
      int s;
      s = 0;
      for (int i = 0; i < 16; i++) begin
        row[i] = (n == 0) ? 8'd255 : (n == 1) ? 8'(i) : 8'($urandom);
        s += int'(row[i]);
      end
      #1; checks++;
      if (int'(mean) != s / 16) begin failures++; $display("mean %0d exp %0d", mean, s/16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
