// tb_mode_determiner: inter exactly when one inter cost is below the intra cost.
module tb_mode_determiner;
  logic [15:0] intra_cost, inter_a, inter_b;
  logic        inter;
  int checks = 0, failures = 0;
  mode_determiner dut (.intra_cost, .inter_a, .inter_b, .inter);
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      intra_cost = 16'($urandom_range(0, 300));
      inter_a = 16'($urandom_range(0, 300));
      inter_b = 16'($urandom_range(0, 300));
      if (n == 0) begin intra_cost = 10; inter_a = 10; inter_b = 10; end
      if (n == 1) begin intra_cost = 10; inter_a = 11; inter_b = 9; end
      #1; checks++;
      if (inter != ((int'(inter_a) < int'(intra_cost)) || (int'(inter_b) < int'(intra_cost)))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
