// tb_sw_fetch: transmission stage against a memory model that answers each
// request after a random delay and streams 121 words with random gaps. The
// requested window origin (MB position + centre - 3), the word count, the
// local-memory write addresses and data, one window per P frame and two per
// B frame, and the done pulse are checked.
module tb_sw_fetch;
  import bbme_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, bframe = 0;
  logic [11:0] mb_x, mb_y;
  mv_t center [2];
  logic req_valid, req_ready = 0, req_dir, bus_valid = 0;
  logic signed [13:0] req_x, req_y;
  logic [31:0] bus_data = 0;
  logic lm_we, lm_dir, busy, done;
  logic [6:0] lm_addr;
  logic [31:0] lm_data;
  int checks = 0, failures = 0;
  int nreq = 0, nwr = 0;
  int cur_dir, cur_x, cur_y;
  always #5 clk = ~clk;
  sw_fetch dut (.clk, .rst_n, .start, .bframe, .mb_x, .mb_y, .center, .req_valid, .req_ready, .req_dir,
    .req_x, .req_y, .bus_valid, .bus_data, .lm_we, .lm_dir, .lm_addr, .lm_data, .busy, .done);
  initial begin
    #5000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [31:0] word(input int d, input int x, input int y, input int k);
    return 32'(d * 1000003 + x * 7919 + y * 104729 + k * 2654435);
  endfunction
  // memory model
  initial begin
    forever begin
      @(negedge clk);
      if (req_valid) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        req_ready = 1;
        cur_dir = int'(req_dir); cur_x = int'(req_x); cur_y = int'(req_y);
        nreq++;
        @(negedge clk); req_ready = 0;
        for (int k = 0; k < 121; k++) begin
          while ($urandom_range(0, 3) == 0) begin bus_valid = 0; @(negedge clk); end
          bus_valid = 1; bus_data = word(cur_dir, cur_x, cur_y, k);
          @(negedge clk);
        end
        bus_valid = 0;
      end
    end
  end
  // write monitor
  always @(posedge clk) if (rst_n && lm_we) begin
    checks++;
    if (int'(lm_dir) != cur_dir || int'(lm_addr) != nwr % 121 || lm_data != word(cur_dir, cur_x, cur_y, nwr % 121)) begin
      failures++; $display("write %0d: dir %0d addr %0d", nwr, lm_dir, lm_addr);
    end
    nwr++;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 10; n++) begin
      int cyc;
      bframe = n % 2;
      mb_x = 12'(16 * $urandom_range(1, 20)); mb_y = 12'(16 * $urandom_range(1, 16));
      for (int d = 0; d < 2; d++) begin
        center[d].x = 8'($urandom_range(0, 32)) - 8'sd16; center[d].y = 8'($urandom_range(0, 32)) - 8'sd16;
      end
      nreq = 0; nwr = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      fork
        begin
          for (int d = 0; d < (bframe ? 2 : 1); d++) begin
            while (!(req_valid && req_ready)) @(posedge clk);
            checks++;
            if (int'(req_dir) != d || int'(req_x) != int'(mb_x) + int'(center[d].x) - 3 ||
                int'(req_y) != int'(mb_y) + int'(center[d].y) - 3) begin
              failures++; $display("request %0d: dir %0d (%0d,%0d)", d, req_dir, req_x, req_y);
            end
            while (req_ready) @(posedge clk);
          end
        end
        while (!done) begin @(negedge clk); cyc++; end
      join
      checks++;
      if (nreq != (bframe ? 2 : 1) || nwr != (bframe ? 242 : 121)) begin
        failures++; $display("n%0d: %0d requests, %0d writes", n, nreq, nwr);
      end
      checks++;
      if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
