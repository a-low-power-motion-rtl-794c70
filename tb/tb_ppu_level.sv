// tb_ppu_level: feeds random 10-pixel rows to an N=10 level and checks every
// binary row (threshold rule on the row before the last) and every
// down-sampled row (rounded 2x2 means) against the reference package, and the
// one-cycle output timing.
module tb_ppu_level;
  import bbme_ref_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, clr = 0, row_valid = 0;
  logic [N-1:0][7:0] row_in;
  logic bin_valid, ds_valid;
  logic [N-3:0] bin_row;
  logic [N/2-1:0][7:0] ds_row;
  int checks = 0, failures = 0;
  pix_t img [][];
  int nb, nd;
  always #5 clk = ~clk;
  ppu_level #(.N(N)) dut (.clk, .rst_n, .clr, .row_valid, .row_in, .bin_valid, .bin_row, .ds_valid, .ds_row);
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int rows;
    row_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 4; pass++) begin
      rows = (pass % 2) ? 10 : 6;
      img = new[rows];
      for (int r = 0; r < rows; r++) begin
        img[r] = new[N];
        for (int c = 0; c < N; c++) img[r][c] = pix_t'($urandom);
      end
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      nb = 0; nd = 0;
      for (int r = 0; r < rows; r++) begin
        @(negedge clk);
        row_valid = 1;
        for (int c = 0; c < N; c++) row_in[c] = img[r][c];
        @(negedge clk);
        row_valid = 0;
        // outputs belong to the row just written
        checks++;
        if (bin_valid != (r >= 2)) begin failures++; $display("bin_valid at row %0d", r); end
        if (r >= 2) begin
          for (int c = 1; c < N-1; c++) begin
            int th;
            th = (int'(img[r-2][c]) + int'(img[r-1][c-1]) + int'(img[r-1][c+1]) + int'(img[r][c])) / 4;
            checks++;
            if (bin_row[c-1] != (int'(img[r-1][c]) >= th)) begin failures++; $display("bin r%0d c%0d", r, c); end
          end
        end
        checks++;
        if (ds_valid != (r % 2 == 1)) begin failures++; $display("ds_valid at row %0d", r); end
        if (r % 2 == 1)
          for (int j = 0; j < N/2; j++) begin
            int e;
            e = (int'(img[r-1][2*j]) + int'(img[r-1][2*j+1]) + int'(img[r][2*j]) + int'(img[r][2*j+1]) + 2) / 4;
            checks++;
            if (int'(ds_row[j]) != e) begin failures++; $display("ds r%0d j%0d", r, j); end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
