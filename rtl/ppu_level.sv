// ppu_level: one level of the pre-processing unit (PPU). Rows of N 8-bit
// pixels arrive one per row_valid pulse and are written cyclically into a
// three-row register file; the row rotator presents the rows in image order.
// A row of N-2 PPU_PEs binarizes the middle row, so from the third row on each
// input row yields one binary row (columns 1..N-2 of the row before it).
// Every second input row (rows 2k and 2k+1 held) the level also emits N/2
// down-sampled pixels, the rounded mean of each 2x2 group, for the next level.
// Timing: outputs are valid (bin_valid / ds_valid high) for one cycle, the
// cycle after the row_valid that completed them. clr restarts the row count.
// Register file, rotator and PE row follow the document; the 2x2 mean used for
// down-sampling is this design's reading of "the averaged pixels".
// The first and last pixels of the top row are never read (a PE looks only at
// its four direct neighbours), so lint reports those bits of `top` unused.
module ppu_level #(
  parameter int N = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 row_valid,
  input  logic [N-1:0][7:0]    row_in,
  output logic                 bin_valid,
  output logic [N-3:0]         bin_row,
  output logic                 ds_valid,
  output logic [N/2-1:0][7:0]  ds_row
);
  logic [N*8-1:0] rf [3];
  logic [1:0]     wr_ptr;
  logic [5:0]     cnt;
  logic           fresh;
  logic [N*8-1:0] top_w, mid_w, bot_w;
  logic [N-1:0][7:0] top, mid, bot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= 2'd2;
      cnt    <= '0;
      fresh  <= 1'b0;
      for (int i = 0; i < 3; i++) rf[i] <= '0;
    end else if (clr) begin
      wr_ptr <= 2'd2;
      cnt    <= '0;
      fresh  <= 1'b0;
    end else begin
      fresh <= row_valid;
      if (row_valid) begin
        automatic logic [1:0] nxt;
        nxt = (wr_ptr == 2'd2) ? 2'd0 : wr_ptr + 2'd1;
        rf[nxt] <= row_in;
        wr_ptr  <= nxt;
        cnt     <= cnt + 6'd1;
      end
    end
  end

  row_rotator #(.W(N*8)) u_rot (
    .wr_ptr (wr_ptr), .rows_in(rf), .top(top_w), .mid(mid_w), .bot(bot_w)
  );
  assign top = top_w;
  assign mid = mid_w;
  assign bot = bot_w;

  for (genvar c = 1; c < N-1; c++) begin : g_pe
    logic [7:0] unused_avg;
    ppu_pe u_pe (
      .a(mid[c]), .b(top[c]), .c(mid[c-1]), .d(mid[c+1]), .e(bot[c]),
      .bin(bin_row[c-1]), .avg(unused_avg)
    );
  end

  always_comb begin
    for (int j = 0; j < N/2; j++) begin
      logic [9:0] s;
      s = 10'(mid[2*j]) + 10'(mid[2*j+1]) + 10'(bot[2*j]) + 10'(bot[2*j+1]) + 10'd2;
      ds_row[j] = 8'(s >> 2);
    end
  end

  assign bin_valid = fresh && (cnt >= 6'd3);
  assign ds_valid  = fresh && (cnt >= 6'd2) && !cnt[0];
endmodule
