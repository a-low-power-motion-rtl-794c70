// mbppu: macroblock-based pre-processing unit. Builds the three-level binary
// pyramid of one macroblock (MB) from an 18x18 8-bit block: the 16x16 MB plus
// a one-pixel border.
//  * The block is written into a ping-pong local memory, nine pixels per word,
//    two words per row (word 2r = pixels 0..8 of row r, 2r+1 = pixels 9..17),
//    while the previous MB is processed from the other bank.
//  * LV3: the rows are read half a row per cycle into an N=18 ppu_level, which
//    gives the 16x16 LV3 binary MB and a 9x9 down-sampled block.
//  * Self-padding: the 9x9 block is mirrored by one pixel on the top and left
//    (padded row -1 = row 1) to 10x10 and run through an N=10 level: 8x8 LV2
//    binary block and 5x5 down-sampled block; this is padded to 6x6 the same
//    way and an N=6 level gives the 4x4 LV1 binary block.
// Binary blocks are raster ordered, bit r*W+c. cur_mb is the inner 16x16
// 8-bit MB, kept for the sub-pel stage. start is accepted when idle; done
// pulses for one cycle, 56 cycles later, with all outputs valid until the
// next start.
// The 18x18 block, the mirroring self-padding, the three levels and the
// ping-pong buffer follow the document. The pad side and the sequential
// (not overlapped) LV2/LV1 passes are this design's choices.
module mbppu (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [5:0]               wr_addr,
  input  logic [8:0][7:0]          wr_data,
  input  logic                     swap,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic [255:0]             bin3,
  output logic [63:0]              bin2,
  output logic [15:0]              bin1,
  output logic [15:0][15:0][7:0]   cur_mb
);
  typedef enum logic [2:0] {S_IDLE, S_LV3, S_W3, S_LV2, S_W2, S_LV1, S_W1} st_t;
  st_t st;

  logic              rd_half;        // second half of the current row
  logic [5:0]        rd_addr;
  logic [8:0][7:0]   rd_data;
  logic [8:0][7:0]   half;
  logic [4:0]        rcnt;           // rows fed to the active level
  logic [4:0]        b3n, b2n, b1n;  // binary rows collected
  logic [3:0]        d3n, d2n;       // down-sampled rows collected
  logic [8:0][8:0][7:0] ds9;
  logic [4:0][4:0][7:0] ds5;

  pingpong_mem #(.DW(72), .DEPTH(36)) u_lm (
    .clk, .rst_n, .swap, .we(wr_en), .waddr(wr_addr), .wdata(wr_data),
    .raddr(rd_addr), .rdata(rd_data)
  );

  // Level 3
  logic              v3;
  logic [17:0][7:0]  row3;
  logic              bv3, dv3;
  logic [15:0]       br3;
  logic [8:0][7:0]   dr3;
  ppu_level #(.N(18)) u_lv3 (
    .clk, .rst_n, .clr(start), .row_valid(v3), .row_in(row3),
    .bin_valid(bv3), .bin_row(br3), .ds_valid(dv3), .ds_row(dr3)
  );

  // Level 2 on the self-padded 10x10 block
  logic              v2;
  logic [9:0][7:0]   row2;
  logic              bv2, dv2;
  logic [7:0]        br2;
  logic [4:0][7:0]   dr2;
  ppu_level #(.N(10)) u_lv2 (
    .clk, .rst_n, .clr(start), .row_valid(v2), .row_in(row2),
    .bin_valid(bv2), .bin_row(br2), .ds_valid(dv2), .ds_row(dr2)
  );

  // Level 1 on the self-padded 6x6 block
  logic              v1;
  logic [5:0][7:0]   row1;
  logic              bv1, dv1;
  logic [3:0]        br1;
  logic [2:0][7:0]   dr1;
  ppu_level #(.N(6)) u_lv1 (
    .clk, .rst_n, .clr(start), .row_valid(v1), .row_in(row1),
    .bin_valid(bv1), .bin_row(br1), .ds_valid(dv1), .ds_row(dr1)
  );

  // Source row index of padded row i: row -1 mirrors row 1.
  function automatic int unsigned src(input logic [4:0] i);
    return (i == 5'd0) ? 1 : int'(i) - 1;
  endfunction

  always_comb begin
    rd_addr = 6'(rcnt * 2) + 6'(rd_half);
    v3   = (st == S_LV3) && rd_half;
    row3 = {rd_data, half};
    v2   = (st == S_LV2);
    v1   = (st == S_LV1);
    for (int c = 0; c < 10; c++) row2[c] = ds9[src(rcnt)][src(5'(c))];
    for (int c = 0; c < 6; c++)  row1[c] = ds5[src(rcnt)][src(5'(c))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; rd_half <= 1'b0; rcnt <= '0; half <= '0;
      b3n <= '0; b2n <= '0; b1n <= '0; d3n <= '0; d2n <= '0;
      ds9 <= '0; ds5 <= '0; bin3 <= '0; bin2 <= '0; bin1 <= '0; cur_mb <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      // collect level outputs
      if (bv3) begin bin3[b3n*16 +: 16] <= br3; b3n <= b3n + 5'd1; end
      if (dv3) begin ds9[d3n] <= dr3; d3n <= d3n + 4'd1; end
      if (bv2) begin bin2[b2n*8 +: 8] <= br2; b2n <= b2n + 5'd1; end
      if (dv2) begin ds5[d2n] <= dr2; d2n <= d2n + 4'd1; end
      if (bv1) begin bin1[b1n*4 +: 4] <= br1; b1n <= b1n + 5'd1; end
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_LV3; rcnt <= '0; rd_half <= 1'b0;
          b3n <= '0; b2n <= '0; b1n <= '0; d3n <= '0; d2n <= '0;
        end
        S_LV3: begin
          rd_half <= ~rd_half;
          if (!rd_half) half <= rd_data;
          else begin
            if (rcnt >= 5'd1 && rcnt <= 5'd16)
              for (int c = 0; c < 16; c++) cur_mb[rcnt-1][c] <= row3[c+1];
            rcnt <= rcnt + 5'd1;
            if (rcnt == 5'd17) st <= S_W3;
          end
        end
        S_W3:  begin st <= S_LV2; rcnt <= '0; end
        S_LV2: begin
          rcnt <= rcnt + 5'd1;
          if (rcnt == 5'd9) st <= S_W2;
        end
        S_W2:  begin st <= S_LV1; rcnt <= '0; end
        S_LV1: begin
          rcnt <= rcnt + 5'd1;
          if (rcnt == 5'd5) st <= S_W1;
        end
        S_W1:  begin st <= S_IDLE; done <= 1'b1; end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
  logic unused_ds1;
  assign unused_ds1 = ^{dv1, dr1};
endmodule
