// ime: integer-pel motion estimation with the parallel binary architecture.
// One start processes one macroblock:
//   1. mbppu turns the 18x18 8-bit block in its local memory into the LV3
//      (16x16), LV2 (8x8) and LV1 (4x4) binary blocks;
//   2. lv1_search: full search +-(SR/4-1) at quarter resolution;
//   3. lv2_search: five candidates (LV1 result scaled by 2; upper-right, upper
//      and left neighbour MVs halved; zero) with a three-arm +-1 cross;
//   4. lv3_search: +-2 full search around twice the LV2 result for the 16x16
//      block and its four 8x8 blocks together.
// The three search units take turns on the same two SOD PEs. In a B frame PE0
// serves the forward window and PE1 the backward one, so one read of the
// current block serves both directions. In a P frame the forward window is
// mirrored into the backward memories when it is written (sw_mirror) and both
// PEs split one search.
// Binary reference windows are written row by row through the sw_* port while
// the unit is idle: level 1 (4+2D)^2, level 2 (8+SR)^2, level 3
// (16+2(SR+2))^2 bits, row r in bits [W-1:0] of sw_data, bit c = column c.
// Outputs (full-pel units): 16x16 and 8x8 MVs and the LV3 search centre per
// direction, valid from the done pulse until the next start; in a P frame
// both directions carry the same result.
// Architecture and schedule follow the document; the window write port and
// sequential use of the PPU (not overlapped with the search) are this
// design's choices.
module ime
  import bbme_pkg::*;
#(
  parameter int SR = 16,
  parameter int W1 = 4 + 2*(SR/4 - 1),
  parameter int W2 = 8 + SR,
  parameter int W3 = 16 + 2*(SR + 2)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // current block fill port (ping-pong local memory of the PPU)
  input  logic                    cur_we,
  input  logic [5:0]              cur_addr,
  input  logic [8:0][7:0]         cur_data,
  input  logic                    cur_swap,
  // binary search window fill port
  input  logic                    sw_we,
  input  logic [1:0]              sw_level,   // 1, 2 or 3
  input  logic                    sw_dir,     // 0 forward, 1 backward
  input  logic                    sw_mirror,  // write both directions
  input  logic [5:0]              sw_row,
  input  logic [W3-1:0]           sw_data,
  // control
  input  logic                    start,
  input  logic                    bframe,
  input  mv_t                     pred_ur [2],
  input  mv_t                     pred_u  [2],
  input  mv_t                     pred_l  [2],
  output logic                    busy,
  output logic                    done,
  output mv_t                     mv16 [2],
  output mv_t                     mv8  [2][4],
  output mv_t                     center [2],
  output logic [8:0]              sod16 [2],
  output logic [15:0][15:0][7:0]  cur_mb
);
  typedef enum logic [2:0] {P_IDLE, P_PPU, P_LV1, P_LV2, P_LV3} ph_t;
  ph_t ph;

  // binary search window memories (LM_SW1/LM_SW2 of each level)
  logic [W1*W1-1:0] lm1 [2];
  logic [W2*W2-1:0] lm2 [2];
  logic [W3*W3-1:0] lm3 [2];

  always_ff @(posedge clk) begin
    if (sw_we) begin
      for (int d = 0; d < 2; d++) begin
        if (sw_mirror || (int'(sw_dir) == d)) begin
          unique case (sw_level)
            2'd1:    lm1[d][int'(sw_row)*W1 +: W1] <= sw_data[W1-1:0];
            2'd2:    lm2[d][int'(sw_row)*W2 +: W2] <= sw_data[W2-1:0];
            default: lm3[d][int'(sw_row)*W3 +: W3] <= sw_data;
          endcase
        end
      end
    end
  end

  // pre-processing
  logic         ppu_start, ppu_done, ppu_busy;
  logic [255:0] bin3;
  logic [63:0]  bin2;
  logic [15:0]  bin1;
  mbppu u_ppu (
    .clk, .rst_n, .wr_en(cur_we), .wr_addr(cur_addr), .wr_data(cur_data),
    .swap(cur_swap), .start(ppu_start), .busy(ppu_busy), .done(ppu_done),
    .bin3, .bin2, .bin1, .cur_mb
  );

  // shared SOD PEs
  logic [255:0]      pe_cur0, pe_cur1, pe_ref0, pe_ref1;
  logic [15:0][4:0]  s4_0, s4_1;
  logic [3:0][6:0]   s8_0, s8_1;
  logic [8:0]        s16_0, s16_1;
  sod_pe u_pe0 (.cur(pe_cur0), .ref_blk(pe_ref0), .sod4(s4_0), .sod8(s8_0), .sod16(s16_0));
  sod_pe u_pe1 (.cur(pe_cur1), .ref_blk(pe_ref1), .sod4(s4_1), .sod8(s8_1), .sod16(s16_1));

  // LV1
  logic         l1_start, l1_done, l1_busy;
  logic [255:0] l1_cur, l1_r0, l1_r1;
  mv_t          l1_mv0, l1_mv1;
  logic [4:0]   l1_s0, l1_s1;
  lv1_search #(.SR(SR)) u_lv1 (
    .clk, .rst_n, .start(l1_start), .bframe, .cur(bin1),
    .sw0(lm1[0]), .sw1(lm1[1]),
    .pe_cur(l1_cur), .pe_ref0(l1_r0), .pe_ref1(l1_r1),
    .pe_sod0(s4_0), .pe_sod1(s4_1),
    .busy(l1_busy), .done(l1_done), .mv0(l1_mv0), .mv1(l1_mv1),
    .sod0(l1_s0), .sod1(l1_s1)
  );

  // LV2 candidates in LV2 units
  mv_t cand0 [5];
  mv_t cand1 [5];
  always_comb begin
    cand0[0].x = l1_mv0.x <<< 1;     cand0[0].y = l1_mv0.y <<< 1;
    cand1[0].x = l1_mv1.x <<< 1;     cand1[0].y = l1_mv1.y <<< 1;
    cand0[1].x = pred_ur[0].x >>> 1; cand0[1].y = pred_ur[0].y >>> 1;
    cand1[1].x = pred_ur[1].x >>> 1; cand1[1].y = pred_ur[1].y >>> 1;
    cand0[2].x = pred_u[0].x >>> 1;  cand0[2].y = pred_u[0].y >>> 1;
    cand1[2].x = pred_u[1].x >>> 1;  cand1[2].y = pred_u[1].y >>> 1;
    cand0[3].x = pred_l[0].x >>> 1;  cand0[3].y = pred_l[0].y >>> 1;
    cand1[3].x = pred_l[1].x >>> 1;  cand1[3].y = pred_l[1].y >>> 1;
    cand0[4] = '0;
    cand1[4] = '0;
  end

  logic         l2_start, l2_done, l2_busy;
  logic [255:0] l2_cur, l2_r0, l2_r1;
  mv_t          l2_mv0, l2_mv1;
  logic [6:0]   l2_s0, l2_s1;
  lv2_search #(.SR(SR)) u_lv2 (
    .clk, .rst_n, .start(l2_start), .bframe, .cand0, .cand1, .cur(bin2),
    .sw0(lm2[0]), .sw1(lm2[1]),
    .pe_cur(l2_cur), .pe_ref0(l2_r0), .pe_ref1(l2_r1),
    .pe_sod0(s8_0), .pe_sod1(s8_1),
    .busy(l2_busy), .done(l2_done), .mv0(l2_mv0), .mv1(l2_mv1),
    .sod0(l2_s0), .sod1(l2_s1)
  );

  // LV3
  mv_t          c3_0, c3_1;
  logic         l3_start, l3_done, l3_busy;
  logic [255:0] l3_cur, l3_r0, l3_r1;
  logic [3:0][6:0] l3_s8_0, l3_s8_1;
  assign c3_0.x = l2_mv0.x <<< 1;  assign c3_0.y = l2_mv0.y <<< 1;
  assign c3_1.x = l2_mv1.x <<< 1;  assign c3_1.y = l2_mv1.y <<< 1;
  lv3_search #(.SR(SR)) u_lv3 (
    .clk, .rst_n, .start(l3_start), .bframe, .center0(c3_0), .center1(c3_1),
    .cur(bin3), .sw0(lm3[0]), .sw1(lm3[1]),
    .pe_cur(l3_cur), .pe_ref0(l3_r0), .pe_ref1(l3_r1),
    .pe_sod8_0(s8_0), .pe_sod8_1(s8_1), .pe_sod16_0(s16_0), .pe_sod16_1(s16_1),
    .busy(l3_busy), .done(l3_done),
    .mv16_0(mv16[0]), .mv16_1(mv16[1]), .mv8_0(mv8[0]), .mv8_1(mv8[1]),
    .sod16_0(sod16[0]), .sod16_1(sod16[1]), .sod8_0(l3_s8_0), .sod8_1(l3_s8_1),
    .cen0(center[0]), .cen1(center[1])
  );

  // PE sharing
  always_comb begin
    unique case (ph)
      P_LV1:   begin pe_cur0 = l1_cur; pe_ref0 = l1_r0; pe_ref1 = l1_r1; end
      P_LV2:   begin pe_cur0 = l2_cur; pe_ref0 = l2_r0; pe_ref1 = l2_r1; end
      default: begin pe_cur0 = l3_cur; pe_ref0 = l3_r0; pe_ref1 = l3_r1; end
    endcase
    pe_cur1 = pe_cur0;   // one current-block read serves both PEs
  end

  // phase sequencing
  assign ppu_start = (ph == P_IDLE) && start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= P_IDLE; l1_start <= 1'b0; l2_start <= 1'b0; l3_start <= 1'b0;
      done <= 1'b0;
    end else begin
      l1_start <= 1'b0; l2_start <= 1'b0; l3_start <= 1'b0; done <= 1'b0;
      unique case (ph)
        P_IDLE: if (start) ph <= P_PPU;
        P_PPU:  if (ppu_done) begin ph <= P_LV1; l1_start <= 1'b1; end
        P_LV1:  if (l1_done)  begin ph <= P_LV2; l2_start <= 1'b1; end
        P_LV2:  if (l2_done)  begin ph <= P_LV3; l3_start <= 1'b1; end
        P_LV3:  if (l3_done)  begin ph <= P_IDLE; done <= 1'b1; end
        default: ph <= P_IDLE;
      endcase
    end
  end

  assign busy = (ph != P_IDLE);
  logic unused;
  assign unused = ^{ppu_busy, l1_busy, l2_busy, l3_busy, l1_s0, l1_s1, l2_s0, l2_s1,
                    l3_s8_0, l3_s8_1, s4_0[15:14]};
endmodule
