// me_top: low-power bi-directional motion estimator. Three macroblock (MB)
// pipeline stages run side by side on consecutive MBs:
//   stage 1  ime       binary pyramid search, MB n
//   stage 2  sw_fetch  22x22 8-bit reference windows of MB n-1 into MD-SME
//   stage 3  md_sme    mode decision and half-pel search of MB n-2
// The pipeline steps when all three stages are idle: the IME result moves to
// stage 2, stage 2's parameters (and the filled bank of the MD-SME window
// memory) move to stage 3, and a new MB is accepted if one is offered. The
// stages are started one cycle after the step, from the moved registers.
// Host side:
//   * write the 18x18 block of the next MB (MB plus one-pixel border) into
//     the PPU ping-pong memory (cur_*), at any time: the step swaps the banks;
//   * while ime_idle, write that MB's binary reference windows (sw_*; for a
//     P frame with sw_mirror set);
//   * offer the MB with mb_valid and its parameters; mb_ready marks the step
//     that takes it. The pipeline waits for the next MB; with flush high
//     and mb_valid low it steps without one, draining the last MBs.
// External memory side: sw_fetch's request / 32-bit stream port.
// Results: the MB's residue streams out row by row (rsd_*, 16 cycles, with
// res_x/res_y already naming the MB), then res_valid pulses with its mode,
// half-pel MVs and costs.
// Stage contents and order follow the document's MB-level schedule; the
// all-idle step rule and the host protocol are this design's choices.
module me_top
  import bbme_pkg::*;
#(
  parameter int SR = 16,
  parameter int W3 = 16 + 2*(SR + 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // current block fill port
  input  logic                 cur_we,
  input  logic [5:0]           cur_addr,
  input  logic [8:0][7:0]      cur_data,
  // binary reference windows
  input  logic                 sw_we,
  input  logic [1:0]           sw_level,
  input  logic                 sw_dir,
  input  logic                 sw_mirror,
  input  logic [5:0]           sw_row,
  input  logic [W3-1:0]        sw_data,
  output logic                 ime_idle,
  // MB command
  input  logic                 mb_valid,
  input  logic                 flush,
  output logic                 mb_ready,
  input  logic                 mb_bframe,
  input  logic [11:0]          mb_x,
  input  logic [11:0]          mb_y,
  input  mv_t                  pred_ur [2],
  input  mv_t                  pred_u  [2],
  input  mv_t                  pred_l  [2],
  // external memory (reference frames, 8 bit)
  output logic                 req_valid,
  input  logic                 req_ready,
  output logic                 req_dir,
  output logic signed [13:0]   req_x,
  output logic signed [13:0]   req_y,
  input  logic                 bus_valid,
  input  logic [31:0]          bus_data,
  // results
  output logic                 res_valid,
  output logic [11:0]          res_x,
  output logic [11:0]          res_y,
  output logic                 res_bframe,
  output logic                 res_inter,
  output logic                 res_mode8,
  output mv_t                  res_hmv16 [2],
  output mv_t                  res_hmv8 [4],
  output mv_t                  res_imv16 [2],
  output logic [15:0]          res_intra_cost,
  output logic [15:0]          res_inter_cost_a,
  output logic [15:0]          res_inter_cost_b,
  // residue of the decided mode, one row per cycle before res_valid
  output logic                 rsd_valid,
  output logic [3:0]           rsd_row,
  output logic signed [15:0][8:0] rsd_data
);
  // ---------------- stage registers ---------------------------------------
  logic        v1, v2, v3, go;
  logic        bf1, bf2, bf3;
  logic [11:0] x1, y1, x2, y2, x3, y3;
  mv_t         pur [2];
  mv_t         pu  [2];
  mv_t         pl  [2];
  mv_t         mv16_2 [2];
  mv_t         mv8_2 [4];
  mv_t         cen_2 [2];
  mv_t         mv16_3 [2];
  logic [15:0][15:0][7:0] cur_2;

  // ---------------- stage 1: IME ------------------------------------------
  logic        ime_busy, ime_done, step;
  mv_t         i_mv16 [2];
  mv_t         i_mv8 [2][4];
  mv_t         i_cen [2];
  logic [8:0]  i_sod16 [2];
  logic [15:0][15:0][7:0] i_cur;

  ime #(.SR(SR)) u_ime (
    .clk, .rst_n, .cur_we, .cur_addr, .cur_data, .cur_swap(step && mb_valid),
    .sw_we, .sw_level, .sw_dir, .sw_mirror, .sw_row, .sw_data,
    .start(go && v1), .bframe(bf1), .pred_ur(pur), .pred_u(pu), .pred_l(pl),
    .busy(ime_busy), .done(ime_done), .mv16(i_mv16), .mv8(i_mv8),
    .center(i_cen), .sod16(i_sod16), .cur_mb(i_cur)
  );

  // ---------------- stage 2: transmission ---------------------------------
  logic        sf_busy, sf_done, lm_we, lm_dir;
  logic [6:0]  lm_addr;
  logic [31:0] lm_data;
  sw_fetch u_fetch (
    .clk, .rst_n, .start(go && v2), .bframe(bf2), .mb_x(x2), .mb_y(y2),
    .center(cen_2), .req_valid, .req_ready, .req_dir, .req_x, .req_y,
    .bus_valid, .bus_data, .lm_we, .lm_dir, .lm_addr, .lm_data,
    .busy(sf_busy), .done(sf_done)
  );

  // ---------------- stage 3: MD-SME ---------------------------------------
  logic        md_busy, md_done;
  logic [15:0][15:0][7:0] cur_3;
  mv_t         mv8_3 [4];
  mv_t         cen_3 [2];
  md_sme u_md (
    .clk, .rst_n, .sw_we(lm_we), .sw_dir(lm_dir), .sw_addr(lm_addr),
    .sw_data(lm_data), .sw_swap(step), .start(go && v3), .bframe(bf3),
    .cur_mb(cur_3), .mv16(mv16_3), .mv8(mv8_3), .center(cen_3),
    .busy(md_busy), .done(md_done), .inter(res_inter), .mode8(res_mode8),
    .hmv16(res_hmv16), .hmv8(res_hmv8), .intra_cost(res_intra_cost),
    .inter_cost_a(res_inter_cost_a), .inter_cost_b(res_inter_cost_b),
    .res_valid(rsd_valid), .res_row(rsd_row), .res_data(rsd_data)
  );

  // ---------------- pipeline control --------------------------------------
  assign step     = !go && !ime_busy && !sf_busy && !md_busy && (mb_valid || (flush && (v1 || v2)));
  assign mb_ready = step;
  assign ime_idle = !ime_busy && !(go && v1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; go <= 1'b0;
      bf1 <= 1'b0; bf2 <= 1'b0; bf3 <= 1'b0;
      x1 <= '0; y1 <= '0; x2 <= '0; y2 <= '0; x3 <= '0; y3 <= '0;
      cur_2 <= '0; cur_3 <= '0;
      for (int d = 0; d < 2; d++) begin
        pur[d] <= '0; pu[d] <= '0; pl[d] <= '0;
        mv16_2[d] <= '0; cen_2[d] <= '0; mv16_3[d] <= '0; cen_3[d] <= '0;
      end
      for (int b = 0; b < 4; b++) begin mv8_2[b] <= '0; mv8_3[b] <= '0; end
    end else begin
      go <= step;
      if (step) begin
        // stage 2 -> 3
        v3 <= v2; bf3 <= bf2; x3 <= x2; y3 <= y2; cur_3 <= cur_2;
        mv16_3 <= mv16_2; mv8_3 <= mv8_2; cen_3 <= cen_2;
        // stage 1 -> 2
        v2 <= v1; bf2 <= bf1; x2 <= x1; y2 <= y1; cur_2 <= i_cur;
        mv16_2 <= i_mv16; mv8_2 <= i_mv8[0]; cen_2 <= i_cen;
        // new MB -> 1
        v1 <= mb_valid; bf1 <= mb_bframe; x1 <= mb_x; y1 <= mb_y;
        pur <= pred_ur; pu <= pred_u; pl <= pred_l;
      end
    end
  end

  assign res_valid  = md_done;
  assign res_x      = x3;
  assign res_y      = y3;
  assign res_bframe = bf3;
  assign res_imv16  = mv16_3;

  logic unused;
  assign unused = ^{ime_done, sf_done, i_sod16[0], i_sod16[1], i_mv8[1][0], i_mv8[1][1],
                    i_mv8[1][2], i_mv8[1][3]};
endmodule
