// md_sme: merged mode decision and half-pel motion estimation.
// Mode decision pass (16 cycles, one row per cycle on three SAD PEs):
//   PE0  line-based intra cost: |c(i,j) - mean of row j|, mean from avg_pe;
//   PE1  forward 16x16 SAD at the integer 16x16 MV;
//   PE2  P frame: the four 8x8 SADs at their own integer MVs (two rows per
//        cycle, four cycles per block); B frame: backward 16x16 SAD.
// mode_determiner picks inter when an inter cost is below the intra cost.
// Sub-pel search (inter only): +-1 half pel around each integer MV. The three
// SAD PEs take the three horizontal offsets of one vertical offset at once,
// fed by interp_pe instances that interpolate from the integer rows on the
// fly; a 16x16 block takes 3 passes of 16 cycles, an 8x8 block 3 passes of 4
// cycles (two rows per cycle). P frame: 16x16 forward then the four 8x8
// blocks, and the 8x8 partition is kept when the sum of its four SADs is
// below the 16x16 SAD. B frame: 16x16 forward then 16x16 backward.
// Reference data: a ping-pong local memory per direction of 22x22 pixels
// centred on the LV3 search centre (window pixel (3,3) is integer MV =
// centre), filled by the transmission stage 4 pixels per word in raster order
// (pixel 4*addr+k in byte k) while the other bank is read; sw_swap exchanges
// the banks. Inputs are sampled at start; outputs (half-pel MVs relative to
// the MB, twice the full-pel value plus the offset) are valid from done until
// the next start.
// Residue (last step of the flow): after the decision the block streams the
// MB's residue, one row of 16 signed 9-bit values per cycle for 16 cycles
// (res_valid, res_row, res_data), then pulses done. Inter: pixel minus the
// half-pel prediction of the chosen partition (P: 16x16 or the four 8x8
// blocks; B: the direction with the lower half-pel SAD, forward on a tie).
// Intra: the pixels themselves, as MPEG-4 intra coding has no pixel-domain
// prediction. Cycles start to done: intra 34, inter 132 (P and B).
// Structure, PE allocation and pass order follow the document; the cost
// compared for 8x8 against 16x16 (plain SAD sums), the residue row format
// and the B-frame direction rule for the residue are this design's choices.
module md_sme
  import bbme_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sw_we,
  input  logic                    sw_dir,
  input  logic [6:0]              sw_addr,
  input  logic [3:0][7:0]         sw_data,
  input  logic                    sw_swap,
  input  logic                    start,
  input  logic                    bframe,
  input  logic [15:0][15:0][7:0]  cur_mb,
  input  mv_t                     mv16 [2],
  input  mv_t                     mv8  [4],
  input  mv_t                     center [2],
  output logic                    busy,
  output logic                    done,
  output logic                    inter,
  output logic                    mode8,
  output mv_t                     hmv16 [2],
  output mv_t                     hmv8 [4],
  output logic [15:0]             intra_cost,
  output logic [15:0]             inter_cost_a,
  output logic [15:0]             inter_cost_b,
  output logic                    res_valid,
  output logic [3:0]              res_row,
  output logic signed [15:0][8:0] res_data
);
  typedef enum logic [2:0] {S_IDLE, S_MD, S_MDX, S_SME, S_TAIL, S_DEC, S_RES} st_t;
  st_t st;

  // ---------------- local memories (LM_SW1_SAD / LM_SW2_SAD) -------------
  logic [7:0] lm [2][2][SSW*SSW];     // [bank][dir][pixel]
  logic       fill;                   // bank being filled
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       fill <= 1'b0;
    else if (sw_swap) fill <= ~fill;
  end
  always_ff @(posedge clk) begin
    if (sw_we)
      for (int k = 0; k < 4; k++)
        if (int'(sw_addr)*4 + k < SSW*SSW)
          lm[fill][sw_dir][int'(sw_addr)*4 + k] <= sw_data[k];
  end

  function automatic logic [7:0] px(input logic d, input int r, input int c);
    if (r < 0 || r >= SSW || c < 0 || c >= SSW) return 8'd0;
    return lm[~fill][d][r*SSW + c];
  endfunction

  // ---------------- sampled inputs ----------------------------------------
  logic [15:0][15:0][7:0] cur;
  logic                   bf;
  int                     o16x [2], o16y [2], o8x [4], o8y [4];
  mv_t                    m16 [2];
  mv_t                    m8 [4];

  // ---------------- sequencing --------------------------------------------
  logic [3:0] j;          // row step inside a pass
  logic [2:0] blk;        // 0: 16x16 fwd, 1: 16x16 bwd, 2..5: 8x8 blocks
  logic [1:0] hyi;        // vertical offset index, hy = hyi - 1
  logic       upd_q;      // a pass ended last cycle
  logic [2:0] upd_blk;
  logic [1:0] upd_hyi;
  logic       is8;
  logic [3:0] plen;
  assign is8  = (blk >= 3'd2);
  assign plen = is8 ? 4'd3 : 4'd15;

  // ---------------- datapath ----------------------------------------------
  logic [15:0][7:0]      pa [3];
  logic [15:0][7:0]      pb [3];
  logic [15:0]           acc [3];
  logic                  pe_en, pe_clr;
  logic [7:0]            mean;
  logic [2:0][17:0][7:0] irows [2];
  logic [15:0][7:0]      ipix [3][2];

  avg_pe u_avg (.row(cur[j]), .mean);

  for (genvar k = 0; k < 3; k++) begin : g_sad
    sad_pe u_sad (.clk, .rst_n, .clr(pe_clr), .en(pe_en), .a(pa[k]), .b(pb[k]), .acc(acc[k]));
    for (genvar g = 0; g < 2; g++) begin : g_int
      interp_pe u_int (.rows(irows[g]), .hx(2'(k - 1)), .hy(2'(int'(hyi) - 1)), .pix(ipix[k][g]));
    end
  end

  // block geometry of the current step
  int   ox, oy, bx, by, r0;
  logic dsel;
  always_comb begin
    dsel = (blk == 3'd1);
    bx = 0; by = 0;
    if (is8) begin
      bx = 8 * ((int'(blk) - 2) % 2);
      by = 8 * ((int'(blk) - 2) / 2);
      ox = o8x[int'(blk) - 2];
      oy = o8y[int'(blk) - 2];
    end else begin
      ox = dsel ? o16x[1] : o16x[0];
      oy = dsel ? o16y[1] : o16y[0];
    end
    r0 = is8 ? by + 2 * int'(j) : int'(j);
    // integer rows around the block row(s) of this step, for interpolation
    for (int g = 0; g < 2; g++)
      for (int t = 0; t < 3; t++)
        for (int c = 0; c < 18; c++)
          irows[g][t][c] = px(dsel, oy + r0 + g + t - 1, ox + bx + c - 1);
  end

  always_comb begin
    int b8, rr;
    pe_en  = (st == S_MD) || (st == S_SME);
    pe_clr = (j == 4'd0);
    b8 = int'(j) / 4;
    rr = 8 * (b8 / 2) + 2 * (int'(j) % 4);
    for (int k = 0; k < 3; k++) begin pa[k] = '0; pb[k] = '0; end
    if (st == S_MD) begin
      // intra: row j against its own mean
      pa[0] = cur[j];
      for (int i = 0; i < 16; i++) pb[0][i] = mean;
      // forward 16x16 at the integer MV
      pa[1] = cur[j];
      for (int i = 0; i < 16; i++) pb[1][i] = px(1'b0, o16y[0] + int'(j), o16x[0] + i);
      if (bf) begin
        pa[2] = cur[j];
        for (int i = 0; i < 16; i++) pb[2][i] = px(1'b1, o16y[1] + int'(j), o16x[1] + i);
      end else begin
        for (int h = 0; h < 2; h++)
          for (int i = 0; i < 8; i++) begin
            pa[2][8*h + i] = cur[rr + h][8 * (b8 % 2) + i];
            pb[2][8*h + i] = px(1'b0, o8y[b8] + rr + h, o8x[b8] + 8 * (b8 % 2) + i);
          end
      end
    end else begin
      for (int k = 0; k < 3; k++) begin
        if (is8) begin
          for (int h = 0; h < 2; h++)
            for (int i = 0; i < 8; i++) begin
              pa[k][8*h + i] = cur[r0 + h][bx + i];
              pb[k][8*h + i] = ipix[k][h][i];
            end
        end else begin
          pa[k] = cur[r0];
          pb[k] = ipix[k][0];
        end
      end
    end
  end

  // ---------------- MV determiners (one per block) ------------------------
  logic [15:0]       bsad [6];
  logic signed [1:0] bhx [6];
  logic signed [1:0] bhy [6];
  for (genvar b = 0; b < 6; b++) begin : g_det
    mv_determiner u_det (
      .clk, .rst_n, .clr(start && st == S_IDLE),
      .upd(upd_q && int'(upd_blk) == b),
      .sad({acc[2], acc[1], acc[0]}), .hy(2'(int'(upd_hyi) - 1)),
      .best_sad(bsad[b]), .best_hx(bhx[b]), .best_hy(bhy[b])
    );
  end

  // ---------------- residue of the decided mode ---------------------------
  // Row j of the MB minus its prediction: left and right halves have their
  // own interpolator so the four 8x8 vectors of 8x8 mode can differ.
  logic                   rdir;                 // B frame: direction used
  logic [2:0][17:0][7:0]  rrows [2];
  logic [15:0][7:0]       rpix [2];
  logic signed [1:0]      rhx [2];
  logic signed [1:0]      rhy [2];
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      int q, rx, ry;
      logic d;
      q  = (int'(j) / 8) * 2 + h;
      d  = mode8 ? 1'b0 : rdir;
      rx = mode8 ? o8x[q] : o16x[d];
      ry = mode8 ? o8y[q] : o16y[d];
      rhx[h] = mode8 ? bhx[q + 2] : bhx[int'(d)];
      rhy[h] = mode8 ? bhy[q + 2] : bhy[int'(d)];
      for (int t = 0; t < 3; t++)
        for (int c = 0; c < 18; c++)
          rrows[h][t][c] = px(d, ry + int'(j) + t - 1, rx + c - 1);
    end
  end
  for (genvar h = 0; h < 2; h++) begin : g_res
    interp_pe u_int (.rows(rrows[h]), .hx(rhx[h]), .hy(rhy[h]), .pix(rpix[h]));
  end
  assign res_valid = (st == S_RES);
  assign res_row   = j;
  always_comb begin
    for (int i = 0; i < 16; i++)
      res_data[i] = inter ? 9'(cur[j][i]) - 9'(rpix[i / 8][i]) : 9'(cur[j][i]);
  end

  logic md_inter;
  mode_determiner u_mode (
    .intra_cost(acc[0]), .inter_a(acc[1]), .inter_b(acc[2]), .inter(md_inter)
  );

  function automatic mv_t half(input mv_t m, input logic signed [1:0] hx,
                               input logic signed [1:0] hy);
    mv_t r;
    r.x = (m.x <<< 1) + 8'(hx);
    r.y = (m.y <<< 1) + 8'(hy);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; j <= '0; blk <= '0; hyi <= '0; upd_q <= 1'b0;
      upd_blk <= '0; upd_hyi <= '0; done <= 1'b0; inter <= 1'b0; mode8 <= 1'b0;
      cur <= '0; bf <= 1'b0; rdir <= 1'b0;
      intra_cost <= '0; inter_cost_a <= '0; inter_cost_b <= '0;
      for (int d = 0; d < 2; d++) begin
        o16x[d] <= 3; o16y[d] <= 3; m16[d] <= '0; hmv16[d] <= '0;
      end
      for (int b = 0; b < 4; b++) begin
        o8x[b] <= 3; o8y[b] <= 3; m8[b] <= '0; hmv8[b] <= '0;
      end
    end else begin
      done  <= 1'b0;
      upd_q <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_MD; j <= '0; bf <= bframe; cur <= cur_mb; rdir <= 1'b0;
          for (int d = 0; d < 2; d++) begin
            m16[d]  <= mv16[d];
            o16x[d] <= 3 + int'(mv16[d].x) - int'(center[d].x);
            o16y[d] <= 3 + int'(mv16[d].y) - int'(center[d].y);
          end
          for (int b = 0; b < 4; b++) begin
            m8[b]  <= mv8[b];
            o8x[b] <= 3 + int'(mv8[b].x) - int'(center[0].x);
            o8y[b] <= 3 + int'(mv8[b].y) - int'(center[0].y);
          end
        end
        S_MD: begin
          j <= j + 4'd1;
          if (j == 4'd15) st <= S_MDX;
        end
        S_MDX: begin
          intra_cost   <= acc[0];
          inter_cost_a <= acc[1];
          inter_cost_b <= acc[2];
          inter        <= md_inter;
          mode8        <= 1'b0;
          j <= '0;
          if (md_inter) begin
            st <= S_SME; blk <= '0; hyi <= '0;
          end else begin
            st <= S_RES;
          end
        end
        S_SME: begin
          j <= j + 4'd1;
          if (j == plen) begin
            j       <= '0;
            upd_q   <= 1'b1;
            upd_blk <= blk;
            upd_hyi <= hyi;
            hyi     <= hyi + 2'd1;
            if (hyi == 2'd2) begin
              hyi <= '0;
              if (bf ? (blk == 3'd1) : (blk == 3'd5)) st <= S_TAIL;
              else blk <= bf ? 3'd1 : ((blk == 3'd0) ? 3'd2 : blk + 3'd1);
            end
          end
        end
        S_TAIL: st <= S_DEC;
        S_DEC: begin
          automatic logic [17:0] s8;

          st   <= S_RES;
          j    <= '0;
          rdir <= bf && (bsad[1] < bsad[0]);
          s8 = 18'(bsad[2]) + 18'(bsad[3]) + 18'(bsad[4]) + 18'(bsad[5]);
          mode8 <= !bf && (s8 < 18'(bsad[0]));
          hmv16[0] <= half(m16[0], bhx[0], bhy[0]);
          hmv16[1] <= bf ? half(m16[1], bhx[1], bhy[1]) : half(m16[0], bhx[0], bhy[0]);
          for (int b = 0; b < 4; b++)
            hmv8[b] <= bf ? half(m16[0], bhx[0], bhy[0]) : half(m8[b], bhx[b+2], bhy[b+2]);
        end
        S_RES: begin
          j <= j + 4'd1;
          if (j == 4'd15) begin st <= S_IDLE; done <= 1'b1; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
