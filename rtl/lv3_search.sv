// lv3_search: level-3 search unit. +-2 full search around the centre found at
// LV2 (in full-pel units) for the 16x16 block and its four 8x8 blocks at once:
// every position gives one 16x16 SOD and four 8x8 SODs from the same shared
// SOD PE, and five minima are kept per direction.
// The reference area is a 20x20 bit circular shift register per direction,
// loaded two rows per cycle (ten cycles) from the (16+2(SR+2))-bit square
// window (bit row*W+col; position (SR+2,SR+2) is the co-located block). The
// PE always reads a fixed 16x16 corner of the register; the register is
// rotated instead of multiplexed:
//   window 0: reads the top-left corner, starts at (-2,-2) and walks a snake:
//             left shifts along even rows, right shifts along odd rows, one
//             upward shift between rows (cycles 5,10,15,20);
//   window 1: reads the bottom-right corner and walks the same snake in
//             reverse, from (+2,+2), with right/left/down shifts.
// B frame: 25 search cycles, both directions in parallel. P frame: window 1
// mirrors window 0, PE0 covers positions 0..12 and PE1 positions 24..12, 13
// cycles, minima merged. Timing: start -> 10 load cycles -> 25 (B) or 13 (P)
// search cycles -> merge -> done pulse. Ties keep the first position met.
// Shift-register walk and merged 8x8/16x16 search follow the document; the
// two-rows-per-cycle load and the centre clamp to +-SR are this design's.
// pe_cur is the current 16x16 block passed through from the input, which
// synthesis reports as idle output bits.
module lv3_search
  import bbme_pkg::*;
#(
  parameter int SR = 16,
  parameter int C  = SR + 2,
  parameter int W  = 16 + 2*C
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              bframe,
  input  mv_t               center0,
  input  mv_t               center1,
  input  logic [255:0]      cur,
  input  logic [W*W-1:0]    sw0,
  input  logic [W*W-1:0]    sw1,
  output logic [255:0]      pe_cur,
  output logic [255:0]      pe_ref0,
  output logic [255:0]      pe_ref1,
  input  logic [3:0][6:0]   pe_sod8_0,
  input  logic [3:0][6:0]   pe_sod8_1,
  input  logic [8:0]        pe_sod16_0,
  input  logic [8:0]        pe_sod16_1,
  output logic              busy,
  output logic              done,
  output mv_t               mv16_0,
  output mv_t               mv16_1,
  output mv_t               mv8_0 [4],
  output mv_t               mv8_1 [4],
  output logic [8:0]        sod16_0,
  output logic [8:0]        sod16_1,
  output logic [3:0][6:0]   sod8_0,
  output logic [3:0][6:0]   sod8_1,
  output mv_t               cen0,
  output mv_t               cen1
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_FIN} st_t;
  st_t st;
  logic [4:0]        t;
  logic [19:0][19:0] sr0, sr1;        // [row][col]
  logic [8:0]        b16_0, b16_1;
  logic [3:0][6:0]   b8_0, b8_1;
  mv_t               m16_0, m16_1;
  mv_t               m8_0 [4];
  mv_t               m8_1 [4];

  function automatic mv_t clampc(input mv_t m);
    mv_t r;
    r.x = (m.x > 8'(SR)) ? 8'(SR) : (m.x < -8'(SR)) ? -8'(SR) : m.x;
    r.y = (m.y > 8'(SR)) ? 8'(SR) : (m.y < -8'(SR)) ? -8'(SR) : m.y;
    return r;
  endfunction

  // Offset of snake step k (0..24) from the centre.
  function automatic mv_t snake(input int k);
    mv_t r;
    r.y = 8'(k / 5 - 2);
    r.x = ((k / 5) % 2 == 0) ? 8'(k % 5 - 2) : 8'(2 - k % 5);
    return r;
  endfunction

  always_comb begin
    pe_cur = cur;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        pe_ref0[r*16+c] = sr0[r][c];
        pe_ref1[r*16+c] = sr1[r+4][c+4];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; t <= '0; done <= 1'b0;
      sr0 <= '0; sr1 <= '0; cen0 <= '0; cen1 <= '0;
      b16_0 <= '1; b16_1 <= '1; b8_0 <= '1; b8_1 <= '1;
      m16_0 <= '0; m16_1 <= '0;
      for (int q = 0; q < 4; q++) begin
        m8_0[q] <= '0; m8_1[q] <= '0; mv8_0[q] <= '0; mv8_1[q] <= '0;
      end
      mv16_0 <= '0; mv16_1 <= '0; sod16_0 <= '0; sod16_1 <= '0;
      sod8_0 <= '0; sod8_1 <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_LOAD; t <= '0;
          cen0 <= clampc(center0);
          cen1 <= bframe ? clampc(center1) : clampc(center0);
          b16_0 <= '1; b16_1 <= '1; b8_0 <= '1; b8_1 <= '1;
        end
        S_LOAD: begin
          for (int k = 0; k < 2; k++) begin
            automatic int row0, row1;
            row0 = C + int'(cen0.y) - 2 + 2*int'(t) + k;
            row1 = C + int'(cen1.y) - 2 + 2*int'(t) + k;
            for (int c = 0; c < 20; c++) begin
              sr0[2*int'(t)+k][c] <= sw0[row0*W + C + int'(cen0.x) - 2 + c];
              sr1[2*int'(t)+k][c] <= sw1[row1*W + C + int'(cen1.x) - 2 + c];
            end
          end
          t <= t + 5'd1;
          if (t == 5'd9) begin st <= S_RUN; t <= '0; end
        end
        S_RUN: begin
          int   k0, k1, last;
          mv_t  p0, p1;
          k0 = int'(t);
          k1 = 24 - int'(t);
          p0 = snake(k0);
          p1 = snake(k1);
          // minima
          if (pe_sod16_0 < b16_0) begin b16_0 <= pe_sod16_0; m16_0 <= p0; end
          if (pe_sod16_1 < b16_1) begin b16_1 <= pe_sod16_1; m16_1 <= p1; end
          for (int q = 0; q < 4; q++) begin
            if (pe_sod8_0[q] < b8_0[q]) begin b8_0[q] <= pe_sod8_0[q]; m8_0[q] <= p0; end
            if (pe_sod8_1[q] < b8_1[q]) begin b8_1[q] <= pe_sod8_1[q]; m8_1[q] <= p1; end
          end
          // move both registers to the next snake position
          if (k0 % 5 == 4) begin
            sr0 <= {sr0[0], sr0[19:1]};          // up: row r takes row r+1
            sr1 <= {sr1[18:0], sr1[19]};         // down: row r takes row r-1
          end else begin
            for (int r = 0; r < 20; r++) begin
              if ((k0 / 5) % 2 == 0) begin
                sr0[r] <= {sr0[r][0], sr0[r][19:1]};   // left: col c takes c+1
                sr1[r] <= {sr1[r][18:0], sr1[r][19]};  // right: col c takes c-1
              end else begin
                sr0[r] <= {sr0[r][18:0], sr0[r][19]};
                sr1[r] <= {sr1[r][0], sr1[r][19:1]};
              end
            end
          end
          last = bframe ? 24 : 12;
          t <= t + 5'd1;
          if (k0 == last) st <= S_FIN;
        end
        S_FIN: begin
          logic p_use1;
          st   <= S_IDLE;
          done <= 1'b1;
          p_use1 = !bframe && (b16_1 < b16_0);
          mv16_0  <= p_use1 ? add(cen1, m16_1) : add(cen0, m16_0);
          sod16_0 <= p_use1 ? b16_1 : b16_0;
          mv16_1  <= (bframe || p_use1) ? add(cen1, m16_1) : add(cen0, m16_0);
          sod16_1 <= (bframe || p_use1) ? b16_1 : b16_0;
          for (int q = 0; q < 4; q++) begin
            logic u1;
            u1 = !bframe && (b8_1[q] < b8_0[q]);
            mv8_0[q]  <= u1 ? add(cen1, m8_1[q]) : add(cen0, m8_0[q]);
            sod8_0[q] <= u1 ? b8_1[q] : b8_0[q];
            mv8_1[q]  <= (bframe || u1) ? add(cen1, m8_1[q]) : add(cen0, m8_0[q]);
            sod8_1[q] <= (bframe || u1) ? b8_1[q] : b8_0[q];
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  function automatic mv_t add(input mv_t a, input mv_t b);
    mv_t r;
    r.x = a.x + b.x;
    r.y = a.y + b.y;
    return r;
  endfunction

  assign busy = (st != S_IDLE);
endmodule
