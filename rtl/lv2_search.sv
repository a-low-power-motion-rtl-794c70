// lv2_search: level-2 search unit. Refines the LV2 motion vector from five
// candidates per direction (already in LV2 units, cand0 for window 0, cand1
// for window 1): the LV1 result, the upper-right, upper and left neighbours,
// and zero. Every candidate is checked, without the
// voting branch of the original binary pyramid search, with a +-1 cross from
// which the left point is dropped: centre, up, down and right fill the four
// 8x8 quadrants of a shared SOD PE, one candidate per PE per cycle.
// Windows are (8+SR)x(8+SR) bits (bit row*W+col); window position (H,H),
// H = SR/2, is the co-located block. Candidates are clamped to +-(H-1) so the
// cross stays inside the window.
// B frame: PE0/window 0 and PE1/window 1 check the five candidates in five
// cycles. P frame: window 1 mirrors window 0; PE0 takes candidates 0..2 and
// PE1 candidates 3..4, three cycles, and the minima are merged.
// Timing: start -> 5 (B) or 3 (P) search cycles -> merge -> done pulse.
// The reference block is cut directly out of the window by a 2-D selector;
// ties keep the first point met. Candidates, cross shape and schedule follow
// the document.
// pe_cur is the 8x8 current block copied into the four 8x8 slots, wired
// straight from the input, so synthesis reports it as idle output bits.
module lv2_search
  import bbme_pkg::*;
#(
  parameter int SR = 16,
  parameter int H  = SR/2,
  parameter int W  = 8 + SR
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              bframe,
  input  mv_t               cand0 [5],
  input  mv_t               cand1 [5],
  input  logic [63:0]       cur,
  input  logic [W*W-1:0]    sw0,
  input  logic [W*W-1:0]    sw1,
  output logic [255:0]      pe_cur,
  output logic [255:0]      pe_ref0,
  output logic [255:0]      pe_ref1,
  input  logic [3:0][6:0]   pe_sod0,
  input  logic [3:0][6:0]   pe_sod1,
  output logic              busy,
  output logic              done,
  output mv_t               mv0,
  output mv_t               mv1,
  output logic [6:0]        sod0,
  output logic [6:0]        sod1
);
  logic        run, fin;
  logic [2:0]  t;
  logic [6:0]  best0, best1;
  mv_t         bmv0, bmv1;
  mv_t         c0, c1;          // clamped candidates of this cycle
  logic        ok1;

  function automatic mv_t clampmv(input mv_t m);
    mv_t r;
    r.x = (m.x > 8'(H-1)) ? 8'(H-1) : (m.x < -8'(H-1)) ? -8'(H-1) : m.x;
    r.y = (m.y > 8'(H-1)) ? 8'(H-1) : (m.y < -8'(H-1)) ? -8'(H-1) : m.y;
    return r;
  endfunction

  // Cross point q: 0 centre, 1 up, 2 down, 3 right.
  function automatic mv_t cross_pt(input mv_t m, input int q);
    mv_t r;
    r = m;
    if (q == 1) r.y = m.y - 8'sd1;
    if (q == 2) r.y = m.y + 8'sd1;
    if (q == 3) r.x = m.x + 8'sd1;
    return r;
  endfunction

  always_comb begin
    int i1;
    c0  = clampmv(cand0[(int'(t) < 5) ? int'(t) : 4]);
    i1  = bframe ? int'(t) : int'(t) + 3;
    ok1 = (i1 < 5);
    c1  = bframe ? clampmv(cand1[(i1 < 5) ? i1 : 4]) : clampmv(cand0[(i1 < 5) ? i1 : 4]);
    for (int q = 0; q < 4; q++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          mv_t p0, p1;
          p0 = cross_pt(c0, q);
          p1 = cross_pt(c1, q);
          pe_cur [(8*(q/2)+r)*16 + 8*(q%2)+c] = cur[r*8+c];
          pe_ref0[(8*(q/2)+r)*16 + 8*(q%2)+c] =
            sw0[(H + int'(p0.y) + r)*W + H + int'(p0.x) + c];
          pe_ref1[(8*(q/2)+r)*16 + 8*(q%2)+c] =
            sw1[(H + int'(p1.y) + r)*W + H + int'(p1.x) + c];
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; fin <= 1'b0; done <= 1'b0; t <= '0;
      best0 <= '1; best1 <= '1; bmv0 <= '0; bmv1 <= '0;
      mv0 <= '0; mv1 <= '0; sod0 <= '0; sod1 <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start && !run && !fin) begin
        run <= 1'b1; t <= '0; best0 <= '1; best1 <= '1;
        bmv0 <= '0; bmv1 <= '0;
      end else if (run) begin
        automatic logic [6:0] b0, b1;
        automatic mv_t m0, m1;
        b0 = best0; b1 = best1; m0 = bmv0; m1 = bmv1;
        for (int q = 0; q < 4; q++) begin
          if (pe_sod0[q] < b0) begin b0 = pe_sod0[q]; m0 = cross_pt(c0, q); end
          if (ok1 && pe_sod1[q] < b1) begin b1 = pe_sod1[q]; m1 = cross_pt(c1, q); end
        end
        best0 <= b0; best1 <= b1; bmv0 <= m0; bmv1 <= m1;
        t <= t + 3'd1;
        if (t == (bframe ? 3'd4 : 3'd2)) begin
          run <= 1'b0; fin <= 1'b1;
        end
      end else if (fin) begin
        done <= 1'b1;
        if (bframe) begin
          mv0 <= bmv0; sod0 <= best0; mv1 <= bmv1; sod1 <= best1;
        end else if (best1 < best0) begin
          mv0 <= bmv1; sod0 <= best1; mv1 <= bmv1; sod1 <= best1;
        end else begin
          mv0 <= bmv0; sod0 <= best0; mv1 <= bmv0; sod1 <= best0;
        end
      end
    end
  end

  assign busy = run | fin;
endmodule
