// lv1_search: level-1 search unit. Full search of the 4x4 LV1 binary block
// over +-D, D = SR/4-1 (+-3 for a +-16 search range), in two binary search
// windows of (4+2D)x(4+2D) bits (bit row*(4+2D)+col; window position (0,0) is
// motion vector (-D,-D)).
// Each shared SOD PE evaluates as many whole search rows per cycle as fit in
// its sixteen 4x4 slots (two rows of 7 for D=3). PE0 walks window 0 from the
// top row down and PE1 walks window 1 from the bottom row up, so a B-frame
// search ends after ceil((2D+1)/K) cycles for both directions at once. For a
// P frame window 1 holds a mirror of window 0, each PE covers half the rows and
// the two minima are merged, halving the cycle count.
// Timing: start (idle only) -> NC search cycles -> one merge cycle -> done
// pulse; mv0/mv1 (LV1 units) hold until the next start. Ties keep the first
// position met. Schedule and slot use follow the document; tie rule is ours.
// pe_cur is the 4x4 current block copied into every slot, i.e. wired straight
// from the input, and slots beyond the last search row are driven with zeros;
// synthesis therefore reports those output bits as idle.
module lv1_search
  import bbme_pkg::*;
#(
  parameter int SR = 16,
  parameter int D  = SR/4 - 1,
  parameter int W  = 4 + 2*D
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                bframe,
  input  logic [15:0]         cur,
  input  logic [W*W-1:0]      sw0,
  input  logic [W*W-1:0]      sw1,
  output logic [255:0]        pe_cur,
  output logic [255:0]        pe_ref0,
  output logic [255:0]        pe_ref1,
  input  logic [15:0][4:0]    pe_sod0,
  input  logic [15:0][4:0]    pe_sod1,
  output logic                busy,
  output logic                done,
  output mv_t                 mv0,
  output mv_t                 mv1,
  output logic [4:0]          sod0,
  output logic [4:0]          sod1
);
  localparam int P  = 2*D + 1;            // positions per search row
  localparam int K  = 16 / P;             // search rows per cycle
  localparam int NB = (P + K - 1) / K;    // cycles, B frame
  localparam int NP = (NB + 1) / 2;       // cycles, P frame

  logic        run, fin;
  logic [4:0]  t;
  logic [4:0]  best0, best1;
  mv_t         bmv0, bmv1;
  logic [15:0] ok0, ok1;

  // Slot s of a PE: search row offset s/P, column s%P.
  always_comb begin
    for (int i = 0; i < 16; i++)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          pe_cur[(4*(i/4)+r)*16 + 4*(i%4)+c] = cur[r*4+c];
    pe_ref0 = '0;
    pe_ref1 = '0;
    ok0 = '0;
    ok1 = '0;
    for (int s = 0; s < 16; s++) begin
      int ry0, ry1, rx;
      rx  = s % P;
      ry0 = int'(t) * K + s / P;
      ry1 = 2*D - int'(t) * K - s / P;
      if (s < K*P && ry0 <= 2*D) begin
        ok0[s] = 1'b1;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            pe_ref0[(4*(s/4)+r)*16 + 4*(s%4)+c] = sw0[(ry0+r)*W + rx + c];
      end
      if (s < K*P && ry1 >= 0) begin
        ok1[s] = 1'b1;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            pe_ref1[(4*(s/4)+r)*16 + 4*(s%4)+c] = sw1[(ry1+r)*W + rx + c];
      end
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
        logic [4:0] b0, b1;
        mv_t        m0, m1;
        b0 = best0; b1 = best1; m0 = bmv0; m1 = bmv1;
        for (int s = 0; s < 16; s++) begin
          if (ok0[s] && pe_sod0[s] < b0) begin
            b0 = pe_sod0[s];
            m0.x = 8'(s % P - D);
            m0.y = 8'(int'(t) * K + s / P - D);
          end
          if (ok1[s] && pe_sod1[s] < b1) begin
            b1 = pe_sod1[s];
            m1.x = 8'(s % P - D);
            m1.y = 8'(2*D - int'(t) * K - s / P - D);
          end
        end
        best0 <= b0; best1 <= b1; bmv0 <= m0; bmv1 <= m1;
        t <= t + 5'd1;
        if (int'(t) == (bframe ? NB : NP) - 1) begin
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
