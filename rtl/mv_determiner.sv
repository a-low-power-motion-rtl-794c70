// mv_determiner: keeps the best of the half-pel candidates of one block.
// Each upd pulse offers the three SADs of one pass (horizontal offsets
// hx = -1, 0, +1 at vertical offset hy); the smallest seen since clr, and its
// offset, are kept. Ties keep the earlier candidate. clr and upd may not
// coincide. Registered outputs, updated at the edge that samples upd.
module mv_determiner (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   upd,
  input  logic [2:0][15:0]       sad,
  input  logic signed [1:0]      hy,
  output logic [15:0]            best_sad,
  output logic signed [1:0]      best_hx,
  output logic signed [1:0]      best_hy
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_sad <= '1; best_hx <= '0; best_hy <= '0;
    end else if (clr) begin
      best_sad <= '1; best_hx <= '0; best_hy <= '0;
    end else if (upd) begin
      automatic logic [15:0]       b;
      automatic logic signed [1:0] bx, by;
      b = best_sad; bx = best_hx; by = best_hy;
      for (int k = 0; k < 3; k++)
        if (sad[k] < b) begin b = sad[k]; bx = 2'(k - 1); by = hy; end
      best_sad <= b; best_hx <= bx; best_hy <= by;
    end
  end
endmodule
