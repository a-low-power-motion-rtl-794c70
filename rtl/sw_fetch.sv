// sw_fetch: transmission stage between the integer-pel search and MD-SME.
// For each direction needed (forward; backward too in a B frame) it asks the
// external memory for the 22x22 8-bit window whose top-left pixel is
// MB position + LV3 search centre - 3, then takes the window as a raster
// stream of 121 32-bit words (4 pixels each, first pixel in byte 0) and
// writes it into the fill bank of the MD-SME local memory.
// Request handshake: req_valid with req_dir/req_x/req_y is held until
// req_ready; beats are accepted whenever bus_valid is high. done pulses after
// the last word; a B frame takes two windows back to back (2 x 121 beats).
// The window size and the 32-bit bus follow the document; the request/stream
// protocol and fetching the two directions one after the other are this
// design's choices.
// lm_data is the bus word itself (no buffering), so synthesis reports it as
// output bits wired straight to an input.
module sw_fetch
  import bbme_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              bframe,
  input  logic [11:0]       mb_x,
  input  logic [11:0]       mb_y,
  input  mv_t               center [2],
  output logic              req_valid,
  input  logic              req_ready,
  output logic              req_dir,
  output logic signed [13:0] req_x,
  output logic signed [13:0] req_y,
  input  logic              bus_valid,
  input  logic [31:0]       bus_data,
  output logic              lm_we,
  output logic              lm_dir,
  output logic [6:0]        lm_addr,
  output logic [31:0]       lm_data,
  output logic              busy,
  output logic              done
);
  localparam int WORDS = (SSW*SSW + 3) / 4;   // 121

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_DATA} st_t;
  st_t        st;
  logic       bf;
  logic [6:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; bf <= 1'b0; cnt <= '0; req_dir <= 1'b0;
      req_x <= '0; req_y <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_REQ; bf <= bframe; req_dir <= 1'b0;
          req_x <= 14'(mb_x) + 14'(center[0].x) - 14'sd3;
          req_y <= 14'(mb_y) + 14'(center[0].y) - 14'sd3;
        end
        S_REQ: if (req_ready) begin st <= S_DATA; cnt <= '0; end
        S_DATA: if (bus_valid) begin
          cnt <= cnt + 7'd1;
          if (int'(cnt) == WORDS - 1) begin
            if (bf && !req_dir) begin
              st <= S_REQ; req_dir <= 1'b1;
              req_x <= 14'(mb_x) + 14'(center[1].x) - 14'sd3;
              req_y <= 14'(mb_y) + 14'(center[1].y) - 14'sd3;
            end else begin
              st <= S_IDLE; done <= 1'b1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign req_valid = (st == S_REQ);
  assign lm_we     = (st == S_DATA) && bus_valid;
  assign lm_dir    = req_dir;
  assign lm_addr   = cnt;
  assign lm_data   = bus_data;
  assign busy      = (st != S_IDLE);
endmodule
