// pingpong_mem: two-bank local memory. One bank is filled through the write
// port while the other is read, so loading the next macroblock overlaps with
// processing the current one. A one-cycle swap pulse exchanges the banks.
// Write is synchronous; read is combinational from the read bank. After reset
// bank 0 is the fill bank and bank 1 the read bank.
// The ping-pong organisation follows the document; port timing is this design's.
module pingpong_mem #(
  parameter int DW    = 72,
  parameter int DEPTH = 36,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem0 [DEPTH];
  logic [DW-1:0] mem1 [DEPTH];
  logic          fill_sel;   // bank being written

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    fill_sel <= 1'b0;
    else if (swap) fill_sel <= ~fill_sel;
  end

  always_ff @(posedge clk) begin
    if (we && !fill_sel) mem0[waddr] <= wdata;
    if (we &&  fill_sel) mem1[waddr] <= wdata;
  end

  assign rdata = fill_sel ? mem0[raddr] : mem1[raddr];
endmodule
