// line_buffer -- the on-chip input data buffer of the convolution unit.
//
// It holds ROWS input rows of ROW_LEN elements each (three rows of 32 by default,
// as in the design description). Each row is its own RAM so that one read returns
// the element at the same column of every row: that column is what the 3x3
// window shifts in next. Rows are written one element at a time as words arrive
// from external RAM; padding elements are written as zeros by the controller.
//
// Interface and timing: a write (we, wrow, wcol, wdata) takes effect at the
// clock edge. A read (re, rcol) returns rdata[0..ROWS-1] one cycle later
// (synchronous read, the usual block-RAM behaviour); rdata holds its value while
// re is low. Reading and writing the same address in one cycle returns the old
// word. The memories are not reset: the controller always writes a slot before
// it reads it.
module line_buffer
  import ccu_pkg::*;
#(
  parameter int unsigned ROWS    = K,
  parameter int unsigned ROW_LEN = ccu_pkg::BUF_LEN,
  localparam int unsigned RW     = $clog2(ROWS),
  localparam int unsigned CW     = $clog2(ROW_LEN)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [RW-1:0]  wrow,
  input  logic [CW-1:0]  wcol,
  input  data_t          wdata,
  input  logic           re,
  input  logic [CW-1:0]  rcol,
  output data_t          rdata [ROWS]
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    data_t mem [ROW_LEN];

    always_ff @(posedge clk) begin
      if (we && wrow == RW'(r)) mem[wcol] <= wdata;
      if (re)                   rdata[r]  <= mem[rcol];
    end
  end

endmodule
