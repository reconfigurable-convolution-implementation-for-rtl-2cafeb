// output_buffer -- on-chip output row buffer with the final accumulate adder.
//
// DEPTH entries (32 by default, as in the design description) hold one segment
// of an output row. Each window result is added to the entry it belongs to,
// the last adder stage of the convolution pipeline (cycle 9 in the description's
// figure): entry[idx] <= sat(base + acc_val), where base is the entry's current
// value when acc_add is high and zero when it is low. With acc_add low the
// buffer needs no clearing between segments; with acc_add high it must first be
// loaded (ld_*) with the partial sums already in the output map, which lets
// several input channels be summed into one output map. Saturation to the data
// word and the clear-free first pass are this design's choices.
//
// Interface and timing: acc_valid and ld_valid write at the clock edge (the
// controller never uses both in one cycle; acc wins if it did). rd_idx/rd_data
// is an asynchronous read port used to drain the segment to external RAM.
module output_buffer
  import ccu_pkg::*;
#(
  parameter int unsigned DEPTH = ccu_pkg::BUF_LEN,
  parameter int unsigned SW    = 2 * ccu_pkg::DATA_W + 4,
  localparam int unsigned IW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 acc_valid,
  input  logic                 acc_add,
  input  logic [IW-1:0]        acc_idx,
  input  logic signed [SW-1:0] acc_val,
  input  logic                 ld_valid,
  input  logic [IW-1:0]        ld_idx,
  input  data_t                ld_data,
  input  logic [IW-1:0]        rd_idx,
  output data_t                rd_data
);

  data_t              mem [DEPTH];
  logic signed [47:0] sum;

  always_comb begin
    sum = 48'(acc_val);
    if (acc_add) sum = sum + 48'(mem[acc_idx]);
  end

  always_ff @(posedge clk) begin
    if (acc_valid)     mem[acc_idx] <= sat_data(sum);
    else if (ld_valid) mem[ld_idx]  <= ld_data;
  end

  assign rd_data = mem[rd_idx];

endmodule
