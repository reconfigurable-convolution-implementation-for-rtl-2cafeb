// window_mac -- 3x3 sliding register window, nine multipliers and adder tree.
//
// Each cycle with col_valid the window shifts one column to the left and takes
// col_data (one element of each of the three buffered rows) as its new right
// column, so after three shifts win[k][j] holds input column c+j of row k. The
// window then computes
//     res = ( sum_{k,j} w[3k+j] * win[k][j] ) >>> FRAC_BITS
// i.e. the cross-correlation used by CNN frameworks, with w0..w8 in row-major
// order as in the kernel-weight grid of the design description.
//
// The pipeline follows the stage split of the description's figure: the window
// is filled over cycles 1-3, the nine products are registered (cycle 4), a
// first adder level adds eight of them in four pairs (cycle 5), then two adders
// (cycle 6), one adder (cycle 7), and a last adder brings in the ninth product,
// which bypasses the tree (cycle 8). The final accumulate into the output row
// (cycle 9) lives in output_buffer. Products and sums keep full precision; the
// only rounding is the arithmetic right shift at the end (floor), a choice of
// this design.
//
// Interface and timing: col_emit marks a shift after which the window holds a
// complete 3x3 patch; only those produce a result. col_tag (the output column)
// travels with it. res_valid/res_tag/res_sum appear 6 cycles after the column
// that completed the patch was presented (window register, product register,
// four adder stages). One result per cycle is sustained. busy is high while a
// result is in flight. The weights w must be stable while columns are streamed.
module window_mac
  import ccu_pkg::*;
#(
  parameter int unsigned TAG_W = $clog2(ccu_pkg::BUF_LEN),
  parameter int unsigned FRAC  = ccu_pkg::FRAC_BITS,
  localparam int unsigned PW   = 2 * DATA_W,   // product width
  localparam int unsigned SW   = PW + 4        // sum of nine products
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  data_t                w        [K*K],
  input  logic                 col_valid,
  input  logic                 col_emit,
  input  logic [TAG_W-1:0]     col_tag,
  input  data_t                col_data [K],
  output logic                 res_valid,
  output logic [TAG_W-1:0]     res_tag,
  output logic signed [SW-1:0] res_sum,
  output logic                 busy
);

  typedef logic signed [PW-1:0] prod_t;
  typedef logic signed [SW-1:0] sum_t;
  localparam int unsigned NST = 6;   // pipeline stages carrying valid/tag

  data_t            win  [K][K];
  prod_t            prod [K*K];
  sum_t             lvl1 [4];
  sum_t             lvl2 [2];
  sum_t             lvl3;
  prod_t            p8_d [3];        // ninth product delayed past the tree
  logic [NST-1:0]   vld;
  logic [TAG_W-1:0] tag  [NST];

  // Cycles 1-3: the register window.
  always_ff @(posedge clk) begin
    if (col_valid) begin
      for (int k = 0; k < K; k++) begin
        win[k][0] <= win[k][1];
        win[k][1] <= win[k][2];
        win[k][2] <= col_data[k];
      end
    end
  end

  // Cycles 4-8: multipliers and adder tree.
  always_ff @(posedge clk) begin
    for (int i = 0; i < K*K; i++)
      prod[i] <= prod_t'(win[i/K][i%K]) * prod_t'(w[i]);
    for (int i = 0; i < 4; i++)
      lvl1[i] <= sum_t'(prod[2*i]) + sum_t'(prod[2*i+1]);
    p8_d[0] <= prod[8];
    lvl2[0] <= lvl1[0] + lvl1[1];
    lvl2[1] <= lvl1[2] + lvl1[3];
    p8_d[1] <= p8_d[0];
    lvl3    <= lvl2[0] + lvl2[1];
    p8_d[2] <= p8_d[1];
    res_sum <= (lvl3 + sum_t'(p8_d[2])) >>> FRAC;
  end

  // Valid and tag travel alongside the data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      for (int s = 0; s < NST; s++) tag[s] <= '0;
    end else begin
      vld    <= {vld[NST-2:0], col_valid & col_emit};
      tag[0] <= col_tag;
      for (int s = 1; s < NST; s++) tag[s] <= tag[s-1];
    end
  end

  assign res_valid = vld[NST-1];
  assign res_tag   = tag[NST-1];
  assign busy      = |vld;

endmodule
