// sliding_window_ccu -- reconfigurable sliding-window convolution computation unit.
//
// One unit convolves a single input channel of any height and width with one
// 3x3 kernel at stride 1, with zero padding, and writes one output channel.
// Kernel, input map and output map all live in external RAM; the shape and the
// addresses are run-time configuration (cfg), so a new layer needs no new
// hardware. Three input rows are brought into an on-chip buffer of ROW_LEN (32)
// elements per row, a 3x3 register window slides along them producing one
// multiply-accumulate result per cycle, and the results collect in a ROW_LEN
// entry output buffer that is written back once the three rows are used up.
// Other kernel sizes reuse the same hardware: a smaller kernel is a 3x3 kernel
// with zero weights (cfg.ksize gives the output shape), and a larger one is
// split into 3x3 pieces selected by cfg.sub_r/cfg.sub_c, one run per piece,
// summed through the accumulate flag (cfg.acc), which adds results into the
// output map already in RAM. The same flag sums several input channels.
//
// Structure: ccu_ctrl (sequencing, addresses, weights) - line_buffer (3 rows) -
// window_mac (window, 9 multipliers, adder tree) - output_buffer (final adder,
// output row). The block split, the 32-element buffers, the 3x3 kernel, 16-bit
// data and the nine-stage datapath follow the design description; the memory
// protocol, fixed-point format (8 fraction bits), saturation, segmenting of
// wide rows, the piece offsets for large kernels and the configuration struct
// are this design's own.
//
// Interface: pulse start for one cycle while busy is low, with cfg valid in that
// cycle; done pulses one cycle when the last output word has been granted.
// Memory port protocol: see ccu_ctrl (request held until mem_gnt, read data in
// order on mem_rvalid, always accepted).
module sliding_window_ccu
  import ccu_pkg::*;
#(
  parameter int unsigned ROW_LEN = ccu_pkg::BUF_LEN,
  localparam int unsigned CW     = $clog2(ROW_LEN),
  localparam int unsigned SW     = 2 * DATA_W + 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  ccu_cfg_t cfg,
  output logic     busy,
  output logic     done,
  output logic     mem_req,
  output logic     mem_we,
  output addr_t    mem_addr,
  output data_t    mem_wdata,
  input  logic     mem_gnt,
  input  logic     mem_rvalid,
  input  data_t    mem_rdata
);

  data_t          w [K*K];
  logic           lb_we, lb_re;
  logic [1:0]     lb_wrow;
  logic [CW-1:0]  lb_wcol, lb_rcol;
  data_t          lb_wdata;
  data_t          lb_rdata [K];
  logic           col_valid, col_emit, mac_busy;
  logic [CW-1:0]  col_tag;
  logic           res_valid;
  logic [CW-1:0]  res_tag;
  logic signed [SW-1:0] res_sum;
  logic           ob_add, ob_ld_valid;
  logic [CW-1:0]  ob_ld_idx, ob_rd_idx;
  data_t          ob_ld_data, ob_rd_data;

  ccu_ctrl #(.ROW_LEN(ROW_LEN)) u_ctrl (
    .clk, .rst_n, .start, .cfg, .busy, .done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .w,
    .lb_we, .lb_wrow, .lb_wcol, .lb_wdata, .lb_re, .lb_rcol,
    .col_valid, .col_emit, .col_tag, .mac_busy,
    .ob_add, .ob_ld_valid, .ob_ld_idx, .ob_ld_data, .ob_rd_idx, .ob_rd_data
  );

  line_buffer #(.ROWS(K), .ROW_LEN(ROW_LEN)) u_lb (
    .clk, .we(lb_we), .wrow(lb_wrow), .wcol(lb_wcol), .wdata(lb_wdata),
    .re(lb_re), .rcol(lb_rcol), .rdata(lb_rdata)
  );

  window_mac #(.TAG_W(CW)) u_mac (
    .clk, .rst_n, .w,
    .col_valid, .col_emit, .col_tag, .col_data(lb_rdata),
    .res_valid, .res_tag, .res_sum, .busy(mac_busy)
  );

  output_buffer #(.DEPTH(ROW_LEN), .SW(SW)) u_ob (
    .clk,
    .acc_valid(res_valid), .acc_add(ob_add), .acc_idx(res_tag), .acc_val(res_sum),
    .ld_valid(ob_ld_valid), .ld_idx(ob_ld_idx), .ld_data(ob_ld_data),
    .rd_idx(ob_rd_idx), .rd_data(ob_rd_data)
  );

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
