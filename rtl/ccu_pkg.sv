// ccu_pkg -- constants and types shared by the sliding-window convolution unit.
//
// The unit convolves one input channel with one 3x3 kernel at stride 1. Data and
// weights are 16-bit two's-complement fixed-point words (the 16-bit precision and
// the 3x3 kernel come from the design description; the fixed-point reading of
// "16 bit precision" and the 8 fraction bits are this design's choice). Rows are
// buffered on chip 32 elements at a time, so an output row is produced in
// segments of at most BUF_LEN-2 = 30 outputs.
//
// The layer configuration is a plain struct that the host sets before pulsing
// start: base word addresses of input map, kernel and output map in external RAM,
// input height and width, zero padding on each border, the kernel size and the
// position of the 3x3 piece being applied, and an accumulate flag that adds the
// new results to what the output map already holds. For a 3x3 kernel ksize = 3
// and sub_r = sub_c = 0. A smaller kernel is given as a 3x3 kernel whose unused
// weights are zero, with ksize set to its true size so the output map gets the
// right shape. A larger kernel is zero-filled to a multiple of 3 and applied as
// 3x3 pieces at offsets (sub_r, sub_c) = (0,0), (0,3), ..., one run each, all
// but the first with acc = 1. Several input channels are summed the same way.
package ccu_pkg;

  parameter int unsigned DATA_W    = 16;  // data and weight word
  parameter int unsigned FRAC_BITS = 8;   // fraction bits of the fixed-point format
  parameter int unsigned K         = 3;   // kernel size (fixed)
  parameter int unsigned BUF_LEN   = 32;   // elements per on-chip row buffer
  parameter int unsigned ADDR_W    = 32;  // external RAM word address
  parameter int unsigned DIM_W     = 16;  // height / width fields
  parameter int unsigned PAD_W     = 2;   // padding field
  parameter int unsigned KS_W      = 4;   // kernel-size and sub-kernel offset fields

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic [DIM_W-1:0]         dim_t;

  typedef struct packed {
    addr_t             in_base;   // input map, row-major, height*width words
    addr_t             w_base;    // kernel, w0..w8 row-major, 9 words
    addr_t             out_base;  // output map, row-major, out_h*out_w words
    dim_t              height;    // input rows
    dim_t              width;     // input columns
    logic [PAD_W-1:0]  pad;       // zero padding on every border
    logic [KS_W-1:0]   ksize;     // size of the whole kernel (3 for a plain 3x3 layer)
    logic [KS_W-1:0]   sub_r;     // row offset of this 3x3 piece inside the kernel
    logic [KS_W-1:0]   sub_c;     // column offset of this 3x3 piece inside the kernel
    logic              acc;       // 1: add results to the output map already in RAM
  } ccu_cfg_t;

  // Saturate a wide signed value to a data word.
  function automatic data_t sat_data(input logic signed [47:0] v);
    logic signed [47:0] maxv, minv;
    maxv = (48'sd1 <<< (DATA_W-1)) - 48'sd1;
    minv = -(48'sd1 <<< (DATA_W-1));
    if (v > maxv)      return data_t'(maxv[DATA_W-1:0]);
    else if (v < minv) return data_t'(minv[DATA_W-1:0]);
    else               return data_t'(v[DATA_W-1:0]);
  endfunction

endpackage
