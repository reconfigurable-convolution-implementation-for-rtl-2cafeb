// tb_ccu_vgg -- full-size run of the unit over the VGG-16 feature-map sizes.
//
// The unit, with all parameters at their defaults, convolves single-channel
// maps of 7x7, 14x14, 28x28, 56x56, 112x112 and 224x224 (3x3 kernel, padding 1,
// stride 1) held in a behavioural external RAM with a fixed 4-cycle read
// latency and no stalls. Every output word is compared with a reference
// convolution, and the cycle count of each layer must equal this design's
// timing model for an ideal memory of latency L:
//     cycles = 10 + L + sum over segments of (5*n + 18 + L)
// with n the outputs of a segment (at most 30). The testbench prints cycles and
// GOP/s at 100 MHz, counting 2 operations per multiply-accumulate over the
// padded map (18 * H * W operations).
module tb_ccu_vgg;
  import ccu_pkg::*;

  localparam int LAT = 4;
  localparam int SEG = BUF_LEN - 2;
  localparam int W_BASE = 'h0, IN_BASE = 'h100, OUT_BASE = 'h10000;

  logic     clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ccu_cfg_t cfg = '0;
  logic     busy, done;
  logic     mem_req, mem_we, mem_gnt, mem_rvalid;
  addr_t    mem_addr;
  data_t    mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sliding_window_ccu u_dut (.clk, .rst_n, .start, .cfg, .busy, .done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);

  ext_mem_model #(.WORDS(1 << 17), .LAT(LAT), .STALL_PCT(0)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  task automatic run(int sz);
    int h = sz, w = sz, pad = 1;
    int ho = h, wo = w;
    int wt [9];
    int cyc = 0, model = 10 + LAT, bad = 0;
    real gops;
    for (int i = 0; i < 9; i++) begin
      wt[i] = int'($urandom % 513) - 256;
      u_mem.mem[W_BASE + i] = data_t'(wt[i]);
    end
    for (int i = 0; i < h*w; i++) u_mem.mem[IN_BASE + i] = data_t'(int'($urandom % 1025) - 512);
    for (int r = 0; r < ho; r++)
      for (int c0 = 0; c0 < wo; c0 += SEG) begin
        int n = (wo - c0 > SEG) ? SEG : wo - c0;
        model += 5*n + 18 + LAT;
      end
    cfg.in_base = IN_BASE; cfg.w_base = W_BASE; cfg.out_base = OUT_BASE;
    cfg.height = dim_t'(h); cfg.width = dim_t'(w); cfg.pad = 2'(pad); cfg.ksize = 4'd3; cfg.sub_r = '0; cfg.sub_c = '0; cfg.acc = 1'b0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    for (int r = 0; r < ho; r++)
      for (int c = 0; c < wo; c++) begin
        longint s = 0;
        for (int k = 0; k < 3; k++)
          for (int j = 0; j < 3; j++) begin
            int ir = r + k - pad, ic = c + j - pad;
            if (ir >= 0 && ir < h && ic >= 0 && ic < w)
              s += longint'(wt[3*k+j]) * longint'(int'(signed'(u_mem.mem[IN_BASE + ir*w + ic])));
          end
        checks++;
        if (int'(signed'(u_mem.mem[OUT_BASE + r*wo + c])) != sat16(s >>> FRAC_BITS)) begin
          bad++;
          failures++;
        end
      end
    if (bad > 0) $display("FAIL: %0dx%0d: %0d wrong outputs", h, w, bad);
    check(cyc == model, $sformatf("%0dx%0d: %0d cycles, timing model %0d", h, w, cyc, model));
    gops = real'(18 * h * w) / (real'(cyc) * 10.0);
    $display("%0dx%0d: %0d cycles, %0d OPs, %.3f GOP/s at 100 MHz", h, w, cyc, 18*h*w, gops);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(7);
    run(14);
    run(28);
    run(56);
    run(112);
    run(224);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
