// tb_sliding_window_ccu -- end-to-end test of the convolution unit.
//
// The unit runs against a behavioural external RAM with 3-cycle read latency
// that withholds its grant in a quarter of all cycles. Each case fills the RAM
// with a random kernel and input map, starts the unit, and compares every
// output word with a reference convolution computed here (cross-correlation,
// zero padding, sum >>> 8, saturating add onto the old word in accumulate
// mode). Words just past the output map must stay untouched.
//
// Cases cover: padding 0, 1, 2 and 3; maps narrower than, equal to and wider
// than one 30-output segment (multi-segment rows); a 1x1 map; a configuration
// with no output; accumulation of a second channel onto the first; values large
// enough to saturate; 1x1 and 2x2 kernels (zero-filled weights) and 5x5 and 7x7
// kernels applied as 3x3 pieces that are accumulated. Each mechanism is counted and a failure is counted for any that
// never happened. It also checks that results leave the window at one per
// cycle: every segment's results must arrive as one unbroken run.
module tb_sliding_window_ccu;
  import ccu_pkg::*;

  localparam int W_BASE  = 'h0000;
  localparam int W2_BASE = 'h0010;
  localparam int IN_BASE = 'h0100;
  localparam int IN2_BASE= 'h4000;
  localparam int OUT_BASE= 'h8000;
  localparam int SEG     = BUF_LEN - 2;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     start = 1'b0;
  ccu_cfg_t cfg = '0;
  logic     busy, done;
  logic     mem_req, mem_we, mem_gnt, mem_rvalid;
  addr_t    mem_addr;
  data_t    mem_wdata, mem_rdata;

  int checks = 0, failures = 0;
  int n_pad = 0, n_multiseg = 0, n_accload = 0, n_sat = 0, n_empty = 0, n_ksize = 0;
  int res_count = 0, res_runs = 0, exp_runs = 0, exp_res = 0;
  logic res_prev = 1'b0;
  logic [DIM_W+2:0] c0_prev = '0;

  always #5 clk = ~clk;

  sliding_window_ccu u_dut (
    .clk, .rst_n, .start, .cfg, .busy, .done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata
  );

  ext_mem_model #(.WORDS(1 << 16), .LAT(3), .STALL_PCT(25)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  // Mechanism probes.
  always @(posedge clk) begin
    if (u_dut.u_ctrl.lb_we && !u_dut.u_ctrl.fill_real) n_pad++;
    if (u_dut.u_ctrl.c0 != c0_prev && u_dut.u_ctrl.c0 != 0) n_multiseg++;
    c0_prev <= u_dut.u_ctrl.c0;
    if (u_dut.ob_ld_valid) n_accload++;
    if (u_dut.res_valid) res_count++;
    if (u_dut.res_valid && !res_prev) res_runs++;
    res_prev <= u_dut.res_valid;
  end

  function automatic int sat16(int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Run one layer: a ks x ks kernel over an h x w map at in_base, output at
  // OUT_BASE. Kernels up to 3x3 take one run with zero-filled weights; larger
  // ones are zero-filled to a multiple of 3 and applied as 3x3 pieces, one run
  // each, accumulated (acc = 1 from the second piece on, or from the first
  // when acc_first is set, e.g. for a second input channel).
  task automatic run(int h, int w, int pad, int ks, bit acc_first, int in_base, int w_base, int vmax);
    int ho = h + 2*pad - ks + 1;
    int wo = w + 2*pad - ks + 1;
    int np = (ks + 2) / 3;            // pieces per dimension
    int wt [15][15];
    int expv [];
    int cyc = 0, total = 0;
    for (int a = 0; a < 15; a++)
      for (int b = 0; b < 15; b++)
        wt[a][b] = (a < ks && b < ks) ? int'($urandom % (2*vmax + 1)) - vmax : 0;
    for (int i = 0; i < h*w; i++)
      u_mem.mem[in_base + i] = data_t'(int'($urandom % (2*vmax + 1)) - vmax);
    if (ho < 1 || wo < 1) begin
      n_empty++;
      ho = 0; wo = 0;
    end
    expv = new[ho*wo];
    // reference, piece by piece, as the hardware rounds and saturates per run
    for (int r = 0; r < ho; r++)
      for (int c = 0; c < wo; c++) begin
        int acc_v = acc_first ? int'(signed'(u_mem.mem[OUT_BASE + r*wo + c])) : 0;
        for (int pr = 0; pr < np; pr++)
          for (int pc = 0; pc < np; pc++) begin
            longint s = 0;
            int v;
            for (int k = 0; k < 3; k++)
              for (int j = 0; j < 3; j++) begin
                int ir = r + 3*pr + k - pad, ic = c + 3*pc + j - pad;
                if (ir >= 0 && ir < h && ic >= 0 && ic < w)
                  s += longint'(wt[3*pr+k][3*pc+j]) * longint'(int'(signed'(u_mem.mem[in_base + ir*w + ic])));
              end
            v = int'(s >>> FRAC_BITS);
            if (sat16(acc_v + v) != acc_v + v) n_sat++;
            acc_v = sat16(acc_v + v);
          end
        expv[r*wo + c] = acc_v;
      end
    if (!acc_first)
      for (int i = 0; i < ho*wo; i++) u_mem.mem[OUT_BASE + i] = 16'h5a5a;
    u_mem.mem[OUT_BASE + ho*wo] = 16'h7e57;

    for (int pr = 0; pr < np; pr++)
      for (int pc = 0; pc < np; pc++) begin
        int wb = w_base + 9 * (pr*np + pc);
        for (int k = 0; k < 3; k++)
          for (int j = 0; j < 3; j++)
            u_mem.mem[wb + 3*k + j] = data_t'(wt[3*pr+k][3*pc+j]);
        exp_res  += ho * wo;
        exp_runs += ho * ((wo + SEG - 1) / SEG);
        cfg.in_base  = addr_t'(in_base);
        cfg.w_base   = addr_t'(wb);
        cfg.out_base = addr_t'(OUT_BASE);
        cfg.height   = dim_t'(h);
        cfg.width    = dim_t'(w);
        cfg.pad      = 2'(pad);
        cfg.ksize    = 4'(ks);
        cfg.sub_r    = 4'(3*pr);
        cfg.sub_c    = 4'(3*pc);
        cfg.acc      = acc_first || pr > 0 || pc > 0;
        @(negedge clk) start = 1'b1;
        @(negedge clk) start = 1'b0;
        cyc = 0;
        while (!done) begin
          @(negedge clk);
          cyc++;
        end
        total += cyc;
        check(!busy, "busy still high after done");
      end
    if (ks != 3) n_ksize++;
    for (int i = 0; i < ho*wo; i++) begin
      int got = int'(signed'(u_mem.mem[OUT_BASE + i]));
      check(got == expv[i], $sformatf("%0dx%0d pad%0d k%0d acc%0d out[%0d] got %0d exp %0d",
                                       h, w, pad, ks, acc_first, i, got, expv[i]));
    end
    check(u_mem.mem[OUT_BASE + ho*wo] == 16'h7e57, "write past end of output map");
    $display("layer %0dx%0d pad=%0d kernel=%0dx%0d acc=%0d: %0d outputs, %0d run(s), %0d cycles",
             h, w, pad, ks, ks, acc_first, ho*wo, np*np, total);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run(1, 1, 1, 3, 0, IN_BASE, W_BASE, 100);
    run(3, 3, 0, 3, 0, IN_BASE, W_BASE, 100);
    run(2, 2, 0, 3, 0, IN_BASE, W_BASE, 100);      // no output
    run(7, 7, 1, 3, 0, IN_BASE, W_BASE, 300);
    run(5, 30, 1, 3, 0, IN_BASE, W_BASE, 300);     // exactly one segment
    run(4, 31, 1, 3, 0, IN_BASE, W_BASE, 300);     // 30 + 1
    run(6, 65, 0, 3, 0, IN_BASE, W_BASE, 300);     // 63 = 30 + 30 + 3
    run(9, 47, 2, 3, 0, IN_BASE, W_BASE, 300);     // pad 2
    run(14, 14, 1, 3, 0, IN_BASE, W_BASE, 2000);   // saturates
    // two input channels summed into one output map
    run(10, 40, 1, 3, 0, IN_BASE, W_BASE, 300);
    run(10, 40, 1, 3, 1, IN2_BASE, W2_BASE, 300);
    run(10, 40, 1, 3, 1, IN_BASE, W_BASE, 3000);   // accumulate and saturate
    // other kernel sizes
    run(8, 9, 0, 1, 0, IN_BASE, W_BASE, 300);      // 1x1, zero-filled weights
    run(6, 35, 1, 2, 0, IN_BASE, W_BASE, 300);     // 2x2
    run(9, 33, 2, 5, 0, IN_BASE, W_BASE, 300);     // 5x5 as four 3x3 pieces
    run(12, 12, 3, 7, 0, IN_BASE, W_BASE, 300);    // 7x7 as nine 3x3 pieces
    check(res_count == exp_res, $sformatf("results %0d expected %0d", res_count, exp_res));
    check(res_runs == exp_runs,
          $sformatf("result runs %0d expected %0d (one result per cycle per segment)", res_runs, exp_runs));
    $display("mechanisms: mem stalls=%0d padding=%0d multi-segment=%0d acc-loads=%0d saturations=%0d empty=%0d other-kernel-sizes=%0d",
             u_mem.stall_cycles, n_pad, n_multiseg, n_accload, n_sat, n_empty, n_ksize);
    check(u_mem.stall_cycles > 0, "memory stall never happened");
    check(n_pad > 0, "padding never happened");
    check(n_multiseg > 0, "multi-segment row never happened");
    check(n_accload > 0, "accumulate mode never happened");
    check(n_sat > 0, "saturation never happened");
    check(n_empty > 0, "empty configuration never happened");
    check(n_ksize > 0, "kernel size other than 3x3 never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
