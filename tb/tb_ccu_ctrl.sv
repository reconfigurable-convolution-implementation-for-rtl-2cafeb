// tb_ccu_ctrl -- the sequencer and address generator on its own.
//
// The controller talks to the behavioural external RAM (2-cycle latency,
// grant withheld in 20% of cycles). The testbench stands in for the datapath:
// it keeps a shadow of everything written into the line buffer and the output
// buffer, models the multiply/add pipeline's busy flag as a 6-cycle delay of
// the emitted columns, and serves output-buffer reads with a pattern that
// encodes index and segment. For each layer it lists the expected segments
// (output row, first column, length) itself and checks, at the start of each
// segment's compute phase: the kernel weights, the three buffered rows
// including zero padding, and (accumulate mode) the preloaded output words.
// During compute it checks the column read order and the emitted tags; during
// write-back the address and data of every write, and that no write starts
// before the pipeline is empty.
module tb_ccu_ctrl;
  import ccu_pkg::*;

  localparam int SEG = BUF_LEN - 2;
  localparam int W_BASE = 'h20, IN_BASE = 'h100, OUT_BASE = 'h6000;

  logic     clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ccu_cfg_t cfg = '0;
  logic     busy, done;
  logic     mem_req, mem_we, mem_gnt, mem_rvalid;
  addr_t    mem_addr;
  data_t    mem_wdata, mem_rdata;
  data_t    w [9];
  logic     lb_we, lb_re, col_valid, col_emit, ob_add, ob_ld_valid;
  logic [1:0] lb_wrow;
  logic [4:0] lb_wcol, lb_rcol, col_tag, ob_ld_idx, ob_rd_idx;
  data_t    lb_wdata, ob_ld_data, ob_rd_data;
  logic [5:0] busy_sr = '0;
  logic     mac_busy;

  typedef struct { int r; int c0; int n; } seg_t;
  seg_t  segq [$];
  seg_t  cur;
  int    seg_id = 0, wr_i = 0, emit_i = 0, rd_i = 0;
  data_t lbs [3][BUF_LEN];
  data_t obs [BUF_LEN];
  logic  re_prev = 1'b0;
  int    h, wd, pad, ho, wo, ks, sr, sc;
  bit    acc;
  int checks = 0, failures = 0, writes = 0, segs_done = 0;

  always #5 clk = ~clk;

  ccu_ctrl u_dut (.clk, .rst_n, .start, .cfg, .busy, .done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata, .w,
    .lb_we, .lb_wrow, .lb_wcol, .lb_wdata, .lb_re, .lb_rcol,
    .col_valid, .col_emit, .col_tag, .mac_busy,
    .ob_add, .ob_ld_valid, .ob_ld_idx, .ob_ld_data, .ob_rd_idx, .ob_rd_data);

  ext_mem_model #(.WORDS(1 << 15), .LAT(2), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  assign mac_busy   = |busy_sr;
  assign ob_rd_data = data_t'(int'(ob_rd_idx) * 37 + seg_id * 1000);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic data_t in_val(int ir, int ic);
    if (ir < 0 || ir >= h || ic < 0 || ic >= wd) return '0;
    return u_mem.mem[IN_BASE + ir*wd + ic];
  endfunction

  always @(posedge clk) if (rst_n) begin
    busy_sr <= {busy_sr[4:0], col_valid & col_emit};
    if (lb_we) lbs[lb_wrow][lb_wcol] = lb_wdata;
    if (ob_ld_valid) obs[ob_ld_idx] = ob_ld_data;
    // start of a compute phase: the buffers must hold this segment's data
    if (lb_re && !re_prev) begin
      if (segq.size() == 0) check(1'b0, "unexpected segment");
      else begin
        cur = segq.pop_front();
        seg_id++;
        emit_i = 0; rd_i = 0; wr_i = 0;
        for (int i = 0; i < 9; i++)
          check(w[i] == u_mem.mem[W_BASE + i], $sformatf("weight %0d", i));
        for (int k = 0; k < 3; k++)
          for (int j = 0; j < cur.n + 2; j++)
            check(lbs[k][j] == in_val(cur.r + sr + k - pad, cur.c0 + sc + j - pad),
                  $sformatf("row %0d seg %0d: buffer[%0d][%0d] = %0d, exp %0d", cur.r, cur.c0, k, j,
                            lbs[k][j], in_val(cur.r + sr + k - pad, cur.c0 + sc + j - pad)));
        if (acc)
          for (int j = 0; j < cur.n; j++)
            check(obs[j] == u_mem.mem[OUT_BASE + cur.r*wo + cur.c0 + j], "preloaded output word");
        check(ob_add == acc, "accumulate flag");
      end
    end
    re_prev <= lb_re;
    if (lb_re) begin
      check(int'(lb_rcol) == rd_i, $sformatf("column read %0d exp %0d", lb_rcol, rd_i));
      rd_i++;
    end
    if (col_valid && col_emit) begin
      check(int'(col_tag) == emit_i, $sformatf("tag %0d exp %0d", col_tag, emit_i));
      emit_i++;
    end
    if (mem_req && mem_we) check(!mac_busy && !col_valid, "write-back while pipeline busy");
    if (mem_req && mem_we && mem_gnt) begin
      check(mem_addr == addr_t'(OUT_BASE + cur.r*wo + cur.c0 + wr_i),
            $sformatf("write address %0h exp %0h", mem_addr, OUT_BASE + cur.r*wo + cur.c0 + wr_i));
      check(mem_wdata == data_t'(wr_i * 37 + seg_id * 1000), "write data");
      check(emit_i == cur.n && rd_i == cur.n + 2, "column count of the segment");
      wr_i++;
      writes++;
      if (wr_i == cur.n) segs_done++;
    end
  end

  task automatic run(int hh, int ww, int pp, bit aa, int kk = 3, int rr = 0, int cc = 0);
    int cyc = 0;
    h = hh; wd = ww; pad = pp; acc = aa; ks = kk; sr = rr; sc = cc;
    ho = h + 2*pad - ks + 1; wo = wd + 2*pad - ks + 1;
    if (ho < 0) ho = 0;
    if (wo < 0) wo = 0;
    for (int i = 0; i < 9; i++) u_mem.mem[W_BASE + i] = data_t'($urandom);
    for (int i = 0; i < h*wd; i++) u_mem.mem[IN_BASE + i] = data_t'($urandom);
    for (int i = 0; i < ho*wo; i++) u_mem.mem[OUT_BASE + i] = data_t'($urandom);
    for (int r = 0; r < ho; r++)
      for (int c0 = 0; c0 < wo; c0 += SEG) begin
        seg_t s;
        s.r = r; s.c0 = c0; s.n = (wo - c0 > SEG) ? SEG : wo - c0;
        segq.push_back(s);
      end
    cfg.in_base = IN_BASE; cfg.w_base = W_BASE; cfg.out_base = OUT_BASE;
    cfg.height = dim_t'(h); cfg.width = dim_t'(wd); cfg.pad = 2'(pad); cfg.ksize = 4'(ks); cfg.sub_r = 4'(sr); cfg.sub_c = 4'(sc); cfg.acc = acc;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(segq.size() == 0, $sformatf("%0d segments never computed", segq.size()));
    segq.delete();
    $display("layer %0dx%0d pad %0d acc %0d kernel %0d piece (%0d,%0d): %0d cycles", h, wd, pad, acc, ks, sr, sc, cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(3, 3, 0, 0);
    run(1, 1, 1, 0);
    run(6, 33, 1, 0);
    run(5, 61, 0, 1);
    run(4, 9, 2, 1);
    run(12, 90, 1, 0);
    run(7, 40, 2, 1, 5, 3, 0);    // piece (3,0) of a 5x5 kernel
    run(9, 20, 3, 1, 7, 6, 3);    // piece (6,3) of a 7x7 kernel
    run(5, 6, 0, 0, 1);           // 1x1 kernel
    run(2, 2, 0, 0, 3);           // no output
    check(writes > 0 && segs_done > 0, "nothing written");
    $display("segments=%0d writes=%0d stalls=%0d", segs_done, writes, u_mem.stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
