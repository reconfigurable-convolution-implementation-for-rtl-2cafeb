// tb_window_mac -- the 3x3 window, multipliers and adder tree.
//
// Columns are streamed with random gaps in segments of random length; within a
// segment the third and later columns complete a patch (col_emit). For every
// patch the expected value sum(w[3k+j] * x[k][c+j]) >>> 8 is computed here from
// the last three columns presented and queued with its tag and the cycle it is
// due: results must arrive exactly 6 cycles after the completing column, in
// order, with the right tag and value. A long gap-free segment checks that one
// result per cycle is sustained, and busy must be high while results are due.
module tb_window_mac;
  import ccu_pkg::*;

  localparam int SW = 2 * DATA_W + 4;
  localparam int LAT = 6;

  logic        clk = 1'b0, rst_n = 1'b0;
  data_t       w [9];
  logic        col_valid = 1'b0, col_emit = 1'b0;
  logic [4:0]  col_tag = '0;
  data_t       col_data [3];
  logic        res_valid, busy;
  logic [4:0]  res_tag;
  logic signed [SW-1:0] res_sum;

  typedef struct { longint val; int tag; longint due; } exp_t;
  exp_t   q [$];
  data_t  hist [3][3];   // hist[k][j], j = 2 newest
  longint cyc = 0;
  int checks = 0, failures = 0, results = 0, max_run = 0, run = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  window_mac #(.TAG_W(5)) u_dut (.clk, .rst_n, .w, .col_valid, .col_emit, .col_tag, .col_data,
                                 .res_valid, .res_tag, .res_sum, .busy);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Compare results as they come out (sampled mid-cycle).
  always @(negedge clk) if (rst_n) begin
    if (res_valid) begin
      exp_t e;
      results++;
      run++;
      if (run > max_run) max_run = run;
      if (q.size() == 0) check(1'b0, "unexpected result");
      else begin
        e = q.pop_front();
        check(res_sum == SW'(e.val), $sformatf("value got %0d exp %0d", res_sum, e.val));
        check(int'(res_tag) == e.tag, $sformatf("tag got %0d exp %0d", res_tag, e.tag));
        check(cyc == e.due, $sformatf("latency: at cycle %0d, due %0d", cyc, e.due));
      end
    end else run = 0;
    if (q.size() > 0 && q[0].due == cyc) check(res_valid, "result missing");
    if (q.size() > 0 && q[0].due - cyc < LAT) check(busy, "busy low with a result in flight");
  end

  task automatic segment(int len, int gap_pct, int vmax);
    for (int c = 0; c < len; c++) begin
      @(negedge clk);
      while (($urandom % 100) < gap_pct) begin
        col_valid = 1'b0;
        @(negedge clk);
      end
      col_valid = 1'b1;
      col_emit  = c >= 2;
      col_tag   = 5'(c - 2);
      for (int k = 0; k < 3; k++) begin
        col_data[k] = data_t'(int'($urandom % (2*vmax+1)) - vmax);
        hist[k][0] = hist[k][1];
        hist[k][1] = hist[k][2];
        hist[k][2] = col_data[k];
      end
      if (c >= 2) begin
        longint s = 0;
        exp_t e;
        for (int k = 0; k < 3; k++)
          for (int j = 0; j < 3; j++)
            s += longint'(w[3*k+j]) * longint'(hist[k][j]);
        e.val = s >>> FRAC_BITS;
        e.tag = c - 2;
        e.due = cyc + LAT;   // cyc counts the edge ending this cycle at +1
        q.push_back(e);
      end
    end
    @(negedge clk) col_valid = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < 9; i++) w[i] = '0;
    for (int k = 0; k < 3; k++) col_data[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 40; s++) begin
      for (int i = 0; i < 9; i++) w[i] = data_t'($urandom);
      segment(3 + int'($urandom % 30), (s % 3 == 0) ? 0 : 30, (s % 2 == 0) ? 32767 : 200);
      repeat (LAT + 1) @(negedge clk);
    end
    for (int i = 0; i < 9; i++) w[i] = data_t'($urandom);
    segment(32, 0, 1000);
    repeat (LAT + 2) @(negedge clk);
    check(q.size() == 0, "results still expected");
    check(max_run >= 30, $sformatf("longest run of back-to-back results %0d, expected 30", max_run));
    check(!busy, "busy after drain");
    $display("results=%0d longest back-to-back run=%0d", results, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
