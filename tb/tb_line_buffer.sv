// tb_line_buffer -- random writes and reads against a shadow copy.
//
// Every row slot is written first, then 4000 cycles of random writes and
// column reads follow. A read must return, one cycle later, the three words
// the shadow held when the read was issued (old data on a same-cycle write),
// and rdata must hold while re is low.
module tb_line_buffer;
  import ccu_pkg::*;

  localparam int ROWS = 3, LEN = 32;

  logic        clk = 1'b0;
  logic        we = 1'b0, re = 1'b0;
  logic [1:0]  wrow = '0;
  logic [4:0]  wcol = '0, rcol = '0;
  data_t       wdata = '0;
  data_t       rdata [ROWS];
  data_t       shadow [ROWS][LEN];
  data_t       expq [ROWS];
  logic        pend = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  line_buffer #(.ROWS(ROWS), .ROW_LEN(LEN)) u_dut (.clk, .we, .wrow, .wcol, .wdata, .re, .rcol, .rdata);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < LEN; c++) begin
        @(negedge clk);
        we = 1'b1; wrow = 2'(r); wcol = 5'(c); wdata = data_t'($urandom);
        shadow[r][c] = wdata;
      end
    @(negedge clk) we = 1'b0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // result of the previous cycle's read
      if (pend)
        for (int r = 0; r < ROWS; r++)
          check(rdata[r] == expq[r], $sformatf("t=%0d row %0d got %h exp %h", t, r, rdata[r], expq[r]));
      re   = ($urandom % 4) != 0;
      rcol = 5'($urandom % LEN);
      we   = ($urandom % 2) != 0;
      wrow = 2'($urandom % ROWS);
      wcol = ($urandom % 3 == 0) ? rcol : 5'($urandom % LEN);
      wdata = data_t'($urandom);
      if (re) begin
        for (int r = 0; r < ROWS; r++) expq[r] = shadow[r][rcol];
        pend = 1'b1;
      end
      if (we) shadow[wrow][wcol] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
