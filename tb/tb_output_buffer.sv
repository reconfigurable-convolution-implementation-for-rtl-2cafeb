// tb_output_buffer -- load, accumulate and read back the output row buffer.
//
// A shadow array models the buffer: a load writes the word, an accumulate
// writes sat16(old + value) when acc_add is high and sat16(value) when it is
// low. Random operations (with values large enough to saturate in both
// directions) are applied and every entry is read back through the read port
// and compared after each operation.
module tb_output_buffer;
  import ccu_pkg::*;

  localparam int SW = 2 * DATA_W + 4;
  localparam int DEPTH = 32;

  logic        clk = 1'b0;
  logic        acc_valid = 1'b0, acc_add = 1'b0, ld_valid = 1'b0;
  logic [4:0]  acc_idx = '0, ld_idx = '0, rd_idx = '0;
  logic signed [SW-1:0] acc_val = '0;
  data_t       ld_data = '0, rd_data;
  int          shadow [DEPTH];
  int checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;

  output_buffer #(.DEPTH(DEPTH), .SW(SW)) u_dut (.clk, .acc_valid, .acc_add, .acc_idx, .acc_val,
                                                 .ld_valid, .ld_idx, .ld_data, .rd_idx, .rd_data);

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

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ld_valid = 1'b1; ld_idx = 5'(i); ld_data = data_t'($urandom);
      shadow[i] = int'(ld_data);
    end
    @(negedge clk) ld_valid = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      acc_valid = 1'b0;
      ld_valid  = 1'b0;
      case ($urandom % 3)
        0: begin
          ld_valid = 1'b1; ld_idx = 5'($urandom % DEPTH); ld_data = data_t'($urandom);
          shadow[ld_idx] = int'(ld_data);
        end
        default: begin
          longint v, s;
          acc_valid = 1'b1;
          acc_add   = ($urandom % 4) != 0;
          acc_idx   = 5'($urandom % DEPTH);
          v = ($urandom % 2) ? longint'(int'($urandom % 4001) - 2000)
                             : longint'(int'($urandom % 200001) - 100000);
          acc_val = SW'(v);
          s = (acc_add ? longint'(shadow[acc_idx]) : 0) + v;
          if (s > 32767 || s < -32768) n_sat++;
          shadow[acc_idx] = sat16(s);
        end
      endcase
      @(negedge clk);
      acc_valid = 1'b0;
      ld_valid  = 1'b0;
      for (int i = 0; i < DEPTH; i += 7) begin
        rd_idx = 5'((i + t) % DEPTH);
        #1 check(int'(rd_data) == shadow[rd_idx],
                 $sformatf("t=%0d entry %0d got %0d exp %0d", t, rd_idx, rd_data, shadow[rd_idx]));
      end
    end
    check(n_sat > 0, "saturation never exercised");
    $display("saturations=%0d", n_sat);
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
