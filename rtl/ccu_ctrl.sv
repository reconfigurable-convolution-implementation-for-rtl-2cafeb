// ccu_ctrl -- sequencer and address generator of the sliding-window unit.
//
// After start it captures the layer configuration and
//   1. reads the nine kernel weights w0..w8 into registers;
//   2. for every output row r and every segment of at most SEG = ROW_LEN-2
//      output columns starting at c0:
//      a. LOAD  - fills the three row buffers with input rows r+sub_r-pad .. +2,
//                 columns c0+sub_c-pad .. +n+1 (n = outputs in the segment).
//                 Elements that fall in the zero padding are written as zeros
//                 without a memory access. In accumulate mode the n output
//                 words already in RAM are read into the output buffer too;
//      b. COMP  - reads one buffered column per cycle and shifts it into the
//                 window; from the third column on every shift yields an output;
//      c. FLUSH - waits for the multiply/add pipeline to empty;
//      d. DRAIN - writes the n output words back to external RAM.
//   3. pulses done.
// The three rows are reloaded for every output row and every segment, as in the
// design description ("load three rows ... once the three rows are complete,
// transfer the output buffer ... repeat"); rows wider than the buffer are cut
// into overlapping segments, which the description implies by saying wide rows
// are loaded multiple times. The segment overlap of two columns, the order of
// the phases and the memory protocol are this design's choices.
//
// Memory port: one request per cycle at most. A request (mem_req, mem_we,
// mem_addr, mem_wdata) is held until mem_gnt; read data returns in request
// order on mem_rvalid/mem_rdata, any number of cycles later, and is always
// accepted. Requests are issued while earlier reads are still outstanding, so a
// memory with latency L costs L cycles per LOAD phase, not per word.
//
// Output size is out_h = height + 2*pad - ksize + 1 by out_w = width + 2*pad -
// ksize + 1 (stride 1); (sub_r, sub_c) shifts the 3x3 window inside a larger
// kernel, so pieces of that kernel can be applied one run at a time and summed
// with acc. Input words outside the map read as zero. A configuration with no
// output finishes right after the weight load.
module ccu_ctrl
  import ccu_pkg::*;
#(
  parameter int unsigned ROW_LEN = ccu_pkg::BUF_LEN,
  localparam int unsigned CW     = $clog2(ROW_LEN),
  localparam int unsigned SEG    = ROW_LEN - 2,
  localparam int unsigned IW     = DIM_W + 3          // signed index width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  ccu_cfg_t      cfg,
  output logic          busy,
  output logic          done,
  // external RAM
  output logic          mem_req,
  output logic          mem_we,
  output addr_t         mem_addr,
  output data_t         mem_wdata,
  input  logic          mem_gnt,
  input  logic          mem_rvalid,
  input  data_t         mem_rdata,
  // kernel weights
  output data_t         w [K*K],
  // line buffer
  output logic          lb_we,
  output logic [1:0]    lb_wrow,
  output logic [CW-1:0] lb_wcol,
  output data_t         lb_wdata,
  output logic          lb_re,
  output logic [CW-1:0] lb_rcol,
  // window
  output logic          col_valid,
  output logic          col_emit,
  output logic [CW-1:0] col_tag,
  input  logic          mac_busy,
  // output buffer
  output logic          ob_add,
  output logic          ob_ld_valid,
  output logic [CW-1:0] ob_ld_idx,
  output data_t         ob_ld_data,
  output logic [CW-1:0] ob_rd_idx,
  input  data_t         ob_rd_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_WLOAD, S_SEG, S_LOAD, S_COMP, S_FLUSH, S_DRAIN, S_NEXT, S_DONE
  } state_t;

  typedef logic signed [IW-1:0] idx_t;

  state_t   state;
  ccu_cfg_t cq;
  idx_t     out_h, out_w;
  idx_t     row, c0;
  logic [CW-1:0] n;                // outputs in this segment (1..SEG)
  logic [3:0]    wi, wf;           // weight issue / fill counters
  logic [2:0]    ik, fk;           // LOAD issue / fill slot: buffer row (3 = output buffer)
  logic [CW-1:0] ij, fj;           //                         and column
  logic [CW-1:0] cj;               // COMP column
  logic          rd_v;             // line-buffer read in flight
  logic [CW-1:0] rd_j;

  // ---------------------------------------------------------------- slots
  logic [2:0] last_k;
  assign last_k = cq.acc ? 3'd3 : 3'd2;

  function automatic logic [CW-1:0] slot_len(input logic [2:0] k, input logic [CW-1:0] nn);
    return (k == 3'd3) ? nn : nn + CW'(2);
  endfunction

  // Is slot (k, j) a word in external RAM (not padding)? Its address.
  function automatic logic slot_real(input logic [2:0] k, input logic [CW-1:0] j);
    idx_t ir, ic;
    if (k == 3'd3) return 1'b1;
    ir = row + idx_t'(cq.sub_r) + idx_t'(k) - idx_t'(cq.pad);
    ic = c0  + idx_t'(cq.sub_c) + idx_t'(j) - idx_t'(cq.pad);
    return ir >= 0 && ir < idx_t'(cq.height) && ic >= 0 && ic < idx_t'(cq.width);
  endfunction

  function automatic addr_t slot_addr(input logic [2:0] k, input logic [CW-1:0] j);
    idx_t ir, ic;
    if (k == 3'd3)
      return cq.out_base + addr_t'(row) * addr_t'(out_w) + addr_t'(c0) + addr_t'(j);
    ir = row + idx_t'(cq.sub_r) + idx_t'(k) - idx_t'(cq.pad);
    ic = c0  + idx_t'(cq.sub_c) + idx_t'(j) - idx_t'(cq.pad);
    return cq.in_base + addr_t'(ir) * addr_t'(cq.width) + addr_t'(ic);
  endfunction

  logic issue_done, fill_done, issue_real, fill_real;
  logic issue_last, fill_last;
  assign issue_done = ik > last_k;
  assign fill_done  = fk > last_k;
  assign issue_real = slot_real(ik, ij);
  assign fill_real  = slot_real(fk, fj);
  assign issue_last = ij == slot_len(ik, n) - CW'(1);
  assign fill_last  = fj == slot_len(fk, n) - CW'(1);

  logic issue_adv, fill_adv;
  always_comb begin
    issue_adv = 1'b0;
    fill_adv  = 1'b0;
    if (state == S_LOAD) begin
      if (!issue_done) issue_adv = issue_real ? mem_gnt : 1'b1;
      if (!fill_done)  fill_adv  = fill_real ? mem_rvalid : 1'b1;
    end
  end

  // ---------------------------------------------------------------- outputs
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = ob_rd_data;
    ob_rd_idx = cj;
    unique case (state)
      S_WLOAD: if (wi < 4'(K*K)) begin
        mem_req  = 1'b1;
        mem_addr = cq.w_base + addr_t'(wi);
      end
      S_LOAD: if (!issue_done && issue_real) begin
        mem_req  = 1'b1;
        mem_addr = slot_addr(ik, ij);
      end
      S_DRAIN: begin
        mem_req  = 1'b1;
        mem_we   = 1'b1;
        mem_addr = cq.out_base + addr_t'(row) * addr_t'(out_w) + addr_t'(c0) + addr_t'(cj);
      end
      default: ;
    endcase
  end

  assign lb_we       = fill_adv && fk != 3'd3;
  assign lb_wrow     = fk[1:0];
  assign lb_wcol     = fj;
  assign lb_wdata    = fill_real ? mem_rdata : '0;
  assign ob_ld_valid = fill_adv && fk == 3'd3;
  assign ob_ld_idx   = fj;
  assign ob_ld_data  = mem_rdata;
  assign ob_add      = cq.acc;

  assign lb_re     = state == S_COMP;
  assign lb_rcol   = cj;
  assign col_valid = rd_v;
  assign col_emit  = rd_j >= CW'(2);
  assign col_tag   = rd_j - CW'(2);

  assign busy = state != S_IDLE;

  // ---------------------------------------------------------------- sequencing
  idx_t rem;                        // outputs left in the row from c0
  assign rem = out_w - c0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cq    <= '0;
      out_h <= '0;
      out_w <= '0;
      row   <= '0;
      c0    <= '0;
      n     <= '0;
      wi    <= '0;
      wf    <= '0;
      ik    <= '0;
      ij    <= '0;
      fk    <= '0;
      fj    <= '0;
      cj    <= '0;
      rd_v  <= 1'b0;
      rd_j  <= '0;
      done  <= 1'b0;
      for (int i = 0; i < K*K; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      rd_v <= lb_re;
      rd_j <= cj;
      unique case (state)
        S_IDLE: if (start) begin
          cq    <= cfg;
          out_h <= idx_t'(cfg.height) + idx_t'(2 * cfg.pad) - idx_t'(cfg.ksize) + idx_t'(1);
          out_w <= idx_t'(cfg.width)  + idx_t'(2 * cfg.pad) - idx_t'(cfg.ksize) + idx_t'(1);
          wi    <= '0;
          wf    <= '0;
          state <= S_WLOAD;
        end
        S_WLOAD: begin
          if (mem_req && mem_gnt) wi <= wi + 4'd1;
          if (mem_rvalid) begin
            w[wf] <= mem_rdata;
            wf    <= wf + 4'd1;
            if (wf == 4'(K*K-1)) begin
              row   <= '0;
              c0    <= '0;
              state <= (out_h < 1 || out_w < 1) ? S_DONE : S_SEG;
            end
          end
        end
        S_SEG: begin
          n     <= (rem > idx_t'(SEG)) ? CW'(SEG) : CW'(rem);
          ik    <= '0;
          ij    <= '0;
          fk    <= '0;
          fj    <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (issue_adv) begin
            ij <= issue_last ? '0 : ij + CW'(1);
            if (issue_last) ik <= ik + 3'd1;
          end
          if (fill_adv) begin
            fj <= fill_last ? '0 : fj + CW'(1);
            if (fill_last) begin
              fk <= fk + 3'd1;
              if (fk == last_k) begin
                cj    <= '0;
                state <= S_COMP;
              end
            end
          end
        end
        S_COMP: begin
          cj <= cj + CW'(1);
          if (cj == n + CW'(1)) state <= S_FLUSH;
        end
        S_FLUSH: if (!rd_v && !mac_busy) begin
          cj    <= '0;
          state <= S_DRAIN;
        end
        S_DRAIN: if (mem_gnt) begin
          cj <= cj + CW'(1);
          if (cj == n - CW'(1)) state <= S_NEXT;
        end
        S_NEXT: begin
          if (rem <= idx_t'(SEG)) begin
            c0  <= '0;
            row <= row + idx_t'(1);
            state <= (row + idx_t'(1) >= out_h) ? S_DONE : S_SEG;
          end else begin
            c0    <= c0 + idx_t'(SEG);
            state <= S_SEG;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Read data only comes back for reads this unit issued.
  a_rvalid_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> (state == S_WLOAD || state == S_LOAD));
  // A request that is not granted stays as it is.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && !mem_gnt |=> mem_req && $stable(mem_addr) && $stable(mem_we));

endmodule
