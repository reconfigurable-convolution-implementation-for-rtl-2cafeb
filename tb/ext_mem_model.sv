// ext_mem_model -- behavioural model of the external RAM seen by the
// convolution unit (not synthesizable design content; testbench use only).
//
// One request port: a request (req, we, addr, wdata) is accepted in a cycle
// where gnt is high. gnt is dropped at random in STALL_PCT percent of cycles to
// exercise back-pressure. Read data for an accepted read appears on
// rvalid/rdata exactly LAT cycles after the accepting cycle, in order. Writes
// take effect at the accepting edge. The array mem is public to the testbench,
// which fills and checks it by hierarchical reference. stall_cycles counts
// cycles in which a request waited.
module ext_mem_model
  import ccu_pkg::*;
#(
  parameter int unsigned WORDS     = 1 << 16,
  parameter int unsigned LAT       = 2,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req,
  input  logic  we,
  input  addr_t addr,
  input  data_t wdata,
  output logic  gnt,
  output logic  rvalid,
  output data_t rdata
);

  data_t       mem [WORDS];
  logic        pv [LAT];
  data_t       pd [LAT];
  logic        stall;
  int unsigned stall_cycles;

  assign gnt    = !stall;
  assign rvalid = pv[LAT-1];
  assign rdata  = pd[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stall        <= 1'b0;
      stall_cycles <= 0;
      for (int i = 0; i < LAT; i++) begin
        pv[i] <= 1'b0;
        pd[i] <= '0;
      end
    end else begin
      stall <= ($urandom % 100) < STALL_PCT;
      if (req && !gnt) stall_cycles <= stall_cycles + 1;
      pv[0] <= req && gnt && !we;
      pd[0] <= mem[addr % WORDS];
      for (int i = 1; i < LAT; i++) begin
        pv[i] <= pv[i-1];
        pd[i] <= pd[i-1];
      end
      if (req && gnt && we) mem[addr % WORDS] <= wdata;
    end
  end

endmodule
