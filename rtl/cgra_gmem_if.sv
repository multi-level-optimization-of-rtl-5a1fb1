// cgra_gmem_if: global memory data interface between the CGRA's LSUs and
// the shared DMEM.
//
// All LSUs that issue a global load or store in the same instruction
// (lsu_req[i].req) are served one after another over a single bus master,
// lowest LSU index first. While any of them is unserved, stall is high and
// the fabric holds its state. Each access is one bus transaction: request
// until gnt, then wait for rvalid; read data is buffered per LSU on
// lsu_rdata. In the cycle after the last response stall drops, the fabric
// commits the instruction (the LSUs take lsu_rdata) and the served set is
// cleared. LSU word address w maps to bus byte address BASE + 4*w.
// That the LSUs share one master port to the DMEM follows the chip; the
// serialisation order and timing are this design's own.
module cgra_gmem_if
  import bw_pkg::*;
#(
  parameter logic [31:0] BASE = 32'h0010_0000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  gmem_req_t lsu_req   [NUM_LSU],
  output word_t     lsu_rdata [NUM_LSU],
  output logic      stall,
  output bus_req_t  bus_req,
  input  bus_rsp_t  bus_rsp
);
  logic [NUM_LSU-1:0] req_mask, done_mask, pending;
  logic               wait_rv;
  logic [1:0]         cur, sel;

  always_comb begin
    for (int i = 0; i < int'(NUM_LSU); i++) req_mask[i] = lsu_req[i].req;
  end
  assign pending = req_mask & ~done_mask;
  assign stall   = |pending;

  always_comb begin
    sel = '0;
    for (int i = int'(NUM_LSU) - 1; i >= 0; i--) begin
      if (pending[i]) sel = 2'(i);
    end
  end

  assign bus_req.req   = stall && !wait_rv;
  assign bus_req.we    = lsu_req[sel].we;
  assign bus_req.be    = 4'hF;
  assign bus_req.addr  = BASE + {lsu_req[sel].addr[29:0], 2'b00};
  assign bus_req.wdata = lsu_req[sel].wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_mask <= '0;
      wait_rv   <= 1'b0;
      cur       <= '0;
      for (int i = 0; i < int'(NUM_LSU); i++) lsu_rdata[i] <= '0;
    end else begin
      if (bus_req.req && bus_rsp.gnt) begin
        wait_rv <= 1'b1;
        cur     <= sel;
      end
      if (wait_rv && bus_rsp.rvalid) begin
        wait_rv        <= 1'b0;
        done_mask[cur] <= 1'b1;
        if (!lsu_req[cur].we) lsu_rdata[cur] <= bus_rsp.rdata;
      end
      if (!stall && (|req_mask)) done_mask <= '0;
    end
  end

  // A response is only expected for an access that was granted.
  assert property (@(posedge clk) disable iff (!rst_n) bus_rsp.rvalid |-> wait_rv);
  // The request stays stable until it is granted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   bus_req.req && !bus_rsp.gnt |=> bus_req.req && $stable(bus_req.addr));
endmodule
