// bw_xbar: the SoC interconnect joining the core, the CGRA and the memories.
//
// A crossbar between NM bus masters and NS bus slaves (bus_req_t /
// bus_rsp_t, see bw_pkg). Slave s answers addresses with
// (addr & MASK[s]) == BASE[s]. Each slave has its own round-robin arbiter,
// so masters that use different slaves proceed in the same cycle and a
// master that loses waits with its request held. A granted master gets its
// rvalid from the slave it was granted by one cycle later; slaves must
// answer every granted access exactly one cycle after the grant. An address
// no slave decodes is granted by the crossbar itself and answered with
// rdata 0, so a bad access cannot hang a master. On the chip this is an AXI
// interconnect; this design keeps the masters and slaves of that figure but
// uses the simpler request/grant protocol above.
module bw_xbar
  import bw_pkg::*;
#(
  parameter int unsigned NM = 4,
  parameter int unsigned NS = 5,
  parameter logic [31:0] BASE [NS] = '{32'h0000_0000, 32'h0010_0000, 32'h0020_0000,
                                       32'h0030_0000, 32'h1A10_0000},
  parameter logic [31:0] MASK [NS] = '{32'hFFF0_0000, 32'hFFF0_0000, 32'hFFF0_0000,
                                       32'hFFF0_0000, 32'hFFF0_0000}
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req [NM],
  output bus_rsp_t m_rsp [NM],
  output bus_req_t s_req [NS],
  input  bus_rsp_t s_rsp [NS]
);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic [NS:0]   hit      [NM];   // bit NS = unmapped
  logic [MW-1:0] rr_ptr   [NS+1];
  logic [MW-1:0] win      [NS+1];
  logic          win_v    [NS+1];
  logic [MW-1:0] resp_m   [NS+1];
  logic          resp_v   [NS+1];
  logic          err_rvalid;
  logic          granted  [NS+1];

  // Address decode.
  always_comb begin
    for (int m = 0; m < int'(NM); m++) begin
      hit[m] = '0;
      for (int s = 0; s < int'(NS); s++) begin
        hit[m][s] = m_req[m].req && ((m_req[m].addr & MASK[s]) == BASE[s]);
      end
      hit[m][NS] = m_req[m].req && !(|hit[m][NS-1:0]);
    end
  end

  // Round-robin arbitration per slave (index NS is the error responder).
  always_comb begin
    for (int s = 0; s <= int'(NS); s++) begin
      win[s]   = '0;
      win_v[s] = 1'b0;
      for (int k = int'(NM) - 1; k >= 0; k--) begin
        if (hit[(int'(rr_ptr[s]) + k) % int'(NM)][s]) begin
          win[s]   = MW'((int'(rr_ptr[s]) + k) % int'(NM));
          win_v[s] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s <= int'(NS); s++) granted[s] = win_v[s] && ((s == int'(NS)) || s_rsp[s].gnt);
  end

  // Requests to slaves.
  always_comb begin
    for (int s = 0; s < int'(NS); s++) begin
      s_req[s]     = m_req[win[s]];
      s_req[s].req = win_v[s];
    end
  end

  // Grants and responses back to masters.
  always_comb begin
    for (int m = 0; m < int'(NM); m++) begin
      m_rsp[m] = '0;
      for (int s = 0; s <= int'(NS); s++) begin
        if (win_v[s] && int'(win[s]) == m) begin
          m_rsp[m].gnt = (s == int'(NS)) ? 1'b1 : s_rsp[s].gnt;
        end
        if (resp_v[s] && int'(resp_m[s]) == m) begin
          m_rsp[m].rvalid = (s == int'(NS)) ? err_rvalid : s_rsp[s].rvalid;
          m_rsp[m].rdata  = (s == int'(NS)) ? '0 : s_rsp[s].rdata;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= int'(NS); s++) begin
        rr_ptr[s] <= '0;
        resp_m[s] <= '0;
        resp_v[s] <= 1'b0;
      end
      err_rvalid <= 1'b0;
    end else begin
      for (int s = 0; s <= int'(NS); s++) begin
        resp_v[s] <= granted[s];
        if (granted[s]) begin
          resp_m[s] <= win[s];
          rr_ptr[s] <= MW'((int'(win[s]) + 1) % int'(NM));
        end
      end
      err_rvalid <= win_v[NS];
    end
  end

  // Every slave must answer a granted access in the next cycle.
  for (genvar s = 0; s < int'(NS); s++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) resp_v[s] |-> s_rsp[s].rvalid);
  end
endmodule
