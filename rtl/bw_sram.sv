// bw_sram: single-port on-chip SRAM (RISC-V PMEM, shared DMEM, CGRA PMEM).
//
// A bus slave on the SoC interconnect: always grants, and answers every
// granted access one cycle later with rvalid (and rdata for reads), like a
// synchronous SRAM macro with a registered read. Byte enables select which
// bytes a write changes. BYTES sets the capacity (32 kB by default); the
// address is taken modulo the capacity. Contents are not reset. The sizes
// follow the chip (32 + 32 + 16 kB foundry SRAM); this array stands in for
// the foundry macro.
module bw_sram
  import bw_pkg::*;
#(
  parameter int unsigned BYTES = 32 * 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  word_t          mem [WORDS];
  logic [AW-1:0]  waddr;

  assign waddr   = req.addr[AW+1:2];
  assign rsp.gnt = req.req;

  always_ff @(posedge clk) begin
    if (req.req && req.we) begin
      for (int b = 0; b < 4; b++) begin
        if (req.be[b]) mem[waddr][8*b +: 8] <= req.wdata[8*b +: 8];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp.rvalid <= 1'b0;
      rsp.rdata  <= '0;
    end else begin
      rsp.rvalid <= req.req;
      if (req.req && !req.we) rsp.rdata <= mem[waddr];
    end
  end
endmodule
