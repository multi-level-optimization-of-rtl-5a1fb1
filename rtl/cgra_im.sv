// cgra_im: 256x12 instruction memory with its fetch stage (IFID) of the CGRA.
//
// The program loader writes instructions through wr_en/wr_addr/wr_data
// before a kernel runs; the kernel stays resident for later runs. During
// execution the memory is read combinationally at the shared program counter
// pc (a standard-cell memory, so no read latency) and the fetched word goes
// out on instr to the instruction network. While the fabric is not running
// (run low) it presents a NOP (all zero), so no FU acts on stale words.
// Depth and width follow the chip; the NOP-when-idle rule is this design's own.
module cgra_im
  import bw_pkg::*;
(
  input  logic            clk,
  input  logic            run,
  input  logic [PC_W-1:0] pc,
  input  logic            wr_en,
  input  logic [PC_W-1:0] wr_addr,
  input  instr_t          wr_data,
  output instr_t          instr
);
  instr_t mem [IM_DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign instr = run ? mem[pc] : '0;
endmodule
