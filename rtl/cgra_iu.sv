// cgra_iu: immediate unit of the CGRA with its own 256x33 instruction memory.
//
// The IU feeds constants into the data network. Its instruction memory is
// written by the program loader (wr_en, wr_addr, wr_data) and read
// combinationally at the shared program counter pc, as a standard-cell
// memory allows. When the fetched instruction has bit 32 set and en is high,
// bits [31:0] are registered on out; otherwise out holds. The 256x33b memory
// beside the IU follows the chip; the instruction format is this design's own.
module cgra_iu
  import bw_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [PC_W-1:0]  pc,
  input  logic             wr_en,
  input  logic [PC_W-1:0]  wr_addr,
  input  imm_instr_t       wr_data,
  output word_t            out
);
  imm_instr_t mem [IM_DEPTH];
  imm_instr_t cur;

  assign cur = mem[pc];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             out <= '0;
    else if (en && cur[32]) out <= cur[31:0];
  end
endmodule
