// cgra_lm: private 256x32 (1 kB) local data memory of one LSU.
//
// A standard-cell memory: write is synchronous (we, addr, wdata at the
// clock edge), read is combinational at addr, so an LSU can load a word and
// register it in the same cycle. Contents are not reset. The size follows
// the chip; the single shared read/write address is this design's choice.
module cgra_lm
  import bw_pkg::*;
#(
  parameter int unsigned WORDS = LM_WORDS
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  word_t                    wdata,
  output word_t                    rdata
);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
