// cgra_rf: register-file functional unit of the CGRA.
//
// Sixteen 32-bit registers. Instruction [11:8] opcode, [7:4] write address,
// [3:0] read address. RF_WR writes operand a, RF_RD registers the read
// register on out (visible to the data network in the next cycle), RF_RDWR
// does both, reading the old value when the addresses match. Registers are
// cleared on reset. The unit's existence follows the chip; its depth and
// encoding are this design's own.
module cgra_rf
  import bw_pkg::*;
#(
  parameter int unsigned DEPTH = RF_DEPTH
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  instr_t instr,
  input  word_t  a,
  output word_t  out
);
  rf_op_e op;
  word_t  regs [DEPTH];
  logic   do_wr, do_rd;

  assign op    = rf_op_e'(instr[11:8]);
  assign do_wr = en && (op == RF_WR || op == RF_RDWR);
  assign do_rd = en && (op == RF_RD || op == RF_RDWR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
      out <= '0;
    end else begin
      if (do_wr) regs[instr[7:4]] <= a;
      if (do_rd) out <= regs[instr[3:0]];
    end
  end
endmodule
