// cgra_alu: arithmetic/logic functional unit of the CGRA.
//
// Each enabled cycle it executes the 12-bit instruction it receives over the
// instruction network on the two operands a and b it receives over the data
// network, and registers the 32-bit result on out, which the data network
// makes visible to other FUs in the next cycle (register-file bypass).
// ALU_NOP, or en low (stall or idle fabric), holds out. ALU_ACC accumulates
// a into out; ALU_ADDI adds the sign-extended 8-bit field to a;
// ALU_PASSB copies b (used to load an initial value from another FU).
// The presence of ALUs in the fabric follows the chip; the operation set and
// encoding are this design's own (see bw_pkg).
module cgra_alu
  import bw_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  instr_t instr,
  input  word_t  a,
  input  word_t  b,
  output word_t  out
);
  alu_op_e op;
  word_t   imm;
  word_t   res;
  word_t   diff;

  assign op   = alu_op_e'(instr[11:8]);
  assign imm  = {{24{instr[7]}}, instr[7:0]};
  assign diff = a - b;

  always_comb begin
    unique case (op)
      ALU_ADD:     res = a + b;
      ALU_SUB:     res = diff;
      ALU_AND:     res = a & b;
      ALU_OR:      res = a | b;
      ALU_XOR:     res = a ^ b;
      ALU_SLT:     res = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:    res = {31'd0, a < b};
      ALU_PASSA:   res = a;
      ALU_MIN:     res = ($signed(a) < $signed(b)) ? a : b;
      ALU_MAX:     res = ($signed(a) < $signed(b)) ? b : a;
      ALU_ACC:     res = out + a;
      ALU_ABSDIFF: res = ($signed(a) < $signed(b)) ? (b - a) : diff;
      ALU_ADDI:    res = a + imm;
      ALU_SEQ:     res = {31'd0, a == b};
      ALU_PASSB:   res = b;
      default:     res = out;  // ALU_NOP
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  out <= '0;
    else if (en) out <= res;
  end
endmodule
