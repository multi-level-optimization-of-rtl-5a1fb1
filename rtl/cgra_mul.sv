// cgra_mul: multiply/shift functional unit of the CGRA.
//
// Like the other FUs it executes one 12-bit instruction per enabled cycle on
// the data-network operands a and b and registers the result on out (one
// cycle latency). MUL_MUL gives the low 32 bits of a*b, MUL_MULH the high 32
// bits of the signed 64-bit product, MUL_MULSR the signed product shifted
// right arithmetically by the 5-bit field (fixed-point multiply, e.g. for
// biquad coefficients), and the shifts take their amount from b[4:0] or,
// for MUL_SRAI, from the field. That this unit does multiplies and shifts
// follows the chip; the encoding is this design's own (see bw_pkg).
module cgra_mul
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
  mul_op_e            op;
  logic signed [63:0] prod;
  logic signed [63:0] prod_sh;
  word_t              res;

  assign op      = mul_op_e'(instr[11:8]);
  assign prod    = $signed(a) * $signed(b);
  assign prod_sh = prod >>> instr[4:0];

  always_comb begin
    unique case (op)
      MUL_MUL:   res = prod[31:0];
      MUL_MULH:  res = prod[63:32];
      MUL_SLL:   res = a << b[4:0];
      MUL_SRL:   res = a >> b[4:0];
      MUL_SRA:   res = word_t'($signed(a) >>> b[4:0]);
      MUL_SRAI:  res = word_t'($signed(a) >>> instr[4:0]);
      MUL_MULSR: res = prod_sh[31:0];
      default:   res = out;  // MUL_NOP
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  out <= '0;
    else if (en) out <= res;
  end
endmodule
