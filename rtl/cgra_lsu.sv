// cgra_lsu: load-store functional unit of the CGRA with its private LM.
//
// Operand a is a word address, extended by the unsigned 8-bit field of the
// instruction (address = a + field); operand b is the store data.
//   LSU_LDL / LSU_STL: read / write the private 1 kB local memory (cgra_lm).
//   LSU_LDG / LSU_STG: read / write the shared DMEM through the global memory
//   interface. The LSU raises gmem_req.req combinationally while such an
//   instruction is fetched (run high); the interface stalls the whole fabric
//   (en low) until the access is done and then presents the loaded word on
//   gmem_rdata in the cycle the instruction commits.
// Loads register their result on out in the committing cycle (en high).
// That each LSU reaches the shared DMEM and a private LM follows the chip;
// the addressing and stall scheme are this design's own.
module cgra_lsu
  import bw_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      run,
  input  logic      en,
  input  instr_t    instr,
  input  word_t     a,
  input  word_t     b,
  output word_t     out,
  output gmem_req_t gmem_req,
  input  word_t     gmem_rdata
);
  lsu_op_e op;
  word_t   addr;
  word_t   lm_rdata;
  logic    lm_we;

  assign op   = lsu_op_e'(instr[11:8]);
  assign addr = a + {24'd0, instr[7:0]};

  assign gmem_req.req   = run && (op == LSU_LDG || op == LSU_STG);
  assign gmem_req.we    = (op == LSU_STG);
  assign gmem_req.addr  = addr;
  assign gmem_req.wdata = b;

  assign lm_we = en && (op == LSU_STL);

  cgra_lm u_lm (
    .clk  (clk),
    .we   (lm_we),
    .addr (addr[$clog2(LM_WORDS)-1:0]),
    .wdata(b),
    .rdata(lm_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else if (en) begin
      if (op == LSU_LDL)      out <= lm_rdata;
      else if (op == LSU_LDG) out <= gmem_rdata;
    end
  end
endmodule
