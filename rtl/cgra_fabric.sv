// cgra_fabric: the Blocks-style coarse-grained reconfigurable array.
//
// 21 functional units laid out as on the chip: 4 LSUs (each with a 1 kB
// local memory), 9 ALUs, 4 multipliers, one register file, one branch unit
// (ABU) and two immediate units (IU, each with a 256x33 instruction memory),
// plus nine 256x12 instruction memories. One program counter, kept by the
// ABU, is shared by all instruction memories, so the fabric executes one
// wide instruction per cycle (VLIW). The instruction network lets several
// FUs take the same instruction memory (SIMD); the data network routes any
// FU's registered output to any FU operand (register-file bypass and
// spatial pipelines). Both networks are configured by one fu_cfg_t per FU,
// written through cfg_we before a kernel runs; instructions are written
// through im_we. The configuration registers reset to "no source / NOP".
//
// Timing: start begins execution at pc 0 in the next cycle; every FU
// result appears one cycle after its instruction; a global load or store
// stalls the whole fabric until the DMEM access completes (stall); HALT
// ends the run and pulses done. gmem_req/gmem_rsp is the global memory
// data interface towards the shared DMEM.
module cgra_fabric
  import bw_pkg::*;
#(
  parameter logic [31:0] GMEM_BASE = 32'h0010_0000
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_we,
  input  logic [4:0]      cfg_idx,
  input  fu_cfg_t         cfg_data,
  input  logic            im_we,
  input  logic [3:0]      im_idx,
  input  logic [PC_W-1:0] im_addr,
  input  imm_instr_t      im_data,
  input  logic            start,
  output logic            running,
  output logic            done,
  output logic            stall,
  output bus_req_t        gmem_req,
  input  bus_rsp_t        gmem_rsp
);
  fu_cfg_t         cfg      [NUM_FU];
  word_t           fu_out   [NUM_FU];
  word_t           op_a     [NUM_FU];
  word_t           op_b     [NUM_FU];
  instr_t          im_instr [NUM_IM12];
  instr_t          fu_instr [NUM_FU];
  gmem_req_t       lsu_req  [NUM_LSU];
  word_t           lsu_rdata[NUM_LSU];
  logic [PC_W-1:0] pc;
  logic            en;

  localparam int LSU_IDX [NUM_LSU] = '{0, 5, 10, 15};
  localparam int ALU_IDX [9]       = '{1, 3, 6, 8, 11, 13, 16, 18, 19};
  localparam int MUL_IDX [4]       = '{2, 7, 12, 17};

  assign en = running && !stall;

  // ---------------- configuration registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_FU); i++) cfg[i] <= '{im_sel: '1, src_b: '1, src_a: '1};
    end else if (cfg_we && int'(cfg_idx) < int'(NUM_FU)) begin
      cfg[cfg_idx] <= cfg_data;
    end
  end

  // ---------------- instruction memories and networks ----------------
  for (genvar m = 0; m < int'(NUM_IM12); m++) begin : g_im
    cgra_im u_im (
      .clk    (clk),
      .run    (running),
      .pc     (pc),
      .wr_en  (im_we && int'(im_idx) == m),
      .wr_addr(im_addr),
      .wr_data(im_data[INSTR_W-1:0]),
      .instr  (im_instr[m])
    );
  end

  cgra_instr_net u_inet (.im_instr(im_instr), .cfg(cfg), .fu_instr(fu_instr));
  cgra_data_net  u_dnet (.fu_out(fu_out), .cfg(cfg), .op_a(op_a), .op_b(op_b));

  // ---------------- functional units ----------------
  for (genvar k = 0; k < int'(NUM_LSU); k++) begin : g_lsu
    cgra_lsu u_lsu (
      .clk       (clk),
      .rst_n     (rst_n),
      .run       (running),
      .en        (en),
      .instr     (fu_instr[LSU_IDX[k]]),
      .a         (op_a[LSU_IDX[k]]),
      .b         (op_b[LSU_IDX[k]]),
      .out       (fu_out[LSU_IDX[k]]),
      .gmem_req  (lsu_req[k]),
      .gmem_rdata(lsu_rdata[k])
    );
  end

  for (genvar k = 0; k < 9; k++) begin : g_alu
    cgra_alu u_alu (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .instr(fu_instr[ALU_IDX[k]]),
      .a    (op_a[ALU_IDX[k]]),
      .b    (op_b[ALU_IDX[k]]),
      .out  (fu_out[ALU_IDX[k]])
    );
  end

  for (genvar k = 0; k < 4; k++) begin : g_mul
    cgra_mul u_mul (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .instr(fu_instr[MUL_IDX[k]]),
      .a    (op_a[MUL_IDX[k]]),
      .b    (op_b[MUL_IDX[k]]),
      .out  (fu_out[MUL_IDX[k]])
    );
  end

  cgra_rf u_rf (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .instr(fu_instr[FU_RF]),
    .a    (op_a[FU_RF]),
    .out  (fu_out[FU_RF])
  );

  cgra_abu u_abu (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .en     (en),
    .instr  (fu_instr[FU_ABU]),
    .a      (op_a[FU_ABU]),
    .pc     (pc),
    .running(running),
    .done   (done),
    .out    (fu_out[FU_ABU])
  );

  cgra_iu u_iu0 (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .pc     (pc),
    .wr_en  (im_we && im_idx == 4'd9),
    .wr_addr(im_addr),
    .wr_data(im_data),
    .out    (fu_out[FU_IU0])
  );

  cgra_iu u_iu1 (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .pc     (pc),
    .wr_en  (im_we && im_idx == 4'd10),
    .wr_addr(im_addr),
    .wr_data(im_data),
    .out    (fu_out[FU_IU1])
  );

  // ---------------- global memory data interface ----------------
  cgra_gmem_if #(.BASE(GMEM_BASE)) u_gmem (
    .clk      (clk),
    .rst_n    (rst_n),
    .lsu_req  (lsu_req),
    .lsu_rdata(lsu_rdata),
    .stall    (stall),
    .bus_req  (gmem_req),
    .bus_rsp  (gmem_rsp)
  );

  // Configuration and instruction memories must not change under a running kernel.
  assert property (@(posedge clk) disable iff (!rst_n) running |-> !(cfg_we || im_we));
endmodule
