// bw_pkg: types and constants shared by the BrainWave SoC and its Blocks-style CGRA.
//
// The sizes follow the chip: 32-bit data path, 21 functional units (FUs),
// 11 instruction memories of 256 words (nine 12-bit, two 33-bit for the
// immediate units) and four 256x32 local memories. The FU order, the
// instruction encodings and the bus request/response structs are this
// design's own choices, since the chip's ISA is not published with it.
//
// Bus protocol (bus_req_t / bus_rsp_t): a master holds req (with we, be,
// addr, wdata) until gnt is high in the same cycle; for every granted
// access, read or write, rvalid (with rdata for reads) is high exactly one
// cycle later.
package bw_pkg;

  localparam int unsigned DATA_W    = 32;
  localparam int unsigned IM_DEPTH  = 256;
  localparam int unsigned PC_W      = 8;
  localparam int unsigned INSTR_W   = 12;   // FU instruction width (IM 256x12b)
  localparam int unsigned IMM_W     = 33;   // IU instruction width (IM 256x33b)
  localparam int unsigned LM_WORDS  = 256;  // LM 256x32b = 1 kB
  localparam int unsigned NUM_FU    = 21;
  localparam int unsigned NUM_IM12  = 9;    // IMs reachable over the instruction network
  localparam int unsigned NUM_IM    = 11;   // 9 x 12-bit + 2 x 33-bit (inside the IUs)
  localparam int unsigned NUM_LSU   = 4;
  localparam int unsigned SRC_W     = 5;    // data-network source select (21..31 = zero)
  localparam int unsigned IMSEL_W   = 4;    // instruction-network source select (9..15 = NOP)
  localparam int unsigned RF_DEPTH  = 16;
  localparam int unsigned WORDS_PER_ROW = NUM_IM12 + 2 * 2;  // loader image words per PC row

  // FU index map, row by row as laid out in the fabric (two rows per logic domain).
  typedef enum logic [4:0] {
    FU_LSU0 = 5'd0,  FU_ALU0 = 5'd1,  FU_MUL0 = 5'd2,  FU_ALU1 = 5'd3,  FU_IU0  = 5'd4,
    FU_LSU1 = 5'd5,  FU_ALU2 = 5'd6,  FU_MUL1 = 5'd7,  FU_ALU3 = 5'd8,  FU_ABU  = 5'd9,
    FU_LSU2 = 5'd10, FU_ALU4 = 5'd11, FU_MUL2 = 5'd12, FU_ALU5 = 5'd13, FU_RF   = 5'd14,
    FU_LSU3 = 5'd15, FU_ALU6 = 5'd16, FU_MUL3 = 5'd17, FU_ALU7 = 5'd18, FU_ALU8 = 5'd19,
    FU_IU1  = 5'd20, FU_ZERO = 5'd31
  } fu_id_e;

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [INSTR_W-1:0] instr_t;   // [11:8] opcode, [7:0] field
  typedef logic [IMM_W-1:0]   imm_instr_t; // [32] load, [31:0] value

  // Per-FU network configuration word, as loaded by the program loader.
  typedef struct packed {
    logic [IMSEL_W-1:0] im_sel;  // [13:10]
    logic [SRC_W-1:0]   src_b;   // [9:5]
    logic [SRC_W-1:0]   src_a;   // [4:0]
  } fu_cfg_t;

  typedef enum logic [3:0] {
    ALU_NOP = 4'd0, ALU_ADD = 4'd1, ALU_SUB = 4'd2, ALU_AND = 4'd3,
    ALU_OR  = 4'd4, ALU_XOR = 4'd5, ALU_SLT = 4'd6, ALU_SLTU = 4'd7,
    ALU_PASSA = 4'd8, ALU_MIN = 4'd9, ALU_MAX = 4'd10, ALU_ACC = 4'd11,
    ALU_ABSDIFF = 4'd12, ALU_ADDI = 4'd13, ALU_SEQ = 4'd14, ALU_PASSB = 4'd15
  } alu_op_e;

  typedef enum logic [3:0] {
    MUL_NOP = 4'd0, MUL_MUL = 4'd1, MUL_MULH = 4'd2, MUL_SLL = 4'd3,
    MUL_SRL = 4'd4, MUL_SRA = 4'd5, MUL_SRAI = 4'd6, MUL_MULSR = 4'd7
  } mul_op_e;

  typedef enum logic [3:0] {
    LSU_NOP = 4'd0, LSU_LDG = 4'd1, LSU_STG = 4'd2, LSU_LDL = 4'd3, LSU_STL = 4'd4
  } lsu_op_e;

  typedef enum logic [3:0] {
    RF_NOP = 4'd0, RF_RD = 4'd1, RF_WR = 4'd2, RF_RDWR = 4'd3
  } rf_op_e;

  typedef enum logic [3:0] {
    ABU_NOP = 4'd0, ABU_JMP = 4'd1, ABU_BNZ = 4'd2, ABU_BZ = 4'd3,
    ABU_HALT = 4'd4, ABU_LDC = 4'd5, ABU_DBNZ = 4'd6
  } abu_op_e;

  typedef struct packed {
    logic        req;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [31:0] rdata;
  } bus_rsp_t;

  // LSU request towards the global memory interface (word address in DMEM).
  typedef struct packed {
    logic        req;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
  } gmem_req_t;

endpackage
