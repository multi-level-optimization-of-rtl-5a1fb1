// tb_matmul_workload: runs the 32x32 16-bit fixed-point matrix multiply of
// the evaluated kernel set on the complete SoC at its default sizes.
//
// The testbench plays the RISC-V core: it writes A, B (signed 16-bit Q15
// values, one per 32-bit word) and a CGRA kernel image over the core data
// port, LOADs and STARTs the kernel, waits for the interrupt and compares C
// with a reference model, C[i][j] = sum_k (A[i][k] * B[k][j]) >>> 15, in
// 32-bit arithmetic.
//
// DMEM word layout (chosen so that every pointer is the output pointer
// masked with a constant): A[i][k] at 32i+k, B[k][j] at 2048+32k+j,
// C[i][j] at 3072+32i+j.
//
// Kernel (44 rows, two output columns per iteration in SIMD):
//   ALU4  p_c = 3072 + 2t, t = 0..511 (one iteration per column pair)
//   ALU0  p_a = p_c & 0x3E0 (row i of A);  ALU8 = p_c & 0x81F (column j of B)
//         or p_c & 0xFFF (store address); both on one IM
//   ALU1  B pointer, +32 per k;  LSU0 loads A[i][k] (field k), LSU1 and
//         LSU2 load B[k][j] and B[k][j+1] (fields 0 and 1)
//   MUL0/MUL1 (one IM) Q15 products, ALU2/ALU3 (one IM) accumulators
//   LSU1 stores both sums (ALU3 is shifted into ALU2 between the stores)
//   ABU   512-iteration counted loop (LDC/DBNZ), no branch overhead rows
// The k loop is unrolled and software-pipelined: load k, multiply k-1 and
// accumulate k-2 share one row. Every unrolled row issues three global
// loads, so the fabric stalls on the shared DMEM: the expected run length
// is rows + 2 cycles per global access, checked exactly when the core
// leaves the DMEM alone. The cycle count is printed for comparison.
module tb_matmul_workload;
  import bw_pkg::*;
  import tb_kernel_pkg::*;
  localparam logic [31:0] DMEM = 32'h0010_0000, CPMEM = 32'h0020_0000,
                          CTRL = 32'h0030_0000;
  localparam int N = 32;
  localparam int ITERS = N * N / 2;
  logic clk = 0, rst_n = 0;
  bus_req_t core_instr_req, core_data_req, periph_req;
  bus_rsp_t core_instr_rsp, core_data_rsp, periph_rsp;
  logic cgra_irq, cgra_busy;
  int checks = 0, failures = 0;
  int n_simd = 0, n_stall = 0, n_loop = 0, n_gmem = 0;

  brainwave_top dut (.*);
  always #5 clk = ~clk;

  assign periph_rsp = '{gnt: periph_req.req, rvalid: 1'b0, rdata: 32'd0};

  always @(negedge clk) if (rst_n) begin
    if (dut.u_cgra.running && dut.u_cgra.lsu_req[1].req && dut.u_cgra.lsu_req[2].req) n_simd++;
    if (dut.u_cgra.stall) n_stall++;
    if (dut.u_cgra.en && dut.u_cgra.fu_instr[FU_ABU][11:8] == 4'(ABU_DBNZ)
        && dut.u_cgra.u_abu.cnt_dec != 0) n_loop++;
    if (dut.m_req[2].req && dut.m_rsp[2].gnt) n_gmem++;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    core_data_req = '{req: 1, we: 1, be: 4'hF, addr: a, wdata: d};
    #1;
    while (!core_data_rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    core_data_req.req = 0;
  endtask

  task automatic rd(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    core_data_req = '{req: 1, we: 0, be: 4'hF, addr: a, wdata: 0};
    #1;
    while (!core_data_rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    core_data_req.req = 0;
    d = core_data_rsp.rdata;
  endtask

  function automatic void build_matmul(cgra_kernel k);
    int b;
    k.cfg[FU_LSU0] = cfgw(FU_ALU0, 31, 0);
    k.cfg[FU_LSU1] = cfgw(FU_ALU1, FU_ALU2, 1);
    k.cfg[FU_LSU2] = cfgw(FU_ALU1, 31, 2);
    k.cfg[FU_MUL0] = cfgw(FU_LSU0, FU_LSU1, 3);
    k.cfg[FU_MUL1] = cfgw(FU_LSU0, FU_LSU2, 3);
    k.cfg[FU_ALU2] = cfgw(FU_MUL0, FU_ALU3, 4);
    k.cfg[FU_ALU3] = cfgw(FU_MUL1, 31, 4);
    k.cfg[FU_ALU0] = cfgw(FU_ALU4, FU_IU0, 5);
    k.cfg[FU_ALU8] = cfgw(FU_ALU4, FU_IU1, 5);
    k.cfg[FU_ALU1] = cfgw(FU_ALU1, FU_ALU8, 6);
    k.cfg[FU_ALU4] = cfgw(FU_ALU4, FU_IU0, 7);
    k.cfg[FU_ABU]  = cfgw(FU_IU0, 31, 8);
    // prologue
    k.iu[0][0] = {1'b1, 32'd3072};
    k.iu[1][0] = {1'b1, 32'h81F};
    k.im[7][1] = ins(ALU_PASSB, 0);            // p_c = 3072
    k.im[4][1] = ins(ALU_PASSB, 0);            // clear accumulators
    k.iu[0][1] = {1'b1, 32'(ITERS)};
    k.im[8][2] = ins(ABU_LDC, 0);
    k.im[4][2] = ins(ALU_PASSB, 0);
    k.iu[0][2] = {1'b1, 32'h3E0};
    k.im[5][3] = ins(ALU_AND, 0);              // p_a, B column pointer
    // loop body
    b = 4;
    k.im[6][b] = ins(ALU_PASSB, 0);            // B pointer = column j
    for (int kk = 0; kk < N; kk++) begin
      k.im[0][b + 1 + kk] = ins(LSU_LDG, kk);
      k.im[1][b + 1 + kk] = ins(LSU_LDG, 0);
      k.im[2][b + 1 + kk] = ins(LSU_LDG, 1);
      k.im[6][b + 1 + kk] = ins(ALU_ADDI, N);
      k.im[3][b + 2 + kk] = ins(MUL_MULSR, 15);
      k.im[4][b + 3 + kk] = ins(ALU_ACC, 0);
    end
    k.iu[1][b + 33] = {1'b1, 32'hFFF};
    k.im[5][b + 34] = ins(ALU_AND, 0);         // ALU8 = store address
    k.im[6][b + 35] = ins(ALU_PASSB, 0);
    k.im[7][b + 35] = ins(ALU_ADDI, 2);        // next column pair
    k.iu[1][b + 35] = {1'b1, 32'h81F};
    k.im[1][b + 36] = ins(LSU_STG, 0);         // C[i][j]
    k.im[4][b + 37] = ins(ALU_PASSB, 0);       // ALU2 <- ALU3, ALU3 <- 0
    k.im[5][b + 37] = ins(ALU_AND, 0);         // pointers of the next pair
    k.im[1][b + 38] = ins(LSU_STG, 1);         // C[i][j+1]
    k.im[4][b + 38] = ins(ALU_PASSB, 0);
    k.im[8][b + 38] = ins(ABU_DBNZ, b);
    k.im[8][b + 39] = ins(ABU_HALT, 0);
    k.rows = b + 40;
  endfunction

  initial begin
    automatic cgra_kernel k = new();
    logic [31:0] img [$];
    logic [31:0] a [N][N], bm [N][N], c, d, cyc;
    logic signed [63:0] p;
    int guard, exp_cyc, bad;
    core_instr_req = '0; core_data_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[i][j]  = 32'($signed(16'($urandom)));
        bm[i][j] = 32'($signed(16'($urandom)));
        if (i == 0 && j < 2) begin a[i][j] = 32'hFFFF_8000; bm[i][j] = 32'hFFFF_8000; end
        wr(DMEM + 32'(4 * (32 * i + j)), a[i][j]);
        wr(DMEM + 32'(4 * (2048 + 32 * i + j)), bm[i][j]);
        wr(DMEM + 32'(4 * (3072 + 32 * i + j)), 32'hDEAD_BEEF);
      end
    build_matmul(k);
    k.image(img);
    foreach (img[i]) wr(CPMEM + 32'(4 * i), img[i]);

    wr(CTRL + 32'h08, CPMEM);
    wr(CTRL + 32'h0C, k.rows);
    wr(CTRL + 32'h00, 32'h1);
    guard = 0;
    do begin rd(CTRL + 32'h04, d); guard++; end while (d[0] && guard < 5000);
    chk(!d[0], "kernel loaded");
    wr(CTRL + 32'h00, 32'h2);
    while (!cgra_irq) @(negedge clk);
    rd(CTRL + 32'h04, d); chk(d[2] && !d[1], "STATUS done after run");
    rd(CTRL + 32'h10, cyc);
    // rows fetched + 2 cycles per global access
    exp_cyc = 4 + ITERS * (k.rows - 4 - 1) + 1 + 2 * ITERS * (3 * N + 2);
    chk(cyc == 32'(exp_cyc), $sformatf("cycles %0d exp %0d", cyc, exp_cyc));
    chk(n_gmem == ITERS * (3 * N + 2), $sformatf("global accesses %0d", n_gmem));
    $display("matmul %0dx%0d: %0d CGRA cycles, %0d global accesses", N, N, cyc, n_gmem);

    bad = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        c = 0;
        for (int kk = 0; kk < N; kk++) begin
          p = $signed(a[i][kk]) * $signed(bm[kk][j]);
          c += 32'(p >>> 15);
        end
        rd(DMEM + 32'(4 * (3072 + 32 * i + j)), d);
        checks++;
        if (d !== c) begin
          failures++;
          if (bad++ < 8) $display("FAIL C[%0d][%0d] = %h exp %h", i, j, d, c);
        end
      end

    $display("mechanisms: simd %0d stall %0d loop %0d gmem %0d", n_simd, n_stall, n_loop, n_gmem);
    chk(n_simd > 0, "SIMD loads");
    chk(n_stall > 0, "global-memory stall");
    chk(n_loop == ITERS - 1, "loop iterations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
