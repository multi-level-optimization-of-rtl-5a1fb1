// tb_dwt_workload: runs a full db4 wavelet decomposition, one of the
// evaluated feature kernels, on the complete SoC at its default sizes.
//
// A 256-sample channel is split, level by level, into approximation (lo) and
// detail (hi) halves with the 8-tap Daubechies-4 filter pair, until 8 + 8
// coefficients are left (5 levels: 256, 128, 64, 32, 16 inputs). The signal
// is extended periodically: before each level the kernel copies the first 6
// inputs behind the last one. Coefficients are Q15, every product is shifted
// right by 15 and summed in 32 bits:
//   lo[m] = sum_k (h[k] * x[2m+k]) >>> 15,  hi[m] = sum_k (g[k] * x[2m+k]) >>> 15
// with g[k] = (-1)^k h[7-k]. The testbench checks every detail coefficient
// of every level, the final approximation, and the cycle count.
//
// DMEM words: the input of level L (for L >= 1 the lo output of level L-1)
// at 512L, followed by its periodic extension; the hi output of level L-1 at
// 512L + 192, clear of that extension.
// Mapping: ALU0 input pointer (+2 per output), ALU1 output pointer; LSU0
// loads x[2m+k] (field k); MUL0/MUL1 (one IM) multiply by IU0 = h[k] and
// IU1 = g[k]; ALU2/ALU3 (one IM) accumulate both paths; LSU1 / LSU3 store lo
// and hi; LSU2 writes the periodic extension; the ABU runs one counted loop
// per level (the level loop is unrolled).
module tb_dwt_workload;
  import bw_pkg::*;
  import tb_kernel_pkg::*;
  localparam logic [31:0] DMEM = 32'h0010_0000, CPMEM = 32'h0020_0000,
                          CTRL = 32'h0030_0000;
  localparam int N = 256;
  localparam int LEVELS = 5;
  localparam int TAPS = 8;
  localparam int Q = 15;
  localparam int HI = 192;      // hi output offset from the lo output
  localparam real H [TAPS] = '{0.2303778133088964, 0.7148465705529154, 0.6308807679298587,
                               -0.0279837694168599, -0.1870348117190931, 0.0308413818355607,
                               0.0328830116668852, -0.0105974017850690};
  logic clk = 0, rst_n = 0;
  bus_req_t core_instr_req, core_data_req, periph_req;
  bus_rsp_t core_instr_rsp, core_data_rsp, periph_rsp;
  logic cgra_irq, cgra_busy;
  int checks = 0, failures = 0;
  int n_loop = 0, n_stall = 0, n_mac = 0;
  logic [31:0] h [TAPS], g [TAPS];

  brainwave_top dut (.*);
  always #5 clk = ~clk;

  assign periph_rsp = '{gnt: periph_req.req, rvalid: 1'b0, rdata: 32'd0};

  always @(negedge clk) if (rst_n) begin
    if (dut.u_cgra.en && dut.u_cgra.fu_instr[FU_ABU][11:8] == 4'(ABU_DBNZ)
        && dut.u_cgra.u_abu.cnt_dec != 0) n_loop++;
    if (dut.u_cgra.stall) n_stall++;
    if (dut.u_cgra.en && dut.u_cgra.fu_instr[FU_ALU2][11:8] == 4'(ALU_ACC)) n_mac++;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic int base(int lvl);
    return 512 * lvl;
  endfunction

  function automatic logic [31:0] qmul(logic [31:0] x, logic [31:0] c);
    logic signed [63:0] p;
    p = $signed(x) * $signed(c);
    return 32'(p >>> Q);
  endfunction

  function automatic void build_dwt(cgra_kernel k);
    int r, n;
    k.cfg[FU_ALU0] = cfgw(FU_ALU0, FU_IU0, 0);
    k.cfg[FU_ALU1] = cfgw(FU_ALU1, FU_IU1, 1);
    k.cfg[FU_LSU0] = cfgw(FU_ALU0, 31, 2);
    k.cfg[FU_LSU2] = cfgw(FU_ALU1, FU_LSU0, 3);
    k.cfg[FU_MUL0] = cfgw(FU_LSU0, FU_IU0, 4);
    k.cfg[FU_MUL1] = cfgw(FU_LSU0, FU_IU1, 4);
    k.cfg[FU_ALU2] = cfgw(FU_MUL0, 31, 5);
    k.cfg[FU_ALU3] = cfgw(FU_MUL1, 31, 5);
    k.cfg[FU_LSU1] = cfgw(FU_ALU1, FU_ALU2, 6);
    k.cfg[FU_LSU3] = cfgw(FU_ALU1, FU_ALU3, 7);
    k.cfg[FU_ABU]  = cfgw(FU_IU0, 31, 8);
    r = 0;
    for (int lvl = 0; lvl < LEVELS; lvl++) begin
      n = N >> lvl;
      // periodic extension: x[n + j] = x[j], j < TAPS - 2
      k.iu[0][r] = {1'b1, 32'(base(lvl))};
      k.iu[1][r] = {1'b1, 32'(base(lvl) + n)};
      k.im[0][r + 1] = ins(ALU_PASSB, 0);
      k.im[1][r + 1] = ins(ALU_PASSB, 0);
      r += 2;
      for (int j = 0; j < TAPS - 2; j++) begin
        k.im[2][r + j]     = ins(LSU_LDG, j);
        k.im[3][r + j + 1] = ins(LSU_STG, j);
      end
      r += TAPS - 1;
      k.iu[1][r] = {1'b1, 32'(base(lvl + 1))};
      k.iu[0][r] = {1'b1, 32'(n / 2)};
      k.im[1][r + 1] = ins(ALU_PASSB, 0);
      k.im[8][r + 1] = ins(ABU_LDC, 0);
      r += 2;
      // one lo/hi output pair per iteration
      for (int t = 0; t < TAPS; t++) begin
        k.im[2][r + t] = ins(LSU_LDG, t);
        k.iu[0][r + t] = {1'b1, h[t]};
        k.iu[1][r + t] = {1'b1, g[t]};
        k.im[4][r + t + 1] = ins(MUL_MULSR, Q);
        k.im[5][r + t + 2] = ins((t == 0) ? ALU_PASSA : ALU_ACC, 0);
      end
      k.im[6][r + TAPS + 2] = ins(LSU_STG, 0);
      k.im[7][r + TAPS + 2] = ins(LSU_STG, HI);
      k.im[0][r + TAPS + 2] = ins(ALU_ADDI, 2);
      k.im[1][r + TAPS + 2] = ins(ALU_ADDI, 1);
      k.im[8][r + TAPS + 2] = ins(ABU_DBNZ, r);
      r += TAPS + 3;
    end
    k.im[8][r] = ins(ABU_HALT, 0);
    k.rows = r + 1;
  endfunction

  initial begin
    automatic cgra_kernel k = new();
    logic [31:0] img [$];
    logic [31:0] x [N + TAPS], lo [N], hi, d, cyc;
    int guard, exp_cyc, n, bad;
    core_instr_req = '0; core_data_req = '0;
    for (int t = 0; t < TAPS; t++) begin
      h[t] = 32'(int'($floor(H[t] * (1 << Q) + 0.5)));
      g[t] = 32'(int'($floor(((t % 2 != 0) ? -H[TAPS - 1 - t] : H[TAPS - 1 - t]) * (1 << Q) + 0.5)));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int i = 0; i < N; i++) begin
      x[i] = 32'($signed(12'($urandom)));
      wr(DMEM + 32'(4 * i), x[i]);
    end
    build_dwt(k);
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
    rd(CTRL + 32'h10, cyc);
    // per level: 11 setup rows and 12 global accesses; per output pair
    // 11 rows and 10 global accesses; 2 cycles per access; HALT
    exp_cyc = 1;
    for (int lvl = 0; lvl < LEVELS; lvl++) exp_cyc += 11 + 2 * 12 + (N >> (lvl + 1)) * (11 + 2 * 10);
    chk(cyc == 32'(exp_cyc), $sformatf("cycles %0d exp %0d", cyc, exp_cyc));
    $display("db4 DWT, %0d samples, %0d levels: %0d CGRA cycles", N, LEVELS, cyc);

    bad = 0;
    for (int lvl = 0; lvl < LEVELS; lvl++) begin
      n = N >> lvl;
      for (int j = 0; j < TAPS - 2; j++) x[n + j] = x[j];
      for (int m = 0; m < n / 2; m++) begin
        lo[m] = 0; hi = 0;
        for (int t = 0; t < TAPS; t++) begin
          lo[m] += qmul(x[2 * m + t], h[t]);
          hi    += qmul(x[2 * m + t], g[t]);
        end
        rd(DMEM + 32'(4 * (base(lvl + 1) + HI + m)), d);
        checks++;
        if (d !== hi) begin
          failures++;
          if (bad++ < 8) $display("FAIL level %0d hi[%0d] = %h exp %h", lvl, m, d, hi);
        end
      end
      for (int m = 0; m < n / 2; m++) x[m] = lo[m];
    end
    for (int m = 0; m < (N >> LEVELS); m++) begin
      rd(DMEM + 32'(4 * (base(LEVELS) + m)), d);
      chk(d == x[m], $sformatf("final lo[%0d] = %h exp %h", m, d, x[m]));
    end
    $display("mechanisms: loop %0d stall %0d mac %0d", n_loop, n_stall, n_mac);
    chk(n_loop == N - (N >> LEVELS) - LEVELS, "output loop iterations");
    chk(n_mac == (N - (N >> LEVELS)) * (TAPS - 1), "accumulate steps");
    chk(n_stall > 0, "global-memory stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
