// tb_simcheck_workload: runs the similarity-checking kernel of the entropy
// features (ApEn/SampEn), a vector comparison loop with early exit, on the
// complete SoC at its default sizes.
//
// For a series x of N samples and template length M = 2 it counts the pairs
// 0 <= i < j <= N-M whose templates match, i.e. |x[i+k] - x[j+k]| <= R for
// every k < M (Chebyshev distance). The comparison of a pair stops at the
// first component that differs by more than R. The testbench writes x over
// the core data port, runs the kernel, and checks the count and the exact
// cycle count, which depends on where each pair exited and so checks every
// data-dependent branch.
//
// Mapping (one unit per IM, nine IMs):
//   ALU0 / ALU1  pointers i and j;  LSU0 / LSU1 load x[i+k] and x[j+k]
//   ALU2  |x[i+k] - x[j+k]| (ABSDIFF);  ALU4 selects that difference or j
//   ALU3  R < difference (early exit) or N-M < j (end of the j loop), with
//         the bound held in IU0;  the ABU branches on ALU3 (BNZ / BZ)
//   ALU5  match counter; the ABU loop counter runs the i loop (DBNZ)
// Rows per pair: 9 when the first component differs, 14 when the second
// does, 15 on a match, plus 2 cycles for each of the two global loads of
// every compared component.
module tb_simcheck_workload;
  import bw_pkg::*;
  import tb_kernel_pkg::*;
  localparam logic [31:0] DMEM = 32'h0010_0000, CPMEM = 32'h0020_0000,
                          CTRL = 32'h0030_0000;
  localparam int N = 64;
  localparam int M = 2;
  localparam int R = 40;
  localparam int RES = 200;       // DMEM word of the result
  logic clk = 0, rst_n = 0;
  bus_req_t core_instr_req, core_data_req, periph_req;
  bus_rsp_t core_instr_rsp, core_data_rsp, periph_rsp;
  logic cgra_irq, cgra_busy;
  int checks = 0, failures = 0;
  int n_exit = 0, n_loop = 0, n_stall = 0;

  brainwave_top dut (.*);
  always #5 clk = ~clk;

  assign periph_rsp = '{gnt: periph_req.req, rvalid: 1'b0, rdata: 32'd0};

  always @(negedge clk) if (rst_n) begin
    if (dut.u_cgra.en && dut.u_cgra.fu_instr[FU_ABU][11:8] == 4'(ABU_BNZ)
        && dut.u_cgra.op_a[FU_ABU] != 0) n_exit++;
    if (dut.u_cgra.en && dut.u_cgra.fu_instr[FU_ABU][11:8] == 4'(ABU_DBNZ)
        && dut.u_cgra.u_abu.cnt_dec != 0) n_loop++;
    if (dut.u_cgra.stall) n_stall++;
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

  function automatic void build_simcheck(cgra_kernel k);
    localparam int J0 = 3, NX = 14, O0 = 18, E0 = 21;
    k.cfg[FU_LSU0] = cfgw(FU_ALU0, FU_ALU5, 0);
    k.cfg[FU_LSU1] = cfgw(FU_ALU1, 31, 1);
    k.cfg[FU_ALU2] = cfgw(FU_LSU0, FU_LSU1, 2);
    k.cfg[FU_ALU4] = cfgw(FU_ALU2, FU_ALU1, 3);
    k.cfg[FU_ALU3] = cfgw(FU_IU0, FU_ALU4, 4);
    k.cfg[FU_ABU]  = cfgw(FU_ALU3, 31, 5);
    k.cfg[FU_ALU5] = cfgw(FU_ALU5, 31, 6);
    k.cfg[FU_ALU0] = cfgw(FU_ALU0, 31, 7);
    k.cfg[FU_ALU1] = cfgw(FU_ALU1, FU_ALU0, 8);
    // prologue: i = 0, j = 1, count = 0, loop count N-M
    k.iu[0][0] = {1'b1, 32'(N - M)};
    k.im[7][0] = ins(ALU_PASSB, 0);
    k.im[6][0] = ins(ALU_PASSB, 0);
    k.im[4][1] = ins(ALU_PASSA, 0);
    k.iu[0][1] = {1'b1, 32'(R)};
    k.im[8][1] = ins(ALU_PASSB, 0);
    k.im[5][2] = ins(ABU_LDC, 0);
    k.im[8][2] = ins(ALU_ADDI, 1);
    // compare components k = 0 .. M-1, leaving at the first mismatch
    for (int c = 0; c < M; c++) begin
      k.im[0][J0 + 5 * c]     = ins(LSU_LDG, c);
      k.im[1][J0 + 5 * c]     = ins(LSU_LDG, c);
      k.im[2][J0 + 5 * c + 1] = ins(ALU_ABSDIFF, 0);
      k.im[3][J0 + 5 * c + 2] = ins(ALU_PASSA, 0);
      k.im[4][J0 + 5 * c + 3] = ins(ALU_SLT, 0);      // R < |difference|
      k.im[5][J0 + 5 * c + 4] = ins(ABU_BNZ, NX);
    end
    k.im[6][J0 + 5 * M] = ins(ALU_ADDI, 1);           // match
    // next j; loop while j <= N-M
    k.im[8][NX]     = ins(ALU_ADDI, 1);
    k.iu[0][NX]     = {1'b1, 32'(N - M)};
    k.im[3][NX + 1] = ins(ALU_PASSB, 0);
    k.im[4][NX + 2] = ins(ALU_SLT, 0);                // N-M < j
    k.iu[0][NX + 2] = {1'b1, 32'(R)};
    k.im[5][NX + 3] = ins(ABU_BZ, J0);
    // next i, j = i + 1
    k.im[7][O0]     = ins(ALU_ADDI, 1);
    k.im[8][O0 + 1] = ins(ALU_PASSB, 0);
    k.im[8][O0 + 2] = ins(ALU_ADDI, 1);
    k.im[5][O0 + 2] = ins(ABU_DBNZ, J0);
    // store the count (i = N-M here) and halt
    k.im[0][E0]     = ins(LSU_STG, RES - (N - M));
    k.im[5][E0 + 1] = ins(ABU_HALT, 0);
    k.rows = E0 + 2;
  endfunction

  initial begin
    automatic cgra_kernel k = new();
    logic [31:0] img [$];
    int x [N];
    logic [31:0] d, cyc;
    int guard, exp_cyc, n_match, exits, diff, stop;
    core_instr_req = '0; core_data_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // a slow random walk, so that neighbouring templates often match
    x[0] = 0;
    for (int i = 1; i < N; i++) x[i] = x[i - 1] + $urandom_range(0, 60) - 30;
    for (int i = 0; i < N; i++) wr(DMEM + 32'(4 * i), 32'(x[i]));
    wr(DMEM + 32'(4 * RES), 32'hDEAD_BEEF);
    build_simcheck(k);
    k.image(img);
    foreach (img[i]) wr(CPMEM + 32'(4 * i), img[i]);

    // reference: n_match, early exits and cycles
    n_match = 0; exits = 0;
    exp_cyc = 3 + 3 * (N - M) + 3 + 1;                // prologue, i loop, store, halt
    for (int i = 0; i < N - M; i++)
      for (int j = i + 1; j <= N - M; j++) begin
        stop = M;
        for (int c = M - 1; c >= 0; c--) begin
          diff = x[i + c] - x[j + c];
          if (diff < 0) diff = -diff;
          if (diff > R) stop = c;
        end
        if (stop == M) n_match++; else exits++;
        exp_cyc += (stop == M) ? 5 * M + 1 + 4 + 4 * M : 5 * (stop + 1) + 4 + 4 * (stop + 1);
      end

    wr(CTRL + 32'h08, CPMEM);
    wr(CTRL + 32'h0C, k.rows);
    wr(CTRL + 32'h00, 32'h1);
    guard = 0;
    do begin rd(CTRL + 32'h04, d); guard++; end while (d[0] && guard < 5000);
    chk(!d[0], "kernel loaded");
    wr(CTRL + 32'h00, 32'h2);
    while (!cgra_irq) @(negedge clk);
    rd(CTRL + 32'h10, cyc);
    rd(DMEM + 32'(4 * RES), d);
    chk(d == 32'(n_match), $sformatf("matching pairs %0d exp %0d", d, n_match));
    chk(cyc == 32'(exp_cyc), $sformatf("cycles %0d exp %0d", cyc, exp_cyc));
    $display("simcheck N=%0d m=%0d r=%0d: %0d of %0d pairs match, %0d CGRA cycles",
             N, M, R, n_match, n_match + exits, cyc);
    $display("mechanisms: early exit %0d loop %0d stall %0d", n_exit, n_loop, n_stall);
    chk(n_exit == exits, $sformatf("early exits %0d exp %0d", n_exit, exits));
    chk(n_exit > 0 && n_match > 0, "both outcomes occur");
    chk(n_loop == N - M - 1, "i loop iterations");
    chk(n_stall > 0, "global-memory stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
