// tb_bpf_workload: runs a 5-stage biquad band-pass filter, the example
// kernel the document maps onto the CGRA, on two EEG channels at once, on the
// complete SoC at its default sizes.
//
// The testbench plays the RISC-V core: it writes two channels of 128 12-bit
// samples and a kernel image, LOADs and STARTs the kernel, and compares both
// filtered channels with a bit-exact reference model. Each stage s is a
// direct-form-II biquad in Q20 fixed point (products of 32-bit words shifted
// right by 20, 32-bit wrap-around sums):
//   w = u + (a1*w1 >>> 20) + (a2*w2 >>> 20)
//   y = (b0*w >>> 20) + (b1*w1 >>> 20) + (b2*w2 >>> 20)
// with a1, a2 holding the negated denominator coefficients.
//
// Mapping (two parallel multiply-accumulate paths per stage, both channels in
// SIMD; every pair of units below shares one instruction memory):
//   LSU0/LSU1  load x and store y in DMEM (ch0 at word 0, ch1 at word 256,
//              y 128 words above x); pointers ALU0/ALU1
//   LSU2/LSU3  filter state in their local memories; pointer ALU4 (same IM
//              as ALU0/ALU1). w of stage s for sample n is kept at
//              (n + 3s + 2) mod 256, so w1 and w2 are read at n+3s+1 and n+3s
//              and nothing has to be copied between state slots.
//   MUL0..3    one IM: MUL0/MUL1 multiply the state by IU0 (a coefficients),
//              MUL2/MUL3 by IU1 (b coefficients); the IUs reload the
//              coefficients row by row.
//   ALU2/ALU3  w accumulators (feedback path), ALU5/ALU6 y accumulators
//              (feed-forward path); y of one stage is bypassed straight into
//              the w accumulator of the next.
//   ABU        a 16-row loop clears the state, then one counted loop per
//              sample.
// Each stage takes 8 rows, a sample 43 rows plus the stall of two global
// loads and two global stores; the run length is checked exactly.
module tb_bpf_workload;
  import bw_pkg::*;
  import tb_kernel_pkg::*;
  localparam logic [31:0] DMEM = 32'h0010_0000, CPMEM = 32'h0020_0000,
                          CTRL = 32'h0030_0000;
  localparam int NS = 128;        // samples per channel
  localparam int STAGES = 5;
  localparam int Q = 20;
  logic clk = 0, rst_n = 0;
  bus_req_t core_instr_req, core_data_req, periph_req;
  bus_rsp_t core_instr_rsp, core_data_rsp, periph_rsp;
  logic cgra_irq, cgra_busy;
  int checks = 0, failures = 0;
  int n_simd = 0, n_stall = 0, n_loop = 0, n_bypass = 0;
  logic [31:0] ca1 [STAGES], ca2 [STAGES], cb0 [STAGES], cb1 [STAGES], cb2 [STAGES];

  brainwave_top dut (.*);
  always #5 clk = ~clk;

  assign periph_rsp = '{gnt: periph_req.req, rvalid: 1'b0, rdata: 32'd0};

  always @(negedge clk) if (rst_n) begin
    if (dut.u_cgra.running && dut.u_cgra.lsu_req[0].req && dut.u_cgra.lsu_req[1].req) n_simd++;
    if (dut.u_cgra.stall) n_stall++;
    if (dut.u_cgra.en && dut.u_cgra.fu_instr[FU_ABU][11:8] == 4'(ABU_DBNZ)
        && dut.u_cgra.u_abu.cnt_dec != 0) n_loop++;
    if (dut.u_cgra.en && dut.u_cgra.fu_instr[FU_ALU2][11:8] == 4'(ALU_PASSB)
        && dut.u_cgra.cfg[FU_ALU2].src_b == 5'(FU_ALU5)) n_bypass++;
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

  function automatic logic [31:0] qmul(logic [31:0] x, logic [31:0] c);
    logic signed [63:0] p;
    p = $signed(x) * $signed(c);
    return 32'(p >>> Q);
  endfunction

  function automatic void build_bpf(cgra_kernel k);
    int l, t;
    k.cfg[FU_LSU0] = cfgw(FU_ALU0, FU_ALU5, 0);
    k.cfg[FU_LSU1] = cfgw(FU_ALU1, FU_ALU6, 0);
    k.cfg[FU_ALU0] = cfgw(FU_ALU0, FU_IU0, 1);
    k.cfg[FU_ALU1] = cfgw(FU_ALU1, FU_IU1, 1);
    k.cfg[FU_ALU4] = cfgw(FU_ALU4, 31, 1);
    k.cfg[FU_LSU2] = cfgw(FU_ALU4, FU_ALU2, 2);
    k.cfg[FU_LSU3] = cfgw(FU_ALU4, FU_ALU3, 2);
    k.cfg[FU_MUL0] = cfgw(FU_LSU2, FU_IU0, 3);
    k.cfg[FU_MUL2] = cfgw(FU_LSU2, FU_IU1, 3);
    k.cfg[FU_MUL1] = cfgw(FU_LSU3, FU_IU0, 3);
    k.cfg[FU_MUL3] = cfgw(FU_LSU3, FU_IU1, 3);
    k.cfg[FU_ALU2] = cfgw(FU_MUL0, FU_ALU5, 4);
    k.cfg[FU_ALU3] = cfgw(FU_MUL1, FU_ALU6, 4);
    k.cfg[FU_ALU5] = cfgw(FU_MUL2, FU_LSU0, 5);
    k.cfg[FU_ALU6] = cfgw(FU_MUL3, FU_LSU1, 5);
    k.cfg[FU_ABU]  = cfgw(FU_IU0, 31, 6);
    // prologue: clear LM words 0..15 (ALU2/ALU3 are zero after reset)
    k.iu[0][0] = {1'b1, 32'd16};
    k.im[6][1] = ins(ABU_LDC, 0);
    k.im[2][2] = ins(LSU_STL, 0);
    k.im[1][2] = ins(ALU_ADDI, 1);
    k.im[6][2] = ins(ABU_DBNZ, 2);
    k.iu[0][3] = {1'b1, 32'd0};
    k.iu[1][3] = {1'b1, 32'd256};
    k.im[1][4] = ins(ALU_PASSB, 0);            // x pointers 0 / 256, LM pointer 0
    k.iu[0][4] = {1'b1, 32'(NS)};
    k.im[6][5] = ins(ABU_LDC, 0);
    // one sample of both channels per iteration
    l = 6;
    k.im[0][l] = ins(LSU_LDG, 0);
    k.im[5][l + 1] = ins(ALU_PASSB, 0);        // y accumulators <- x
    for (int s = 0; s < STAGES; s++) begin
      t = l + 2 + 8 * s;
      k.im[4][t]     = ins(ALU_PASSB, 0);      // w <- stage input
      k.im[2][t]     = ins(LSU_LDL, 3 * s);    // w2
      k.iu[0][t]     = {1'b1, ca2[s]};
      k.iu[1][t]     = {1'b1, cb2[s]};
      k.im[2][t + 1] = ins(LSU_LDL, 3 * s + 1); // w1
      k.im[3][t + 1] = ins(MUL_MULSR, Q);
      k.iu[0][t + 1] = {1'b1, ca1[s]};
      k.iu[1][t + 1] = {1'b1, cb1[s]};
      k.im[3][t + 2] = ins(MUL_MULSR, Q);
      k.im[4][t + 2] = ins(ALU_ACC, 0);
      k.im[5][t + 2] = ins(ALU_PASSA, 0);
      k.im[4][t + 3] = ins(ALU_ACC, 0);
      k.im[5][t + 3] = ins(ALU_ACC, 0);
      k.im[2][t + 4] = ins(LSU_STL, 3 * s + 2); // w
      k.im[2][t + 5] = ins(LSU_LDL, 3 * s + 2);
      k.iu[1][t + 5] = {1'b1, cb0[s]};
      k.im[3][t + 6] = ins(MUL_MULSR, Q);
      k.im[5][t + 7] = ins(ALU_ACC, 0);
    end
    t = l + 2 + 8 * STAGES;
    k.im[0][t] = ins(LSU_STG, NS);             // y
    k.im[1][t] = ins(ALU_ADDI, 1);
    k.im[6][t] = ins(ABU_DBNZ, l);
    k.im[6][t + 1] = ins(ABU_HALT, 0);
    k.rows = t + 2;
  endfunction

  initial begin
    automatic cgra_kernel k = new();
    logic [31:0] img [$];
    logic [31:0] x [2][NS], u, w, w1 [2][STAGES], w2 [2][STAGES], y, d, cyc;
    int guard, exp_cyc, bad, nonzero;
    core_instr_req = '0; core_data_req = '0;
    for (int s = 0; s < STAGES; s++) begin
      ca1[s] = 32'(int'((1.0 + 0.1 * s) * (1 << Q)));
      ca2[s] = 32'(int'(-0.6 * (1 << Q)));
      cb0[s] = 32'(int'(0.25 * (1 << Q)));
      cb1[s] = 32'(int'(0.01 * s * (1 << Q)));
      cb2[s] = 32'(int'(-0.25 * (1 << Q)));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int c = 0; c < 2; c++)
      for (int i = 0; i < NS; i++) begin
        x[c][i] = 32'($signed(12'($urandom)));
        wr(DMEM + 32'(4 * (256 * c + i)), x[c][i]);
        wr(DMEM + 32'(4 * (256 * c + NS + i)), 32'hDEAD_BEEF);
      end
    build_bpf(k);
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
    // 6 prologue rows (one of them 16 times), 43 rows and 4 global accesses
    // (2 cycles each) per sample, HALT
    exp_cyc = 5 + 16 + NS * (43 + 2 * 4) + 1;
    chk(cyc == 32'(exp_cyc), $sformatf("cycles %0d exp %0d", cyc, exp_cyc));
    $display("bpf %0d stages, 2 x %0d samples: %0d CGRA cycles (%0d per sample pair)",
             STAGES, NS, cyc, cyc / NS);

    bad = 0; nonzero = 0;
    for (int c = 0; c < 2; c++) begin
      for (int s = 0; s < STAGES; s++) begin w1[c][s] = 0; w2[c][s] = 0; end
      for (int i = 0; i < NS; i++) begin
        u = x[c][i];
        for (int s = 0; s < STAGES; s++) begin
          w = u + qmul(w1[c][s], ca1[s]) + qmul(w2[c][s], ca2[s]);
          y = qmul(w, cb0[s]) + qmul(w1[c][s], cb1[s]) + qmul(w2[c][s], cb2[s]);
          w2[c][s] = w1[c][s]; w1[c][s] = w;
          u = y;
        end
        if (u != 0) nonzero++;
        rd(DMEM + 32'(4 * (256 * c + NS + i)), d);
        checks++;
        if (d !== u) begin
          failures++;
          if (bad++ < 8) $display("FAIL ch%0d y[%0d] = %h exp %h", c, i, d, u);
        end
      end
    end

    $display("mechanisms: simd %0d stall %0d loop %0d bypass %0d", n_simd, n_stall, n_loop, n_bypass);
    chk(nonzero > NS, $sformatf("filter output not trivial (%0d non-zero)", nonzero));
    chk(n_simd > 0, "SIMD global access");
    chk(n_stall > 0, "global-memory stall");
    chk(n_loop == 15 + NS - 1, "loop iterations");
    chk(n_bypass == STAGES * NS, "y bypassed into next stage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
