// tb_brainwave_top: end-to-end test of the BrainWave SoC at its default
// sizes. The testbench plays the RISC-V core on the core ports and a
// peripheral register on the peripheral bus. It
//   1. writes a short word sequence into the RISC-V PMEM over the data port
//      and fetches it back over the instruction port;
//   2. writes two EEG-like channels into the shared DMEM and a CGRA kernel
//      image (tb_kernel_pkg::build_scaled_sum) into the CGRA PMEM;
//   3. programs the CGRA control registers, LOADs the kernel and STARTs it,
//      waits for the interrupt, checks CYCLES = 7n + 15 (no contention);
//   4. starts the resident kernel again without reloading, this time
//      hammering the DMEM from the core while it runs, and checks that the
//      results are still right and the run took longer;
//   5. writes and reads the peripheral register and an unmapped address.
// It counts each mechanism (kernel load, SIMD broadcast, global-memory stall,
// FU-to-FU bypass, counted loop, DMEM contention, kernel reuse, interrupt,
// peripheral access) and fails for any that never happened.
module tb_brainwave_top;
  import bw_pkg::*;
  import tb_kernel_pkg::*;
  localparam logic [31:0] PMEM = 32'h0000_0000, DMEM = 32'h0010_0000,
                          CPMEM = 32'h0020_0000, CTRL = 32'h0030_0000,
                          PERIPH = 32'h1A10_0000;
  logic clk = 0, rst_n = 0;
  bus_req_t core_instr_req, core_data_req, periph_req;
  bus_rsp_t core_instr_rsp, core_data_rsp, periph_rsp;
  logic cgra_irq, cgra_busy;
  logic [31:0] periph_reg;
  int checks = 0, failures = 0;
  int n_load = 0, n_simd = 0, n_stall = 0, n_bypass = 0, n_loop = 0,
      n_contention = 0, n_cgra_wait = 0, n_reuse = 0, n_irq = 0, n_periph = 0;

  brainwave_top dut (.*);
  always #5 clk = ~clk;

  // Peripheral bus: one register, answers one cycle after the grant.
  assign periph_rsp.gnt = periph_req.req;
  always_ff @(posedge clk) begin
    periph_rsp.rvalid <= periph_req.req;
    if (periph_req.req) begin
      if (periph_req.we) periph_reg <= periph_req.wdata;
      periph_rsp.rdata <= periph_reg;
    end
  end

  // Mechanism counters, sampled on the falling edge.
  always @(negedge clk) if (rst_n) begin
    if (dut.u_cgra.running && dut.u_cgra.lsu_req[0].req && dut.u_cgra.lsu_req[1].req) n_simd++;
    if (dut.u_cgra.stall) n_stall++;
    if (dut.u_cgra.en && dut.u_cgra.fu_instr[FU_MUL0][11:8] == 4'(MUL_MUL)
        && dut.u_cgra.cfg[FU_MUL0].src_a == 5'(FU_LSU0)) n_bypass++;
    if (dut.u_cgra.en && dut.u_cgra.fu_instr[FU_ABU][11:8] == 4'(ABU_DBNZ)
        && dut.u_cgra.u_abu.cnt_dec != 0) n_loop++;
    if (dut.s_req[1].req && dut.m_req[1].req && dut.m_req[2].req
        && dut.m_req[1].addr[31:20] == DMEM[31:20]) n_contention++;
    if (dut.m_req[2].req && !dut.m_rsp[2].gnt) n_cgra_wait++;
    if (cgra_irq) n_irq++;
    if (periph_req.req) n_periph++;
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

  task automatic fetch(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    core_instr_req = '{req: 1, we: 0, be: 4'hF, addr: a, wdata: 0};
    #1;
    while (!core_instr_rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    core_instr_req.req = 0;
    d = core_instr_rsp.rdata;
  endtask

  initial begin
    automatic cgra_kernel k = new();
    logic [31:0] img [$];
    logic [31:0] x0 [64], x1 [64], r0, r1, r2, d, c, cyc;
    int n, guard;
    n = 50; c = 32'hFFFF_FFF3;   // c = -13
    core_instr_req = '0; core_data_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. core program memory: write through the data port, fetch back.
    for (int i = 0; i < 16; i++) wr(PMEM + 32'(4 * i), 32'h1300_0013 + 32'(i));
    for (int i = 0; i < 16; i++) begin
      fetch(PMEM + 32'(4 * i), d);
      chk(d == 32'h1300_0013 + 32'(i), $sformatf("PMEM fetch %0d", i));
    end

    // 2. data and kernel image.
    for (int i = 0; i < 64; i++) begin
      x0[i] = 32'($signed(12'($urandom))); x1[i] = 32'($signed(12'($urandom)));  // 12-bit EEG samples
      wr(DMEM + 32'(4 * i), x0[i]);
      wr(DMEM + 32'(4 * (64 + i)), x1[i]);
    end
    k.build_scaled_sum(n, c);
    k.image(img);
    foreach (img[i]) wr(CPMEM + 32'(4 * i), img[i]);
    ref_scaled_sum(x0, x1, n, c, r0, r1, r2);

    // 3. load and first run.
    wr(CTRL + 32'h08, CPMEM);
    wr(CTRL + 32'h0C, k.rows);
    wr(CTRL + 32'h00, 32'h1);
    n_load++;
    guard = 0;
    do begin rd(CTRL + 32'h04, d); guard++; end while (d[0] && guard < 5000);
    chk(!d[0], "kernel loaded");
    wr(CTRL + 32'h00, 32'h2);
    guard = 0;
    while (!cgra_irq && guard < 5000) begin @(negedge clk); guard++; end
    rd(CTRL + 32'h04, d); chk(d[2] && !d[1], "STATUS done after run");
    rd(CTRL + 32'h10, cyc);
    chk(cyc == 32'(7 * n + 15), $sformatf("run 1 cycles %0d exp %0d", cyc, 7 * n + 15));
    $display("run 1: %0d cycles", cyc);
    rd(DMEM + 32'(4 * (128 + n)), d); chk(d == r0, $sformatf("ch0 %h exp %h", d, r0));
    rd(DMEM + 32'(4 * (192 + n)), d); chk(d == r1, $sformatf("ch1 %h exp %h", d, r1));
    rd(DMEM + 32'(4 * (200 + n)), d); chk(d == r2, $sformatf("sum %h exp %h", d, r2));

    // 4. reuse the resident kernel with the core competing for the DMEM.
    wr(DMEM + 32'(4 * (128 + n)), 0);
    wr(DMEM + 32'(4 * (192 + n)), 0);
    wr(DMEM + 32'(4 * (200 + n)), 0);
    wr(CTRL + 32'h00, 32'h2);
    n_reuse++;
    guard = 0;
    while (cgra_busy || guard < 2) begin
      rd(DMEM + 32'(4 * (300 + guard % 32)), d);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      guard++;
      if (guard > 5000) break;
    end
    rd(CTRL + 32'h10, cyc);
    chk(cyc == 32'(7 * n + 15 + n_cgra_wait), $sformatf("run 2: %0d cycles, %0d lost arbitrations", cyc, n_cgra_wait));
    $display("run 2: %0d cycles", cyc);
    rd(DMEM + 32'(4 * (128 + n)), d); chk(d == r0, "ch0 after reuse");
    rd(DMEM + 32'(4 * (192 + n)), d); chk(d == r1, "ch1 after reuse");
    rd(DMEM + 32'(4 * (200 + n)), d); chk(d == r2, "sum after reuse");

    // 5. peripheral bus and an unmapped address.
    wr(PERIPH + 32'h10, 32'hA5A5_0001);
    rd(PERIPH + 32'h10, d); chk(d == 32'hA5A5_0001, "peripheral register");
    rd(32'h7000_0000, d); chk(d == 0, "unmapped read");

    repeat (2) @(negedge clk);
    $display("mechanisms: load %0d simd %0d stall %0d bypass %0d loop %0d contention %0d cgra_wait %0d reuse %0d irq %0d periph %0d",
             n_load, n_simd, n_stall, n_bypass, n_loop, n_contention, n_cgra_wait, n_reuse, n_irq, n_periph);
    chk(n_load > 0, "kernel load");
    chk(n_simd > 0, "SIMD broadcast");
    chk(n_stall > 0, "global-memory stall");
    chk(n_bypass > 0, "FU-to-FU bypass");
    chk(n_loop > 0, "counted loop");
    chk(n_contention > 0, "DMEM contention");
    chk(n_cgra_wait > 0, "CGRA lost DMEM arbitration");
    chk(n_reuse > 0, "kernel reuse");
    chk(n_irq == 2, "interrupt per run");
    chk(n_periph > 0, "peripheral access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
