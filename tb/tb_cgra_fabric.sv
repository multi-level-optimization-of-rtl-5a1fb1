// tb_cgra_fabric: runs a two-channel SIMD kernel on the CGRA fabric.
//
// The kernel (tb_kernel_pkg::build_scaled_sum) is written straight into the
// configuration registers and instruction memories; a DMEM model answers
// the global memory interface. The test checks the three stored results
// against a reference computed here, the exact cycle count (7n + 15 with an
// immediate-grant bus), a second run of the resident kernel with randomly
// delayed grants, and that stalls, SIMD broadcast and done all occurred.
module tb_cgra_fabric;
  import bw_pkg::*;
  import tb_kernel_pkg::*;
  localparam logic [31:0] BASE = 32'h0010_0000;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, im_we = 0, start = 0;
  logic [4:0] cfg_idx = 0;
  fu_cfg_t cfg_data = '0;
  logic [3:0] im_idx = 0;
  logic [7:0] im_addr = 0;
  imm_instr_t im_data = '0;
  logic running, done, stall;
  bus_req_t gmem_req;
  bus_rsp_t gmem_rsp;
  word_t dmem [1024];
  logic gnt_rand = 0, gnt_ok;
  int checks = 0, failures = 0, stall_cycles = 0, dones = 0;

  cgra_fabric #(.GMEM_BASE(BASE)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) gnt_ok <= gnt_rand ? 1'($urandom) : 1'b1;
  assign gmem_rsp.gnt = gmem_req.req && gnt_ok;
  always_ff @(posedge clk) begin
    gmem_rsp.rvalid <= gmem_req.req && gmem_rsp.gnt;
    if (gmem_req.req && gmem_rsp.gnt) begin
      if (gmem_req.we) dmem[gmem_req.addr[11:2]] <= gmem_req.wdata;
      else gmem_rsp.rdata <= dmem[gmem_req.addr[11:2]];
    end
  end
  always @(negedge clk) begin
    if (stall) stall_cycles++;
    if (done) dones++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_kernel(output int cyc);
    cyc = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (running && cyc < 10000) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    automatic cgra_kernel k = new();
    logic [31:0] x0 [64], x1 [64], r0, r1, r2, c;
    int n, cyc;
    n = 20; c = 32'd37;
    gmem_rsp.rvalid = 0; gmem_rsp.rdata = 0;
    for (int i = 0; i < 1024; i++) dmem[i] = 0;
    for (int i = 0; i < 64; i++) begin
      x0[i] = 32'($signed(16'($urandom))); x1[i] = 32'($signed(16'($urandom)));
      dmem[i] = x0[i]; dmem[64 + i] = x1[i];
    end
    k.build_scaled_sum(n, c);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < int'(NUM_FU); f++) begin
      cfg_we = 1; cfg_idx = 5'(f); cfg_data = fu_cfg_t'(k.cfg[f][13:0]);
      @(negedge clk);
    end
    cfg_we = 0;
    for (int r = 0; r < k.rows; r++) begin
      for (int m = 0; m < 11; m++) begin
        im_we = 1; im_idx = 4'(m); im_addr = 8'(r);
        im_data = (m < 9) ? {21'd0, k.im[m][r]} : k.iu[m - 9][r];
        @(negedge clk);
      end
    end
    im_we = 0;
    ref_scaled_sum(x0, x1, n, c, r0, r1, r2);
    for (int pass = 0; pass < 2; pass++) begin
      gnt_rand = (pass == 1);
      dmem[128 + n] = 0; dmem[192 + n] = 0; dmem[200 + n] = 0;
      run_kernel(cyc);
      chk(dmem[128 + n] == r0, $sformatf("acc0 %h exp %h", dmem[128 + n], r0));
      chk(dmem[192 + n] == r1, $sformatf("acc1 %h exp %h", dmem[192 + n], r1));
      chk(dmem[200 + n] == r2, $sformatf("sum %h exp %h", dmem[200 + n], r2));
      if (pass == 0) chk(cyc == 7 * n + 15, $sformatf("cycles %0d exp %0d", cyc, 7 * n + 15));
      else chk(cyc > 7 * n + 15, "delayed grants lengthen the run");
      $display("pass %0d: %0d cycles", pass, cyc);
    end
    repeat (2) @(negedge clk);
    chk(dones == 2, $sformatf("done pulsed once per run (%0d)", dones));
    chk(stall_cycles > 0, "stalls occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
