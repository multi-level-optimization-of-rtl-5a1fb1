// tb_cgra_gmem_if: self-checking test of the global memory data interface.
// A memory model answers on the bus side. Random sets of the four LSUs issue
// loads and stores together; the test checks read data per LSU, the memory
// contents after stores, the bus address mapping, and that the stall lasts
// exactly two cycles per access when the bus grants at once (phase 1), and
// ends when grants are delayed at random (phase 2).
module tb_cgra_gmem_if;
  import bw_pkg::*;
  localparam logic [31:0] BASE = 32'h0010_0000;
  logic clk = 0, rst_n = 0;
  gmem_req_t lsu_req [NUM_LSU];
  word_t     lsu_rdata [NUM_LSU];
  logic      stall;
  bus_req_t  bus_req;
  bus_rsp_t  bus_rsp;
  word_t     mem [1024];
  logic      gnt_rand = 0;
  int checks = 0, failures = 0, bad_addr = 0, bad_data = 0;

  cgra_gmem_if #(.BASE(BASE)) dut (.*);
  always #5 clk = ~clk;

  // Memory model: optional random grant delay, response one cycle after grant.
  logic gnt_ok;
  always_ff @(posedge clk) gnt_ok <= gnt_rand ? 1'($urandom) : 1'b1;
  assign bus_rsp.gnt = bus_req.req && gnt_ok;
  always_ff @(posedge clk) begin
    bus_rsp.rvalid <= bus_req.req && bus_rsp.gnt;
    if (bus_req.req && bus_rsp.gnt) begin
      if (bus_req.addr[31:12] != BASE[31:12]) bad_addr++;
      if (bus_req.we) mem[bus_req.addr[11:2]] <= bus_req.wdata;
      else bus_rsp.rdata <= mem[bus_req.addr[11:2]];
    end
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

  initial begin
    word_t shadow [1024];
    for (int i = 0; i < 1024; i++) begin mem[i] = i * 7 + 1; shadow[i] = i * 7 + 1; end
    for (int k = 0; k < int'(NUM_LSU); k++) lsu_req[k] = '0;
    bus_rsp.rvalid = 0; bus_rsp.rdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      gnt_rand = (phase == 1);
      for (int it = 0; it < 300; it++) begin
        automatic int n = 0, cyc = 0;
        logic [9:0] ad [NUM_LSU];
        @(negedge clk);
        for (int k = 0; k < int'(NUM_LSU); k++) begin
          // distinct addresses per LSU so order does not matter
          ad[k] = 10'(k * 256 + $urandom_range(0, 255));
          lsu_req[k].req   = 1'($urandom);
          lsu_req[k].we    = 1'($urandom);
          lsu_req[k].addr  = 32'(ad[k]);
          lsu_req[k].wdata = $urandom;
          if (lsu_req[k].req) n++;
        end
        #1;
        chk(stall == (n != 0), "stall raised with requests");
        while (stall && cyc < 100) begin @(negedge clk); cyc++; end
        if (!gnt_rand) chk(cyc == 2 * n, $sformatf("stall cycles %0d for %0d accesses", cyc, n));
        // commit cycle: data visible now
        for (int k = 0; k < int'(NUM_LSU); k++) begin
          if (lsu_req[k].req && !lsu_req[k].we) chk(lsu_rdata[k] == shadow[ad[k]], $sformatf("load data ph%0d it%0d k%0d got %h exp %h", phase, it, k, lsu_rdata[k], shadow[ad[k]]));
          if (lsu_req[k].req && lsu_req[k].we) shadow[ad[k]] = lsu_req[k].wdata;
        end
        @(negedge clk);
        for (int k = 0; k < int'(NUM_LSU); k++) lsu_req[k].req = 0;
      end
    end
    for (int i = 0; i < 1024; i++) if (mem[i] != shadow[i]) bad_data++;
    chk(bad_addr == 0 && bad_data == 0, "memory contents and address map");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
