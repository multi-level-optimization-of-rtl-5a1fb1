// tb_cgra_lsu: self-checking test of the load-store unit: local stores and
// loads against a shadow LM, global load/store request fields (address =
// a + offset, data, write flag, only while running), and that global load
// data is taken in the committing cycle.
module tb_cgra_lsu;
  import bw_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, en = 0;
  instr_t instr = '0;
  word_t a = '0, b = '0, out, gmem_rdata = '0;
  gmem_req_t gmem_req;
  word_t shadow [256];
  int checks = 0, failures = 0;

  cgra_lsu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1; en = 1;
    for (int i = 0; i < 256; i++) begin
      shadow[i] = $urandom;
      instr = {4'(LSU_STL), 8'd0}; a = i; b = shadow[i];
      #1 chk(!gmem_req.req, "no global request on STL");
      @(negedge clk);
    end
    for (int it = 0; it < 1000; it++) begin
      automatic int off = $urandom_range(0, 255);
      automatic int op = $urandom_range(1, 4);
      a = $urandom_range(0, 1000); b = $urandom; gmem_rdata = $urandom;
      instr = {4'(op), 8'(off)};
      en = ($urandom_range(0, 3) != 0);
      #1;
      chk(gmem_req.req == (op == 1 || op == 2), "global req flag");
      if (op <= 2) begin
        chk(gmem_req.addr == a + off, "global address");
        chk(gmem_req.we == (op == 2), "global we");
        if (op == 2) chk(gmem_req.wdata == b, "global wdata");
      end
      begin
        automatic word_t prev = out;
        automatic word_t exp = prev;
        automatic int la = (a + off) % 256;
        if (en && op == 1) exp = gmem_rdata;
        if (en && op == 3) exp = shadow[la];
        @(negedge clk);
        if (en && op == 4) shadow[la] = b;
        chk(out == exp, $sformatf("load result op %0d", op));
      end
    end
    run = 0; instr = {4'(LSU_LDG), 8'd0}; #1;
    chk(!gmem_req.req, "no request while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
