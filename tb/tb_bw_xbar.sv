// tb_bw_xbar: self-checking test of the interconnect. Four masters issue
// random reads and writes to five memory-model slaves (and sometimes to an
// unmapped address) in parallel. Checks: read data matches each master's
// own shadow, a response arrives exactly one cycle after each grant,
// unmapped reads return zero, and contention (two masters on one slave in
// one cycle) happens and is resolved.
module tb_bw_xbar;
  import bw_pkg::*;
  localparam int NM = 4, NS = 5;
  logic clk = 0, rst_n = 0;
  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  bus_req_t s_req [NS];
  bus_rsp_t s_rsp [NS];
  word_t    smem  [NS][1024];
  int checks = 0, failures = 0, contention = 0, unmapped = 0;
  localparam logic [31:0] SB [NS] = '{32'h0000_0000, 32'h0010_0000, 32'h0020_0000,
                                      32'h0030_0000, 32'h1A10_0000};

  bw_xbar #(.NM(NM), .NS(NS)) dut (.*);
  always #5 clk = ~clk;

  for (genvar s = 0; s < NS; s++) begin : g_slv
    assign s_rsp[s].gnt = s_req[s].req;
    always_ff @(posedge clk) begin
      s_rsp[s].rvalid <= s_req[s].req;
      if (s_req[s].req) begin
        if (s_req[s].we) smem[s][s_req[s].addr[11:2]] <= s_req[s].wdata;
        else s_rsp[s].rdata <= smem[s][s_req[s].addr[11:2]];
      end
    end
  end

  always @(posedge clk) begin
    for (int s = 0; s < NS; s++) begin
      automatic int n = 0;
      for (int m = 0; m < NM; m++)
        if (m_req[m].req && (m_req[m].addr & 32'hFFF0_0000) == SB[s]) n++;
      if (n > 1) contention++;
    end
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

  task automatic master(int m);
    word_t shadow [NS][256];
    logic  known  [NS][256];
    for (int s = 0; s < NS; s++) for (int i = 0; i < 256; i++) known[s][i] = 0;
    for (int it = 0; it < 600; it++) begin
      automatic int s = $urandom_range(0, NS - 1);
      automatic int w = $urandom_range(0, 255);
      automatic logic we = 1'($urandom);
      automatic logic bad = ($urandom_range(0, 19) == 0);
      automatic word_t d = $urandom;
      @(negedge clk);
      m_req[m] = '{req: 1, we: we, be: 4'hF,
                   addr: bad ? 32'h4000_0000 : SB[s] + 32'((m * 256 + w) * 4), wdata: d};
      #1;
      while (!m_rsp[m].gnt) begin @(negedge clk); #1; end
      @(negedge clk);
      m_req[m].req = 0;
      chk(m_rsp[m].rvalid, "response one cycle after grant");
      if (bad) begin
        unmapped++;
        if (!we) chk(m_rsp[m].rdata == 0, "unmapped read gives zero");
      end else if (we) begin
        shadow[s][w] = d; known[s][w] = 1;
      end else if (known[s][w]) begin
        chk(m_rsp[m].rdata == shadow[s][w], $sformatf("m%0d read s%0d w%0d", m, s, w));
      end
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  initial begin
    for (int m = 0; m < NM; m++) m_req[m] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      master(0); master(1); master(2); master(3);
    join
    chk(contention > 0, "contention exercised");
    chk(unmapped > 0, "unmapped access exercised");
    $display("contention cycles %0d, unmapped accesses %0d", contention, unmapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
