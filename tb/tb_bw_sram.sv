// tb_bw_sram: self-checking test of the SRAM bus slave: full-width and
// byte-enabled writes against a shadow copy, one-cycle read latency, and a
// response for every access.
module tb_bw_sram;
  import bw_pkg::*;
  localparam int BYTES = 4096;
  logic clk = 0, rst_n = 0;
  bus_req_t req;
  bus_rsp_t rsp;
  word_t shadow [BYTES/4];
  int checks = 0, failures = 0;

  bw_sram #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < BYTES / 4; i++) begin
      shadow[i] = $urandom;
      req = '{req: 1, we: 1, be: 4'hF, addr: 32'(i * 4), wdata: shadow[i]};
      @(negedge clk);
    end
    for (int it = 0; it < 4000; it++) begin
      automatic int w = $urandom_range(0, BYTES / 4 - 1);
      automatic logic we = 1'($urandom);
      automatic logic [3:0] be = 4'($urandom);
      automatic word_t d = $urandom;
      req = '{req: 1, we: we, be: be, addr: 32'(w * 4), wdata: d};
      #1;
      checks++;
      if (!rsp.gnt) begin failures++; $display("FAIL no grant"); end
      @(negedge clk);
      checks++;
      if (!rsp.rvalid) begin failures++; $display("FAIL no rvalid"); end
      if (!we) begin
        checks++;
        if (rsp.rdata !== shadow[w]) begin
          failures++; $display("FAIL read %0d got %h exp %h", w, rsp.rdata, shadow[w]);
        end
      end else begin
        for (int b = 0; b < 4; b++) if (be[b]) shadow[w][8*b +: 8] = d[8*b +: 8];
      end
      if (it % 3 == 0) begin
        req = '0;
        @(negedge clk);
        checks++;
        if (rsp.rvalid) begin failures++; $display("FAIL spurious rvalid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
