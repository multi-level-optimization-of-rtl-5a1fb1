// tb_cgra_lm: self-checking test of the 256x32 local memory: random writes
// against a shadow array, combinational read-back at every address.
module tb_cgra_lm;
  import bw_pkg::*;
  logic clk = 0, we = 0;
  logic [7:0] addr = '0;
  word_t wdata = '0, rdata;
  word_t shadow [256];
  int checks = 0, failures = 0;

  cgra_lm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      shadow[i] = $urandom; we = 1; addr = 8'(i); wdata = shadow[i];
      @(negedge clk);
    end
    for (int it = 0; it < 2000; it++) begin
      we = ($urandom_range(0, 2) == 0);
      addr = 8'($urandom); wdata = $urandom;
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", addr, rdata, shadow[addr]);
      end
      @(negedge clk);
      if (we) shadow[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
