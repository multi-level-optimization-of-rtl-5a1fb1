// tb_cgra_im: self-checking test of a 256x12 instruction memory: write all
// words, read them back at random program counters in the same cycle, and
// check that a NOP is presented while the fabric is not running.
module tb_cgra_im;
  import bw_pkg::*;
  logic clk = 0, run = 0, wr_en = 0;
  logic [7:0] pc = '0, wr_addr = '0;
  instr_t wr_data = '0, instr;
  instr_t shadow [256];
  int checks = 0, failures = 0;

  cgra_im dut (.*);
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
      shadow[i] = 12'($urandom) | 12'h001;
      wr_en = 1; wr_addr = 8'(i); wr_data = shadow[i];
      @(negedge clk);
    end
    wr_en = 0;
    for (int it = 0; it < 1000; it++) begin
      pc = 8'($urandom);
      run = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (instr !== (run ? shadow[pc] : 12'h000)) begin
        failures++;
        $display("FAIL pc %0d run %0d got %h", pc, run, instr);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
