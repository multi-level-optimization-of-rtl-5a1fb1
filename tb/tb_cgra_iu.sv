// tb_cgra_iu: self-checking test of the immediate unit: fills its 256x33
// memory, then steps the program counter and checks that flagged words
// appear on out one cycle later and unflagged words leave out unchanged.
module tb_cgra_iu;
  import bw_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, wr_en = 0;
  logic [7:0] pc = '0, wr_addr = '0;
  imm_instr_t wr_data = '0;
  word_t out;
  imm_instr_t shadow [256];
  int checks = 0, failures = 0;

  cgra_iu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      shadow[i] = {1'($urandom), 32'($urandom)};
      wr_en = 1; wr_addr = 8'(i); wr_data = shadow[i];
      @(negedge clk);
    end
    wr_en = 0;
    exp = out;
    for (int it = 0; it < 1000; it++) begin
      pc = 8'($urandom);
      en = ($urandom_range(0, 4) != 0);
      if (en && shadow[pc][32]) exp = shadow[pc][31:0];
      @(negedge clk);
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL pc %0d got %h exp %h", pc, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
