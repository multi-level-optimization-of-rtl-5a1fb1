// tb_cgra_rf: self-checking test of the CGRA register-file unit: random
// writes and reads against a shadow array, read-before-write on RDWR, and
// no change while en is low.
module tb_cgra_rf;
  import bw_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  instr_t instr = '0;
  word_t a = '0, out;
  word_t shadow [16];
  int checks = 0, failures = 0;

  cgra_rf dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp;
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      automatic int op = $urandom_range(0, 3);
      automatic int wa = $urandom_range(0, 15), ra = $urandom_range(0, 15);
      automatic logic e = ($urandom_range(0, 9) != 0);
      a = $urandom;
      instr = {4'(op), 4'(wa), 4'(ra)};
      en = e;
      exp = out;
      if (e && (op == 1 || op == 3)) exp = shadow[ra];
      @(negedge clk);
      if (e && (op == 2 || op == 3)) shadow[wa] = a;
      if (e && (op == 1 || op == 3) || it % 10 == 0) begin
        checks++;
        if (out !== exp) begin
          failures++;
          $display("FAIL op %0d ra %0d got %h exp %h", op, ra, out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
