// tb_cgra_mul: self-checking test of the CGRA multiply/shift unit against a
// 64-bit reference for every opcode, with random operands.
module tb_cgra_mul;
  import bw_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  instr_t instr = '0;
  word_t a = '0, b = '0, out;
  int checks = 0, failures = 0;

  cgra_mul dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_mul(int op, word_t x, word_t y, word_t prev, int sh);
    automatic longint p = longint'($signed(x)) * longint'($signed(y));
    case (op)
      1: return p[31:0];
      2: return p[63:32];
      3: return x << y[4:0];
      4: return x >> y[4:0];
      5: return word_t'(longint'($signed(x)) >>> y[4:0]);
      6: return word_t'(longint'($signed(x)) >>> sh);
      7: return word_t'(p >>> sh);
      default: return prev;
    endcase
  endfunction

  initial begin
    word_t exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int it = 0; it < 2000; it++) begin
      automatic int op = it % 8;
      automatic int sh = $urandom_range(0, 31);
      a = $urandom; b = $urandom;
      if (it % 3 == 0) begin a = 32'($signed(16'($urandom))); b = 32'($signed(16'($urandom))); end
      instr = {4'(op), 3'b000, 5'(sh)};
      en = 1;
      exp = ref_mul(op, a, b, out, sh);
      @(negedge clk);
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL op %0d a=%h b=%h sh=%0d got %h exp %h", op, a, b, sh, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
