// tb_cgra_alu: self-checking test of the CGRA ALU. Random operands for every
// opcode, compared against a reference written here; also checks that the
// result appears one cycle after the instruction and that NOP and en low hold it.
module tb_cgra_alu;
  import bw_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  instr_t instr = '0;
  word_t a = '0, b = '0, out;
  int checks = 0, failures = 0;

  cgra_alu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_alu(int op, word_t x, word_t y, word_t prev, logic [7:0] f);
    automatic longint sx = longint'($signed(x)), sy = longint'($signed(y));
    case (op)
      1: return x + y;
      2: return x - y;
      3: return x & y;
      4: return x | y;
      5: return x ^ y;
      6: return (sx < sy) ? 1 : 0;
      7: return ({32'd0, x} < {32'd0, y}) ? 1 : 0;
      8: return x;
      9: return (sx < sy) ? x : y;
      10: return (sx > sy) ? x : y;
      11: return prev + x;
      12: return word_t'((sx > sy) ? sx - sy : sy - sx);
      13: return word_t'(sx + longint'($signed(f)));
      14: return (x == y) ? 1 : 0;
      15: return y;
      default: return prev;
    endcase
  endfunction

  task automatic check(word_t exp, string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, out, exp);
    end
  endtask

  initial begin
    word_t prev, exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int it = 0; it < 3000; it++) begin
      automatic int op = it % 16;
      automatic logic [7:0] f = 8'($urandom);
      prev = out;
      a = $urandom; b = (it % 7 == 0) ? a : $urandom;
      if (it % 5 == 0) b = {a[31:4], 4'($urandom)};
      instr = {4'(op), f};
      en = 1;
      exp = ref_alu(op, a, b, prev, f);
      @(negedge clk);
      check(exp, $sformatf("op %0d", op));
    end
    // en low holds the result.
    prev = out; en = 0; instr = {4'(ALU_ADD), 8'd0}; a = 1; b = 2;
    @(negedge clk);
    check(prev, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
