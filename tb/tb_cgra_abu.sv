// tb_cgra_abu: self-checking test of the branch unit / sequencer: start,
// sequential fetch, jumps, conditional branches on a, counted loops
// (LDC + DBNZ with exact cycle count), stall hold and HALT with done pulse.
// A second phase drives random instructions, operands, enables and start
// pulses and compares pc, running, done and the loop counter with a
// reference model after every clock edge.
module tb_cgra_abu;
  import bw_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, en;
  instr_t instr, rnd_instr = '0;
  logic phase2 = 0, rnd_en = 0;
  word_t a = '0, out;
  logic [7:0] pc;
  logic running, done;
  int checks = 0, failures = 0;

  cgra_abu dut (.*);
  always #5 clk = ~clk;
  assign en = phase2 ? rnd_en : running;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (pc=%0d)", what, pc); end
  endtask

  // Program, indexed by pc: 0 NOP, 1 LDC a, 2 NOP, 3 DBNZ->2, 4 BZ->7 (a!=0,
  // falls through), 5 BNZ->8, 8 JMP->20, 20 HALT.
  function automatic instr_t prog(logic [7:0] p);
    case (p)
      1: return {4'(ABU_LDC), 8'd0};
      3: return {4'(ABU_DBNZ), 8'd2};
      4: return {4'(ABU_BZ), 8'd7};
      5: return {4'(ABU_BNZ), 8'd8};
      8: return {4'(ABU_JMP), 8'd20};
      20: return {4'(ABU_HALT), 8'd0};
      default: return '0;
    endcase
  endfunction
  assign instr = phase2 ? rnd_instr : prog(pc);

  initial begin
    automatic int cyc = 0, dones = 0, loops = 5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!running, "idle after reset");
    a = loops;
    start = 1; @(negedge clk); start = 0;
    chk(running && pc == 0, "start at pc 0");
    while (running && cyc < 200) begin
      @(negedge clk); cyc++;
      if (done) dones++;
    end
    // rows: 0,1, then (2,3) x loops, 4, 5, 8, 20
    chk(cyc == 2 + 2 * loops + 4, $sformatf("cycle count %0d", cyc));
    chk(dones == 1, "one done pulse");
    chk(out == 0, "counter ends at zero");
    @(negedge clk);
    chk(!done, "done is a pulse");

    // Phase 2: random stimulus against a reference model.
    phase2 = 1;
    begin
      logic [7:0] m_pc;
      logic m_run, m_done;
      word_t m_out, dec;
      abu_op_e op;
      m_pc = pc; m_run = running; m_done = done; m_out = out;
      for (int i = 0; i < 4000; i++) begin
        op = abu_op_e'($urandom_range(0, 7) == 0 ? 4'($urandom_range(7, 15))
                                                 : 4'($urandom_range(0, 6)));
        if (op == ABU_HALT && $urandom_range(0, 3) != 0) op = ABU_NOP;
        rnd_instr = {4'(op), 8'($urandom)};
        a = ($urandom_range(0, 2) == 0) ? '0 : word_t'($urandom_range(0, 6));
        rnd_en = $urandom_range(0, 3) != 0;
        start = $urandom_range(0, 2) == 0;
        // expected next state
        dec = m_out - 1;
        m_done = 0;
        if (!m_run) begin
          if (start) begin m_pc = 0; m_run = 1; end
        end else if (rnd_en) begin
          case (op)
            ABU_JMP:  m_pc = rnd_instr[7:0];
            ABU_BNZ:  m_pc = (a != 0) ? rnd_instr[7:0] : m_pc + 1;
            ABU_BZ:   m_pc = (a == 0) ? rnd_instr[7:0] : m_pc + 1;
            ABU_HALT: begin m_run = 0; m_done = 1; end
            ABU_DBNZ: m_pc = (dec != 0) ? rnd_instr[7:0] : m_pc + 1;
            default:  m_pc = m_pc + 1;
          endcase
          if (op == ABU_LDC) m_out = a;
          else if (op == ABU_DBNZ) m_out = dec;
        end
        @(negedge clk);
        chk(pc == m_pc && running == m_run && done == m_done && out == m_out,
            $sformatf("random step %0d op %0d: pc %0d/%0d run %b/%b done %b/%b out %0d/%0d",
                      i, op, pc, m_pc, running, m_run, done, m_done, out, m_out));
      end
      start = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
