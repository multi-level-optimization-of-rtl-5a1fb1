// cgra_abu: branch unit and sequencer of the CGRA; holds the program counter
// that all instruction memories share, so the fabric runs as one VLIW.
//
// start (one cycle, while idle) sets pc to 0 and running high. Each enabled
// cycle (en = running and not stalled) the fetched instruction decides the
// next pc: NOP -> pc+1; JMP -> field; BNZ/BZ -> field if operand a is
// non-zero/zero, else pc+1; LDC loads the loop counter from a; DBNZ
// decrements the counter and jumps to field while the decremented value is
// non-zero; HALT clears running and pulses done for one cycle. out exposes
// the loop counter to the data network. Branches take effect on the next
// fetch: there is no delay slot. The ABU's presence follows the chip; its
// instructions and timing are this design's own.
module cgra_abu
  import bw_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            en,
  input  instr_t          instr,
  input  word_t           a,
  output logic [PC_W-1:0] pc,
  output logic            running,
  output logic            done,
  output word_t           out
);
  abu_op_e         op;
  logic [PC_W-1:0] target;
  logic [PC_W-1:0] pc_next;
  word_t           cnt_dec;

  assign op      = abu_op_e'(instr[11:8]);
  assign target  = instr[PC_W-1:0];
  assign cnt_dec = out - 32'd1;

  always_comb begin
    unique case (op)
      ABU_JMP:  pc_next = target;
      ABU_BNZ:  pc_next = (a != '0) ? target : pc + 1'b1;
      ABU_BZ:   pc_next = (a == '0) ? target : pc + 1'b1;
      ABU_HALT: pc_next = pc;
      ABU_DBNZ: pc_next = (cnt_dec != '0) ? target : pc + 1'b1;
      default:  pc_next = pc + 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
      done    <= 1'b0;
      out     <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          pc      <= '0;
          running <= 1'b1;
        end
      end else if (en) begin
        pc <= pc_next;
        if (op == ABU_HALT) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
        if (op == ABU_LDC)       out <= a;
        else if (op == ABU_DBNZ) out <= cnt_dec;
      end
    end
  end
endmodule
