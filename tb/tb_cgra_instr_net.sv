// tb_cgra_instr_net: self-checking test of the instruction network: random
// IM words and selections (including broadcast of one IM to several FUs);
// each FU must see its selected IM word, or a NOP for a select past the IMs.
module tb_cgra_instr_net;
  import bw_pkg::*;
  instr_t  im_instr [NUM_IM12];
  fu_cfg_t cfg      [NUM_FU];
  instr_t  fu_instr [NUM_FU];
  int checks = 0, failures = 0, broadcasts = 0;

  cgra_instr_net dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      for (int m = 0; m < int'(NUM_IM12); m++) im_instr[m] = 12'($urandom);
      for (int i = 0; i < int'(NUM_FU); i++)
        cfg[i] = '{im_sel: (it % 2 != 0) ? 4'($urandom_range(0, 2)) : 4'($urandom), src_b: '0, src_a: '0};
      #1;
      for (int i = 0; i < int'(NUM_FU); i++) begin
        automatic instr_t e = (int'(cfg[i].im_sel) < NUM_IM12) ? im_instr[cfg[i].im_sel] : '0;
        checks++;
        if (fu_instr[i] !== e) begin failures++; $display("FAIL fu %0d", i); end
        if (i > 0 && cfg[i].im_sel == cfg[0].im_sel && int'(cfg[0].im_sel) < NUM_IM12) broadcasts++;
      end
    end
    checks++;
    if (broadcasts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
