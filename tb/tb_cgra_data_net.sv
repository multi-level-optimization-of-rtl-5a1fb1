// tb_cgra_data_net: self-checking test of the data network: random
// configurations and FU outputs; every operand must equal the selected FU
// output, or zero for an out-of-range select.
module tb_cgra_data_net;
  import bw_pkg::*;
  word_t   fu_out [NUM_FU];
  fu_cfg_t cfg    [NUM_FU];
  word_t   op_a   [NUM_FU];
  word_t   op_b   [NUM_FU];
  int checks = 0, failures = 0;

  cgra_data_net dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      for (int i = 0; i < int'(NUM_FU); i++) begin
        fu_out[i] = $urandom;
        cfg[i] = '{im_sel: 4'($urandom), src_b: 5'($urandom), src_a: 5'($urandom)};
      end
      #1;
      for (int i = 0; i < int'(NUM_FU); i++) begin
        automatic word_t ea = (int'(cfg[i].src_a) < NUM_FU) ? fu_out[cfg[i].src_a] : '0;
        automatic word_t eb = (int'(cfg[i].src_b) < NUM_FU) ? fu_out[cfg[i].src_b] : '0;
        checks += 2;
        if (op_a[i] !== ea) begin failures++; $display("FAIL a[%0d]", i); end
        if (op_b[i] !== eb) begin failures++; $display("FAIL b[%0d]", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
