// cgra_data_net: reconfigurable data network of the CGRA.
//
// Every FU has two operand inputs (a, b). For each of them the kernel's
// configuration word selects which FU output drives it (src_a, src_b); a
// select of NUM_FU or above gives zero. Because every FU output is a
// register, an operand can come straight from the producing FU one cycle
// later without a register-file round trip, and FUs chain into spatial
// pipelines. The chip builds this from a grid of switchboxes with 32-bit
// links; this design models the configured result as a full crossbar, which
// offers every route the switchboxes could be configured for and more.
module cgra_data_net
  import bw_pkg::*;
(
  input  word_t   fu_out [NUM_FU],
  input  fu_cfg_t cfg    [NUM_FU],
  output word_t   op_a   [NUM_FU],
  output word_t   op_b   [NUM_FU]
);
  always_comb begin
    for (int i = 0; i < int'(NUM_FU); i++) begin
      op_a[i] = '0;
      op_b[i] = '0;
      for (int s = 0; s < int'(NUM_FU); s++) begin
        if (int'(cfg[i].src_a) == s) op_a[i] = fu_out[s];
        if (int'(cfg[i].src_b) == s) op_b[i] = fu_out[s];
      end
    end
  end
endmodule
