// cgra_instr_net: reconfigurable instruction network of the CGRA.
//
// Each FU takes its 12-bit instruction stream from one of the nine 12-bit
// instruction memories, chosen by im_sel in its configuration word. Several
// FUs may select the same memory: the instruction is then broadcast and the
// FUs run in SIMD fashion (for instance two LSUs fetching two EEG channels).
// A select of NUM_IM12 or above gives a NOP. The two immediate units have
// their own 33-bit memories and do not use this network. The chip builds
// the network from switchboxes; this design models the configured result as
// a multiplexer per FU.
module cgra_instr_net
  import bw_pkg::*;
(
  input  instr_t  im_instr [NUM_IM12],
  input  fu_cfg_t cfg      [NUM_FU],
  output instr_t  fu_instr [NUM_FU]
);
  always_comb begin
    for (int i = 0; i < int'(NUM_FU); i++) begin
      fu_instr[i] = '0;
      for (int m = 0; m < int'(NUM_IM12); m++) begin
        if (int'(cfg[i].im_sel) == m) fu_instr[i] = im_instr[m];
      end
    end
  end
endmodule
