// tb_kernel_pkg: builds CGRA kernels for the testbenches.
//
// cgra_kernel holds what a kernel consists of: one network configuration
// word per FU, the nine 12-bit instruction memories and the two 33-bit IU
// memories, and the number of rows used. image() flattens it into the word
// layout the program loader reads (configuration words, then per row nine IM
// words and two words per IU).
//
// build_scaled_sum(n) is a two-channel SIMD kernel: for channel k in {0,1}
// it loads x_k[i] (DMEM words 64*k + i, i < n), multiplies by a coefficient
// c, accumulates, and stores acc_k at 128 + 64*k + n, then combines both
// sums through the register file and a local memory and stores acc_0+acc_1
// at 200 + n. Cycles without bus contention: 7n + 15.
package tb_kernel_pkg;
  import bw_pkg::*;

  function automatic logic [11:0] ins(logic [3:0] op, int field);
    return {op, 8'(field)};
  endfunction

  function automatic logic [31:0] cfgw(logic [4:0] src_a, logic [4:0] src_b, logic [3:0] im_sel);
    return {18'd0, im_sel, src_b, src_a};
  endfunction

  class cgra_kernel;
    logic [31:0] cfg [NUM_FU];
    logic [11:0] im  [NUM_IM12][IM_DEPTH];
    logic [32:0] iu  [2][IM_DEPTH];
    int          rows;

    function new();
      for (int f = 0; f < int'(NUM_FU); f++) cfg[f] = cfgw(31, 31, 15);
      for (int m = 0; m < int'(NUM_IM12); m++)
        for (int r = 0; r < int'(IM_DEPTH); r++) im[m][r] = '0;
      for (int u = 0; u < 2; u++)
        for (int r = 0; r < int'(IM_DEPTH); r++) iu[u][r] = '0;
      rows = 0;
    endfunction

    function void image(ref logic [31:0] words [$]);
      words.delete();
      for (int f = 0; f < int'(NUM_FU); f++) words.push_back(cfg[f]);
      for (int r = 0; r < rows; r++) begin
        for (int m = 0; m < int'(NUM_IM12); m++) words.push_back({20'd0, im[m][r]});
        for (int u = 0; u < 2; u++) begin
          words.push_back(iu[u][r][31:0]);
          words.push_back({31'd0, iu[u][r][32]});
        end
      end
    endfunction

    function void randomize_all(int nrows);
      for (int f = 0; f < int'(NUM_FU); f++) cfg[f] = {18'd0, 14'($urandom)};
      for (int r = 0; r < nrows; r++) begin
        for (int m = 0; m < int'(NUM_IM12); m++) im[m][r] = 12'($urandom);
        for (int u = 0; u < 2; u++) iu[u][r] = {1'($urandom), 32'($urandom)};
      end
      rows = nrows;
    endfunction

    function void build_scaled_sum(int n, logic [31:0] c);
      // network: FU index = src; IM per FU
      cfg[FU_ALU0] = cfgw(FU_ALU0, FU_IU0, 3);   // pointer p0
      cfg[FU_ALU1] = cfgw(FU_ALU1, FU_IU0, 4);   // pointer p1
      cfg[FU_LSU0] = cfgw(FU_ALU0, FU_ALU2, 0);  // SIMD pair on IM0
      cfg[FU_LSU1] = cfgw(FU_ALU1, FU_ALU3, 0);
      cfg[FU_MUL0] = cfgw(FU_LSU0, FU_IU0, 1);   // SIMD pair on IM1, bypass LSU->MUL
      cfg[FU_MUL1] = cfgw(FU_LSU1, FU_IU0, 1);
      cfg[FU_ALU2] = cfgw(FU_MUL0, 31, 2);       // accumulators, SIMD on IM2
      cfg[FU_ALU3] = cfgw(FU_MUL1, 31, 2);
      cfg[FU_ABU]  = cfgw(FU_IU1, 31, 5);
      cfg[FU_RF]   = cfgw(FU_ALU2, 31, 6);
      cfg[FU_ALU4] = cfgw(FU_RF, FU_LSU2, 6);    // shares IM6 with the RF
      cfg[FU_LSU2] = cfgw(FU_ALU0, FU_ALU3, 7);
      cfg[FU_LSU3] = cfgw(FU_ALU0, FU_ALU4, 8);
      // r0
      iu[0][0] = {1'b1, 32'd0};
      iu[1][0] = {1'b1, 32'(n)};
      // r1
      im[3][1] = ins(ALU_PASSB, 0);
      iu[0][1] = {1'b1, 32'd64};
      im[5][1] = ins(ABU_LDC, 0);
      im[2][1] = ins(ALU_PASSB, 0);
      // r2
      im[4][2] = ins(ALU_PASSB, 0);
      iu[0][2] = {1'b1, c};
      // loop r3..r5
      im[0][3] = ins(LSU_LDG, 0);
      im[1][4] = ins(MUL_MUL, 0);
      im[3][4] = ins(ALU_ADDI, 1);
      im[4][4] = ins(ALU_ADDI, 1);
      im[2][5] = ins(ALU_ACC, 0);
      im[5][5] = ins(ABU_DBNZ, 3);
      // epilogue
      im[0][6] = ins(LSU_STG, 128);
      im[6][7] = {4'(RF_WR), 4'd3, 4'd0};
      im[7][7] = ins(LSU_STL, 0);
      im[6][8] = {4'(RF_RD), 4'd0, 4'd3};
      im[7][8] = ins(LSU_LDL, 0);
      im[6][9] = {4'(RF_RD), 4'd0, 4'd3};        // = ALU_ADD for ALU4
      im[8][10] = ins(LSU_STG, 200);
      im[5][11] = ins(ABU_HALT, 0);
      rows = 12;
    endfunction
  endclass

  // Reference results of build_scaled_sum: {acc0, acc1, acc0 + acc1}.
  function automatic void ref_scaled_sum(input logic [31:0] x0 [64], input logic [31:0] x1 [64],
                                         input int n, input logic [31:0] c,
                                         output logic [31:0] r0, output logic [31:0] r1,
                                         output logic [31:0] r2);
    r0 = 0; r1 = 0;
    for (int i = 0; i < n; i++) begin
      r0 += x0[i] * c;
      r1 += x1[i] * c;
    end
    r2 = r0 + r1;
  endfunction
endpackage
