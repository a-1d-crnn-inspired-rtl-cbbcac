// kws_top_approx_tb: the 5-keyword network on the default-sized kws_top, run
// once for each of the four approximate-multiplier settings the network was
// evaluated with. Frame f uses setting CASE(f+1), given as (HBL, VBL) for
// Conv3, Conv4, Conv5 and the LSTM (Conv1, Conv2 and FC stay exact):
//   CASE1: (0,0) (2,5) (0,0) (2,5)    CASE2: (2,8) (2,6) (2,8) (2,6)
//   CASE3: (3,6) (2,5) (3,6) (2,5)    CASE4: (3,8) (3,6) (3,8) (3,6)
// Between frames only the changed descriptors are rewritten through the
// configure bus; weights stay loaded. Each frame is checked bit-exactly
// against the reference model (every buffer, every score, the class and the
// cycle count), so the approximate products of every setting are exercised
// inside the full datapath. The network and the 40-unit LSTM are as in
// kws_top_full_tb. The weights are random and small (|w| <= 20), so most
// products lie in the low columns that VBL = 5..8 degrades; with CASE2..4
// the ReLU layers then pass nothing and all scores come out 0. That is the
// correct result of the approximate arithmetic for these weights and says
// nothing about recognition accuracy with trained weights.
module kws_top_approx_tb;
  import kws_pkg::*;
  import kws_model_pkg::mk;

  localparam int FL = 800;
  localparam int N_FRAMES = 4;
  localparam int WD_CYCLES = 3000000;

  // (HBL, VBL) per case for Conv3, Conv4, Conv5, LSTM
  localparam int CASE_HBL [4][4] = '{'{0, 2, 0, 2}, '{2, 2, 2, 2}, '{3, 2, 3, 2}, '{3, 3, 3, 3}};
  localparam int CASE_VBL [4][4] = '{'{0, 5, 0, 5}, '{8, 6, 8, 6}, '{6, 5, 6, 5}, '{8, 6, 8, 6}};

  function automatic void make_program(input int f, output layer_t P [N_LAYERS], output int nwords);
    int li [4];
    for (int i = 0; i < N_LAYERS; i++) P[i] = '0;
    //        op          k10   relu  s  src     dst     cin cout lin  lout sb db wb    sh hbl vbl win recip
    P[0] = mk(OP_CONV,    1'b0, 1'b1, 2, BUF_1,  BUF_2,  1,  8,   800, 398, 0, 0, 0,    5, 0, 0, 0, 0);
    P[1] = mk(OP_MAXPOOL, 1'b0, 1'b0, 2, BUF_2,  BUF_1,  8,  8,   398, 197, 0, 0, 0,    0, 0, 0, 5, 0);
    P[2] = mk(OP_CONV,    1'b1, 1'b1, 2, BUF_1,  BUF_2,  8,  16,  197, 94,  0, 0, 2,    6, 0, 0, 0, 0);
    P[3] = mk(OP_CONV,    1'b0, 1'b1, 1, BUF_2,  BUF_1,  16, 32,  94,  90,  0, 0, 66,   6, 0, 0, 0, 0);
    P[4] = mk(OP_CONV,    1'b1, 1'b1, 2, BUF_1,  BUF_2,  32, 32,  90,  41,  0, 0, 194,  7, 0, 0, 0, 0);
    P[5] = mk(OP_CONV,    1'b0, 1'b1, 2, BUF_2,  BUF_1,  32, 48,  41,  19,  0, 0, 706,  7, 0, 0, 0, 0);
    P[6] = mk(OP_AVGPOOL, 1'b0, 1'b0, 2, BUF_1,  BUF_CO, 48, 48,  19,  9,   0, 0, 0,    0, 0, 0, 2, 128);
    P[7] = mk(OP_LSTM,    1'b0, 1'b0, 1, BUF_CO, BUF_1,  48, 40,  9,   9,   0, 0, 1090, 5, 0, 0, 0, 0);
    P[8] = mk(OP_FC,      1'b0, 1'b0, 1, BUF_1,  BUF_1,  40, 5,   0,   0,   0, 0, 1794, 4, 0, 0, 0, 0);
    li = '{3, 4, 5, 7};
    for (int j = 0; j < 4; j++) begin
      P[li[j]].hbl = 3'(CASE_HBL[f % 4][j]);
      P[li[j]].vbl = 4'(CASE_VBL[f % 4][j]);
    end
    nwords = 1834;
  endfunction

  kws_top dut (.*);

  `include "kws_top_tb_body.svh"

  // backstop in case the shared body never reaches its own end
  initial begin
    repeat (WD_CYCLES + 100) @(posedge clk);
    $finish;
  end

endmodule
