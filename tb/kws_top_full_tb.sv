// kws_top_full_tb: one complete recognition on kws_top with every parameter
// at its default (800-sample frame, 4 x 1942 weight words, 2 x 800-word
// buffers, 1680-byte Conv Output Buffer), running the 5-keyword network:
//   Conv1 1x5/8/s2 -> max pool 5/s2 -> Conv2 1x10/16/s2 -> Conv3 1x5/32/s1
//   -> Conv4 1x10/32/s2 (HBL,VBL = 2,5) -> Conv5 1x5/48/s2
//   -> average pool 2 -> LSTM (9 steps, HBL,VBL = 2,5) -> FC 5.
// The LSTM has 40 units instead of 50: with 50 units the weights of this
// network need 2120 words per SRAM, more than the 1942 available.
module kws_top_full_tb;
  import kws_pkg::*;
  import kws_model_pkg::mk;

  localparam int FL = 800;
  localparam int N_FRAMES = 1;
  localparam int WD_CYCLES = 2000000;

  function automatic void make_program(input int f, output layer_t P [N_LAYERS], output int nwords);
    for (int i = 0; i < N_LAYERS; i++) P[i] = '0;
    //        op          k10   relu  s  src     dst     cin cout lin  lout sb db wb    sh hbl vbl win recip
    P[0] = mk(OP_CONV,    1'b0, 1'b1, 2, BUF_1,  BUF_2,  1,  8,   800, 398, 0, 0, 0,    5, 0, 0, 0, 0);
    P[1] = mk(OP_MAXPOOL, 1'b0, 1'b0, 2, BUF_2,  BUF_1,  8,  8,   398, 197, 0, 0, 0,    0, 0, 0, 5, 0);
    P[2] = mk(OP_CONV,    1'b1, 1'b1, 2, BUF_1,  BUF_2,  8,  16,  197, 94,  0, 0, 2,    6, 0, 0, 0, 0);
    P[3] = mk(OP_CONV,    1'b0, 1'b1, 1, BUF_2,  BUF_1,  16, 32,  94,  90,  0, 0, 66,   6, 0, 0, 0, 0);
    P[4] = mk(OP_CONV,    1'b1, 1'b1, 2, BUF_1,  BUF_2,  32, 32,  90,  41,  0, 0, 194,  7, 2, 5, 0, 0);
    P[5] = mk(OP_CONV,    1'b0, 1'b1, 2, BUF_2,  BUF_1,  32, 48,  41,  19,  0, 0, 706,  7, 0, 0, 0, 0);
    P[6] = mk(OP_AVGPOOL, 1'b0, 1'b0, 2, BUF_1,  BUF_CO, 48, 48,  19,  9,   0, 0, 0,    0, 0, 0, 2, 128);
    P[7] = mk(OP_LSTM,    1'b0, 1'b0, 1, BUF_CO, BUF_1,  48, 40,  9,   9,   0, 0, 1090, 5, 2, 5, 0, 0);
    P[8] = mk(OP_FC,      1'b0, 1'b0, 1, BUF_1,  BUF_1,  40, 5,   0,   0,   0, 0, 1794, 4, 0, 0, 0, 0);
    nwords = 1834;
  endfunction

  kws_top dut (.*);

  `include "kws_top_tb_body.svh"
endmodule
