// kws_top_tb: end-to-end test of the accelerator at a reduced frame length
// (64 samples) with a small network that uses every layer type and mode:
// 1x5 convolution, max pooling, 1x10 convolution with the approximate
// multiplier (HBL, VBL) = (2, 5), average pooling into the Conv Output
// Buffer, a 10-unit LSTM over 4 time steps and a 5-output FC layer. Two
// frames are processed; see kws_top_tb_body.svh for the checks.
module kws_top_tb;
  import kws_pkg::*;
  import kws_model_pkg::mk;

  localparam int FL = 64;
  localparam int N_FRAMES = 2;
  localparam int WD_CYCLES = 200000;

  function automatic void make_program(input int f, output layer_t P [N_LAYERS], output int nwords);
    for (int i = 0; i < N_LAYERS; i++) P[i] = '0;
    //        op          k10   relu  s  src     dst     cin cout lin lout sb db  wb  sh hbl vbl win recip
    P[0] = mk(OP_CONV,    1'b0, 1'b1, 2, BUF_1,  BUF_2,  1,  4,   64, 30,  0, 0,  0,  5, 0, 0, 0, 0);
    P[1] = mk(OP_MAXPOOL, 1'b0, 1'b0, 2, BUF_2,  BUF_1,  4,  4,   30, 14,  0, 0,  0,  0, 0, 0, 3, 0);
    P[2] = mk(OP_CONV,    1'b1, 1'b1, 1, BUF_1,  BUF_2,  4,  4,   14, 5,   0, 0,  1,  7, 2, 5, 0, 0);
    P[3] = mk(OP_AVGPOOL, 1'b0, 1'b0, 1, BUF_2,  BUF_CO, 4,  4,   5,  4,   0, 0,  0,  0, 0, 0, 2, 128);
    P[4] = mk(OP_LSTM,    1'b0, 1'b0, 1, BUF_CO, BUF_1,  4,  10,  4,  4,   0, 0,  9,  5, 2, 5, 0, 0);
    P[5] = mk(OP_FC,      1'b0, 1'b0, 1, BUF_2,  BUF_1,  10, 5,   0,  0,   0, 0,  37, 4, 0, 0, 0, 0);
    nwords = 47;
  endfunction

  kws_top #(.FRAME_LEN(FL)) dut (.*);

  `include "kws_top_tb_body.svh"
endmodule
