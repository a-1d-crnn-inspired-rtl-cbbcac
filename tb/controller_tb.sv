// controller_tb: runs the controller with the PE array, the Non-linear module
// and the memories, one single-layer program at a time: 1x5 CONV with ReLU,
// 1x10 CONV with the approximate multiplier, MAXPOOL, AVGPOOL, LSTM and FC.
// Memories are preloaded with random bytes directly. For each program it
// checks the start/busy/done handshake, the number of busy cycles against the
// schedule (K+1 cycles per input channel plus one emit per output channel
// for CONV, one cycle per window element for pooling, cin+H+5 cycles per
// group of five LSTM cells, cin+cout for FC, plus two descriptor fetches and four drain cycles) and every
// byte of the memories against kws_model_pkg.
module controller_tb;
  import kws_pkg::*;
  import kws_model_pkg::mk;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  layer_t program_i [N_LAYERS];
  logic w_re;
  logic [10:0] w_addr;
  logic [2:0] rd_en;
  logic [11:0] rd_addr;
  logic [31:0] buf1_rdata, buf2_rdata;
  logic [7:0] co_rdata;
  logic pe_lstm_mode, pe_k10, pe_d_ld, pe_w_ld, pe_en, pe_clr, pe_first;
  logic signed [7:0] pe_d_in;
  logic [2:0] pe_hbl, pe_col;
  logic [3:0] pe_vbl;
  logic signed [31:0] pe_out [4];
  logic [39:0] w_data [4];
  logic nl_valid, nl_first, nl_last, nl_relu, nl_out_valid;
  nl_op_e nl_op;
  logic [4:0] nl_shift;
  logic [7:0] nl_recip;
  logic signed [31:0] nl_gate [4];
  logic signed [7:0] nl_x, nl_y;
  logic signed [15:0] nl_c_prev, nl_c_out;
  logic [14:0] nl_tag, nl_tag_out;
  logic [3:0] buf1_we, buf2_we;
  logic [11:0] wr_addr;
  logic [31:0] wr_data;
  logic co_we;
  logic score_valid, cls_valid;
  logic signed [15:0] score_o;
  logic [2:0] cls_o;
  int checks = 0, failures = 0, cyc = 0;

  controller dut (.*);

  pe_array u_pe (.clk, .rst_n, .lstm_mode(pe_lstm_mode), .k10(pe_k10), .d_ld(pe_d_ld),
                 .d_in(pe_d_in), .w_ld(pe_w_ld), .w_in(w_data), .en(pe_en), .clr(pe_clr),
                 .first(pe_first), .hbl(pe_hbl), .vbl(pe_vbl), .col_sel(pe_col), .pe_out(pe_out));
  nonlinear #(.TAG_W(15)) u_nl (.clk, .rst_n, .in_valid(nl_valid), .op(nl_op), .first(nl_first),
                 .last(nl_last), .shift(nl_shift), .relu(nl_relu), .recip(nl_recip), .gate(nl_gate),
                 .x(nl_x), .c_prev(nl_c_prev), .tag_in(nl_tag), .out_valid(nl_out_valid), .y(nl_y),
                 .c_out(nl_c_out), .tag_out(nl_tag_out), .score_valid, .score_o, .cls_valid, .cls_o);
  data_buffer u_b1 (.clk, .re(rd_en[0]), .raddr(rd_addr), .rdata(buf1_rdata), .we(buf1_we),
                    .waddr(wr_addr), .wdata(wr_data));
  data_buffer u_b2 (.clk, .re(rd_en[1]), .raddr(rd_addr), .rdata(buf2_rdata), .we(buf2_we),
                    .waddr(wr_addr), .wdata(wr_data));
  conv_out_buffer u_co (.clk, .re(rd_en[2]), .raddr(rd_addr), .rdata(co_rdata), .we(co_we),
                        .waddr(wr_addr), .wdata(wr_data[7:0]));
  for (genvar s = 0; s < 4; s++) begin : g_w
    weight_sram u_w (.clk, .re(w_re), .we(1'b0), .addr(w_addr), .wdata('0), .rdata(w_data[s]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  int sc [5], nsc, gcls;
  always @(posedge clk) begin
    if (score_valid && nsc < 5) begin sc[nsc] = int'(score_o); nsc++; end
    if (cls_valid) gcls = int'(cls_o);
  end

  task automatic run_one(layer_t L, int expect_layer_cycles);
    int t0, t1;
    for (int i = 0; i < N_LAYERS; i++) program_i[i] = '0;
    program_i[0] = L;
    // random memory contents, mirrored into the model
    for (int i = 0; i < 800; i++) begin
      u_b1.mem[i] = $urandom; u_b2.mem[i] = $urandom;
      for (int b = 0; b < 4; b++) begin
        kws_model_pkg::mb1[4*i+b] = int'(u_b1.mem[i][8*b +: 8]);
        kws_model_pkg::mb2[4*i+b] = int'(u_b2.mem[i][8*b +: 8]);
      end
    end
    for (int i = 0; i < 1680; i++) begin
      u_co.mem[i] = 8'($urandom_range(0, 120));
      kws_model_pkg::mco[i] = int'(u_co.mem[i]);
    end
    nsc = 0; gcls = -1;
    @(negedge clk);
    chk("idle", int'(busy), 0);
    start = 1;
    @(negedge clk);
    start = 0;
    chk("busy after start", int'(busy), 1);
    t0 = cyc;
    wait (done);
    t1 = cyc;
    @(negedge clk);
    chk("idle after done", int'(busy), 0);
    chk("cycles", t1 - t0, expect_layer_cycles + 6);  // 2 fetches + 4 drain
    kws_model_pkg::run_layer(L);
    for (int i = 0; i < 3200; i++) begin
      chk("b1", int'(u_b1.mem[i / 4][8 * (i % 4) +: 8]), kws_model_pkg::mb1[i]);
      chk("b2", int'(u_b2.mem[i / 4][8 * (i % 4) +: 8]), kws_model_pkg::mb2[i]);
    end
    for (int i = 0; i < 1680; i++) chk("co", int'(u_co.mem[i]), kws_model_pkg::mco[i]);
    if (L.op == OP_FC) begin
      chk("nscores", nsc, int'(L.cout));
      for (int k = 0; k < int'(L.cout); k++) chk("score", sc[k], kws_model_pkg::scores[k]);
      chk("cls", gcls, kws_model_pkg::cls);
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++)
      for (int a = 0; a < 1942; a++)
        for (int k = 0; k < 5; k++)
          kws_model_pkg::wimg[s][a][k] = $urandom_range(0, 60) - 30;
    for (int a = 0; a < 1942; a++)
      for (int k = 0; k < 5; k++) begin
        g_w[0].u_w.mem[a][8*k +: 8] = 8'(kws_model_pkg::wimg[0][a][k]);
        g_w[1].u_w.mem[a][8*k +: 8] = 8'(kws_model_pkg::wimg[1][a][k]);
        g_w[2].u_w.mem[a][8*k +: 8] = 8'(kws_model_pkg::wimg[2][a][k]);
        g_w[3].u_w.mem[a][8*k +: 8] = 8'(kws_model_pkg::wimg[3][a][k]);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    //                op          k10   relu  s  src     dst     cin cout lin lout  sb   db   wb   sh hbl vbl win rc
    run_one(mk(OP_CONV,    1'b0, 1'b1, 2, BUF_1,  BUF_2,  3,  8,  60, 28,  4,   100, 10,  8, 0, 0, 0, 0),
            2 * 28 * (3 * 6 + 4));
    run_one(mk(OP_CONV,    1'b1, 1'b0, 1, BUF_2,  BUF_1,  5,  4,  30, 21,  0,   0,   200, 9, 2, 5, 0, 0),
            2 * 21 * (5 * 11 + 2));
    run_one(mk(OP_MAXPOOL, 1'b0, 1'b0, 2, BUF_1,  BUF_2,  6,  6,  40, 18,  0,   8,   0,   0, 0, 0, 5, 0),
            6 * 18 * 5);
    run_one(mk(OP_AVGPOOL, 1'b0, 1'b0, 3, BUF_2,  BUF_CO, 5,  5,  30, 10,  0,   0,   0,   0, 0, 0, 3, 85),
            5 * 10 * 3);
    run_one(mk(OP_LSTM,    1'b0, 1'b0, 1, BUF_CO, BUF_2,  6,  15, 5,  5,   100, 40,  300, 7, 2, 5, 0, 0),
            5 * 3 * (6 + 15 + 5));
    run_one(mk(OP_FC,      1'b0, 1'b0, 1, BUF_1,  BUF_1,  12, 5,  0,  0,   16,  0,   500, 6, 0, 0, 0, 0),
            12 + 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
