// Shared body of the end-to-end testbenches of kws_top. The including module
// defines FL (frame length of its kws_top instance), N_FRAMES, WD_CYCLES,
// a function make_program(input int f, output layer_t P[N_LAYERS],
// output int nwords) giving the program for frame f (entries that change
// between frames are rewritten through the configure bus before the frame),
// and instantiates kws_top as 'dut' with the signals declared here.
//
// Flow: random weights are written through the configure bus, the program is
// written, then N_FRAMES frames of a synthetic signal (two tones plus noise)
// are streamed in. After each 'done' the whole contents of Buffer1, Buffer2
// and the Conv Output Buffer, the FC scores and the recognised class are
// compared with kws_model_pkg, and the number of busy cycles with the
// schedule of the controller. Every mechanism of the design is counted and
// must occur at least once.

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [15:0] cfg_addr = 0;
  logic [39:0] cfg_wdata = 0;
  logic s_valid = 0, s_ready;
  logic signed [15:0] s_data = 0;
  logic [3:0] qshift = 4'd6;
  logic busy, done, score_valid, cls_valid;
  logic signed [15:0] score;
  logic [2:0] cls;

  int checks = 0, failures = 0;
  int cyc = 0;
  layer_t prog [N_LAYERS];
  int nwords;

  // mechanism counters
  int n_cnn5, n_cnn10, n_lstm, n_fc, n_approx, n_max, n_avg, n_switch, n_stall;
  int n_relu, n_sat, n_lstm_cell, n_frames, n_reprog;
  logic prev_mode = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (WD_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // scores as they come out
  int got_scores [5];
  int got_nscores = 0, got_cls = -1;
  always @(posedge clk) begin
    if (score_valid && got_nscores < 5) begin
      got_scores[got_nscores] = int'(score);
      got_nscores++;
    end
    if (cls_valid) got_cls = int'(cls);
  end

  // mechanism probes
  always @(posedge clk) if (rst_n) begin
    if (dut.pe_en && !dut.pe_lstm_mode && !dut.pe_k10) n_cnn5++;
    if (dut.pe_en && !dut.pe_lstm_mode && dut.pe_k10) n_cnn10++;
    if (dut.pe_en && dut.u_ctrl.cur.op == OP_LSTM) n_lstm++;
    if (dut.pe_en && dut.u_ctrl.cur.op == OP_FC) n_fc++;
    if (dut.pe_en && (dut.pe_hbl != 0 || dut.pe_vbl != 0)) n_approx++;
    if (dut.nl_valid && dut.nl_op == NL_MAX && dut.nl_last) n_max++;
    if (dut.nl_valid && dut.nl_op == NL_AVG && dut.nl_last) n_avg++;
    if (dut.nl_valid && dut.nl_op == NL_LSTM) n_lstm_cell++;
    if (dut.nl_valid && dut.nl_op == NL_CONV && dut.nl_relu &&
        (dut.nl_gate[0] >>> dut.nl_shift) < 0) n_relu++;
    if (dut.nl_valid && dut.nl_op == NL_CONV &&
        ((dut.nl_gate[0] >>> dut.nl_shift) > 127 || (dut.nl_gate[0] >>> dut.nl_shift) < -128)) n_sat++;
    if (dut.pe_lstm_mode != prev_mode) n_switch++;
    prev_mode <= dut.pe_lstm_mode;
    if (s_valid && !s_ready) n_stall++;
  end

  task automatic cfg_write(int addr, logic [39:0] data);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 16'(addr); cfg_wdata = data;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // cycles the controller needs for one layer (its schedule, see controller)
  function automatic int layer_cycles(layer_t L);
    int kt, rpp;
    kt = L.k10 ? 10 : 5;
    rpp = L.k10 ? 2 : 4;
    unique case (L.op)
      OP_CONV:    return (int'(L.cout) / rpp) * int'(L.lout) * (int'(L.cin) * (kt + 1) + rpp);
      OP_MAXPOOL,
      OP_AVGPOOL: return int'(L.cin) * int'(L.lout) * int'(L.win);
      OP_LSTM:    return int'(L.lin) * (int'(L.cout) / 5) * (int'(L.cin) + int'(L.cout) + 5);
      OP_FC:      return int'(L.cin) + int'(L.cout);
      default:    return 0;
    endcase
  endfunction

  initial begin
    int prev_x, expect_cycles, t0, t1;
    make_program(0, prog, nwords);
    prev_x = 0;
    // random weights
    for (int s = 0; s < 4; s++)
      for (int a = 0; a < 2048; a++)
        for (int k = 0; k < 5; k++)
          kws_model_pkg::wimg[s][a][k] = (a < nwords) ? ($urandom_range(0, 40) - 20) : 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++)
      for (int a = 0; a < nwords; a++) begin
        logic [39:0] wd;
        for (int k = 0; k < 5; k++) wd[8*k +: 8] = 8'(kws_model_pkg::wimg[s][a][k]);
        cfg_write((s << 11) | a, wd);
      end
    for (int e = 0; e < N_LAYERS; e++)
      for (int part = 0; part < 4; part++)
        cfg_write(16'h4000 | (e << 2) | part, {8'h00, prog[e][32*part +: 32]});
    // model memories start as the DUT's (whatever was there before)
    for (int i = 0; i < 3200; i++) begin
      kws_model_pkg::mb1[i] = int'(dut.u_buf1.mem[i / 4][8 * (i % 4) +: 8]);
      kws_model_pkg::mb2[i] = int'(dut.u_buf2.mem[i / 4][8 * (i % 4) +: 8]);
    end
    for (int i = 0; i < 1680; i++) kws_model_pkg::mco[i] = int'(dut.u_co.mem[i]);

    expect_cycles = 1;   // fetch of the END entry
    for (int e = 0; e < N_LAYERS; e++) begin
      if (prog[e].op == OP_END) break;
      expect_cycles += layer_cycles(prog[e]) + 5;   // fetch + drain
    end

    for (int f = 0; f < N_FRAMES; f++) begin
      // reprogram the entries that differ for this frame
      if (f > 0) begin
        layer_t pn [N_LAYERS];
        int nw;
        make_program(f, pn, nw);
        for (int e = 0; e < N_LAYERS; e++)
          if (pn[e] != prog[e]) begin
            for (int part = 0; part < 4; part++)
              cfg_write(16'h4000 | (e << 2) | part, {8'h00, pn[e][32*part +: 32]});
            prog[e] = pn[e];
            n_reprog++;
          end
      end
      // stream one frame
      for (int i = 0; i < FL; i++) begin
        int xv;
        real ph;
        ph = real'(f * FL + i);
        xv = int'(9000.0 * $sin(ph * 0.31) + 5000.0 * $sin(ph * 0.047)) + $urandom_range(0, 4000) - 2000;
        @(negedge clk);
        s_valid = 1; s_data = 16'(xv);
        kws_model_pkg::mb1[i] = kws_model_pkg::preemph(xv, prev_x, int'(qshift)) & 255;
        prev_x = xv;
        while (!s_ready) @(negedge clk);
        @(posedge clk);
      end
      // keep offering the next sample while the frame is processed (stall)
      @(negedge clk);
      s_valid = 1;
      got_nscores = 0; got_cls = -1;
      wait (busy);
      t0 = cyc;
      wait (done);
      t1 = cyc;
      @(negedge clk);
      s_valid = 0;
      n_frames++;
      // model
      for (int e = 0; e < N_LAYERS; e++) begin
        if (prog[e].op == OP_END) break;
        kws_model_pkg::run_layer(prog[e]);
      end
      chk("busy cycles", t1 - t0, expect_cycles);
      for (int i = 0; i < 3200; i++) begin
        chk("buf1", int'(dut.u_buf1.mem[i / 4][8 * (i % 4) +: 8]), kws_model_pkg::mb1[i]);
        chk("buf2", int'(dut.u_buf2.mem[i / 4][8 * (i % 4) +: 8]), kws_model_pkg::mb2[i]);
      end
      for (int i = 0; i < 1680; i++) chk("co", int'(dut.u_co.mem[i]), kws_model_pkg::mco[i]);
      chk("n scores", got_nscores, kws_model_pkg::n_scores);
      for (int k = 0; k < kws_model_pkg::n_scores; k++) chk("score", got_scores[k], kws_model_pkg::scores[k]);
      chk("class", got_cls, kws_model_pkg::cls);
      $display("frame %0d: %0d cycles, class %0d, scores %0d %0d %0d %0d %0d", f, t1 - t0, got_cls,
               got_scores[0], got_scores[1], got_scores[2], got_scores[3], got_scores[4]);
    end
    $display("mechanisms: cnn1x5=%0d cnn1x10=%0d lstm=%0d fc=%0d approx=%0d maxpool=%0d avgpool=%0d lstm_cells=%0d relu=%0d sat=%0d mode_switch=%0d input_stall=%0d frames=%0d reprogrammed_entries=%0d",
             n_cnn5, n_cnn10, n_lstm, n_fc, n_approx, n_max, n_avg, n_lstm_cell, n_relu, n_sat, n_switch, n_stall, n_frames, n_reprog);
    chk("cnn1x5 happened", int'(n_cnn5 > 0), 1);
    chk("cnn1x10 happened", int'(n_cnn10 > 0), 1);
    chk("lstm happened", int'(n_lstm > 0), 1);
    chk("fc happened", int'(n_fc > 0), 1);
    chk("approx happened", int'(n_approx > 0), 1);
    chk("maxpool happened", int'(n_max > 0), 1);
    chk("avgpool happened", int'(n_avg > 0), 1);
    chk("lstm cell happened", int'(n_lstm_cell > 0), 1);
    chk("relu happened", int'(n_relu > 0), 1);
    chk("mode switch happened", int'(n_switch > 0), 1);
    chk("input stall happened", int'(n_stall > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
