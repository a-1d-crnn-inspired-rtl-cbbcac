// nonlinear_tb: checks every Non-linear operation against integer formulas:
// CONV requantisation with and without ReLU, max and average pooling windows,
// the LSTM cell update (hard sigmoid / hard tanh, c and h) and the FC scores
// with the arg-max. Results are checked one cycle after the input.
module nonlinear_tb;
  import kws_pkg::*;
  import kws_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first = 0, last = 0, relu = 0;
  nl_op_e op = NL_CONV;
  logic [4:0] shift = 0;
  logic [7:0] recip = 0;
  logic signed [31:0] gate [4];
  logic signed [7:0] x = 0;
  logic signed [15:0] c_prev = 0;
  logic [15:0] tag_in = 0;
  logic out_valid, score_valid, cls_valid;
  logic signed [7:0] y;
  logic signed [15:0] c_out, score_o;
  logic [15:0] tag_out;
  logic [2:0] cls_o;
  int checks = 0, failures = 0;

  nonlinear #(.TAG_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  function automatic int rnd(int lo, int hi);
    return $urandom_range(0, hi - lo) + lo;
  endfunction

  initial begin
    for (int r = 0; r < 4; r++) gate[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // CONV
    for (int n = 0; n < 500; n++) begin
      int a, s, e;
      a = rnd(-200000, 200000); s = rnd(0, 12);
      gate[0] = a; shift = 5'(s); relu = n[0]; op = NL_CONV; in_valid = 1;
      tag_in = 16'(n);
      e = sat8(a >>> s);
      if (relu && e < 0) e = 0;
      @(negedge clk);
      in_valid = 0;
      chk("conv valid", int'(out_valid), 1);
      chk("conv y", int'(y), e);
      chk("conv tag", int'(tag_out), n & 16'hFFFF);
    end
    // MAX / AVG pooling windows
    for (int n = 0; n < 200; n++) begin
      int win, mx, sm, rc, v;
      win = rnd(1, 8); rc = rnd(1, 255);
      op = n[0] ? NL_AVG : NL_MAX; recip = 8'(rc);
      mx = -1000; sm = 0;
      for (int k = 0; k < win; k++) begin
        v = rnd(-128, 127);
        if (v > mx) mx = v;
        sm += v;
        x = 8'(v); first = (k == 0); last = (k == win - 1); in_valid = 1;
        @(negedge clk);
        if (k != win - 1) chk("pool no out", int'(out_valid), 0);
      end
      in_valid = 0; first = 0; last = 0;
      chk("pool valid", int'(out_valid), 1);
      chk(n[0] ? "avg" : "max", int'(y), n[0] ? sat8((sm * rc) >>> 8) : mx);
    end
    // LSTM cell
    for (int n = 0; n < 1000; n++) begin
      int g [4], s, cp, ce, he;
      s = rnd(0, 10);
      for (int r = 0; r < 4; r++) begin
        g[r] = rnd(-100000, 100000);
        gate[r] = g[r];
      end
      cp = rnd(-300, 300);
      c_prev = 16'(cp); shift = 5'(s); op = NL_LSTM; in_valid = 1;
      lstm_cell(g[0], g[1], g[2], g[3], s, cp, ce, he);
      @(negedge clk);
      in_valid = 0;
      chk("lstm c", int'(c_out), ce);
      chk("lstm h", int'(y), he);
    end
    // FC and arg-max
    for (int n = 0; n < 100; n++) begin
      int sc [5], best, nout, s;
      nout = rnd(1, 5); s = rnd(0, 8);
      best = 0;
      for (int k = 0; k < nout; k++) begin
        int a;
        a = rnd(-100000, 100000);
        sc[k] = sat16(a >>> s);
        if (sc[k] > sc[best]) best = k;
        gate[0] = a; shift = 5'(s); op = NL_FC; first = (k == 0); last = (k == nout - 1);
        in_valid = 1;
        @(negedge clk);
        chk("fc score", int'(score_o), sc[k]);
        chk("fc score valid", int'(score_valid), 1);
        chk("fc no write", int'(out_valid), 0);
      end
      in_valid = 0; first = 0; last = 0;
      chk("cls valid", int'(cls_valid), 1);
      chk("cls", int'(cls_o), best);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
