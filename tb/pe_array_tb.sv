// pe_array_tb: exercises the three PE-array configurations.
//  * CNN, 1x5 kernel: four rows compute four output channels over C input
//    channels (first = 1 on channel 0, LAST_DIN = own D_O afterwards).
//  * CNN, 1x10 kernel: ten taps shifted through the row-0 -> row-1 chain;
//    rows 1 and 3 must hold the 10-tap sums over C channels.
//  * LSTM: broadcast input, 20 independent accumulators; SEL returns column
//    col_sel of every row (PE_f, PE_i, PE_g, PE_o).
module pe_array_tb;
  import kws_pkg::*;
  import kws_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic lstm_mode = 0, k10 = 0, d_ld = 0, w_ld = 0, en = 0, clr = 0, first = 0;
  logic signed [7:0] d_in = 0;
  logic [39:0] w_in [4];
  logic [2:0] hbl = 0, col_sel = 0;
  logic [3:0] vbl = 0;
  logic signed [31:0] pe_out [4];
  int checks = 0, failures = 0;

  pe_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  int x [10], w [4][10];
  int expv [4];

  initial begin
    for (int r = 0; r < 4; r++) w_in[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin       // 0: 1x5, 1: 1x10
      for (int trial = 0; trial < 30; trial++) begin
        int nch, kt;
        nch = (trial < 2) ? 1 : $urandom_range(1, 6);
        kt = mode ? 10 : 5;
        lstm_mode = 0; k10 = mode[0];
        hbl = (trial % 3 == 0) ? 3'd2 : 3'd0;
        vbl = (trial % 3 == 0) ? 4'd5 : 4'd0;
        for (int r = 0; r < 4; r++) expv[r] = 0;
        for (int c = 0; c < nch; c++) begin
          for (int k = 0; k < kt; k++) x[k] = $urandom_range(0, 255) - 128;
          for (int r = 0; r < 4; r++)
            for (int k = 0; k < 5; k++) begin
              w[r][k] = $urandom_range(0, 255) - 128;
              w_in[r][8*k +: 8] = 8'(w[r][k]);
            end
          if (mode == 0) begin
            for (int r = 0; r < 4; r++)
              for (int k = 0; k < 5; k++) expv[r] += ref_mult(x[k], w[r][k], int'(hbl), int'(vbl));
          end else begin
            for (int q = 0; q < 2; q++)
              for (int k = 0; k < 5; k++) begin
                expv[2*q+1] += ref_mult(x[k], w[2*q][k], int'(hbl), int'(vbl));
                expv[2*q+1] += ref_mult(x[5+k], w[2*q+1][k], int'(hbl), int'(vbl));
              end
          end
          w_ld = 1;
          for (int k = kt - 1; k >= 0; k--) begin
            d_ld = 1; d_in = 8'(x[k]);
            @(negedge clk);
            w_ld = 0;
          end
          d_ld = 0;
          en = 1; first = (c == 0);
          @(negedge clk);
          en = 0; first = 0;
        end
        col_sel = 3'd4;
        #1;
        if (mode == 0) for (int r = 0; r < 4; r++) chk("cnn5", int'(pe_out[r]), expv[r]);
        else begin
          chk("cnn10 row1", int'(pe_out[1]), expv[1]);
          chk("cnn10 row3", int'(pe_out[3]), expv[3]);
        end
      end
    end
    // LSTM mode
    begin
      int accs [4][5];
      int n;
      n = 30;
      lstm_mode = 1; k10 = 0;
      hbl = 3'd2; vbl = 4'd5;
      for (int r = 0; r < 4; r++) for (int k = 0; k < 5; k++) accs[r][k] = 0;
      for (int i = 0; i < n; i++) begin
        int xv;
        xv = $urandom_range(0, 255) - 128;
        for (int r = 0; r < 4; r++)
          for (int k = 0; k < 5; k++) begin
            int wv;
            wv = $urandom_range(0, 255) - 128;
            w_in[r][8*k +: 8] = 8'(wv);
            accs[r][k] += ref_mult(xv, wv, 2, 5);
          end
        d_in = 8'(xv); d_ld = 1; w_ld = 1;
        @(negedge clk);
        d_ld = 0; w_ld = 0; en = 1; clr = (i == 0);
        @(negedge clk);
        en = 0; clr = 0;
      end
      for (int k = 0; k < 5; k++) begin
        col_sel = 3'(k);
        #1;
        for (int r = 0; r < 4; r++) chk("lstm", int'(pe_out[r]), accs[r][k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
