// cfg_mac_tb: drives one CFG_MAC row in both adder-network settings.
//  * CNN (sel = 0,1,0,1,0,1,0,1,0): five taps are shifted into the D chain,
//    then one cycle adds the five products and LAST_DIN; chain_o and D_O
//    (result register 4) are checked, exact and with HBL/VBL = (2,5).
//  * LSTM (sel = 1,0,1,0,1,0,1,0,1): a broadcast input and five weights per
//    cycle; after N cycles every result register must hold its own dot
//    product.
// Expected values come from the reference multiplier model.
module cfg_mac_tb;
  import kws_pkg::*;
  import kws_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic d_ld = 0, d_bcast = 0, w_ld = 0, en = 0, clr = 0;
  logic signed [7:0] d_in = 0;
  logic [39:0] w_in = 0;
  logic [8:0] sel = SEL_CNN;
  logic signed [31:0] last_din = 0;
  logic [2:0] hbl = 0;
  logic [3:0] vbl = 0;
  logic signed [31:0] acc_o [5];
  logic signed [31:0] chain_o;
  logic signed [7:0] d_last_o;
  int checks = 0, failures = 0;

  cfg_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    int v [5], w [5], x, exp, lst;
    int accs [5];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------------- CNN adder tree ----------------
    for (int trial = 0; trial < 200; trial++) begin
      hbl = (trial % 2) ? 3'd2 : 3'd0;
      vbl = (trial % 2) ? 4'd5 : 4'd0;
      sel = SEL_CNN;
      for (int k = 0; k < 5; k++) begin
        v[k] = $urandom_range(0, 255) - 128;
        w[k] = $urandom_range(0, 255) - 128;
        w_in[8*k +: 8] = 8'(w[k]);
      end
      w_ld = 1;
      d_bcast = 0;
      for (int k = 4; k >= 0; k--) begin
        d_ld = 1; d_in = 8'(v[k]);
        @(negedge clk);
        w_ld = 0;
      end
      d_ld = 0;
      chk("dlast", int'(d_last_o), v[4]);
      lst = $urandom_range(0, 20000) - 10000;
      last_din = lst;
      exp = lst;
      for (int k = 0; k < 5; k++) exp += ref_mult(v[k], w[k], int'(hbl), int'(vbl));
      #1;
      chk("chain_o", int'(chain_o), exp);
      en = 1;
      @(negedge clk);
      en = 0;
      chk("D_O", int'(acc_o[4]), exp);
    end
    // ---------------- LSTM accumulators ----------------
    for (int trial = 0; trial < 20; trial++) begin
      int n;
      n = $urandom_range(1, 60);
      hbl = (trial % 2) ? 3'd2 : 3'd0;
      vbl = (trial % 2) ? 4'd5 : 4'd0;
      sel = SEL_LSTM;
      d_bcast = 1;
      for (int k = 0; k < 5; k++) accs[k] = 0;
      for (int i = 0; i < n; i++) begin
        x = $urandom_range(0, 255) - 128;
        for (int k = 0; k < 5; k++) begin
          w[k] = $urandom_range(0, 255) - 128;
          w_in[8*k +: 8] = 8'(w[k]);
          accs[k] += ref_mult(x, w[k], int'(hbl), int'(vbl));
        end
        d_in = 8'(x); d_ld = 1; w_ld = 1;
        @(negedge clk);
        d_ld = 0; w_ld = 0;
        en = 1; clr = (i == 0);
        @(negedge clk);
        en = 0; clr = 0;
      end
      for (int k = 0; k < 5; k++) chk("acc", int'(acc_o[k]), accs[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
