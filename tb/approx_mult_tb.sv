// approx_mult_tb: checks the Booth multiplier exhaustively in exact mode
// (HBL = VBL = 0 and HBL = 1, VBL = 0 against a*b), the Booth coding example
// 0110_1000 = 104 with digits {+2,-1,-2,0}, the evaluated HBL/VBL settings
// (2,5), (2,6), (2,8), (3,6), (3,8) exhaustively against the reference
// breaking-line model, and random settings.
module approx_mult_tb;
  import kws_ref_pkg::*;

  logic signed [7:0]  a, b;
  logic        [2:0]  hbl;
  logic        [3:0]  vbl;
  logic signed [15:0] p;
  int checks = 0, failures = 0;

  approx_mult dut (.a(a), .b(b), .hbl(hbl), .vbl(vbl), .p(p));

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int exp);
    #1;
    checks++;
    if (int'(p) != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%0d b=%0d hbl=%0d vbl=%0d p=%0d exp=%0d", a, b, hbl, vbl, p, exp);
    end
  endtask

  initial begin
    int cfg [5][2] = '{'{2, 5}, '{2, 6}, '{2, 8}, '{3, 6}, '{3, 8}};
    // Booth example: digits of 104
    checks++;
    if (!(booth_digit(104, 3) == 2 && booth_digit(104, 2) == -1 &&
          booth_digit(104, 1) == -2 && booth_digit(104, 0) == 0)) failures++;
    // exact modes
    for (int h = 0; h < 2; h++) begin
      hbl = 3'(h);
      vbl = 4'd0;
      for (int i = -128; i < 128; i++)
        for (int j = -128; j < 128; j++) begin
          a = 8'(i); b = 8'(j);
          check(i * j);
        end
    end
    // settings of the evaluated configurations
    for (int c = 0; c < 5; c++) begin
      hbl = 3'(cfg[c][0]);
      vbl = 4'(cfg[c][1]);
      for (int i = -128; i < 128; i++)
        for (int j = -128; j < 128; j++) begin
          a = 8'(i); b = 8'(j);
          check(ref_mult(i, j, cfg[c][0], cfg[c][1]));
        end
    end
    // random settings
    for (int n = 0; n < 20000; n++) begin
      a = 8'($urandom); b = 8'($urandom);
      hbl = 3'($urandom_range(0, 4));
      vbl = 4'($urandom_range(0, 15));
      check(ref_mult(int'(a), int'(b), int'(hbl), int'(vbl)));
    end
    // the approximation must actually change results for (2,5)
    begin
      int diff = 0;
      hbl = 3'd2; vbl = 4'd5;
      for (int i = -128; i < 128; i += 7) begin
        a = 8'(i); b = 8'sd77;
        #1;
        if (int'(p) != i * 77) diff++;
      end
      checks++;
      if (diff == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
