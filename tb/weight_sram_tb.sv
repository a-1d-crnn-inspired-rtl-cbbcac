// weight_sram_tb: fills the 40 x 1942 weight memory with a pseudo-random
// pattern, reads every word back (one-cycle read latency), checks that rdata
// holds while re = 0, and that out-of-range reads return 0.
module weight_sram_tb;
  import kws_pkg::*;

  localparam int DEPTH = 1942;
  logic clk = 0, re = 0, we = 0;
  logic [10:0] addr = 0;
  logic [39:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  weight_sram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] pat(int i);
    return {8'(i * 7 + 3), 32'(i * 32'h9E3779B1)};
  endfunction

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; addr = 11'(i); wdata = pat(i);
      @(negedge clk);
    end
    we = 0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      re = 1; addr = 11'(i);
      @(negedge clk);
      checks++;
      if (rdata !== pat(i)) begin
        failures++;
        if (failures < 5) $display("FAIL addr %0d", i);
      end
    end
    re = 0; addr = 11'd5;
    @(negedge clk);
    checks++;
    if (rdata !== pat(0)) failures++;
    re = 1; addr = 11'd2000;
    @(negedge clk);
    checks++;
    if (rdata !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
