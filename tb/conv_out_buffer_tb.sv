// conv_out_buffer_tb: writes all 1680 bytes of the Conv Output Buffer and
// reads them back, including a read and a write in the same cycle.
module conv_out_buffer_tb;
  import kws_pkg::*;

  localparam int DEPTH = 1680;
  logic clk = 0, re = 0, we = 0;
  logic [11:0] raddr = 0, waddr = 0;
  logic [7:0] rdata, wdata = 0;
  int checks = 0, failures = 0;

  conv_out_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = 12'(i); wdata = 8'(i * 29 + 5);
      re = (i > 0); raddr = 12'(i - 1);
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (rdata !== 8'((i - 1) * 29 + 5)) failures++;
      end
    end
    we = 0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      re = 1; raddr = 12'(i);
      @(negedge clk);
      checks++;
      if (rdata !== 8'(i * 29 + 5)) begin
        failures++;
        if (failures < 5) $display("FAIL %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
