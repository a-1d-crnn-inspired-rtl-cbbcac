// data_buffer_tb: byte-enable writes and word reads of the 32 x 800 buffer.
// Writes every byte of the buffer individually, then full words over part of
// it, and compares all words with a model array; also checks a simultaneous
// read and write of different words.
module data_buffer_tb;
  import kws_pkg::*;

  localparam int WORDS = 800;
  logic clk = 0, re = 0;
  logic [11:0] raddr = 0, waddr = 0;
  logic [31:0] rdata, wdata = 0;
  logic [3:0] we = 0;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_buffer #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int b = 0; b < 4 * WORDS; b++) begin
      logic [7:0] v;
      v = 8'(b * 13 + 1);
      model[b / 4][8 * (b % 4) +: 8] = v;
      we = 4'b0001 << (b % 4); waddr = 12'(b); wdata = {4{v}};
      @(negedge clk);
    end
    for (int i = 0; i < 100; i++) begin
      model[i] = 32'(i * 32'h01030507);
      we = 4'b1111; waddr = 12'(4 * i); wdata = model[i];
      // read another word in the same cycle
      re = 1; raddr = 12'(4 * (i + 200) + 1);
      @(negedge clk);
      checks++;
      if (rdata !== model[i + 200]) failures++;
    end
    we = 0;
    for (int i = 0; i < WORDS; i++) begin
      re = 1; raddr = 12'(4 * i + (i % 4));
      @(negedge clk);
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        if (failures < 5) $display("FAIL word %0d %h %h", i, rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
