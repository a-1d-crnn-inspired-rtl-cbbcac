// config_bus_tb: writes weight words to each of the four SRAM selections and
// all parts of several program entries, checking the SRAM strobes, address
// and data, the assembled 128-bit descriptors, and that writes outside the
// map change nothing.
module config_bus_tb;
  import kws_pkg::*;

  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [15:0] cfg_addr = 0;
  logic [39:0] cfg_wdata = 0;
  logic [3:0] sram_we;
  logic [10:0] sram_addr;
  logic [39:0] sram_wdata;
  layer_t program_o [N_LAYERS];
  logic [127:0] model [N_LAYERS];
  int checks = 0, failures = 0;

  config_bus dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < N_LAYERS; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 64; n++) begin
      int bank, word;
      bank = n % 4; word = $urandom_range(0, 1941);
      cfg_we = 1; cfg_addr = 16'((bank << 11) | word); cfg_wdata = {8'(n), 32'($urandom)};
      #1;
      chk("sram_we", sram_we, 1 << bank);
      chk("sram_addr", sram_addr, word);
      chk("sram_wdata", sram_wdata, cfg_wdata);
      @(negedge clk);
    end
    for (int e = 0; e < N_LAYERS; e++)
      for (int part = 0; part < 4; part++) begin
        logic [31:0] v;
        v = $urandom;
        model[e][32 * part +: 32] = v;
        cfg_we = 1; cfg_addr = 16'(16'h4000 | (e << 2) | part); cfg_wdata = {8'hAA, v};
        #1 chk("no sram write", sram_we, 0);
        @(negedge clk);
      end
    // outside the map
    cfg_we = 1; cfg_addr = 16'h8004; cfg_wdata = '1;
    #1 chk("no sram_we", 32'(sram_we), 0);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 16'h2004; cfg_wdata = '1;
    #1 chk("no sram_we", 32'(sram_we), 0);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 16'h4044; cfg_wdata = '1;
    @(negedge clk);
    cfg_we = 0;
    for (int e = 0; e < N_LAYERS; e++) begin
      chk("prog lo", program_o[e][63:0], model[e][63:0]);
      chk("prog hi", program_o[e][127:64], model[e][127:64]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
