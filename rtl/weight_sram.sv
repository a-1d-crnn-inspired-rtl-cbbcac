// weight_sram: one of the four weight memories, 40 bits x 1942 words.
//
// A 40-bit word holds five 8-bit weights, one per PE of a CFG_MAC row, so the
// four memories together deliver the 20 weights the PE array consumes per
// cycle. Written as a single-port synchronous RAM (one access per cycle):
// with we = 1 the word at addr is written; with re = 1 (and we = 0) the word
// at addr appears on rdata after the next clock edge, otherwise rdata holds. Loaded through the configure bus and
// read by the controller. The organisation (40 x 1942) follows the design;
// the single-port, one-cycle-read behaviour is this implementation's choice
// (in silicon this is an SRAM macro).
module weight_sram
  import kws_pkg::*;
#(
  parameter int unsigned DEPTH = 1942
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic                     we,
  input  logic [WADDR_W-1:0]       addr,
  input  logic [SRAM_W-1:0]        wdata,
  output logic [SRAM_W-1:0]        rdata
);

  logic [SRAM_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (addr < WADDR_W'(DEPTH)) begin
      if (we) mem[addr] <= wdata;
      else if (re) rdata <= mem[addr];
    end else if (re && !we) begin
      rdata <= '0;
    end
  end

endmodule
