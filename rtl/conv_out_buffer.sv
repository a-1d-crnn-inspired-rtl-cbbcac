// conv_out_buffer: Conv Output Buffer, 8 bits x 1680 words.
//
// Holds the features produced by the convolutional layers (after average
// pooling), e.g. 48 features x 35 time steps, which are the inputs x_t of the
// LSTM layer. Two-port synchronous RAM: one byte read per cycle with one cycle
// latency, one byte write per cycle. Size follows the design; the port
// arrangement is this implementation's choice.
module conv_out_buffer
  import kws_pkg::*;
#(
  parameter int unsigned DEPTH = 1680
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [BADDR_W-1:0]       raddr,
  output logic [DATA_W-1:0]        rdata,
  input  logic                     we,
  input  logic [BADDR_W-1:0]       waddr,
  input  logic [DATA_W-1:0]        wdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= (raddr < BADDR_W'(DEPTH)) ? mem[raddr[$clog2(DEPTH)-1:0]] : '0;
    if (we && waddr < BADDR_W'(DEPTH)) mem[waddr[$clog2(DEPTH)-1:0]] <= wdata;
  end

endmodule
