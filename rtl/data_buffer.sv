// data_buffer: Buffer1 / Buffer2, 32 bits x 800 words (3200 bytes).
//
// The two buffers are used as ping-pong storage: between convolutional layers
// one holds a layer's input while the other receives its output, and during
// the LSTM layer they alternately hold h_{t-1}/c_{t-1} and h_t/c_t. Buffer1
// also receives the pre-emphasised input frame.
//
// Written as a two-port synchronous RAM: one read port (byte address; the
// whole 32-bit word containing it appears on rdata one cycle later) and one
// write port with byte enables (word address = byte address / 4). Size
// follows the design; the port arrangement is this implementation's choice.
// The two low address bits select a byte lane; here they are unused because the
// caller picks the byte (read) or sets the byte enables (write) itself.
module data_buffer
  import kws_pkg::*;
#(
  parameter int unsigned WORDS = 800
) (
  input  logic               clk,
  input  logic               re,
  input  logic [BADDR_W-1:0] raddr,   // byte address
  output logic [31:0]        rdata,
  input  logic [3:0]         we,      // byte enables
  input  logic [BADDR_W-1:0] waddr,   // byte address, word aligned use
  input  logic [31:0]        wdata
);

  logic [31:0] mem [WORDS];
  logic [BADDR_W-3:0] rw, ww;

  assign rw = raddr[BADDR_W-1:2];
  assign ww = waddr[BADDR_W-1:2];

  always_ff @(posedge clk) begin
    if (re) rdata <= (rw < (BADDR_W-2)'(WORDS)) ? mem[rw] : '0;
    if (ww < (BADDR_W-2)'(WORDS))
      for (int b = 0; b < 4; b++)
        if (we[b]) mem[ww][8*b +: 8] <= wdata[8*b +: 8];
  end

endmodule
