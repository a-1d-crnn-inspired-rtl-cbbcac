// kws_pkg: widths, layer-program format and control encodings shared by the
// reconfigurable 1D-CRNN keyword-recognition accelerator.
//
// Data and weights are 8-bit signed (the 8/8 quantisation the design is built
// around). Products are 16 bits, accumulators 32 bits. The PE array has four
// CFG_MAC rows of five PEs (20 PEs); each row is fed by one 40-bit weight SRAM
// word, i.e. five 8-bit weights per cycle.
//
// A network is run from a small layer program: one 128-bit descriptor per
// layer (layer_t). The descriptor format, the buffer addressing conventions
// and the fixed-point formats below are this implementation's own choices.
package kws_pkg;

  localparam int unsigned DATA_W  = 8;   // activation width
  localparam int unsigned WGT_W   = 8;   // weight width
  localparam int unsigned PROD_W  = 16;  // multiplier result width
  localparam int unsigned ACC_W   = 32;  // accumulator width
  localparam int unsigned N_PE    = 5;   // PEs per CFG_MAC row
  localparam int unsigned N_ROW   = 4;   // CFG_MAC rows (LSTM gates f, i, g, o)
  localparam int unsigned SRAM_W  = N_PE * WGT_W;  // 40-bit weight word
  localparam int unsigned N_SEL   = 2 * N_PE - 1;  // 9 adder-network muxes

  // Adder-network mux settings, element 0 is the leftmost mux.
  localparam logic [N_SEL-1:0] SEL_CNN  = 9'b010101010; // (0,1,0,1,0,1,0,1,0)
  localparam logic [N_SEL-1:0] SEL_LSTM = 9'b101010101; // (1,0,1,0,1,0,1,0,1)

  localparam int unsigned BADDR_W = 12;  // byte address in a 3200-byte buffer
  localparam int unsigned WADDR_W = 11;  // weight SRAM word address

  // Fixed-point unit of LSTM activations: 1.0 == 64 (6 fractional bits).
  localparam int ONE_Q = 64;

  typedef enum logic [2:0] {
    OP_END     = 3'd0,
    OP_CONV    = 3'd1,
    OP_MAXPOOL = 3'd2,
    OP_AVGPOOL = 3'd3,
    OP_LSTM    = 3'd4,
    OP_FC      = 3'd5
  } op_e;

  typedef enum logic [1:0] {
    BUF_1  = 2'd0,
    BUF_2  = 2'd1,
    BUF_CO = 2'd2   // Conv Output Buffer
  } buf_e;

  // Operation requested from the Non-linear module.
  typedef enum logic [2:0] {
    NL_CONV = 3'd0,  // shift, saturate, optional ReLU
    NL_MAX  = 3'd1,  // running maximum (max pooling)
    NL_AVG  = 3'd2,  // running sum times reciprocal (average pooling)
    NL_LSTM = 3'd3,  // gate activations and cell update
    NL_FC   = 3'd4   // shift, saturate to score, running arg-max
  } nl_op_e;

  // One layer of the program. Tensors in Buffer1/2 and the Conv Output Buffer
  // are stored channel-major, one byte per value: value (c, p) is at byte
  // base + c*len + p. LSTM state is stored one 32-bit word per cell:
  // {c_t[15:0], 8'h00, h_t[7:0]} at byte base + 4*cell.
  typedef struct packed {
    op_e                 op;        // layer type
    logic                k10;       // CONV: kernel 1x10 (else 1x5)
    logic                relu;      // CONV: apply ReLU
    logic [2:0]          stride;    // CONV/POOL stride
    buf_e                src;       // source memory
    buf_e                dst;       // destination memory (LSTM: h_0 buffer)
    logic [7:0]          cin;       // input channels / LSTM input size / FC inputs
    logic [7:0]          cout;      // output channels / LSTM units / FC outputs
    logic [BADDR_W-1:0]  lin;       // input length / LSTM time steps
    logic [BADDR_W-1:0]  lout;      // output length
    logic [BADDR_W-1:0]  src_base;  // byte base of the source tensor
    logic [BADDR_W-1:0]  dst_base;  // byte base of the result
    logic [WADDR_W-1:0]  wbase;     // first weight SRAM word of the layer
    logic [4:0]          shift;     // accumulator right shift (requantisation)
    logic [2:0]          hbl;       // approximate multiplier HBL
    logic [3:0]          vbl;       // approximate multiplier VBL
    logic [3:0]          win;       // POOL window
    logic [7:0]          recip;     // AVGPOOL: round(256 / win)
    logic [16:0]         spare;
  } layer_t;

  localparam int unsigned LAYER_W = $bits(layer_t);  // 128
  localparam int unsigned N_LAYERS = 16;             // program entries

endpackage
