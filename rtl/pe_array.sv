// pe_array: the 20-PE processing array, four CFG_MAC rows of five PEs.
//
// In LSTM mode the rows compute the four gates in parallel: row 0 = f,
// row 1 = i, row 2 = g, row 3 = o, each with its own weight SRAM word, and
// the five columns are five LSTM cells sharing one broadcast input value. The
// SEL stage picks column col_sel of every row, giving PE_f, PE_i, PE_g and
// PE_o for one cell, which go straight to the Non-linear module. FC layers use
// the same accumulate setting (row 0 holds up to five output neurons).
//
// In CNN mode every row is an adder tree over a 5-tap window held in its D
// shift chain:
//  * k10 = 0 (1x5 kernel): the four rows see the same input stream and compute
//    four output channels; LAST_DIN of a row is its own previous D_O, so a
//    result is accumulated over the input channels (first = 1 starts from 0).
//  * k10 = 1 (1x10 kernel): rows 0-1 and rows 2-3 are paired. The D chain of
//    row 0 continues into row 1, and row 0's adder-tree output enters row 1 as
//    LAST_DIN, so row 1 (and row 3) hold a 10-tap sum for two output channels.
// SEL then returns column 4 (D_O) of each row.
//
// Timing: see cfg_mac. pe_out is combinational from the result registers.
// Mode, pairing and LAST_DIN routing are this implementation's reading of the
// described dataflow. The last row's chain and D outputs have no next row to
// feed and are left unused.
module pe_array
  import kws_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     lstm_mode,  // 1: LSTM/FC, 0: CNN
  input  logic                     k10,        // CNN: 1x10 kernel pairing
  input  logic                     d_ld,
  input  logic signed [DATA_W-1:0] d_in,
  input  logic                     w_ld,
  input  logic        [SRAM_W-1:0] w_in [N_ROW],
  input  logic                     en,
  input  logic                     clr,        // LSTM/FC: start accumulation
  input  logic                     first,      // CNN: first input channel
  input  logic        [2:0]        hbl,
  input  logic        [3:0]        vbl,
  input  logic        [2:0]        col_sel,
  output logic signed [ACC_W-1:0]  pe_out [N_ROW]   // PE_f, PE_i, PE_g, PE_o
);

  logic signed [ACC_W-1:0]  acc   [N_ROW][N_PE];
  logic        [N_SEL-1:0]  sel;

  assign sel = lstm_mode ? SEL_LSTM : SEL_CNN;

  for (genvar r = 0; r < N_ROW; r++) begin : g_row
    logic signed [DATA_W-1:0] din_r;
    logic signed [ACC_W-1:0]  last_r;
    logic signed [ACC_W-1:0]  chain_r;
    logic signed [DATA_W-1:0] dlast_r;
    if (r % 2 == 1) begin : g_odd
      // second row of a 1x10 pair: continues the data chain and the sum
      assign din_r  = (!lstm_mode && k10) ? g_row[r-1].dlast_r : d_in;
      assign last_r = lstm_mode ? '0
                    : k10 ? g_row[r-1].chain_r
                    : (first ? '0 : acc[r][N_PE-1]);
    end else begin : g_even
      assign din_r  = d_in;
      assign last_r = (lstm_mode || first) ? '0
                    : k10 ? acc[r+1][N_PE-1] : acc[r][N_PE-1];
    end
    cfg_mac u_mac (
      .clk     (clk),
      .rst_n   (rst_n),
      .d_ld    (d_ld),
      .d_bcast (lstm_mode),
      .d_in    (din_r),
      .w_ld    (w_ld),
      .w_in    (w_in[r]),
      .en      (en),
      .clr     (clr),
      .sel     (sel),
      .last_din(last_r),
      .hbl     (hbl),
      .vbl     (vbl),
      .acc_o   (acc[r]),
      .chain_o (chain_r),
      .d_last_o(dlast_r)
    );
  end

  // SEL: one column of every row.
  always_comb begin
    for (int r = 0; r < N_ROW; r++)
      pe_out[r] = (col_sel < 3'(N_PE)) ? acc[r][col_sel] : '0;
  end

endmodule
