// cfg_mac: Configurable Multiply-Accumulate unit, one row of the PE array.
//
// Five PEs, each with a data register D, a weight register W and an
// approximate multiplier, feed five adders and five result registers through
// nine 2:1 multiplexers, sel[0] (leftmost) .. sel[8] (rightmost):
//   * even mux sel[2k] = 1: adder k adds its own result register back
//     (accumulation, used for LSTM and FC layers);
//   * odd mux sel[2k-1] = 1: adder k adds the sum of adder k-1 (adder chain,
//     used for convolution); adder 0 then takes LAST_DIN.
// sel = (0,1,0,1,0,1,0,1,0) makes an adder tree: the five products plus
// LAST_DIN, registered in result register 4 (D_O). sel = (1,0,1,0,1,0,1,0,1)
// makes five independent accumulators. Both settings are the ones the design
// specifies; the exact wiring of each mux is this implementation's reading.
//
// D registers: with d_bcast = 0 they form a shift chain (D0 <= d_in,
// Dk <= Dk-1), so a 1x5 convolution window is loaded by shifting the taps in,
// last tap first; d_last_o (D4) continues the chain into the next row for a
// 1x10 kernel. With d_bcast = 1 all five D registers load d_in (LSTM/FC: one
// input value times five different weights).
//
// Timing: d_ld/w_ld load the D/W registers at the clock edge. When en is high
// the result registers take the adder outputs at the edge, using the D/W
// values present during that cycle. clr makes accumulating adders start from
// zero. chain_o is the combinational output of adder 4 (feeds LAST_DIN of the
// next row). Asynchronous active-low reset clears all registers.
module cfg_mac
  import kws_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // operand loading
  input  logic                     d_ld,
  input  logic                     d_bcast,
  input  logic signed [DATA_W-1:0] d_in,
  input  logic                     w_ld,
  input  logic        [SRAM_W-1:0] w_in,
  // adder network
  input  logic                     en,
  input  logic                     clr,
  input  logic        [N_SEL-1:0]  sel,   // bit i = mux i from the left
  input  logic signed [ACC_W-1:0]  last_din,
  input  logic        [2:0]        hbl,
  input  logic        [3:0]        vbl,
  output logic signed [ACC_W-1:0]  acc_o [N_PE],
  output logic signed [ACC_W-1:0]  chain_o,
  output logic signed [DATA_W-1:0] d_last_o
);

  logic signed [DATA_W-1:0] d_q [N_PE];
  logic signed [WGT_W-1:0]  w_q [N_PE];
  logic signed [PROD_W-1:0] prod [N_PE];
  logic signed [ACC_W-1:0]  sum  [N_PE];
  logic signed [ACC_W-1:0]  acc_q [N_PE];

  // sel is written left to right; bit index = position from the left.
  function automatic logic msel(input logic [N_SEL-1:0] s, input int unsigned i);
    return s[N_SEL-1-i];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_PE; k++) begin
        d_q[k] <= '0;
        w_q[k] <= '0;
      end
    end else begin
      if (d_ld) begin
        d_q[0] <= d_in;
        for (int k = 1; k < N_PE; k++)
          d_q[k] <= d_bcast ? d_in : d_q[k-1];
      end
      if (w_ld)
        for (int k = 0; k < N_PE; k++)
          w_q[k] <= w_in[k*WGT_W +: WGT_W];
    end
  end

  for (genvar k = 0; k < N_PE; k++) begin : g_pe
    approx_mult u_mult (
      .a  (d_q[k]),
      .b  (w_q[k]),
      .hbl(hbl),
      .vbl(vbl),
      .p  (prod[k])
    );
  end

  // adder k: product k plus the operand chosen by muxes 2k-1 and 2k
  for (genvar k = 0; k < N_PE; k++) begin : g_add
    logic signed [ACC_W-1:0] opnd;
    if (k == 0) begin : g_first
      assign opnd = msel(sel, 0) ? (clr ? '0 : acc_q[0]) : last_din;
    end else begin : g_next
      assign opnd = msel(sel, 2*k) ? (clr ? '0 : acc_q[k])
                  : (msel(sel, 2*k-1) ? g_add[k-1].s : '0);
    end
    logic signed [ACC_W-1:0] s;
    assign s = ACC_W'(prod[k]) + opnd;
    assign sum[k] = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_PE; k++) acc_q[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < N_PE; k++) acc_q[k] <= sum[k];
    end
  end

  assign acc_o    = acc_q;
  assign chain_o  = g_add[N_PE-1].s;
  assign d_last_o = d_q[N_PE-1];

endmodule
