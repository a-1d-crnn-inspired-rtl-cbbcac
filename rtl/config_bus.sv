// config_bus: the configure bus. A simple memory-mapped write port through
// which a host loads the four weight SRAMs and the layer program.
//
// Address map (cfg_addr[15:0]):
//   15:13 = 3'b000 weight SRAM: [12:11] = SRAM 0..3, [10:0] = word;
//                  cfg_wdata[39:0] is the 40-bit word
//   15:14 = 2'b01  layer program: [5:2] = entry (0..15), [7:6] = 0,
//                  [1:0] = 32-bit part of the 128-bit descriptor (0 = LSB);
//                  cfg_wdata[31:0] is written
// Writes take effect on the clock edge with cfg_we = 1. Weight writes are
// passed on combinationally (one-hot sram_we, sram_addr, sram_wdata);
// the program is kept in registers here and read by the
// controller. The design names the bus only; this map is this
// implementation's own.
module config_bus
  import kws_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  logic [15:0]        cfg_addr,
  input  logic [SRAM_W-1:0]  cfg_wdata,
  output logic [N_ROW-1:0]   sram_we,
  output logic [WADDR_W-1:0] sram_addr,
  output logic [SRAM_W-1:0]  sram_wdata,
  output layer_t             program_o [N_LAYERS]
);

  logic [LAYER_W-1:0] prog_q [N_LAYERS];

  always_comb begin
    sram_we    = '0;
    sram_addr  = cfg_addr[WADDR_W-1:0];
    sram_wdata = cfg_wdata;
    if (cfg_we && cfg_addr[15:13] == 3'b000)
      sram_we[cfg_addr[12:11]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_LAYERS; i++) prog_q[i] <= '0;
    end else if (cfg_we && cfg_addr[15:14] == 2'b01 && cfg_addr[7:6] == 2'b00) begin
      prog_q[cfg_addr[5:2]][32*cfg_addr[1:0] +: 32] <= cfg_wdata[31:0];
    end
  end

  always_comb
    for (int i = 0; i < N_LAYERS; i++) program_o[i] = layer_t'(prog_q[i]);

endmodule
