// kws_top: reconfigurable 1D-CRNN keyword-recognition accelerator.
//
// Audio samples enter through the pre-emphasis & framing block, which writes
// one frame into Buffer1. The controller then runs the layer program held by
// the configure bus: the 1D convolution layers (PE array in CNN mode) with
// pooling, ping-ponging between Buffer1 and Buffer2 and leaving the features
// in the Conv Output Buffer; the LSTM layer (PE array in LSTM mode, four rows
// = gates f, i, g, o, the Non-linear module doing the cell update, h/c
// ping-ponging between the buffers); and the FC layer, whose scores and
// arg-max (the recognised keyword) come out on score_* and cls_*. Four
// 40 x 1942 weight SRAMs feed the 20 PEs five weights each per cycle.
//
// Interface:
//   cfg_*    configure bus (see config_bus); only used while busy = 0
//   s_*      16-bit input samples with valid/ready; s_ready drops while a
//            complete frame waits or is being processed
//   qshift   input scaling of the pre-emphasised samples
//   busy/done  program running / finished (one-cycle pulse)
//   score_valid/score  each FC output as it is produced
//   cls_valid/cls      index of the largest FC output, at the end of the FC layer
// The block structure and sizes follow the design; the program format,
// handshakes and number formats are this implementation's own.
module kws_top
  import kws_pkg::*;
#(
  parameter int unsigned FRAME_LEN   = 800,
  parameter int unsigned WSRAM_DEPTH = 1942,
  parameter int unsigned BUF_WORDS   = 800,
  parameter int unsigned CO_DEPTH    = 1680
) (
  input  logic               clk,
  input  logic               rst_n,
  // configure bus
  input  logic               cfg_we,
  input  logic [15:0]        cfg_addr,
  input  logic [SRAM_W-1:0]  cfg_wdata,
  // audio input
  input  logic               s_valid,
  output logic               s_ready,
  input  logic signed [15:0] s_data,
  input  logic [3:0]         qshift,
  // status and result
  output logic               busy,
  output logic               done,
  output logic               score_valid,
  output logic signed [15:0] score,
  output logic               cls_valid,
  output logic [2:0]         cls
);

  // configure bus
  layer_t             prog [N_LAYERS];
  logic [N_ROW-1:0]   cfg_sram_we;
  logic [WADDR_W-1:0] cfg_sram_addr;
  logic [SRAM_W-1:0]  cfg_sram_wdata;

  // framing
  logic               frame_valid;
  logic [3:0]         fr_we;
  logic [BADDR_W-1:0] fr_waddr;
  logic [31:0]        fr_wdata;

  // controller
  logic               start;
  logic               w_re;
  logic [WADDR_W-1:0] w_addr;
  logic [2:0]         rd_en;
  logic [BADDR_W-1:0] rd_addr;
  logic [31:0]        buf1_rdata, buf2_rdata;
  logic [DATA_W-1:0]  co_rdata;
  logic [3:0]         c_buf1_we, c_buf2_we;
  logic [BADDR_W-1:0] wr_addr;
  logic [31:0]        wr_data;
  logic               co_we;

  // PE array
  logic               pe_lstm_mode, pe_k10, pe_d_ld, pe_w_ld, pe_en, pe_clr, pe_first;
  logic signed [DATA_W-1:0] pe_d_in;
  logic [2:0]         pe_hbl, pe_col;
  logic [3:0]         pe_vbl;
  logic [SRAM_W-1:0]  w_data [N_ROW];
  logic signed [ACC_W-1:0] pe_out [N_ROW];

  // Non-linear
  logic               nl_valid, nl_first, nl_last, nl_relu, nl_out_valid;
  nl_op_e             nl_op;
  logic [4:0]         nl_shift;
  logic [7:0]         nl_recip;
  logic signed [ACC_W-1:0] nl_gate [N_ROW];
  logic signed [DATA_W-1:0] nl_x, nl_y;
  logic signed [15:0] nl_c_prev, nl_c_out;
  logic [14:0]        nl_tag, nl_tag_out;

  config_bus u_cfg (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (cfg_we && !busy),
    .cfg_addr  (cfg_addr),
    .cfg_wdata (cfg_wdata),
    .sram_we   (cfg_sram_we),
    .sram_addr (cfg_sram_addr),
    .sram_wdata(cfg_sram_wdata),
    .program_o (prog)
  );

  preemph_framing #(.FRAME_LEN(FRAME_LEN)) u_frame (
    .clk        (clk),
    .rst_n      (rst_n),
    .s_valid    (s_valid),
    .s_ready    (s_ready),
    .s_data     (s_data),
    .qshift     (qshift),
    .frame_valid(frame_valid),
    .frame_ack  (done),
    .buf_we     (fr_we),
    .buf_waddr  (fr_waddr),
    .buf_wdata  (fr_wdata)
  );

  assign start = frame_valid && !busy && !done;

  controller u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .busy        (busy),
    .done        (done),
    .program_i   (prog),
    .w_re        (w_re),
    .w_addr      (w_addr),
    .rd_en       (rd_en),
    .rd_addr     (rd_addr),
    .buf1_rdata  (buf1_rdata),
    .buf2_rdata  (buf2_rdata),
    .co_rdata    (co_rdata),
    .pe_lstm_mode(pe_lstm_mode),
    .pe_k10      (pe_k10),
    .pe_d_ld     (pe_d_ld),
    .pe_d_in     (pe_d_in),
    .pe_w_ld     (pe_w_ld),
    .pe_en       (pe_en),
    .pe_clr      (pe_clr),
    .pe_first    (pe_first),
    .pe_hbl      (pe_hbl),
    .pe_vbl      (pe_vbl),
    .pe_col      (pe_col),
    .pe_out      (pe_out),
    .nl_valid    (nl_valid),
    .nl_op       (nl_op),
    .nl_first    (nl_first),
    .nl_last     (nl_last),
    .nl_shift    (nl_shift),
    .nl_relu     (nl_relu),
    .nl_recip    (nl_recip),
    .nl_gate     (nl_gate),
    .nl_x        (nl_x),
    .nl_c_prev   (nl_c_prev),
    .nl_tag      (nl_tag),
    .nl_out_valid(nl_out_valid),
    .nl_y        (nl_y),
    .nl_c_out    (nl_c_out),
    .nl_tag_out  (nl_tag_out),
    .buf1_we     (c_buf1_we),
    .buf2_we     (c_buf2_we),
    .wr_addr     (wr_addr),
    .wr_data     (wr_data),
    .co_we       (co_we)
  );

  for (genvar r = 0; r < N_ROW; r++) begin : g_sram
    weight_sram #(.DEPTH(WSRAM_DEPTH)) u_sram (
      .clk  (clk),
      .re   (w_re),
      .we   (cfg_sram_we[r] && !busy),
      .addr (busy ? w_addr : cfg_sram_addr),
      .wdata(cfg_sram_wdata),
      .rdata(w_data[r])
    );
  end

  data_buffer #(.WORDS(BUF_WORDS)) u_buf1 (
    .clk  (clk),
    .re   (rd_en[BUF_1]),
    .raddr(rd_addr),
    .rdata(buf1_rdata),
    .we   (busy ? c_buf1_we : fr_we),
    .waddr(busy ? wr_addr : fr_waddr),
    .wdata(busy ? wr_data : fr_wdata)
  );

  data_buffer #(.WORDS(BUF_WORDS)) u_buf2 (
    .clk  (clk),
    .re   (rd_en[BUF_2]),
    .raddr(rd_addr),
    .rdata(buf2_rdata),
    .we   (c_buf2_we),
    .waddr(wr_addr),
    .wdata(wr_data)
  );

  conv_out_buffer #(.DEPTH(CO_DEPTH)) u_co (
    .clk  (clk),
    .re   (rd_en[BUF_CO]),
    .raddr(rd_addr),
    .rdata(co_rdata),
    .we   (co_we),
    .waddr(wr_addr),
    .wdata(wr_data[DATA_W-1:0])
  );

  pe_array u_pe (
    .clk      (clk),
    .rst_n    (rst_n),
    .lstm_mode(pe_lstm_mode),
    .k10      (pe_k10),
    .d_ld     (pe_d_ld),
    .d_in     (pe_d_in),
    .w_ld     (pe_w_ld),
    .w_in     (w_data),
    .en       (pe_en),
    .clr      (pe_clr),
    .first    (pe_first),
    .hbl      (pe_hbl),
    .vbl      (pe_vbl),
    .col_sel  (pe_col),
    .pe_out   (pe_out)
  );

  nonlinear #(.TAG_W(15)) u_nl (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (nl_valid),
    .op         (nl_op),
    .first      (nl_first),
    .last       (nl_last),
    .shift      (nl_shift),
    .relu       (nl_relu),
    .recip      (nl_recip),
    .gate       (nl_gate),
    .x          (nl_x),
    .c_prev     (nl_c_prev),
    .tag_in     (nl_tag),
    .out_valid  (nl_out_valid),
    .y          (nl_y),
    .c_out      (nl_c_out),
    .tag_out    (nl_tag_out),
    .score_valid(score_valid),
    .score_o    (score),
    .cls_valid  (cls_valid),
    .cls_o      (cls)
  );

endmodule
