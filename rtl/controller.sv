// controller: runs the layer program on the PE array, the Non-linear module
// and the memories, reconfiguring the PE array between CNN, LSTM and FC mode.
//
// On start (a complete input frame in Buffer1) the controller executes the
// program entries 0, 1, ... until an OP_END entry or the last entry, then
// pulses done. Each layer is expanded into a stream of micro-operations, one
// per cycle, that travel down a short pipeline:
//   stage 0  issue: read address to one buffer and to the four weight SRAMs
//   stage 1  read data valid: load the PE D registers (shift or broadcast)
//            and W registers
//   stage 2  PE array accumulates (en), or a result is handed to the
//            Non-linear module (emit)
//   stage 3  Non-linear result written to Buffer1/2 or the Conv Output Buffer
// Layer types (see kws_pkg::layer_t for the fields and addressing):
//   OP_CONV    for each pass of 4 (1x5) or 2 (1x10) output channels, each
//              output position and each input channel: shift the K taps of
//              the window into the D chain (K cycles), one adder-tree cycle
//              accumulating over channels through LAST_DIN; then one emit per
//              output channel (requantise + ReLU). K+1 cycles per channel.
//   OP_MAXPOOL /
//   OP_AVGPOOL for each channel and position stream the window through the
//              Non-linear comparator / MAC; one cycle per input read.
//   OP_LSTM    for each time step and each group of 5 cells: broadcast the
//              inputs [x_t ; h_{t-1}] one per cycle while the 4 rows (gates
//              f,i,g,o) x 5 columns (cells) accumulate; then 5 emits compute
//              c_t and h_t of the group. x_t comes from the Conv Output
//              Buffer, h/c alternate between Buffer1 and Buffer2 every step
//              (step 0 writes to 'dst'); h_0 = c_0 = 0.
//   OP_FC      inputs h from 'src' (4-byte stride), up to 5 outputs in row 0;
//              the Non-linear module forms the scores and the arg-max.
// Between layers the pipeline is drained (4 idle cycles).
// The program format, the loop order and the pipeline are this
// implementation's choices; the design gives the modes, the memories and the
// dataflow between them. Restrictions: CONV cout must be a multiple of the
// channels per pass; LSTM units a multiple of 5 and cin + units >= 8.
// The descriptor's spare bits and the token fields used only in earlier
// stages (read source, byte lane, weight flags) are unused by the last stage.
module controller
  import kws_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  input  layer_t                   program_i [N_LAYERS],
  // weight SRAM read (same address to all four)
  output logic                     w_re,
  output logic [WADDR_W-1:0]       w_addr,
  // buffer reads
  output logic [2:0]               rd_en,     // {CO, BUF_2, BUF_1}
  output logic [BADDR_W-1:0]       rd_addr,
  input  logic [31:0]              buf1_rdata,
  input  logic [31:0]              buf2_rdata,
  input  logic [DATA_W-1:0]        co_rdata,
  // PE array
  output logic                     pe_lstm_mode,
  output logic                     pe_k10,
  output logic                     pe_d_ld,
  output logic signed [DATA_W-1:0] pe_d_in,
  output logic                     pe_w_ld,
  output logic                     pe_en,
  output logic                     pe_clr,
  output logic                     pe_first,
  output logic [2:0]               pe_hbl,
  output logic [3:0]               pe_vbl,
  output logic [2:0]               pe_col,
  input  logic signed [ACC_W-1:0]  pe_out [N_ROW],
  // Non-linear module
  output logic                     nl_valid,
  output nl_op_e                   nl_op,
  output logic                     nl_first,
  output logic                     nl_last,
  output logic [4:0]               nl_shift,
  output logic                     nl_relu,
  output logic [7:0]               nl_recip,
  output logic signed [ACC_W-1:0]  nl_gate [N_ROW],
  output logic signed [DATA_W-1:0] nl_x,
  output logic signed [15:0]       nl_c_prev,
  output logic [14:0]              nl_tag,
  input  logic                     nl_out_valid,
  input  logic signed [DATA_W-1:0] nl_y,
  input  logic signed [15:0]       nl_c_out,
  input  logic [14:0]              nl_tag_out,
  // writes
  output logic [3:0]               buf1_we,
  output logic [3:0]               buf2_we,
  output logic [BADDR_W-1:0]       wr_addr,
  output logic [31:0]              wr_data,
  output logic                     co_we
);

  typedef struct packed {
    logic        valid;
    buf_e        src;
    logic [1:0]  lane;
    logic        zero;
    logic        d_ld;
    logic        w_ld;
    logic        mac;
    logic        clr;
    logic        first;
    logic        emit;
    nl_op_e      nlop;
    logic        nfirst;
    logic        nlast;
    logic [1:0]  row;
    logic [2:0]  col;
    logic        wmode;
    buf_e        dst;
    logic [BADDR_W-1:0] waddr;
  } tok_t;

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_RUN, S_DRAIN} state_e;

  state_e             state;
  layer_t             cur;
  logic [3:0]         lidx;
  logic [2:0]         drain_cnt;

  // loop counters
  logic [7:0]         cnt_pass;
  logic [BADDR_W-1:0] cnt_p;     // position / time step
  logic [7:0]         cnt_c;     // input channel / cell group
  logic [7:0]         cnt_k;     // tap / input index
  logic [2:0]         cnt_e;     // emit index
  logic               in_emit;

  tok_t               tok0, tok1, tok2;
  logic               last_tok;

  logic [BADDR_W-1:0] rd_addr_n;
  logic [2:0]         rd_en_n;
  logic               w_re_n;
  logic [WADDR_W-1:0] w_addr_n;

  logic signed [DATA_W-1:0] byte1, byte2;
  logic signed [15:0]       half1, half2;

  // ---------------------------------------------------------------
  // Derived layer values
  // ---------------------------------------------------------------
  logic [3:0]  ktaps;
  logic [2:0]  rpp;          // rows (output channels) per CONV pass
  logic [7:0]  npass;
  logic [7:0]  ngroups;
  logic [7:0]  nin_lstm;
  buf_e        h_rd, h_wr;

  function automatic buf_e other(input buf_e b);
    return (b == BUF_1) ? BUF_2 : BUF_1;
  endfunction

  always_comb begin
    ktaps    = cur.k10 ? 4'd10 : 4'd5;
    rpp      = cur.k10 ? 3'd2 : 3'd4;
    npass    = cur.k10 ? (cur.cout >> 1) : (cur.cout >> 2);
    ngroups  = 8'(cur.cout / 8'd5);
    nin_lstm = cur.cin + cur.cout;
    h_wr     = cnt_p[0] ? other(cur.dst) : cur.dst;
    h_rd     = cnt_p[0] ? cur.dst : other(cur.dst);
  end

  // ---------------------------------------------------------------
  // Stage 0: micro-operation generator
  // ---------------------------------------------------------------
  always_comb begin
    tok0      = '0;
    rd_en_n   = '0;
    rd_addr_n = '0;
    w_re_n    = 1'b0;
    w_addr_n  = '0;
    last_tok  = 1'b0;
    if (state == S_RUN) begin
      tok0.valid = 1'b1;
      tok0.dst   = cur.dst;
      unique case (cur.op)
        OP_CONV: begin
          if (!in_emit) begin
            if (cnt_k < 8'(ktaps)) begin
              rd_addr_n = cur.src_base + BADDR_W'(cnt_c * cur.lin)
                        + BADDR_W'(cnt_p * cur.stride) + BADDR_W'(4'(ktaps - 4'd1 - 4'(cnt_k)));
              rd_en_n[cur.src] = 1'b1;
              tok0.src  = cur.src;
              tok0.lane = rd_addr_n[1:0];
              tok0.d_ld = 1'b1;
              if (cnt_k == 0) begin
                tok0.w_ld = 1'b1;
                w_re_n    = 1'b1;
                w_addr_n  = cur.wbase + WADDR_W'(cnt_pass * cur.cin) + WADDR_W'(cnt_c);
              end
            end else begin
              tok0.mac   = 1'b1;
              tok0.first = (cnt_c == 0);
            end
          end else begin
            tok0.emit  = 1'b1;
            tok0.nlop  = NL_CONV;
            tok0.row   = cur.k10 ? 2'(2*cnt_e + 1) : 2'(cnt_e);
            tok0.waddr = cur.dst_base
                       + BADDR_W'(BADDR_W'(8'(cnt_pass * rpp) + 8'(cnt_e)) * cur.lout) + cnt_p;
            last_tok   = (cnt_e == rpp - 1) && (cnt_p == cur.lout - 1)
                       && (cnt_pass == npass - 1);
          end
        end
        OP_MAXPOOL, OP_AVGPOOL: begin
          rd_addr_n = cur.src_base + BADDR_W'(cnt_c * cur.lin)
                    + BADDR_W'(cnt_p * cur.stride) + BADDR_W'(cnt_k);
          rd_en_n[cur.src] = 1'b1;
          tok0.src    = cur.src;
          tok0.lane   = rd_addr_n[1:0];
          tok0.emit   = 1'b1;
          tok0.nlop   = (cur.op == OP_MAXPOOL) ? NL_MAX : NL_AVG;
          tok0.nfirst = (cnt_k == 0);
          tok0.nlast  = (cnt_k == 8'(cur.win) - 1);
          tok0.waddr  = cur.dst_base + BADDR_W'(cnt_c * cur.lout) + cnt_p;
          last_tok    = tok0.nlast && (cnt_p == cur.lout - 1) && (cnt_c == cur.cin - 1);
        end
        OP_LSTM: begin
          tok0.dst = h_wr;
          if (!in_emit) begin
            if (cnt_k < cur.cin) begin
              rd_addr_n = cur.src_base + BADDR_W'(BADDR_W'(cnt_k) * cur.lin) + cnt_p;
              rd_en_n[BUF_CO] = 1'b1;
              tok0.src = BUF_CO;
            end else begin
              rd_addr_n = cur.dst_base + BADDR_W'({cnt_k - cur.cin, 2'b00});
              rd_en_n[h_rd] = 1'b1;
              tok0.src  = h_rd;
              tok0.zero = (cnt_p == 0);
            end
            tok0.lane = rd_addr_n[1:0];
            tok0.d_ld = 1'b1;
            tok0.w_ld = 1'b1;
            tok0.mac  = 1'b1;
            tok0.clr  = (cnt_k == 0);
            w_re_n    = 1'b1;
            w_addr_n  = cur.wbase + WADDR_W'(cnt_c * nin_lstm) + WADDR_W'(cnt_k);
          end else begin
            tok0.waddr = cur.dst_base + BADDR_W'({8'(cnt_c * 5) + 8'(cnt_e), 2'b00});
            rd_addr_n  = tok0.waddr;
            rd_en_n[h_rd] = 1'b1;
            tok0.src   = h_rd;
            tok0.zero  = (cnt_p == 0);
            tok0.emit  = 1'b1;
            tok0.nlop  = NL_LSTM;
            tok0.col   = cnt_e;
            tok0.wmode = 1'b1;
            last_tok   = (cnt_e == 3'd4) && (cnt_c == ngroups - 1) && (cnt_p == cur.lin - 1);
          end
        end
        OP_FC: begin
          if (!in_emit) begin
            rd_addr_n = cur.src_base + BADDR_W'({cnt_k, 2'b00});
            rd_en_n[cur.src] = 1'b1;
            tok0.src  = cur.src;
            tok0.lane = rd_addr_n[1:0];
            tok0.d_ld = 1'b1;
            tok0.w_ld = 1'b1;
            tok0.mac  = 1'b1;
            tok0.clr  = (cnt_k == 0);
            w_re_n    = 1'b1;
            w_addr_n  = cur.wbase + WADDR_W'(cnt_k);
          end else begin
            tok0.emit   = 1'b1;
            tok0.nlop   = NL_FC;
            tok0.col    = cnt_e;
            tok0.nfirst = (cnt_e == 0);
            tok0.nlast  = (8'(cnt_e) == cur.cout - 1);
            last_tok    = tok0.nlast;
          end
        end
        default: tok0.valid = 1'b0;
      endcase
    end
  end

  assign rd_en   = rd_en_n;
  assign rd_addr = rd_addr_n;
  assign w_re    = w_re_n;
  assign w_addr  = w_addr_n;

  // ---------------------------------------------------------------
  // Sequencing and loop counters
  // ---------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      lidx      <= '0;
      drain_cnt <= '0;
      cnt_pass  <= '0;
      cnt_p     <= '0;
      cnt_c     <= '0;
      cnt_k     <= '0;
      cnt_e     <= '0;
      in_emit   <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            lidx  <= '0;
            state <= S_FETCH;
          end
        end
        S_FETCH: begin
          cur      <= program_i[lidx];
          cnt_pass <= '0;
          cnt_p    <= '0;
          cnt_c    <= '0;
          cnt_k    <= '0;
          cnt_e    <= '0;
          in_emit  <= 1'b0;
          if (program_i[lidx].op == OP_END) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_RUN;
          end
        end
        S_RUN: begin
          if (last_tok) begin
            state     <= S_DRAIN;
            drain_cnt <= '0;
          end
          unique case (cur.op)
            OP_CONV: begin
              if (!in_emit) begin
                if (cnt_k < 8'(ktaps)) cnt_k <= cnt_k + 1'b1;
                else begin
                  cnt_k <= '0;
                  if (cnt_c == cur.cin - 1) begin
                    cnt_c   <= '0;
                    in_emit <= 1'b1;
                    cnt_e   <= '0;
                  end else cnt_c <= cnt_c + 1'b1;
                end
              end else if (cnt_e == rpp - 1) begin
                in_emit <= 1'b0;
                cnt_e   <= '0;
                if (cnt_p == cur.lout - 1) begin
                  cnt_p    <= '0;
                  cnt_pass <= cnt_pass + 1'b1;
                end else cnt_p <= cnt_p + 1'b1;
              end else cnt_e <= cnt_e + 1'b1;
            end
            OP_MAXPOOL, OP_AVGPOOL: begin
              if (cnt_k == 8'(cur.win) - 1) begin
                cnt_k <= '0;
                if (cnt_p == cur.lout - 1) begin
                  cnt_p <= '0;
                  cnt_c <= cnt_c + 1'b1;
                end else cnt_p <= cnt_p + 1'b1;
              end else cnt_k <= cnt_k + 1'b1;
            end
            OP_LSTM: begin
              if (!in_emit) begin
                if (cnt_k == nin_lstm - 1) begin
                  cnt_k   <= '0;
                  in_emit <= 1'b1;
                  cnt_e   <= '0;
                end else cnt_k <= cnt_k + 1'b1;
              end else if (cnt_e == 3'd4) begin
                in_emit <= 1'b0;
                cnt_e   <= '0;
                if (cnt_c == ngroups - 1) begin
                  cnt_c <= '0;
                  cnt_p <= cnt_p + 1'b1;
                end else cnt_c <= cnt_c + 1'b1;
              end else cnt_e <= cnt_e + 1'b1;
            end
            OP_FC: begin
              if (!in_emit) begin
                if (cnt_k == cur.cin - 1) begin
                  cnt_k   <= '0;
                  in_emit <= 1'b1;
                  cnt_e   <= '0;
                end else cnt_k <= cnt_k + 1'b1;
              end else cnt_e <= cnt_e + 1'b1;
            end
            default: state <= S_DRAIN;
          endcase
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 3'd3) begin
            if (lidx == 4'(N_LAYERS - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              lidx  <= lidx + 1'b1;
              state <= S_FETCH;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---------------------------------------------------------------
  // Pipeline registers
  // ---------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok1  <= '0;
      tok2  <= '0;
      byte2 <= '0;
      half2 <= '0;
    end else begin
      tok1  <= tok0;
      tok2  <= tok1;
      byte2 <= byte1;
      half2 <= half1;
    end
  end

  // Stage 1: select the byte (or the c half-word) that was read.
  always_comb begin
    logic [31:0] word;
    unique case (tok1.src)
      BUF_1:   word = buf1_rdata;
      BUF_2:   word = buf2_rdata;
      default: word = {24'd0, co_rdata};
    endcase
    byte1 = (tok1.src == BUF_CO) ? co_rdata : word[8*tok1.lane +: 8];
    half1 = word[31:16];
    if (tok1.zero) begin
      byte1 = '0;
      half1 = '0;
    end
  end

  // PE array control: stage 1 loads, stage 2 accumulates.
  assign pe_lstm_mode = (cur.op == OP_LSTM) || (cur.op == OP_FC);
  assign pe_k10       = cur.k10;
  assign pe_hbl       = cur.hbl;
  assign pe_vbl       = cur.vbl;
  assign pe_d_ld      = tok1.valid && tok1.d_ld;
  assign pe_d_in      = byte1;
  assign pe_w_ld      = tok1.valid && tok1.w_ld;
  assign pe_en        = tok2.valid && tok2.mac;
  assign pe_clr       = tok2.clr;
  assign pe_first     = tok2.first;
  assign pe_col       = (cur.op == OP_CONV) ? 3'(N_PE - 1) : tok2.col;

  // Stage 2: hand the result to the Non-linear module.
  always_comb begin
    nl_valid  = tok2.valid && tok2.emit;
    nl_op     = tok2.nlop;
    nl_first  = tok2.nfirst;
    nl_last   = tok2.nlast;
    nl_shift  = cur.shift;
    nl_relu   = cur.relu;
    nl_recip  = cur.recip;
    nl_x      = byte2;
    nl_c_prev = half2;
    nl_tag    = {tok2.dst, tok2.wmode, tok2.waddr};
    nl_gate   = pe_out;
    if (tok2.nlop == NL_CONV) nl_gate[0] = pe_out[tok2.row];
  end

  // Stage 3: write the Non-linear result.
  always_comb begin
    buf_e dst;
    logic wmode;
    dst     = buf_e'(nl_tag_out[14:13]);
    wmode   = nl_tag_out[12];
    wr_addr = nl_tag_out[BADDR_W-1:0];
    buf1_we = '0;
    buf2_we = '0;
    co_we   = 1'b0;
    if (wmode) wr_data = {nl_c_out, 8'h00, nl_y};
    else       wr_data = {4{nl_y}};
    if (nl_out_valid) begin
      unique case (dst)
        BUF_1:   buf1_we = wmode ? 4'b1111 : (4'b0001 << wr_addr[1:0]);
        BUF_2:   buf2_we = wmode ? 4'b1111 : (4'b0001 << wr_addr[1:0]);
        default: co_we   = 1'b1;
      endcase
    end
  end

endmodule
