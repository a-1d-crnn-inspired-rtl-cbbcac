// nonlinear: the reconfigurable Non-linear module. It is built from
// comparators (saturation, ReLU, max pooling, arg-max, clamping of the
// activations) and a small multiply-accumulate datapath (average pooling, LSTM
// cell update), and serves every layer type:
//   NL_CONV : y = ReLU(sat8(acc >>> shift))            (ReLU if relu = 1)
//   NL_MAX  : running max of x over a window (first .. last)
//   NL_AVG  : y = sat8((sum x) * recip >>> 8) over a window (first .. last)
//   NL_LSTM : z = sat16(gate >>> shift) for PE_f, PE_i, PE_g, PE_o;
//             f,i,o = hard sigmoid = clamp(z/4 + 32, 0, 64); g = clamp(z, -64, 64)
//             c_t = sat16((f*c_{t-1} + i*g) >>> 6)
//             h_t = sat8((o * clamp(c_t, -64, 64)) >>> 6)
//   NL_FC   : score = sat16(acc >>> shift), running arg-max over the outputs
// LSTM values use 6 fractional bits (64 = 1.0). The hard sigmoid/tanh and
// all formats are this implementation's choices; the design only states that
// the module is reconfigurable and made of a comparator and a MAC array.
//
// Interface/timing: one operation per cycle when in_valid is high; results
// are registered, so out_valid, y, c_out and tag_out appear one cycle later.
// tag_in (destination address etc.) travels with the operation unchanged.
// For NL_MAX/NL_AVG/NL_FC a result appears only on the 'last' element.
// For NL_FC every element also updates score_o; on 'last' cls_valid pulses
// with cls_o = index of the largest score (lowest index wins ties).
module nonlinear
  import kws_pkg::*;
#(
  parameter int unsigned TAG_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  nl_op_e                   op,
  input  logic                     first,
  input  logic                     last,
  input  logic        [4:0]        shift,
  input  logic                     relu,
  input  logic        [7:0]        recip,
  input  logic signed [ACC_W-1:0]  gate [N_ROW],   // gate[0] used for CONV/FC
  input  logic signed [DATA_W-1:0] x,              // pooling input
  input  logic signed [15:0]       c_prev,
  input  logic        [TAG_W-1:0]  tag_in,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] y,
  output logic signed [15:0]       c_out,
  output logic        [TAG_W-1:0]  tag_out,
  output logic                     score_valid,
  output logic signed [15:0]       score_o,
  output logic                     cls_valid,
  output logic        [2:0]        cls_o
);

  function automatic logic signed [DATA_W-1:0] sat8(input logic signed [ACC_W-1:0] v);
    if (v > 127)       return 8'sd127;
    else if (v < -128) return -8'sd128;
    else               return DATA_W'(v);
  endfunction

  function automatic logic signed [15:0] sat16(input logic signed [ACC_W-1:0] v);
    if (v > 32767)       return 16'sd32767;
    else if (v < -32768) return -16'sd32768;
    else                 return 16'(v);
  endfunction

  function automatic logic signed [ACC_W-1:0] clampv(input logic signed [ACC_W-1:0] v,
                                                     input int lo, input int hi);
    if (v > hi)      return ACC_W'(hi);
    else if (v < lo) return ACC_W'(lo);
    else             return v;
  endfunction

  // running state of window / arg-max operations
  logic signed [DATA_W-1:0] run_max;
  logic signed [15:0]       run_sum;
  logic signed [15:0]       best_score;
  logic        [2:0]        best_idx;
  logic        [2:0]        fc_idx;

  // combinational results
  logic signed [DATA_W-1:0] y_n;
  logic signed [15:0]       c_n;
  logic signed [DATA_W-1:0] max_n;
  logic signed [15:0]       sum_n;
  logic signed [15:0]       score_n;
  logic                     emit_n;

  always_comb begin
    logic signed [ACC_W-1:0] z [N_ROW];
    logic signed [ACC_W-1:0] fg, ig, gg, og, cn, ct, hn;
    logic signed [ACC_W-1:0] prod;
    for (int r = 0; r < N_ROW; r++) z[r] = ACC_W'(sat16(gate[r] >>> shift));
    fg = clampv((z[0] >>> 2) + 32, 0, ONE_Q);
    ig = clampv((z[1] >>> 2) + 32, 0, ONE_Q);
    gg = clampv(z[2], -ONE_Q, ONE_Q);
    og = clampv((z[3] >>> 2) + 32, 0, ONE_Q);
    cn = (fg * ACC_W'(c_prev) + ig * gg) >>> 6;
    c_n = sat16(cn);
    ct = clampv(ACC_W'(c_n), -ONE_Q, ONE_Q);
    hn = (og * ct) >>> 6;

    max_n   = (first || x > run_max) ? x : run_max;
    sum_n   = (first ? 16'sd0 : run_sum) + 16'(x);
    prod    = ACC_W'(sum_n) * ACC_W'({1'b0, recip});
    score_n = sat16(gate[0] >>> shift);

    y_n    = '0;
    emit_n = 1'b0;
    unique case (op)
      NL_CONV: begin
        y_n    = sat8(gate[0] >>> shift);
        if (relu && y_n < 0) y_n = '0;
        emit_n = 1'b1;
      end
      NL_MAX: begin
        y_n    = max_n;
        emit_n = last;
      end
      NL_AVG: begin
        y_n    = sat8(prod >>> 8);
        emit_n = last;
      end
      NL_LSTM: begin
        y_n    = sat8(hn);
        emit_n = 1'b1;
      end
      default: begin  // NL_FC
        y_n    = '0;
        emit_n = 1'b0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      y           <= '0;
      c_out       <= '0;
      tag_out     <= '0;
      run_max     <= '0;
      run_sum     <= '0;
      best_score  <= '0;
      best_idx    <= '0;
      fc_idx      <= '0;
      score_valid <= 1'b0;
      score_o     <= '0;
      cls_valid   <= 1'b0;
      cls_o       <= '0;
    end else begin
      out_valid   <= in_valid && emit_n;
      score_valid <= 1'b0;
      cls_valid   <= 1'b0;
      if (in_valid) begin
        y       <= y_n;
        c_out   <= c_n;
        tag_out <= tag_in;
        run_max <= max_n;
        run_sum <= sum_n;
        if (op == NL_FC) begin
          score_valid <= 1'b1;
          score_o     <= score_n;
          if (first || score_n > best_score) begin
            best_score <= score_n;
            best_idx   <= first ? 3'd0 : fc_idx;
          end
          fc_idx <= first ? 3'd1 : fc_idx + 3'd1;
          if (last) begin
            cls_valid <= 1'b1;
            cls_o     <= (first || score_n > best_score) ? (first ? 3'd0 : fc_idx) : best_idx;
          end
        end
      end
    end
  end

endmodule
