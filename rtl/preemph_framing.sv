// preemph_framing: pre-emphasis filter and framing of the microphone samples.
//
// Each accepted input sample x[n] (16-bit signed) is filtered by the
// first-order pre-emphasis y[n] = x[n] - (31/32) x[n-1], computed as
// x[n] - x[n-1] + (x[n-1] >>> 5), then scaled by qshift and saturated to an
// 8-bit activation. Consecutive samples form a frame of FRAME_LEN bytes that
// is written into Buffer1 from byte 0 upward. When the frame is complete,
// frame_valid goes high and no further sample is accepted (s_ready = 0) until
// frame_ack, which the controller gives once the frame has been processed.
// The filter state carries over between frames.
//
// The design names this block only; the filter coefficient, the 8-bit
// quantisation, non-overlapping frames, FRAME_LEN = 800 and the valid/ready
// input handshake are this implementation's choices.
//
// Timing: a sample is accepted on a clock edge with s_valid && s_ready and
// written to the buffer port in the same cycle (combinational write outputs).
module preemph_framing
  import kws_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 800,
  parameter int unsigned IN_W      = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   s_valid,
  output logic                   s_ready,
  input  logic signed [IN_W-1:0] s_data,
  input  logic        [3:0]      qshift,
  output logic                   frame_valid,
  input  logic                   frame_ack,
  output logic        [3:0]      buf_we,
  output logic  [BADDR_W-1:0]    buf_waddr,
  output logic        [31:0]     buf_wdata
);

  logic signed [IN_W-1:0]   x_prev;
  logic [BADDR_W-1:0]       idx;
  logic signed [IN_W+1:0]   emph;
  logic signed [IN_W+1:0]   scaled;
  logic signed [DATA_W-1:0] q;
  logic                     take;

  assign s_ready = !frame_valid;
  assign take    = s_valid && s_ready;

  always_comb begin
    emph   = (IN_W+2)'(s_data) - (IN_W+2)'(x_prev) + (IN_W+2)'(x_prev >>> 5);
    scaled = emph >>> qshift;
    if (scaled > 127)       q = 8'sd127;
    else if (scaled < -128) q = -8'sd128;
    else                    q = DATA_W'(scaled);
  end

  assign buf_we    = take ? (4'b0001 << idx[1:0]) : 4'b0000;
  assign buf_waddr = idx;
  assign buf_wdata = {4{q}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev      <= '0;
      idx         <= '0;
      frame_valid <= 1'b0;
    end else begin
      if (take) begin
        x_prev <= s_data;
        if (idx == BADDR_W'(FRAME_LEN - 1)) begin
          idx         <= '0;
          frame_valid <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
      if (frame_ack) frame_valid <= 1'b0;
    end
  end

endmodule
