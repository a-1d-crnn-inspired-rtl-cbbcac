// preemph_framing_tb: streams random 16-bit samples (with gaps in s_valid)
// through the pre-emphasis filter for three frames of FRAME_LEN = 40, checks
// every byte written to the buffer port against y = x[n] - x[n-1] +
// (x[n-1] >>> 5) scaled and saturated, checks that frame_valid rises after the
// last sample of a frame, that s_ready is low until frame_ack, and that the
// filter state carries over into the next frame.
module preemph_framing_tb;
  import kws_pkg::*;
  import kws_ref_pkg::*;

  localparam int FL = 40;
  logic clk = 0, rst_n = 0, s_valid = 0, s_ready, frame_valid, frame_ack = 0;
  logic signed [15:0] s_data = 0;
  logic [3:0] qshift = 4'd6;
  logic [3:0] buf_we;
  logic [11:0] buf_waddr;
  logic [31:0] buf_wdata;
  int checks = 0, failures = 0;
  int prev = 0;

  preemph_framing #(.FRAME_LEN(FL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < FL; i++) begin
        int xv, e;
        if ($urandom_range(0, 3) == 0) begin
          s_valid = 0;
          @(negedge clk);
        end
        xv = $urandom_range(0, 65535) - 32768;
        if (i % 10 == 0) xv = 32767;   // drive saturation
        s_valid = 1; s_data = 16'(xv);
        e = sat8((xv - prev + (prev >>> 5)) >>> 6);
        #1;
        chk("ready", int'(s_ready), 1);
        chk("addr", int'(buf_waddr), i);
        chk("we", int'(buf_we), 1 << (i % 4));
        chk("data", s8(int'(buf_wdata[8 * (i % 4) +: 8])), e);
        prev = xv;
        @(negedge clk);
      end
      s_valid = 1;
      chk("frame_valid", int'(frame_valid), 1);
      chk("stall", int'(s_ready), 0);
      #1 chk("no write", int'(buf_we), 0);
      repeat (3) @(negedge clk);
      frame_ack = 1;
      @(negedge clk);
      frame_ack = 0; s_valid = 0;
      chk("released", int'(frame_valid), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
