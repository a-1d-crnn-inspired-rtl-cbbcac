// approx_mult: 8x8 signed multiplier using radix-4 (bit-pair) Booth coding with
// fine-grained, run-time precision control by a Horizontal Breaking Line (HBL)
// and a Vertical Breaking Line (VBL).
//
// The 8-bit multiplier (the weight) gets a 0 appended below its LSB and is
// cut into four overlapping 3-bit groups {m[i+1], m[i], m[i-1]}, i = 0,2,4,6.
// Each group selects 0, +1, +2, -1 or -2 times the multiplicand (the data), as
// in the Booth table: 000/111 -> 0, 001/010 -> +1, 011 -> +2, 100 -> -2,
// 101/110 -> -1. Partial product j is that multiple, sign-extended to 16 bits
// and shifted left by 2j.
//
// Approximation:
//  * HBL = n: the first n partial-product rows (those above the line) are
//    merged without horizontal carries, i.e. by a bitwise OR.
//  * VBL = m: in the m least significant columns no carry is produced or
//    propagated; below the HBL those columns combine their bits with AND.
//  * Everything left of the VBL and below the HBL is an exact (carry) sum, into
//    which no carry from the right-hand columns enters.
// HBL = 0 and VBL = 0 (also HBL = 1, VBL = 0) is an exact multiplier.
// This bit-level reading of the breaking lines is how this implementation
// interprets the described scheme; the paper's figure shows HBL = 2, VBL = 7.
//
// Interface: purely combinational. a = multiplicand (data), b = multiplier
// (weight), hbl in 0..4 (larger values act as 4), vbl in 0..15; p = 16-bit
// signed product.
module approx_mult
  import kws_pkg::*;
(
  input  logic signed [DATA_W-1:0] a,
  input  logic signed [WGT_W-1:0]  b,
  input  logic        [2:0]        hbl,
  input  logic        [3:0]        vbl,
  output logic signed [PROD_W-1:0] p
);

  localparam int unsigned N_PP = WGT_W / 2;  // 4 Booth rows

  logic [PROD_W-1:0] pp [N_PP];
  logic [PROD_W-1:0] lo_mask;
  logic [PROD_W-1:0] upper;
  logic [PROD_W-1:0] hi_sum;
  logic [PROD_W-1:0] lo_and;
  logic [WGT_W:0]    bx;        // multiplier with the appended 0

  // Booth partial products.
  always_comb begin
    bx = {b, 1'b0};
    for (int j = 0; j < N_PP; j++) begin
      logic signed [PROD_W-1:0] mc;
      mc = PROD_W'(a);
      unique case (bx[2*j +: 3])
        3'b001, 3'b010: pp[j] = PROD_W'(mc <<< (2*j));
        3'b011:         pp[j] = PROD_W'(mc <<< (2*j + 1));
        3'b100:         pp[j] = PROD_W'((-mc) <<< (2*j + 1));
        3'b101, 3'b110: pp[j] = PROD_W'((-mc) <<< (2*j));
        default:        pp[j] = '0;
      endcase
    end
  end

  // Breaking lines.
  always_comb begin
    int unsigned n;
    n       = (hbl > 3'd4) ? N_PP : int'(hbl);
    lo_mask = PROD_W'((32'd1 << vbl) - 32'd1);
    // Rows above the HBL: OR-merged (no horizontal carry).
    upper = '0;
    for (int j = 0; j < N_PP; j++)
      if (j < n) upper = upper | pp[j];
    // Rows below the HBL, plus the merged upper part as one more operand.
    hi_sum = (n > 0) ? (upper & ~lo_mask) : '0;
    lo_and = (n > 0) ? (upper | ~lo_mask) : '1;
    for (int j = 0; j < N_PP; j++)
      if (j >= n) begin
        hi_sum = hi_sum + (pp[j] & ~lo_mask);
        lo_and = lo_and & (pp[j] | ~lo_mask);
      end
    p = signed'(hi_sum | (lo_and & lo_mask));
  end

endmodule
