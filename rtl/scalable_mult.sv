// scalable_mult -- signed multiplier that works as one 16x16 or one 8x8 unit.
//
// The 16x16 product is assembled from four 8x8 partial products
// (high*high signed, the two cross terms signed*unsigned, low*low unsigned).
// In 8-bit mode (mode8 = 1) the 8-bit operands a[7:0] and b[7:0] are steered
// into the signed high*high multiplier and the three other partial-product
// multipliers see zero operands, so they do not toggle. The result is then
// a8*b8 placed at bits [31:16] of p. That scalable multipliers serve both
// precisions follows the published design; the four-part split and placing
// the 8-bit product in the upper half are this design's choice.
// Purely combinational.
module scalable_mult (
  input  logic               mode8,  // 1: 8x8 multiply of a[7:0], b[7:0]
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  output logic signed [31:0] p       // 16-bit mode: a*b; 8-bit mode: (a8*b8) << 16
);
  logic signed [7:0] ah, bh;
  logic        [7:0] al, bl;
  logic signed [15:0] p_hh;
  logic signed [16:0] p_hl, p_lh;
  logic        [15:0] p_ll;

  always_comb begin
    ah = mode8 ? a[7:0] : a[15:8];
    bh = mode8 ? b[7:0] : b[15:8];
    al = mode8 ? 8'd0 : a[7:0];
    bl = mode8 ? 8'd0 : b[7:0];
    p_hh = ah * bh;
    p_hl = 17'(ah) * $signed({1'b0, bl});
    p_lh = $signed({1'b0, al}) * 17'(bh);
    p_ll = al * bl;
    p = (32'(p_hh) <<< 16) + (32'(p_hl) <<< 8) + (32'(p_lh) <<< 8) + 32'(p_ll);
  end
endmodule
