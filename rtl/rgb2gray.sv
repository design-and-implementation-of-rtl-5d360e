// RGB to gray-scale conversion by the luminosity method.
//
//   gray = 0.21 R + 0.72 G + 0.07 B
//
// Each channel is multiplied by its weight, held as an 8-bit fraction of
// 256 (see vedic_pkg), in an 8x8 Vedic multiplier. The three 16-bit products
// and a rounding constant of 128 are summed with Ling parallel prefix
// adders, and the gray value is bits [15:8] of the sum, i.e. the weighted
// sum divided by 256 and rounded to nearest; the low byte of the sum is the
// discarded fraction and is left unused. Because the weights add up to
// 256 the result never exceeds 255.
//
// The formula is the published one. The fixed-point weights, the rounding
// and the use of three parallel multipliers are this design's choices.
//
// Interface: pix (rgb_t) in; gray (8 bits) out. Purely combinational.
module rgb2gray
  import vedic_pkg::*;
#(
  parameter logic [7:0] COEF_R = GRAY_COEF_R,
  parameter logic [7:0] COEF_G = GRAY_COEF_G,
  parameter logic [7:0] COEF_B = GRAY_COEF_B
) (
  input  rgb_t       pix,
  output logic [7:0] gray
);
  localparam logic [15:0] ROUND = 16'(1) << (GRAY_FRAC_BITS - 1);

  logic [15:0] wr, wg, wb, sum_rg, sum_rgb, sum_rnd;

  vm8x8 u_mul_r (.a(pix.r), .b(COEF_R), .z(wr), .c());
  vm8x8 u_mul_g (.a(pix.g), .b(COEF_G), .z(wg), .c());
  vm8x8 u_mul_b (.a(pix.b), .b(COEF_B), .z(wb), .c());

  ppa #(.W(16)) u_add_rg  (.a(wr),      .b(wg),    .sum(sum_rg),  .cout());
  ppa #(.W(16)) u_add_b   (.a(sum_rg),  .b(wb),    .sum(sum_rgb), .cout());
  ppa #(.W(16)) u_add_rnd (.a(sum_rgb), .b(ROUND), .sum(sum_rnd), .cout());

  assign gray = sum_rnd[15:8];
endmodule
