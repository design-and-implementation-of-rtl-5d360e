// Colour inversion of one pixel.
//
// Each 8-bit channel c is replaced by its complement 255 - c, which for an
// unsigned 8-bit value is the bitwise inverse. Light areas become dark,
// dark areas light, and every colour turns into its complementary colour,
// as in the published application.
//
// Interface: pix (rgb_t) in; pix_out (rgb_t) out. Purely combinational.
module color_invert
  import vedic_pkg::*;
(
  input  rgb_t pix,
  output rgb_t pix_out
);
  always_comb begin
    pix_out.r = 8'd255 - pix.r;
    pix_out.g = 8'd255 - pix.g;
    pix_out.b = 8'd255 - pix.b;
  end
endmodule
