// Per-pixel image-processing unit built around the Vedic multiplier.
//
// One colour pixel goes in and one result pixel comes out, chosen by mode:
//   MODE_GRAY    : the luminosity gray value, copied to all three channels;
//   MODE_SEGMENT : the pixel if its gray value is at or above threshold,
//                  black otherwise;
//   MODE_INVERT  : the colour-inverted pixel.
// The gray value is always computed (by rgb2gray with its three 8x8 Vedic
// multipliers) because segmentation uses it as the pixel's intensity. fg
// reports the segmentation decision in every mode.
//
// The three operations are the published gray-scale, segmentation and
// inversion applications. Gathering them in one unit with a mode select,
// and the unused mode value 3 giving the gray result, are this design's.
//
// Interface: pix (rgb_t), mode (pix_mode_e), threshold (8 bits) in;
// pix_out (rgb_t), gray (8 bits), fg out. Purely combinational.
module pixel_unit
  import vedic_pkg::*;
(
  input  rgb_t       pix,
  input  pix_mode_e  mode,
  input  logic [7:0] threshold,
  output rgb_t       pix_out,
  output logic [7:0] gray,
  output logic       fg
);
  rgb_t seg_pix, inv_pix;

  rgb2gray      u_gray (.pix(pix), .gray(gray));
  threshold_seg u_seg  (.pix(pix), .intensity(gray), .threshold(threshold),
                        .pix_out(seg_pix), .fg(fg));
  color_invert  u_inv  (.pix(pix), .pix_out(inv_pix));

  always_comb begin
    unique case (mode)
      MODE_SEGMENT: pix_out = seg_pix;
      MODE_INVERT:  pix_out = inv_pix;
      default:      pix_out = '{r: gray, g: gray, b: gray};
    endcase
  end
endmodule
