// Threshold segmentation of one pixel.
//
// A pixel belongs to the foreground when its intensity is at or above the
// threshold. Foreground pixels are passed on unchanged; background pixels
// are replaced by black. The mask output flags foreground pixels.
//
// Splitting the image into foreground and background at an intensity level
// and keeping the foreground is the published method. That the threshold is
// a run-time input, that the comparison is "at or above", that intensity is
// the gray value of the pixel, and that the background becomes black are
// this design's choices.
//
// Interface: pix (rgb_t) and its intensity (8 bits), threshold (8 bits) in;
// pix_out (rgb_t) and fg (1 bit) out. Purely combinational.
module threshold_seg
  import vedic_pkg::*;
(
  input  rgb_t       pix,
  input  logic [7:0] intensity,
  input  logic [7:0] threshold,
  output rgb_t       pix_out,
  output logic       fg
);
  assign fg      = (intensity >= threshold);
  assign pix_out = fg ? pix : '0;
endmodule
