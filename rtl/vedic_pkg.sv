// Shared types and constants of the Vedic multiplier design and its
// pixel-processing applications.
//
// rgb_t is one 24-bit colour pixel, eight bits per channel. pix_mode_e
// selects the operation of the pixel unit. The luminosity weights
// 0.21 / 0.72 / 0.07 of the gray conversion are held as 8-bit fractions of
// 256: 54/256 = 0.211, 184/256 = 0.719, 18/256 = 0.070. Their sum is exactly
// 256, so a white pixel stays at full scale (255). The fixed-point scaling is
// this design's choice; the weights themselves are the published ones.
package vedic_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef enum logic [1:0] {
    MODE_GRAY    = 2'd0,  // luminosity gray scale
    MODE_SEGMENT = 2'd1,  // threshold segmentation, background cleared
    MODE_INVERT  = 2'd2   // colour inversion
  } pix_mode_e;

  localparam int unsigned GRAY_FRAC_BITS = 8;
  localparam logic [7:0]  GRAY_COEF_R    = 8'd54;
  localparam logic [7:0]  GRAY_COEF_G    = 8'd184;
  localparam logic [7:0]  GRAY_COEF_B    = 8'd18;

endpackage
