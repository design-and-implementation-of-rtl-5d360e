// Top level: 32x32 Vedic multiplier and pixel-processing unit.
//
// Two datapaths stand side by side and share clock, reset and enable:
//   * a 32x32-bit unsigned Vedic multiplier (vm32x32: four 16x16 Vedic
//     multipliers whose sub-products are summed by Ling parallel prefix
//     adders), whose 64-bit product is registered;
//   * a pixel unit that turns one RGB pixel into its gray value, its
//     threshold-segmented value or its inverse, also registered.
// On a rising clk edge with rst high both output registers clear. Otherwise,
// when enable is high, each register loads the result for the inputs
// present at that edge; when enable is low they hold. So a result appears
// one cycle after its operands, and one operation can start every cycle.
// pix_gray and pix_fg report the pixel's gray value and segmentation
// decision in every mode. pix_valid_in is carried along to pix_valid_out with the same timing.
//
// The multiplier architecture and the three pixel operations follow the
// published design; clk, rst and enable appear in its simulations, but the
// output registers, their synchronous active-high reset and the one-cycle
// latency are this design's choices.
module vedic_top
  import vedic_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  // 32x32 multiplier
  input  logic [31:0] data1,
  input  logic [31:0] data2,
  output logic [63:0] product,
  // pixel unit
  input  logic        pix_valid_in,
  input  rgb_t        pix_in,
  input  pix_mode_e   pix_mode,
  input  logic [7:0]  threshold,
  output logic        pix_valid_out,
  output rgb_t        pix_out,
  output logic        pix_fg,
  output logic [7:0]  pix_gray
);
  logic [63:0] product_c;
  rgb_t        pix_c;
  logic [7:0]  gray_c;
  logic        fg_c;
  logic        final_carry;

  vm32x32 u_vm32 (.a(data1), .b(data2), .z(product_c), .c(final_carry));

  pixel_unit u_pix (.pix(pix_in), .mode(pix_mode), .threshold(threshold),
                    .pix_out(pix_c), .gray(gray_c), .fg(fg_c));

  always_ff @(posedge clk) begin
    if (rst) begin
      product       <= '0;
      pix_out       <= '0;
      pix_fg        <= 1'b0;
      pix_gray      <= '0;
      pix_valid_out <= 1'b0;
    end else if (enable) begin
      product       <= product_c;
      pix_out       <= pix_c;
      pix_fg        <= fg_c;
      pix_gray      <= gray_c;
      pix_valid_out <= pix_valid_in;
    end
  end

  // An NxN product always fits in 2N bits, so the final adder never carries.
  always_ff @(posedge clk) begin
    if (!rst && enable) assert (!final_carry)
      else $error("vm32x32 final adder carried out");
  end
endmodule
