// Image-application testbench for vedic_top: streams a whole generated
// image through the pixel unit once in each mode (gray scale, threshold
// segmentation, inversion).
//
// The 64x64 test image is computed here: red rises along x, green along y,
// blue along the diagonal, with an 8x8 checkerboard added to blue so that
// segmentation sees both foreground and background. Pixels are presented
// one per clock with enable and pix_valid_in high. Each result is compared
// with a model worked out from the definitions one clock after the pixel is
// presented, the frame must yield one result per clock (64*64 results in
// 64*64 cycles), and for the gray frame
// the PSNR of the hardware gray values against the real-valued luminosity
// 0.21 R + 0.72 G + 0.07 B is reported and must exceed 45 dB (the only
// error is the 8-bit fixed-point weights and rounding).
module tb_image_apps;
  import vedic_pkg::*;

  localparam int unsigned W = 64;
  localparam int unsigned H = 64;
  localparam logic [7:0]  THRESHOLD = 8'd120;

  logic        clk = 1'b0;
  logic        rst, enable;
  logic [31:0] data1, data2;
  logic [63:0] product;
  logic        pix_valid_in, pix_valid_out, pix_fg;
  rgb_t        pix_in, pix_out;
  pix_mode_e   pix_mode;
  logic [7:0]  threshold, pix_gray;

  int checks = 0, failures = 0;

  vedic_top dut (
    .clk(clk), .rst(rst), .enable(enable),
    .data1(data1), .data2(data2), .product(product),
    .pix_valid_in(pix_valid_in), .pix_in(pix_in), .pix_mode(pix_mode),
    .threshold(threshold), .pix_valid_out(pix_valid_out), .pix_out(pix_out),
    .pix_fg(pix_fg), .pix_gray(pix_gray)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3 * W * H + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rgb_t image_pixel(input int x, input int y);
    rgb_t px;
    px.r = 8'(x * 4);
    px.g = 8'(y * 4);
    px.b = 8'((x + y) * 2 + ((((x / 8) + (y / 8)) % 2) * 100));
    return px;
  endfunction

  function automatic int gray_of(input rgb_t px);
    return (54 * int'(px.r) + 184 * int'(px.g) + 18 * int'(px.b) + 128) / 256;
  endfunction

  task automatic run_frame(input pix_mode_e mode);
    int  n_out = 0, n_fg = 0, n_cycles = 0;
    real se = 0.0;
    pix_mode = mode;
    for (int y = 0; y < int'(H); y++)
      for (int x = 0; x < int'(W); x++) begin
        rgb_t src, want;
        int   g;
        real  lum;
        // present one pixel; its result is registered at the next edge
        src          = image_pixel(x, y);
        pix_in       = src;
        pix_valid_in = 1'b1;
        @(posedge clk); #1;
        n_cycles++;
        g   = gray_of(src);
        lum = 0.21 * src.r + 0.72 * src.g + 0.07 * src.b;
        unique case (mode)
          MODE_GRAY:    want = '{r: 8'(g), g: 8'(g), b: 8'(g)};
          MODE_SEGMENT: want = (g >= int'(THRESHOLD)) ? src : '0;
          default:      want = '{r: ~src.r, g: ~src.g, b: ~src.b};
        endcase
        se   += (real'(pix_gray) - lum) ** 2;
        n_fg += int'(pix_fg);
        n_out += int'(pix_valid_out);
        checks++;
        if (!pix_valid_out || pix_out != want || int'(pix_gray) != g) begin
          failures++;
          $display("FAIL %s pixel (%0d,%0d): %h, expected %h", mode.name(), x, y, pix_out, want);
        end
        @(negedge clk);
      end
    pix_valid_in = 1'b0;
    // one result per clock: the frame takes exactly W*H cycles
    checks++;
    if (n_out != int'(W * H) || n_cycles != int'(W * H)) begin
      failures++;
      $display("FAIL %s: %0d results in %0d cycles", mode.name(), n_out, n_cycles);
    end
    if (mode == MODE_GRAY) begin
      real psnr;
      psnr = 10.0 * $log10(255.0 * 255.0 / (se / real'(W * H)));
      $display("gray frame PSNR against exact luminosity: %0.1f dB", psnr);
      checks++;
      if (psnr < 45.0) failures++;
    end
    if (mode == MODE_SEGMENT) begin
      $display("segmentation: %0d of %0d pixels foreground", n_fg, n_out);
      checks++;
      if (n_fg == 0 || n_fg == n_out) failures++;
    end
    $display("%s frame: %0d pixels in %0d cycles", mode.name(), n_out, n_cycles);
  endtask

  initial begin
    rst = 1'b1; enable = 1'b1; data1 = '0; data2 = '0;
    pix_in = '0; pix_mode = MODE_GRAY; threshold = THRESHOLD; pix_valid_in = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_frame(MODE_GRAY);
    run_frame(MODE_SEGMENT);
    run_frame(MODE_INVERT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
