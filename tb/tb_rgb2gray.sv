// Self-checking testbench for rgb2gray.
//
// Applies black, white, the pure primaries and 50000 random pixels. Each
// gray value must equal round((54 R + 184 G + 18 B) / 256), worked out here
// with integer arithmetic, and must lie within 1 of the real-valued
// luminosity 0.21 R + 0.72 G + 0.07 B.
module tb_rgb2gray;
  import vedic_pkg::*;
  rgb_t       pix;
  logic [7:0] gray;
  int checks = 0, failures = 0;

  rgb2gray dut (.pix(pix), .gray(gray));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int r, input int g, input int b);
    int  want;
    real lum;
    pix = '{r: 8'(r), g: 8'(g), b: 8'(b)};
    #1;
    want = (54 * r + 184 * g + 18 * b + 128) / 256;
    lum  = 0.21 * r + 0.72 * g + 0.07 * b;
    checks += 2;
    if (int'(gray) != want) begin
      failures++;
      $display("FAIL rgb=(%0d,%0d,%0d) gray=%0d, expected %0d", r, g, b, gray, want);
    end
    if (real'(gray) > lum + 1.0 || real'(gray) < lum - 1.0) begin
      failures++;
      $display("FAIL rgb=(%0d,%0d,%0d) gray=%0d far from %f", r, g, b, gray, lum);
    end
  endtask

  initial begin
    apply(0, 0, 0);
    apply(255, 255, 255);
    apply(255, 0, 0);
    apply(0, 255, 0);
    apply(0, 0, 255);
    apply(128, 128, 128);
    for (int i = 0; i < 50000; i++)
      apply(int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(255)));
    apply(255, 255, 255);
    checks++;
    if (gray != 8'd255) begin
      failures++;
      $display("FAIL white does not map to 255");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
