// Self-checking testbench for pixel_unit.
//
// For 20000 random pixels, thresholds and modes, the expected output is
// worked out here from the definitions: gray = round((54R + 184G + 18B) /
// 256); MODE_GRAY gives {gray, gray, gray}; MODE_SEGMENT gives the pixel if
// gray >= threshold, else black; MODE_INVERT gives 255 minus each channel.
// Each mode and both segmentation outcomes are counted and must occur.
module tb_pixel_unit;
  import vedic_pkg::*;
  rgb_t       pix, pix_out, want;
  pix_mode_e  mode;
  logic [7:0] threshold, gray;
  logic       fg;
  int checks = 0, failures = 0;
  int n_mode[3] = '{0, 0, 0};
  int n_fg = 0, n_bg = 0;

  pixel_unit dut (.pix(pix), .mode(mode), .threshold(threshold),
                  .pix_out(pix_out), .gray(gray), .fg(fg));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int g;
      logic is_fg;
      pix       = rgb_t'(24'($urandom));
      threshold = 8'($urandom);
      mode      = pix_mode_e'(2'($urandom_range(2)));
      #1;
      g     = (54 * int'(pix.r) + 184 * int'(pix.g) + 18 * int'(pix.b) + 128) / 256;
      is_fg = (g >= int'(threshold));
      unique case (mode)
        MODE_GRAY:    want = '{r: 8'(g), g: 8'(g), b: 8'(g)};
        MODE_SEGMENT: want = is_fg ? pix : '0;
        default:      want = '{r: ~pix.r, g: ~pix.g, b: ~pix.b};
      endcase
      n_mode[int'(mode)]++;
      if (mode == MODE_SEGMENT) begin
        if (is_fg) n_fg++; else n_bg++;
      end
      checks++;
      if (pix_out != want || int'(gray) != g || fg != is_fg) begin
        failures++;
        $display("FAIL mode=%s pix=%h thr=%0d -> %h, expected %h", mode.name(), pix, threshold, pix_out, want);
      end
    end
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_fg == 0 || n_bg == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
