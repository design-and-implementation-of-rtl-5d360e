// Self-checking testbench for color_invert: every channel value in each
// channel position, with random values in the other two channels. Each
// output channel must equal 255 minus the input channel.
module tb_color_invert;
  import vedic_pkg::*;
  rgb_t pix, pix_out;
  int checks = 0, failures = 0;

  color_invert dut (.pix(pix), .pix_out(pix_out));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ch = 0; ch < 3; ch++)
      for (int v = 0; v < 256; v++) begin
        pix = rgb_t'(24'($urandom));
        case (ch)
          0: pix.r = 8'(v);
          1: pix.g = 8'(v);
          default: pix.b = 8'(v);
        endcase
        #1;
        checks++;
        if (int'(pix_out.r) != 255 - int'(pix.r) ||
            int'(pix_out.g) != 255 - int'(pix.g) ||
            int'(pix_out.b) != 255 - int'(pix.b)) begin
          failures++;
          $display("FAIL %h -> %h", pix, pix_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
