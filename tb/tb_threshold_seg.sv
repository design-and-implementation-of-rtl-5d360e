// Self-checking testbench for threshold_seg.
//
// Sweeps every intensity against several thresholds (including 0 and 255)
// with random pixel colours. A pixel must pass unchanged with fg = 1 when
// its intensity is at or above the threshold, and become black with fg = 0
// otherwise. Both outcomes are counted and must occur.
module tb_threshold_seg;
  import vedic_pkg::*;
  rgb_t       pix, pix_out;
  logic [7:0] intensity, threshold;
  logic       fg;
  int checks = 0, failures = 0, n_fg = 0, n_bg = 0;
  int thr_list[5] = '{0, 1, 100, 128, 255};

  threshold_seg dut (.pix(pix), .intensity(intensity), .threshold(threshold),
                     .pix_out(pix_out), .fg(fg));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (thr_list[k])
      for (int i = 0; i < 256; i++) begin
        threshold = 8'(thr_list[k]);
        intensity = 8'(i);
        pix = rgb_t'(24'($urandom));
        #1;
        checks++;
        if (i >= thr_list[k]) begin
          n_fg++;
          if (!fg || pix_out != pix) begin
            failures++;
            $display("FAIL fg expected: I=%0d T=%0d", i, thr_list[k]);
          end
        end else begin
          n_bg++;
          if (fg || pix_out != '0) begin
            failures++;
            $display("FAIL bg expected: I=%0d T=%0d", i, thr_list[k]);
          end
        end
      end
    checks++;
    if (n_fg == 0 || n_bg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
