// End-to-end testbench for vedic_top at its default configuration.
//
// A reference model written here from the definitions (integer product,
// luminosity formula with weights 54/184/18 of 256, threshold rule,
// inversion) is clocked alongside the design with the same reset/enable
// rules: clear on rst, load on enable, hold otherwise. Inputs change away
// from the clock edge; after every rising edge all registered outputs are
// compared with the model, which also checks the one-cycle latency.
//
// The stimulus runs 6000 cycles: the published 32x32 example
// 4547209 * 9773379 = 44441596949211 first, operands steered to make the
// top stage's second PPA carry, corner and random operands, random pixels
// in all three modes, enable dropped about one cycle in eight and reset
// pulsed twice. Each mechanism is counted and must have happened at least
// once: reset, enable-low hold, a carry out of each of the top stage's two
// PPAs, the half adder's sum bit, every pixel mode, and both segmentation
// outcomes.
module tb_vedic_top;
  import vedic_pkg::*;

  logic        clk = 1'b0;
  logic        rst, enable;
  logic [31:0] data1, data2;
  logic [63:0] product;
  logic        pix_valid_in, pix_valid_out, pix_fg;
  rgb_t        pix_in, pix_out;
  pix_mode_e   pix_mode;
  logic [7:0]  threshold, pix_gray;

  // reference model state
  logic [63:0] m_product;
  rgb_t        m_pix;
  logic        m_fg, m_valid;
  logic [7:0]  m_gray;

  int checks = 0, failures = 0, cycles = 0;
  int n_reset = 0, n_hold = 0, n_t = 0, n_v = 0, n_x = 0, n_fg = 0, n_bg = 0;
  int n_mode[3] = '{0, 0, 0};

  vedic_top dut (
    .clk(clk), .rst(rst), .enable(enable),
    .data1(data1), .data2(data2), .product(product),
    .pix_valid_in(pix_valid_in), .pix_in(pix_in), .pix_mode(pix_mode),
    .threshold(threshold), .pix_valid_out(pix_valid_out), .pix_out(pix_out),
    .pix_fg(pix_fg), .pix_gray(pix_gray)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model and mechanism counters, sampled at the clock edge.
  always @(posedge clk) begin
    int   g;
    logic is_fg;
    g     = (54 * int'(pix_in.r) + 184 * int'(pix_in.g) + 18 * int'(pix_in.b) + 128) / 256;
    is_fg = (g >= int'(threshold));
    if (rst) begin
      n_reset++;
      m_product = '0; m_pix = '0; m_fg = 1'b0; m_valid = 1'b0; m_gray = '0;
    end else if (enable) begin
      m_product = 64'(data1) * 64'(data2);
      m_gray    = 8'(g);
      m_fg      = is_fg;
      m_valid   = pix_valid_in;
      unique case (pix_mode)
        MODE_GRAY:    m_pix = '{r: 8'(g), g: 8'(g), b: 8'(g)};
        MODE_SEGMENT: m_pix = is_fg ? pix_in : '0;
        default:      m_pix = '{r: 8'(255 - int'(pix_in.r)), g: 8'(255 - int'(pix_in.g)),
                                b: 8'(255 - int'(pix_in.b))};
      endcase
      n_mode[int'(pix_mode)]++;
      if (pix_mode == MODE_SEGMENT) begin
        if (is_fg) n_fg++; else n_bg++;
      end
      n_t += int'(dut.u_vm32.u_combine.t[32]);
      n_v += int'(dut.u_vm32.u_combine.v[32]);
      n_x += int'(dut.u_vm32.u_combine.x);
    end else begin
      n_hold++;
    end
    #1;
    cycles++;
    checks++;
    if (product != m_product || pix_out != m_pix || pix_fg != m_fg ||
        pix_valid_out != m_valid || pix_gray != m_gray) begin
      failures++;
      $display("FAIL cycle %0d: product=%0d (want %0d) pix=%h (want %h) fg=%0d/%0d valid=%0d/%0d gray=%0d/%0d",
               cycles, product, m_product, pix_out, m_pix, pix_fg, m_fg,
               pix_valid_out, m_valid, pix_gray, m_gray);
    end
  end

  task automatic drive(input logic [31:0] x, input logic [31:0] y);
    @(negedge clk);
    data1        = x;
    data2        = y;
    pix_in       = rgb_t'(24'($urandom));
    pix_mode     = pix_mode_e'(2'($urandom_range(2)));
    threshold    = 8'($urandom);
    pix_valid_in = 1'($urandom);
    enable       = ($urandom_range(7) != 0);
    rst          = 1'b0;
  endtask

  initial begin
    rst = 1'b1; enable = 1'b0; data1 = '0; data2 = '0;
    pix_in = '0; pix_mode = MODE_GRAY; threshold = '0; pix_valid_in = 1'b0;
    repeat (2) @(posedge clk);

    // published example, with enable forced high
    drive(32'd4547209, 32'd9773379);
    enable = 1'b1;
    @(posedge clk); #2;
    checks++;
    if (product != 64'd44441596949211) begin
      failures++;
      $display("FAIL example product %0d", product);
    end

    drive(32'he623fda9, 32'h26fef1ca);
    enable = 1'b1;
    drive(32'hFFFFFFFF, 32'hFFFFFFFF);
    drive(32'h0, 32'hFFFFFFFF);
    for (int i = 0; i < 3000; i++) drive($urandom, $urandom);
    @(negedge clk) rst = 1'b1;
    for (int i = 0; i < 2990; i++) drive($urandom, $urandom);
    @(negedge clk) rst = 1'b1;
    drive($urandom, $urandom);
    @(posedge clk); #2;

    $display("cycles=%0d reset=%0d hold=%0d ppa1_carry=%0d ppa2_carry=%0d ha_sum=%0d gray=%0d seg=%0d inv=%0d fg=%0d bg=%0d",
             cycles, n_reset, n_hold, n_t, n_v, n_x, n_mode[0], n_mode[1], n_mode[2], n_fg, n_bg);
    checks++;
    if (n_reset == 0 || n_hold == 0 || n_t == 0 || n_v == 0 || n_x == 0 ||
        n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_fg == 0 || n_bg == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
