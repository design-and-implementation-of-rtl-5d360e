// Self-checking testbench for vm32x32.
//
// Applies corner operands (zero, one, all ones, single bits) and 20000 random operand pairs. Each
// product z is compared with the integer product a * b, and the final
// adder's carry c must stay 0.
// The published example 4547209 * 9773379 = 44441596949211 is checked first,
// together with the sub-products p = 214790875, q = 3758525, r = 587535,
// s = 10281 and the PPA sums t = 4346060, v = 4349337 shown for it.
// Carries out of the two PPAs of the top stage are counted; each must occur.
module tb_vm32x32;
  logic [31:0] a, b;
  logic [63:0] z;
  logic        c;
  int checks = 0, failures = 0;
  int n_t = 0, n_v = 0;

  vm32x32 dut (.a(a), .b(b), .z(z), .c(c));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] expect_z;
    a = x; b = y;
    #1;
    expect_z = 64'(x) * 64'(y);
    checks++;
    if (z !== expect_z || c !== 1'b0) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d (c=%0d), expected %0d", x, y, z, c, expect_z);
    end
    n_t += int'(dut.u_combine.t[32]);
    n_v += int'(dut.u_combine.v[32]);
  endtask

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    apply(32'd4547209, 32'd9773379);
    expect_eq("z", 64'(z), 64'd44441596949211);
    expect_eq("p", 64'(dut.p), 64'd214790875);
    expect_eq("q", 64'(dut.q), 64'd3758525);
    expect_eq("r", 64'(dut.r), 64'd587535);
    expect_eq("s", 64'(dut.s), 64'd10281);
    expect_eq("t", 64'(dut.u_combine.t), 64'd4346060);
    expect_eq("v", 64'(dut.u_combine.v), 64'd4349337);
    // operands steered so that the second PPA's sum reaches 2^32
    apply(32'he623fda9, 32'h26fef1ca);
    apply(32'h6ee6c32d, 32'hd4fad81f);
    apply('0, '0);
    apply('1, '1);
    apply('1, 32'(1));
    apply(32'(1), '1);
    for (int i = 0; i < 32; i++) apply(32'(1) << i, '1 >> i);
    for (int i = 0; i < 20000; i++) apply(32'({$urandom, $urandom}), 32'({$urandom, $urandom}));

    checks++;
    if (n_t == 0 || n_v == 0) begin
      failures++;
      $display("FAIL coverage: PPA carries t=%0d v=%0d", n_t, n_v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
