// Self-checking testbench for vm8x8.
//
// Applies every one of the 65536 operand pairs. Each
// product z is compared with the integer product a * b, and the final
// adder's carry c must stay 0.
// The published example 22 * 86 = 1892 is checked first,
// together with the sub-products p = 36, q = 30, r = 6,
// s = 5 and the PPA sums t = 36, v = 38 shown for it.
// Carries out of the two PPAs of the top stage are counted; each must occur.
module tb_vm8x8;
  logic [7:0] a, b;
  logic [15:0] z;
  logic        c;
  int checks = 0, failures = 0;
  int n_t = 0, n_v = 0;

  vm8x8 dut (.a(a), .b(b), .z(z), .c(c));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [7:0] x, input logic [7:0] y);
    logic [15:0] expect_z;
    a = x; b = y;
    #1;
    expect_z = 16'(x) * 16'(y);
    checks++;
    if (z !== expect_z || c !== 1'b0) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d (c=%0d), expected %0d", x, y, z, c, expect_z);
    end
    n_t += int'(dut.u_combine.t[8]);
    n_v += int'(dut.u_combine.v[8]);
  endtask

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    apply(8'd22, 8'd86);
    expect_eq("z", 64'(z), 64'd1892);
    expect_eq("p", 64'(dut.p), 64'd36);
    expect_eq("q", 64'(dut.q), 64'd30);
    expect_eq("r", 64'(dut.r), 64'd6);
    expect_eq("s", 64'(dut.s), 64'd5);
    expect_eq("t", 64'(dut.u_combine.t), 64'd36);
    expect_eq("v", 64'(dut.u_combine.v), 64'd38);
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        apply(8'(x), 8'(y));

    checks++;
    if (n_t == 0 || n_v == 0) begin
      failures++;
      $display("FAIL coverage: PPA carries t=%0d v=%0d", n_t, n_v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
