// Self-checking testbench for vm16x16.
//
// Applies corner operands (zero, one, all ones, single bits) and 20000 random operand pairs. Each
// product z is compared with the integer product a * b, and the final
// adder's carry c must stay 0.
// The published example 1618 * 2437 = 3943066 is checked first,
// together with the sub-products p = 10906, q = 738, r = 798,
// s = 54 and the PPA sums t = 1536, v = 1578 shown for it.
// Carries out of the two PPAs of the top stage are counted; each must occur.
module tb_vm16x16;
  logic [15:0] a, b;
  logic [31:0] z;
  logic        c;
  int checks = 0, failures = 0;
  int n_t = 0, n_v = 0;

  vm16x16 dut (.a(a), .b(b), .z(z), .c(c));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] expect_z;
    a = x; b = y;
    #1;
    expect_z = 32'(x) * 32'(y);
    checks++;
    if (z !== expect_z || c !== 1'b0) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d (c=%0d), expected %0d", x, y, z, c, expect_z);
    end
    n_t += int'(dut.u_combine.t[16]);
    n_v += int'(dut.u_combine.v[16]);
  endtask

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    apply(16'd1618, 16'd2437);
    expect_eq("z", 64'(z), 64'd3943066);
    expect_eq("p", 64'(dut.p), 64'd10906);
    expect_eq("q", 64'(dut.q), 64'd738);
    expect_eq("r", 64'(dut.r), 64'd798);
    expect_eq("s", 64'(dut.s), 64'd54);
    expect_eq("t", 64'(dut.u_combine.t), 64'd1536);
    expect_eq("v", 64'(dut.u_combine.v), 64'd1578);
    apply('0, '0);
    apply('1, '1);
    apply('1, 16'(1));
    apply(16'(1), '1);
    for (int i = 0; i < 16; i++) apply(16'(1) << i, '1 >> i);
    for (int i = 0; i < 20000; i++) apply(16'({$urandom, $urandom}), 16'({$urandom, $urandom}));

    checks++;
    if (n_t == 0 || n_v == 0) begin
      failures++;
      $display("FAIL coverage: PPA carries t=%0d v=%0d", n_t, n_v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
