// Self-checking testbench for vm4x4.
//
// Applies every one of the 256 operand pairs. Each
// product z is compared with the integer product a * b, and the final
// adder's carry c must stay 0.
// Carries out of the two PPAs of the top stage are counted; each must occur.
module tb_vm4x4;
  logic [3:0] a, b;
  logic [7:0] z;
  logic        c;
  int checks = 0, failures = 0;
  int n_t = 0, n_v = 0;

  vm4x4 dut (.a(a), .b(b), .z(z), .c(c));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [3:0] x, input logic [3:0] y);
    logic [7:0] expect_z;
    a = x; b = y;
    #1;
    expect_z = 8'(x) * 8'(y);
    checks++;
    if (z !== expect_z || c !== 1'b0) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d (c=%0d), expected %0d", x, y, z, c, expect_z);
    end
    n_t += int'(dut.u_combine.t[4]);
    n_v += int'(dut.u_combine.v[4]);
  endtask

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        apply(4'(x), 4'(y));

    checks++;
    if (n_t == 0 || n_v == 0) begin
      failures++;
      $display("FAIL coverage: PPA carries t=%0d v=%0d", n_t, n_v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
