// Self-checking testbench for vm_combine at its default N = 16.
//
// First the sub-products of the published 16x16 example (1618 * 2437:
// p = 10906, q = 738, r = 798, s = 54) are applied, and the product and the
// intermediate sums t = 1536 and v = 1578 are compared with the values shown
// for that example. Then 20000 sets of arbitrary 16-bit p, q, r, s are
// applied; {c, z} must equal p + (q + r) * 2^8 + s * 2^16, which also makes
// both PPA carries and both half-adder outputs occur (counted and required).
module tb_vm_combine;
  logic [15:0] p, q, r, s;
  logic [31:0] z;
  logic        c;
  int checks = 0, failures = 0;
  int n_t16 = 0, n_v16 = 0, n_x = 0, n_y = 0;

  vm_combine dut (.p(p), .q(q), .r(r), .s(s), .z(z), .c(c));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] pp, qq, rr, ss);
    logic [32:0] expect_v;
    p = pp; q = qq; r = rr; s = ss;
    #1;
    expect_v = 33'(pp) + ((33'(qq) + 33'(rr)) << 8) + (33'(ss) << 16);
    checks++;
    if ({c, z} != expect_v) begin
      failures++;
      $display("FAIL p=%0d q=%0d r=%0d s=%0d -> %0d, expected %0d", pp, qq, rr, ss, {c, z}, expect_v);
    end
    n_t16 += int'(dut.t[16]);
    n_v16 += int'(dut.v[16]);
    n_x   += int'(dut.x);
    n_y   += int'(dut.y);
  endtask

  initial begin
    apply(16'd10906, 16'd738, 16'd798, 16'd54);
    checks += 3;
    if (z != 32'd3943066) begin failures++; $display("FAIL example product %0d", z); end
    if (dut.t != 17'd1536) begin failures++; $display("FAIL example t %0d", dut.t); end
    if (dut.v != 17'd1578) begin failures++; $display("FAIL example v %0d", dut.v); end

    apply(16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF);
    for (int i = 0; i < 20000; i++)
      apply(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));

    checks++;
    if (n_t16 == 0 || n_v16 == 0 || n_x == 0 || n_y == 0) begin
      failures++;
      $display("FAIL coverage t16=%0d v16=%0d x=%0d y=%0d", n_t16, n_v16, n_x, n_y);
    end
    $display("carries: t16=%0d v16=%0d x=%0d y=%0d", n_t16, n_v16, n_x, n_y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
