// Self-checking testbench for vm2x2: all 16 operand pairs, compared with
// the integer product.
module tb_vm2x2;
  logic [1:0] a, b;
  logic [3:0] z;
  int checks = 0, failures = 0;

  vm2x2 dut (.a(a), .b(b), .z(z));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        a = 2'(x); b = 2'(y);
        #1;
        checks++;
        if (z != 4'(x * y)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", x, y, z);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
