// Self-checking testbench for ppa.
//
// The default 16-bit adder is driven with carry-chain corner cases (all
// ones plus one, alternating patterns, single generate bits) and 20000
// random operand pairs. A second, 8-bit instance is checked exhaustively,
// and a 5-bit one (width not a power of two) exhaustively as well. Every
// result {cout, sum} is compared with the integer sum a + b.
module tb_ppa;
  logic [15:0] a16, b16, s16;
  logic        c16;
  logic [7:0]  a8, b8, s8;
  logic        c8;
  logic [4:0]  a5, b5, s5;
  logic        c5;
  int checks = 0, failures = 0;

  ppa            dut16 (.a(a16), .b(b16), .sum(s16), .cout(c16));
  ppa #(.W(8))   dut8  (.a(a8),  .b(b8),  .sum(s8),  .cout(c8));
  ppa #(.W(5))   dut5  (.a(a5),  .b(b5),  .sum(s5),  .cout(c5));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    a16 = x; b16 = y;
    #1;
    checks++;
    if ({c16, s16} != 17'(x) + 17'(y)) begin
      failures++;
      $display("FAIL16 %h + %h -> %h", x, y, {c16, s16});
    end
  endtask

  initial begin
    check16(16'hFFFF, 16'h0001);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h5555, 16'hAAAA);
    check16(16'h5555, 16'h5555);
    check16(16'h8000, 16'h8000);
    check16(16'h0000, 16'h0000);
    for (int i = 0; i < 16; i++) check16(16'(1) << i, 16'hFFFF >> (15 - i));
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom));

    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if ({c8, s8} != 9'(x + y)) begin
          failures++;
          $display("FAIL8 %0d + %0d -> %0d", x, y, {c8, s8});
        end
      end

    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        a5 = 5'(x); b5 = 5'(y);
        #1;
        checks++;
        if ({c5, s5} != 6'(x + y)) begin
          failures++;
          $display("FAIL5 %0d + %0d -> %0d", x, y, {c5, s5});
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
