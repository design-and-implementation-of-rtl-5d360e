// Half adder.
//
// Adds two one-bit operands and returns a sum bit and a carry bit. In every
// Vedic multiplier stage it adds the carry-outs of the two parallel prefix
// adders, which have the same weight, so that both can be folded into the
// final adder as a two-bit number {carry, sum}.
//
// Interface: a, b in; s = a ^ b, c = a & b. Purely combinational.
module ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
