// 8x8-bit Vedic multiplier (Urdhva Tiryagbhyam).
//
// The operands are split into 4-bit halves, and four vm4x4 instances form
// the sub-products
//   p = a[3:0] * b[3:0],  q = a[3:0] * b[7:4],
//   r = a[7:4] * b[3:0],  s = a[7:4] * b[7:4],
// all at the same time. This is the "vertically and crosswise" rule of the
// sutra applied to two-digit numbers in base 2^4: p is the right vertical
// product, q and r the crosswise pair, s the left vertical product.
// vm_combine then adds them with two Ling parallel prefix adders, a half
// adder and a final adder. Building each size from four multipliers of half
// the width follows the published architecture; putting the summation in a
// shared module is this design's choice.
//
// Interface: a, b (8 bits) in; z (16 bits) = a * b; c is the final
// adder's carry-out, which is always 0. Purely combinational.
module vm8x8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] z,
  output logic        c
);
  logic [7:0] p, q, r, s;

  vm4x4 u_vm_p (.a(a[3:0]), .b(b[3:0]), .z(p), .c());
  vm4x4 u_vm_q (.a(a[3:0]), .b(b[7:4]), .z(q), .c());
  vm4x4 u_vm_r (.a(a[7:4]), .b(b[3:0]), .z(r), .c());
  vm4x4 u_vm_s (.a(a[7:4]), .b(b[7:4]), .z(s), .c());

  vm_combine #(.N(8)) u_combine (.p(p), .q(q), .r(r), .s(s), .z(z), .c(c));
endmodule
