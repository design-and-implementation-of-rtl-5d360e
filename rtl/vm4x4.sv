// 4x4-bit Vedic multiplier (Urdhva Tiryagbhyam).
//
// The operands are split into 2-bit halves, and four vm2x2 instances form
// the sub-products
//   p = a[1:0] * b[1:0],  q = a[1:0] * b[3:2],
//   r = a[3:2] * b[1:0],  s = a[3:2] * b[3:2],
// all at the same time. This is the "vertically and crosswise" rule of the
// sutra applied to two-digit numbers in base 2^2: p is the right vertical
// product, q and r the crosswise pair, s the left vertical product.
// vm_combine then adds them with two Ling parallel prefix adders, a half
// adder and a final adder. Building each size from four multipliers of half
// the width follows the published architecture; putting the summation in a
// shared module is this design's choice.
//
// Interface: a, b (4 bits) in; z (8 bits) = a * b; c is the final
// adder's carry-out, which is always 0. Purely combinational.
module vm4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] z,
  output logic        c
);
  logic [3:0] p, q, r, s;

  vm2x2 u_vm_p (.a(a[1:0]), .b(b[1:0]), .z(p));
  vm2x2 u_vm_q (.a(a[1:0]), .b(b[3:2]), .z(q));
  vm2x2 u_vm_r (.a(a[3:2]), .b(b[1:0]), .z(r));
  vm2x2 u_vm_s (.a(a[3:2]), .b(b[3:2]), .z(s));

  vm_combine #(.N(4)) u_combine (.p(p), .q(q), .r(r), .s(s), .z(z), .c(c));
endmodule
