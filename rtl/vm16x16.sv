// 16x16-bit Vedic multiplier (Urdhva Tiryagbhyam).
//
// The operands are split into 8-bit halves, and four vm8x8 instances form
// the sub-products
//   p = a[7:0] * b[7:0],  q = a[7:0] * b[15:8],
//   r = a[15:8] * b[7:0],  s = a[15:8] * b[15:8],
// all at the same time. This is the "vertically and crosswise" rule of the
// sutra applied to two-digit numbers in base 2^8: p is the right vertical
// product, q and r the crosswise pair, s the left vertical product.
// vm_combine then adds them with two Ling parallel prefix adders, a half
// adder and a final adder. Building each size from four multipliers of half
// the width follows the published architecture; putting the summation in a
// shared module is this design's choice.
//
// Interface: a, b (16 bits) in; z (32 bits) = a * b; c is the final
// adder's carry-out, which is always 0. Purely combinational.
module vm16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] z,
  output logic        c
);
  logic [15:0] p, q, r, s;

  vm8x8 u_vm_p (.a(a[7:0]), .b(b[7:0]), .z(p), .c());
  vm8x8 u_vm_q (.a(a[7:0]), .b(b[15:8]), .z(q), .c());
  vm8x8 u_vm_r (.a(a[15:8]), .b(b[7:0]), .z(r), .c());
  vm8x8 u_vm_s (.a(a[15:8]), .b(b[15:8]), .z(s), .c());

  vm_combine #(.N(16)) u_combine (.p(p), .q(q), .r(r), .s(s), .z(z), .c(c));
endmodule
