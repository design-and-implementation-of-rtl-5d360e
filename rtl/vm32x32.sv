// 32x32-bit Vedic multiplier (Urdhva Tiryagbhyam).
//
// The operands are split into 16-bit halves, and four vm16x16 instances form
// the sub-products
//   p = a[15:0] * b[15:0],  q = a[15:0] * b[31:16],
//   r = a[31:16] * b[15:0],  s = a[31:16] * b[31:16],
// all at the same time. This is the "vertically and crosswise" rule of the
// sutra applied to two-digit numbers in base 2^16: p is the right vertical
// product, q and r the crosswise pair, s the left vertical product.
// vm_combine then adds them with two Ling parallel prefix adders, a half
// adder and a final adder. Building each size from four multipliers of half
// the width follows the published architecture; putting the summation in a
// shared module is this design's choice.
//
// Interface: a, b (32 bits) in; z (64 bits) = a * b; c is the final
// adder's carry-out, which is always 0. Purely combinational.
module vm32x32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] z,
  output logic        c
);
  logic [31:0] p, q, r, s;

  vm16x16 u_vm_p (.a(a[15:0]), .b(b[15:0]), .z(p), .c());
  vm16x16 u_vm_q (.a(a[15:0]), .b(b[31:16]), .z(q), .c());
  vm16x16 u_vm_r (.a(a[31:16]), .b(b[15:0]), .z(r), .c());
  vm16x16 u_vm_s (.a(a[31:16]), .b(b[31:16]), .z(s), .c());

  vm_combine #(.N(32)) u_combine (.p(p), .q(q), .r(r), .s(s), .z(z), .c(c));
endmodule
