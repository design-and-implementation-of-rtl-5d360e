// 2x2-bit Urdhva Tiryagbhyam ("vertically and crosswise") multiplier.
//
// The base block of the Vedic multiplier tree. For a = {a1,a0} and
// b = {b1,b0} the three steps of the sutra are:
//   vertical   : z0 = a0 b0
//   crosswise  : a1 b0 + a0 b1 -> sum is z1, carry goes on
//   vertical   : a1 b1 + carry  -> z2 and z3
// Each step's two-bit addition is a half adder, so the block is four AND
// gates and two half adders.
//
// Interface: a, b (2 bits) in; z (4 bits) = a * b. Purely combinational.
module vm2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] z
);
  logic c1;

  assign z[0] = a[0] & b[0];
  ha u_ha_cross (.a(a[1] & b[0]), .b(a[0] & b[1]), .s(z[1]), .c(c1));
  ha u_ha_top   (.a(a[1] & b[1]), .b(c1),          .s(z[2]), .c(z[3]));
endmodule
