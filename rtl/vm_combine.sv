// Partial-product summation stage of an NxN Vedic multiplier.
//
// An NxN multiplier splits each operand into a high and a low half and
// forms four (N/2)x(N/2) sub-products with smaller Vedic multipliers:
//   p = aL*bL, q = aL*bH, r = aH*bL, s = aH*bH   (each N bits).
// This block adds them into the 2N-bit product in the fixed arrangement of
// the multiplier architecture:
//   z[N/2-1:0]  = p[N/2-1:0]                 (taken straight through)
//   t           = q + r                      (first PPA, carry t[N])
//   v           = t[N-1:0] + {0, p[N-1:N/2]} (second PPA, carry v[N])
//   {y, x}      = t[N] + v[N]                (half adder)
//   z[N-1:N/2]  = v[N/2-1:0]
//   {c, z[2N-1:N]} = s + {0, y, x, v[N-1:N/2]} (final adder)
// The two carries t[N] and v[N] both carry weight 2^(3N/2), which is bit
// N/2 of the upper half, so the half adder's sum x lands on bit N/2 and its
// carry y on bit N/2+1 of the final adder's second operand.
//
// The arrangement, operand padding and half adder are those of the
// published architecture. The final adder is drawn there only as "(+)";
// here it is the same Ling parallel prefix adder as the other two. Its
// carry c is always 0 for an NxN product and is brought out only because
// the architecture names it.
//
// Interface: p, q, r, s (N bits) in; z (2N bits), c out. Combinational.
module vm_combine #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   p,
  input  logic [N-1:0]   q,
  input  logic [N-1:0]   r,
  input  logic [N-1:0]   s,
  output logic [2*N-1:0] z,
  output logic           c
);
  localparam int unsigned H = N / 2;

  logic [N:0]   t, v;
  logic [N-1:0] p_hi, hi_add;
  logic         x, y;

  ppa #(.W(N)) u_ppa_qr (.a(q), .b(r), .sum(t[N-1:0]), .cout(t[N]));

  assign p_hi = N'(p[N-1:H]);
  ppa #(.W(N)) u_ppa_tp (.a(t[N-1:0]), .b(p_hi), .sum(v[N-1:0]), .cout(v[N]));

  ha u_ha (.a(t[N]), .b(v[N]), .s(x), .c(y));

  assign hi_add = N'({y, x, v[N-1:H]});
  ppa #(.W(N)) u_ppa_final (.a(s), .b(hi_add), .sum(z[2*N-1:N]), .cout(c));

  assign z[H-1:0] = p[H-1:0];
  assign z[N-1:H] = v[H-1:0];
endmodule
