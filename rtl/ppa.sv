// Ling parallel prefix adder.
//
// Adds two W-bit unsigned operands with no carry-in and returns a W-bit sum
// and a carry-out. The adder runs in three stages:
//   1. Pre-processing: per bit, p_i = a_i ^ b_i, g_i = a_i & b_i and the
//      OR-propagate t_i = a_i | b_i.
//   2. Carry generation: the Ling pseudo carry
//        h_i = g_i + g_{i-1} + t_{i-1} g_{i-2} + ... = g_i + t_{i-1} h_{i-1}
//      is a first-order recurrence over the pairs (g_i, t_{i-1}). It is
//      evaluated by a Kogge-Stone prefix tree with the usual group operator
//        (G, P) o (G', P') = (G + P G', P P'),
//      in log2(W) levels. The real carry out of bit i is c_i = t_i h_i.
//   3. Post-processing: s_i = p_i ^ c_{i-1}, with c_{-1} = 0.
// The pseudo carry needs one gate fewer at the head of the tree than the
// real carry, which is the point of Ling's formulation.
//
// The three stages, the pseudo carry and the group operator follow the
// method described for this multiplier. Two choices are this design's own:
// the carry is recovered from h_i with the OR-propagate t_i rather than the
// XOR-propagate p_i (with p_i the product p_i h_i would drop a carry that bit
// i generates itself), and the prefix tree is Kogge-Stone.
//
// Interface: a, b (W bits) in; sum (W bits), cout out. Purely combinational.
module ppa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p, g, t;
  // Prefix tree state: level 0 holds the Ling (generate, propagate) pairs.
  logic [W-1:0] hg [LEVELS+1];
  logic [W-1:0] hp [LEVELS+1];
  logic [W-1:0] h, c;

  // Stage 1: pre-processing.
  assign p = a ^ b;
  assign g = a & b;
  assign t = a | b;

  // Stage 2: pseudo-carry prefix tree.
  always_comb begin
    hg[0] = g;
    hp[0] = {t[W-2:0], 1'b0};  // bit i pairs g_i with t_{i-1}
    for (int unsigned l = 0; l < LEVELS; l++) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          hg[l+1][i] = hg[l][i] | (hp[l][i] & hg[l][i-(1<<l)]);
          hp[l+1][i] = hp[l][i] & hp[l][i-(1<<l)];
        end else begin
          hg[l+1][i] = hg[l][i];
          hp[l+1][i] = hp[l][i];
        end
      end
    end
  end

  assign h = hg[LEVELS];
  assign c = t & h;  // real carry out of each bit

  // Stage 3: post-processing.
  assign sum  = p ^ {c[W-2:0], 1'b0};
  assign cout = c[W-1];
endmodule
