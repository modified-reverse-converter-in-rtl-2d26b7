// hmpe_adder -- hybrid modular parallel-prefix excess-one adder, modulo 2^W-1.
//
// Adds two W-bit operands modulo 2^W-1 with a single representation of zero
// (an in-range sum of 2^W-1 comes out as 0, not as all ones).
// Three layers, as in the block diagram of the design:
//   1. Pre-processing cells form bit generate g = a&b and propagate p = a^b.
//   2. A Kogge-Stone parallel-prefix network gives the group terms
//      (G[i:0], P[i:0]) for every bit position i, in ceil(log2 W) levels.
//   3. The modified excess-one unit decides whether to add one and drop
//      2^W: c* = G[W-1:0] | P[W-1:0], i.e. a+b >= 2^W-1. The carry into bit
//      i is then G[i-1:0] | (P[i-1:0] & c*), the carry into bit 0 is c*, and
//      s = p ^ carry. This is a+b+c* mod 2^W, which equals a+b-(2^W-1)
//      whenever c* is set, with no second carry-propagation pass.
// The original design gives the block diagram (prefix structure feeding group
// generate/propagate into an excess-one unit) and the choice of Kogge-Stone;
// the carry equations of the excess-one unit are this implementation's
// reading of that diagram. Result: s = a+b when a+b < 2^W-1, otherwise
// a+b-(2^W-1); so it is fully reduced unless both operands are all ones.
//
// Interface: purely combinational. Requires W >= 2.
module hmpe_adder #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  localparam int L = $clog2(W);

  logic [W-1:0]      g0, p0;   // pre-processing
  logic [W-1:0]      gp, pp;   // prefix outputs G[i:0], P[i:0]
  logic              c_star;   // excess-one (end-around) decision
  logic [W-1:0]      c;        // carry into each bit

  assign g0 = a & b;
  assign p0 = a ^ b;

  // One Kogge-Stone level per pass: every position i >= d combines with
  // position i-d; positions below d pass through.
  always_comb begin
    logic [W-1:0] g_cur, p_cur;
    g_cur = g0;
    p_cur = p0;
    for (int l = 0; l < L; l++) begin
      g_cur = g_cur | (p_cur & (g_cur << (1 << l)));
      p_cur = p_cur & ((p_cur << (1 << l)) | ~({W{1'b1}} << (1 << l)));
    end
    gp = g_cur;
    pp = p_cur;
  end

  // Modified excess-one unit.
  assign c_star = gp[W-1] | pp[W-1];
  always_comb begin
    c[0] = c_star;
    for (int i = 1; i < W; i++)
      c[i] = gp[i-1] | (pp[i-1] & c_star);
  end
  assign s = p0 ^ c;
endmodule
