// hrpx_adder -- hybrid regular parallel-prefix XOR/OR adder, S = P - T.
//
// Computes s = a + {ones, b_n} + 1 (mod 2^(4N+1)), where a is the (4N+1)-bit
// operand P and b_n = ~T is the 2N-bit complemented subtrahend. With the
// ones above bit 2N-1 and the carry-in of 1 this is the two's complement
// subtraction P - T.
// The adder is split where the second operand becomes constant:
//   - Bits 0..2N-1: a regular Brent-Kung parallel-prefix adder. The carry-in
//     of 1 is folded into bit 0's generate term (g0 | p0), so the prefix
//     network yields G[i:0] = carry into bit i+1 directly.
//   - Bits 2N..4N: the second operand is all ones, so a full adder reduces
//     to carry_out = a_i | carry_in and sum = ~(a_i ^ carry_in). This part is
//     a ripple chain of OR gates with one XOR-type gate per bit.
// The split and the OR-chain/XOR structure of the upper part follow the
// design's HRPX block diagram; the Brent-Kung network is written as its
// standard up-sweep / down-sweep for any width.
//
// Interface: purely combinational. The final carry-out is dropped
// (P >= T always holds in the converter).
module hrpx_adder #(
  parameter int N = 4
) (
  input  logic [4*N:0]   a,    // P
  input  logic [2*N-1:0] b_n,  // ~T
  output logic [4*N:0]   s     // P - T
);
  localparam int LO = 2 * N;          // prefix part width
  localparam int HI = 2 * N + 1;      // constant-operand part width
  localparam int LG = $clog2(LO);

  logic [LO-1:0] g, p;          // pre-processing (carry-in folded into bit 0)
  logic [LO-1:0] gg, pp;        // Brent-Kung results: G[i:0], P[i:0]
  logic [LO-1:0] c_lo;          // carries into the prefix part
  logic [HI-1:0] c_hi;          // OR-chain carries into the upper part

  assign p = a[LO-1:0] ^ b_n;
  always_comb begin
    g    = a[LO-1:0] & b_n;
    g[0] = g[0] | p[0];         // carry-in = 1
  end

  always_comb begin
    gg = g;
    pp = p;
    // up-sweep
    for (int l = 0; l < LG; l++)
      for (int i = (2 << l) - 1; i < LO; i += (2 << l)) begin
        gg[i] = gg[i] | (pp[i] & gg[i-(1<<l)]);
        pp[i] = pp[i] & pp[i-(1<<l)];
      end
    // down-sweep
    for (int l = LG - 1; l >= 0; l--)
      for (int i = 3 * (1 << l) - 1; i < LO; i += (2 << l)) begin
        gg[i] = gg[i] | (pp[i] & gg[i-(1<<l)]);
        pp[i] = pp[i] & pp[i-(1<<l)];
      end
  end

  assign c_lo = {gg[LO-2:0], 1'b1};
  assign s[LO-1:0] = p ^ c_lo;

  // Upper part: second operand is all ones.
  always_comb begin
    logic c;
    c = gg[LO-1];
    for (int j = 0; j < HI; j++) begin
      c_hi[j] = c;
      c = a[LO+j] | c;
    end
  end
  assign s[4*N:LO] = ~(a[4*N:LO] ^ c_hi);
endmodule
