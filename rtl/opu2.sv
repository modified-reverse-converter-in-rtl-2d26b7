// opu2 -- operand preparation unit 2 of the four-moduli reverse converter.
//
// Prepares the four 2N-bit operands whose sum modulo 2^(2N)-1 is
//   T = 2^N*x3 + (2^N+1)*K - 2^N*x1 - H          (mod 2^(2N)-1)
// where H (2N+1 bits) and K (N bits) are the first-stage modular sums.
// As in opu1, every term is a bit routing or a complement:
//   v5  = {x3[N-1:0], (N-1) zeros, x3[N]}   = 2^N * x3   (2^(2N) = 1)
//   v6  = {K, K}                            = (2^N+1) * K
//   v81 = ~H[2N-1:0]                        = -H[2N-1:0]
//   v7  = {~x1, (N-1) ones, ~H[2N]}         = -2^N*x1 - H[2N]
// The operand layout follows the design's equations; the bit complements
// are implied by the signs in the New CRT expression.
//
// Interface: purely combinational. Requires N >= 2.
module opu2 #(
  parameter int N = 4
) (
  input  logic [N-1:0]   x1,  // residue mod 2^N
  input  logic [N:0]     x3,  // residue mod 2^N+1
  input  logic [2*N:0]   h,   // H, mod 2^(2N+1)-1 sum of v1, v2
  input  logic [N-1:0]   k,   // K, mod 2^N-1 sum of v3, v4
  output logic [2*N-1:0] v5,
  output logic [2*N-1:0] v6,
  output logic [2*N-1:0] v81,
  output logic [2*N-1:0] v7
);
  assign v5  = {x3[N-1:0], {(N-1){1'b0}}, x3[N]};
  assign v6  = {k, k};
  assign v81 = ~h[2*N-1:0];
  assign v7  = {~x1, {(N-1){1'b1}}, ~h[2*N]};
endmodule
