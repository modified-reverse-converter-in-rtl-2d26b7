// opu1 -- operand preparation unit 1 of the four-moduli reverse converter.
//
// The converter works on the moduli {2^N, 2^(2N+1)-1, 2^N+1, 2^N-1} with the
// residues x1, x2, x3, x4 in that order. This unit only routes and inverts
// bits. No adders are needed, because multiplying by a power of two modulo
// 2^k-1 is a rotation, and negating is a one's complement:
//   v1 = x2 * 2^(N+1)        mod 2^(2N+1)-1   (rotate x2 left by N+1)
//   v2 = -x1 * 2^(N+1)       mod 2^(2N+1)-1   (~x1 followed by N+1 ones)
//   v3 = x4 * 2^(N-1)        mod 2^N-1        (rotate x4 right by 1)
//   v4 = -x3 * 2^(N-1)       mod 2^N-1
// x3 has N+1 bits. Its top bit is set only for x3 = 2^N, which is 1 modulo
// 2^N-1; v4 is then the constant 0 followed by N-1 ones. Otherwise v4 is the
// complement of x3[N-1:0], rotated right by 1. A 2:1 mux picks between them.
// The equations for v1..v4 follow the New CRT derivation of the design;
// the explicit form of the mux select (x3[N]) is this implementation's reading.
//
// Interface: purely combinational, no clock. Requires N >= 2.
module opu1 #(
  parameter int N = 4
) (
  input  logic [N-1:0]   x1,  // residue mod 2^N
  input  logic [2*N:0]   x2,  // residue mod 2^(2N+1)-1
  input  logic [N:0]     x3,  // residue mod 2^N+1
  input  logic [N-1:0]   x4,  // residue mod 2^N-1
  output logic [2*N:0]   v1,
  output logic [2*N:0]   v2,
  output logic [N-1:0]   v3,
  output logic [N-1:0]   v4
);
  logic [N-1:0] v41, v42;

  assign v1  = {x2[N-1:0], x2[2*N:N]};
  assign v2  = {~x1, {(N+1){1'b1}}};
  assign v3  = {x4[0], x4[N-1:1]};
  assign v41 = {~x3[0], ~x3[N-1:1]};
  assign v42 = {1'b0, {(N-1){1'b1}}};
  assign v4  = x3[N] ? v42 : v41;
endmodule
