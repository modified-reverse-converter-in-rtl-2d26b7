// reverse_converter -- residue-to-binary converter for the moduli set
// {2^N, 2^(2N+1)-1, 2^N+1, 2^N-1}, built on the New Chinese Remainder Theorem.
//
// Inputs are the residues x1 (mod 2^N), x2 (mod 2^(2N+1)-1), x3 (mod 2^N+1)
// and x4 (mod 2^N-1) of a number X in [0, M), M = 2^N (2^(2N)-1)(2^(2N+1)-1).
// Output is X in 5N+1 bits. The low N bits of X are x1 itself; the rest,
// Y = (X - x1)/2^N, is rebuilt in two moduli, 2^(2N+1)-1 and 2^(2N)-1:
//   H = |v1 + v2|                mod 2^(2N+1)-1   = Y mod 2^(2N+1)-1
//   K = |v3 + v4|                mod 2^N-1        (x3, x4 combined)
//   T = |v5 + v6 + v81 + v7|     mod 2^(2N)-1     = (Y - H) mod 2^(2N)-1
//   S = P - T = H + T*(2^(2N+1)-1),  P = {T, H}
//   X = {S, x1}
// (the multiplicative inverse of 2^(2N+1)-1 modulo 2^(2N)-1 is 1, which is
// why T needs no multiplication.)
// Datapath: opu1 -> two hmpe_adder (H, K) -> opu2 -> two csa_eac -> hmpe_adder
// (T) -> opu3 -> hrpx_adder (S). The structure, the operand equations and
// the choice of HMPE for the modular additions and HRPX for the final
// subtraction follow the design. Using the HMPE adder also for the
// modulo 2^(2N+1)-1 sum (H) is this implementation's choice; its single
// representation of zero is what keeps H, K and T fully reduced.
//
// Interface: purely combinational, no clock or handshake. Residues must be
// in range (x2 <= 2^(2N+1)-2, x3 <= 2^N, x4 <= 2^N-2); the output is then X
// exactly. Requires N >= 2.
module reverse_converter #(
  parameter int N = 4
) (
  input  logic [N-1:0] x1,  // residue mod 2^N
  input  logic [2*N:0] x2,  // residue mod 2^(2N+1)-1
  input  logic [N:0]   x3,  // residue mod 2^N+1
  input  logic [N-1:0] x4,  // residue mod 2^N-1
  output logic [5*N:0] x    // weighted binary result
);
  logic [2*N:0]   v1, v2, h;
  logic [N-1:0]   v3, v4, k;
  logic [2*N-1:0] v5, v6, v81, v7;
  logic [2*N-1:0] s1, c1, s2, c2, t;
  logic [4*N:0]   p, s;
  logic [2*N-1:0] t_n;

  opu1 #(.N(N)) u_opu1 (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4),
    .v1(v1), .v2(v2), .v3(v3), .v4(v4)
  );

  hmpe_adder #(.W(2*N+1)) u_hmpe_h (.a(v1), .b(v2), .s(h));
  hmpe_adder #(.W(N))     u_hmpe_k (.a(v3), .b(v4), .s(k));

  opu2 #(.N(N)) u_opu2 (
    .x1(x1), .x3(x3), .h(h), .k(k),
    .v5(v5), .v6(v6), .v81(v81), .v7(v7)
  );

  csa_eac #(.W(2*N)) u_csa1 (.a(v5), .b(v6), .c(v81), .s(s1), .cy(c1));
  csa_eac #(.W(2*N)) u_csa2 (.a(s1), .b(c1), .c(v7),  .s(s2), .cy(c2));

  hmpe_adder #(.W(2*N)) u_hmpe_t (.a(s2), .b(c2), .s(t));

  opu3 #(.N(N)) u_opu3 (.t(t), .h(h), .p(p), .t_n(t_n));

  hrpx_adder #(.N(N)) u_hrpx (.a(p), .b_n(t_n), .s(s));

  assign x = {s, x1};
endmodule
