// csa_eac -- W-bit carry-save adder with end-around carry (modulo 2^W-1).
//
// Reduces three W-bit operands to two, keeping their sum modulo 2^W-1:
// a row of full adders gives sum = a^b^c and carry = majority(a,b,c); the
// carry vector is shifted up by one place and its top bit, worth 2^W = 1
// modulo 2^W-1, is rotated round into bit 0. So s + cy = a + b + c
// (mod 2^W-1). The original design names this block (CSA with EAC); the full-adder
// row is the standard realisation.
//
// Interface: purely combinational, one full-adder delay.
module csa_eac #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] maj;

  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  assign cy  = {maj[W-2:0], maj[W-1]};
endmodule
