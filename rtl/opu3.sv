// opu3 -- operand preparation unit 3 of the four-moduli reverse converter.
//
// The converter's result is X = S*2^N + x1 with
//   S = H + T*(2^(2N+1)-1) = P - T,   P = {T, H}  (4N+1 bits).
// This unit forms P by concatenation and the subtrahend as the one's
// complement of T. The final adder (hrpx_adder) adds P, the complement
// (extended with ones above bit 2N-1) and a carry-in of 1, which is the
// two's complement subtraction P - T.
//
// Interface: purely combinational.
module opu3 #(
  parameter int N = 4
) (
  input  logic [2*N-1:0] t,    // T, mod 2^(2N)-1 sum
  input  logic [2*N:0]   h,    // H, mod 2^(2N+1)-1 sum
  output logic [4*N:0]   p,    // {T, H}
  output logic [2*N-1:0] t_n   // ~T, lower part of the subtrahend
);
  assign p   = {t, h};
  assign t_n = ~t;
endmodule
