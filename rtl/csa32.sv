// Row of 3:2 carry-save adders (full adders) over W bits, modulo 2^W.
// sum + carry == a + b + c + cin (mod 2^W). The carry word is shifted left by
// one; its free least significant bit takes cin, which is how the negative
// multiples (one's complement) receive their +1. Combinational.
module csa32 #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;
  assign sum   = a ^ b ^ c;
  assign maj   = (a & b) | (a & c) | (b & c);
  assign carry = {maj[W-2:0], cin};
endmodule
