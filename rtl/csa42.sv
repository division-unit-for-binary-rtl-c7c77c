// Row of 4:2 compressors over W bits, modulo 2^W, built from two 3:2 rows.
// sum + carry == a + b + c + d (mod 2^W). Combinational.
module csa42 #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] s1, c1;
  csa32 #(.W(W)) u_r1 (.a(a),  .b(b),  .c(c), .cin(1'b0), .sum(s1),  .carry(c1));
  csa32 #(.W(W)) u_r2 (.a(s1), .b(c1), .c(d), .cin(1'b0), .sum(sum), .carry(carry));
endmodule
