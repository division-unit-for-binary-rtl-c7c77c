// Sign-and-zero detection of a residual held in carry-save form (ws, wc).
// Used every iteration to stop when the residual is zero (exact quotient) and
// in the rounding step for the sign of the remainder. Implemented as a
// carry-propagate addition followed by the sign bit and a zero test.
// Combinational.
module szd #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] ws,
  input  logic [W-1:0] wc,
  output logic         sign,
  output logic         zero
);
  logic [W-1:0] w;
  assign w    = ws + wc;
  assign sign = w[W-1];
  assign zero = (w == '0);
endmodule
