// Sign and exponent of the quotient.
//   sq = sx xor sd
//   eq = (ex - ex_n) - (ed - ed_n) - C + BIAS
// ex, ed are biased exponents; ex_n, ed_n the powers of ten applied by the
// normalization; C the number of quotient digits assimilated. Since
// Mx/Md = (x/d) * 10^(ed_n - ex_n) and x/d = Q * 10^-C, the quotient is
// Q * 10^eq (unbiased). The sign rule is the published design's; the exponent
// formula is derived here from the recurrence. eq is a signed biased
// exponent; range checks are left to the surrounding floating-point unit.
// Combinational.
module exp_sign
  import bid_div_pkg::*;
(
  input  logic                 sx,
  input  logic                 sd,
  input  logic [EW-1:0]        ex,
  input  logic [EW-1:0]        ed,
  input  logic [EXPW-1:0]      ex_n,
  input  logic [EXPW-1:0]      ed_n,
  input  logic [4:0]           c_cnt,
  output logic                 sq,
  output logic signed [EW+1:0] eq
);
  typedef logic signed [EW+1:0] e_t;
  assign sq = sx ^ sd;
  assign eq = e_t'({2'b00, ex}) - e_t'({2'b00, ed}) - e_t'({1'b0, ex_n})
            + e_t'({1'b0, ed_n}) - e_t'({1'b0, c_cnt}) + e_t'(BIAS);
endmodule
