// Normalization tables (stage 1): leading-zero count -> power-of-ten exponent
// e, and e -> 10^e.
// For a significand with lz leading zeros out of 54, M lies in
// [2^(53-lz), 2^(54-lz)); the single e with 0.2*2^lz <= 10^e < 2*2^lz brings
// M*10^e into [0.1*2^54, 2*2^54), the dividend range of the published design (it may
// exceed 2^54 by one bit). The table holds the smallest e with
// 5*10^e >= 2^lz, computed at elaboration in bid_div_pkg. Combinational.
module pow10_table
  import bid_div_pkg::*;
(
  input  logic [LZW-1:0]  lz,
  output logic [EXPW-1:0] e,
  output logic [PTW-1:0]  pt
);
  assign e  = E_OF_LZ[lz];
  assign pt = P10[e];
endmodule
