// Leading-one detector of the normalization unit (stage 1).
// Counts the leading zeros of a 54-bit BID significand. For the divisor the
// count is raised by five, which makes the table pick a power of ten five
// binary positions larger (the divisor is normalized to 2^59 instead of 2^54,
// so that the normalized dividend is always below 7/9 of it). It also flags
// th = (m >= 2^30), used to decide which factor goes to the wide multiplier
// input. A zero significand gives lz = 54 (+5).
// Purely combinational. Counting leading zeros, the +5 and th follow the
// published design; the priority-loop structure is left to synthesis.
module lod
  import bid_div_pkg::*;
#(
  parameter int unsigned W = MW
) (
  input  logic [W-1:0]   m,
  input  logic           is_div,
  output logic [LZW-1:0] lz,
  output logic           th
);
  logic [LZW-1:0] cnt;

  always_comb begin
    cnt = LZW'(W);
    for (int i = 0; i < W; i++)
      if (m[i]) cnt = LZW'(W - 1 - i);
  end

  assign lz = is_div ? cnt + LZW'(S_EXTRA) : cnt;
  assign th = |m[W-1:30];
endmodule
