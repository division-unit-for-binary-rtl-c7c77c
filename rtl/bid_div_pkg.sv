// Shared types and constants of the BID (binary integer decimal) significand
// divider. The divider computes Mq = round(Mx/Md) as a radix-10 digit
// recurrence on binary integers, decimal64 sizes: 16-digit significands held
// in 54 bits, 16 quotient digits plus one rounding digit.
//
// The package holds the widths used across the units, the signed-digit type
// of the recurrence (q = 5*qH + qL, qH in {-1,0,1}, qL in {-2..2}) and the two
// normalization tables, computed at elaboration:
//   E_OF_LZ[lz] : smallest e with 5*10^e >= 2^lz, i.e. the one power of ten
//                 that brings a significand with lz leading zeros (of 54) into
//                 [0.1*2^54, 2*2^54); entries above 17 are clamped to 17.
//   P10[e]      : 10^e for e = 0..17 (10^17 needs 57 bits).
package bid_div_pkg;

  localparam int unsigned MW   = 54;  // BID significand width (decimal64)
  localparam int unsigned EW   = 10;  // biased exponent width (decimal64)
  localparam int unsigned BIAS = 398; // decimal64 exponent bias
  localparam int unsigned PTW  = 57;  // widest power of ten, 10^17
  localparam int unsigned MYW  = 32;  // multiplier (short) operand width
  localparam int unsigned PW   = 61;  // product width / final CPA width
  localparam int unsigned S_EXTRA = 5;// extra divisor bits, s >= 5
  localparam int unsigned XW   = 56;  // normalized dividend, kept as 2x
  localparam int unsigned DW   = 60;  // normalized divisor, kept as 2d
  localparam int unsigned RW   = 64;  // residual width (two's complement)
  localparam int unsigned QW   = 54;  // quotient accumulator width
  localparam int unsigned NDIG = 16;  // quotient digits (precision p)
  localparam int unsigned NIT  = 17;  // iterations incl. rounding digit
  localparam int unsigned LZW  = 6;   // leading-zero count width
  localparam int unsigned EXPW = 5;   // normalization power-of-ten width

  // radix-10 signed digit split into its two components
  typedef struct packed {
    logic signed [1:0] qh; // -1, 0, +1 (weight 5)
    logic signed [2:0] ql; // -2 .. +2  (weight 1)
  } qdigit_t;

  // two's complement value of a digit, -7..+7 (plus one for q+1 / q-1)
  typedef logic signed [4:0] digit_t;

  function automatic digit_t digit_value(qdigit_t q);
    return 5 * digit_t'(q.qh) + digit_t'(q.ql);
  endfunction

  // control signals from the controller to the datapath units
  typedef struct packed {
    logic mx_xd;   // normalization stage 1 works on the divisor
    logic ld_rm;   // load RMX / RMY
    logic mul_en;  // advance the multiplier pipeline register
    logic ld_d;    // load normalized divisor and db2
    logic ld_x;    // load normalized dividend
    logic init;    // w[0] = x
    logic iter;    // one recurrence iteration
    logic load_q;  // register the new quotient digit
    logic hold;    // keep q16 aside for rounding
    logic assim;   // Q = 10 Q + digit
    logic rnd;     // rounding cycle
    logic clr;     // clear Q
  } ctl_t;

  typedef logic [PTW-1:0]  p10_arr_t [18];
  typedef logic [EXPW-1:0] elz_arr_t [64];

  function automatic p10_arr_t gen_p10();
    p10_arr_t t;
    logic [PTW-1:0] v;
    v = 1;
    for (int e = 0; e < 18; e++) begin
      t[e] = v;
      v = v * 10;
    end
    return t;
  endfunction

  function automatic elz_arr_t gen_e_of_lz();
    elz_arr_t t;
    logic [67:0] p5, two;
    for (int lz = 0; lz < 64; lz++) begin
      p5  = 68'd5;
      two = 68'd1 << lz;
      t[lz] = 5'd17;
      for (int e = 17; e >= 0; e--) begin
        // 5*10^e >= 2^lz ?
        p5 = 68'd5;
        for (int k = 0; k < e; k++) p5 = p5 * 10;
        if (p5 >= two) t[lz] = 5'(e);
      end
    end
    return t;
  endfunction

  localparam p10_arr_t P10     = gen_p10();
  localparam elz_arr_t E_OF_LZ = gen_e_of_lz();

endpackage
