// Quotient-digit selection of the radix-10 recurrence.
// Inputs are the truncated carry-save residual w[j-1] (ys, yc: bits 62..47 of
// the two words), the 7 MSBs of the normalized divisor (dhat) and d/2
// truncated to the same bit (dh). The estimate est = ys + yc is in units of
// 2^47; it is never above w and less than 2^48 below it.
//   qH = +1 if est >= mH1,  -1 if est + mH1 < 0,  0 otherwise
// The multiplication of the residual by 10 is kept out of the path: instead
// of 10w the selection compares w against constants already divided by 10.
// qL is computed speculatively for all three qH at once from
//   v/10 ~= est - qH * d/2      (three estimates)
//   qL = +2 if v >= mL2, +1 if v >= mL1, -2 if v + mL2 < 0, -1 if v + mL1 < 0
// and the one that matches qH is selected, so qL overlaps qH.
// One constant per divisor interval and digit boundary is stored; the
// negative boundary uses the same constant (m0 = -m1-1 in one's complement).
// The constants are those of the published design's table in units of 2^50 (dhat/8).
// With the estimate precision chosen here every constant meets the
// convergence bounds for redundancy 7/9. The leading-zero based
// normalization never yields dhat below 14 (the closest power of ten is at
// least 1.11 times the lower range end), so the first row only covers the
// nominal range. Combinational.
module sel_func
  import bid_div_pkg::*;
(
  input  logic [15:0] ys,
  input  logic [15:0] yc,
  input  logic [6:0]  dhat,
  input  logic [11:0] dh,
  output qdigit_t     q
);
  typedef struct packed {
    logic [7:0] mh1;
    logic [7:0] ml2;
    logic [7:0] ml1;
  } selc_t;

  function automatic selc_t sel_const(logic [6:0] dv);
    if      (dv < 7'd14)  return '{8'd28,  8'd18,  8'd4};
    else if (dv < 7'd16)  return '{8'd30,  8'd18,  8'd4};
    else if (dv < 7'd18)  return '{8'd34,  8'd22,  8'd8};
    else if (dv < 7'd19)  return '{8'd36,  8'd22,  8'd8};
    else if (dv < 7'd22)  return '{8'd42,  8'd24,  8'd8};
    else if (dv < 7'd26)  return '{8'd48,  8'd27,  8'd8};
    else if (dv < 7'd30)  return '{8'd56,  8'd32,  8'd8};
    else if (dv < 7'd33)  return '{8'd64,  8'd40,  8'd8};
    else if (dv < 7'd39)  return '{8'd72,  8'd40,  8'd8};
    else if (dv < 7'd46)  return '{8'd84,  8'd48,  8'd16};
    else if (dv < 7'd54)  return '{8'd100, 8'd56,  8'd16};
    else if (dv < 7'd64)  return '{8'd115, 8'd68,  8'd16};
    else if (dv < 7'd77)  return '{8'd139, 8'd84,  8'd16};
    else if (dv < 7'd90)  return '{8'd166, 8'd105, 8'd32};
    else if (dv < 7'd108) return '{8'd195, 8'd113, 8'd32};
    else                  return '{8'd230, 8'd128, 8'd32};
  endfunction

  typedef logic signed [17:0] est_t;

  selc_t c;
  est_t  est, mh, m2, m1;
  est_t  v [3];          // v estimates for qH = +1, 0, -1
  logic signed [2:0] ql_s [3];

  function automatic logic signed [2:0] sel_l(est_t vv, est_t k2, est_t k1);
    if (vv >= k2)           return 3'sd2;
    else if (vv >= k1)      return 3'sd1;
    else if (vv + k2 < 0)   return -3'sd2;
    else if (vv + k1 < 0)   return -3'sd1;
    else                    return 3'sd0;
  endfunction

  always_comb begin
    c   = sel_const(dhat);
    est = est_t'($signed(16'(ys + yc)));
    mh  = est_t'({c.mh1, 3'b000});
    m2  = est_t'({c.ml2, 3'b000});
    m1  = est_t'({c.ml1, 3'b000});
    v[0] = est - est_t'(dh);
    v[1] = est;
    v[2] = est + est_t'(dh);
    for (int k = 0; k < 3; k++) ql_s[k] = sel_l(v[k], m2, m1);
    if (est >= mh) begin
      q.qh = 2'sd1;  q.ql = ql_s[0];
    end else if (est + mh < 0) begin
      q.qh = -2'sd1; q.ql = ql_s[2];
    end else begin
      q.qh = 2'sd0;  q.ql = ql_s[1];
    end
  end
endmodule
