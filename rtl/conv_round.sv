// Convert-and-round unit: assimilates the signed quotient digits into the
// binary quotient Q and rounds it (roundTiesToEven).
// Each digit q_j = 5 qH + qL is converted to two's complement and registered
// (load_q) together with q_j + 1 and q_j - 1. Assimilation (assim) computes
//   Q <= 10 Q + B = (Q << 3) + (Q << 1) + B
// with a 3:2 row and a carry-propagate adder. Assimilation is one cycle late
// so that the zero test of the residual is known: an exact quotient then ends
// without needing a division by 10.
// For rounding, hold moves the registered q16 (and q16 +- 1) into a second
// register q_R instead of assimilating it. In the rounding cycle (rnd) the
// registered digit B is the rounding digit q17 and w_sign / w_zero describe
// the final remainder. With L = LSB of q_R:
//   B + (5 - w_sign - (w_zero & ~L)) >= 10  ->  assimilate q_R + 1
//   B + (5 - w_sign - (w_zero &  L)) <  0   ->  assimilate q_R - 1
//   otherwise                                ->  assimilate q_R
// The increment test is the published design's; the decrement test uses L instead of
// ~L so that a negative tie (B = -5, zero remainder) also goes to even.
// Q is cleared by clr. All registers change at the rising clock edge.
module conv_round
  import bid_div_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          load_q,
  input  qdigit_t       q_in,
  input  logic          hold,
  input  logic          assim,
  input  logic          rnd,
  input  logic          w_zero,
  input  logic          w_sign,
  output logic [QW-1:0] q_o,
  output logic          rnd_p,
  output logic          rnd_m
);
  digit_t qj, qj_p, qj_m;     // registered digit, +1, -1
  digit_t qr, qr_p, qr_m;     // held digit q_R, +1, -1
  digit_t b_sel;
  logic signed [5:0] sum_p, sum_m;
  logic [QW-1:0] acc, s, c;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      qj <= '0; qj_p <= '0; qj_m <= '0;
      qr <= '0; qr_p <= '0; qr_m <= '0;
    end else begin
      if (load_q) begin
        qj   <= digit_value(q_in);
        qj_p <= digit_value(q_in) + 5'sd1;
        qj_m <= digit_value(q_in) - 5'sd1;
      end
      if (hold) begin
        qr   <= qj;
        qr_p <= qj_p;
        qr_m <= qj_m;
      end
    end

  // rounding decision (M, Z, P)
  always_comb begin
    sum_p = 6'(qj) + 6'sd5 - 6'(w_sign) - 6'(w_zero && !qr[0]);
    sum_m = 6'(qj) + 6'sd5 - 6'(w_sign) - 6'(w_zero &&  qr[0]);
    rnd_p = rnd && (sum_p >= 6'sd10);
    rnd_m = rnd && (sum_m < 6'sd0);
    if (!rnd)       b_sel = qj;
    else if (rnd_p) b_sel = qr_p;
    else if (rnd_m) b_sel = qr_m;
    else            b_sel = qr;
  end

  csa32 #(.W(QW)) u_csa (.a(acc << 3), .b(acc << 1), .c({{(QW-5){b_sel[4]}}, b_sel}), .cin(1'b0),
                         .sum(s), .carry(c));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     acc <= '0;
    else if (clr)   acc <= '0;
    else if (assim) acc <= s + c;

  assign q_o = acc;
endmodule
