// BID significand divider (decimal64): sign, exponent and significand of
// (-1)^sx * mx * 10^ex / ((-1)^sd * md * 10^ed), rounded to nearest, ties to
// even, with a quotient significand mq that is not normalized (an exact
// quotient keeps only the digits it needs).
//
// Structure: the operands are registered at start. norm_unit brings the
// divisor to [0.1, 2) * 2^59 and the dividend to [0.1, 2) * 2^54 by
// multiplying with powers of ten, so x < (7/9) d and the recurrence can start
// at w[0] = x. recurrence produces one signed decimal digit per cycle from a
// carry-save residual, conv_round builds the binary quotient 10Q + q and
// rounds it after the 17th (rounding) digit, exp_sign gives sign and
// exponent, and div_ctrl sequences everything.
//
// Interface: pulse start for one cycle with the operands valid (they are
// captured then). busy is high while dividing. done is high for one cycle;
// sq, eq, mq are valid from then until the next start.
// Timing: done is high in the 24th cycle after the start cycle when the
// quotient is not exact, in cycle C + 7 for an exact quotient of C digits.
// md = 0 is not handled (the result is meaningless, the unit still ends).
module bid_divider
  import bid_div_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 sx,
  input  logic [EW-1:0]        ex,
  input  logic [MW-1:0]        mx,
  input  logic                 sd,
  input  logic [EW-1:0]        ed,
  input  logic [MW-1:0]        md,
  output logic                 busy,
  output logic                 done,
  output logic                 sq,
  output logic signed [EW+1:0] eq,
  output logic [MW-1:0]        mq
);
  ctl_t            ctl;
  logic [MW-1:0]   mx_r, md_r;
  logic [EW-1:0]   ex_r, ed_r;
  logic            sx_r, sd_r;
  logic [XW-1:0]   x_n;
  logic [DW-1:0]   d_n;
  logic            db2;
  logic [EXPW-1:0] ex_n, ed_n;
  qdigit_t         q;
  logic            w_zero, w_sign;
  logic [4:0]      c_cnt;
  logic [QW-1:0]   q_acc;
  logic            rnd_p, rnd_m;

  // operand registers
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mx_r <= '0; md_r <= '0; ex_r <= '0; ed_r <= '0; sx_r <= 1'b0; sd_r <= 1'b0;
    end else if (start && !busy) begin
      mx_r <= mx; md_r <= md; ex_r <= ex; ed_r <= ed; sx_r <= sx; sd_r <= sd;
    end

  div_ctrl u_ctrl (
    .clk, .rst_n, .start, .w_zero, .ctl, .c_cnt, .busy, .done);

  norm_unit u_norm (
    .clk, .rst_n, .m_x(mx_r), .m_d(md_r),
    .mx_xd(ctl.mx_xd), .ld_rm(ctl.ld_rm), .mul_en(ctl.mul_en),
    .ld_d(ctl.ld_d), .ld_x(ctl.ld_x),
    .x_o(x_n), .d_o(d_n), .db2, .ex_o(ex_n), .ed_o(ed_n));

  recurrence u_rec (
    .clk, .rst_n, .init(ctl.init), .iter(ctl.iter), .x_i(x_n), .d_i(d_n),
    .q, .w_zero, .w_sign);

  conv_round u_cr (
    .clk, .rst_n, .clr(ctl.clr), .load_q(ctl.load_q), .q_in(q), .hold(ctl.hold),
    .assim(ctl.assim), .rnd(ctl.rnd), .w_zero, .w_sign, .q_o(q_acc),
    .rnd_p, .rnd_m);

  exp_sign u_es (
    .sx(sx_r), .sd(sd_r), .ex(ex_r), .ed(ed_r), .ex_n, .ed_n, .c_cnt, .sq, .eq);

  assign mq = q_acc[MW-1:0];
endmodule
