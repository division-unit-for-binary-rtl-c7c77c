// Controller of the BID divider.
// Sequence after start (one state per clock cycle):
//   N1..N4  normalization of the divisor, then the dividend (shared unit)
//   INIT    w[0] = x
//   ITER    iterations j = 1..17; from j = 2 on, the digit q_(j-1) registered
//           in the previous cycle is assimilated, unless the residual w[j-1]
//           is zero (the quotient is exact: assimilate it and finish) or
//           j = 17 (q16 is held back for rounding)
//   ROUND   q17 is the rounding digit; q16 +- rounding is assimilated
//   FIN     done = 1 for one cycle; results stay valid until the next start
// A non-exact division takes 4 + 1 + 17 + 1 + 1 = 24 cycles, 4 for the
// normalization and 20 for recurrence and rounding, as in the published design.
// An exact quotient with C digits finishes after C + 7 cycles.
// c_cnt counts the assimilated digits (C of the exponent formula).
// start is ignored while busy. The state encoding is this design's own.
module div_ctrl
  import bid_div_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       w_zero,
  output ctl_t       ctl,
  output logic [4:0] c_cnt,
  output logic       busy,
  output logic       done
);
  typedef enum logic [3:0] {
    S_IDLE, S_N1, S_N2, S_N3, S_N4, S_INIT, S_ITER, S_ROUND, S_FIN
  } state_t;

  state_t     state, nstate;
  logic [4:0] j;

  always_comb begin
    ctl    = '0;
    nstate = state;
    unique case (state)
      S_IDLE: if (start) begin ctl.clr = 1'b1; nstate = S_N1; end
      S_N1:   begin ctl.mx_xd = 1'b1; ctl.ld_rm = 1'b1; nstate = S_N2; end
      S_N2:   begin ctl.ld_rm = 1'b1; ctl.mul_en = 1'b1; nstate = S_N3; end
      S_N3:   begin ctl.mul_en = 1'b1; ctl.ld_d = 1'b1; nstate = S_N4; end
      S_N4:   begin ctl.ld_x = 1'b1; nstate = S_INIT; end
      S_INIT: begin ctl.init = 1'b1; nstate = S_ITER; end
      S_ITER: begin
        ctl.iter   = 1'b1;
        ctl.load_q = 1'b1;
        if (j == 5'd1) begin
          if (w_zero) nstate = S_FIN;        // zero dividend
        end else if (w_zero) begin
          ctl.assim = 1'b1;                  // exact: last digit
          nstate    = S_FIN;
        end else if (j <= 5'(NDIG)) begin
          ctl.assim = 1'b1;
        end else begin
          ctl.hold  = 1'b1;                  // j = 17: keep q16
          nstate    = S_ROUND;
        end
      end
      S_ROUND: begin ctl.rnd = 1'b1; ctl.assim = 1'b1; nstate = S_FIN; end
      S_FIN:   nstate = S_IDLE;
      default: nstate = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      j     <= '0;
      c_cnt <= '0;
    end else begin
      state <= nstate;
      if (state == S_INIT)      j <= 5'd1;
      else if (state == S_ITER) j <= j + 5'd1;
      if (ctl.clr)        c_cnt <= '0;
      else if (ctl.assim) c_cnt <= c_cnt + 5'd1;
    end

  assign busy = (state != S_IDLE);
  assign done = (state == S_FIN);

  // done lasts one cycle and is followed by idle; iterations stay in 1..17
  a_done_then_idle: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !busy);
  a_iter_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_ITER) |-> (j >= 5'd1 && j <= 5'(NIT)));
endmodule
