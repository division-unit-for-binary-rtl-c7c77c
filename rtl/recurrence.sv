// Radix-10 digit recurrence, retimed form:
//   v[j] = 10 w[j-1] - qH_j * 5d
//   w[j] = v[j]      - qL_j * d
// with q_j = 5 qH_j + qL_j selected from w[j-1] in the same cycle (sel_func).
// The residual is kept in carry-save form (ws, wc), 64-bit two's complement
// modulo 2^64: |10w| < 7.8 * 2^60 fits. 10w is formed as 8w + 2w with two
// 3:2 rows, then one 3:2 row adds -qH*5d and one adds -qL*d. A negative
// multiple enters as its one's complement with the +1 in the free carry LSB.
// d is the normalized divisor (times 2) from the normalization unit, 5d is
// computed once in the init cycle.
// Timing: init loads w[0] = x and 5d; each iter cycle produces digit q (valid
// combinationally during the cycle) and writes w[j] at the clock edge.
// w_zero / w_sign (sign-and-zero detection) describe the residual now held.
module recurrence
  import bid_div_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          iter,
  input  logic [XW-1:0] x_i,
  input  logic [DW-1:0] d_i,
  output qdigit_t       q,
  output logic          w_zero,
  output logic          w_sign
);
  logic [RW-1:0] ws, wc, d5;
  logic [RW-1:0] d64, s1, c1, s2, c2, s3, c3, ns, nc;
  logic [RW-1:0] mul_h, mul_l;
  logic          cin_h, cin_l;

  assign d64 = RW'(d_i);

  sel_func u_sel (
    .ys(ws[62:47]), .yc(wc[62:47]), .dhat(d_i[DW-1:DW-7]), .dh(d_i[DW-1:48]), .q(q));

  // multiples of d (negative ones as one's complement + carry-in)
  always_comb begin
    unique case (q.qh)
      2'sd1:   begin mul_h = ~d5; cin_h = 1'b1; end
      -2'sd1:  begin mul_h = d5;  cin_h = 1'b0; end
      default: begin mul_h = '0;  cin_h = 1'b0; end
    endcase
    unique case (q.ql)
      3'sd2:   begin mul_l = ~(d64 << 1); cin_l = 1'b1; end
      3'sd1:   begin mul_l = ~d64;        cin_l = 1'b1; end
      -3'sd1:  begin mul_l = d64;         cin_l = 1'b0; end
      -3'sd2:  begin mul_l = d64 << 1;    cin_l = 1'b0; end
      default: begin mul_l = '0;          cin_l = 1'b0; end
    endcase
  end

  csa32 #(.W(RW)) u_a1 (.a(ws << 3), .b(wc << 3), .c(ws << 1), .cin(1'b0),  .sum(s1), .carry(c1));
  csa32 #(.W(RW)) u_a2 (.a(s1),      .b(c1),      .c(wc << 1), .cin(1'b0),  .sum(s2), .carry(c2));
  csa32 #(.W(RW)) u_a3 (.a(s2),      .b(c2),      .c(mul_h),   .cin(cin_h), .sum(s3), .carry(c3));
  csa32 #(.W(RW)) u_a4 (.a(s3),      .b(c3),      .c(mul_l),   .cin(cin_l), .sum(ns), .carry(nc));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ws <= '0;
      wc <= '0;
      d5 <= '0;
    end else if (init) begin
      ws <= RW'(x_i);
      wc <= '0;
      d5 <= (d64 << 2) + d64;
    end else if (iter) begin
      ws <= ns;
      wc <= nc;
    end

  szd #(.W(RW)) u_szd (.ws(ws), .wc(wc), .sign(w_sign), .zero(w_zero));

  // the selected digit stays inside qH in {-1,0,1}, qL in {-2..2}
  a_digit_set: assert property (@(posedge clk) disable iff (!rst_n)
    iter |-> (q.qh != 2'b10 && q.ql >= -3'sd2 && q.ql <= 3'sd2));
endmodule
