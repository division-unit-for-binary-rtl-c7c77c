// Testbench of the convert-and-round unit. Feeds signed-digit strings with
// the same control timing as the divider (digit j registered in cycle j and
// assimilated in cycle j+1, q16 held, rounding in cycle 18) and compares Q
// with the expected value: Q16 = sum q_j 10^(16-j) moved by -1/0/+1 to the
// nearest of (10 Q16 + q17 + e)/10, ties to even, where e is a remainder
// fraction of the given sign (or zero). Also checks exact strings of C
// digits without rounding. Positive and negative ties are forced.
module tb_conv_round;
  import bid_div_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, load_q, hold, assim, rnd, w_zero, w_sign;
  qdigit_t q_in;
  logic [QW-1:0] q_o;
  logic rnd_p, rnd_m;
  int checks = 0, failures = 0, n_up = 0, n_dn = 0, n_tie_p = 0, n_tie_m = 0;

  conv_round dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic qdigit_t rnd_digit(bit first);
    qdigit_t d;
    d.qh = 2'($signed($urandom % 3) - 1);
    d.ql = 3'($signed($urandom % 5) - 2);
    if (first) begin d.qh = 2'sd1; d.ql = 3'($urandom % 3); end
    return d;
  endfunction

  // n digits; if n == 17 the last one is the rounding digit
  task automatic run(int n, qdigit_t dg [17], int rs);
    longint qv, v2, diff, expq;
    @(negedge clk);
    {clr, load_q, hold, assim, rnd} = 5'b10000; w_zero = 0; w_sign = 0;
    for (int j = 1; j <= n; j++) begin
      @(negedge clk);
      {clr, hold, assim, rnd} = '0;
      load_q = 1'b1; q_in = dg[j-1];
      if (j >= 2 && j <= 16) assim = 1'b1;
      if (j == 17) hold = 1'b1;
    end
    @(negedge clk);
    load_q = 1'b0; hold = 1'b0;
    if (n == 17) begin
      assim = 1'b1; rnd = 1'b1;
      w_zero = (rs == 0); w_sign = (rs < 0);
    end else
      assim = 1'b1;                  // exact: last digit
    @(negedge clk);
    {assim, rnd} = '0;
    qv = 0;
    for (int j = 0; j < (n == 17 ? 16 : n); j++)
      qv = qv * 10 + longint'(5 * int'(dg[j].qh) + int'(dg[j].ql));
    expq = qv;
    if (n == 17) begin
      v2 = 2 * longint'(5 * int'(dg[16].qh) + int'(dg[16].ql)) + longint'(rs);
      diff = v2;                       // 2*(q17 + e) with e = rs/2
      if (diff > 10 || (diff == 10 && qv[0])) expq = qv + 1;
      else if (diff < -10 || (diff == -10 && qv[0])) expq = qv - 1;
      if (expq > qv) n_up++;
      if (expq < qv) n_dn++;
      if (diff == 10) n_tie_p++;
      if (diff == -10) n_tie_m++;
    end
    checks++;
    if (longint'(q_o) != expq) begin
      failures++;
      $display("FAIL n=%0d rs=%0d Q=%0d exp %0d", n, rs, q_o, expq);
    end
  endtask

  initial begin
    qdigit_t dg [17];
    int rs;
    {clr, load_q, hold, assim, rnd, w_zero, w_sign} = '0;
    q_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      for (int j = 0; j < 17; j++) dg[j] = rnd_digit(j == 0);
      rs = int'($urandom % 3) - 1;
      if (i % 4 == 1) begin dg[16].qh = 2'sd1;  dg[16].ql = 3'sd0; rs = 0; end
      if (i % 4 == 2) begin dg[16].qh = -2'sd1; dg[16].ql = 3'sd0; rs = 0; end
      if (i % 8 == 3) run(1 + $urandom % 16, dg, 0);
      else            run(17, dg, rs);
    end
    checks++;
    if (n_up == 0 || n_dn == 0 || n_tie_p == 0 || n_tie_m == 0) begin
      failures++; $display("case missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
