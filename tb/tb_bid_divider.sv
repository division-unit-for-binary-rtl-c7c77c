// End-to-end testbench of the BID significand divider at its default sizes.
// Drives divisions (fixed cases, ties, exact quotients, random 1..16-digit
// operands) and compares sign, exponent and significand with a reference
// worked out with wide integer arithmetic: x = mx*10^ex_n, d = md*10^ed_n,
// then the smallest k <= 16 with x*10^k divisible by d gives an exact
// quotient of k digits, otherwise Q = x*10^16/d rounded to nearest even.
// The normalization powers follow the rule "smallest e with 5*10^e >= 2^lz"
// (lz + 5 for the divisor). It also checks the latency (24 cycles, or C + 7
// for an exact quotient) and counts how often each mechanism happens.
module tb_bid_divider;
  import bid_div_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic sx, sd;
  logic [EW-1:0] ex, ed;
  logic [MW-1:0] mx, md;
  logic busy, done, sq;
  logic signed [EW+1:0] eq;
  logic [MW-1:0] mq;
  int checks = 0, failures = 0;
  int n_exact = 0, n_inexact = 0, n_db2 = 0, n_th1 = 0, n_th0 = 0, n_rp = 0, n_rm = 0,
      n_rz = 0, n_tie_p = 0, n_tie_m = 0, n_zero = 0, n_qh_m = 0, n_qh_p = 0,
      n_ql_2 = 0, n_ql_m2 = 0, n_dhat12 = 0;

  bid_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.ctl.ld_rm) begin
      if (dut.u_norm.th) n_th1++; else n_th0++;
    end
    if (dut.ctl.ld_d && dut.u_norm.p[59]) n_db2++;
    if (dut.ctl.iter) begin
      if (dut.q.qh == 2'sd1) n_qh_p++;
      if (dut.q.qh == -2'sd1) n_qh_m++;
      if (dut.q.ql == 3'sd2) n_ql_2++;
      if (dut.q.ql == -3'sd2) n_ql_m2++;
      if (dut.d_n[59:53] < 7'd13) n_dhat12++;
    end
    if (dut.ctl.rnd) begin
      if (dut.rnd_p) n_rp++;
      else if (dut.rnd_m) n_rm++;
      else n_rz++;
      if (dut.w_zero && dut.u_cr.qj == 5'sd5) n_tie_p++;
      if (dut.w_zero && dut.u_cr.qj == -5'sd5) n_tie_m++;
    end
  end

  // trace of Q after each assimilation, for the 1/8 example
  longint qtrace [$];
  always @(posedge clk) if (rst_n && dut.ctl.clr) qtrace.delete();
  logic assim_d = 1'b0;
  always @(posedge clk) assim_d <= dut.ctl.assim;
  always @(negedge clk) if (rst_n && assim_d) qtrace.push_back(longint'(dut.q_acc));

  typedef logic [255:0] big_t;

  function automatic int lzc(logic [MW-1:0] m);
    for (int i = MW - 1; i >= 0; i--) if (m[i]) return MW - 1 - i;
    return MW;
  endfunction

  function automatic int pick_e(int lz);
    big_t p5 = 5;
    for (int e = 0; e < 18; e++) begin
      if (p5 >= (big_t'(1) << lz)) return e;
      p5 = p5 * 10;
    end
    return 17;
  endfunction

  function automatic big_t pow10(int e);
    big_t v = 1;
    for (int i = 0; i < e; i++) v = v * 10;
    return v;
  endfunction

  task automatic run(logic [MW-1:0] a, logic [MW-1:0] b, logic [EW-1:0] ea, logic [EW-1:0] eb,
                     logic sa, logic sb);
    int exn, edn, c, cyc, exp_eq, exp_cyc;
    big_t xn, dn, t, qv, r;
    logic exact;
    exn = pick_e(lzc(a));
    edn = pick_e(lzc(b) + 5);
    xn = big_t'(a) * pow10(exn);
    dn = big_t'(b) * pow10(edn);
    exact = 1'b0;
    c = 16;
    for (int k = 0; k <= 16; k++) begin
      t = xn * pow10(k);
      if (t % dn == 0) begin
        exact = 1'b1; c = k; qv = t / dn;
        break;
      end
    end
    if (!exact) begin
      t = xn * pow10(16);
      qv = t / dn;
      r = t % dn;
      if (2 * r > dn || (2 * r == dn && qv[0])) qv = qv + 1;
    end
    exp_eq = int'(ea) - int'(eb) + int'(BIAS) - exn + edn - c;
    exp_cyc = exact ? c + 7 : 24;
    if (exact) n_exact++; else n_inexact++;
    if (a == 0) n_zero++;

    @(negedge clk);
    mx = a; md = b; ex = ea; ed = eb; sx = sa; sd = sb; start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    checks += 4;
    if (mq !== qv[MW-1:0] || eq !== (EW+2)'(exp_eq) || sq !== (sa ^ sb) || cyc != exp_cyc) begin
      failures++;
      $display("FAIL mx=%0d md=%0d: mq=%0d exp %0d, eq=%0d exp %0d, sq=%0b, cycles=%0d exp %0d",
               a, b, mq, qv[MW-1:0], eq, exp_eq, sq, cyc, exp_cyc);
    end
  endtask

  function automatic logic [MW-1:0] rnd_sig(int ndig);
    logic [63:0] v;
    v = {$urandom, $urandom};
    return MW'(v % 64'(pow10(ndig)));
  endfunction

  initial begin
    logic [MW-1:0] a, b;
    sx = 0; sd = 0; ex = 0; ed = 0; mx = 0; md = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // fixed cases
    run(1, 8, 398, 398, 0, 0);                    // 0.125, exact
    // digits 1, 3, -5: Q goes 1, 13, 125
    @(posedge clk);
    checks++;
    if (qtrace.size() != 3 || qtrace[0] != 1 || qtrace[1] != 13 || qtrace[2] != 125) begin
      failures++;
      $display("FAIL 1/8 trace %p", qtrace);
    end
    run(1, 3, 400, 398, 1, 0);
    run(2, 3, 398, 390, 0, 1);
    run(54'd9999999999999999, 1, 398, 398, 1, 1);
    run(54'd9999999999999999, 54'd9999999999999999, 398, 398, 0, 0);
    run(1, 54'd9999999999999999, 398, 398, 0, 0);
    run(54'd9999999999999999, 7, 398, 398, 0, 0);
    run(0, 7, 398, 398, 0, 0);                    // zero dividend
    run(54'd1234567890123457, 2, 398, 398, 0, 0); // tie candidates
    run(54'd1234567890123455, 2, 398, 398, 0, 0);
    // ties: odd dividend over small powers of two
    for (int i = 0; i < 300; i++) begin
      a = rnd_sig(16) | 54'd1;
      b = MW'(2) << ($urandom % 4);
      run(a, b, 10'($urandom % 768), 10'($urandom % 768), 1'($urandom), 1'($urandom));
    end
    // random operands with random digit counts
    for (int i = 0; i < 20000; i++) begin
      a = rnd_sig(1 + $urandom % 16);
      b = rnd_sig(1 + $urandom % 16);
      if (b == 0) b = 1;
      run(a, b, 10'($urandom % 768), 10'($urandom % 768), 1'($urandom), 1'($urandom));
    end
    // divisors just above powers of two (smallest normalized divisors)
    for (int i = 0; i < 300; i++) begin
      a = rnd_sig(16);
      b = MW'((64'd1 << ($urandom % 53)) + 64'($urandom % 4));
      run(a, b, 398, 398, 0, 0);
    end
    $display("exact=%0d inexact=%0d db2=%0d th1=%0d th0=%0d round_up=%0d round_down=%0d round_none=%0d",
             n_exact, n_inexact, n_db2, n_th1, n_th0, n_rp, n_rm, n_rz);
    $display("tie_pos=%0d tie_neg=%0d zero_dividend=%0d qh+1=%0d qh-1=%0d ql+2=%0d ql-2=%0d dhat_below_13=%0d",
             n_tie_p, n_tie_m, n_zero, n_qh_p, n_qh_m, n_ql_2, n_ql_m2, n_dhat12);
    if (n_exact == 0 || n_inexact == 0 || n_db2 == 0 || n_th1 == 0 || n_th0 == 0 ||
        n_rp == 0 || n_rm == 0 || n_rz == 0 || n_tie_p == 0 || n_tie_m == 0 || n_zero == 0 ||
        n_qh_p == 0 || n_qh_m == 0 || n_ql_2 == 0 || n_ql_m2 == 0 || n_dhat12 != 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
