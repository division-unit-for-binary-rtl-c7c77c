// Testbench of the quotient-digit selection: for random divisors in the
// normalized range [0.1*2^60, 2^60) and random residuals |w| <= (7/9) d,
// split randomly into a carry-save pair, the selected digit q = 5 qH + qL
// must keep the next residual 10 w - q d within (7/9) d (the convergence
// condition), and qH alone must leave 10 w - 5 qH d within (2 + 7/9) d.
module tb_sel_func;
  import bid_div_pkg::*;
  logic [15:0] ys, yc;
  logic [6:0] dhat;
  logic [11:0] dh;
  qdigit_t q;
  int checks = 0, failures = 0;
  int hist [int];

  sel_func dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic signed [95:0] s_t;

  task automatic one(logic [59:0] d, s_t w);
    logic [63:0] ws, wc;
    s_t dd, v, wn;
    int qv;
    ws = {$urandom, $urandom};
    wc = 64'(w) - ws;
    ys = ws[62:47]; yc = wc[62:47]; dhat = d[59:53]; dh = d[59:48];
    #1;
    qv = 5 * int'(q.qh) + int'(q.ql);
    dd = s_t'({36'd0, d});
    v  = 10 * w - 5 * s_t'(int'(q.qh)) * dd;
    wn = 10 * w - s_t'(qv) * dd;
    checks++;
    if (9 * wn > 7 * dd || 9 * wn < -7 * dd || 9 * v > 25 * dd || 9 * v < -25 * dd) begin
      failures++;
      $display("FAIL d=%h w=%0d q=%0d", d, w, qv);
    end
    if (hist.exists(qv)) hist[qv]++; else hist[qv] = 1;
  endtask

  initial begin
    logic [59:0] d;
    s_t w, lim;
    for (int i = 0; i < 200000; i++) begin
      // divisor: uniform in [0.1, 1) * 2^60, with extra weight on the ends
      d = 60'({$urandom, $urandom});
      if (i % 4 == 0) d = 60'(64'h0199999999999999 + 64'($urandom));
      if (d < 60'h1999999999999a0) d = d | 60'h200000000000000;
      lim = (7 * s_t'({36'd0, d})) / 9;
      w = s_t'({$urandom, $urandom}) % (lim + 1);
      if ($urandom % 2) w = -w;
      if (i % 8 == 1) w = lim;
      if (i % 8 == 2) w = -lim;
      one(d, w);
    end
    for (int k = -7; k <= 7; k++)
      if (!hist.exists(k)) begin failures++; $display("digit %0d never selected", k); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
