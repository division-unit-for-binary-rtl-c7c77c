// Testbench of the recurrence: loads random normalized operands (divisor in
// [0.1*2^60, 2^60), dividend below 0.7 d), runs 17 iterations and after each
// one checks with wide integers that R = x*10^j - Q_j*d, with Q_j built from
// the digits produced so far, satisfies |R| <= (7/9) d, and that the
// sign-and-zero outputs match R. Exact quotients (x = d*k/8) are included.
module tb_recurrence;
  import bid_div_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, iter = 1'b0;
  logic [XW-1:0] x_i;
  logic [DW-1:0] d_i;
  qdigit_t q;
  logic w_zero, w_sign;
  int checks = 0, failures = 0, n_zero = 0;

  recurrence dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic signed [191:0] s_t;

  task automatic run(logic [59:0] d, logic [55:0] x);
    s_t qacc, r, xs, ds;
    @(negedge clk);
    x_i = x; d_i = d; init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    qacc = 0;
    xs = s_t'({136'd0, x});
    ds = s_t'({132'd0, d});
    for (int j = 1; j <= 17; j++) begin
      iter = 1'b1;
      #1;
      qacc = qacc * 10 + s_t'(5 * int'(q.qh) + int'(q.ql));
      @(negedge clk);
      iter = 1'b0;
      xs = xs * 10;
      r = xs - qacc * ds;
      checks++;
      if (9 * r > 7 * ds || 9 * r < -7 * ds || w_sign != (r < 0) || w_zero != (r == 0)) begin
        failures++;
        $display("FAIL j=%0d d=%h x=%h", j, d, x);
      end
      if (w_zero) n_zero++;
    end
  endtask

  initial begin
    logic [59:0] d;
    logic [55:0] x;
    x_i = '0; d_i = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      d = 60'({$urandom, $urandom});
      if (d < 60'h1999999999999a0) d = d | 60'h200000000000000;
      if (i % 3 == 0) begin
        d = d & ~60'h7;
        x = 56'((d >> 3) * ($urandom % 5));
      end else
        x = 56'((64'(d) >> 4) * 64'($urandom % 11) + 64'($urandom));
      run(d, x);
    end
    checks++;
    if (n_zero == 0) begin failures++; $display("no exact case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
