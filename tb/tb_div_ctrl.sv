// Testbench of the controller: checks cycle by cycle the control signals of
// the sequence N1..N4, INIT, ITER x17, ROUND, FIN for a non-exact division
// (done in cycle 24, C = 16), and the early stop when the residual becomes
// zero after C digits (done in cycle C + 7, C digits assimilated), including
// a zero dividend (C = 0). start during a division is ignored.
module tb_div_ctrl;
  import bid_div_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, w_zero = 1'b0;
  ctl_t ctl;
  logic [4:0] c_cnt;
  logic busy, done;
  int checks = 0, failures = 0;

  div_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // zero_at: residual w[zero_at] becomes zero (-1: never)
  task automatic run(int zero_at);
    int cyc, n_assim, n_iter, exp_done;
    ctl_t e;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    cyc = 1; n_assim = 0; n_iter = 0;
    exp_done = (zero_at < 0) ? 24 : zero_at + 7;
    while (!done && cyc < 40) begin
      e = '0;
      if (cyc == 1) begin e.mx_xd = 1; e.ld_rm = 1; end
      if (cyc == 2) begin e.ld_rm = 1; e.mul_en = 1; end
      if (cyc == 3) begin e.mul_en = 1; e.ld_d = 1; end
      if (cyc == 4) e.ld_x = 1;
      if (cyc == 5) e.init = 1;
      if (cyc >= 6 && cyc <= 22) begin         // iteration j = cyc - 5
        e.iter = 1; e.load_q = 1;
        if (cyc - 5 >= 2 && cyc - 5 <= 16) e.assim = 1;
        if (cyc - 5 == 17) e.hold = 1;
        if (zero_at >= 0 && cyc - 5 == zero_at + 1) begin
          e.hold = 0; e.assim = (zero_at > 0);
        end
      end
      if (cyc == 23 && zero_at < 0) begin e.rnd = 1; e.assim = 1; end
      // residual as seen by the controller: w[j-1] in iteration j
      w_zero = (zero_at >= 0 && cyc - 5 == zero_at + 1);
      #1;
      if (start == 1'b0 && cyc == 10) start = 1'b1;   // ignored while busy
      checks++;
      if (ctl != e || !busy) begin
        failures++;
        $display("FAIL zero_at=%0d cycle %0d ctl=%b exp %b", zero_at, cyc, ctl, e);
      end
      @(negedge clk);
      start = 1'b0;
      w_zero = 1'b0;
      cyc++;
    end
    checks += 2;
    if (cyc != exp_done) begin
      failures++; $display("FAIL zero_at=%0d done in cycle %0d exp %0d", zero_at, cyc, exp_done);
    end
    if (int'(c_cnt) != (zero_at < 0 ? 16 : zero_at)) begin
      failures++; $display("FAIL zero_at=%0d C=%0d", zero_at, c_cnt);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(-1);
    for (int z = 0; z <= 16; z++) run(z);
    run(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
