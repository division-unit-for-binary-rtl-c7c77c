// Testbench of the normalization unit: runs the four-cycle control sequence
// (divisor stage 1; dividend stage 1 + divisor tree; dividend tree + divisor
// CPA; dividend CPA) and checks, against wide-integer references, that
//   d_o = 2 * md * 10^ed_o / (2 if db2)  lies in [0.1*2^60, 2^60)
//   x_o = 2 * mx * 10^ex_o / (2 if db2)  and x_o < (7/9) d_o
//   db2 = (md * 10^ed_o >= 2^59)
// and that the powers are the ones of the leading-zero rule.
module tb_norm_unit;
  import bid_div_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [MW-1:0] m_x, m_d;
  logic mx_xd, ld_rm, mul_en, ld_d, ld_x;
  logic [XW-1:0] x_o;
  logic [DW-1:0] d_o;
  logic db2;
  logic [EXPW-1:0] ex_o, ed_o;
  int checks = 0, failures = 0, n_db2 = 0, n_nodb2 = 0;

  norm_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] p10(int e);
    logic [127:0] v = 1;
    for (int i = 0; i < e; i++) v = v * 10;
    return v;
  endfunction

  function automatic int exp_e(logic [MW-1:0] m, int extra);
    int lz = 0;
    logic [127:0] p5 = 5;
    for (int i = MW - 1; i >= 0 && !m[i]; i--) lz++;
    lz += extra;
    for (int e = 0; e < 18; e++) begin
      if (p5 >= (128'd1 << lz)) return e;
      p5 = p5 * 10;
    end
    return 17;
  endfunction

  task automatic norm(logic [MW-1:0] a, logic [MW-1:0] b);
    logic [127:0] xv, dv, xr, dr;
    logic db;
    @(negedge clk);
    m_x = a; m_d = b;
    mx_xd = 1; ld_rm = 1; mul_en = 0; ld_d = 0; ld_x = 0;
    @(negedge clk);
    mx_xd = 0; ld_rm = 1; mul_en = 1;
    @(negedge clk);
    ld_rm = 0; mul_en = 1; ld_d = 1;
    @(negedge clk);
    mul_en = 0; ld_d = 0; ld_x = 1;
    @(negedge clk);
    ld_x = 0;
    xv = 128'(a) * p10(exp_e(a, 0));
    dv = 128'(b) * p10(exp_e(b, 5));
    db = dv >= (128'd1 << 59);
    xr = db ? xv : xv << 1;
    dr = db ? dv : dv << 1;
    checks += 5;
    if (int'(ex_o) != exp_e(a, 0) || int'(ed_o) != exp_e(b, 5)) begin
      failures++; $display("FAIL powers %0d %0d", ex_o, ed_o);
    end
    if (db2 != db) begin failures++; $display("FAIL db2"); end
    if (128'(x_o) != xr || 128'(d_o) != dr) begin
      failures++; $display("FAIL values mx=%0d md=%0d x=%h exp %h d=%h exp %h", a, b, x_o, xr, d_o, dr);
    end
    if (10 * 128'(d_o) < (128'd1 << 60) || 128'(d_o) >= (128'd1 << 60)) begin
      failures++; $display("FAIL d range");
    end
    if (a != 0 && 9 * 128'(x_o) >= 7 * 128'(d_o)) begin
      failures++; $display("FAIL x >= 7/9 d");
    end
    if (db) n_db2++; else n_nodb2++;
  endtask

  function automatic logic [MW-1:0] rnd_sig();
    logic [63:0] v = {$urandom, $urandom};
    return MW'((v % 64'd10000000000000000) >> ($urandom % 54));
  endfunction

  initial begin
    {mx_xd, ld_rm, mul_en, ld_d, ld_x} = '0;
    m_x = 0; m_d = 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    norm(1, 8);
    norm(54'd9999999999999999, 54'd9999999999999999);
    norm(1, 1);
    norm(0, 3);
    for (int i = 0; i < 3000; i++) begin
      logic [MW-1:0] b;
      b = rnd_sig();
      if (b == 0) b = 1;
      norm(rnd_sig(), b);
    end
    checks++;
    if (n_db2 == 0 || n_nodb2 == 0) begin failures++; $display("db2 case missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
