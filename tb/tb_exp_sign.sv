// Testbench of the sign and exponent logic: random inputs against the
// formula eq = ex - ed + 398 - ex_n + ed_n - C and sq = sx xor sd.
module tb_exp_sign;
  import bid_div_pkg::*;
  logic sx, sd;
  logic [EW-1:0] ex, ed;
  logic [EXPW-1:0] ex_n, ed_n;
  logic [4:0] c_cnt;
  logic sq;
  logic signed [EW+1:0] eq;
  int checks = 0, failures = 0;

  exp_sign dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    for (int i = 0; i < 3000; i++) begin
      sx = 1'($urandom); sd = 1'($urandom);
      ex = 10'($urandom % 768); ed = 10'($urandom % 768);
      ex_n = 5'($urandom % 18); ed_n = 5'($urandom % 18); c_cnt = 5'($urandom % 17);
      #1;
      r = int'(ex) - int'(ed) + 398 - int'(ex_n) + int'(ed_n) - int'(c_cnt);
      checks++;
      if (int'(eq) != r || sq != (sx ^ sd)) begin
        failures++;
        $display("FAIL eq=%0d exp %0d", eq, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
