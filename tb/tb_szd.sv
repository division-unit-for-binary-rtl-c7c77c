// Testbench of the sign-and-zero detector: random carry-save pairs, pairs
// that sum to zero, and pairs that sum to -1 and +1.
module tb_szd;
  logic [63:0] ws, wc;
  logic sign, zero;
  int checks = 0, failures = 0;

  szd dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint sum_v);
    #1;
    checks++;
    if (sign != (sum_v < 0) || zero != (sum_v == 0)) begin
      failures++;
      $display("FAIL ws=%h wc=%h sign=%0b zero=%0b", ws, wc, sign, zero);
    end
  endtask

  initial begin
    longint s;
    for (int i = 0; i < 3000; i++) begin
      ws = {$urandom, $urandom};
      unique case (i % 4)
        0: wc = {$urandom, $urandom};
        1: wc = -ws;
        2: wc = -ws - 1;
        default: wc = -ws + 1;
      endcase
      s = longint'(ws + wc);
      check(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
