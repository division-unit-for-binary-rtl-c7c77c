// Testbench of the leading-one detector: random significands of every
// length, zero, and both operand kinds. The reference shifts the value left
// until its top bit is set.
module tb_lod;
  import bid_div_pkg::*;
  logic [MW-1:0] m;
  logic is_div;
  logic [LZW-1:0] lz;
  logic th;
  int checks = 0, failures = 0;

  lod dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int ref_lz;
    logic [MW-1:0] t;
    t = m; ref_lz = 0;
    while (ref_lz < MW && !t[MW-1]) begin t = t << 1; ref_lz++; end
    if (is_div) ref_lz += 5;
    #1;
    checks++;
    if (int'(lz) != ref_lz || th != (m >= (MW'(1) << 30))) begin
      failures++;
      $display("FAIL m=%h div=%0b lz=%0d exp %0d th=%0b", m, is_div, lz, ref_lz, th);
    end
  endtask

  initial begin
    m = 0; is_div = 0; check();
    is_div = 1; check();
    for (int i = 0; i < 2000; i++) begin
      m = MW'({$urandom, $urandom}) >> ($urandom % MW);
      is_div = 1'($urandom);
      check();
    end
    for (int b = 28; b < 33; b++) begin
      m = (MW'(1) << b); check();
      m = (MW'(1) << b) - 1; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
