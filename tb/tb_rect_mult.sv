// Testbench of the pipelined 57x32 Booth multiplier: random operands
// (multiplier below 2^31), corner values, and the one-cycle latency of the
// pipeline register.
module tb_rect_mult;
  logic clk = 1'b0, en;
  logic [56:0] a;
  logic [31:0] b;
  logic [60:0] p;
  int checks = 0, failures = 0;

  rect_mult dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [56:0] aa, logic [31:0] bb);
    logic [127:0] r;
    @(negedge clk);
    a = aa; b = bb; en = 1'b1;
    @(negedge clk);                 // one edge later the product is out
    en = 1'b0;
    a = '1; b = '0;                 // inputs change, held product must not
    r = 128'(aa) * 128'(bb);
    checks++;
    if (p != r[60:0]) begin
      failures++;
      $display("FAIL %h * %h = %h, got %h", aa, bb, r[60:0], p);
    end
  endtask

  initial begin
    en = 1'b0; a = '0; b = '0;
    one(57'd100000000000000000, 32'd1);
    one(57'd1, 32'h3fffffff);
    one('1, 32'd15);
    one('1, 32'h7fffffff >> 27);
    one(57'h0aaaaaaaaaaaaaa, 32'h55555555);
    one(57'h1555555555, 32'h6aaaaaab);
    for (int i = 0; i < 2000; i++)
      one(57'({$urandom, $urandom}) >> ($urandom % 57), 32'($urandom) >> (1 + $urandom % 31));
    // products below 2^61 only: wide operand short
    for (int i = 0; i < 2000; i++)
      one(57'($urandom) >> ($urandom % 32), 32'($urandom) >> 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
