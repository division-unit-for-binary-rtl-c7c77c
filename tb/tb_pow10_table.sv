// Testbench of the normalization tables: for every leading-zero count the
// chosen power of ten must bring the smallest and the largest significand
// with that count into [0.1*2^54, 2*2^54), and pt must equal 10^e
// (computed here by repeated multiplication).
module tb_pow10_table;
  import bid_div_pkg::*;
  logic [LZW-1:0] lz;
  logic [EXPW-1:0] e;
  logic [PTW-1:0] pt;
  int checks = 0, failures = 0;

  pow10_table dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] p, lo_m, hi_m, lo_lim, hi_lim;
    for (int k = 0; k <= 58; k++) begin
      lz = LZW'(k);
      #1;
      p = 1;
      for (int i = 0; i < int'(e); i++) p = p * 10;
      // significands with k leading zeros (of 54): [2^(53-k), 2^(54-k)), in
      // units where the target range is [0.1, 2) * 2^54, scaled by 10
      lo_m = (128'd1 << (53 - (k > 53 ? 53 : k)));
      hi_m = (128'd1 << (54 - (k > 53 ? 53 : k))) - 1;
      lo_lim = 128'd1 << 54;          // 0.1 * 2^54, times 10
      hi_lim = 128'd20 << 54;         // 2 * 2^54, times 10
      if (k > 53) begin               // divisor counts, +5: range *32
        lo_m = 128'd1 << (58 - k);
        hi_m = (128'd1 << (59 - k)) - 1;
      end
      checks += 2;
      if (pt != PTW'(p) || e > 17) begin
        failures++;
        $display("FAIL lz=%0d: pt != 10^%0d", k, e);
      end
      if (k <= 53 && (lo_m * p * 10 < lo_lim || hi_m * p * 10 >= hi_lim)) begin
        failures++;
        $display("FAIL lz=%0d: e=%0d out of range", k, e);
      end else if (k > 53 && (lo_m * p * 10 < (lo_lim << 5) || hi_m * p * 10 >= (hi_lim << 5))) begin
        failures++;
        $display("FAIL lz=%0d: e=%0d out of divisor range", k, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
