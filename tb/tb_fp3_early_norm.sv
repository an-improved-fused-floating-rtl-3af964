// tb_fp3_early_norm: early normalization of a sum/carry pair.
// For random pairs, counts and exponents checks that the shift is
// min(count, emax + 2), at_min flags the limit, and the shifted pair still
// sums to the original sum shifted by the same amount (mod 2^57).
`timescale 1ns/1ps
module tb_fp3_early_norm;
  import fp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  win_t s, c, so, co;
  logic [LZC_W-1:0] cnt, shift;
  logic [EXP_W-1:0] emax;
  logic at_min;
  int checks = 0, failures = 0, n_min = 0;

  fp3_early_norm dut (.s_in(s), .c_in(c), .cnt(cnt), .emax(emax),
                      .s_out(so), .c_out(co), .shift(shift), .at_min(at_min));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sh;
    win_t exp_sum;
    for (int n = 0; n < 20000; n++) begin
      s = win_t'({$urandom, $urandom});
      c = win_t'({$urandom, $urandom});
      cnt  = LZC_W'($urandom_range(WIN_W));
      emax = (n % 2) ? EXP_W'($urandom_range(1, 60)) : EXP_W'($urandom_range(1, 254));
      @(posedge clk);
      exp_sh = (int'(cnt) < int'(emax) + 2) ? int'(cnt) : int'(emax) + 2;
      exp_sum = (s + c) << exp_sh;
      checks++;
      if (at_min) n_min++;
      if (int'(shift) != exp_sh || at_min !== (int'(cnt) >= int'(emax) + 2) ||
          win_t'(so + co) !== exp_sum) begin
        failures++;
        if (failures < 10) $display("FAIL cnt=%0d emax=%0d shift=%0d", cnt, emax, shift);
      end
    end
    if (n_min == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
