// tb_fp3_sig_compare: sign detection of a sum/carry pair.
// Random and near-zero pairs; neg must equal the top bit of the 57-bit
// two's-complement sum of the pair.
`timescale 1ns/1ps
module tb_fp3_sig_compare;
  import fp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  win_t s, c, tot;
  logic neg;
  int checks = 0, failures = 0, n_neg = 0;

  fp3_sig_compare dut (.s(s), .c(c), .neg(neg));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      s = win_t'({$urandom, $urandom});
      case (n % 3)
        0: c = win_t'({$urandom, $urandom});
        1: c = -s + win_t'($urandom_range(3));        // sum just above zero
        default: c = -s - win_t'($urandom_range(1, 3)); // sum just below zero
      endcase
      @(posedge clk);
      tot = s + c;
      checks++;
      if (tot[WIN_W-1]) n_neg++;
      if (neg !== tot[WIN_W-1]) begin
        failures++;
        if (failures < 10) $display("FAIL s=%h c=%h neg=%b", s, c, neg);
      end
    end
    if (n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
